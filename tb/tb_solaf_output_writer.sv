// tb_solaf_output_writer: fills S2 with random samples and runs the output
// writer in single mode (copy S2[km..len-1] to the start of an S3 half),
// in repeat mode (continue from a given S3 index, looping back to km, until
// the half holds 4000 samples), in single mode where S2 is longer than the
// room left, and with len <= km. Pauses are toggled at random in some runs.
// Checks every S3 word of the half against a reference copy, that words
// outside the written range are untouched, w_end and full, the bus is
// released while paused, and the clock count of an unpaused single run
// (4 clocks per sample plus 1).
module tb_solaf_output_writer;
  localparam int B = 4000;
  logic clk = 0, rst = 1, start = 0, rep = 0, half = 0, pause = 0;
  logic [8:0] km; logic [11:0] len, w_start, w_end; logic paused, busy, done, full;
  logic [15:0] addr; logic we; logic [12:0] wdata, rdata;
  int checks = 0, failures = 0, npaused = 0, bus_while_paused = 0;
  int exp3 [8192];
  always #50 clk = ~clk;
  solaf_bus_mem mem (.clk, .addr, .we, .wdata, .rdata);
  solaf_output_writer dut (.clk, .rst, .start, .repeat_mode(rep), .km, .len, .half, .w_start, .pause,
    .paused, .busy, .done, .w_end, .full, .bus_addr_o(addr), .bus_we(we), .bus_wdata(wdata), .bus_rdata(rdata));
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  always @(posedge clk) if (!rst && paused) begin
    npaused++; if (addr[15:13] != 3'b111 || we) bus_while_paused++;
  end
  initial begin repeat (1000000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run(int k, int l, int ws, bit h, bit r, bit rnd);
    int w, src, bad, t0, t1, n;
    w = ws; src = k; n = 0;
    if (l > k) while (w < B) begin
      if (src >= l) begin if (!r) break; src = k; end
      exp3[{h, 12'(w)}] = int'(mem.s2.mem[src]); w++; src++; n++;
    end
    km = 9'(k); len = 12'(l); w_start = 12'(ws); half = h; rep = r;
    @(posedge clk); #1 start = 1; @(posedge clk); #1 start = 0; t0 = $time / 100;
    while (!done) begin @(posedge clk); #1 pause = rnd && ($urandom % 5 == 0) ? ~pause : pause; end
    t1 = $time / 100; pause = 0;
    bad = 0;
    for (int i = 0; i < 8192; i++) if (int'(mem.s3.mem[i]) != exp3[i]) bad++;
    check(bad == 0, $sformatf("km %0d len %0d start %0d rep %0d: %0d S3 words wrong", k, l, ws, r, bad));
    check(int'(w_end) == w && full == (w == B), $sformatf("w_end %0d exp %0d", w_end, w));
    if (!rnd && !r) check(t1 - t0 == 4 * n + 1, $sformatf("%0d clocks for %0d samples", t1 - t0, n));
    repeat (3) @(posedge clk);
  endtask

  initial begin
    for (int i = 0; i < 8192; i++) begin
      mem.s2.mem[i] = 13'($urandom); mem.s3.mem[i] = 13'($urandom); exp3[i] = int'(mem.s3.mem[i]);
    end
    repeat (3) @(posedge clk); #1 rst = 0;
    run(37, 2695, 0, 0, 0, 0);        // first copy, S2 shorter than a buffer
    run(190, 2695, 2658, 0, 1, 1);    // repeat from Km2 until full, with pauses
    run(5, 4000, 100, 1, 0, 0);       // single copy stops when S3 is full
    run(50, 40, 0, 1, 1, 0);          // len <= km: nothing to copy
    run(0, 300, 0, 1, 1, 1);          // repeat a short S2 many times, with pauses
    run(120, 700, 0, 0, 1, 0);        // repeat mode loops back to Km, not to 0
    check(npaused > 0, "pause honoured");
    check(bus_while_paused == 0, "bus released while paused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
