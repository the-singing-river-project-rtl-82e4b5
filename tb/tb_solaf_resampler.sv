// tb_solaf_resampler: fills S1 with random samples and runs the resampler
// for several rates (below, at and above 1.0, and the largest), with the
// pause input toggled at random. Checks the length of S2 and every S2
// sample against S2[j] = S1[floor(j*rate/64)], that the bus is released
// (no chip selected) while paused, that pauses were honoured, and the
// clock count of an unpaused run (4 clocks per sample plus 1).
module tb_solaf_resampler;
  localparam int B = 4000;
  logic clk = 0, rst = 1, start = 0, half = 0, pause = 0;
  logic [10:0] rate; logic paused, busy, done; logic [11:0] len;
  logic [15:0] addr; logic we; logic [12:0] wdata, rdata;
  int checks = 0, failures = 0, npaused = 0, bus_while_paused = 0;
  always #50 clk = ~clk;
  solaf_bus_mem mem (.clk, .addr, .we, .wdata, .rdata);
  solaf_resampler dut (.clk, .rst, .start, .s1_half(half), .rate, .pause, .paused, .busy, .done, .len,
    .bus_addr_o(addr), .bus_we(we), .bus_wdata(wdata), .bus_rdata(rdata));
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  always @(posedge clk) if (!rst && paused) begin
    npaused++; if (addr[15:13] != 3'b111 || we) bus_while_paused++;
  end
  initial begin repeat (1000000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int rates [5] = '{64, 43, 95, 200, 2047};
    for (int i = 0; i < 8192; i++) mem.s1.mem[i] = 13'($urandom);
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int r = 0; r < 5; r++) begin
      int ptr, n, bad, t0, t1; bit rnd;   // static: assigned below, not initialised
      ptr = 0; n = 0; bad = 0; rnd = (r % 2 == 1);
      rate = 11'(rates[r]); half = r[0];
      @(posedge clk); #1 start = 1; @(posedge clk); #1 start = 0; t0 = $time / 100;
      while (!done) begin
        @(posedge clk); #1 pause = rnd && ($urandom % 8 == 0) ? ~pause : pause;
      end
      t1 = $time / 100; pause = 0;
      while ((ptr >> 6) < B && n < B) begin
        if (mem.s2.mem[n] != mem.s1.mem[{half, 12'(ptr >> 6)}]) bad++;
        n++; ptr += rates[r];
      end
      check(int'(len) == n, $sformatf("rate %0d: len %0d exp %0d", rates[r], len, n));
      check(bad == 0, $sformatf("rate %0d: %0d samples wrong", rates[r], bad));
      if (!rnd) check(t1 - t0 == 4 * n + 1, $sformatf("rate %0d: %0d clocks for %0d samples", rates[r], t1 - t0, n));
      repeat (3) @(posedge clk);
    end
    check(npaused > 0, "pause honoured");
    check(bus_while_paused == 0, "bus released while paused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
