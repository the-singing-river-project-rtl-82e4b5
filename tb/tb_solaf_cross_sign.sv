// tb_solaf_cross_sign: fills S2 with random samples and plants a copy of
// one S2 window (at a random lag) as the reference window in S3, then runs
// the cross-sign search for full and short S2 lengths, with and without
// random pauses. Checks Km and the score against a reference search (first
// lag with the most equal sign bits), that the planted lag scores 300,
// that a too-short S2 gives Km = 0, the bus is released while paused, and
// the clock count of an unpaused search (2*WIN+3 clocks per lag plus 1).
module tb_solaf_cross_sign;
  localparam int W = 300, L = 400;
  logic clk = 0, rst = 1, start = 0, pause = 0;
  logic [12:0] ref_base; logic [11:0] len; logic paused, busy, done; logic [8:0] km, score;
  logic [15:0] addr; logic we; logic [12:0] wdata, rdata;
  int checks = 0, failures = 0, npaused = 0, bus_while_paused = 0;
  always #50 clk = ~clk;
  solaf_bus_mem mem (.clk, .addr, .we, .wdata, .rdata);
  solaf_cross_sign dut (.clk, .rst, .start, .ref_base, .len, .pause, .paused, .busy, .done, .km, .score,
    .bus_addr_o(addr), .bus_rdata(rdata));
  assign we = 1'b0; assign wdata = '0;
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  always @(posedge clk) if (!rst && paused) begin
    npaused++; if (addr[15:13] != 3'b111 || we) bus_while_paused++;
  end
  initial begin repeat (2000000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic int sgn(logic [12:0] v); return int'(v[12]); endfunction
  initial begin
    int lens [4] = '{4000, 520, 4000, 200};
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int c = 0; c < 4; c++) begin
      int plant, best, bk, sc, nl, t0, t1; bit rnd;
      rnd = (c == 2);
      for (int i = 0; i < 8192; i++) begin mem.s2.mem[i] = 13'($urandom); mem.s3.mem[i] = 13'($urandom); end
      ref_base = 13'(4096 + 3700 - 100 * c);
      len = 12'(lens[c]);
      plant = (lens[c] >= W) ? int'($urandom % (((lens[c] - W + 1) < L) ? (lens[c] - W + 1) : L)) : 0;
      if (lens[c] >= W) for (int i = 0; i < W; i++) mem.s3.mem[ref_base + 13'(i)] = mem.s2.mem[plant + i];
      best = -1; bk = 0; nl = 0;
      for (int k = 0; k < L && k + W <= lens[c]; k++) begin
        sc = 0; nl++;
        for (int i = 0; i < W; i++) sc += int'(sgn(mem.s2.mem[k + i]) == sgn(mem.s3.mem[ref_base + 13'(i)]));
        if (sc > best) begin best = sc; bk = k; end
      end
      @(posedge clk); #1 start = 1; @(posedge clk); #1 start = 0; t0 = $time / 100;
      while (!done) begin @(posedge clk); #1 pause = rnd && ($urandom % 6 == 0) ? ~pause : pause; end
      t1 = $time / 100; pause = 0;
      check(int'(km) == bk, $sformatf("case %0d: Km %0d exp %0d (planted %0d)", c, km, bk, plant));
      check(int'(score) == (best < 0 ? 0 : best), $sformatf("case %0d: score %0d exp %0d", c, score, best));
      if (lens[c] >= W) check(best == W, $sformatf("case %0d: planted lag scores %0d", c, best));
      else check(km == 0 && score == 0, "short S2 gives Km 0");
      if (!rnd) check(t1 - t0 == nl * (2 * W + 3) + 1, $sformatf("case %0d: %0d clocks for %0d lags", c, t1 - t0, nl));
      repeat (3) @(posedge clk);
    end
    check(npaused > 0, "pause honoured");
    check(bus_while_paused == 0, "bus released while paused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
