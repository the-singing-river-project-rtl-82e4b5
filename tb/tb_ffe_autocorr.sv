// tb_ffe_autocorr: loads 1024 samples of test tones (pure tones of several
// pitches, a tone with a strong second harmonic) into a RAM model, runs the
// autocorrelation and checks the period handed to the divider against a
// reference computed here (sums R(lag) over n, first lag >= 4 where
// R(lag-1) beats both neighbours, period = lag-1), and the clock count
// 1 + sum over lags of (5*(1024-lag)+2) from start to div_start.
module tb_ffe_autocorr;
  localparam int N = 1024;
  logic clk = 0, rst = 1, start = 0, busy, done, ren, dstart, ddone = 0, pk;
  logic [12:0] raddr, rdata, period;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ffe_autocorr dut (.clk, .rst, .start, .busy, .done, .ram_en(ren), .ram_addr(raddr),
    .ram_rdata(rdata), .div_start(dstart), .period, .div_done(ddone), .peak_found(pk));
  int mem [8192];
  always @(posedge clk) if (ren) rdata <= 13'(mem[raddr]);
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  function automatic int ref_period(output longint cycles);
    longint r0, r1, r2, s;
    r0 = 0; r1 = 0; r2 = 0; cycles = 1;
    for (int lag = 0; lag < N - 1; lag++) begin
      s = 0;
      for (int n = 0; n + lag < N; n++) s += longint'(mem[n + lag]) * longint'(mem[n]);
      r2 = r1; r1 = r0; r0 = s;
      cycles += 5 * (N - lag) + 2;
      if (lag >= 4 && r1 > r0 && r1 > r2) return lag - 1;
      if (lag == N - 2) return lag;
    end
    return -1;
  endfunction
  initial begin
    repeat (20000000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    real f[5] = '{440.0, 261.6, 98.0, 500.0, 180.0};
    real h[5] = '{0.0, 0.0, 0.0, 0.3, 0.8};
    int p; longint cyc_exp, cyc;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 5; t++) begin
      for (int n = 0; n < N; n++)
        mem[n] = int'(2000.0 * ($sin(2.0 * 3.14159265358979 * f[t] * n / 40000.0) +
                                h[t] * $sin(4.0 * 3.14159265358979 * f[t] * n / 40000.0)));
      p = ref_period(cyc_exp);
      start = 1; @(posedge clk); #1 start = 0; cyc = 1;
      while (!dstart) begin @(posedge clk); #1; cyc++; end
      check(int'(period) == p, $sformatf("tone %0.1f Hz: period %0d exp %0d", f[t], period, p));
      check(cyc == cyc_exp, $sformatf("clocks %0d exp %0d", cyc, cyc_exp));
      repeat (5) @(posedge clk);
      #1 ddone = 1; @(posedge clk); #1 ddone = 0;
      check(done && pk, "done after the divider, peak found");
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
