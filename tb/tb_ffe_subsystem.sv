// tb_ffe_subsystem: the estimator with its sample SRAM and the ADC12441
// model playing test tones, at the full 1024 samples and 40 kHz pacing.
// For each tone it checks that conversions come 250 clocks apart, that the
// reported F0 equals 40000/period with the period computed here from the
// very samples the ADC produced (reference autocorrelation), that F0 is
// within 3 % of the tone, and that the same F0 arrives on the serial link.
module tb_ffe_subsystem;
  localparam int N = 1024;
  logic clk = 0, rst = 1, enable = 0, cs_n, wr_n, rd_n, int_n, en, we, fsel, fsck, fsd, fv, cap;
  logic [12:0] adata, addr, wd, rd, period; logic [8:0] f0;
  logic [15:0] word; int nb, wcnt, nconv;
  real freq = 440.0, h2 = 0.0;
  int checks = 0, failures = 0;
  always #50 clk = ~clk;
  ffe_subsystem dut (.clk, .rst, .enable, .adc_cs_n(cs_n), .adc_wr_n(wr_n), .adc_rd_n(rd_n),
    .adc_int_n(int_n), .adc_data(adata), .ram_en(en), .ram_we(we), .ram_addr(addr),
    .ram_wdata(wd), .ram_rdata(rd), .f0_sel_n(fsel), .f0_sclk(fsck), .f0_sdata(fsd),
    .f0_valid(fv), .f0, .period, .capturing(cap));
  sram_model #(.AW(13), .DW(13)) ram (.clk, .en, .we, .addr, .wdata(wd), .rdata(rd));
  adc12441_model adc (.clk, .cs_n, .wr_n, .rd_n, .int_n, .data(adata), .freq, .amp(2500.0),
    .h2, .nconv);
  spi_monitor #(.WIDTH(16)) mon (.clk, .rst, .sel_n(fsel), .sclk(fsck), .sdata(fsd), .word,
    .nbits(nb), .count(wcnt));
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  // conversion spacing
  longint t = 0, last_wr = -1; int bad_gap = 0, ngap = 0;
  logic wr_d = 1;
  always @(posedge clk) begin
    t++; wr_d <= wr_n;
    if (!wr_n && wr_d && cap) begin
      if (last_wr >= 0 && t - last_wr != 250 && t - last_wr < 1000) bad_gap++;
      ngap++; last_wr = t;
    end
  end
  function automatic int ref_period(int base);
    longint r0, r1, r2, s;
    r0 = 0; r1 = 0; r2 = 0;
    for (int lag = 0; lag < N - 1; lag++) begin
      s = 0;
      for (int n = 0; n + lag < N; n++)
        s += longint'(adc.hist[(base + n + lag) % 4096]) * longint'(adc.hist[(base + n) % 4096]);
      r2 = r1; r1 = r0; r0 = s;
      if (lag >= 4 && r1 > r0 && r1 > r2) return lag - 1;
      if (lag == N - 2) return lag;
    end
    return 1;
  endfunction
  initial begin
    repeat (8000000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    real tones[3] = '{440.0, 196.0, 330.0};
    int base = 0, p, ef, w0;
    repeat (3) @(posedge clk); #1 rst = 0; enable = 1;
    for (int k = 0; k < 3; k++) begin
      freq = tones[k]; h2 = (k == 2) ? 0.5 : 0.0;
      w0 = wcnt;
      while (!fv) begin @(posedge clk); #1; end
      if (k > 0) check(nconv - base == N, $sformatf("%0d conversions per round", nconv - base));
      base = nconv;
      p = ref_period(base - N);             // the last N conversions were analysed
      ef = 40000 / p;
      check(f0 == 9'(ef), $sformatf("tone %0.0f: f0 %0d exp %0d (period %0d/%0d)", freq, f0, ef,
            period, p));
      check(real'(f0) > 0.97 * freq && real'(f0) < 1.03 * freq, $sformatf("f0 %0d near %0.0f", f0, freq));
      while (wcnt == w0) begin @(posedge clk); #1; end
      check(nb == 9 && word[8:0] == f0, $sformatf("serial f0 %0d", word[8:0]));
    end
    check(bad_gap == 0 && ngap > 3000, $sformatf("conversions 250 clocks apart (%0d bad of %0d)", bad_gap, ngap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
