// tb_solaf_subsystem: runs the SOLAF-style pitch shifter at full size
// (4000-sample buffers, 300-sample window, 400 lags) with an ADC12441 model
// playing a 220 Hz tone, three SRAM models on the shared bus, and F0 and
// hand coordinate words sent over the two serial links. After every
// processing round it recomputes the round in a reference model from the
// SRAM contents: S2 (resampled S1 and its length), Km against the tail of
// the playing S3 half, the first copy, Km2 against the last 300 written
// samples and the repeated copy, and compares S2, Km, Km2 and the whole new
// S3 half. At every output sample it checks the DAC word against S3 and
// the recorded word in S1 against the converter. It counts swaps, rounds,
// rounds with a second search, rounds with pitch up and down, and clocks
// spent paused by the I/O block, and fails any that never happened, and
// any overrun (a swap before a round finished).
module tb_solaf_subsystem;
  localparam int B = 4000, W = 300, L = 400;
  logic clk = 0, rst = 1, enable = 0;
  logic fs, fc, fd, cs, cc, cd;
  logic acs, awr, ard, aint; logic [12:0] adata, dac; logic dcs;
  logic [15:0] addr; logic we; logic [12:0] wdata, rdata, r1, r2, r3;
  logic [10:0] rate; logic [11:0] len2; logic [8:0] km, km2; logic swap, pdone, overrun;
  int nconv, checks = 0, failures = 0;
  always #50 clk = ~clk;

  adc12441_model fadc (.clk, .cs_n(acs), .wr_n(awr), .rd_n(ard), .int_n(aint), .data(adata),
    .freq(220.0), .amp(2500.0), .h2(0.3), .nconv);
  serial_driver f0drv (.clk, .sel_n(fs), .sclk(fc), .sdata(fd));
  serial_driver codrv (.clk, .sel_n(cs), .sclk(cc), .sdata(cd));
  sram_model #(.AW(13), .DW(13)) s1 (.clk, .en(!addr[13]), .we(we), .addr(addr[12:0]), .wdata, .rdata(r1));
  sram_model #(.AW(13), .DW(13)) s2 (.clk, .en(!addr[14]), .we(we), .addr(addr[12:0]), .wdata, .rdata(r2));
  sram_model #(.AW(13), .DW(13)) s3 (.clk, .en(!addr[15]), .we(we), .addr(addr[12:0]), .wdata, .rdata(r3));
  // the chip that was read last drives the data bus
  logic [2:0] last_sel = 3'b111;
  always @(posedge clk) last_sel <= addr[15:13];
  assign rdata = !last_sel[0] ? r1 : !last_sel[1] ? r2 : r3;

  solaf_subsystem dut (.clk, .rst, .enable, .f0_sel_n(fs), .f0_sclk(fc), .f0_sdata(fd),
    .co_sel_n(cs), .co_sclk(cc), .co_sdata(cd), .adc_cs_n(acs), .adc_wr_n(awr), .adc_rd_n(ard),
    .adc_int_n(aint), .adc_data(adata), .dac_data(dac), .dac_cs_n(dcs),
    .ram_addr(addr), .ram_we(we), .ram_wdata(wdata), .ram_rdata(rdata),
    .rate, .len2, .km, .km2, .swap, .proc_done(pdone), .overrun);

  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  int swaps = 0, rounds = 0, second = 0, ups = 0, downs = 0, paused_clks = 0, overruns = 0;
  int dac_bad = 0, s1_bad = 0, outs = 0;
  always @(posedge clk) if (!rst) begin
    if (swap) swaps++;
    if (overrun) overruns++;
    if (dut.m_paused) paused_clks++;
    if (!dcs) begin
      outs++;
      if (dac != s3.mem[{dut.u_io.out_half, dut.u_io.cnt}]) dac_bad++;
      if (s1.mem[{dut.u_io.in_half, dut.u_io.cnt}] != 13'(fadc.hist[(nconv - 1) % 4096])) s1_bad++;
    end
  end

  // ---- reference model of one processing round ----
  int s2e [B]; int s3e [B]; int refw [W];
  function automatic int sgn(int v); return (v >> 12) & 1; endfunction
  function automatic int search(int len);
    int best = -1, bk = 0;
    for (int k = 0; k < L && k + W <= len; k++) begin
      int sc = 0;
      for (int i = 0; i < W; i++) sc += int'(sgn(s2e[k + i]) == sgn(refw[i]));
      if (sc > best) begin best = sc; bk = k; end
    end
    return bk;
  endfunction

  task automatic check_round();
    int h = (swaps - 1) & 1, play = swaps & 1, len = 0, ptr = 0, w = 0, src, k1, k2, bad = 0;
    while ((ptr >> 6) < B && len < B) begin
      s2e[len] = int'(s1.mem[{h[0], 12'(ptr >> 6)}]); len++; ptr += int'(rate);
    end
    check(int'(len2) == len, $sformatf("round %0d: S2 length %0d exp %0d", rounds, len2, len));
    for (int j = 0; j < len; j++) if (int'(s2.mem[j]) != s2e[j]) bad++;
    check(bad == 0, $sformatf("round %0d: %0d S2 samples wrong", rounds, bad));
    for (int i = 0; i < W; i++) refw[i] = int'(s3.mem[{play[0], 12'(B - W + i)}]);
    k1 = search(len);
    check(int'(km) == k1, $sformatf("round %0d: Km %0d exp %0d", rounds, km, k1));
    src = k1;
    while (w < B && src < len) begin s3e[w] = s2e[src]; w++; src++; end
    if (w < B) begin
      second++;
      for (int i = 0; i < W; i++) refw[i] = s3e[w - W + i];
      k2 = search(len);
      check(int'(km2) == k2, $sformatf("round %0d: Km2 %0d exp %0d", rounds, km2, k2));
      src = k2;
      while (w < B) begin if (src >= len) src = k2; s3e[w] = s2e[src]; w++; src++; end
    end
    bad = 0;
    for (int i = 0; i < B; i++) if (int'(s3.mem[{h[0], 12'(i)}]) != s3e[i]) bad++;
    check(bad == 0, $sformatf("round %0d: %0d S3 samples wrong", rounds, bad));
    if (rate > 64) ups++;
    if (rate < 64) downs++;
    $display("round %0d: rate %0d len %0d Km %0d Km2 %0d", rounds, rate, len, km, km2);
  endtask

  always @(posedge clk) if (!rst && pdone) begin rounds++; check_round(); end

  initial begin
    repeat (7000000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst = 0; enable = 1;
    f0drv.send(16'd220, 9);
    codrv.send(16'd160, 8);        // F1 = 328 Hz: pitch up, S2 shorter than a buffer
    while (rounds < 2) @(posedge clk);
    codrv.send(16'd60, 8);         // F1 = 148 Hz: pitch down
    while (rounds < 4) @(posedge clk);
    repeat (2000) @(posedge clk);
    check(dac_bad == 0 && outs > 4 * B, $sformatf("%0d of %0d DAC words differ from S3", dac_bad, outs));
    check(s1_bad == 0, $sformatf("%0d recorded samples differ from the converter", s1_bad));
    check(overruns == 0, $sformatf("%0d overruns", overruns));
    check(swaps >= 4 && rounds >= 4, "swaps and rounds");
    check(second > 0, "second overlap search");
    check(ups > 0 && downs > 0, "pitch up and pitch down rounds");
    check(paused_clks > 0, "minor FSMs paused for the I/O block");
    $display("swaps %0d rounds %0d second searches %0d up %0d down %0d paused clocks %0d outputs %0d",
             swaps, rounds, second, ups, downs, paused_clks, outs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
