// tb_singing_river_top: end-to-end run of the whole instrument at its
// full size (330-line camera image, 1024-sample pitch analysis, 4000-sample
// pitch-shifter buffers, 40 kHz audio). Models: the camera (with the
// reflection following the DUT's laser), the ADC12441 playing a 220 Hz
// tone to the estimator, and the AD670 feeding the pitch shifter.
// The hand is first out of view, then held at one place, then moved. The
// testbench checks the volume and pitch coordinate sent by the vision
// side, F0 found by the estimator and its arrival at the pitch shifter,
// the resampling rate F1/F0, and every DAC sample against a reference
// model of the double buffer once a buffer has been filled. It counts the
// mechanisms of the design and fails any that never happened: laser
// alternation, frames with and without a hand, potentiometer writes,
// coordinate and F0 words, capture/analysis rounds, buffer swaps, read
// pointer wraps, pitch up and pitch down rates, and mixed playback.
// The SOLAF-style shifter beside it gets its own ADC12441 model (300 Hz);
// the testbench checks that its rounds finish within a buffer, that it
// uses (nearly) the same rate, its S2 length, and every DAC word against its S3.
module tb_singing_river_top;
  localparam int B = 4000;
  logic clk = 0, rst = 1, enable = 0, mix = 0;
  logic hs, vs, laser, fs, pcs, psck, psi;
  logic fcs, fwr, frd, fint, acs, arw, ast, dcs;
  logic qsel, qsck, qsd, fsel, fsck, fsd, fdone, found, f0v, swp;
  logic [7:0] cam, adata, dac, volume, hpitch, pcoord;
  logic [12:0] fdata; logic [8:0] f0e, pf0; logic [10:0] rate;
  logic [12:0] fper, sdata_adc, sdac; logic fcap, scs, swr, srd, sint, sdcs, sswap, sdone, sover;
  logic [10:0] srate; logic [11:0] slen; logic [8:0] skm, skm2; int nconv_s;
  int x0, x1, hp, nconv_f, nconv_a;
  logic [15:0] pot_word, pit_word, f0_word; int pot_n, pit_n, f0_n, pot_cnt, pit_cnt, f0_cnt;
  int checks = 0, failures = 0;
  always #50 clk = ~clk;

  camera_model #(.DELAY(3)) camera (.clk, .laser, .hand_x0(x0), .hand_x1(x1), .hand_pos(hp),
    .hsync_n(hs), .vsync_n(vs), .ad_data(cam), .frame_start(fs));
  adc12441_model fadc (.clk, .cs_n(fcs), .wr_n(fwr), .rd_n(frd), .int_n(fint), .data(fdata),
    .freq(220.0), .amp(2500.0), .h2(0.3), .nconv(nconv_f));
  adc12441_model sadc (.clk, .cs_n(scs), .wr_n(swr), .rd_n(srd), .int_n(sint), .data(sdata_adc),
    .freq(300.0), .amp(2000.0), .h2(0.2), .nconv(nconv_s));
  ad670_model aadc (.clk, .rst, .cs_n(acs), .rw_n(arw), .status(ast), .data(adata), .nconv(nconv_a));

  singing_river_top dut (.clk, .rst, .enable, .mix, .cam_data(cam), .hsync_n(hs), .vsync_n(vs),
    .laser_on(laser), .pot_cs_n(pcs), .pot_sck(psck), .pot_si(psi),
    .fadc_cs_n(fcs), .fadc_wr_n(fwr), .fadc_rd_n(frd), .fadc_int_n(fint), .fadc_data(fdata),
    .ad_cs_n(acs), .ad_rw_n(arw), .ad_status(ast), .ad_data(adata), .dac_data(dac), .dac_cs_n(dcs),
    .pitch_sel_n(qsel), .pitch_sclk(qsck), .pitch_sdata(qsd),
    .f0_sel_n(fsel), .f0_sclk(fsck), .f0_sdata(fsd),
    .frame_done(fdone), .hand_found(found), .volume, .hand_pitch(hpitch),
    .f0_valid(f0v), .f0_est(f0e), .ps_f0(pf0), .ps_coord(pcoord), .rate, .buffer_swap(swp),
    .f0_period(fper), .ffe_capturing(fcap), .s_adc_cs_n(scs), .s_adc_wr_n(swr), .s_adc_rd_n(srd),
    .s_adc_int_n(sint), .s_adc_data(sdata_adc), .s_dac_data(sdac), .s_dac_cs_n(sdcs), .s_rate(srate),
    .s_len2(slen), .s_km(skm), .s_km2(skm2), .s_swap(sswap), .s_proc_done(sdone), .s_overrun(sover));

  spi_monitor #(.WIDTH(16)) mpot (.clk, .rst, .sel_n(pcs), .sclk(psck), .sdata(psi),
    .word(pot_word), .nbits(pot_n), .count(pot_cnt));
  spi_monitor #(.WIDTH(16)) mpit (.clk, .rst, .sel_n(qsel), .sclk(qsck), .sdata(qsd),
    .word(pit_word), .nbits(pit_n), .count(pit_cnt));
  spi_monitor #(.WIDTH(16)) mf0 (.clk, .rst, .sel_n(fsel), .sclk(fsck), .sdata(fsd),
    .word(f0_word), .nbits(f0_n), .count(f0_cnt));

  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---- mechanism counters ----
  int laser_toggles = 0, frames_hit = 0, frames_nohit = 0, rounds = 0, swaps = 0;
  int wraps = 0, mixed = 0, up_slots = 0, down_slots = 0;
  int s_swaps = 0, s_rounds = 0, s_overruns = 0, s_outs = 0, s_dac_bad = 0, analysing_clks = 0;
  logic laser_d = 0;
  always @(posedge clk) if (!rst) begin
    laser_d <= laser;
    if (laser != laser_d) laser_toggles++;
    if (fdone && found) frames_hit++;
    if (fdone && !found) frames_nohit++;
    if (f0v) rounds++;
    if (swp) swaps++;
    if (sswap) s_swaps++;
    if (sdone) s_rounds++;
    if (sover) s_overruns++;
    if (!fcap) analysing_clks++;
    if (!sdcs) begin
      s_outs++;
      if (sdac != dut.u_s3_ram.mem[{dut.u_solaf.u_io.out_half, dut.u_solaf.u_io.cnt}]) s_dac_bad++;
    end
  end

  // ---- pitch shifter reference model, stepped at every DAC strobe ----
  function automatic int sample(int k); return (k * 37 + 11) % 256; endfunction
  int slot = 0, ptr = 0, nbad = 0, nchk = 0;
  longint t = 0, last_strobe = -1, exp_gap; int bad_gap = 0;
  bit mix_model = 0, mix_prev = 0;
  always @(posedge clk) begin
    t++;
    if (!dcs && !rst) begin
      int blk, idx, e;
      if (slot > 0) begin
        if (ptr + int'(rate) >= B * 64) wraps++;
        ptr = (ptr + int'(rate)) % (B * 64);
        exp_gap = 250;                          // turning mix on adds 2 clocks, off removes them
        if (mix_model && !mix_prev) exp_gap += 2;
        if (!mix_model && mix_prev) exp_gap -= 2;
        if (t - last_strobe != exp_gap) bad_gap++;
        if (rate > 64) up_slots++;
        if (rate < 64) down_slots++;
      end
      last_strobe = t; mix_prev = mix_model;
      blk = slot / B; idx = ptr / 64;
      if (blk >= 1) begin
        e = sample((blk - 1) * B + idx);
        if (mix_model) begin e = (e + sample((blk - 1) * B + slot % B)) / 2; mixed++; end
        nchk++;
        if (dac != 8'(e)) begin
          nbad++;
          if (nbad < 6) $display("FAIL slot %0d idx %0d dac %0d exp %0d", slot, idx, dac, e);
        end
      end
      slot++;
    end
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int f1_of(int coord); return 40 + (coord * 460) / 255; endfunction

  task automatic hand_check(int a, int b, int pos, string tag);
    int n = b - a + 1, sx = 0, ev, ep;
    for (int j = a; j <= b; j++) sx += j;
    ev = (pos * 5) / 2; ep = ((sx / n) * 198) >> 8;
    check(pot_n == 16 && pot_word == {8'h11, 8'(ev)},
          $sformatf("%s: pot word %h exp 11%h", tag, pot_word, 8'(ev)));
    check(pit_n == 8 && pit_word[7:0] == 8'(ep), $sformatf("%s: pitch %0d exp %0d", tag, pit_word[7:0], ep));
    check(pcoord == 8'(ep), $sformatf("%s: coordinate at the pitch shifter %0d", tag, pcoord));
  endtask

  initial begin
    int er;  // locals of an initial block are static: assign, do not initialise
    x0 = 1000; x1 = 1000; hp = 0;                  // hand out of view
    repeat (3) @(posedge clk); #1 rst = 0; enable = 1;
    while (frames_nohit < 2) @(posedge clk);
    x0 = 100; x1 = 140; hp = 40;                   // hand A: low pitch
    // wait for two frames with the hand after the move, then check
    begin int f; f = frames_hit; while (frames_hit < f + 3) @(posedge clk); end
    repeat (500) @(posedge clk);
    hand_check(100, 140, 40, "hand A");
    // F0 of the 220 Hz tone
    while (rounds < 1) @(posedge clk);
    check(real'(f0e) > 0.97 * 220.0 && real'(f0e) < 1.03 * 220.0, $sformatf("F0 %0d for 220 Hz", f0e));
    repeat (400) @(posedge clk);
    check(f0_n == 9 && f0_word[8:0] == f0e && pf0 == f0e, $sformatf("F0 link %0d", pf0));
    repeat (600) @(posedge clk);
    er = (f1_of(int'(pcoord)) * 64) / int'(f0e);
    check(rate == 11'(er), $sformatf("rate %0d exp %0d", rate, er));
    // hand B: high pitch
    x0 = 250; x1 = 300; hp = 80;
    begin int f; f = frames_hit; while (frames_hit < f + 3) @(posedge clk); end
    repeat (500) @(posedge clk);
    hand_check(250, 300, 80, "hand B");
    repeat (2000) @(posedge clk);
    er = (f1_of(int'(pcoord)) * 64) / int'(f0e);
    check(rate == 11'(er) && rate > 64, $sformatf("rate %0d exp %0d", rate, er));
    // mixed playback for a while
    @(negedge dcs); repeat (100) @(posedge clk); #1 mix = 1; mix_model = 1;
    repeat (200000) @(posedge clk);
    @(negedge dcs); repeat (100) @(posedge clk); #1 mix = 0; mix_model = 0;
    repeat (20000) @(posedge clk);
    check(nbad == 0 && nchk > 1000, $sformatf("DAC samples: %0d of %0d wrong", nbad, nchk));
    check(bad_gap == 0, $sformatf("%0d output samples not 250 clocks apart", bad_gap));
    check(laser_toggles >= 4, $sformatf("laser toggled %0d times", laser_toggles));
    check(frames_nohit >= 2, "frames without a hand");
    check(frames_hit >= 6, "frames with a hand");
    check(pot_cnt >= 6 && pit_cnt >= 6, "potentiometer and coordinate writes");
    check(rounds >= 2 && f0_cnt >= 2, $sformatf("F0 rounds %0d", rounds));
    check(swaps >= 2, $sformatf("buffer swaps %0d", swaps));
    check(wraps >= 1, "read pointer wrapped");
    check(up_slots > 0 && down_slots > 0, $sformatf("pitch up %0d / down %0d slots", up_slots, down_slots));
    check(mixed > 0, "mixed playback");
    check(analysing_clks > 0 && fper > 0, "estimator analysis phase");
    // SOLAF-style shifter beside the simple one
    check(s_swaps >= 2 && s_rounds >= 1, $sformatf("SOLAF swaps %0d rounds %0d", s_swaps, s_rounds));
    check(s_overruns == 0, "SOLAF rounds finish within one buffer");
    // the SOLAF rate is taken at its last swap, possibly from an earlier F0 word
    check(int'(srate) - int'(rate) <= 2 && int'(rate) - int'(srate) <= 2,
          $sformatf("SOLAF rate %0d, simple shifter rate %0d", srate, rate));
    check(s_dac_bad == 0 && s_outs > 8000, $sformatf("SOLAF DAC: %0d of %0d differ from S3", s_dac_bad, s_outs));
    check(slen == 12'((4000 * 64 + int'(srate) - 1) / int'(srate)) || slen == 12'd4000,
          $sformatf("SOLAF S2 length %0d for rate %0d", slen, srate));
    $display("mechanisms: laser %0d, frames hit %0d / empty %0d, pot %0d, coord %0d, F0 rounds %0d, swaps %0d, wraps %0d, up %0d, down %0d, mixed %0d",
             laser_toggles, frames_hit, frames_nohit, pot_cnt, pit_cnt, rounds, swaps, wraps,
             up_slots, down_slots, mixed);
    $display("SOLAF: swaps %0d, rounds %0d, S2 length %0d, Km %0d, Km2 %0d", s_swaps, s_rounds, slen, skm, skm2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
