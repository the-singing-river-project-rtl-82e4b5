// tb_ps_subsystem: the simple pitch shifter with a 64-sample double
// buffer, its SRAM, the AD670 model (sample k has value (37k+11) mod 256)
// and F0 / hand coordinate sent over the two serial links. A reference
// model follows every 40 kHz slot: the played buffer holds the previous
// 64 recorded samples, the read index is the integer part of a pointer
// advanced by the rate each slot (wrapping at 64), and with `mix` on the
// original sample at the current position is averaged in. Every DAC value
// after the first buffer fill is checked. Phases: pitch up (rate 2.0),
// pitch down with mix on, rate 1.0 with F0 = 0. Checks slot spacing of 250
// clocks and counts buffer swaps, pointer wraps and mixed samples.
module tb_ps_subsystem;
  localparam int B = 64;
  logic clk = 0, rst = 1, enable = 0, mix = 0;
  logic fsel, fsck, fsd, csel, csck, csd, acs, arw, ast, dcs, we, oe, buffer, swp;
  logic [7:0] adata, dac, wd, rd, coord; logic [15:0] addr; logic [11:0] count;
  logic [10:0] rate; logic [8:0] f0; int nconv;
  int checks = 0, failures = 0;
  always #50 clk = ~clk;
  serial_driver f0drv (.clk, .sel_n(fsel), .sclk(fsck), .sdata(fsd));
  serial_driver codrv (.clk, .sel_n(csel), .sclk(csck), .sdata(csd));
  ps_subsystem #(.BUFFERSIZE(B)) dut (.clk, .rst, .enable, .mix, .f0_sel_n(fsel), .f0_sclk(fsck),
    .f0_sdata(fsd), .co_sel_n(csel), .co_sclk(csck), .co_sdata(csd), .ad_cs_n(acs), .ad_rw_n(arw),
    .ad_status(ast), .ad_data(adata), .dac_data(dac), .dac_cs_n(dcs), .ram_addr(addr),
    .ram_we(we), .ram_oe(oe), .ram_wdata(wd), .ram_rdata(rd), .buffer, .count, .rate, .f0,
    .coord, .swapped(swp));
  sram_model #(.AW(13), .DW(8)) ram (.clk, .en(!addr[15] && (we || oe)), .we, .addr(addr[12:0]),
    .wdata(wd), .rdata(rd));
  ad670_model adc (.clk, .rst, .cs_n(acs), .rw_n(arw), .status(ast), .data(adata), .nconv);
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  function automatic int sample(int k); return (k * 37 + 11) % 256; endfunction
  // reference model, stepped at every DAC strobe
  int slot = 0, ptr = 0, nbad = 0, nchk = 0, wraps = 0, mixed = 0, swaps = 0;
  longint t = 0, last_strobe = -1; int bad_gap = 0;
  bit mix_model = 0, mix_prev = 0;
  always @(posedge clk) begin
    t++;
    if (swp && !rst) swaps++;
    if (!dcs) begin
      int blk, idx, e;
      if (slot > 0) begin
        if (ptr + int'(rate) >= B * 64) wraps++;
        ptr = (ptr + int'(rate)) % (B * 64);
        // a mixed sample takes two more clocks to reach the DAC
        if (t - last_strobe != 250 + 2 * (int'(mix_model) - int'(mix_prev))) begin
          bad_gap++; $display("gap %0d at slot %0d", t - last_strobe, slot);
        end
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
    repeat (3000000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run_slots(int n);
    int s0 = slot;
    while (slot < s0 + n) @(posedge clk);
  endtask
  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    // F0 = 220 Hz, coordinate 111 -> F1 = 40 + 111*460/255 = 240 Hz ... choose 218 -> 433
    fork
      f0drv.send(16'd220, 9);
      codrv.send(16'd230, 8);                     // F1 = 40 + 230*460/255 = 454
    join
    while (rate != 11'((454 * 64) / 220)) @(posedge clk);
    check(f0 == 220 && coord == 230, "F0 and coordinate received");
    #1 enable = 1;
    run_slots(4 * B);
    check(nbad == 0 && nchk > 0, $sformatf("pitch up: %0d of %0d samples wrong", nbad, nchk));
    // pitch down, mixed with the original
    codrv.send(16'd40, 8);                        // F1 = 40 + 40*460/255 = 112
    run_slots(1);
    mix = 1; mix_model = 1;              // takes effect from the next slot
    run_slots(4 * B);
    check(rate == 11'((112 * 64) / 220), $sformatf("rate %0d", rate));
    check(nbad == 0, $sformatf("pitch down + mix: %0d wrong", nbad));
    mix = 0; mix_model = 0;
    f0drv.send(16'd0, 9);                         // no F0: rate 1.0
    run_slots(3 * B);
    check(rate == 11'd64, "rate 1.0 without F0");
    check(nbad == 0, $sformatf("rate 1.0: %0d wrong", nbad));
    check(bad_gap == 0, $sformatf("%0d slots not 250 clocks apart", bad_gap));
    check(swaps >= 10 && swaps == slot / B, $sformatf("buffer swaps %0d", swaps));
    check(wraps > 0, "read pointer wrapped");
    check(mixed > 0, "mixed samples played");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
