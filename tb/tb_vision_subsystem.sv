// tb_vision_subsystem: the vision top-level FSM on a reduced image (24
// lines of 20 metapixels) from the camera model, whose laser follows the
// DUT's laser_on. Checks that the laser toggles once per frame, that
// nothing is sent after the first frame, and that with the hand held at a
// position the potentiometer receives {0x11, height*5/2} and the pitch
// link receives mean_line*198/256 after every frame; then the hand moves
// and the new values must follow.
module tb_vision_subsystem;
  localparam int LINES = 24, BLANK = 2, MP = 20;
  logic clk = 0, rst = 1, enable = 0, hs, vs, laser, en, we, fs;
  logic pcs, psck, psi, qsel, qsck, qsd, fdone, found;
  logic [7:0] ad, wd, rd, volume, pitch; logic [15:0] addr;
  logic [15:0] pot_word; logic [7:0] pit_word; int pot_n, pit_n, pot_cnt, pit_cnt;
  int x0, x1, hp;
  int checks = 0, failures = 0, frames = 0, toggles = 0;
  always #5 clk = ~clk;
  camera_model #(.LINES(LINES), .BLANK(BLANK), .MP(MP), .LINE_CLKS(160), .DELAY(3)) cam (
    .clk, .laser, .hand_x0(x0), .hand_x1(x1), .hand_pos(hp), .hsync_n(hs), .vsync_n(vs),
    .ad_data(ad), .frame_start(fs));
  vision_subsystem #(.LINES(LINES), .BLANK_LINES(BLANK), .MP_PER_LINE(MP)) dut (
    .clk, .rst, .enable, .ad_data(ad), .hsync_n(hs), .vsync_n(vs), .laser_on(laser),
    .ram_en(en), .ram_we(we), .ram_addr(addr), .ram_wdata(wd), .ram_rdata(rd),
    .pot_cs_n(pcs), .pot_sck(psck), .pot_si(psi), .pitch_sel_n(qsel), .pitch_sclk(qsck),
    .pitch_sdata(qsd), .frame_done(fdone), .found, .volume, .pitch);
  sram_model #(.AW(16), .DW(8)) ram (.clk, .en, .we, .addr, .wdata(wd), .rdata(rd));
  spi_monitor #(.WIDTH(16)) mpot (.clk, .rst, .sel_n(pcs), .sclk(psck), .sdata(psi), .word(pot_word),
    .nbits(pot_n), .count(pot_cnt));
  spi_monitor #(.WIDTH(8)) mpit (.clk, .rst, .sel_n(qsel), .sclk(qsck), .sdata(qsd), .word(pit_word),
    .nbits(pit_n), .count(pit_cnt));
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  logic laser_d = 0;
  always @(posedge clk) begin
    laser_d <= laser;
    if (laser != laser_d) toggles++;
    if (fdone) frames++;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic wait_frames(int n);
    int f0 = frames;
    while (frames < f0 + n) @(posedge clk);
    repeat (400) @(posedge clk);                   // let the serial words finish
  endtask
  initial begin
    int n, sx, ev, ep, c0, t0;
    x0 = 3; x1 = 10; hp = 6;
    repeat (3) @(posedge clk); #1 rst = 0; enable = 1;
    wait_frames(1);
    check(pot_cnt == 0 && pit_cnt == 0, $sformatf("nothing sent after the first frame %0d %0d", pot_cnt, pit_cnt));
    for (int step = 0; step < 3; step++) begin
      if (step > 0) begin
        x0 = $urandom_range(0, 15); x1 = x0 + $urandom_range(0, 8); hp = $urandom_range(0, MP - 2);
        wait_frames(2);                            // one mixed frame after the move
      end
      n = x1 - x0 + 1; sx = 0; for (int j = x0; j <= x1; j++) sx += j;
      ev = (hp * 5) / 2; ep = ((sx / n) * 198) >> 8;
      for (int f = 0; f < 3; f++) begin
        c0 = pot_cnt; t0 = toggles;
        wait_frames(1);
        check(pot_cnt == c0 + 1 && pit_cnt == pot_cnt, $sformatf("one word per frame on each link: %0d %0d %0d", c0, pot_cnt, pit_cnt));
        check(toggles == t0 + 1, "laser toggles once per frame");
        check(pot_n == 16 && pot_word == {8'h11, 8'(ev)},
              $sformatf("pot word %h exp 11%h", pot_word, 8'(ev)));
        check(pit_n == 8 && pit_word == 8'(ep), $sformatf("pitch %0d exp %0d", pit_word, ep));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
