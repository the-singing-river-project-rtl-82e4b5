// tb_vis_frame_fsm: a reduced frame (24 lines of 20 metapixels, 2 blank
// lines) from the camera model. The first frame has the laser off, the
// next ones on and off alternately (the hand moves only when the laser
// is on) with the hand over a range of lines at
// a known height; each frame after the first must report the number of
// lines hit, volume = mean height*5/2 and pitch = mean line*198/256. A
// frame with no hand must report found = 0 and keep the old values.
module tb_vis_frame_fsm;
  localparam int LINES = 24, BLANK = 2, MP = 20;
  logic clk = 0, rst = 1, start = 0, busy, done, hs, vs, en, we, found, fs;
  logic [7:0] ad, wd, rd, volume, pitch; logic [15:0] addr; logic [8:0] nhits;
  logic laser = 0;
  int x0, x1, hp;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  camera_model #(.LINES(LINES), .BLANK(BLANK), .MP(MP), .LINE_CLKS(160), .DELAY(1)) cam (
    .clk, .laser, .hand_x0(x0), .hand_x1(x1), .hand_pos(hp), .hsync_n(hs), .vsync_n(vs),
    .ad_data(ad), .frame_start(fs));
  vis_frame_fsm #(.LINES(LINES), .BLANK_LINES(BLANK), .MP_PER_LINE(MP)) dut (
    .clk, .rst, .start, .busy, .done, .hsync_n(hs), .vsync_n(vs), .ad_data(ad),
    .ram_en(en), .ram_we(we), .ram_addr(addr), .ram_wdata(wd), .ram_rdata(rd),
    .found, .nhits, .volume, .pitch);
  sram_model #(.AW(16), .DW(8)) ram (.clk, .en, .we, .addr, .wdata(wd), .rdata(rd));
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run_frame();
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    wait (done); @(posedge clk);
  endtask
  initial begin
    int n, sx, ev, ep; logic [7:0] ov, op;
    x0 = 5; x1 = 12; hp = 7;
    repeat (3) @(posedge clk); rst <= 0;
    run_frame();                                   // background only
    for (int f = 0; f < 6; f++) begin
      // the hand moves only in laser-on frames: a laser-off frame is compared
      // with the laser-on frame before it and shows the same reflection
      if (f % 2 == 0) begin
        x0 = $urandom_range(0, 15); x1 = x0 + $urandom_range(0, 8); hp = $urandom_range(0, MP - 2);
      end
      laser = (f % 2 == 0);
      run_frame();
      n = x1 - x0 + 1; sx = 0; for (int j = x0; j <= x1; j++) sx += j;
      ev = (hp * 5) / 2; ep = ((sx / n) * 198) >> 8;
      check(found && nhits == 9'(n), $sformatf("frame %0d hits %0d exp %0d", f, nhits, n));
      check(volume == 8'(ev), $sformatf("volume %0d exp %0d", volume, ev));
      check(pitch == 8'(ep), $sformatf("pitch %0d exp %0d", pitch, ep));
    end
    ov = volume; op = pitch;
    laser = 1; x0 = 100; x1 = 100;                 // hand outside the view
    run_frame(); laser = 0; run_frame();
    check(!found && nhits == 0 && volume == ov && pitch == op, "no hand keeps old values");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
