// tb_vis_column_fsm: for several lines, first stores a background line
// (laser off), then runs the same line with a bright reflection over a few
// pixels (laser on) and checks the hit flag and the metapixel position of
// the largest difference; a faint spot below the threshold must not hit,
// and a third pass back to background must hit at the same place again
// (absolute difference). Also checks busy lasts 500 + 3 clocks.
module tb_vis_column_fsm;
  logic clk = 0, rst = 1, start = 0, busy, done, hit, en, we;
  logic [8:0] line; logic [7:0] ad, wd, rd; logic [6:0] pos; logic [15:0] addr;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  vis_column_fsm dut (.clk, .rst, .start, .line, .ad_data(ad), .busy, .done, .hit, .pos,
    .ram_en(en), .ram_we(we), .ram_addr(addr), .ram_wdata(wd), .ram_rdata(rd));
  sram_model #(.AW(16), .DW(8)) ram (.clk, .en, .we, .addr, .wdata(wd), .rdata(rd));
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [7:0] bg [500];
  task automatic run_line(input int l, input int spot, input int amp, output bit h, output int p,
                          output int cyc);
    @(posedge clk); start <= 1; line <= 9'(l);
    @(posedge clk); start <= 0; cyc = 0;
    for (int s = 0; s < 500; s++) begin
      int v = bg[s];
      if (spot >= 0 && s >= spot && s < spot + 3) v = (v + amp > 255) ? 255 : v + amp;
      ad <= 8'(v);
      @(posedge clk); cyc++;
    end
    while (!done) begin @(posedge clk); cyc++; end
    h = hit; p = pos;
  endtask
  initial begin
    bit h; int p, cyc, spot;
    ad = 0;
    repeat (3) @(posedge clk); rst <= 0;
    for (int l = 0; l < 6; l++) begin
      for (int s = 0; s < 500; s++) bg[s] = 8'($urandom_range(20, 60));
      spot = $urandom_range(0, 490);
      run_line(l, -1, 0, h, p, cyc);
      check(cyc == 503 + 1, $sformatf("line busy+done %0d clocks", cyc));
      run_line(l, spot, 180, h, p, cyc);
      check(h && p == spot / 5 || h && p == (spot + 2) / 5,
            $sformatf("line %0d spot %0d: hit %0d pos %0d", l, spot, h, p));
      run_line(l, -1, 0, h, p, cyc);
      check(h && (p == spot / 5 || p == (spot + 2) / 5), "laser-off frame also hits");
      run_line(l, spot, 10, h, p, cyc);
      check(!h, "faint spot below threshold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
