// tb_ffe_adc_fsm: runs conversions against the ADC12441 model and checks
// the pin sequence: wr_n low for exactly 3 clocks with cs_n low, rd_n low
// only after int_n has fallen, `done` with the converted value on the
// bus, and rd_n/cs_n released only after `release`.
module tb_ffe_adc_fsm;
  logic clk = 0, rst = 1, start = 0, done, rel = 0, busy, cs_n, wr_n, rd_n, int_n;
  logic [12:0] data; int nconv;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ffe_adc_fsm dut (.clk, .rst, .start, .done, .release_bus(rel), .busy, .cs_n, .wr_n, .rd_n, .int_n);
  adc12441_model #(.CONV(40)) adc (.clk, .cs_n, .wr_n, .rd_n, .int_n, .data, .freq(440.0),
    .amp(3000.0), .h2(0.0), .nconv);
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  int wr_low = 0; bit int_seen = 0, rd_early = 0;
  always @(posedge clk) begin
    if (!wr_n) begin wr_low++; if (cs_n) rd_early = 1; end
    if (!int_n) int_seen = 1;
    if (!rd_n && !int_seen) rd_early = 1;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int hold;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int k = 0; k < 10; k++) begin
      wr_low = 0; int_seen = 0; rd_early = 0;
      @(posedge clk); #1 start = 1; @(posedge clk); #1 start = 0;
      while (!done) begin @(posedge clk); #1; end
      check(wr_low == 3, $sformatf("wr_n low %0d clocks", wr_low));
      check(!rd_early, "rd_n only after int_n, cs_n low during write");
      check(!rd_n && !cs_n && data == 13'(adc.hist[k]), "result on the bus");
      hold = $urandom_range(1, 8);
      repeat (hold) begin @(posedge clk); #1; end
      check(done && !rd_n && !cs_n, "bus held until release");
      rel = 1; @(posedge clk); #1 rel = 0;
      check(rd_n && cs_n && !busy, "released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
