// tb_ps_rate_converter: random F0 (40..500 Hz and 0) and hand coordinates;
// checks F1 = 40 + coord*460/255 and rate = floor(F1*64/F0) saturated to
// 11 bits (rate 64 = 1.0 when F0 is 0), and that the result is ready within
// 30 clocks of `calc`.
module tb_ps_rate_converter;
  logic clk = 0, rst = 1, calc = 0, done;
  logic [8:0] f0, f1; logic [7:0] coord; logic [10:0] rate;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ps_rate_converter dut (.clk, .rst, .calc, .f0, .coord, .done, .rate, .f1);
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int ef1, er, cyc;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int k = 0; k < 400; k++) begin
      f0 = (k == 5) ? 9'd0 : 9'($urandom_range(k < 10 ? 1 : 40, 500));
      coord = 8'($urandom);
      ef1 = 40 + (int'(coord) * 460) / 255;
      er = (f0 == 0) ? 64 : (ef1 * 64) / int'(f0);
      if (er > 2047) er = 2047;
      calc = 1; @(posedge clk); #1 calc = 0; cyc = 1;
      while (!done && cyc < 40) begin @(posedge clk); #1; cyc++; end
      checks++;
      if (cyc > 30 || f1 != 9'(ef1) || rate != 11'(er)) begin
        failures++; $display("FAIL f0 %0d coord %0d: f1 %0d rate %0d exp %0d %0d (%0d clk)",
                             f0, coord, f1, rate, ef1, er, cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
