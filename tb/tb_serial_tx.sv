// tb_serial_tx: sends random words of 9 and 16 bits and decodes the
// sel_n/sclk/sdata lines independently (sample on sclk rising edge while
// sel_n is low). Checks the word, the bit count, and that a word takes
// HALF*(2*WIDTH+1) clocks of busy.
module tb_serial_tx;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  logic s9, b9, sel9, sck9, sd9, s16, b16, sel16, sck16, sd16;
  logic [8:0] d9; logic [15:0] d16;
  serial_tx #(.WIDTH(9))  dut9  (.clk, .rst, .start(s9), .data(d9), .busy(b9),
    .sel_n(sel9), .sclk(sck9), .sdata(sd9));
  serial_tx #(.WIDTH(16), .HALF(3)) dut16 (.clk, .rst, .start(s16), .data(d16), .busy(b16),
    .sel_n(sel16), .sclk(sck16), .sdata(sd16));
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // decoders
  logic [15:0] r9, r16; int n9, n16, c9, c16;
  logic sck9_d = 0, sck16_d = 0;
  always @(posedge clk) begin
    sck9_d <= sck9; sck16_d <= sck16;
    if (!sel9 && sck9 && !sck9_d) begin r9 <= {r9[14:0], sd9}; n9 <= n9 + 1; end
    if (!sel16 && sck16 && !sck16_d) begin r16 <= {r16[14:0], sd16}; n16 <= n16 + 1; end
    if (b9) c9 <= c9 + 1;
    if (b16) c16 <= c16 + 1;
  end
  initial begin
    s9 = 0; s16 = 0; d9 = 0; d16 = 0;
    repeat (3) @(posedge clk); rst <= 0;
    for (int k = 0; k < 20; k++) begin
      @(posedge clk);
      n9 <= 0; n16 <= 0; c9 <= 0; c16 <= 0;
      d9 <= 9'($urandom); d16 <= 16'($urandom); s9 <= 1; s16 <= 1;
      @(posedge clk); s9 <= 0; s16 <= 0;
      @(posedge clk); #1;
      while (b9 || b16) begin @(posedge clk); #1; end
      check(n9 == 9 && r9[8:0] == d9, $sformatf("9-bit word %h got %h (%0d bits)", d9, r9[8:0], n9));
      check(n16 == 16 && r16 == d16, $sformatf("16-bit word %h got %h", d16, r16));
      check(c9 == 5*(2*9+1), $sformatf("9-bit busy %0d clocks", c9));
      check(c16 == 3*(2*16+1), $sformatf("16-bit busy %0d clocks", c16));
      check(sel9 && sel16, "select released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
