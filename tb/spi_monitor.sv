// spi_monitor: testbench decoder for a sel_n/sclk/sdata serial line: shifts
// sdata in MSB first on each sclk rising edge while sel_n is low and, when
// sel_n rises after at least one bit, reports the word and its bit count and bumps `count`.
module spi_monitor #(
  parameter int WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             sel_n,
  input  logic             sclk,
  input  logic             sdata,
  output logic [WIDTH-1:0] word,
  output int               nbits,
  output int               count
);
  logic [WIDTH-1:0] sh = '0;
  int n = 0;
  logic sclk_d = 0, sel_d = 1;
  initial begin word = '0; nbits = 0; count = 0; end
  always @(posedge clk) begin
    sclk_d <= sclk; sel_d <= sel_n;
    if (rst) begin n <= 0; end
    else if (!sel_n && sclk && !sclk_d) begin sh <= {sh[WIDTH-2:0], sdata}; n <= n + 1; end
    if (!rst && sel_n && !sel_d && n > 0) begin word <= sh; nbits <= n; n <= 0; count <= count + 1; end
  end
endmodule
