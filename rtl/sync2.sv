// sync2: two-flip-flop synchronizer for a single asynchronous input (serial
// link clock, data and select lines, converter status pins). The output
// follows the input two clocks later and is 0 during reset. The original
// design names a synchronizer block; the two-stage depth is this design's
// choice.
module sync2 (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
