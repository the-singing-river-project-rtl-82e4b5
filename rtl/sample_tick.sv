// sample_tick: divides the 10 MHz system clock down to the 40 kHz audio
// sample rate. A free-running counter counts 0..DIV-1 and `tick` is high for
// exactly one clock when it wraps, i.e. every DIV clocks (250 by default).
// The first tick comes DIV clocks after reset is released. The divide ratio
// follows from the original clock and sample rates; the one-clock pulse
// form is this design's choice.
module sample_tick #(
  parameter int unsigned DIV = sr_pkg::SAMPLE_DIV
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  logic [$clog2(DIV)-1:0] cnt;
  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= (cnt == $bits(cnt)'(DIV - 1));
      cnt  <= (cnt == $bits(cnt)'(DIV - 1)) ? '0 : cnt + 1'b1;
    end
  end
endmodule
