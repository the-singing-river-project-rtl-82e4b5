// ffe_mac: multiply-accumulate for the autocorrelation. Two two's complement
// samples are multiplied as in the original: their magnitudes are
// multiplied unsigned and the product is negated when the sign bits differ.
// `start_mult` registers the signed product of `a` and `b`; `start_accum`
// adds the registered product to the AW-bit accumulator `acc`; `clear`
// zeroes the accumulator (it wins over start_accum). Each step takes one
// clock, so a product issued with start_mult can be accumulated on the next
// clock. 36 accumulator bits hold 1024 full-scale 13-bit products.
module ffe_mac #(
  parameter int unsigned DW = 13,
  parameter int unsigned AW = 36
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 clear,
  input  logic                 start_mult,
  input  logic                 start_accum,
  input  logic [DW-1:0]        a,
  input  logic [DW-1:0]        b,
  output logic signed [AW-1:0] acc
);
  logic [DW-1:0]     mag_a, mag_b;
  logic [2*DW-1:0]   mag_p;
  logic [AW-1:0]     prod_c;
  logic signed [AW-1:0] prod;

  always_comb begin
    mag_a  = a[DW-1] ? (~a + 1'b1) : a;
    mag_b  = b[DW-1] ? (~b + 1'b1) : b;
    mag_p  = mag_a * mag_b;
    prod_c = AW'(mag_p);
    if (a[DW-1] ^ b[DW-1]) prod_c = ~prod_c + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      prod <= '0; acc <= '0;
    end else begin
      if (start_mult) prod <= prod_c;
      if (clear) acc <= '0;
      else if (start_accum) acc <= acc + prod;
    end
  end
endmodule
