// seq_divider: unsigned restoring divider, one quotient bit per clock.
// Used by the vision frame FSM (mean hit position and mean line number) and
// by the pitch shifter's rate converter (F1/F0). A `start` pulse while idle
// loads dividend and divisor; `busy` is high for W cycles, then quotient and
// remainder hold until the next start. Division by zero gives an all-ones
// quotient. The original design only names its divider (start/busy
// handshake) or divides by repeated subtraction; the restoring algorithm is
// this design's choice.
module seq_divider #(
  parameter int unsigned W = 20
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder
);
  logic [W-1:0] d;
  logic [$clog2(W+1)-1:0] n;
  logic [W:0] trial;
  assign trial = {remainder, quotient[W-1]} - {1'b0, d};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; quotient <= '0; remainder <= '0; d <= '0; n <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1; quotient <= dividend; remainder <= '0; d <= divisor;
        n <= $bits(n)'(W);
      end
    end else begin
      if (!trial[W]) begin
        remainder <= trial[W-1:0];
        quotient  <= {quotient[W-2:0], 1'b1};
      end else begin
        remainder <= {remainder[W-2:0], quotient[W-1]};
        quotient  <= {quotient[W-2:0], 1'b0};
      end
      n <= n - 1'b1;
      if (n == 1) busy <= 1'b0;
    end
  end
endmodule
