// ffe_freq_divider: converts the pitch period found by the autocorrelation
// (in samples) into a frequency, FS / period, without a hardware divider:
// as in the original, the period is multiplied by an incrementing integer i
// (here by repeated addition) until the product exceeds FS, and i-1 is the
// result, i.e. floor(FS/period). `start` with `period` begins; `done` pulses
// when `freq` is valid (it holds until the next start). Takes
// floor(FS/period)+2 clocks; a zero period gives FS.
module ffe_freq_divider #(
  parameter int unsigned FS = sr_pkg::FS_HZ,
  parameter int unsigned PW = 10,
  parameter int unsigned FW = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [PW-1:0] period,
  output logic          busy,
  output logic          done,
  output logic [FW-1:0] freq
);
  logic [FW-1:0] i;
  logic [FW+PW-1:0] prod;
  logic [PW-1:0] p;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; done <= 1'b0; freq <= '0; i <= '0; prod <= '0; p <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          if (period == 0) begin
            freq <= FW'(FS);
            done <= 1'b1;
          end else begin
            busy <= 1'b1; p <= period; i <= FW'(1); prod <= (FW+PW)'(period);
          end
        end
      end else if (prod > (FW+PW)'(FS)) begin
        freq <= i - 1'b1;
        done <= 1'b1;
        busy <= 1'b0;
      end else begin
        i    <= i + 1'b1;
        prod <= prod + (FW+PW)'(p);
      end
    end
  end
endmodule
