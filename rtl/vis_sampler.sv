// vis_sampler: the vision subsystem's sampling FSM. The camera ADC delivers
// one 8-bit pixel per 10 MHz clock, faster than the frame SRAM can store, so
// every GROUP (5) consecutive pixels are reduced to one "metapixel": the sum
// of the two brightest of them, which keeps the narrow bright laser line
// while shrinking the image to two fifths. The 9-bit sum is halved to fit
// the 8-bit SRAM word (this halving is this design's choice).
// Interface: `clear` restarts grouping (start of a video line); each clock
// with `pix_valid` consumes `pix`. After the GROUP-th pixel, `mp_valid`
// pulses for one clock with `mp` and its index `mp_idx` within the line,
// one clock after that pixel.
module vis_sampler #(
  parameter int unsigned GROUP = 5,
  parameter int unsigned IDX_W = 7
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             pix_valid,
  input  logic [7:0]       pix,
  output logic             mp_valid,
  output logic [7:0]       mp,
  output logic [IDX_W-1:0] mp_idx
);
  logic [7:0] top1, top2;           // brightest and second brightest so far
  logic [7:0] n1, n2;               // after including the current pixel
  logic [$clog2(GROUP)-1:0] cnt;
  logic [IDX_W-1:0] idx;
  logic [8:0] sum;

  always_comb begin
    if (pix > top1) begin
      n1 = pix;  n2 = top1;
    end else if (pix > top2) begin
      n1 = top1; n2 = pix;
    end else begin
      n1 = top1; n2 = top2;
    end
    sum = {1'b0, n1} + {1'b0, n2};
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      top1 <= '0; top2 <= '0; cnt <= '0; idx <= '0;
      mp_valid <= 1'b0; mp <= '0; mp_idx <= '0;
    end else begin
      mp_valid <= 1'b0;
      if (pix_valid) begin
        if (cnt == $bits(cnt)'(GROUP - 1)) begin
          mp_valid <= 1'b1;
          mp       <= sum[8:1];
          mp_idx   <= idx;
          idx      <= idx + 1'b1;
          cnt      <= '0;
          top1     <= '0;
          top2     <= '0;
        end else begin
          cnt  <= cnt + 1'b1;
          top1 <= n1;
          top2 <= n2;
        end
      end
    end
  end
endmodule
