// camera_model: behavioural model of the rotated CCD camera, its video ADC
// (one 8-bit sample per clock) and the sync separator, for testbenches.
// A frame is FRAME_LINES lines of LINE_CLKS clocks; each line starts with
// hsync_n low for 40 clocks; vsync_n is low during the first 3 lines. Line
// k of the frame is image line k-BLANK. Pixels come out starting DELAY
// clocks after the hsync_n rising edge (DELAY matches the receiving logic's
// latency so pixel 0 is the first one sampled). The scene is a fixed
// background (ambient light, 20..59) plus small noise; while `laser` is
// high, image lines hand_x0..hand_x1 carry a 10-pixel bright reflection
// starting at pixel 5*hand_pos. `frame_start` pulses at each vsync fall.
module camera_model #(
  parameter int LINES     = 330,
  parameter int BLANK     = 10,
  parameter int MP        = 100,
  parameter int LINE_CLKS = 640,
  parameter int DELAY     = 1
) (
  input  logic       clk,
  input  logic       laser,
  input  int         hand_x0,
  input  int         hand_x1,
  input  int         hand_pos,
  output logic       hsync_n,
  output logic       vsync_n,
  output logic [7:0] ad_data,
  output logic       frame_start
);
  localparam int FRAME_LINES = BLANK + LINES + 3;
  int c = 0, l = 0;
  initial begin hsync_n = 1; vsync_n = 1; ad_data = 0; frame_start = 0; end
  always @(posedge clk) begin
    int px, img, v;
    c <= (c == LINE_CLKS - 1) ? 0 : c + 1;
    if (c == LINE_CLKS - 1) l <= (l == FRAME_LINES - 1) ? 0 : l + 1;
    hsync_n     <= !(c < 40);
    vsync_n     <= !(l < 3);
    frame_start <= (l == 0 && c == 0);
    px  = c - 40 - DELAY;
    img = l - BLANK;
    v   = 20 + ((img * 37 + px * 11) % 40) + $urandom_range(0, 3);
    if (laser && img >= hand_x0 && img <= hand_x1 && px >= 5 * hand_pos && px < 5 * hand_pos + 10)
      v = 230;
    ad_data <= (px >= 0 && px < 5 * MP) ? 8'(v) : 8'd16;
  end
endmodule
