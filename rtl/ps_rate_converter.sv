// ps_rate_converter: works out how fast the pitch shifter must step through
// the recorded samples. The 8-bit hand coordinate selects a target pitch F1
// from a 256-entry ROM spanning 40..500 Hz, F1 = 40 + coord*460/255 (the
// ROM contents are this design's choice; the range is the original's). On
// `calc` the FSM loads F0 and F1 and divides F1*2^FRAC by F0 with a 20-bit
// sequential divider, giving the read-pointer increment in fixed point with
// FRAC (6) fraction bits, saturated to RATE_W (11) bits, i.e. up to 31.98.
// F0 = 0 (no pitch known yet) gives a rate of exactly 1.0. `rate` updates
// one clock after `done` pulses, about 25 clocks after `calc`.
module ps_rate_converter #(
  parameter int unsigned FRAC   = 6,
  parameter int unsigned RATE_W = 11
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              calc,
  input  logic [8:0]        f0,
  input  logic [7:0]        coord,
  output logic              done,
  output logic [RATE_W-1:0] rate,
  output logic [8:0]        f1
);
  localparam int unsigned W = 20;
  typedef logic [8:0] lut_t [256];
  function automatic lut_t make_lut();
    lut_t t;
    for (int i = 0; i < 256; i++) t[i] = 9'(sr_pkg::F_MIN_HZ +
        (i * (sr_pkg::F_MAX_HZ - sr_pkg::F_MIN_HZ)) / 255);
    return t;
  endfunction
  localparam lut_t F1_LUT = make_lut();

  typedef enum logic [1:0] {IDLE, LOAD, DIVIDE, OUTPUT} state_t;
  state_t state;
  logic [8:0] f0_r;
  logic dstart, dbusy;
  logic [W-1:0] q, r_unused;

  seq_divider #(.W(W)) u_div (.clk, .rst, .start(dstart), .dividend(W'({f1, FRAC'(0)})),
    .divisor(W'(f0_r)), .busy(dbusy), .quotient(q), .remainder(r_unused));

  assign dstart = (state == LOAD);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE; f0_r <= '0; f1 <= '0; done <= 1'b0; rate <= RATE_W'(1 << FRAC);
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (calc) begin
          f0_r  <= f0;
          f1    <= F1_LUT[coord];
          state <= LOAD;
        end
        LOAD:   state <= DIVIDE;
        DIVIDE: if (!dbusy) state <= OUTPUT;
        OUTPUT: begin
          if (f0_r == 0)                         rate <= RATE_W'(1 << FRAC);
          else if (q > W'((1 << RATE_W) - 1))    rate <= '1;
          else                                   rate <= q[RATE_W-1:0];
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
