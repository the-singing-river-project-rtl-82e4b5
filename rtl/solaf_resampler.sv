// solaf_resampler: first step of the SOLAF-style shifter. It copies the
// full input half-buffer S1 into S2 at a new rate: S2[j] = S1[floor(j*rate)]
// for j = 0, 1, ..., stopping when the read index passes the end of S1
// (BUF samples) or S2 holds BUF samples, so S2 may end up shorter than
// BUF; `len` gives its length. rate is fixed point with FRAC fraction bits
// (F1/F0 from the rate converter). This follows the original description.
// Per sample: boundary check, read S1 (address, then data one clock
// later), write S2: 4 clocks, 16,000 for a full buffer. Pause: `pause` is looked at only between samples; the
// FSM then stops with the bus released and holds `paused` until `pause`
// drops (so the I/O block can use the bus). `done` pulses at the end.
module solaf_resampler
  import solaf_pkg::*;
#(
  parameter int unsigned B      = solaf_pkg::BUF,
  parameter int unsigned FRAC   = 6,
  parameter int unsigned RATE_W = 11
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic              s1_half,     // which half of S1 to read
  input  logic [RATE_W-1:0] rate,
  input  logic              pause,
  output logic              paused,
  output logic              busy,
  output logic              done,
  output logic [11:0]       len,
  output logic [15:0]       bus_addr_o,
  output logic              bus_we,
  output logic [SW-1:0]     bus_wdata,
  input  logic [SW-1:0]     bus_rdata
);
  typedef enum logic [2:0] {IDLE, NEXT, RD, LATCH, WR, PAUSED} state_t;
  state_t state;
  logic [12+FRAC:0] ptr;                // read position, fixed point
  logic [11:0]      j;                  // write index into S2
  logic             half_r;
  logic [SW-1:0]    sample;
  logic [11:0]      idx;
  assign idx    = ptr[FRAC+11:FRAC];
  assign busy   = (state != IDLE);
  assign paused = (state == PAUSED);

  always_comb begin
    bus_addr_o = bus_addr(SEL_NONE, '0);
    bus_we     = 1'b0;
    bus_wdata  = sample;
    if (state == RD) bus_addr_o = bus_addr(SEL_S1, {half_r, idx});
    if (state == WR) begin bus_addr_o = bus_addr(SEL_S2, {1'b0, j}); bus_we = 1'b1; end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE; ptr <= '0; j <= '0; half_r <= 1'b0; sample <= '0; len <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin ptr <= '0; j <= '0; half_r <= s1_half; state <= NEXT; end
        NEXT:
          if (ptr[12+FRAC:FRAC] >= (13)'(B) || j == 12'(B)) begin
            len <= j; done <= 1'b1; state <= IDLE;
          end else if (pause) state <= PAUSED;
          else state <= RD;
        RD:     state <= LATCH;
        LATCH:  begin sample <= bus_rdata; state <= WR; end
        WR: begin
          j     <= j + 1'b1;
          ptr   <= ptr + (13+FRAC)'(rate);
          state <= NEXT;
        end
        PAUSED: if (!pause) state <= NEXT;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
