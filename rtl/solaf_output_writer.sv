// solaf_output_writer: fills the output buffer S3 from S2 for the
// SOLAF-style shifter. It copies S2[src] to S3[{half, w}] for
// src = km, km+1, ... and w = w_start, w_start+1, ... . In single mode it
// stops at the end of S2 (src = len) or when S3 is full (w = BUF); in
// repeat mode it goes back to src = km whenever it reaches the end of S2
// and stops only when S3 is full, which is how the last splice is repeated
// until the output holds BUF samples. Both modes follow the original
// description. Per sample: read S2, latch, write S3: 3 clocks; `pause` is
// honoured between samples, as in solaf_resampler. `done` pulses with
// `w_end` (next free S3 index) and `full`. With len <= km nothing can be
// copied and the writer stops at once, in either mode.
module solaf_output_writer
  import solaf_pkg::*;
#(
  parameter int unsigned B = solaf_pkg::BUF
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic          repeat_mode,
  input  logic [8:0]    km,
  input  logic [11:0]   len,
  input  logic          half,
  input  logic [11:0]   w_start,
  input  logic          pause,
  output logic          paused,
  output logic          busy,
  output logic          done,
  output logic [11:0]   w_end,
  output logic          full,
  output logic [15:0]   bus_addr_o,
  output logic          bus_we,
  output logic [SW-1:0] bus_wdata,
  input  logic [SW-1:0] bus_rdata
);
  typedef enum logic [2:0] {IDLE, NEXT, RD, LATCH, WR, PAUSED} state_t;
  state_t state;
  logic [11:0]   src, w;
  logic          rep_r, half_r;
  logic [SW-1:0] sample;
  assign busy   = (state != IDLE);
  assign paused = (state == PAUSED);
  assign full   = (w == 12'(B));
  assign w_end  = w;
  assign bus_wdata = sample;

  always_comb begin
    bus_addr_o = bus_addr(SEL_NONE, '0);
    bus_we     = 1'b0;
    if (state == RD) bus_addr_o = bus_addr(SEL_S2, {1'b0, src});
    if (state == WR) begin bus_addr_o = bus_addr(SEL_S3, {half_r, w}); bus_we = 1'b1; end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE; src <= '0; w <= '0; rep_r <= 1'b0; half_r <= 1'b0; sample <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          src <= 12'(km); w <= w_start; rep_r <= repeat_mode; half_r <= half; state <= NEXT;
        end
        NEXT:
          if (w == 12'(B) || len <= 12'(km) || (src >= len && !rep_r)) begin
            done <= 1'b1; state <= IDLE;
          end else if (src >= len) src <= 12'(km);   // repeat mode: loop the splice
          else if (pause) state <= PAUSED;
          else state <= RD;
        RD:    state <= LATCH;
        LATCH: begin sample <= bus_rdata; state <= WR; end
        WR:    begin src <= src + 1'b1; w <= w + 1'b1; state <= NEXT; end
        PAUSED: if (!pause) state <= NEXT;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
