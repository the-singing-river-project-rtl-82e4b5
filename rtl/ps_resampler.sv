// ps_resampler: plays one output sample of the pitch shifter. On `start` it
// asks the address manager for the resample address, reads that byte from
// the full buffer and, if the `mix` switch is on, also reads the original
// sample at the current position, then adds the two (halving the 9-bit sum
// to 8 bits; the halving is this design's choice) or passes the resampled
// byte alone, and writes the result to the AD558 DAC with a one-clock
// dac_cs_n strobe. The read-sum-drive sequence follows the original. With
// the registered address (one clock) and the synchronous SRAM (one clock)
// a read takes three clocks; `busy` is high for 6 clocks (8 with mix).
module ps_resampler (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       mix,
  output logic       busy,
  // address manager and SRAM
  output logic       req_r,
  output logic       req_o,
  output logic       addr_off,
  output logic       ram_oe,
  input  logic [7:0] ram_rdata,
  // AD558
  output logic [7:0] dac_data,
  output logic       dac_cs_n,
  // last values, for observation
  output logic [7:0] resampled,
  output logic [7:0] original
);
  typedef enum logic [3:0] {IDLE, REQ_R, READ_R, GET_R, READ_O, GET_O, SUM, DRIVE, DONE}
    state_t;
  state_t state;
  logic mix_r;
  logic [8:0] sum;

  assign busy     = (state != IDLE);
  assign req_r    = (state == REQ_R);
  assign ram_oe   = (state == READ_R) || (state == READ_O);
  assign req_o    = (state == GET_R) && mix_r;
  assign addr_off = (state == SUM);
  assign dac_cs_n = (state != DRIVE);
  assign sum      = mix_r ? ({1'b0, resampled} + {1'b0, original}) : {resampled, 1'b0};

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE; mix_r <= 1'b0; resampled <= '0; original <= '0; dac_data <= '0;
    end else begin
      unique case (state)
        IDLE:   if (start) begin mix_r <= mix; state <= REQ_R; end
        REQ_R:  state <= READ_R;
        READ_R: state <= GET_R;
        GET_R:  begin
          resampled <= ram_rdata;
          state     <= mix_r ? READ_O : SUM;
        end
        READ_O: state <= GET_O;
        GET_O:  begin original <= ram_rdata; state <= SUM; end
        SUM:    begin dac_data <= sum[8:1]; state <= DRIVE; end
        DRIVE:  state <= DONE;
        DONE:   state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
