// ffe_autocorr: finds the pitch period of the N stored samples by
// time-domain autocorrelation. For lag = 0, 1, 2, ... it sums
// x[n+lag]*x[n] over n = 0 .. N-1-lag with the MAC (two single-port SRAM
// reads, multiply, accumulate: 5 clocks per product). Instead of storing
// the whole autocorrelation it keeps only the last three sums:
// reg0 = R(lag), reg1 = R(lag-1), reg2 = R(lag-2). From lag MIN_LAG on, the
// first lag with reg1 > reg0 and reg1 > reg2 marks a local peak at lag-1,
// which is taken as the period; if none is found by lag N-2, N-2 is used.
// The period is then handed to the frequency divider (div_start/div_done)
// and `done` pulses once the divider has the frequency. These steps follow the
// original; the 5-clock product schedule is this design's (the original
// used a 22-state FSM padded with wait states).
module ffe_autocorr #(
  parameter int unsigned N       = 1024,
  parameter int unsigned MIN_LAG = 4,
  parameter int unsigned AW      = 13,
  parameter int unsigned DW      = 13,
  parameter int unsigned ACC_W   = 36
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // sample SRAM read port
  output logic          ram_en,
  output logic [AW-1:0] ram_addr,
  input  logic [DW-1:0] ram_rdata,
  // frequency divider
  output logic          div_start,
  output logic [AW-1:0] period,
  input  logic          div_done,
  output logic          peak_found
);
  typedef enum logic [3:0] {IDLE, RD1, RD2, LATCH, MULT, ACCUM, SHIFT, CHECK, DIV, WAIT_DIV}
    state_t;
  state_t state;
  logic [AW-1:0] lag, n2;
  logic [AW:0]   n1;
  logic [DW-1:0] xa, xb;
  logic clear_acc, start_mult, start_accum;
  logic signed [ACC_W-1:0] acc, reg0, reg1, reg2;

  ffe_mac #(.DW(DW), .AW(ACC_W)) u_mac (.clk, .rst, .clear(clear_acc),
    .start_mult, .start_accum, .a(xa), .b(xb), .acc);

  assign n1          = {1'b0, n2} + {1'b0, lag};
  assign busy        = (state != IDLE);
  assign ram_en      = (state == RD1) || (state == RD2);
  assign ram_addr    = (state == RD1) ? n1[AW-1:0] : n2;
  assign start_mult  = (state == MULT);
  assign start_accum = (state == ACCUM);
  assign div_start   = (state == DIV);
  assign clear_acc   = (state == SHIFT) || (state == IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE; lag <= '0; n2 <= '0; xa <= '0; xb <= '0;
      reg0 <= '0; reg1 <= '0; reg2 <= '0; period <= '0; done <= 1'b0; peak_found <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          lag <= '0; n2 <= '0; reg0 <= '0; reg1 <= '0; reg2 <= '0;
          state <= RD1;
        end
        RD1:   state <= RD2;                 // read x[n+lag]
        RD2:   begin xa <= ram_rdata; state <= LATCH; end   // read x[n]
        LATCH: begin xb <= ram_rdata; state <= MULT; end
        MULT:  state <= ACCUM;
        ACCUM: begin
          if (n1 == (AW+1)'(N - 1)) state <= SHIFT;
          else begin
            n2    <= n2 + 1'b1;
            state <= RD1;
          end
        end
        SHIFT: begin                         // acc holds R(lag), cleared now
          reg0  <= acc;
          reg1  <= reg0;
          reg2  <= reg1;
          state <= CHECK;
        end
        CHECK: begin
          if (lag >= AW'(MIN_LAG) && reg1 > reg0 && reg1 > reg2) begin
            period     <= lag - 1'b1;
            peak_found <= 1'b1;
            state      <= DIV;
          end else if (lag == AW'(N - 2)) begin
            period     <= lag;
            peak_found <= 1'b0;
            state      <= DIV;
          end else begin
            lag   <= lag + 1'b1;
            n2    <= '0;
            state <= RD1;
          end
        end
        DIV: state <= WAIT_DIV;
        WAIT_DIV: if (div_done) begin
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
