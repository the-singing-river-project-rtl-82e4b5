// solaf_cross_sign: finds the best overlap lag for the SOLAF-style shifter
// without multiplications. For each lag k = 0 .. MAX_LAG-1 (and only while
// k + WIN <= len, the length of S2) it compares the sign bits of
// S2[k+i] and of the reference window ref[i], i = 0 .. WIN-1, scores 1
// for equal signs (XNOR) and sums the scores; the first lag with the
// highest sum is Km. The reference window is the last WIN samples of the
// output buffer S3 that precede the splice (`ref_base` is the S3 chip
// address of its first sample; it wraps inside the 8K chip). Sign
// comparison, WIN = 300 and the 400-lag limit follow the original
// description; the schedule is this design's.
// Per comparison: address S2, latch its sign while addressing S3, then
// accumulate while addressing the next S2 sample: 2 clocks, so a full
// search of 400 lags x 300 samples takes about 240,000 clocks. `pause` is honoured between comparisons,
// as in solaf_resampler. `done` pulses with `km` and `score` valid. With
// len < WIN no lag is possible and km = 0, score = 0.
module solaf_cross_sign
  import solaf_pkg::*;
#(
  parameter int unsigned W_LEN   = solaf_pkg::WIN,
  parameter int unsigned LAGS    = solaf_pkg::MAX_LAG
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [12:0]   ref_base,
  input  logic [11:0]   len,
  input  logic          pause,
  output logic          paused,
  output logic          busy,
  output logic          done,
  output logic [8:0]    km,
  output logic [8:0]    score,
  output logic [15:0]   bus_addr_o,          // read-only: it never writes
  input  logic [SW-1:0] bus_rdata
);
  typedef enum logic [2:0] {IDLE, NEXT, RD2, RD3, ACC, LAG_END, PAUSED} state_t;
  state_t state;
  logic [8:0]  k, i, acc, best, best_k;
  logic        sign2;
  logic [12:0] s2_addr, s3_addr;
  logic        have_best, match, acc_next_rd;
  // ACC also issues the next S2 read when the window goes on unpaused
  assign acc_next_rd = (state == ACC) && (int'(i) != int'(W_LEN) - 1) && !pause;
  assign match     = (sign2 == bus_rdata[SW-1]);   // XNOR of the two sign bits
  assign s2_addr   = 13'(k) + 13'(i);
  assign s3_addr   = ref_base + 13'(i);
  assign busy      = (state != IDLE);
  assign paused    = (state == PAUSED);

  always_comb begin
    bus_addr_o = bus_addr(SEL_NONE, '0);
    if (state == RD2) bus_addr_o = bus_addr(SEL_S2, s2_addr);
    if (state == RD3) bus_addr_o = bus_addr(SEL_S3, s3_addr);
    if (acc_next_rd) bus_addr_o = bus_addr(SEL_S2, s2_addr + 13'd1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE; k <= '0; i <= '0; acc <= '0; best <= '0; best_k <= '0; sign2 <= 1'b0;
      have_best <= 1'b0; km <= '0; score <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          k <= '0; i <= '0; acc <= '0; best <= '0; best_k <= '0; have_best <= 1'b0; state <= NEXT;
        end
        NEXT:                                     // a comparison boundary
          if (int'(k) >= int'(LAGS) || int'(k) + int'(W_LEN) > int'(len)) begin
            km <= best_k; score <= best; done <= 1'b1; state <= IDLE;
          end else if (pause) state <= PAUSED;
          else state <= RD2;
        RD2: state <= RD3;                        // S2 sample on the bus next clock
        RD3: begin sign2 <= bus_rdata[SW-1]; state <= ACC; end
        ACC: begin                                // S3 sample on the bus now
          acc <= acc + 9'(match);
          if (int'(i) == int'(W_LEN) - 1) state <= LAG_END;
          else begin
            i <= i + 1'b1;
            state <= pause ? PAUSED : RD3;        // S2 read already issued unless paused
          end
        end
        LAG_END: begin
          if (!have_best || acc > best) begin best <= acc; best_k <= k; have_best <= 1'b1; end
          acc <= '0; i <= '0; k <= k + 1'b1;
          state <= NEXT;
        end
        PAUSED: if (!pause) state <= NEXT;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
