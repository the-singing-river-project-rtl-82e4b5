// solaf_subsystem: the SOLAF-style (synchronous overlap-add) pitch shifter,
// the time-scaling alternative to ps_subsystem. Input audio fills the
// double buffer S1 through the I/O block while the I/O block plays the
// double buffer S3; every BUF samples (0.1 s) the halves swap and the
// major FSM turns the S1 half just filled into the S3 half not playing:
//  1. resample S1 into S2 at rate F1/F0 (S2 is BUF/rate samples long);
//  2. cross-sign search: the lag Km at which S2 best matches, in sign,
//     the last WIN samples of the S3 half now playing;
//  3. write S2[Km..] into the new S3 half;
//  4. second search, against the last WIN samples just written: Km2
//     (skipped if S3 is already full);
//  5. write S2[Km2..] after them, repeating from Km2 until S3 is full.
// The result has the new pitch but the original length, with splices
// chosen where the waveforms line up. All blocks share one bus to the
// three SRAMs (16-bit address: three active-low chip enables and 13
// address bits). When the I/O block needs the bus it raises `bus_req`; the
// major FSM passes this on as `pause` to the minor FSM at work, which
// stops at its next sample boundary and reports `paused`; the I/O block
// is then granted the bus and the minor FSM resumes when it is done.
// F0 and the hand coordinate arrive on the same serial links as for
// ps_subsystem and set the rate through ps_rate_converter at each swap.
// The steps, the shared bus and the pause/unpause protocol follow the
// original description; the bus timing and `overrun` (a swap before the
// processing finished, which should never happen: a buffer takes about
// 800,000 of the 1,000,000 clocks available) are this design's.
module solaf_subsystem
  import solaf_pkg::*;
#(
  parameter int unsigned B          = solaf_pkg::BUF,
  parameter int unsigned W_LEN      = solaf_pkg::WIN,
  parameter int unsigned LAGS       = solaf_pkg::MAX_LAG,
  parameter int unsigned SAMPLE_DIV = sr_pkg::SAMPLE_DIV
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          enable,
  input  logic          f0_sel_n,
  input  logic          f0_sclk,
  input  logic          f0_sdata,
  input  logic          co_sel_n,
  input  logic          co_sclk,
  input  logic          co_sdata,
  output logic          adc_cs_n,
  output logic          adc_wr_n,
  output logic          adc_rd_n,
  input  logic          adc_int_n,
  input  logic [SW-1:0] adc_data,
  output logic [SW-1:0] dac_data,
  output logic          dac_cs_n,
  output logic [15:0]   ram_addr,
  output logic          ram_we,
  output logic [SW-1:0] ram_wdata,
  input  logic [SW-1:0] ram_rdata,
  output logic [10:0]   rate,
  output logic [11:0]   len2,
  output logic [8:0]    km,
  output logic [8:0]    km2,
  output logic          swap,
  output logic          proc_done,
  output logic          overrun
);
  typedef enum logic [3:0] {IDLE, CALC, WAIT_RATE, RESAMPLE, WAIT_RS, CROSS_A, WAIT_CA, WRITE1,
                            WAIT_W1, CROSS_B, WAIT_CB, WRITE2, WAIT_W2} state_t;
  state_t state;

  // ---- shared inputs ----
  logic tick, f0_v, co_v, rc_done;
  logic [8:0] f0_r, f0_rx; logic [7:0] co_r, co_rx; logic [8:0] f1;
  sample_tick #(.DIV(SAMPLE_DIV)) u_tick (.clk, .rst, .tick);
  serial_rx #(.WIDTH(9)) u_f0rx (.clk, .rst, .sel_n(f0_sel_n), .sclk(f0_sclk), .sdata(f0_sdata),
                                 .data(f0_rx), .valid(f0_v));
  serial_rx #(.WIDTH(8)) u_corx (.clk, .rst, .sel_n(co_sel_n), .sclk(co_sclk), .sdata(co_sdata),
                                 .data(co_rx), .valid(co_v));
  ps_rate_converter u_rate (.clk, .rst, .calc(state == CALC), .f0(f0_r), .coord(co_r),
                            .done(rc_done), .rate, .f1);

  // ---- minor FSMs ----
  logic io_req, gnt, in_half, out_half; logic [11:0] io_cnt;
  logic [15:0] io_a, rs_a, cs_a, ow_a; logic io_we, rs_we, ow_we;
  logic [SW-1:0] io_d, rs_d, ow_d;
  logic rs_busy, rs_paused, rs_done, cs_busy, cs_paused, cs_done, ow_busy, ow_paused, ow_done, ow_full;
  logic [8:0] cs_km, cs_score; logic [11:0] ow_wend, rs_len;
  logic s1h, s3h; logic [12:0] ref_base; logic [11:0] w_pos;
  logic m_busy, m_paused;

  solaf_io #(.B(B)) u_io (.clk, .rst, .enable, .tick, .bus_req(io_req), .bus_gnt(gnt),
    .bus_addr_o(io_a), .bus_we(io_we), .bus_wdata(io_d), .bus_rdata(ram_rdata),
    .adc_cs_n, .adc_wr_n, .adc_rd_n, .adc_int_n, .adc_data, .dac_data, .dac_cs_n,
    .in_half, .out_half, .cnt(io_cnt), .swap);
  solaf_resampler #(.B(B)) u_rs (.clk, .rst, .start(state == RESAMPLE), .s1_half(s1h), .rate,
    .pause(io_req), .paused(rs_paused), .busy(rs_busy), .done(rs_done), .len(rs_len),
    .bus_addr_o(rs_a), .bus_we(rs_we), .bus_wdata(rs_d), .bus_rdata(ram_rdata));
  solaf_cross_sign #(.W_LEN(W_LEN), .LAGS(LAGS)) u_cs (.clk, .rst,
    .start(state == CROSS_A || state == CROSS_B), .ref_base, .len(len2),
    .pause(io_req), .paused(cs_paused), .busy(cs_busy), .done(cs_done), .km(cs_km), .score(cs_score),
    .bus_addr_o(cs_a), .bus_rdata(ram_rdata));
  solaf_output_writer #(.B(B)) u_ow (.clk, .rst, .start(state == WRITE1 || state == WRITE2),
    .repeat_mode(state == WRITE2), .km(state == WRITE2 ? km2 : km), .len(len2), .half(s3h),
    .w_start(w_pos), .pause(io_req), .paused(ow_paused), .busy(ow_busy), .done(ow_done),
    .w_end(ow_wend), .full(ow_full),
    .bus_addr_o(ow_a), .bus_we(ow_we), .bus_wdata(ow_d), .bus_rdata(ram_rdata));

  // ---- bus arbitration: the I/O block wins once the minor FSM has paused ----
  assign m_busy   = rs_busy || cs_busy || ow_busy;
  assign m_paused = rs_paused || cs_paused || ow_paused;
  // once granted, the I/O block keeps the bus until it drops its request,
  // even if the major FSM starts a minor FSM meanwhile (that one pauses
  // at its first boundary, before any bus access)
  logic io_own;
  assign gnt      = io_req && (io_own || !m_busy || m_paused);
  always_ff @(posedge clk) begin
    if (rst || !io_req) io_own <= 1'b0;
    else if (gnt)       io_own <= 1'b1;
  end
  always_comb begin
    if (gnt)          begin ram_addr = io_a; ram_we = io_we; ram_wdata = io_d; end
    else if (rs_busy) begin ram_addr = rs_a; ram_we = rs_we; ram_wdata = rs_d; end
    else if (cs_busy) begin ram_addr = cs_a; ram_we = 1'b0; ram_wdata = '0; end
    else              begin ram_addr = ow_a; ram_we = ow_we; ram_wdata = ow_d; end
  end

  // ---- major FSM ----
  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE; f0_r <= '0; co_r <= '0; s1h <= 1'b0; s3h <= 1'b0; ref_base <= '0; w_pos <= '0;
      len2 <= '0; km <= '0; km2 <= '0; proc_done <= 1'b0; overrun <= 1'b0;
    end else begin
      proc_done <= 1'b0;
      overrun   <= 1'b0;
      if (f0_v) f0_r <= f0_rx;
      if (co_v) co_r <= co_rx;
      if (swap && state != IDLE) overrun <= 1'b1;
      unique case (state)
        IDLE: if (swap) begin
          s1h <= ~in_half;                         // the S1 half just filled
          s3h <= ~out_half;                        // the S3 half not playing
          ref_base <= {out_half, 12'(B - W_LEN)};  // tail of the S3 half now playing
          state <= CALC;
        end
        CALC:      state <= WAIT_RATE;
        WAIT_RATE: if (rc_done) state <= RESAMPLE;
        RESAMPLE:  state <= WAIT_RS;
        WAIT_RS:   if (rs_done) begin len2 <= rs_len; state <= CROSS_A; end
        CROSS_A:   state <= WAIT_CA;
        WAIT_CA:   if (cs_done) begin km <= cs_km; w_pos <= '0; state <= WRITE1; end
        WRITE1:    state <= WAIT_W1;
        WAIT_W1: if (ow_done) begin
          w_pos <= ow_wend;
          ref_base <= (int'(ow_wend) >= int'(W_LEN)) ? {s3h, ow_wend - 12'(W_LEN)} : {s3h, 12'd0};
          if (ow_full) begin km2 <= '0; proc_done <= 1'b1; state <= IDLE; end
          else state <= CROSS_B;
        end
        CROSS_B:   state <= WAIT_CB;
        WAIT_CB:   if (cs_done) begin km2 <= cs_km; state <= WRITE2; end
        WRITE2:    state <= WAIT_W2;
        WAIT_W2:   if (ow_done) begin proc_done <= 1'b1; state <= IDLE; end
        default:   state <= IDLE;
      endcase
    end
  end
endmodule
