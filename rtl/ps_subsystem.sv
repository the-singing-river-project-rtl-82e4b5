// ps_subsystem: the simple pitch shifter. Audio is recorded into one half
// of a double buffer while the other, full half is played back at a
// different speed: the read pointer advances by rate = F1/F0 per output
// sample and loops around the buffer, so the output keeps the input's
// length but its pitch moves from F0 (measured by the estimator) to F1
// (chosen by the hand). When the recording half is full (BUFFERSIZE
// samples) the halves swap. Looping makes a click at each wrap; that is
// inherent to this simple method.
// Major FSM, once per 40 kHz tick: play one sample (resampler), then
// record one (A/D writer), then advance the count (swapping at BUFFERSIZE)
// and the pointers. F0 (9 bits) and the hand coordinate (8 bits) arrive on
// two serial links; the rate is recomputed at every tick. `mix` plays the
// original and the shifted sound together. The structure (major FSM,
// receivers, A/D writer, resampler, address manager, rate converter) is
// the original's; handshake details are this design's.
module ps_subsystem #(
  parameter int unsigned BUFFERSIZE = 4000,
  parameter int unsigned SAMPLE_DIV = sr_pkg::SAMPLE_DIV,
  parameter int unsigned AD_WAIT    = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic        mix,
  // serial links from the estimator (F0) and the vision subsystem (coordinate)
  input  logic        f0_sel_n,
  input  logic        f0_sclk,
  input  logic        f0_sdata,
  input  logic        co_sel_n,
  input  logic        co_sclk,
  input  logic        co_sdata,
  // AD670
  output logic        ad_cs_n,
  output logic        ad_rw_n,
  input  logic        ad_status,
  input  logic [7:0]  ad_data,
  // AD558
  output logic [7:0]  dac_data,
  output logic        dac_cs_n,
  // buffer SRAM: {3 active-low chip enables, 13-bit address}
  output logic [15:0] ram_addr,
  output logic        ram_we,
  output logic        ram_oe,
  output logic [7:0]  ram_wdata,
  input  logic [7:0]  ram_rdata,
  // status
  output logic        buffer,
  output logic [11:0] count,
  output logic [10:0] rate,
  output logic [8:0]  f0,
  output logic [7:0]  coord,
  output logic        swapped
);
  typedef enum logic [2:0] {IDLE, WAIT_SAMPLE, START_RS, WAIT_RS, START_AD, WAIT_AD, CHECK_COUNT, INC_ADDR}
    state_t;
  state_t state;
  logic tick, mix_s, rc_done;
  logic f0_valid, co_valid;
  logic rs_busy, rs_req_r, rs_req_o, rs_off;
  logic ad_busy, ad_req, ad_off;
  logic [8:0] f1;
  logic [7:0] rs_resampled, rs_original;
  logic [11:0] rs_index;

  sample_tick #(.DIV(SAMPLE_DIV)) u_tick (.clk, .rst, .tick);
  sync2 u_mix (.clk, .rst, .d(mix), .q(mix_s));

  serial_rx #(.WIDTH(9)) u_f0rx (.clk, .rst, .sel_n(f0_sel_n), .sclk(f0_sclk),
    .sdata(f0_sdata), .data(f0), .valid(f0_valid));
  serial_rx #(.WIDTH(8)) u_corx (.clk, .rst, .sel_n(co_sel_n), .sclk(co_sclk),
    .sdata(co_sdata), .data(coord), .valid(co_valid));

  ps_rate_converter u_rate (.clk, .rst, .calc(tick), .f0, .coord, .done(rc_done), .rate, .f1);

  ps_addr_manager #(.BUFFERSIZE(BUFFERSIZE)) u_am (.clk, .rst, .increment(state == INC_ADDR),
    .buffer, .count, .rate, .ad_req, .ad_off, .rs_req_r, .rs_req_o, .rs_off,
    .addr(ram_addr), .rs_index);

  ps_resampler u_rs (.clk, .rst, .start(state == START_RS), .mix(mix_s), .busy(rs_busy),
    .req_r(rs_req_r), .req_o(rs_req_o), .addr_off(rs_off), .ram_oe, .ram_rdata,
    .dac_data, .dac_cs_n, .resampled(rs_resampled), .original(rs_original));

  ps_ad_writer #(.MIN_WAIT(AD_WAIT)) u_ad (.clk, .rst, .start(state == START_AD), .busy(ad_busy),
    .ad_cs_n, .ad_rw_n, .ad_status, .ad_data, .addr_req(ad_req), .addr_off(ad_off),
    .ram_we, .ram_wdata);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE; buffer <= 1'b0; count <= '0; swapped <= 1'b0;
    end else begin
      swapped <= 1'b0;
      unique case (state)
        IDLE:        if (enable) state <= WAIT_SAMPLE; // pointers start at their reset values
        WAIT_SAMPLE: if (tick) state <= START_RS;
        START_RS:    state <= WAIT_RS;
        WAIT_RS:     if (!rs_busy) state <= START_AD;
        START_AD:    state <= WAIT_AD;
        WAIT_AD:     if (!ad_busy) state <= CHECK_COUNT;
        CHECK_COUNT: begin
          if (count == 12'(BUFFERSIZE - 1)) begin
            buffer  <= ~buffer;
            count   <= '0;
            swapped <= 1'b1;
          end else count <= count + 1'b1;
          state <= INC_ADDR;
        end
        INC_ADDR:    state <= WAIT_SAMPLE;
        default:     state <= IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(ram_we && ram_oe));
endmodule
