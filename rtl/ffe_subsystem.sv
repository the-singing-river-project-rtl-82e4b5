// ffe_subsystem: fundamental frequency estimator. It works in two phases
// that never overlap. Capture: at each 40 kHz sample tick the major FSM
// starts an ADC12441 conversion, waits for the result, has it written to
// the next sample SRAM address and releases the converter; after N (1024)
// samples it switches to analysis. Analysis: the autocorrelation FSM finds
// the first autocorrelation peak, the divider turns the period into F0 =
// 40000/period Hz, and F0 (saturated to 9 bits) is sent to the pitch
// shifter over the serial link; then capture starts again. The input is
// assumed to change pitch slowly compared with one capture+analysis round.
// `f0_valid` pulses when a new `f0` is available. The phase structure and
// sub-FSM handshakes follow the original; pacing conversions by the sample
// tick and the serial framing are this design's choices.
module ffe_subsystem #(
  parameter int unsigned N          = 1024,
  parameter int unsigned SAMPLE_DIV = sr_pkg::SAMPLE_DIV,
  parameter int unsigned MIN_LAG    = 4,
  parameter int unsigned SER_HALF   = 5
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  // ADC12441
  output logic        adc_cs_n,
  output logic        adc_wr_n,
  output logic        adc_rd_n,
  input  logic        adc_int_n,
  input  logic [12:0] adc_data,
  // sample SRAM (6264)
  output logic        ram_en,
  output logic        ram_we,
  output logic [12:0] ram_addr,
  output logic [12:0] ram_wdata,
  input  logic [12:0] ram_rdata,
  // F0 link to the pitch shifter
  output logic        f0_sel_n,
  output logic        f0_sclk,
  output logic        f0_sdata,
  // status
  output logic        f0_valid,
  output logic [8:0]  f0,
  output logic [12:0] period,
  output logic        capturing
);
  typedef enum logic [2:0] {WAIT_TICK, START_AD, WAIT_AD, WRITE_RAM, WAIT_WRITE, CORR, WAIT_CORR, SEND}
    state_t;
  state_t state;
  logic tick, ad_start, ad_done, ad_release, ad_busy;
  logic wr_clear, wr_start, wr_done, wr_full, wr_we;
  logic [13:0] wr_count;
  logic [12:0] wr_addr, wr_data;
  logic ac_start, ac_busy, ac_done, ac_ram_en, div_start, div_done, div_busy, peak_found;
  logic [12:0] ac_addr;
  logic [15:0] freq;
  logic tx_busy;

  sample_tick #(.DIV(SAMPLE_DIV)) u_tick (.clk, .rst, .tick);

  ffe_adc_fsm u_adc (.clk, .rst, .start(ad_start), .done(ad_done), .release_bus(ad_release),
    .busy(ad_busy), .cs_n(adc_cs_n), .wr_n(adc_wr_n), .rd_n(adc_rd_n), .int_n(adc_int_n));

  ffe_ram_writer #(.N(N)) u_wr (.clk, .rst, .clear(wr_clear), .start(wr_start),
    .data(adc_data), .done(wr_done), .full(wr_full), .count(wr_count),
    .ram_we(wr_we), .ram_addr(wr_addr), .ram_wdata(wr_data));

  ffe_autocorr #(.N(N), .MIN_LAG(MIN_LAG)) u_ac (.clk, .rst, .start(ac_start), .busy(ac_busy),
    .done(ac_done), .ram_en(ac_ram_en), .ram_addr(ac_addr), .ram_rdata,
    .div_start, .period, .div_done, .peak_found);

  ffe_freq_divider #(.PW(13)) u_div (.clk, .rst, .start(div_start), .period, .busy(div_busy),
    .done(div_done), .freq);

  serial_tx #(.WIDTH(9), .HALF(SER_HALF)) u_tx (.clk, .rst, .start(state == SEND),
    .data(f0), .busy(tx_busy), .sel_n(f0_sel_n), .sclk(f0_sclk), .sdata(f0_sdata));

  // the SRAM belongs to the writer while capturing and to the correlator after
  assign ram_en    = wr_we || ac_ram_en;
  assign ram_we    = wr_we;
  assign ram_addr  = capturing ? wr_addr : ac_addr;
  assign ram_wdata = wr_data;

  assign capturing  = (state != CORR) && (state != WAIT_CORR);
  assign ad_start   = (state == START_AD);
  assign wr_start   = (state == WRITE_RAM);
  assign ad_release = (state == WAIT_WRITE) && wr_done;
  assign ac_start   = (state == CORR);
  assign wr_clear   = (state == WAIT_CORR) && ac_done;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= WAIT_TICK; f0 <= '0; f0_valid <= 1'b0;
    end else begin
      f0_valid <= 1'b0;
      unique case (state)
        WAIT_TICK: if (tick && enable) state <= START_AD;
        START_AD:  state <= WAIT_AD;
        WAIT_AD:   if (ad_done) state <= WRITE_RAM;
        WRITE_RAM: state <= WAIT_WRITE;
        WAIT_WRITE: if (wr_done) state <= wr_full ? CORR : WAIT_TICK;
        CORR:      state <= WAIT_CORR;
        WAIT_CORR: if (ac_done) begin
          f0       <= (freq > 16'd511) ? 9'd511 : freq[8:0];
          f0_valid <= 1'b1;
          state    <= SEND;
        end
        SEND:      state <= WAIT_TICK;              // serial_tx takes the word now
        default:   state <= WAIT_TICK;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(wr_we && ac_ram_en));
endmodule
