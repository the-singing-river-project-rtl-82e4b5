// solaf_io: the I/O block of the SOLAF-style shifter. On each 40 kHz
// `tick` it starts an ADC12441 conversion through ffe_adc_fsm; the
// converter latches its result internally, so the shared bus is not
// needed until the conversion is done. Then it raises `bus_req` and waits
// for `bus_gnt` from the major FSM (which first pauses whatever minor FSM
// holds the bus), writes the sample to S1[{in_half, cnt}], releases the
// converter, reads S3[{out_half, cnt}] and latches it into the DAC
// (dac_cs_n low for one clock). So each tick records one sample into one
// double buffer and plays one from the other. After BUF samples both
// halves swap and `swap` pulses: the major FSM then processes the S1 half
// just filled into the S3 half that is not playing. This follows the
// original description; the order inside the bus slot and the 13-bit DAC
// word are this design's choices. The bus is held for 5 clocks per tick.
module solaf_io
  import solaf_pkg::*;
#(
  parameter int unsigned B = solaf_pkg::BUF
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          enable,
  input  logic          tick,
  output logic          bus_req,
  input  logic          bus_gnt,
  output logic [15:0]   bus_addr_o,
  output logic          bus_we,
  output logic [SW-1:0] bus_wdata,
  input  logic [SW-1:0] bus_rdata,
  output logic          adc_cs_n,
  output logic          adc_wr_n,
  output logic          adc_rd_n,
  input  logic          adc_int_n,
  input  logic [SW-1:0] adc_data,
  output logic [SW-1:0] dac_data,
  output logic          dac_cs_n,
  output logic          in_half,
  output logic          out_half,
  output logic [11:0]   cnt,
  output logic          swap
);
  typedef enum logic [2:0] {IDLE, CONVERT, REQ, WR_S1, RD_S3, LATCH_S3, DAC} state_t;
  state_t state;
  logic ad_done, ad_busy;
  ffe_adc_fsm u_adc (.clk, .rst, .start(state == IDLE && tick && enable), .done(ad_done),
    .release_bus(state == RD_S3), .busy(ad_busy), .cs_n(adc_cs_n), .wr_n(adc_wr_n),
    .rd_n(adc_rd_n), .int_n(adc_int_n));

  assign bus_req   = (state == REQ) || (state == WR_S1) || (state == RD_S3) ||
                     (state == LATCH_S3) || (state == DAC);
  assign bus_wdata = adc_data;
  assign dac_cs_n  = (state != DAC);

  always_comb begin
    bus_addr_o = bus_addr(SEL_NONE, '0);
    bus_we     = 1'b0;
    if (state == WR_S1) begin bus_addr_o = bus_addr(SEL_S1, {in_half, cnt}); bus_we = 1'b1; end
    if (state == RD_S3) bus_addr_o = bus_addr(SEL_S3, {out_half, cnt});
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE; in_half <= 1'b0; out_half <= 1'b0; cnt <= '0; swap <= 1'b0; dac_data <= '0;
    end else begin
      swap <= 1'b0;
      unique case (state)
        IDLE:     if (tick && enable) state <= CONVERT;
        CONVERT:  if (ad_done) state <= REQ;
        REQ:      if (bus_gnt) state <= WR_S1;
        WR_S1:    state <= RD_S3;
        RD_S3:    state <= LATCH_S3;
        LATCH_S3: begin dac_data <= bus_rdata; state <= DAC; end
        DAC: begin
          if (cnt == 12'(B - 1)) begin
            cnt <= '0; in_half <= ~in_half; out_half <= ~out_half; swap <= 1'b1;
          end else cnt <= cnt + 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
