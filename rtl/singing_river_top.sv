// singing_river_top: the complete instrument. Three subsystems share one
// 10 MHz clock and talk over two serial links:
//  - vision_subsystem tracks the player's hand with a laser and a camera;
//    hand height sets the output volume through an MCP41010 potentiometer,
//    sideways position is sent as an 8-bit pitch coordinate;
//  - ffe_subsystem records 1024 audio samples and finds their fundamental
//    frequency F0 by autocorrelation, sent as a 9-bit number in Hz;
//  - ps_subsystem shifts the live audio from F0 to the pitch chosen by the
//    hand by resampling a double buffer.
// The external SRAM chips (two HM62256 for the frame store, a 6264 for the
// estimator's samples, a 6264 for the pitch shifter's buffers) are modelled
// here as on-chip arrays. Converters, camera syncs, laser and potentiometer
// stay outside as ports. The serial links are wired internally; their
// lines are also brought out for observation.
// Beside the simple pitch shifter sits solaf_subsystem, the time-scaling
// (SOLAF-style) shifter the original also designs: it listens to the same
// two links, has its own ADC12441, 13-bit DAC port and three 8K x 13
// SRAMs on a shared bus, and its status (S2 length, Km, Km2, swaps,
// overruns) is brought out. Which shifter is heard is left to the board.
module singing_river_top #(
  parameter int unsigned LINES       = 330,
  parameter int unsigned BLANK_LINES = 10,
  parameter int unsigned MP_PER_LINE = 100,
  parameter int unsigned THRESH      = 32,
  parameter int unsigned FFE_N       = 1024,
  parameter int unsigned BUFFERSIZE  = 4000,
  parameter int unsigned SAMPLE_DIV  = sr_pkg::SAMPLE_DIV
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic        mix,
  // camera (AD775 samples, GS4981 syncs) and laser
  input  logic [7:0]  cam_data,
  input  logic        hsync_n,
  input  logic        vsync_n,
  output logic        laser_on,
  // MCP41010 volume potentiometer
  output logic        pot_cs_n,
  output logic        pot_sck,
  output logic        pot_si,
  // ADC12441 of the estimator
  output logic        fadc_cs_n,
  output logic        fadc_wr_n,
  output logic        fadc_rd_n,
  input  logic        fadc_int_n,
  input  logic [12:0] fadc_data,
  // AD670 and AD558 of the pitch shifter
  output logic        ad_cs_n,
  output logic        ad_rw_n,
  input  logic        ad_status,
  input  logic [7:0]  ad_data,
  output logic [7:0]  dac_data,
  output logic        dac_cs_n,
  // serial links, observed
  output logic        pitch_sel_n,
  output logic        pitch_sclk,
  output logic        pitch_sdata,
  output logic        f0_sel_n,
  output logic        f0_sclk,
  output logic        f0_sdata,
  // status
  output logic        frame_done,
  output logic        hand_found,
  output logic [7:0]  volume,
  output logic [7:0]  hand_pitch,
  output logic        f0_valid,
  output logic [8:0]  f0_est,
  output logic [8:0]  ps_f0,
  output logic [7:0]  ps_coord,
  output logic [10:0] rate,
  output logic        buffer_swap,
  output logic [12:0] f0_period,
  output logic        ffe_capturing,
  // SOLAF-style shifter beside the simple one: own ADC12441, 13-bit DAC
  output logic        s_adc_cs_n,
  output logic        s_adc_wr_n,
  output logic        s_adc_rd_n,
  input  logic        s_adc_int_n,
  input  logic [12:0] s_adc_data,
  output logic [12:0] s_dac_data,
  output logic        s_dac_cs_n,
  output logic [10:0] s_rate,
  output logic [11:0] s_len2,
  output logic [8:0]  s_km,
  output logic [8:0]  s_km2,
  output logic        s_swap,
  output logic        s_proc_done,
  output logic        s_overrun
);
  // frame store
  logic        v_en, v_we;
  logic [15:0] v_addr;
  logic [7:0]  v_wdata, v_rdata;
  // estimator sample store
  logic        f_en, f_we;
  logic [12:0] f_addr, f_wdata, f_rdata;
  // pitch shifter buffers
  logic [15:0] p_addr;
  logic        p_we, p_oe, p_buffer;
  logic [7:0]  p_wdata, p_rdata;
  logic [11:0] p_count;

  vision_subsystem #(.LINES(LINES), .BLANK_LINES(BLANK_LINES), .MP_PER_LINE(MP_PER_LINE),
                     .THRESH(THRESH)) u_vision (
    .clk, .rst, .enable, .ad_data(cam_data), .hsync_n, .vsync_n, .laser_on,
    .ram_en(v_en), .ram_we(v_we), .ram_addr(v_addr), .ram_wdata(v_wdata), .ram_rdata(v_rdata),
    .pot_cs_n, .pot_sck, .pot_si, .pitch_sel_n, .pitch_sclk, .pitch_sdata,
    .frame_done, .found(hand_found), .volume, .pitch(hand_pitch));

  sram_model #(.AW(16), .DW(8)) u_frame_ram (.clk, .en(v_en), .we(v_we), .addr(v_addr),
    .wdata(v_wdata), .rdata(v_rdata));

  ffe_subsystem #(.N(FFE_N), .SAMPLE_DIV(SAMPLE_DIV)) u_ffe (
    .clk, .rst, .enable, .adc_cs_n(fadc_cs_n), .adc_wr_n(fadc_wr_n), .adc_rd_n(fadc_rd_n),
    .adc_int_n(fadc_int_n), .adc_data(fadc_data),
    .ram_en(f_en), .ram_we(f_we), .ram_addr(f_addr), .ram_wdata(f_wdata), .ram_rdata(f_rdata),
    .f0_sel_n, .f0_sclk, .f0_sdata, .f0_valid, .f0(f0_est), .period(f0_period),
    .capturing(ffe_capturing));

  sram_model #(.AW(13), .DW(13)) u_sample_ram (.clk, .en(f_en), .we(f_we), .addr(f_addr),
    .wdata(f_wdata), .rdata(f_rdata));

  ps_subsystem #(.BUFFERSIZE(BUFFERSIZE), .SAMPLE_DIV(SAMPLE_DIV)) u_ps (
    .clk, .rst, .enable, .mix,
    .f0_sel_n, .f0_sclk, .f0_sdata,
    .co_sel_n(pitch_sel_n), .co_sclk(pitch_sclk), .co_sdata(pitch_sdata),
    .ad_cs_n, .ad_rw_n, .ad_status, .ad_data, .dac_data, .dac_cs_n,
    .ram_addr(p_addr), .ram_we(p_we), .ram_oe(p_oe), .ram_wdata(p_wdata), .ram_rdata(p_rdata),
    .buffer(p_buffer), .count(p_count), .rate, .f0(ps_f0), .coord(ps_coord),
    .swapped(buffer_swap));

  // only the first of the three SRAM enables (bit 15, active low) is used
  sram_model #(.AW(13), .DW(8)) u_buffer_ram (.clk, .en(!p_addr[15] && (p_we || p_oe)),
    .we(p_we), .addr(p_addr[12:0]), .wdata(p_wdata), .rdata(p_rdata));

  // SOLAF-style shifter and its three 8K x 13 SRAMs (S1, S2, S3) on one bus;
  // address bits 15..13 are the active-low chip enables
  logic [15:0] s_addr;
  logic        s_we;
  logic [12:0] s_wdata, s_rdata, s_r1, s_r2, s_r3;
  logic [2:0]  s_last_sel;

  solaf_subsystem #(.B(BUFFERSIZE), .SAMPLE_DIV(SAMPLE_DIV)) u_solaf (
    .clk, .rst, .enable, .f0_sel_n, .f0_sclk, .f0_sdata,
    .co_sel_n(pitch_sel_n), .co_sclk(pitch_sclk), .co_sdata(pitch_sdata),
    .adc_cs_n(s_adc_cs_n), .adc_wr_n(s_adc_wr_n), .adc_rd_n(s_adc_rd_n), .adc_int_n(s_adc_int_n),
    .adc_data(s_adc_data), .dac_data(s_dac_data), .dac_cs_n(s_dac_cs_n),
    .ram_addr(s_addr), .ram_we(s_we), .ram_wdata(s_wdata), .ram_rdata(s_rdata),
    .rate(s_rate), .len2(s_len2), .km(s_km), .km2(s_km2), .swap(s_swap), .proc_done(s_proc_done),
    .overrun(s_overrun));

  sram_model #(.AW(13), .DW(13)) u_s1_ram (.clk, .en(!s_addr[13]), .we(s_we), .addr(s_addr[12:0]),
    .wdata(s_wdata), .rdata(s_r1));
  sram_model #(.AW(13), .DW(13)) u_s2_ram (.clk, .en(!s_addr[14]), .we(s_we), .addr(s_addr[12:0]),
    .wdata(s_wdata), .rdata(s_r2));
  sram_model #(.AW(13), .DW(13)) u_s3_ram (.clk, .en(!s_addr[15]), .we(s_we), .addr(s_addr[12:0]),
    .wdata(s_wdata), .rdata(s_r3));
  // the chip read in the previous clock drives the shared data bus
  always_ff @(posedge clk) begin
    if (rst) s_last_sel <= 3'b111;
    else     s_last_sel <= s_addr[15:13];
  end
  always_comb begin
    unique case (s_last_sel)
      3'b110:  s_rdata = s_r1;
      3'b101:  s_rdata = s_r2;
      default: s_rdata = s_r3;
    endcase
  end
endmodule
