// vision_subsystem: the hand tracker. A laser fans a sheet of light upward
// and a camera beside it, rotated 90 degrees, sees the reflection off the
// player's hand. Each video line is one image column; the height of the
// hand shifts the reflection along the line, sideways motion shifts it
// across lines. The laser is switched on and off in alternate frames and
// each frame is compared with the stored previous one, so ambient light
// cancels out and only the laser remains.
// This is the top-level FSM: on `enable` it repeatedly toggles `laser_on`,
// runs the frame FSM over one frame and, from the second frame on (when the
// SRAM holds a previous frame) and if a reflection was found, sends the
// volume to an MCP41010 digital potentiometer (16-bit word: command 0x11
// "write pot 0", then the volume byte; the command encoding is the part's,
// not the original text's) and the 8-bit pitch coordinate to the pitch
// shifter over the serial link. The camera syncs are synchronized here.
// `frame_done` pulses after each frame; `volume`/`pitch` hold the last result.
module vision_subsystem #(
  parameter int unsigned LINES       = 330,
  parameter int unsigned BLANK_LINES = 10,
  parameter int unsigned MP_PER_LINE = 100,
  parameter int unsigned GROUP       = 5,
  parameter int unsigned THRESH      = 32,
  parameter int unsigned SER_HALF    = 5
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  // camera: AD775 samples and GS4981 syncs (active low)
  input  logic [7:0]  ad_data,
  input  logic        hsync_n,
  input  logic        vsync_n,
  output logic        laser_on,
  // frame SRAM (two HM62256)
  output logic        ram_en,
  output logic        ram_we,
  output logic [15:0] ram_addr,
  output logic [7:0]  ram_wdata,
  input  logic [7:0]  ram_rdata,
  // MCP41010 potentiometer
  output logic        pot_cs_n,
  output logic        pot_sck,
  output logic        pot_si,
  // pitch coordinate link to the pitch shifter
  output logic        pitch_sel_n,
  output logic        pitch_sclk,
  output logic        pitch_sdata,
  // status
  output logic        frame_done,
  output logic        found,
  output logic [7:0]  volume,
  output logic [7:0]  pitch
);
  typedef enum logic [1:0] {IDLE, FRAME, SEND, WAIT_SEND} state_t;
  state_t state;
  logic hs_s, vs_s, hs_raw, vs_raw;
  logic fr_start, fr_busy, fr_done, primed;
  logic [8:0] nhits;
  logic send, pot_busy, pit_busy;

  // syncs are active low: synchronize the inverted level so reset gives "no sync"
  sync2 u_hs (.clk, .rst, .d(~hsync_n), .q(hs_raw));
  sync2 u_vs (.clk, .rst, .d(~vsync_n), .q(vs_raw));
  assign hs_s = ~hs_raw;
  assign vs_s = ~vs_raw;

  vis_frame_fsm #(.LINES(LINES), .BLANK_LINES(BLANK_LINES), .MP_PER_LINE(MP_PER_LINE),
                  .GROUP(GROUP), .THRESH(THRESH)) u_frame (
    .clk, .rst, .start(fr_start), .busy(fr_busy), .done(fr_done),
    .hsync_n(hs_s), .vsync_n(vs_s), .ad_data,
    .ram_en, .ram_we, .ram_addr, .ram_wdata, .ram_rdata,
    .found, .nhits, .volume, .pitch);

  serial_tx #(.WIDTH(16), .HALF(SER_HALF)) u_pot (.clk, .rst, .start(send),
    .data({8'h11, volume}), .busy(pot_busy), .sel_n(pot_cs_n), .sclk(pot_sck), .sdata(pot_si));
  serial_tx #(.WIDTH(8), .HALF(SER_HALF)) u_pit (.clk, .rst, .start(send),
    .data(pitch), .busy(pit_busy), .sel_n(pitch_sel_n), .sclk(pitch_sclk), .sdata(pitch_sdata));

  assign fr_start = (state == IDLE) && enable;
  assign send     = (state == SEND);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE; laser_on <= 1'b0; primed <= 1'b0; frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      unique case (state)
        IDLE: if (enable) begin
          laser_on <= ~laser_on;     // alternate laser on / off per frame
          state    <= FRAME;
        end
        FRAME: if (fr_done) begin
          frame_done <= 1'b1;
          primed     <= 1'b1;
          state      <= (primed && found) ? SEND : IDLE;
        end
        SEND: state <= WAIT_SEND;
        WAIT_SEND: if (!pot_busy && !pit_busy) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
