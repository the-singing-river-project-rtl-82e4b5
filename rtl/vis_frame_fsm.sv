// vis_frame_fsm: the vision subsystem's frame FSM. It processes one video
// frame: after `start` it waits for the vertical sync (vsync_n falling),
// skips BLANK_LINES lines (counted on hsync_n rising edges), and then starts
// the column FSM at the rising edge of hsync_n of each of the next LINES
// lines, the line counter being the image column number. For every line with
// a hit it adds the hit position to the volume sum and the line number to
// the pitch sum and counts the hit. After LINES lines (or an early vsync) it
// divides both sums by the hit count with two sequential dividers and
// scales the means to 8 bits: volume = mean_pos*5/2 (0..247 for 100
// metapixels) and pitch = mean_line*198/256 (0..254 for 330 lines); the
// scaling is this design's choice. `done` pulses when results are ready;
// `volume`, `pitch` and `nhits` then hold; with no hit the previous volume
// and pitch are kept and `found` is low.
// Sync inputs are assumed already synchronized (vision_subsystem does it).
module vis_frame_fsm #(
  parameter int unsigned LINES       = 330,
  parameter int unsigned BLANK_LINES = 10,
  parameter int unsigned MP_PER_LINE = 100,
  parameter int unsigned GROUP       = 5,
  parameter int unsigned THRESH      = 32
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  output logic        busy,
  output logic        done,
  input  logic        hsync_n,
  input  logic        vsync_n,
  input  logic [7:0]  ad_data,
  output logic        ram_en,
  output logic        ram_we,
  output logic [15:0] ram_addr,
  output logic [7:0]  ram_wdata,
  input  logic [7:0]  ram_rdata,
  output logic        found,
  output logic [8:0]  nhits,
  output logic [7:0]  volume,
  output logic [7:0]  pitch
);
  localparam int unsigned DW = 17;
  typedef enum logic [2:0] {IDLE, WAIT_VSYNC, SKIP, WAIT_LINE, WAIT_COL, DIVIDE, WAIT_DIV}
    state_t;
  state_t state;
  logic hs_d, vs_d, hs_rise, vs_fall;
  logic [8:0]  line, skip;
  logic [DW-1:0] x_total, z_total;
  logic col_start, col_busy, col_done, col_hit;
  logic [6:0] col_pos;
  logic div_start, vdiv_busy, pdiv_busy;
  logic [DW-1:0] vq, pq, vr_unused, pr_unused;
  logic [DW+1:0] vol_scaled;
  logic [DW+7:0] pit_scaled;

  assign hs_rise = hsync_n && !hs_d;
  assign vs_fall = !vsync_n && vs_d;
  assign busy    = (state != IDLE);
  assign col_start = (state == WAIT_LINE) && hs_rise;
  assign div_start = (state == DIVIDE);

  vis_column_fsm #(.MP_PER_LINE(MP_PER_LINE), .GROUP(GROUP), .THRESH(THRESH)) u_col (
    .clk, .rst, .start(col_start), .line, .ad_data, .busy(col_busy), .done(col_done),
    .hit(col_hit), .pos(col_pos), .ram_en, .ram_we, .ram_addr, .ram_wdata, .ram_rdata);

  seq_divider #(.W(DW)) u_vdiv (.clk, .rst, .start(div_start), .dividend(z_total),
    .divisor(DW'(nhits)), .busy(vdiv_busy), .quotient(vq), .remainder(vr_unused));
  seq_divider #(.W(DW)) u_pdiv (.clk, .rst, .start(div_start), .dividend(x_total),
    .divisor(DW'(nhits)), .busy(pdiv_busy), .quotient(pq), .remainder(pr_unused));

  assign vol_scaled = ({2'b0, vq} * 5) >> 1;
  assign pit_scaled = ({8'b0, pq} * 198) >> 8;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE; hs_d <= 1'b1; vs_d <= 1'b1; line <= '0; skip <= '0;
      x_total <= '0; z_total <= '0; nhits <= '0; done <= 1'b0; found <= 1'b0;
      volume <= '0; pitch <= '0;
    end else begin
      hs_d <= hsync_n;
      vs_d <= vsync_n;
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          x_total <= '0; z_total <= '0; nhits <= '0; line <= '0; skip <= '0;
          state <= WAIT_VSYNC;
        end
        WAIT_VSYNC: if (vs_fall) state <= (BLANK_LINES == 0) ? WAIT_LINE : SKIP;
        SKIP: if (hs_rise) begin
          skip <= skip + 1'b1;
          if (skip == 9'(BLANK_LINES - 1)) state <= WAIT_LINE;
        end
        WAIT_LINE: begin
          if (hs_rise) state <= WAIT_COL;
          else if (vs_fall) state <= DIVIDE;
        end
        WAIT_COL: if (col_done) begin
          if (col_hit) begin
            z_total <= z_total + DW'(col_pos);
            x_total <= x_total + DW'(line);
            nhits   <= nhits + 1'b1;
          end
          line  <= line + 1'b1;
          state <= (line == 9'(LINES - 1)) ? DIVIDE : WAIT_LINE;
        end
        DIVIDE: state <= WAIT_DIV;
        WAIT_DIV: if (!vdiv_busy && !pdiv_busy) begin
          if (nhits != 0) begin
            volume <= vol_scaled[7:0];
            pitch  <= pit_scaled[7:0];
          end
          found <= (nhits != 0);
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
