// vis_column_fsm: processes one camera line. Because the camera is mounted
// rotated by 90 degrees, one video line is one image column, and it should
// contain at most one laser reflection. Starting on `start`, the FSM takes
// MP_PER_LINE*GROUP consecutive ADC samples (one per clock), has the
// sampler form metapixels and the memory access FSM fetch the previous
// frame's metapixel at the same place, and compares the two. The laser is
// switched on and off in alternate frames, so the reflection shows as a
// large difference; the absolute difference is used so both frame parities
// work (this design's choice). The largest difference along the line and its
// metapixel position are kept; the line counts as a hit only if that
// difference exceeds THRESH (the threshold value is this design's choice).
// Interface: `start` (while idle) with `line`; `busy` stays high for
// MP_PER_LINE*GROUP + 3 clocks, then `done` pulses with `hit` and `pos`
// valid until the next start.
module vis_column_fsm #(
  parameter int unsigned MP_PER_LINE = 100,
  parameter int unsigned GROUP       = 5,
  parameter int unsigned THRESH      = 32,
  parameter int unsigned LINE_W      = 9,
  parameter int unsigned IDX_W       = 7
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  input  logic [LINE_W-1:0]       line,
  input  logic [7:0]              ad_data,
  output logic                    busy,
  output logic                    done,
  output logic                    hit,
  output logic [IDX_W-1:0]        pos,
  // frame SRAM
  output logic                    ram_en,
  output logic                    ram_we,
  output logic [LINE_W+IDX_W-1:0] ram_addr,
  output logic [7:0]              ram_wdata,
  input  logic [7:0]              ram_rdata
);
  localparam int unsigned SAMPLES = MP_PER_LINE * GROUP;
  typedef enum logic [1:0] {IDLE, SAMPLE, DRAIN} state_t;
  state_t state;
  logic [$clog2(SAMPLES+1)-1:0] scnt;
  logic [1:0] dcnt;
  logic [LINE_W-1:0] cur_line;
  logic              mp_valid, pair_valid;
  logic [7:0]        mp, old_mp, cur_mp, diff, best;
  logic [IDX_W-1:0]  mp_idx, pair_idx;

  vis_sampler #(.GROUP(GROUP), .IDX_W(IDX_W)) u_sampler (
    .clk, .rst, .clear(start && state == IDLE), .pix_valid(state == SAMPLE),
    .pix(ad_data), .mp_valid, .mp, .mp_idx);

  vis_mem_access #(.LINE_W(LINE_W), .IDX_W(IDX_W)) u_mem (
    .clk, .rst, .in_valid(mp_valid), .new_mp(mp), .line(cur_line), .idx(mp_idx),
    .ram_en, .ram_we, .ram_addr, .ram_wdata, .ram_rdata,
    .out_valid(pair_valid), .old_mp, .cur_mp, .out_idx(pair_idx));

  assign diff = (cur_mp > old_mp) ? cur_mp - old_mp : old_mp - cur_mp;
  assign busy = (state != IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE; scnt <= '0; dcnt <= '0; cur_line <= '0;
      best <= '0; hit <= 1'b0; pos <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (pair_valid && diff > best) begin
        best <= diff;
        pos  <= pair_idx;
      end
      unique case (state)
        IDLE: if (start) begin
          cur_line <= line;
          scnt     <= '0;
          best     <= 8'(THRESH);   // a maximum must exceed the threshold
          hit      <= 1'b0;
          pos      <= '0;
          state    <= SAMPLE;
        end
        SAMPLE: begin
          scnt <= scnt + 1'b1;
          if (scnt == $bits(scnt)'(SAMPLES - 1)) begin
            dcnt  <= '0;
            state <= DRAIN;
          end
        end
        DRAIN: begin                  // last metapixel: sampler + read latency
          dcnt <= dcnt + 1'b1;
          if (dcnt == 2'd2) begin
            hit   <= (best > 8'(THRESH));
            done  <= 1'b1;
            state <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
