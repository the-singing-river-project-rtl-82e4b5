// vis_mem_access: the vision subsystem's memory access FSM. For each new
// metapixel it reads the previous frame's metapixel stored at the same place
// and then overwrites that location with the new value, so the frame SRAM
// always holds the last frame. Address = {line, metapixel index} (this
// design's layout: 9 + 7 bits = 64K locations, the two 32Kx8 chips).
// Timing: `in_valid` cycle issues the read; the next cycle the old value is
// back from the SRAM, the write is issued and `out_valid` pulses with the
// old and new metapixel and the index. Needs at least 2 clocks between
// inputs (the sampler gives one per 5).
module vis_mem_access #(
  parameter int unsigned LINE_W = 9,
  parameter int unsigned IDX_W  = 7
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic [7:0]              new_mp,
  input  logic [LINE_W-1:0]       line,
  input  logic [IDX_W-1:0]        idx,
  // frame SRAM
  output logic                    ram_en,
  output logic                    ram_we,
  output logic [LINE_W+IDX_W-1:0] ram_addr,
  output logic [7:0]              ram_wdata,
  input  logic [7:0]              ram_rdata,
  // to the column FSM
  output logic                    out_valid,
  output logic [7:0]              old_mp,
  output logic [7:0]              cur_mp,
  output logic [IDX_W-1:0]        out_idx
);
  logic                    rd_pending;
  logic [7:0]              hold_mp;
  logic [IDX_W-1:0]        hold_idx;
  logic [LINE_W+IDX_W-1:0] hold_addr;

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_pending <= 1'b0; hold_mp <= '0; hold_idx <= '0; hold_addr <= '0;
    end else begin
      rd_pending <= in_valid;
      if (in_valid) begin
        hold_mp   <= new_mp;
        hold_idx  <= idx;
        hold_addr <= {line, idx};
      end
    end
  end

  always_comb begin
    ram_en    = in_valid || rd_pending;
    ram_we    = rd_pending;
    ram_addr  = rd_pending ? hold_addr : {line, idx};
    ram_wdata = hold_mp;
    out_valid = rd_pending;
    old_mp    = ram_rdata;
    cur_mp    = hold_mp;
    out_idx   = hold_idx;
  end

  assert property (@(posedge clk) disable iff (rst) !(in_valid && rd_pending));
endmodule
