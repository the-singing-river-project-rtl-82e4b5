// sram_model: single-port RAM standing in for the external asynchronous SRAM
// chips of the instrument (6264 8Kx8, HM62256 32Kx8). One access per clock:
// with `we` high `wdata` is written at `addr`; otherwise, with `en` high, the
// word at `addr` appears on `rdata` on the next clock. Contents are not
// initialised, like a real SRAM at power-up. The chips are asynchronous in
// the original; the synchronous one-cycle read is this design's model of
// them.
module sram_model #(
  parameter int unsigned AW = 13,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];
  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata <= mem[addr];
    end
  end
endmodule
