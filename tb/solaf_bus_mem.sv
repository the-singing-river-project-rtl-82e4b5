// solaf_bus_mem: testbench model of the SOLAF shifter's shared bus: three
// 8K x 13 SRAMs (S1, S2, S3) selected by the active-low enables in address
// bits 15..13, each with one clock of read latency; the chip read last
// drives `rdata`. The arrays are reached hierarchically as
// <inst>.s1.mem, .s2.mem, .s3.mem.
module solaf_bus_mem (
  input  logic        clk,
  input  logic [15:0] addr,
  input  logic        we,
  input  logic [12:0] wdata,
  output logic [12:0] rdata
);
  logic [12:0] r1, r2, r3;
  logic [2:0] last_sel = 3'b111;
  sram_model #(.AW(13), .DW(13)) s1 (.clk, .en(!addr[13]), .we, .addr(addr[12:0]), .wdata, .rdata(r1));
  sram_model #(.AW(13), .DW(13)) s2 (.clk, .en(!addr[14]), .we, .addr(addr[12:0]), .wdata, .rdata(r2));
  sram_model #(.AW(13), .DW(13)) s3 (.clk, .en(!addr[15]), .we, .addr(addr[12:0]), .wdata, .rdata(r3));
  always @(posedge clk) last_sel <= addr[15:13];
  assign rdata = !last_sel[0] ? r1 : !last_sel[1] ? r2 : r3;
endmodule
