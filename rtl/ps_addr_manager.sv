// ps_addr_manager: owns the pitch shifter's SRAM address. It keeps three
// pointers: the A/D write address {buffer, count} in the buffer being
// filled, the "original" read address {~buffer, count} at the same position
// in the other (full) buffer, and the fractional resample pointer into that
// full buffer, 12 integer and FRAC (6) fraction bits, which advances by
// `rate` on every `increment` and wraps at BUFFERSIZE, so the buffer is
// looped over for as long as needed. The 16-bit output address is
// {3 active-low chip enables, 13 address bits}; only the first SRAM is used
// (enables 3'b011), 3'b111 means no SRAM selected. Requests set the address
// register on the next clock, priority A/D write, A/D off, resample read,
// original read, off, then increment. The pointer scheme follows the
// original; the wrap at BUFFERSIZE is this design's reading of it. After
// reset the pointers match buffer 0, count 0: A/D at 0, original at
// 0x1000, resample pointer at 0 in buffer 1.
module ps_addr_manager #(
  parameter int unsigned BUFFERSIZE = 4000,
  parameter int unsigned FRAC       = 6,
  parameter int unsigned RATE_W     = 11
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              increment,
  input  logic              buffer,
  input  logic [11:0]       count,
  input  logic [RATE_W-1:0] rate,
  input  logic              ad_req,
  input  logic              ad_off,
  input  logic              rs_req_r,
  input  logic              rs_req_o,
  input  logic              rs_off,
  output logic [15:0]       addr,
  output logic [11:0]       rs_index
);
  localparam logic [15:0] OFF = 16'hE000;
  localparam logic [2:0]  S1  = 3'b011;
  localparam int unsigned PW  = 12 + FRAC;
  localparam logic [PW:0] WRAP = (PW+1)'(BUFFERSIZE) << FRAC;

  logic [12:0]   ad_addr, orig_addr;
  logic [PW-1:0] rs_ptr;
  logic [PW:0]   rs_sum;

  assign rs_sum   = {1'b0, rs_ptr} + (PW+1)'(rate);
  assign rs_index = rs_ptr[PW-1:FRAC];

  always_ff @(posedge clk) begin
    if (rst) begin
      addr <= OFF; ad_addr <= '0; orig_addr <= 13'h1000; rs_ptr <= '0;
    end else if (ad_req)   addr <= {S1, ad_addr};
    else if (ad_off)       addr <= OFF;
    else if (rs_req_r)     addr <= {S1, ~buffer, rs_ptr[PW-1:FRAC]};
    else if (rs_req_o)     addr <= {S1, orig_addr};
    else if (rs_off)       addr <= OFF;
    else if (increment) begin
      ad_addr   <= {buffer, count};
      orig_addr <= {~buffer, count};
      rs_ptr    <= (rs_sum >= WRAP) ? PW'(rs_sum - WRAP) : rs_sum[PW-1:0];
    end
  end
endmodule
