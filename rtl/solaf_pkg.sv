// solaf_pkg: constants shared by the blocks of the SOLAF-style pitch
// shifter. Its three sample SRAMs (S1 input, S2 resampled, S3 output) sit
// on one shared bus with a 16-bit address: three active-low chip enables
// {S3, S2, S1} above 13 address bits, so only one chip is selected at a
// time. S1 and S3 are double buffers, {half, index[11:0]}. BUF, WIN and
// MAX_LAG are the buffer length, the overlap window and the lag search
// range given for the design (4000, 300, at most 400 lags); the enable
// order is this design's choice.
package solaf_pkg;
  localparam logic [2:0] SEL_S1   = 3'b110;
  localparam logic [2:0] SEL_S2   = 3'b101;
  localparam logic [2:0] SEL_S3   = 3'b011;
  localparam logic [2:0] SEL_NONE = 3'b111;
  localparam int unsigned BUF     = 4000;
  localparam int unsigned WIN     = 300;
  localparam int unsigned MAX_LAG = 400;
  localparam int unsigned SW      = 13;     // sample width (12 bits plus sign)

  // full bus address from a chip select and a 13-bit chip address
  function automatic logic [15:0] bus_addr(logic [2:0] sel_n, logic [12:0] a);
    return {sel_n, a};
  endfunction
endpackage
