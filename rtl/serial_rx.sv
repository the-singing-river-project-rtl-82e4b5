// serial_rx: receiver for the serial_tx link (sel_n, sclk, sdata). The three
// lines are synchronized (two flops each), sdata is shifted in MSB first on
// every synchronized sclk rising edge while sel_n is low, and when sel_n
// rises after exactly WIDTH bits the word is presented on `data` with a
// one-clock `valid` pulse. A frame with another bit count is dropped.
// `data` holds the last good word (0 after reset). The receiver follows the
// original role of the F0/coordinate receivers; the framing is this
// design's choice. Needs sclk phases of at least 2 clocks.
module serial_rx #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             sel_n,
  input  logic             sclk,
  input  logic             sdata,
  output logic [WIDTH-1:0] data,
  output logic             valid
);
  logic sel_s, sclk_s, sdata_s, sclk_d, sel_d;
  logic [WIDTH-1:0] sh;
  logic [$clog2(WIDTH+2)-1:0] nbits;

  sync2 u_sel  (.clk, .rst, .d(~sel_n), .q(sel_s));   // sel_s high = frame active
  sync2 u_sclk (.clk, .rst, .d(sclk),   .q(sclk_s));
  sync2 u_sda  (.clk, .rst, .d(sdata),  .q(sdata_s));

  always_ff @(posedge clk) begin
    if (rst) begin
      sclk_d <= 1'b0;
      sel_d  <= 1'b0;
      sh     <= '0;
      nbits  <= '0;
      data   <= '0;
      valid  <= 1'b0;
    end else begin
      sclk_d <= sclk_s;
      sel_d  <= sel_s;
      valid  <= 1'b0;
      if (sel_s && !sel_d) nbits <= '0;
      else if (sel_s && sclk_s && !sclk_d) begin
        sh <= {sh[WIDTH-2:0], sdata_s};
        if (nbits != $bits(nbits)'(WIDTH + 1)) nbits <= nbits + 1'b1;
      end
      if (!sel_s && sel_d && nbits == $bits(nbits)'(WIDTH)) begin
        data  <= sh;
        valid <= 1'b1;
      end
    end
  end
endmodule
