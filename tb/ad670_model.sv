// ad670_model: behavioural model of the AD670 8-bit converter for
// testbenches. cs_n and rw_n both low at a clock edge start a conversion:
// STATUS goes high two clocks later and stays high for CONV clocks, then
// the k-th result, value(k) = (k*37 + 11) mod 256, is ready. While cs_n is
// low with rw_n high the result is driven on `data` (0 otherwise).
// `nconv` counts started conversions; nothing happens while rst is high.
module ad670_model #(
  parameter int CONV = 40
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       cs_n,
  input  logic       rw_n,
  output logic       status,
  output logic [7:0] data,
  output int         nconv
);
  int cnt = -1;
  logic [7:0] val = 0;
  initial begin status = 0; nconv = 0; end
  assign data = (!cs_n && rw_n) ? val : 8'd0;
  always @(posedge clk) begin
    if (rst) begin cnt <= -1; status <= 0; end
    else if (!cs_n && !rw_n) begin
      cnt <= CONV + 2; nconv <= nconv + 1;
      val <= 8'((nconv * 37 + 11) % 256);
    end else if (cnt > 0) begin
      cnt <= cnt - 1;
      status <= (cnt <= CONV);
    end else if (cnt == 0) begin status <= 0; cnt <= -1; end
  end
endmodule
