// adc12441_model: behavioural model of the ADC12441 converter for
// testbenches. A rising edge of wr_n while cs_n is low starts a conversion:
// int_n goes high and falls CONV clocks later (13 us at 10 MHz by
// default). The converted value is the next sample of a test tone,
// round(AMP*(sin(2*pi*freq*k/40000) + h2*sin(2*2*pi*freq*k/40000))) for the
// k-th conversion, as a 13-bit two's complement number; it is driven on
// `data` while rd_n and cs_n are low (0 otherwise). Pulling rd_n low
// releases int_n. Each value is also kept in `hist` for reference models.
module adc12441_model #(
  parameter int CONV = 130
) (
  input  logic        clk,
  input  logic        cs_n,
  input  logic        wr_n,
  input  logic        rd_n,
  output logic        int_n,
  output logic [12:0] data,
  input  real         freq,
  input  real         amp,
  input  real         h2,
  output int          nconv
);
  int hist [4096];
  logic wr_d = 1;
  int cnt = -1;
  logic [12:0] val = 0;
  localparam real PI = 3.14159265358979;
  initial begin int_n = 1; nconv = 0; end
  assign data = (!rd_n && !cs_n) ? val : 13'd0;
  always @(posedge clk) begin
    wr_d <= wr_n;
    if (wr_n && !wr_d && !cs_n) begin
      real t; int v;
      t = 2.0 * PI * freq * real'(nconv) / 40000.0;
      v = int'(amp * ($sin(t) + h2 * $sin(2.0 * t)));
      val <= 13'(v);
      hist[nconv % 4096] = v;
      nconv <= nconv + 1;
      cnt <= CONV;
      int_n <= 1;
    end else if (cnt > 0) cnt <= cnt - 1;
    else if (cnt == 0) begin int_n <= 0; cnt <= -1; end
    if (!rd_n && !cs_n) int_n <= 1;
  end
endmodule
