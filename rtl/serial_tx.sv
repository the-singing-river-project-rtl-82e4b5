// serial_tx: sends one WIDTH-bit word over a three-wire link (sel_n, sclk,
// sdata). Used between subsystems (8-bit hand coordinate, 9-bit F0) and for
// the MCP41010 digital potentiometer (16-bit command+data word).
// Protocol (this design's choice, SPI mode 0 compatible): sel_n goes low,
// data is presented MSB first while sclk is low and sampled by the receiver
// on the sclk rising edge; each sclk phase lasts HALF clocks; sel_n returns
// high one half period after the last rising edge. `start` with `data` is
// accepted when `busy` is low; `busy` stays high until sel_n is high again.
// A word keeps `busy` high for HALF*(2*WIDTH+1) clocks.
module serial_tx #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned HALF  = 5
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [WIDTH-1:0] data,
  output logic             busy,
  output logic             sel_n,
  output logic             sclk,
  output logic             sdata
);
  typedef enum logic [1:0] {IDLE, LOW, HIGH, DONE} state_t;
  state_t state;
  logic [WIDTH-1:0] sh;
  logic [$clog2(WIDTH+1)-1:0] nbits;
  logic [$clog2(HALF+1)-1:0] tcnt;
  logic phase_end;
  assign phase_end = (tcnt == $bits(tcnt)'(HALF - 1));
  assign busy  = (state != IDLE);
  assign sdata = sh[WIDTH-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      sel_n <= 1'b1;
      sclk  <= 1'b0;
      sh    <= '0;
      nbits <= '0;
      tcnt  <= '0;
    end else begin
      tcnt <= phase_end ? '0 : tcnt + 1'b1;
      unique case (state)
        IDLE: begin
          tcnt <= '0;
          if (start) begin
            sh    <= data;
            sel_n <= 1'b0;
            nbits <= '0;
            state <= LOW;
          end
        end
        LOW: if (phase_end) begin
          sclk  <= 1'b1;
          state <= HIGH;
        end
        HIGH: if (phase_end) begin
          sclk  <= 1'b0;
          nbits <= nbits + 1'b1;
          if (nbits == $bits(nbits)'(WIDTH - 1)) state <= DONE;
          else begin
            sh    <= {sh[WIDTH-2:0], 1'b0};
            state <= LOW;
          end
        end
        DONE: if (phase_end) begin
          sel_n <= 1'b1;
          state <= IDLE;
        end
      endcase
    end
  end
endmodule
