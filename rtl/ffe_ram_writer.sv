// ffe_ram_writer: writes one converted sample into the sample SRAM (a 6264
// in the original). An internal counter gives the address; `clear` resets
// it to 0. On `start` the address and data are registered, they settle for
// one clock, then the write strobe `ram_we` is held for one clock (100 ns);
// `done` pulses the clock after the strobe and the counter advances. `count` is the
// number of samples written; `full` is high once N samples are stored.
// The register-then-strobe sequence follows the original; one SRAM per
// 13-bit sample word is this design's simplification.
module ffe_ram_writer #(
  parameter int unsigned N  = 1024,
  parameter int unsigned AW = 13,
  parameter int unsigned DW = 13
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,
  input  logic          start,
  input  logic [DW-1:0] data,
  output logic          done,
  output logic          full,
  output logic [AW:0]   count,
  output logic          ram_we,
  output logic [AW-1:0] ram_addr,
  output logic [DW-1:0] ram_wdata
);
  typedef enum logic [1:0] {IDLE, SET_ADDR, STROBE} state_t;
  state_t state;

  assign full   = (count >= (AW+1)'(N));
  assign ram_we = (state == STROBE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE; count <= '0; ram_addr <= '0; ram_wdata <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (clear) count <= '0;
      unique case (state)
        IDLE: if (start) begin
          ram_wdata <= data;
          ram_addr  <= count[AW-1:0];
          state     <= SET_ADDR;
        end
        SET_ADDR: state <= STROBE;            // address settles for a clock
        STROBE: begin
          count <= count + 1'b1;
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
