// ffe_adc_fsm: drives an ADC12441 (12 bits plus sign) for the fundamental
// frequency estimator. On `start` it selects the chip (cs_n low) and holds
// wr_n low for WR_CYCLES clocks (300 ns at 10 MHz, above the 200 ns the
// part needs) to start a conversion, then waits for the converter to pull
// int_n low. It then pulls rd_n low so the result stays on the data bus and
// raises `done` (level) until the major FSM signals `release` (the RAM write
// has finished), when rd_n and cs_n go high again and the FSM returns to
// idle. This sequence follows the original design. int_n is synchronized
// here. Assertion: rd_n is never low while wr_n is low.
module ffe_adc_fsm #(
  parameter int unsigned WR_CYCLES = 3
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  output logic done,
  input  logic release_bus,
  output logic busy,
  output logic cs_n,
  output logic wr_n,
  output logic rd_n,
  input  logic int_n
);
  typedef enum logic [1:0] {IDLE, WRITE, WAIT_INT, READ} state_t;
  state_t state;
  logic [$clog2(WR_CYCLES+1)-1:0] cnt;
  logic int_s, int_raw;
  sync2 u_int (.clk, .rst, .d(~int_n), .q(int_raw));   // int_raw high = conversion done
  assign int_s = int_raw;

  assign busy = (state != IDLE);
  assign done = (state == READ);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE; cnt <= '0; cs_n <= 1'b1; wr_n <= 1'b1; rd_n <= 1'b1;
    end else begin
      unique case (state)
        IDLE: if (start) begin
          cs_n <= 1'b0; wr_n <= 1'b0; cnt <= '0; state <= WRITE;
        end
        WRITE: begin
          cnt <= cnt + 1'b1;
          if (cnt == $bits(cnt)'(WR_CYCLES - 1)) begin
            wr_n  <= 1'b1;
            state <= WAIT_INT;
          end
        end
        WAIT_INT: if (int_s) begin
          rd_n  <= 1'b0;
          state <= READ;
        end
        READ: if (release_bus) begin
          rd_n <= 1'b1; cs_n <= 1'b1; state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(!rd_n && !wr_n));
endmodule
