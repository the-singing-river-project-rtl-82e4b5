// ps_ad_writer: records one audio sample for the pitch shifter. On `start`
// it starts an AD670 conversion (cs_n and rw_n low for one clock), waits
// MIN_WAIT clocks for the converter to raise STATUS and then for STATUS to
// fall, reads the 8-bit result (cs_n low, rw_n high for one clock, latched
// at the end of it), asks the address manager for the write address, writes the byte
// to the SRAM (`ram_we` for one clock) and turns the address off. `busy` is
// low again when it is finished. The A/D-then-write sequence follows the
// original; the AD670 pin timing is this design's reading of the part.
// STATUS is synchronized here.
module ps_ad_writer #(
  parameter int unsigned MIN_WAIT = 8
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  output logic       busy,
  // AD670
  output logic       ad_cs_n,
  output logic       ad_rw_n,
  input  logic       ad_status,
  input  logic [7:0] ad_data,
  // address manager and SRAM
  output logic       addr_req,
  output logic       addr_off,
  output logic       ram_we,
  output logic [7:0] ram_wdata
);
  typedef enum logic [2:0] {IDLE, CONVERT, WAIT_MIN, WAIT_STATUS, READ, ADDR, WRITE, OFF}
    state_t;
  state_t state;
  logic status_s;
  logic [$clog2(MIN_WAIT+1)-1:0] cnt;

  sync2 u_st (.clk, .rst, .d(ad_status), .q(status_s));

  assign busy     = (state != IDLE);
  assign ad_cs_n  = !((state == CONVERT) || (state == READ));
  assign ad_rw_n  = (state != CONVERT);
  assign addr_req = (state == ADDR);
  assign ram_we   = (state == WRITE);
  assign addr_off = (state == OFF);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE; cnt <= '0; ram_wdata <= '0;
    end else begin
      unique case (state)
        IDLE:     if (start) state <= CONVERT;
        CONVERT:  begin cnt <= '0; state <= WAIT_MIN; end
        WAIT_MIN: begin
          cnt <= cnt + 1'b1;
          if (cnt == $bits(cnt)'(MIN_WAIT - 1)) state <= WAIT_STATUS;
        end
        WAIT_STATUS: if (!status_s) state <= READ;
        READ:     begin ram_wdata <= ad_data; state <= ADDR; end  // bus driven while cs_n low
        ADDR:     state <= WRITE;
        WRITE:    state <= OFF;
        OFF:      state <= IDLE;
        default:  state <= IDLE;
      endcase
    end
  end
endmodule
