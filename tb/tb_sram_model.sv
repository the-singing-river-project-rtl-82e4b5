// tb_sram_model: writes random data to random addresses of an 8Kx8 RAM,
// keeps a reference copy, and reads everything back with the one-clock
// read latency.
module tb_sram_model;
  logic clk = 0, en = 0, we = 0;
  logic [12:0] addr; logic [7:0] wdata, rdata;
  logic [7:0] ref_mem [8192];
  bit written [8192];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  sram_model dut (.clk, .en, .we, .addr, .wdata, .rdata);
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int k = 0; k < 2000; k++) begin
      @(posedge clk);
      en <= 1; we <= 1; addr <= 13'($urandom); wdata <= 8'($urandom);
      @(posedge clk); #1;
      ref_mem[addr] = wdata; written[addr] = 1;
    end
    we <= 0;
    for (int a = 0; a < 8192; a++) begin
      @(posedge clk); en <= 1; we <= 0; addr <= 13'(a);
      @(posedge clk); en <= 0; #1;
      if (written[a]) begin checks++; if (rdata !== ref_mem[a]) failures++; end
    end
    // disabled port does not change the output
    @(posedge clk); en <= 0; addr <= 0; @(posedge clk); #1;
    checks++; if (rdata !== ref_mem[8191] && written[8191]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
