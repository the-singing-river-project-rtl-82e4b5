// tb_ps_ad_writer: records samples through the AD670 model and checks for
// each one: exactly one SRAM write carrying the converter's value, the
// address request one clock before the write and the address turned off
// after it, the converter read only after STATUS has fallen, and `busy`
// low at the end.
module tb_ps_ad_writer;
  logic clk = 0, rst = 1, start = 0, busy, cs_n, rw_n, status, req, off, we;
  logic [7:0] data, wd; int nconv;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ps_ad_writer dut (.clk, .rst, .start, .busy, .ad_cs_n(cs_n), .ad_rw_n(rw_n), .ad_status(status),
    .ad_data(data), .addr_req(req), .addr_off(off), .ram_we(we), .ram_wdata(wd));
  ad670_model adc (.clk, .rst, .cs_n, .rw_n, .status, .data, .nconv);
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  int nwe, nreq, noff; logic req_d; bit seq_bad, busy_read;
  logic [7:0] wval;
  always @(negedge clk) begin
    if (rst) begin req_d <= 0; end
    else begin
      req_d <= req;
      if (req) nreq++;
      if (off) begin noff++; if (nwe != 1) seq_bad = 1; end
      if (we) begin nwe++; wval = wd; if (!req_d) seq_bad = 1; end
      if (!cs_n && rw_n && status) busy_read = 1;
    end
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int k = 0; k < 30; k++) begin
      nwe = 0; nreq = 0; noff = 0; seq_bad = 0; busy_read = 0;
      start = 1; @(posedge clk); #1 start = 0;
      while (busy) begin @(posedge clk); #1; end
      check(nwe == 1 && nreq == 1 && noff == 1 && !seq_bad, "request, write, off in order");
      check(wval == 8'(((nconv - 1) * 37 + 11) % 256), $sformatf("value %0d conv %0d", wval, nconv));
      check(!busy_read, "read after STATUS fell");
      repeat ($urandom_range(1, 5)) @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
