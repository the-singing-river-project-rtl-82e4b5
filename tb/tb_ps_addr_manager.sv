// tb_ps_addr_manager: steps the manager through many samples with random
// rates and buffer swaps, issuing the A/D, resample and original requests,
// and checks each resulting address against a reference model of the
// three pointers (resample pointer in 1/64 steps, wrapping at the buffer
// size), the chip-enable bits, and the request priority.
module tb_ps_addr_manager;
  localparam int B = 100;
  logic clk = 0, rst = 1, inc = 0, buffer = 0, adr = 0, ado = 0, rr = 0, ro = 0, roff = 0;
  logic [11:0] count = 0, idx; logic [10:0] rate = 64; logic [15:0] addr;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ps_addr_manager #(.BUFFERSIZE(B)) dut (.clk, .rst, .increment(inc), .buffer, .count, .rate,
    .ad_req(adr), .ad_off(ado), .rs_req_r(rr), .rs_req_o(ro), .rs_off(roff), .addr, .rs_index(idx));
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic pulse(ref logic s);
    s = 1; @(posedge clk); #1 s = 0;
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int ptr = 0, wb = 0, c = 0;       // reference: pointer (1/64), write buffer, count
    repeat (3) @(posedge clk); #1 rst = 0;
    check(addr == 16'hE000, "off after reset");
    for (int k = 0; k < 600; k++) begin
      pulse(rr);
      check(addr == {3'b011, 1'(1 - wb), 12'(ptr / 64)}, $sformatf("resample addr %h ptr %0d", addr, ptr));
      pulse(ro);
      check(addr == {3'b011, 1'(1 - wb), 12'(c)}, $sformatf("original addr %h", addr));
      pulse(roff);
      check(addr == 16'hE000, "resampler off");
      pulse(adr);
      check(addr == {3'b011, 1'(wb), 12'(c)}, $sformatf("ad addr %h", addr));
      adr = 1; rr = 1; @(posedge clk); #1 adr = 0; rr = 0;
      check(addr == {3'b011, 1'(wb), 12'(c)}, "A/D request has priority");
      pulse(ado);
      check(addr == 16'hE000, "ad off");
      // advance one sample
      if (c == B - 1) begin c = 0; wb = 1 - wb; end else c++;
      buffer = 1'(wb); count = 12'(c);
      ptr = (ptr + int'(rate)) % (B * 64);
      pulse(inc);
      check(int'(idx) == ptr / 64, "rs_index");
      rate = (k % 50 == 0) ? 11'($urandom_range(16, 400)) : rate;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
