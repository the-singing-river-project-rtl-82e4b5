// tb_ffe_ram_writer: writes N=16 samples and checks each lands at the next
// address (write strobe one clock, address already stable the clock before), that
// `full` rises after N writes, and that `clear` restarts at address 0.
module tb_ffe_ram_writer;
  logic clk = 0, rst = 1, clear = 0, start = 0, done, full, we;
  logic [12:0] data, addr, wdata; logic [13:0] count;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ffe_ram_writer #(.N(16)) dut (.clk, .rst, .clear, .start, .data, .done, .full, .count,
    .ram_we(we), .ram_addr(addr), .ram_wdata(wdata));
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  logic [12:0] mem [16]; int nwe = 0; logic [12:0] addr_d;
  always @(negedge clk) begin
    addr_d <= addr;
    if (we) begin
      nwe++;
      if (addr != addr_d) begin failures++; $display("FAIL address not registered before strobe"); end
      if (addr < 16) mem[addr] = wdata;
    end
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [12:0] ref_d [16];
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int k = 0; k < 16; k++) begin
        check(!full, "not full yet");
        ref_d[k] = 13'($urandom); data = ref_d[k];
        nwe = 0;
        start = 1; @(posedge clk); #1 start = 0;
        while (!done) begin @(posedge clk); #1; end
        check(nwe == 1, "one write strobe");
      end
      @(posedge clk); #1;
      check(full && count == 16, "full after 16");
      for (int k = 0; k < 16; k++) check(mem[k] == ref_d[k], $sformatf("mem[%0d]", k));
      clear = 1; @(posedge clk); #1 clear = 0;
      check(count == 0 && !full, "clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
