// tb_sync2: drives random bits into the synchronizer and checks the output
// is the input value sampled one clock edge earlier (two flops: a value
// set just after edge n appears just after edge n+2), and 0 in reset.
module tb_sync2;
  logic clk = 0, rst = 1, d = 1, q;
  int checks = 0, failures = 0;
  logic [1:0] hist;
  always #5 clk = ~clk;
  sync2 dut (.clk, .rst, .d, .q);
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk);
    #1 checks++; if (q !== 1'b0) failures++;
    rst = 0; hist = 0;
    for (int i = 0; i < 200; i++) begin
      @(posedge clk); #1;
      if (i >= 2) begin checks++; if (q !== hist[0]) begin failures++; $display("FAIL %0d", i); end end
      hist = {hist[0], d};
      d = 1'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
