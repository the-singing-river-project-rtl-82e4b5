// tb_seq_divider: random 20-bit divisions compared with the / and %
// operators, divide by zero, and the W-clock busy time.
module tb_seq_divider;
  logic clk = 0, rst = 1, start = 0, busy;
  logic [19:0] dd, dv, q, r;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  seq_divider #(.W(20)) dut (.clk, .rst, .start, .dividend(dd), .divisor(dv), .busy,
    .quotient(q), .remainder(r));
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int cyc;
    repeat (3) @(posedge clk); rst <= 0;
    for (int k = 0; k < 300; k++) begin
      @(posedge clk);
      dd <= 20'($urandom);
      dv <= (k % 3 == 0) ? 20'($urandom_range(1, 255)) : (k == 7 ? 20'd0 : 20'($urandom));
      start <= 1;
      @(posedge clk); start <= 0; cyc = 0; #1;
      while (busy) begin @(posedge clk); #1; cyc++; end
      check(cyc == 20, $sformatf("busy %0d clocks", cyc));
      if (dv == 0) check(q == '1, "divide by zero gives all ones");
      else check(q == dd / dv && r == dd % dv,
                 $sformatf("%0d / %0d = %0d r %0d", dd, dv, q, r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
