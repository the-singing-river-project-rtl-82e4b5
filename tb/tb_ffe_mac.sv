// tb_ffe_mac: random signed 13-bit operands, including the most negative
// value, multiplied and accumulated; the accumulator is compared with a
// signed reference sum, and clear is checked.
module tb_ffe_mac;
  logic clk = 0, rst = 1, clear = 0, sm = 0, sa = 0;
  logic [12:0] a, b; logic signed [35:0] acc;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ffe_mac dut (.clk, .rst, .clear, .start_mult(sm), .start_accum(sa), .a, .b, .acc);
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    longint sum;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int blk = 0; blk < 5; blk++) begin
      clear = 1; @(posedge clk); #1 clear = 0; sum = 0;
      checks++; if (acc != 0) failures++;
      for (int k = 0; k < 1024; k++) begin
        a = (k % 97 == 0) ? 13'h1000 : 13'($urandom);
        b = (blk == 4) ? 13'h1000 : 13'($urandom);
        sum += longint'($signed(a)) * longint'($signed(b));
        sm = 1; @(posedge clk); #1 sm = 0; sa = 1; @(posedge clk); #1 sa = 0;
        checks++;
        if (acc != 36'(sum)) begin failures++; $display("FAIL k%0d acc %0d exp %0d", k, acc, sum); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
