// tb_ffe_freq_divider: F0 = floor(40000/period) for periods 1..1023 (all
// of them) and the clock count floor(40000/period)+2 from start to done.
module tb_ffe_freq_divider;
  logic clk = 0, rst = 1, start = 0, busy, done;
  logic [9:0] period; logic [15:0] freq;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ffe_freq_divider dut (.clk, .rst, .start, .period, .busy, .done, .freq);
  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int cyc;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int p = 1; p < 1024; p++) begin
      period = 10'(p); start = 1; @(posedge clk); #1 start = 0; cyc = 1;
      while (!done) begin @(posedge clk); #1; cyc++; end
      checks++;
      if (freq != 16'(40000 / p) || cyc != 40000 / p + 2) begin
        failures++; $display("FAIL p=%0d f=%0d cyc=%0d", p, freq, cyc);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
