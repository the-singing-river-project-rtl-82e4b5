// tb_sample_tick: checks that the 40 kHz tick comes every 250 clocks
// (10 MHz / 40 kHz), is one clock wide, and that the first one comes 250
// clocks after reset is released (251 clock edges, the release edge itself
// still being in reset).
module tb_sample_tick;
  logic clk = 0, rst = 1, tick;
  int checks = 0, failures = 0;
  always #50 clk = ~clk;
  sample_tick dut (.clk, .rst, .tick);
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int last, t;
    repeat (2) @(posedge clk);
    rst <= 0; t = 0; last = 0;
    for (int k = 0; k < 12; k++) begin
      do begin @(posedge clk); t++; end while (!tick);
      if (k > 0) check((t - last) == 250, $sformatf("tick %0d after %0d clocks", k, t - last));
      else check(t == 251, $sformatf("first tick %0d clocks after reset release", t));
      last = t;
      @(posedge clk); t++;
      check(!tick, "tick is one clock wide");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
