// tb_serial_rx: bit-bangs frames onto the receiver (MSB first, data
// sampled on sclk rising edges, sel_n low for the frame) and checks that
// good 9-bit words are delivered with one valid pulse, and that frames with
// too few or too many bits are dropped, leaving the old word.
module tb_serial_rx;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0, nvalid = 0;
  always #5 clk = ~clk;
  logic sel_n = 1, sclk = 0, sdata = 0, valid;
  logic [8:0] data;
  serial_rx #(.WIDTH(9)) dut (.clk, .rst, .sel_n, .sclk, .sdata, .data, .valid);
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  always @(posedge clk) if (valid) nvalid++;
  task automatic send(input logic [15:0] w, input int nbits);
    sel_n = 0; repeat (4) @(posedge clk);
    for (int i = nbits - 1; i >= 0; i--) begin
      sdata = w[i]; repeat (4) @(posedge clk);
      sclk = 1; repeat (4) @(posedge clk);
      sclk = 0;
    end
    repeat (4) @(posedge clk); sel_n = 1; repeat (10) @(posedge clk);
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [8:0] w, last;
    int nv;
    repeat (3) @(posedge clk); rst = 0;
    for (int k = 0; k < 20; k++) begin
      w = 9'($urandom); nv = nvalid;
      send(16'(w), 9);
      check(data == w, $sformatf("word %h got %h", w, data));
      check(nvalid == nv + 1, "one valid pulse");
    end
    last = data; nv = nvalid;
    send(16'h00ff, 8);
    check(data == last && nvalid == nv, "8-bit frame dropped");
    send(16'h03ff, 10);
    check(data == last && nvalid == nv, "10-bit frame dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
