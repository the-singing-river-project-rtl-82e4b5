// serial_driver: testbench bit-banger for the sel_n/sclk/sdata link. A
// call of send(word, nbits) pulls sel_n low, shifts the word out MSB first
// with 4-clock sclk phases (data set while sclk is low) and raises sel_n.
module serial_driver (
  input  logic clk,
  output logic sel_n,
  output logic sclk,
  output logic sdata
);
  initial begin sel_n = 1; sclk = 0; sdata = 0; end
  task automatic send(input logic [15:0] w, input int nbits);
    sel_n = 0; repeat (4) @(posedge clk);
    for (int i = nbits - 1; i >= 0; i--) begin
      sdata = w[i]; repeat (4) @(posedge clk);
      sclk = 1; repeat (4) @(posedge clk);
      sclk = 0;
    end
    repeat (4) @(posedge clk); sel_n = 1; repeat (10) @(posedge clk);
  endtask
endmodule
