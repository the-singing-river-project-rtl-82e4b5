// tb_ps_resampler: stands in for the address manager and SRAM (the
// resample request selects one random byte, the original request another,
// with the registered-address and read latencies of the real ones) and
// checks the DAC receives the resampled byte alone, or the halved sum of
// both when `mix` is on, with one dac_cs_n strobe, and that busy lasts 6
// clocks (8 with mix).
module tb_ps_resampler;
  logic clk = 0, rst = 1, start = 0, mix = 0, busy, rr, ro, roff, oe, dcs;
  logic [7:0] rd, dac, rsv, orv;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ps_resampler dut (.clk, .rst, .start, .mix, .busy, .req_r(rr), .req_o(ro), .addr_off(roff),
    .ram_oe(oe), .ram_rdata(rd), .dac_data(dac), .dac_cs_n(dcs), .resampled(rsv), .original(orv));
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  logic [7:0] vr, vo; int kind = 0;   // 0 off, 1 resample, 2 original
  int nstrobe; logic [7:0] got;
  always @(posedge clk) begin
    if (rr) kind <= 1; else if (ro) kind <= 2; else if (roff) kind <= 0;
    if (oe) rd <= (kind == 1) ? vr : (kind == 2) ? vo : 8'hEE;
    if (!dcs) begin nstrobe++; got = dac; end
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int cyc, e;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int k = 0; k < 60; k++) begin
      vr = 8'($urandom); vo = 8'($urandom); mix = (k % 3 == 1); nstrobe = 0;
      start = 1; @(posedge clk); #1 start = 0; cyc = 0;
      while (busy) begin @(posedge clk); #1; cyc++; end
      e = mix ? (int'(vr) + int'(vo)) / 2 : int'(vr);
      check(nstrobe == 1 && got == 8'(e), $sformatf("dac %0d exp %0d mix %0d", got, e, mix));
      check(cyc == (mix ? 8 : 6), $sformatf("busy %0d clocks", cyc));
      check(kind == 0, "address turned off");
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
