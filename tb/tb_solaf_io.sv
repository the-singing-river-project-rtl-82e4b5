// tb_solaf_io: drives the I/O block with a 40 kHz tick (every 250 clocks),
// an ADC12441 model and the shared-bus memory model, and grants the bus a
// random number of clocks after each request, as the major FSM does once
// a minor FSM has paused. Uses 50-sample buffers so that halves swap
// often. Checks that each recorded sample lands in S1 at {in_half, count},
// that each DAC word is the S3 word at {out_half, count}, one DAC strobe
// per tick, a swap every 50 samples with both halves toggling, and that
// the block never selects a chip without the grant.
module tb_solaf_io;
  localparam int B = 50;
  logic clk = 0, rst = 1, enable = 0, tick = 0, req, gnt = 0;
  logic [15:0] addr; logic we; logic [12:0] wdata, rdata;
  logic acs, awr, ard, aint; logic [12:0] adata, dac; logic dcs, ih, oh, swap; logic [11:0] cnt;
  int nconv, checks = 0, failures = 0;
  always #50 clk = ~clk;
  solaf_bus_mem mem (.clk, .addr, .we, .wdata, .rdata);
  adc12441_model fadc (.clk, .cs_n(acs), .wr_n(awr), .rd_n(ard), .int_n(aint), .data(adata),
    .freq(700.0), .amp(3000.0), .h2(0.0), .nconv);
  solaf_io #(.B(B)) dut (.clk, .rst, .enable, .tick, .bus_req(req), .bus_gnt(gnt),
    .bus_addr_o(addr), .bus_we(we), .bus_wdata(wdata), .bus_rdata(rdata),
    .adc_cs_n(acs), .adc_wr_n(awr), .adc_rd_n(ard), .adc_int_n(aint), .adc_data(adata),
    .dac_data(dac), .dac_cs_n(dcs), .in_half(ih), .out_half(oh), .cnt, .swap);
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin repeat (200000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // tick generator and bus grant with a random delay
  int ticks = 0;
  always @(posedge clk) begin
    tick <= !rst && enable && ($time / 100) % 250 == 0;
    if (tick) ticks++;
  end
  int delay = 0;
  always @(posedge clk) begin
    if (!req) begin gnt <= 1'b0; delay <= int'($urandom % 4); end
    else if (delay > 0) delay <= delay - 1;
    else gnt <= 1'b1;
  end

  int outs = 0, dac_bad = 0, s1_bad = 0, swaps = 0, bad_swap = 0, ungranted = 0;
  logic [12:0] exp_dac; logic ih_d, oh_d;
  always @(posedge clk) if (!rst) begin
    if (addr[15:13] != 3'b111 && !gnt) ungranted++;
    if (!dcs) begin
      outs++;
      if (dac != mem.s3.mem[{oh, cnt}]) dac_bad++;
      if (mem.s1.mem[{ih, cnt}] != 13'(fadc.hist[(nconv - 1) % 4096])) s1_bad++;
      if (cnt == 12'(B - 1)) begin ih_d <= ih; oh_d <= oh; end
    end
    if (swap) begin
      swaps++;
      if (ih == ih_d || oh == oh_d || cnt != 0 || outs % B != 0) bad_swap++;
    end
  end

  initial begin
    for (int i = 0; i < 8192; i++) mem.s3.mem[i] = 13'($urandom);
    repeat (3) @(posedge clk); #1 rst = 0; enable = 1;
    repeat (250 * 160 + 100) @(posedge clk);
    check((outs == ticks || outs == ticks - 1) && outs >= 150, $sformatf("%0d DAC words for %0d ticks", outs, ticks));
    check(dac_bad == 0, $sformatf("%0d DAC words differ from S3", dac_bad));
    check(s1_bad == 0, $sformatf("%0d recorded samples differ from the converter", s1_bad));
    check(swaps == outs / B && swaps >= 3, $sformatf("%0d swaps after %0d samples", swaps, outs));
    check(bad_swap == 0, "halves toggle together at each swap");
    check(ungranted == 0, $sformatf("%0d clocks with a chip selected without the grant", ungranted));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
