// tb_vis_sampler: feeds random pixels (with gaps) and checks every
// metapixel equals (sum of the two largest of its five pixels) / 2, that the
// index counts up per line and restarts after `clear`.
module tb_vis_sampler;
  logic clk = 0, rst = 1, clear = 0, pv = 0, mpv;
  logic [7:0] pix = 0, mp; logic [6:0] idx;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  vis_sampler dut (.clk, .rst, .clear, .pix_valid(pv), .pix, .mp_valid(mpv), .mp, .mp_idx(idx));
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int exp_q[$]; int exp_i[$];
  always @(negedge clk) if (mpv) begin
    checks++;
    if (exp_q.size() == 0 || mp != 8'(exp_q[0]) || idx != 7'(exp_i[0])) begin
      failures++; $display("FAIL mp %0d idx %0d exp %0d", mp, idx, exp_q[0]);
    end
    if (exp_q.size() != 0) begin void'(exp_q.pop_front()); void'(exp_i.pop_front()); end
  end
  initial begin
    int g[5]; int a1, a2;
    repeat (3) @(posedge clk); rst <= 0;
    for (int line = 0; line < 4; line++) begin
      @(posedge clk); #1 clear = 1; @(posedge clk); #1 clear = 0;
      for (int m = 0; m < 30; m++) begin
        for (int k = 0; k < 5; k++) g[k] = (m % 4 == 0) ? 200 : $urandom_range(0, 255);
        a1 = 0; a2 = 0;                 // two largest, found independently
        for (int k = 0; k < 5; k++)
          if (g[k] > a1) begin a2 = a1; a1 = g[k]; end
          else if (g[k] > a2) a2 = g[k];
        exp_q.push_back((a1 + a2) / 2); exp_i.push_back(m);
        for (int k = 0; k < 5; k++) begin
          pv = 1; pix = 8'(g[k]); @(posedge clk); #1;
          if ($urandom_range(0, 3) == 0) begin pv = 0; @(posedge clk); #1; end
        end
        pv = 0;
      end
      repeat (3) @(posedge clk);
    end
    checks++; if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
