// tb_vis_mem_access: runs two passes of metapixels over a set of (line,
// index) positions against a RAM. In the second pass each output must
// return the value written at the same position in the first pass (the
// previous frame) and the new value; the RAM address must be {line, idx}.
module tb_vis_mem_access;
  logic clk = 0, rst = 1, iv = 0, ov, en, we;
  logic [7:0] nmp, wd, rd, old_mp, cur_mp; logic [8:0] line; logic [6:0] idx, oidx;
  logic [15:0] addr;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  vis_mem_access dut (.clk, .rst, .in_valid(iv), .new_mp(nmp), .line, .idx,
    .ram_en(en), .ram_we(we), .ram_addr(addr), .ram_wdata(wd), .ram_rdata(rd),
    .out_valid(ov), .old_mp, .cur_mp, .out_idx(oidx));
  sram_model #(.AW(16), .DW(8)) ram (.clk, .en, .we, .addr, .wdata(wd), .rdata(rd));
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [7:0] f1 [40][100];
  logic [7:0] f2 [40][100];
  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    for (int pass = 0; pass < 2; pass++)
      for (int l = 0; l < 40; l++)
        for (int m = 0; m < 100; m++) begin
          if (pass == 0) f1[l][m] = 8'($urandom); else f2[l][m] = 8'($urandom);
          @(posedge clk);
          iv <= 1; line <= 9'(l * 7); idx <= 7'(m); nmp <= pass == 0 ? f1[l][m] : f2[l][m];
          @(posedge clk); iv <= 0;
          @(negedge clk);
          checks++;
          if (!ov || !we || addr != {9'(l * 7), 7'(m)} || oidx != 7'(m)) begin
            failures++; $display("FAIL handshake l%0d m%0d", l, m);
          end
          if (pass == 1) begin
            checks++;
            if (old_mp != f1[l][m] || cur_mp != f2[l][m]) begin
              failures++; $display("FAIL data l%0d m%0d old %h exp %h", l, m, old_mp, f1[l][m]);
            end
          end
          @(posedge clk);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
