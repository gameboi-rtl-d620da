// gb_oam_scan_tb: fills a model OAM at random (with crowded lines), runs
// the scan for many lines in 8x8 and 8x16 mode, and checks the number of
// sprites kept, the scan length, and that the comparators release exactly
// the kept sprites in (X, OAM index) order at the right screen x, with the
// right row and skip count. The reference selection is computed here.
module gb_oam_scan_tb;
  logic clk = 0, rst_n = 0, start = 0, tall = 0, busy, cmp_en = 0, due, mark_done = 0;
  logic [7:0] ly = 0, oam_addr, oam_rdata, cur_x = 0;
  logic [3:0] due_slot, due_row, skip, n_spr;
  logic [5:0] due_idx;
  logic [7:0] oam [256];
  int checks = 0, failures = 0, busy_cnt = 0;
  always @(posedge clk) if (busy) busy_cnt++;

  gb_oam_scan dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) oam_rdata <= oam[oam_addr];

  task automatic chk(input string s, input int got, input int exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s got %0d exp %0d", s, got, exp); end
  endtask

  initial begin
    int sel_idx [$], h, n, len, got_n;
    #12 rst_n = 1;
    for (int rep = 0; rep < 60; rep++) begin
      for (int i = 0; i < 40; i++) begin
        oam[4*i] = 8'(20 + $urandom % 40); oam[4*i+1] = 8'($urandom % 176);
        oam[4*i+2] = 8'($urandom); oam[4*i+3] = 8'($urandom);
      end
      tall = rep[0]; ly = 8'($urandom % 40); h = tall ? 16 : 8;
      sel_idx.delete();
      for (int i = 0; i < 40; i++)
        if (ly + 16 >= oam[4*i] && ly + 16 < oam[4*i] + h && sel_idx.size() < 10) sel_idx.push_back(i);
      @(negedge clk); start = 1; busy_cnt = 0; @(negedge clk); start = 0;
      while (busy) @(negedge clk);
      chk("scan length", busy_cnt, 81);
      chk("sprites kept", n_spr, sel_idx.size());
      // sweep the screen x; each due sprite must be the reference's next one
      sel_idx.sort() with (oam[4*item+1] * 64 + item);
      n = 0; cmp_en = 1;
      for (int x = 0; x < 168; x++) begin
        cur_x = 8'(x); #1;
        while (due) begin
          if (n < sel_idx.size()) begin
            chk("due index", due_idx, sel_idx[n]);
            chk("due at x", oam[4*sel_idx[n]+1] <= x + 8, 1);
            chk("row", due_row, ly + 16 - oam[4*sel_idx[n]]);
            chk("skip", skip, (x + 8 - oam[4*sel_idx[n]+1]) > 8 ? 8 : x + 8 - oam[4*sel_idx[n]+1]);
          end
          n++;
          @(negedge clk); mark_done = 1; @(negedge clk); mark_done = 0; #1;
        end
      end
      cmp_en = 0;
      got_n = 0; foreach (sel_idx[k]) if (oam[4*sel_idx[k]+1] < 176) got_n++;
      chk("all released", n, got_n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
