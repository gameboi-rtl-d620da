// gb_pixel_fifo_tb: pushes random tile rows and pops pixels at random,
// comparing every popped pixel with a queue model; checks that popping is
// refused below 8 pixels, that mixing respects mask, transparency and an
// earlier sprite, and that restart keeps mixed sprite pixels.
module gb_pixel_fifo_tb;
  import gb_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, restart = 0, push = 0, pop = 0, mix = 0, mix_pal = 0, mix_behind = 0;
  logic [15:0] push_row = 0;
  logic [1:0] mix_color [8];
  logic [7:0] mix_mask = 0;
  pix_t head;
  logic [4:0] count;
  logic can_pop, can_push;
  pix_t model [$];
  int checks = 0, failures = 0, pops = 0;

  gb_pixel_fifo dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input string s, input int got, input int exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s got %0h exp %0h", s, got, exp); end
  endtask

  initial begin
    foreach (mix_color[j]) mix_color[j] = 0;
    #12 rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      push = 1'($urandom); pop = 1'($urandom); push_row = 16'($urandom);
      chk("count", count, model.size());
      chk("can_pop", can_pop, model.size() >= 8);
      if (can_pop) chk("head", head, model[0]);
      @(posedge clk); #1;
      if (pop && model.size() >= 8) begin void'(model.pop_front()); pops++; end
      if (push && (model.size() + ((pop && model.size() >= 8) ? 1 : 0)) <= 8) begin
        for (int j = 0; j < 8; j++) model.push_back('{bg: {push_row[15-j], push_row[7-j]}, spr: 0, pal: 0, behind: 0});
      end
      push = 0; pop = 0;
    end
    // mixing: fill to >= 8 first
    while (model.size() < 8) begin
      @(negedge clk); push = 1; push_row = 16'h00FF; @(posedge clk); #1; push = 0;
      for (int j = 0; j < 8; j++) model.push_back('{bg: 2'b01, spr: 0, pal: 0, behind: 0});
    end
    @(negedge clk);
    for (int j = 0; j < 8; j++) mix_color[j] = 2'(j % 4);
    mix_mask = 8'b1111_1100; mix_pal = 1; mix_behind = 0; mix = 1;
    @(posedge clk); #1; mix = 0;
    for (int j = 2; j < 8; j++) if (j % 4 != 0 && model[j].spr == 0) begin model[j].spr = 2'(j % 4); model[j].pal = 1; end
    @(negedge clk);
    for (int j = 0; j < 8; j++) mix_color[j] = 2'd3;
    mix_mask = 8'hFF; mix_pal = 0; mix = 1;
    @(posedge clk); #1; mix = 0;
    for (int j = 0; j < 8; j++) if (model[j].spr == 0) begin model[j].spr = 3; model[j].pal = 0; end
    // restart keeps sprite pixels, then a push fills background underneath
    @(negedge clk); restart = 1; @(posedge clk); #1; restart = 0;
    chk("count after restart", count, 0);
    @(negedge clk); push = 1; push_row = 16'hFF00; @(posedge clk); #1; push = 0;
    for (int j = 0; j < 8; j++) model[j].bg = 2'b10;
    while (model.size() > 8) void'(model.pop_back());
    @(negedge clk); push = 1; push_row = 16'h0F0F; @(posedge clk); #1; push = 0;
    for (int j = 0; j < 8; j++) model.push_back('{bg: (j < 4) ? 2'b00 : 2'b11, spr: 0, pal: 0, behind: 0});
    for (int j = 0; j < 9; j++) begin
      @(negedge clk);
      chk("mixed pixel", head, model[j]);
      pop = 1; @(posedge clk); #1; pop = 0;
    end
    @(negedge clk); pop = 1; @(posedge clk); #1; pop = 0;
    chk("pop refused below 8", count, 7);
    chk("pops happened", pops > 100, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
