// gb_vga_tb: fills the frame buffer with random shades through the PPU
// port, then watches one VGA frame. Checks visible run length (640),
// visible lines (480), hsync width (96) and line length (800), vsync width
// (2 lines), and every visible pixel: black border, 3x-scaled buffer
// content inside, shade 0 white and 3 black.
module gb_vga_tb;
  logic clk_gb = 0, clk_vga = 0, rst_n = 0, pix_valid = 0;
  logic [7:0] pix_x = 0, pix_y = 0;
  logic [1:0] pix_shade = 0;
  logic [7:0] vga_r, vga_g, vga_b;
  logic hsync_n, vsync_n, blank_n;
  logic [1:0] ref_fb [144][160];
  int checks = 0, failures = 0, x = 0, y = -1, hs_len = 0, line_len = 0, vs_lines = 0;
  bit prev_de = 0, prev_hs = 1, prev_vs = 1, started = 0;

  gb_vga dut (.*);
  always #119 clk_gb = ~clk_gb;
  always #20 clk_vga = ~clk_vga;

  task automatic chk(input string s, input int got, input int exp);
    checks++; if (got !== exp) begin failures++; if (failures < 20) $display("FAIL %s got %0d exp %0d", s, got, exp); end
  endtask

  function automatic int expect_grey(input int xx, input int yy);
    if (xx < 80 || xx >= 560 || yy < 24 || yy >= 456) return 0;
    return 255 - 85 * ref_fb[(yy - 24) / 3][(xx - 80) / 3];
  endfunction

  always @(posedge clk_vga) if (rst_n) begin
    if (!vsync_n && prev_vs) begin
      if (started) chk("visible lines", y + 1, 480);
      started = 1; y = -1; vs_lines = 0;
    end
    if (!hsync_n && prev_hs && !vsync_n) vs_lines++;
    if (!hsync_n) hs_len++; else if (hs_len != 0) begin if (started) chk("hsync width", hs_len, 96); hs_len = 0; end
    if (blank_n && !prev_de) begin
      if (started && y >= 0) chk("line length", line_len, 800);
      y++; x = 0; line_len = 0;
    end
    line_len++;
    if (blank_n) begin
      if (started) begin
        chk("pixel", vga_r, expect_grey(x, y));
        checks++; if (vga_g !== vga_r || vga_b !== vga_r) failures++;
      end
      x++;
    end else if (prev_de && started) chk("visible run", x, 640);
    if (vsync_n && !prev_vs && started) chk("vsync lines", vs_lines, 2);
    prev_de = blank_n; prev_hs = hsync_n; prev_vs = vsync_n;
  end

  initial begin
    #100 rst_n = 1;
    for (int yy = 0; yy < 144; yy++)
      for (int xx = 0; xx < 160; xx++) begin
        @(negedge clk_gb);
        pix_valid = 1; pix_x = 8'(xx); pix_y = 8'(yy); pix_shade = 2'($urandom); ref_fb[yy][xx] = pix_shade;
      end
    @(negedge clk_gb); pix_valid = 0;
    // two full frames after the buffer is complete
    started = 0;
    wait (started); @(negedge vsync_n); @(negedge vsync_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
