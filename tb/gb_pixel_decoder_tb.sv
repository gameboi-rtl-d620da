// gb_pixel_decoder_tb: random pixels, palettes and LCDC bits compared with
// the priority and palette rules evaluated independently here.
module gb_pixel_decoder_tb;
  logic [1:0] bg_color, spr_color, shade;
  logic spr_pal, spr_behind, from_sprite;
  logic [7:0] lcdc, bgp, obp0, obp1;
  int checks = 0, failures = 0;
  gb_pixel_decoder dut (.*);
  initial begin
    int b, s, e; logic sp;
    for (int i = 0; i < 3000; i++) begin
      bg_color = 2'($urandom); spr_color = 2'($urandom); spr_pal = 1'($urandom); spr_behind = 1'($urandom);
      lcdc = 8'($urandom); bgp = 8'($urandom); obp0 = 8'($urandom); obp1 = 8'($urandom);
      #1;
      b = lcdc[0] ? bg_color : 0;
      sp = lcdc[1] && spr_color != 0 && !(spr_behind && b != 0);
      e = sp ? ((spr_pal ? obp1 : obp0) >> (2 * spr_color)) & 3 : (bgp >> (2 * b)) & 3;
      checks++;
      if (shade !== 2'(e) || from_sprite !== sp) begin failures++; $display("FAIL bg=%0d spr=%0d got %0d exp %0d", bg_color, spr_color, shade, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
