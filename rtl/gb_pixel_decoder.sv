// gb_pixel_decoder: turns one pixel from the pixel FIFO into a screen shade.
// A FIFO entry holds the background's 2-bit colour index and, if a sprite
// was mixed in, the sprite's colour index, palette select and
// background-priority bit. The sprite wins when its colour is not 0
// (transparent) and it either has priority over the background or the
// background colour is 0. The chosen index is looked up in BGP, OBP0 or
// OBP1 (two bits per index) to give a shade 0 (white) .. 3 (black).
// LCDC bit 0 off blanks the background to colour 0; LCDC bit 1 off hides
// sprites. Combinational.
// Palettes and transparency follow the documented two-bit pixel scheme;
// the priority rules are the console's as this design reads them.
module gb_pixel_decoder (
  input  logic [1:0] bg_color,
  input  logic [1:0] spr_color,
  input  logic       spr_pal,     // 0: OBP0, 1: OBP1
  input  logic       spr_behind,  // 1: sprite only over background colour 0
  input  logic [7:0] lcdc,
  input  logic [7:0] bgp,
  input  logic [7:0] obp0,
  input  logic [7:0] obp1,
  output logic [1:0] shade,
  output logic       from_sprite
);
  logic [1:0] bgc;
  logic [7:0] pal;

  always_comb begin
    bgc = lcdc[0] ? bg_color : 2'd0;
    from_sprite = lcdc[1] && spr_color != 2'd0 && (!spr_behind || bgc == 2'd0);
    pal   = spr_pal ? obp1 : obp0;
    shade = from_sprite ? pal[2*spr_color +: 2] : bgp[2*bgc +: 2];
  end
endmodule
