// gb_ppu: Pixel Processing Unit - mode FSM, tile fetcher and pixel pipeline.
//
// Timing (one clock = one dot, 4.194304 MHz): a line is 456 dots and a frame
// 154 lines (144 visible, 10 of V-Blank), i.e. 70224 dots or 59.73 frames/s.
// Each visible line runs OAM search (dots 0-79, mode 2), pixel fetching and
// drawing (mode 3, about 172 dots, longer with sprites and the window),
// then H-Blank (mode 0) to the end of the line. Lines 144-153 are V-Blank
// (mode 1). With LCDC bit 7 clear the PPU stops, at line 0 in mode 0.
//
// Drawing: the fetcher reads, two dots per VRAM read, a tile number from
// the background map (or window map), then the low and high bytes of that
// tile's row, and pushes the 8 pixels into the pixel FIFO when it has room.
// SCX/SCY choose which 160x144 part of the 256x256 background is shown:
// the tile column and row come from the scroll registers and the first
// SCX mod 8 pixels of a line are discarded. When the screen x reaches
// WX-7 on a line at or below WY, with the window enabled (LCDC bit 5), the
// FIFO is cleared and fetching restarts from the window map. When the
// scanline comparators report a due sprite, popping stops, the fetcher
// reads the sprite's tile number and attributes from OAM and its row from
// VRAM (with X/Y flip) and mixes it over the FIFO's first 8 pixels; then
// drawing resumes. Popped pixels go through the pixel decoder (palettes)
// and leave as pix_valid/pix_x/pix_y/pix_shade.
//
// The mode sequence, FIFO mixing, scrolling, window and sprite rules are
// the document's; the exact dot counts of the fetcher steps follow the
// console only approximately and are this design's.
// Lint note: rst_n is reported as used both as an asynchronous reset and
// synchronously; the synchronous use is only an assertion's disable
// condition, so it stands.
module gb_ppu
  import gb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  lcdc,
  input  logic [7:0]  scy,
  input  logic [7:0]  scx,
  input  logic [7:0]  wy,
  input  logic [7:0]  wx,
  input  logic [7:0]  bgp,
  input  logic [7:0]  obp0,
  input  logic [7:0]  obp1,
  output logic [12:0] vram_addr,
  input  logic [7:0]  vram_rdata,
  output logic [7:0]  oam_addr,
  input  logic [7:0]  oam_rdata,
  output ppu_mode_e   mode,
  output logic [7:0]  ly,
  output logic        pix_valid,
  output logic [7:0]  pix_x,
  output logic [7:0]  pix_y,
  output logic [1:0]  pix_shade,
  output logic        frame_done   // pulses on the first dot of V-Blank
);
  typedef enum logic [3:0] {
    F_TILE, F_LO, F_HI, F_PUSH, S_TILE, S_ATTR, S_LO, S_HI, S_MIX
  } fstate_e;

  logic [8:0] dot;
  logic       drawing, win_active, win_drawn;
  logic [7:0] win_line, out_x;
  logic [2:0] discard;
  logic [4:0] fx;
  fstate_e    fst, bg_resume;
  logic       sub;
  logic [7:0] tile_no, lo, hi, s_tile, s_attr, s_lo;
  logic [7:0] bg_y, row_y;
  logic [4:0] map_x;
  logic [12:0] map_addr, tile_addr, spr_addr;

  // OAM scan / sprite buffer / comparators
  logic [7:0] scan_oam_addr;
  logic       scan_busy, due, mark_done;
  logic [3:0] due_slot, due_row, skip, n_spr;
  logic [5:0] due_idx;
  logic       start_line;

  // pixel FIFO
  pix_t       head;
  logic [4:0] fcount;
  logic       can_pop, can_push, f_clear, f_push, f_pop, f_mix;
  logic [1:0] mix_color [8];
  logic [7:0] mix_mask;
  logic [1:0] shade;
  logic       from_sprite;
  logic       win_hit, spr_start, in_sprite;

  assign start_line = lcdc[7] && ly < 8'd144 && dot == 9'd0;

  gb_oam_scan u_scan (
    .clk, .rst_n, .start(start_line), .ly, .tall(lcdc[2]),
    .oam_addr(scan_oam_addr), .oam_rdata, .busy(scan_busy),
    .cmp_en(drawing && lcdc[1] && discard == 3'd0), .cur_x(out_x),
    .due, .due_slot, .due_idx, .due_row, .skip, .mark_done, .n_spr
  );

  gb_pixel_fifo u_fifo (
    .clk, .rst_n, .clear(f_clear), .restart(win_hit), .push(f_push), .push_row({hi, lo}), .pop(f_pop),
    .mix(f_mix), .mix_color, .mix_mask, .mix_pal(s_attr[4]), .mix_behind(s_attr[7]),
    .head, .count(fcount), .can_pop, .can_push
  );

  gb_pixel_decoder u_dec (
    .bg_color(head.bg), .spr_color(head.spr), .spr_pal(head.pal), .spr_behind(head.behind),
    .lcdc, .bgp, .obp0, .obp1, .shade, .from_sprite
  );

  // ---------------- addresses
  always_comb begin
    bg_y  = ly + scy;
    row_y = win_active ? win_line : bg_y;
    map_x = win_active ? fx : 5'(scx[7:3] + fx);
    map_addr = {2'b11, (win_active ? lcdc[6] : lcdc[3]), row_y[7:3], map_x};
    // 8000 addressing (LCDC.4 = 1) or signed 9000 addressing
    tile_addr = lcdc[4] ? {1'b0, tile_no, row_y[2:0], 1'b0}
                        : 13'(13'h1000 + {{1{tile_no[7]}}, tile_no, row_y[2:0], 1'b0});
    begin
      logic [3:0] r;
      logic [7:0] t;
      r = s_attr[6] ? ((lcdc[2] ? 4'd15 : 4'd7) - due_row) : due_row;
      t = lcdc[2] ? {s_tile[7:1], r[3]} : s_tile;
      spr_addr = {1'b0, t, r[2:0], 1'b0};
    end
    unique case (fst)
      F_TILE:  vram_addr = map_addr;
      F_LO:    vram_addr = tile_addr;
      F_HI:    vram_addr = tile_addr | 13'd1;
      S_LO:    vram_addr = spr_addr;
      default: vram_addr = spr_addr | 13'd1;
    endcase
    if (scan_busy) oam_addr = scan_oam_addr;
    else oam_addr = {due_idx, 2'b10} | {7'd0, fst == S_ATTR};
    // FIFO entry j shows sprite column j + skip (skip > 0: sprite starts left of the screen)
    for (int j = 0; j < 8; j++) begin
      logic [3:0] col;
      col = 4'(j) + skip;
      mix_color[j] = s_attr[5] ? {vram_rdata[col[2:0]], s_lo[col[2:0]]}
                               : {vram_rdata[3'd7 - col[2:0]], s_lo[3'd7 - col[2:0]]};
      mix_mask[j]  = !col[3];
    end
  end

  // ---------------- control
  assign in_sprite = fst inside {S_TILE, S_ATTR, S_LO, S_HI, S_MIX};
  assign win_hit   = drawing && lcdc[5] && lcdc[0] && !win_active && !in_sprite && ly >= wy &&
                     ({1'b0, out_x} + 9'd7 >= {1'b0, wx}) && discard == 3'd0;
  assign spr_start = drawing && due && can_pop && !in_sprite && !sub && !win_hit;
  assign f_clear   = lcdc[7] && ly < 8'd144 && dot == 9'd80;
  assign f_push    = drawing && fst == F_PUSH && !win_hit && !spr_start;
  assign f_pop     = drawing && can_pop && !due && !in_sprite && !win_hit;
  assign f_mix     = fst == S_MIX;
  assign mark_done = f_mix;

  always_comb begin
    if (!lcdc[7])             mode = MODE_HBLANK;
    else if (ly >= 8'd144)    mode = MODE_VBLANK;
    else if (dot < 9'd80)     mode = MODE_OAM;
    else if (drawing || dot == 9'd80) mode = MODE_DRAW;
    else                      mode = MODE_HBLANK;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dot <= 9'd0; ly <= 8'd0; drawing <= 1'b0; win_active <= 1'b0; win_drawn <= 1'b0;
      win_line <= 8'd0; out_x <= 8'd0; discard <= 3'd0; fx <= 5'd0; fst <= F_TILE;
      bg_resume <= F_TILE; sub <= 1'b0; tile_no <= 8'd0; lo <= 8'd0; hi <= 8'd0;
      s_tile <= 8'd0; s_attr <= 8'd0; s_lo <= 8'd0;
      pix_valid <= 1'b0; pix_x <= 8'd0; pix_y <= 8'd0; pix_shade <= 2'd0; frame_done <= 1'b0;
    end else if (!lcdc[7]) begin
      dot <= 9'd0; ly <= 8'd0; drawing <= 1'b0; win_line <= 8'd0; pix_valid <= 1'b0; frame_done <= 1'b0;
    end else begin
      pix_valid  <= 1'b0;
      frame_done <= 1'b0;
      // line and frame counters
      if (dot == 9'd455) begin
        dot <= 9'd0;
        if (win_drawn) win_line <= win_line + 8'd1;
        win_drawn <= 1'b0;
        if (ly == 8'd153) begin ly <= 8'd0; win_line <= 8'd0; end
        else ly <= ly + 8'd1;
        if (ly == 8'd143) frame_done <= 1'b1;
      end else dot <= dot + 9'd1;

      if (ly < 8'd144 && dot == 9'd80) begin
        drawing <= 1'b1; win_active <= 1'b0; out_x <= 8'd0; discard <= scx[2:0];
        fx <= 5'd0; fst <= F_TILE; sub <= 1'b0;
      end else if (drawing) begin
        // ---- fetcher
        if (win_hit) begin
          win_active <= 1'b1; win_drawn <= 1'b1; fx <= 5'd0; fst <= F_TILE; sub <= 1'b0;
        end else if (spr_start) begin
          bg_resume <= (fst == F_PUSH) ? F_PUSH : fst; fst <= S_TILE; sub <= 1'b0;
        end else begin
          unique case (fst)
            F_TILE, F_LO, F_HI, S_TILE, S_ATTR, S_LO, S_HI: begin
              sub <= ~sub;
              if (sub) begin
                unique case (fst)
                  F_TILE: begin tile_no <= vram_rdata; fst <= F_LO; end
                  F_LO:   begin lo <= vram_rdata; fst <= F_HI; end
                  F_HI:   begin hi <= vram_rdata; fst <= F_PUSH; end
                  S_TILE: begin s_tile <= oam_rdata; fst <= S_ATTR; end
                  S_ATTR: begin s_attr <= oam_rdata; fst <= S_LO; end
                  S_LO:   begin s_lo <= vram_rdata; fst <= S_HI; end
                  default: fst <= S_MIX;          // S_HI: high byte is mixed directly
                endcase
              end
            end
            F_PUSH: if (can_push) begin fx <= fx + 5'd1; fst <= F_TILE; end
            default: begin fst <= bg_resume; sub <= 1'b0; end // S_MIX
          endcase
        end
        // ---- output
        if (f_pop) begin
          if (discard != 3'd0) discard <= discard - 3'd1;
          else begin
            pix_valid <= 1'b1; pix_x <= out_x; pix_y <= ly; pix_shade <= shade;
            out_x <= out_x + 8'd1;
            if (out_x == 8'd159) drawing <= 1'b0;
          end
        end
      end
    end
  end
endmodule
