// gb_ppu_tb: renders frames from random VRAM/OAM contents with scrolling,
// a window, 8x8 and 8x16 sprites (flips, palettes, priority, more than ten
// on some lines) and compares every pixel of a frame with a reference
// renderer written here from the display rules (tile maps, signed and
// unsigned tile addressing, window, sprite selection per line, smaller-X
// sprite wins, transparency, background priority, palettes). Also checks
// the line (456 dots) and frame (70224 dots) periods and the mode order.
module gb_ppu_tb;
  import gb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] lcdc, scy, scx, wy, wx, bgp, obp0, obp1;
  logic [12:0] vram_addr;
  logic [7:0] vram_rdata, oam_addr, oam_rdata, ly, pix_x, pix_y;
  ppu_mode_e mode;
  logic pix_valid, frame_done;
  logic [1:0] pix_shade;
  logic [1:0] fb [144][160];
  logic [7:0] vram [8192];
  logic [7:0] oam [256];
  int checks = 0, failures = 0, cyc = 0, frames = 0, last_frame = 0, frame_len = 0, npix = 0;
  int line_start = 0, m3_len = 0, m3_max = 0, bad_order = 0;
  ppu_mode_e mode_q;
  bit        seen = 0;   // mode_q valid

  gb_ppu dut (.*);
  always #5 clk = ~clk;

  // model memories with one-clock read latency
  always_ff @(posedge clk) begin vram_rdata <= vram[vram_addr]; oam_rdata <= oam[oam_addr]; end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    mode_q <= mode;
    if (pix_valid && rst_n) begin fb[pix_y][pix_x] = pix_shade; npix++; end
    if (frame_done) begin frames++; frame_len = cyc - last_frame; last_frame = cyc; end
    seen <= 1;
    if (seen && mode != mode_q) begin
      if (mode == MODE_DRAW) line_start = cyc;
      if (mode_q == MODE_DRAW) begin m3_len = cyc - line_start; if (m3_len > m3_max) m3_max = m3_len; end
      if ((mode_q == MODE_OAM && mode != MODE_DRAW) || (mode_q == MODE_DRAW && mode != MODE_HBLANK)) bad_order++;
    end
  end

  function automatic logic [1:0] tile_px(input logic [7:0] t, input int row, input int col, input logic unsigned_mode);
    int base, st;
    st = int'($signed(t));
    base = unsigned_mode ? int'(t) * 16 : 4096 + st * 16;
    return {vram[base + row*2 + 1][7-col], vram[base + row*2][7-col]};
  endfunction

  function automatic logic [1:0] ref_px(input int x, input int y);
    int bx, by, c, wl, h, cnt, best, bx_s, r, col;
    logic [1:0] bgc, sc;
    logic [7:0] t, at, pal;
    logic found;
    // background or window colour index
    if (lcdc[5] && y >= wy && x + 7 >= wx) begin
      wl = y - wy; bx = x + 7 - wx;
      t = vram[(lcdc[6] ? 'h1C00 : 'h1800) + (wl / 8) * 32 + bx / 8];
      bgc = tile_px(t, wl % 8, bx % 8, lcdc[4]);
    end else begin
      bx = (x + scx) % 256; by = (y + scy) % 256;
      t = vram[(lcdc[3] ? 'h1C00 : 'h1800) + (by / 8) * 32 + bx / 8];
      bgc = tile_px(t, by % 8, bx % 8, lcdc[4]);
    end
    if (!lcdc[0]) bgc = 0;
    // sprites: first ten on the line in OAM order; smallest X, then lowest index, first opaque wins
    h = lcdc[2] ? 16 : 8; cnt = 0; found = 0; sc = 0; at = 0;
    for (int px = 0; px < 176 && !found; px++) begin
      cnt = 0;
      for (int i = 0; i < 40 && cnt < 10; i++) begin
        if (y + 16 >= oam[4*i] && y + 16 < oam[4*i] + h) begin
          cnt++;
          if (oam[4*i+1] == px && x + 8 >= px && x + 8 < px + 8 && !found) begin
            r = y + 16 - oam[4*i]; at = oam[4*i+3];
            if (at[6]) r = h - 1 - r;
            t = oam[4*i+2]; if (h == 16) t = t & 8'hFE;
            col = x + 8 - px; if (at[5]) col = 7 - col;
            sc = tile_px(t, r, col, 1'b1);
            if (sc != 0) found = 1;
          end
        end
      end
    end
    if (lcdc[1] && found && (!at[7] || bgc == 0)) begin
      pal = at[4] ? obp1 : obp0; return pal[2*sc +: 2];
    end
    return bgp[2*bgc +: 2];
  endfunction

  task automatic setup(input int seed_mode);
    for (int i = 0; i < 8192; i++) vram[i] = 8'($urandom);
    for (int i = 0; i < 160; i++) oam[i] = 8'($urandom);
    // place sprites on screen, several sharing lines and X
    for (int i = 0; i < 40; i++) begin
      oam[4*i]   = 8'(16 + ($urandom % 150));
      oam[4*i+1] = 8'(($urandom % 170));
      if (i < 14) begin oam[4*i] = 8'd40 + 8'(i % 3); oam[4*i+1] = 8'(8 + 12 * i); end
      if (i == 14) begin oam[4*i] = 8'd40; oam[4*i+1] = 8'(8 + 12 * 3); end
    end
    scx = 8'($urandom); scy = 8'($urandom); wy = 8'(60 + $urandom % 40); wx = 8'(40 + $urandom % 100);
    bgp = 8'($urandom); obp0 = 8'($urandom); obp1 = 8'($urandom);
    lcdc = (seed_mode == 0) ? 8'b1010_0011 : 8'b1111_1111 ^ 8'b0000_0000;
    if (seed_mode == 1) lcdc = 8'b1101_0111; // 8x16 sprites, unsigned tiles, map 1, window map 1
  endtask

  task automatic compare_frame(input string tag);
    int bad;
    bad = 0;
    for (int y = 0; y < 144; y++)
      for (int x = 0; x < 160; x++) begin
        checks++;
        if (fb[y][x] !== ref_px(x, y)) begin
          failures++; bad++;
          if (bad < 6) $display("FAIL %s pixel (%0d,%0d) got %0d exp %0d", tag, x, y, fb[y][x], ref_px(x, y));
        end
      end
  endtask

  initial begin
    setup(0);
    #12 rst_n = 1;
    wait (frames == 2);
    compare_frame("frame A");
    checks++; if (frame_len != 70224) begin failures++; $display("FAIL frame length %0d", frame_len); end
    checks++; if (bad_order != 0) begin failures++; $display("FAIL mode order %0d", bad_order); end
    checks++; if (m3_max < 172 || m3_max > 300) begin failures++; $display("FAIL mode 3 length %0d", m3_max); end
    setup(1);
    wait (frames == 4);
    compare_frame("frame B");
    checks++; if (npix != 4 * 160 * 144) begin failures++; $display("FAIL pixel count %0d", npix); end
    $display("mode 3 longest %0d dots", m3_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
