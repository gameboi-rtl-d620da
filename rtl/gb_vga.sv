// gb_vga: frame buffer plus 640x480 VGA timing generator for the 160x144
// picture, scaled 3x and centred (80 pixels left/right, 24 lines top and
// bottom are black).
// How: the PPU side (clk_gb) writes each 2-bit shade into a dual-clock
// frame buffer of 160*144 entries as pix_valid pixels come out. The VGA
// side (clk_vga, 25.175 MHz) runs an 800x525 raster (640 visible + 16
// front porch + 96 sync + 48 back porch; 480 + 10 + 2 + 33 lines) and
// keeps pixel/line sub-counters (0..2) so no divider is needed. Shade 0 is
// white and 3 is black, output as grey on 8-bit r/g/b.
// Interface/timing: outputs are registered two clocks after the raster
// counters (one for the buffer read, one for the colour); syncs and
// blank_n are delayed to match. hsync_n/vsync_n are active low.
// From the document: a VGA controller shows the PPU's video output. Own
// choices: 640x480 at 60 Hz, 3x scaling, the grey levels, and showing the
// buffer without frame locking (a frame can tear).
module gb_vga #(
  parameter int unsigned H_ACT = 640, H_FP = 16, H_SYNC = 96, H_BP = 48,
  parameter int unsigned V_ACT = 480, V_FP = 10, V_SYNC = 2,  V_BP = 33,
  parameter int unsigned SCALE = 3,
  parameter int unsigned GB_W = 160, GB_H = 144
) (
  input  logic       clk_gb,
  input  logic       pix_valid,
  input  logic [7:0] pix_x,
  input  logic [7:0] pix_y,
  input  logic [1:0] pix_shade,
  input  logic       clk_vga,
  input  logic       rst_n,
  output logic [7:0] vga_r,
  output logic [7:0] vga_g,
  output logic [7:0] vga_b,
  output logic       hsync_n,
  output logic       vsync_n,
  output logic       blank_n
);
  localparam int unsigned H_TOT = H_ACT + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = V_ACT + V_FP + V_SYNC + V_BP;
  localparam int unsigned X_OFF = (H_ACT - GB_W * SCALE) / 2;
  localparam int unsigned Y_OFF = (V_ACT - GB_H * SCALE) / 2;
  localparam int unsigned N_PIX = GB_W * GB_H;
  localparam int unsigned AW = $clog2(N_PIX);

  initial assert (GB_W * SCALE <= H_ACT && GB_H * SCALE <= V_ACT) else $error("picture does not fit");

  logic [1:0]  fb [N_PIX];
  logic [AW-1:0] wa, ra;
  logic [9:0]  hc, vc;
  logic [7:0]  px, py;
  logic [1:0]  sx, sy;
  logic        win, de, hs, vs;
  logic [1:0]  rd;
  logic        win_d, de_d, hs_d, vs_d;

  // write side
  assign wa = AW'(pix_y) * AW'(GB_W) + AW'(pix_x);
  always_ff @(posedge clk_gb) if (pix_valid && pix_x < 8'(GB_W) && pix_y < 8'(GB_H)) fb[wa] <= pix_shade;

  // raster
  always_ff @(posedge clk_vga or negedge rst_n) begin
    if (!rst_n) begin
      hc <= '0; vc <= '0; px <= '0; py <= '0; sx <= '0; sy <= '0;
    end else begin
      if (hc == 10'(X_OFF - 1)) begin px <= '0; sx <= '0; end
      else if (sx == 2'(SCALE - 1)) begin sx <= '0; px <= px + 8'd1; end
      else sx <= sx + 2'd1;
      if (hc == 10'(H_TOT - 1)) begin
        hc <= '0;
        vc <= (vc == 10'(V_TOT - 1)) ? 10'd0 : vc + 10'd1;
        if (vc == 10'(Y_OFF - 1)) begin py <= '0; sy <= '0; end
        else if (sy == 2'(SCALE - 1)) begin sy <= '0; py <= py + 8'd1; end
        else sy <= sy + 2'd1;
      end else hc <= hc + 10'd1;
    end
  end

  assign de  = hc < 10'(H_ACT) && vc < 10'(V_ACT);
  assign win = hc >= 10'(X_OFF) && hc < 10'(X_OFF + GB_W * SCALE) &&
               vc >= 10'(Y_OFF) && vc < 10'(Y_OFF + GB_H * SCALE);
  assign hs  = hc >= 10'(H_ACT + H_FP) && hc < 10'(H_ACT + H_FP + H_SYNC);
  assign vs  = vc >= 10'(V_ACT + V_FP) && vc < 10'(V_ACT + V_FP + V_SYNC);
  assign ra  = AW'(py) * AW'(GB_W) + AW'(px);

  // read side: buffer read, then colour
  always_ff @(posedge clk_vga) rd <= fb[win ? ra : '0];

  always_ff @(posedge clk_vga or negedge rst_n) begin
    if (!rst_n) begin
      win_d <= 1'b0; de_d <= 1'b0; hs_d <= 1'b0; vs_d <= 1'b0;
      vga_r <= '0; vga_g <= '0; vga_b <= '0; hsync_n <= 1'b1; vsync_n <= 1'b1; blank_n <= 1'b0;
    end else begin
      win_d <= win; de_d <= de; hs_d <= hs; vs_d <= vs;
      hsync_n <= !hs_d; vsync_n <= !vs_d; blank_n <= de_d;
      if (win_d) begin
        vga_r <= ~{4{rd}}; vga_g <= ~{4{rd}}; vga_b <= ~{4{rd}};
      end else begin
        vga_r <= '0; vga_g <= '0; vga_b <= '0;
      end
    end
  end
endmodule
