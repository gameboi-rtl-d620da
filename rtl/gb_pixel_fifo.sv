// gb_pixel_fifo: the PPU's pixel FIFO, DEPTH (16) entries of pix_t.
// The fetcher pushes a whole tile row (8 background pixels) at once when
// the FIFO has room (count <= DEPTH-8). The head pixel can be committed to
// the screen (pop) only while the FIFO holds at least 8 pixels, so a sprite
// about to start at the head can always be mixed over the next 8 pixels:
// mix writes a sprite's 8 pixels over entries 0..7, but only where
// mix_mask is set, the sprite pixel is not transparent and no earlier
// sprite pixel is already there (earlier sprites have the smaller X and win).
// Push and pop may happen on the same clock; mix must not coincide with
// either. clear empties the FIFO at the start of a line. restart (window
// start) drops the background pixels but keeps sprite pixels already mixed
// in place, so the window's pixels are pushed underneath them.
// The 8-pixel rule and the mixing rules are the document's; depth 16 and
// the whole-row push are this design's.
// Lint note: rst_n is reported as used both as an asynchronous reset and
// synchronously; the synchronous use is only an assertion's disable
// condition, so it stands.
module gb_pixel_fifo
  import gb_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        restart,
  input  logic        push,
  input  logic [15:0] push_row,   // {hi byte, lo byte} of a tile row, bit 7 = leftmost
  input  logic        pop,
  input  logic        mix,
  input  logic [1:0]  mix_color [8],
  input  logic [7:0]  mix_mask,
  input  logic        mix_pal,
  input  logic        mix_behind,
  output pix_t        head,
  output logic [4:0]  count,
  output logic        can_pop,
  output logic        can_push
);
  pix_t       q [DEPTH];
  pix_t       nq [DEPTH];
  logic [4:0] base;
  logic       do_pop, do_push;

  assign can_pop  = count >= 5'd8;
  assign can_push = count <= 5'(DEPTH - 8);
  assign do_pop   = pop && can_pop;
  assign do_push  = push && can_push;
  assign head     = q[0];

  always_comb begin
    for (int i = 0; i < DEPTH; i++) nq[i] = q[i];
    if (do_pop) begin
      for (int i = 0; i < DEPTH - 1; i++) nq[i] = q[i+1];
      nq[DEPTH-1] = '0;
    end
    base = count - {4'd0, do_pop};
    if (do_push) begin
      for (int j = 0; j < 8; j++)
        nq[4'(base + 5'(j))].bg = {push_row[15-j], push_row[7-j]};
    end
    if (mix) begin
      for (int j = 0; j < 8; j++)
        if (mix_mask[j] && mix_color[j] != 2'd0 && q[j].spr == 2'd0) begin
          nq[j].spr = mix_color[j]; nq[j].pal = mix_pal; nq[j].behind = mix_behind;
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= 5'd0;
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else if (clear) begin
      count <= 5'd0;
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else if (restart) begin
      count <= 5'd0;
    end else begin
      for (int i = 0; i < DEPTH; i++) q[i] <= nq[i];
      count <= base + (do_push ? 5'd8 : 5'd0);
    end
  end

  // a mix needs 8 pixels to overlay and must not race a pop or push
  a_mix_alone: assert property (@(posedge clk) disable iff (!rst_n) mix |-> !pop && !push && count >= 5'd8);
endmodule
