// gb_oam_scan: OAM search, sprite buffer and scanline comparators.
// OAM fetcher: after start (first dot of OAM search) it reads, one byte per
// clock through a synchronous OAM port, the Y and X bytes of all 40 OAM
// entries (81 clocks, on_line the 80-dot OAM search plus one). An entry is
// kept when the current line ly falls on_line it: Y <= ly + 16 < Y + height,
// with height 8 or 16 (LCDC bit 2, input tall). Sprite buffer: the first
// MAX_SPR (10) such entries, in OAM order, with their X, the row of the
// sprite that this line shows and their OAM index. Scanline comparators:
// while drawing, every buffered sprite not yet fetched is compared with the
// screen x of the next pixel; one whose X <= x + 8 is due. Of the due
// sprites the one with the smallest X (then the lowest OAM index) is
// reported, so the sprite at the smaller x-coordinate is mixed first and
// wins overlaps. skip tells how many of its leftmost pixels lie left of x
// (sprites partly off the left edge). mark_done retires the sprite once
// the PPU has mixed it. The 40-entry table, 10-per-line limit and
// comparator array are the document's; the one-byte-per-clock scan order
// is this design's.
module gb_oam_scan #(
  parameter int MAX_SPR = 10,
  parameter int N_OAM   = 40
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] ly,
  input  logic       tall,
  output logic [7:0] oam_addr,
  input  logic [7:0] oam_rdata,
  output logic       busy,
  // comparators
  input  logic       cmp_en,
  input  logic [7:0] cur_x,
  output logic       due,
  output logic [3:0] due_slot,
  output logic [5:0] due_idx,
  output logic [3:0] due_row,
  output logic [3:0] skip,
  input  logic       mark_done,
  output logic [3:0] n_spr
);
  logic [6:0] c;
  logic [7:0] y_q;
  logic [7:0] sx   [MAX_SPR];
  logic [3:0] srow [MAX_SPR];
  logic [5:0] sidx [MAX_SPR];
  logic [MAX_SPR-1:0] done;
  logic [8:0] line16, rel;
  logic       on_line;
  logic [5:0] ent;

  assign line16   = {1'b0, ly} + 9'd16;
  assign rel      = line16 - {1'b0, y_q};
  assign on_line   = (line16 >= {1'b0, y_q}) && (rel < (tall ? 9'd16 : 9'd8));
  assign ent      = 6'((c - 7'd2) >> 1);
  assign oam_addr = {c[6:1], 2'b00} | {7'd0, c[0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= 7'd0; busy <= 1'b0; y_q <= 8'd0; n_spr <= 4'd0; done <= '0;
      for (int s = 0; s < MAX_SPR; s++) begin sx[s] <= 8'd0; srow[s] <= 4'd0; sidx[s] <= 6'd0; end
    end else if (start) begin
      c <= 7'd0; busy <= 1'b1; n_spr <= 4'd0; done <= '0;
    end else begin
      if (busy) begin
        c <= c + 7'd1;
        if (c[0]) y_q <= oam_rdata;
        else if (c != 7'd0) begin
          if (on_line && n_spr < 4'(MAX_SPR)) begin
            sx[n_spr] <= oam_rdata; srow[n_spr] <= rel[3:0]; sidx[n_spr] <= ent;
            n_spr <= n_spr + 4'd1;
          end
          if (c == 7'(2 * N_OAM)) busy <= 1'b0;
        end
      end
      if (mark_done) done[due_slot] <= 1'b1;
    end
  end

  always_comb begin
    logic [8:0] diff;
    due = 1'b0; due_slot = 4'd0;
    for (int s = 0; s < MAX_SPR; s++) begin
      if (cmp_en && 4'(s) < n_spr && !done[s] && {1'b0, sx[s]} <= {1'b0, cur_x} + 9'd8)
        if (!due || sx[s] < sx[due_slot]) begin due = 1'b1; due_slot = 4'(s); end
    end
    due_idx = sidx[due_slot];
    due_row = srow[due_slot];
    diff    = {1'b0, cur_x} + 9'd8 - {1'b0, sx[due_slot]};
    skip    = (diff > 9'd8) ? 4'd8 : diff[3:0];
  end
endmodule
