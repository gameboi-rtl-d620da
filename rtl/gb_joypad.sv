// gb_joypad: the P1 joypad register (0xFF00) fed by eight button lines that
// the SoC drives on GPIO pins from the NES controller. buttons is active high
// and asynchronous, so it passes a two-flop synchroniser first. Bit order:
// 0 right, 1 left, 2 up, 3 down, 4 A, 5 B, 6 select, 7 start. Writing P1
// bits 4 (direction keys) and 5 (action keys) selects a group with a 0; the
// low nibble reads the selected keys active low. A 1-to-0 change of any
// selected line pulses irq for one clock (the joypad interrupt). The register
// layout is the console's; the bit order of the GPIO lines is this design's.
module gb_joypad (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  buttons,
  input  logic [15:0] addr,
  input  logic        wr,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  output logic        irq
);
  logic [7:0] sync1, sync2;
  logic [1:0] sel;
  logic [3:0] lines, lines_q;

  always_comb begin
    lines = 4'hF;
    if (!sel[0]) lines &= ~sync2[3:0];
    if (!sel[1]) lines &= ~sync2[7:4];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= 8'h00; sync2 <= 8'h00; sel <= 2'b11; lines_q <= 4'hF; irq <= 1'b0;
    end else begin
      sync1   <= buttons;
      sync2   <= sync1;
      if (wr && addr == 16'hFF00) sel <= wdata[5:4];
      lines_q <= lines;
      irq     <= |(lines_q & ~lines);
    end
  end

  assign rdata = (addr == 16'hFF00) ? {2'b11, sel, lines} : 8'hFF;
endmodule
