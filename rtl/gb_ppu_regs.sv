// gb_ppu_regs: the PPU's control registers and its interrupt comparators.
//   FF40 LCDC  FF41 STAT  FF42 SCY  FF43 SCX  FF44 LY (read only)
//   FF45 LYC   FF47 BGP   FF48 OBP0 FF49 OBP1 FF4A WY  FF4B WX
// The comparators watch the PPU's mode and line counter: STAT bits 3, 4, 5
// enable an interrupt at the start of H-Blank, V-Blank and OAM search, and
// bit 6 one when LY equals LYC (STAT bit 2 shows that match). These sources
// are ORed into one line and irq_stat pulses on its rising edge. irq_vblank
// pulses when the PPU enters V-Blank. Writes land on the clock where wr is
// high; reads are combinational and return FF for other addresses.
// Register addresses and bit meanings are the console's; the rising-edge
// STAT line is how the console behaves, as this design reads it.
module gb_ppu_regs
  import gb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] addr,
  input  logic        wr,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  input  logic [7:0]  ly,
  input  ppu_mode_e   mode,
  output logic [7:0]  lcdc,
  output logic [7:0]  scy,
  output logic [7:0]  scx,
  output logic [7:0]  lyc,
  output logic [7:0]  bgp,
  output logic [7:0]  obp0,
  output logic [7:0]  obp1,
  output logic [7:0]  wy,
  output logic [7:0]  wx,
  output logic        irq_stat,
  output logic        irq_vblank
);
  logic [3:0] stat_en;
  logic       coinc, line, line_q;
  ppu_mode_e  mode_q;

  assign coinc = (ly == lyc);
  assign line  = lcdc[7] && ((stat_en[3] && coinc) ||
                             (stat_en[0] && mode == MODE_HBLANK) ||
                             (stat_en[1] && mode == MODE_VBLANK) ||
                             (stat_en[2] && mode == MODE_OAM));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lcdc <= 8'h91; stat_en <= 4'h0; scy <= 8'h00; scx <= 8'h00; lyc <= 8'h00;
      bgp <= 8'hFC; obp0 <= 8'hFF; obp1 <= 8'hFF; wy <= 8'h00; wx <= 8'h00;
      line_q <= 1'b0; mode_q <= MODE_HBLANK; irq_stat <= 1'b0; irq_vblank <= 1'b0;
    end else begin
      if (wr) begin
        unique case (addr)
          16'hFF40: lcdc <= wdata;
          16'hFF41: stat_en <= wdata[6:3];
          16'hFF42: scy <= wdata;
          16'hFF43: scx <= wdata;
          16'hFF45: lyc <= wdata;
          16'hFF47: bgp <= wdata;
          16'hFF48: obp0 <= wdata;
          16'hFF49: obp1 <= wdata;
          16'hFF4A: wy <= wdata;
          16'hFF4B: wx <= wdata;
          default: ;
        endcase
      end
      line_q     <= line;
      mode_q     <= mode;
      irq_stat   <= line && !line_q;
      irq_vblank <= lcdc[7] && mode == MODE_VBLANK && mode_q != MODE_VBLANK;
    end
  end

  always_comb begin
    unique case (addr)
      16'hFF40: rdata = lcdc;
      16'hFF41: rdata = {1'b1, stat_en, coinc, lcdc[7] ? mode : MODE_HBLANK};
      16'hFF42: rdata = scy;
      16'hFF43: rdata = scx;
      16'hFF44: rdata = ly;
      16'hFF45: rdata = lyc;
      16'hFF47: rdata = bgp;
      16'hFF48: rdata = obp0;
      16'hFF49: rdata = obp1;
      16'hFF4A: rdata = wy;
      16'hFF4B: rdata = wx;
      default:  rdata = 8'hFF;
    endcase
  end
endmodule
