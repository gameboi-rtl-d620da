// gb_bus: the memory map. Decodes the CPU's 16-bit address (or the OAM DMA
// engine's source address while DMA runs) onto the memories and registers:
//   0000-3FFF cartridge ROM bank 0       4000-7FFF switchable ROM bank
//   8000-9FFF VRAM (tile data, BG maps)  A000-BFFF cartridge RAM
//   C000-DFFF work RAM, E000-FDFF echo   FE00-FE9F OAM, FEA0-FEFF unusable
//   FF00-FF7F I/O registers              FF80-FFFE HRAM, FFFF IE
// Cartridge ROM and RAM are reached through one external port (the SDRAM
// that holds the game): cart_addr[22] = 0 selects ROM, 1 selects RAM.
// Bank switching is done here with MBC1-style registers: a write to
// 2000-3FFF selects the 16 KiB ROM bank seen at 4000-7FFF (0 acts as 1),
// 4000-5FFF the cartridge RAM bank, 0000-1FFF enables cartridge RAM
// (value xA). Access rules: VRAM is closed to the CPU while the PPU draws
// (mode 3) and OAM while it searches or draws (modes 2, 3); reads then
// return FF and writes are dropped. During DMA the CPU may only use
// FF00-FFFF. Writes occur once, on the ce edge that ends the machine cycle.
// Read data from the synchronous RAMs is selected by the same address,
// which stays stable for the whole machine cycle.
// The address map follows the documented layout; MBC1-style banking, the
// access locks and the single cartridge port are this design's choices.
module gb_bus #(
  parameter int ROM_BANK_BITS = 7
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  // CPU
  input  logic [15:0] cpu_addr,
  input  logic        cpu_rd,
  input  logic        cpu_wr,
  input  logic [7:0]  cpu_wdata,
  output logic [7:0]  cpu_rdata,
  // OAM DMA
  input  logic        dma_active,
  input  logic [15:0] dma_addr,
  output logic [7:0]  dma_rdata,
  input  logic        dma_oam_we,
  input  logic [7:0]  dma_oam_addr,
  input  logic [7:0]  dma_oam_wdata,
  // PPU state for access rules
  input  logic [1:0]  ppu_mode,
  input  logic        lcd_on,
  // I/O registers (FF00-FF7F and FFFF); unaddressed devices return FF
  output logic [15:0] io_addr,
  output logic        io_wr,
  output logic [7:0]  io_wdata,
  input  logic [7:0]  io_rdata,
  // memories
  output logic [12:0] vram_addr,
  output logic        vram_we,
  input  logic [7:0]  vram_rdata,
  output logic [7:0]  oam_addr,
  output logic        oam_we,
  output logic [7:0]  oam_wdata,
  input  logic [7:0]  oam_rdata,
  output logic [12:0] wram_addr,
  output logic        wram_we,
  input  logic [7:0]  wram_rdata,
  output logic [6:0]  hram_addr,
  output logic        hram_we,
  input  logic [7:0]  hram_rdata,
  output logic [7:0]  mem_wdata,
  // cartridge (external SDRAM)
  output logic [22:0] cart_addr,
  output logic        cart_rd,
  output logic        cart_wr,
  input  logic [7:0]  cart_rdata,
  output logic [ROM_BANK_BITS-1:0] rom_bank
);
  typedef enum logic [3:0] {RG_ROM, RG_VRAM, RG_CRAM, RG_WRAM, RG_OAM, RG_NONE, RG_IO, RG_HRAM} region_e;

  function automatic region_e region(input logic [15:0] a);
    if (a[15] == 1'b0)            return RG_ROM;
    if (a[15:13] == 3'b100)       return RG_VRAM;
    if (a[15:13] == 3'b101)       return RG_CRAM;
    if (a < 16'hFE00)             return RG_WRAM;
    if (a < 16'hFEA0)             return RG_OAM;
    if (a < 16'hFF00)             return RG_NONE;
    if (a >= 16'hFF80 && a != 16'hFFFF) return RG_HRAM;
    return RG_IO;
  endfunction

  logic [1:0]  ram_bank;
  logic        ram_en;
  logic [15:0] m_addr;
  region_e     m_rg, c_rg;
  logic        cpu_main, wr_stb, vram_ok, oam_ok;
  logic [7:0]  main_rdata;

  assign wr_stb  = cpu_wr & ce;
  assign c_rg    = region(cpu_addr);
  // the CPU owns the main bus unless DMA runs
  assign cpu_main = !dma_active;
  assign m_addr  = cpu_main ? cpu_addr : dma_addr;
  assign m_rg    = region(m_addr);
  assign vram_ok = !(lcd_on && ppu_mode == 2'd3);
  assign oam_ok  = !(lcd_on && ppu_mode[1]) && !dma_active;

  // MBC-style bank registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rom_bank <= ROM_BANK_BITS'(1); ram_bank <= 2'd0; ram_en <= 1'b0;
    end else if (wr_stb && cpu_main && c_rg == RG_ROM) begin
      unique case (cpu_addr[14:13])
        2'd0: ram_en <= (cpu_wdata[3:0] == 4'hA);
        2'd1: rom_bank <= (cpu_wdata[ROM_BANK_BITS-1:0] == '0) ? ROM_BANK_BITS'(1) : cpu_wdata[ROM_BANK_BITS-1:0];
        2'd2: ram_bank <= cpu_wdata[1:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    vram_addr = m_addr[12:0];
    wram_addr = m_addr[12:0];
    hram_addr = cpu_addr[6:0];
    io_addr   = cpu_addr;
    mem_wdata = cpu_wdata;
    vram_we   = wr_stb && cpu_main && c_rg == RG_VRAM && vram_ok;
    wram_we   = wr_stb && cpu_main && c_rg == RG_WRAM;
    hram_we   = wr_stb && c_rg == RG_HRAM;
    io_wr     = wr_stb && c_rg == RG_IO;
    io_wdata  = cpu_wdata;
    // OAM: DMA writes, otherwise the CPU within the access rules
    if (dma_oam_we) begin
      oam_addr = dma_oam_addr; oam_we = 1'b1; oam_wdata = dma_oam_wdata;
    end else begin
      oam_addr = cpu_addr[7:0]; oam_we = wr_stb && c_rg == RG_OAM && oam_ok; oam_wdata = cpu_wdata;
    end
    // cartridge
    if (m_rg == RG_CRAM) cart_addr = {1'b1, 7'd0, ram_bank, m_addr[12:0]};
    else if (m_addr[14])  cart_addr = {1'b0, 8'(rom_bank), m_addr[13:0]};
    else                  cart_addr = {1'b0, 8'd0, m_addr[13:0]};
    cart_rd = (m_rg == RG_ROM || (m_rg == RG_CRAM && ram_en)) && (dma_active || cpu_rd);
    cart_wr = cpu_main && wr_stb && c_rg == RG_CRAM && ram_en;
    // main bus read mux
    unique case (m_rg)
      RG_ROM:  main_rdata = cart_rdata;
      RG_CRAM: main_rdata = ram_en ? cart_rdata : 8'hFF;
      RG_VRAM: main_rdata = (vram_ok || dma_active) ? vram_rdata : 8'hFF;
      RG_WRAM: main_rdata = wram_rdata;
      RG_OAM:  main_rdata = oam_ok ? oam_rdata : 8'hFF;
      default: main_rdata = 8'hFF;
    endcase
    dma_rdata = main_rdata;
    unique case (c_rg)
      RG_HRAM: cpu_rdata = hram_rdata;
      RG_IO:   cpu_rdata = io_rdata;
      default: cpu_rdata = cpu_main ? main_rdata : 8'hFF;
    endcase
  end
endmodule
