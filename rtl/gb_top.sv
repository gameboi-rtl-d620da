// gb_top: the whole Game Boy (DMG) machine. CPU, memory map, timer,
// interrupt controller, joypad, OAM DMA, PPU with its registers, APU, a
// VGA output with a frame buffer, a DAC interface and the game-switch
// handshake, wired as in the original console.
// How: clk is the 4.194304 MHz dot clock. The CPU advances one machine
// cycle on every fourth clock (ce), the PPU one dot per clock. All
// peripherals sit on one I/O bus (io_addr/io_wr/io_wdata); each returns
// FF when it is not addressed, so their read data are ANDed. VRAM (8 KiB)
// and OAM (160 bytes, 256 reserved) are dual-port RAMs: port A for the
// CPU/DMA through the memory map, port B for the PPU. Work RAM (8 KiB) and
// HRAM (127 bytes) are single-port. The game lives in external memory
// behind the cart_* port (cart_addr[22] selects cartridge RAM); it must
// return read data within three clocks of the address changing.
// Interface: buttons are active high {start, select, B, A, down, up, left,
// right}; switch_req/switch_ack is the game-switch handshake with the
// external controller (see gb_game_switch). While switch_ack is high the
// host_* port drives the memory map in place of the CPU: hold each access
// for 4 clocks; a write lands once per 4 clocks, read data is valid from
// the second clock on; cpu_pc, cpu_sp, cpu_af..cpu_hl and cpu_ime give
// the CPU registers to save. The usual access rules still apply (VRAM and OAM
// read FF while the PPU is drawing). The VGA outputs run on
// clk_vga (25.175 MHz); the DAC pins follow an AD669-style parallel load.
// Timing: rst_n is asynchronous. clear_state from the game switch is
// turned into a registered soft reset of everything except the switch
// logic and the VGA side. The serial port is not built, so its interrupt
// request (bit 3) is tied low.
// From the document: the block set and how they connect. Own choices: the
// clock-enable scheme, the ANDed read bus and the soft reset.
// Lint note: rst_n and sys_rst_n show up as used both as asynchronous
// resets and synchronously; the synchronous use is only the disable
// condition of assertions inside the blocks, so it stands.
module gb_top
  import gb_pkg::*;
(
  input  logic        clk,
  input  logic        clk_vga,
  input  logic        rst_n,
  input  logic [7:0]  buttons,
  input  logic        switch_req,
  output logic        switch_ack,
  input  logic [15:0] host_addr,     // memory access while switch_ack is high
  input  logic        host_rd,
  input  logic        host_wr,
  input  logic [7:0]  host_wdata,
  output logic [7:0]  host_rdata,
  output logic [22:0] cart_addr,
  output logic        cart_rd,
  output logic        cart_wr,
  output logic [7:0]  cart_wdata,
  input  logic [7:0]  cart_rdata,
  output logic [7:0]  vga_r,
  output logic [7:0]  vga_g,
  output logic [7:0]  vga_b,
  output logic        vga_hsync_n,
  output logic        vga_vsync_n,
  output logic        vga_blank_n,
  output logic [15:0] dac_db,
  output logic        dac_cs_n,
  output logic        dac_l1_n,
  output logic        dac_ldac,
  output logic        frame_done,
  output logic [15:0] cpu_pc,
  output logic [15:0] cpu_sp,
  output logic [15:0] cpu_af,
  output logic [15:0] cpu_bc,
  output logic [15:0] cpu_de,
  output logic [15:0] cpu_hl,
  output logic        cpu_ime,
  output logic        cpu_halted
);
  // ---------------- reset and clock enable
  logic clear_state, run_q, sys_rst_n;
  logic [1:0] ce_cnt;
  logic ce;

  // machine reset: the external reset, or a registered clear_state
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) run_q <= 1'b0;
    else        run_q <= !clear_state;
  assign sys_rst_n = rst_n && run_q;

  always_ff @(posedge clk or negedge sys_rst_n)
    if (!sys_rst_n) ce_cnt <= '0;
    else            ce_cnt <= ce_cnt + 2'd1;
  assign ce = ce_cnt == 2'd3;

  // ---------------- CPU
  logic [15:0] cpu_addr;
  logic        cpu_rd, cpu_wr, paused, pause_req, instr_done;
  logic [7:0]  cpu_wdata, cpu_rdata;
  logic [15:0] bus_addr;
  logic        bus_rd, bus_wr;
  logic [7:0]  bus_wdata;
  logic [4:0]  irq_pending, irq_ack, irq_req;

  gb_cpu u_cpu (
    .clk, .rst_n(sys_rst_n), .ce,
    .mem_addr(cpu_addr), .mem_rd(cpu_rd), .mem_wr(cpu_wr), .mem_wdata(cpu_wdata), .mem_rdata(cpu_rdata),
    .irq_pending, .irq_ack, .pause_req, .paused, .halted(cpu_halted),
    .pc_o(cpu_pc), .sp_o(cpu_sp), .af_o(cpu_af), .bc_o(cpu_bc), .de_o(cpu_de), .hl_o(cpu_hl),
    .ime_o(cpu_ime), .instr_done
  );

  // ---------------- memory map
  // While the machine is stopped for a game switch, the host owns the bus:
  // it can read and write the whole address space to save or load state.
  always_comb begin
    if (switch_ack) begin
      bus_addr = host_addr; bus_rd = host_rd; bus_wr = host_wr; bus_wdata = host_wdata;
    end else begin
      bus_addr = cpu_addr;  bus_rd = cpu_rd;  bus_wr = cpu_wr;  bus_wdata = cpu_wdata;
    end
  end
  assign host_rdata = cpu_rdata;
  logic        dma_active, dma_oam_we;
  logic [15:0] dma_src;
  logic [7:0]  dma_rdata, dma_oam_addr, dma_oam_wdata;
  ppu_mode_e   ppu_mode;
  logic [7:0]  lcdc, scy, scx, lyc, bgp, obp0, obp1, wy, wx, ly;
  logic [15:0] io_addr;
  logic        io_wr;
  logic [7:0]  io_wdata, io_rdata;
  logic [12:0] vram_addr, wram_addr, ppu_vram_addr;
  logic [7:0]  oam_addr, ppu_oam_addr, oam_wdata, mem_wdata;
  logic [6:0]  hram_addr;
  logic        vram_we, oam_we, wram_we, hram_we;
  logic [7:0]  vram_rdata, oam_rdata, wram_rdata, hram_rdata, ppu_vram_rdata, ppu_oam_rdata;

  gb_bus u_bus (
    .clk, .rst_n(sys_rst_n), .ce,
    .cpu_addr(bus_addr), .cpu_rd(bus_rd), .cpu_wr(bus_wr), .cpu_wdata(bus_wdata), .cpu_rdata,
    .dma_active, .dma_addr(dma_src), .dma_rdata,
    .dma_oam_we, .dma_oam_addr, .dma_oam_wdata,
    .ppu_mode(ppu_mode), .lcd_on(lcdc[7]),
    .io_addr, .io_wr, .io_wdata, .io_rdata,
    .vram_addr, .vram_we, .vram_rdata,
    .oam_addr, .oam_we, .oam_wdata, .oam_rdata,
    .wram_addr, .wram_we, .wram_rdata,
    .hram_addr, .hram_we, .hram_rdata, .mem_wdata,
    .cart_addr, .cart_rd, .cart_wr, .cart_rdata, .rom_bank()
  );
  assign cart_wdata = mem_wdata;

  gb_dpram #(.AW(13)) u_vram (
    .clk, .a_addr(vram_addr), .a_we(vram_we), .a_wdata(mem_wdata), .a_rdata(vram_rdata),
    .b_addr(ppu_vram_addr), .b_rdata(ppu_vram_rdata)
  );
  gb_dpram #(.AW(8)) u_oam (
    .clk, .a_addr(oam_addr), .a_we(oam_we), .a_wdata(oam_wdata), .a_rdata(oam_rdata),
    .b_addr(ppu_oam_addr), .b_rdata(ppu_oam_rdata)
  );
  gb_dpram #(.AW(13)) u_wram (
    .clk, .a_addr(wram_addr), .a_we(wram_we), .a_wdata(mem_wdata), .a_rdata(wram_rdata),
    .b_addr('0), .b_rdata()
  );
  gb_dpram #(.AW(7)) u_hram (
    .clk, .a_addr(hram_addr), .a_we(hram_we), .a_wdata(mem_wdata), .a_rdata(hram_rdata),
    .b_addr('0), .b_rdata()
  );

  // ---------------- I/O peripherals
  logic [7:0] rd_joy, rd_tim, rd_irq, rd_dma, rd_ppu, rd_apu;
  logic       irq_joy, irq_tim, irq_stat, irq_vbl, fs_tick;

  gb_joypad u_joy (
    .clk, .rst_n(sys_rst_n), .buttons, .addr(io_addr), .wr(io_wr), .wdata(io_wdata), .rdata(rd_joy), .irq(irq_joy)
  );
  gb_timer u_tim (
    .clk, .rst_n(sys_rst_n), .addr(io_addr), .wr(io_wr), .wdata(io_wdata), .rdata(rd_tim), .irq(irq_tim), .fs_tick
  );
  assign irq_req = {irq_joy, 1'b0, irq_tim, irq_stat, irq_vbl};
  gb_irq_ctrl u_irq (
    .clk, .rst_n(sys_rst_n), .addr(io_addr), .wr(io_wr), .wdata(io_wdata), .rdata(rd_irq),
    .irq_req, .irq_ack, .irq_pending
  );
  gb_dma u_dma (
    .clk, .rst_n(sys_rst_n), .ce, .addr(io_addr), .wr(io_wr), .wdata(io_wdata), .rdata(rd_dma),
    .active(dma_active), .src_addr(dma_src), .src_data(dma_rdata),
    .oam_we(dma_oam_we), .oam_addr(dma_oam_addr), .oam_wdata(dma_oam_wdata)
  );
  gb_ppu_regs u_ppu_regs (
    .clk, .rst_n(sys_rst_n), .addr(io_addr), .wr(io_wr), .wdata(io_wdata), .rdata(rd_ppu),
    .ly, .mode(ppu_mode), .lcdc, .scy, .scx, .lyc, .bgp, .obp0, .obp1, .wy, .wx,
    .irq_stat, .irq_vblank(irq_vbl)
  );

  // ---------------- PPU and video out
  logic       pix_valid;
  logic [7:0] pix_x, pix_y;
  logic [1:0] pix_shade;

  gb_ppu u_ppu (
    .clk, .rst_n(sys_rst_n), .lcdc, .scy, .scx, .wy, .wx, .bgp, .obp0, .obp1,
    .vram_addr(ppu_vram_addr), .vram_rdata(ppu_vram_rdata),
    .oam_addr(ppu_oam_addr), .oam_rdata(ppu_oam_rdata),
    .mode(ppu_mode), .ly, .pix_valid, .pix_x, .pix_y, .pix_shade, .frame_done
  );
  gb_vga u_vga (
    .clk_gb(clk), .pix_valid, .pix_x, .pix_y, .pix_shade,
    .clk_vga, .rst_n, .vga_r, .vga_g, .vga_b,
    .hsync_n(vga_hsync_n), .vsync_n(vga_vsync_n), .blank_n(vga_blank_n)
  );

  // ---------------- audio
  logic signed [15:0] apu_l, apu_r, apu_mono;

  gb_apu u_apu (
    .clk, .rst_n(sys_rst_n), .addr(io_addr), .wr(io_wr), .wdata(io_wdata), .rdata(rd_apu),
    .fs_tick, .left(apu_l), .right(apu_r), .mono(apu_mono)
  );
  gb_dac_if u_dac (
    .clk, .rst_n(sys_rst_n), .sample(apu_mono),
    .db(dac_db), .cs_n(dac_cs_n), .l1_n(dac_l1_n), .ldac(dac_ldac), .strobe()
  );

  assign io_rdata = rd_joy & rd_tim & rd_irq & rd_dma & rd_ppu & rd_apu;

  // ---------------- game switching
  gb_game_switch u_switch (
    .clk, .rst_n, .switch_req, .frame_done, .paused, .pause_req,
    .switch_ack, .clear_state, .busy()
  );
endmodule
