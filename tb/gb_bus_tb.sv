// gb_bus_tb: puts gb_bus between a scripted CPU port and model memories
// (VRAM, OAM, WRAM, HRAM as gb_dpram, cartridge ROM/RAM and I/O as
// functions of the address) with ce every fourth clock. Checks the region
// each address reaches, echo RAM, ROM bank switching, cartridge RAM enable,
// the VRAM/OAM lock-out during PPU modes 3 and 2, and the CPU's HRAM-only
// access during DMA.
module gb_bus_tb;
  logic clk = 0, rst_n = 0, ce = 0;
  logic [15:0] cpu_addr = 0, dma_addr = 0, io_addr;
  logic cpu_rd = 0, cpu_wr = 0, dma_active = 0, dma_oam_we = 0, lcd_on = 1;
  logic [7:0] cpu_wdata = 0, cpu_rdata, dma_rdata, dma_oam_addr = 0, dma_oam_wdata = 0;
  logic [1:0] ppu_mode = 0;
  logic io_wr, vram_we, oam_we, wram_we, hram_we, cart_rd, cart_wr;
  logic [7:0] io_wdata, io_rdata, vram_rdata, oam_addr, oam_wdata, oam_rdata, wram_rdata, hram_rdata, mem_wdata, cart_rdata;
  logic [12:0] vram_addr, wram_addr;
  logic [6:0] hram_addr;
  logic [22:0] cart_addr;
  logic [6:0] rom_bank;
  logic [7:0] cram [8192];
  int checks = 0, failures = 0, cyc = 0;

  gb_bus dut (.*);
  gb_dpram #(.AW(13)) u_vram (.clk, .a_addr(vram_addr), .a_we(vram_we), .a_wdata(mem_wdata), .a_rdata(vram_rdata), .b_addr(13'd0), .b_rdata());
  gb_dpram #(.AW(13)) u_wram (.clk, .a_addr(wram_addr), .a_we(wram_we), .a_wdata(mem_wdata), .a_rdata(wram_rdata), .b_addr(13'd0), .b_rdata());
  gb_dpram #(.AW(8))  u_oam  (.clk, .a_addr(oam_addr), .a_we(oam_we), .a_wdata(oam_wdata), .a_rdata(oam_rdata), .b_addr(8'd0), .b_rdata());
  gb_dpram #(.AW(7))  u_hram (.clk, .a_addr(hram_addr), .a_we(hram_we), .a_wdata(mem_wdata), .a_rdata(hram_rdata), .b_addr(7'd0), .b_rdata());

  // cartridge ROM content is a function of the address; cartridge RAM a map
  always_ff @(posedge clk) begin
    if (cart_wr) cram[cart_addr[12:0]] <= mem_wdata;
    if (cart_addr[22]) cart_rdata <= cram[cart_addr[12:0]];
    else cart_rdata <= cart_addr[21:14] ^ cart_addr[7:0];
  end
  assign io_rdata = (io_addr == 16'hFF42) ? 8'h42 : 8'hFF;

  always #5 clk = ~clk;
  always @(posedge clk) begin cyc++; ce <= (cyc % 4 == 3); end

  task automatic chk(input string s, input int got, input int exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", s, got, exp); end
  endtask
  // one machine cycle: present at a ce edge, sample at the next
  task automatic wr(input logic [15:0] a, input logic [7:0] d);
    @(posedge clk iff ce); #1 cpu_addr = a; cpu_wdata = d; cpu_wr = 1; cpu_rd = 0;
    @(posedge clk iff ce); #1 cpu_wr = 0;
  endtask
  task automatic rd(input logic [15:0] a, output logic [7:0] d);
    @(posedge clk iff ce); #1 cpu_addr = a; cpu_rd = 1;
    @(negedge clk iff ce); d = cpu_rdata; cpu_rd = 0;
  endtask

  initial begin
    logic [7:0] d;
    #12 rst_n = 1;
    wr(16'hC123, 8'h11); rd(16'hC123, d); chk("WRAM", d, 8'h11);
    rd(16'hE123, d); chk("echo RAM", d, 8'h11);
    wr(16'h8010, 8'h22); rd(16'h8010, d); chk("VRAM", d, 8'h22);
    wr(16'hFE05, 8'h33); rd(16'hFE05, d); chk("OAM", d, 8'h33);
    wr(16'hFF90, 8'h44); rd(16'hFF90, d); chk("HRAM", d, 8'h44);
    rd(16'hFF42, d); chk("IO", d, 8'h42);
    rd(16'hFEA5, d); chk("unusable", d, 8'hFF);
    rd(16'h0123, d); chk("ROM bank 0", d, 8'h23);
    rd(16'h4123, d); chk("ROM bank 1 default", d, 8'h22);
    wr(16'h2000, 8'h05); rd(16'h4123, d); chk("ROM bank 5", d, 8'h26);
    wr(16'h2000, 8'h00); rd(16'h4123, d); chk("ROM bank 0 acts as 1", d, 8'h22);
    wr(16'hA010, 8'h55); rd(16'hA010, d); chk("cart RAM disabled", d, 8'hFF);
    wr(16'h0000, 8'h0A); wr(16'hA010, 8'h55); rd(16'hA010, d); chk("cart RAM enabled", d, 8'h55);
    ppu_mode = 2'd3;
    rd(16'h8010, d); chk("VRAM locked in mode 3", d, 8'hFF);
    wr(16'h8010, 8'h99);
    ppu_mode = 2'd2;
    rd(16'h8010, d); chk("VRAM write in mode 3 dropped", d, 8'h22);
    rd(16'hFE05, d); chk("OAM locked in mode 2", d, 8'hFF);
    ppu_mode = 2'd0;
    dma_active = 1; dma_addr = 16'hC123;
    rd(16'hC123, d); chk("CPU blocked during DMA", d, 8'hFF);
    chk("DMA source read", dma_rdata, 8'h11);
    rd(16'hFF90, d); chk("HRAM during DMA", d, 8'h44);
    dma_active = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
