// gb_top_tb: end-to-end run of the whole machine at its default sizes.
// A cartridge model (64 KiB ROM = four 16 KiB banks, 8 KiB RAM) answers
// the cart_* port. The ROM holds a small program, built here byte by byte:
// it turns the LCD off, clears VRAM, draws three tiles (background colour
// 1, window colour 2, sprite colour 3), fills the window map, places one
// sprite through OAM DMA (waiting in a routine copied to HRAM), sets the
// palettes, window, LY=LYC STAT interrupt, timer, joypad and a pulse voice,
// reads two switched ROM banks, enables interrupts and then loops reading
// VRAM and halting. Interrupt handlers count in HRAM.
// Checks: every pixel of two whole frames against the expected picture
// (background, sprite rectangle, window band), the bank markers read by
// the program, handler counters, and a game switch in the middle: the
// machine must stop at a frame end, acknowledge, let the host read and
// write memory through the host port, then restart the program and
// draw the same frames again. Each mechanism is counted and a count of
// zero is a failure. It also measures the frame period (59.73 fps) and
// the delay from a button press to the joypad interrupt handler.
module gb_top_tb;
  logic        clk = 0, clk_vga = 0, rst_n = 0, switch_req = 0, switch_ack;
  logic [7:0]  buttons = 0;
  logic [22:0] cart_addr;
  logic        cart_rd, cart_wr, frame_done, cpu_halted;
  logic [7:0]  cart_wdata, cart_rdata;
  logic [7:0]  vga_r, vga_g, vga_b;
  logic        vga_hsync_n, vga_vsync_n, vga_blank_n;
  logic [15:0] dac_db, cpu_pc, cpu_sp, cpu_af, cpu_bc, cpu_de, cpu_hl;
  logic        cpu_ime;
  logic        dac_cs_n, dac_l1_n, dac_ldac;
  logic [15:0] host_addr = 0;
  logic        host_rd = 0, host_wr = 0;
  logic [7:0]  host_wdata = 0, host_rdata;
  int          n_host = 0;

  logic [7:0]  rom [65536];
  logic [7:0]  cram [8192];
  int          checks = 0, failures = 0, wp = 0;

  gb_top dut (.*);
  always #119 clk = ~clk;      // 4.19 MHz
  always #20  clk_vga = ~clk_vga;

  assign cart_rdata = cart_addr[22] ? cram[cart_addr[12:0]] : rom[cart_addr[15:0]];
  always @(posedge clk) if (cart_wr) cram[cart_addr[12:0]] <= cart_wdata;

  task automatic chk(input string s, input int got, input int exp);
    checks++; if (got !== exp) begin failures++; if (failures < 30) $display("FAIL %s got %0h exp %0h", s, got, exp); end
  endtask
  task automatic org(input int a); wp = a; endtask
  task automatic emit(input logic [7:0] b[]);
    foreach (b[i]) begin rom[wp] = b[i]; wp++; end
  endtask
  // handler: PUSH AF; LDH A,(n); INC A; LDH (n),A; POP AF; RETI
  task automatic handler(input int a, input logic [7:0] n);
    org(a); emit('{8'hF5, 8'hF0, n, 8'h3C, 8'hE0, n, 8'hF1, 8'hD9});
  endtask

  task automatic build_rom();
    foreach (rom[i]) rom[i] = 8'h00;
    rom['h8000] = 8'hB2; rom['hC000] = 8'hB3;          // bank 2 and 3 markers at 4000
    handler('h40, 8'h81); handler('h48, 8'h82); handler('h50, 8'h83); handler('h60, 8'h84);
    org('h100); emit('{8'h00, 8'hC3, 8'h50, 8'h01});
    org('h150);
    emit('{8'hF3, 8'h31, 8'hFE, 8'hFF, 8'hAF});                         // DI; LD SP; XOR A
    emit('{8'hE0, 8'h80, 8'hE0, 8'h81, 8'hE0, 8'h82, 8'hE0, 8'h83, 8'hE0, 8'h84, 8'hE0, 8'h40}); // clear counters, LCD off
    emit('{8'h21, 8'h00, 8'h80, 8'hAF, 8'h22, 8'h7C, 8'hFE, 8'hA0, 8'h20, 8'hF9}); // clear VRAM
    emit('{8'h21, 8'h00, 8'h80, 8'h06, 8'h08, 8'h3E, 8'hFF, 8'h22, 8'hAF, 8'h22, 8'h05, 8'h20, 8'hF8}); // tile 0
    emit('{8'h06, 8'h08, 8'hAF, 8'h22, 8'h3E, 8'hFF, 8'h22, 8'h05, 8'h20, 8'hF8});                   // tile 1
    emit('{8'h06, 8'h10, 8'h3E, 8'hFF, 8'h22, 8'h05, 8'h20, 8'hFA});                                 // tile 2
    emit('{8'h21, 8'h00, 8'h9C, 8'h3E, 8'h01, 8'h22, 8'h7C, 8'hFE, 8'hA0, 8'h20, 8'hF8});          // window map = 1
    emit('{8'h21, 8'h00, 8'hC1, 8'hAF, 8'h22, 8'h7D, 8'hFE, 8'hA0, 8'h20, 8'hF9});                 // clear C100-C19F
    emit('{8'h3E, 8'h42, 8'hEA, 8'h00, 8'hC1, 8'h3E, 8'h30, 8'hEA, 8'h01, 8'hC1, 8'h3E, 8'h02, 8'hEA, 8'h02, 8'hC1});
    // copy the DMA routine to FF90: LD A,C1; LDH (46),A; LD A,2A; DEC A; JR NZ,-3; RET
    emit('{8'h21, 8'h90, 8'hFF});
    foreach (dma_code[i]) emit('{8'h3E, dma_code[i], 8'h22});
    emit('{8'hCD, 8'h90, 8'hFF});                                      // CALL FF90
    emit('{8'h3E, 8'hE4, 8'hE0, 8'h47, 8'hE0, 8'h48});                 // BGP, OBP0
    emit('{8'h3E, 8'h64, 8'hE0, 8'h4A, 8'h3E, 8'h07, 8'hE0, 8'h4B});   // WY=100, WX=7
    emit('{8'h3E, 8'h40, 8'hE0, 8'h45, 8'hE0, 8'h41});                 // LYC=64, STAT LYC interrupt
    emit('{8'hAF, 8'hE0, 8'h06, 8'h3E, 8'h05, 8'hE0, 8'h07});          // TMA=0, TAC=05
    emit('{8'h3E, 8'h80, 8'hE0, 8'h26, 8'h3E, 8'h77, 8'hE0, 8'h24, 8'h3E, 8'hFF, 8'hE0, 8'h25,
           8'h3E, 8'hF0, 8'hE0, 8'h12, 8'h3E, 8'h80, 8'hE0, 8'h11, 8'hAF, 8'hE0, 8'h13, 8'h3E, 8'h87, 8'hE0, 8'h14});
    emit('{8'hAF, 8'hE0, 8'h00});                                      // P1: both groups
    emit('{8'h3E, 8'h02, 8'hEA, 8'h00, 8'h20, 8'hFA, 8'h00, 8'h40, 8'hE0, 8'h85}); // bank 2
    emit('{8'h3E, 8'h03, 8'hEA, 8'h00, 8'h20, 8'hFA, 8'h00, 8'h40, 8'hE0, 8'h86}); // bank 3
    emit('{8'hAF, 8'hE0, 8'h0F, 8'h3E, 8'h17, 8'hE0, 8'hFF});          // IF=0, IE=VBL|STAT|TIM|JOY
    emit('{8'h3E, 8'hF3, 8'hE0, 8'h40});                               // LCD on, window, sprites
    emit('{8'h3E, 8'h5A, 8'hE0, 8'h80, 8'hFB});                        // marker, EI
    emit('{8'hFA, 8'h00, 8'h80, 8'hE0, 8'h87, 8'h76, 8'h18, 8'hF8});   // loop: read VRAM, HALT
  endtask
  logic [7:0] dma_code [10] = '{8'h3E, 8'hC1, 8'hE0, 8'h46, 8'h3E, 8'h2A, 8'h3D, 8'h20, 8'hFD, 8'hC9};

  function automatic int hram(input int a); return int'(dut.u_hram.mem[a - 'hFF80]); endfunction

  // ---------------- mechanism counters
  int n_vbl, n_stat, n_tim, n_joy, n_dma, n_halt, n_vlock, n_olock, n_bank, n_frames, n_mix, n_win,
      n_stall, n_sfetch, n_switch, n_restart, n_dac, n_vga_frames, n_pix_checked;
  logic dma_q = 0, halt_q = 0, ldac_q = 0, vs_q = 1, ack_q = 0;
  bit checking = 0;
  longint last_fd = -1, fd_period = 0, press_t = -1, joy_lat = -1, clk_n = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.irq_ack[0]) n_vbl++;
    if (dut.irq_ack[1]) n_stat++;
    if (dut.irq_ack[2]) n_tim++;
    if (dut.irq_ack[4]) n_joy++;
    if (dut.dma_active && !dma_q) n_dma++;
    if (cpu_halted && !halt_q) n_halt++;
    if (dut.ce && dut.cpu_rd && dut.cpu_addr[15:13] == 3'b100 && dut.lcdc[7] && dut.ppu_mode == 2'd3) n_vlock++;
    if (dut.ce && dut.cpu_rd && dut.dma_active && dut.cpu_addr >= 16'hFF80) n_olock++;
    if (cart_rd && !cart_addr[22] && cart_addr[15:14] >= 2'd2) n_bank++;
    clk_n++;
    if (frame_done) begin n_frames++; if (last_fd >= 0) fd_period = clk_n - last_fd; last_fd = clk_n; end
    if (dut.irq_ack[4] && press_t >= 0 && joy_lat < 0) joy_lat = clk_n - press_t;
    if (dut.u_ppu.fst == dut.u_ppu.S_MIX) n_mix++;
    if (dut.u_ppu.win_hit) n_win++;
    if (dut.u_ppu.drawing && !dut.pix_valid) n_stall++;
    if (dut.u_ppu.fst == dut.u_ppu.S_TILE) n_sfetch++;
    if (switch_ack && !ack_q) n_switch++;
    if (dac_ldac && !ldac_q && dac_db != 16'h0000) n_dac++;
    dma_q <= dut.dma_active; halt_q <= cpu_halted; ldac_q <= dac_ldac; ack_q <= switch_ack;
  end
  always @(posedge clk_vga) begin
    if (!vga_vsync_n && vs_q) n_vga_frames++;
    vs_q <= vga_vsync_n;
  end

  // ---------------- picture check
  function automatic int expect_shade(input int x, input int y);
    if (y >= 100) return 2;                                  // window band
    if (x >= 40 && x < 48 && y >= 50 && y < 58) return 3;    // sprite
    return 1;                                                // background tile 0
  endfunction
  always @(posedge clk) if (checking && dut.pix_valid) begin
    n_pix_checked++;
    chk($sformatf("pixel %0d,%0d", dut.pix_x, dut.pix_y), dut.pix_shade, expect_shade(dut.pix_x, dut.pix_y));
  end

  // host access while the machine is stopped: hold each access 4 clocks
  task automatic host_write(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); host_addr = a; host_wdata = d; host_wr = 1;
    repeat (4) @(negedge clk); host_wr = 0; n_host++;
  endtask
  task automatic host_read(input logic [15:0] a, output logic [7:0] d);
    @(negedge clk); host_addr = a; host_rd = 1;
    repeat (4) @(negedge clk); d = host_rdata; host_rd = 0; n_host++;
  endtask

  task automatic run_and_check_frames();
    while (hram('hFF80) != 'h5A) @(posedge clk);
    @(posedge frame_done); @(posedge clk);
    checking = 1;
    repeat (2) begin @(posedge frame_done); @(posedge clk); end
    checking = 0;
    chk("bank 2 marker", hram('hFF85), 'hB2);
    chk("bank 3 marker", hram('hFF86), 'hB3);
    chk("vblank handler ran", hram('hFF81) > 0 ? 1 : 0, 1);
    chk("timer handler ran", hram('hFF83) > 0 ? 1 : 0, 1);
  endtask

  initial begin
    build_rom();
    foreach (cram[i]) cram[i] = 8'h00;
    repeat (5) @(posedge clk);
    rst_n = 1;
    run_and_check_frames();
    chk("pixels in two frames", n_pix_checked, 2 * 160 * 144);
    buttons = 8'h01; press_t = clk_n;                 // press "right": joypad interrupt
    repeat (2000) @(posedge clk);
    buttons = 8'h00;
    chk("stat handler ran", hram('hFF82) > 0 ? 1 : 0, 1);
    chk("joypad handler ran", hram('hFF84) > 0 ? 1 : 0, 1);
    // game switch: stop at frame end, hold, release, program restarts
    switch_req = 1;
    wait (switch_ack);
    chk("stopped right after a frame", dut.ly, 144);
    chk("cpu paused", dut.paused, 1);
    begin
      logic [7:0] d;
      chk("saved DE untouched since reset", cpu_de, 'h00D8);
      chk("saved HL after the HRAM copy loop", cpu_hl, 'hFF9A);
      chk("saved SP in HRAM", cpu_sp[15:8], 'hFF);
      host_read(16'hFF85, d);  chk("host reads HRAM (bank marker)", d, 'hB2);
      host_read(16'h0101, d);  chk("host reads ROM", d, 'hC3);
      host_write(16'hC200, 8'h3C); host_read(16'hC200, d); chk("host write/read WRAM", d, 'h3C);
      host_write(16'hC201, 8'hA5); host_read(16'hC201, d); chk("host write/read WRAM 2", d, 'hA5);
    end
    repeat (500) @(posedge clk);
    chk("still stopped", dut.paused, 1);
    switch_req = 0;
    wait (dut.clear_state); repeat (3) @(posedge clk);
    if (cpu_pc == 16'h0101 && dut.u_cpu.mem_addr == 16'h0100) n_restart++;   // first fetch from 0100 pending
    while (hram('hFF80) != 'h00) @(posedge clk);
    n_pix_checked = 0;
    run_and_check_frames();
    chk("pixels after switch", n_pix_checked, 2 * 160 * 144);

    chk("vblank interrupts", n_vbl > 0, 1);      chk("stat interrupts", n_stat > 0, 1);
    chk("one LY=LYC interrupt per frame", n_stat <= n_frames + 2, 1);
    chk("timer handler runs more than stat handler", hram(32'hFF83) > hram(32'hFF82), 1);
    chk("timer interrupts", n_tim > 0, 1);       chk("joypad interrupts", n_joy > 0, 1);
    chk("oam dma", n_dma, 2);                    chk("halt", n_halt > 0, 1);
    chk("vram locked in mode 3", n_vlock > 0, 1); chk("cpu runs from hram during dma", n_olock > 0, 1);
    chk("switched rom bank reads", n_bank > 0, 1); chk("frames", n_frames > 0, 1);
    chk("sprite mix", n_mix > 0, 1);             chk("window starts", n_win > 0, 1);
    chk("fifo stalls", n_stall > 0, 1);          chk("sprite fetches", n_sfetch > 0, 1);
    chk("host accesses", n_host, 6);
    chk("game switch", n_switch, 1);             chk("restart", n_restart, 1);
    chk("frame period 70224 clocks (59.73 fps)", int'(fd_period), 70224);
    chk("button to handler below 55 ms", (joy_lat > 0 && joy_lat * 1000 < 55 * 4194304) ? 1 : 0, 1);
    chk("dac loads", n_dac > 0, 1);              chk("vga frames", n_vga_frames > 0, 1);
    $display("counts: vbl=%0d stat=%0d tim=%0d joy=%0d dma=%0d halt=%0d vlock=%0d bank=%0d frames=%0d mix=%0d win=%0d stall=%0d sfetch=%0d switch=%0d dac=%0d vga=%0d",
             n_vbl, n_stat, n_tim, n_joy, n_dma, n_halt, n_vlock, n_bank, n_frames, n_mix, n_win, n_stall, n_sfetch, n_switch, n_dac, n_vga_frames);
    $display("frame period %0d clocks, button-to-handler latency %0d clocks", fd_period, joy_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (4000000) @(posedge clk);
    failures++; $display("watchdog: pc=%h ff80=%h ff85=%h lcdc=%h frames=%0d halt=%0d tim=%0d ack=%0d paused=%0d sw=%0d chk=%0d", cpu_pc, hram(32'hFF80), hram(32'hFF85), dut.lcdc, n_frames, n_halt, n_tim, switch_ack, dut.paused, dut.u_switch.st, checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
