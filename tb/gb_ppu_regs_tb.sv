// gb_ppu_regs_tb: register write/read-back, read-only LY, STAT layout,
// and the interrupt comparators: LY=LYC, H-Blank, V-Blank and OAM-search
// sources pulse irq_stat once on the rising edge of their OR, and
// irq_vblank pulses on entry to V-Blank.
module gb_ppu_regs_tb;
  import gb_pkg::*;
  logic clk = 0, rst_n = 0, wr = 0, irq_stat, irq_vblank;
  logic [15:0] addr = 16'hFF40;
  logic [7:0] wdata = 0, rdata, ly = 0, lcdc, scy, scx, lyc, bgp, obp0, obp1, wy, wx;
  ppu_mode_e mode = MODE_HBLANK;
  int checks = 0, failures = 0, n_stat = 0, n_vb = 0;

  gb_ppu_regs dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin if (irq_stat) n_stat++; if (irq_vblank) n_vb++; end

  task automatic chk(input string s, input int got, input int exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s got %0h exp %0h", s, got, exp); end
  endtask
  task automatic w(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1; @(negedge clk); wr = 0;
  endtask
  task automatic r(input logic [15:0] a, output logic [7:0] d);
    addr = a; #1 d = rdata;
  endtask

  initial begin
    logic [7:0] d;
    #12 rst_n = 1;

    for (int a = 'hFF40; a <= 'hFF4B; a++) begin
      if (a == 'hFF41 || a == 'hFF44 || a == 'hFF46) continue;
      w(16'(a), 8'(a * 3 + 1)); r(16'(a), d); chk($sformatf("reg %h", a), d, (a * 3 + 1) & 255);
    end
    w(16'hFF40, 8'h80);
    ly = 8'd77; w(16'hFF44, 8'h12); r(16'hFF44, d); chk("LY read only", d, 77);
    w(16'hFF45, 8'd5); ly = 8'd4; mode = MODE_OAM;
    w(16'hFF41, 8'b0100_0000);              // LYC interrupt only
    n_stat = 0; repeat (3) @(negedge clk);
    chk("no stat irq yet", n_stat, 0);
    ly = 8'd5; repeat (3) @(negedge clk);
    chk("LYC irq", n_stat, 1);
    r(16'hFF41, d); chk("STAT", d, 8'b1100_0110);
    ly = 8'd6; w(16'hFF41, 8'b0000_1000);   // H-Blank
    n_stat = 0; mode = MODE_DRAW; repeat (2) @(negedge clk); mode = MODE_HBLANK; repeat (3) @(negedge clk);
    chk("HBlank irq", n_stat, 1);
    w(16'hFF41, 8'b0010_1000);              // OAM + HBlank: line stays high across H-Blank -> OAM
    n_stat = 0; mode = MODE_OAM; repeat (3) @(negedge clk);
    chk("no new edge while line stays high", n_stat, 0);
    mode = MODE_DRAW; repeat (2) @(negedge clk); mode = MODE_HBLANK; repeat (2) @(negedge clk);
    chk("edge after low", n_stat, 1);
    w(16'hFF41, 8'b0001_0000);              // V-Blank
    repeat (2) @(negedge clk); n_stat = 0; n_vb = 0; mode = MODE_VBLANK; repeat (3) @(negedge clk);
    chk("VBlank stat irq", n_stat, 1);
    chk("VBlank irq", n_vb, 1);
    w(16'hFF40, 8'h00); r(16'hFF41, d); chk("mode 0 when off", d[1:0], 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
