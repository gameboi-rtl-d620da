// gb_timer_tb: checks DIV's rate (one step per 256 clocks) and reset on
// write, TIMA's rate for two TAC settings, reload from TMA with an interrupt
// on overflow, and the 512 Hz frame-sequencer tick spacing (8192 clocks).
module gb_timer_tb;
  logic clk = 0, rst_n = 0, wr = 0, irq, fs_tick;
  logic [15:0] addr = 16'hFF04;
  logic [7:0] wdata = 0, rdata;
  int checks = 0, failures = 0, irqs = 0, ticks = 0, last_tick = 0, gap = 0, cyc = 0;

  gb_timer dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (irq) irqs++;
    if (fs_tick) begin ticks++; gap = cyc - last_tick; last_tick = cyc; end
  end

  task automatic chk(input string s, input int got, input int exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s got %0d exp %0d", s, got, exp); end
  endtask
  task automatic wreg(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1; @(negedge clk); wr = 0;
  endtask
  task automatic rreg(input logic [15:0] a, output logic [7:0] d);
    addr = a; #1 d = rdata;
  endtask

  initial begin
    logic [7:0] d;
    #12 rst_n = 1;
    wreg(16'hFF04, 8'h00);             // clear DIV
    repeat (256 * 5) @(negedge clk);
    rreg(16'hFF04, d); chk("DIV after 1280 clocks", d, 5);
    wreg(16'hFF04, 8'h55); rreg(16'hFF04, d); chk("DIV cleared", d, 0);
    // TAC=101: 262144 Hz, one TIMA step per 16 clocks
    wreg(16'hFF05, 8'h00); wreg(16'hFF06, 8'hF0); wreg(16'hFF04, 0); wreg(16'hFF07, 8'h05);
    repeat (16 * 10) @(negedge clk);
    rreg(16'hFF05, d); chk("TIMA at 262144 Hz", (d >= 9 && d <= 10) ? 1 : 0, 1);
    // overflow: start at FE
    wreg(16'hFF05, 8'hFE); irqs = 0;
    repeat (16 * 3) @(negedge clk);
    chk("overflow irq", irqs, 1);
    rreg(16'hFF05, d); chk("reloaded from TMA", (d >= 8'hF0 && d <= 8'hF1) ? 1 : 0, 1);
    // TAC=100: 4096 Hz, one step per 1024 clocks
    wreg(16'hFF05, 8'h00); wreg(16'hFF04, 0); wreg(16'hFF07, 8'h04);
    repeat (1024 * 3 + 100) @(negedge clk);
    rreg(16'hFF05, d); chk("TIMA at 4096 Hz", d, 3);
    wreg(16'hFF07, 8'h00); rreg(16'hFF07, d); chk("TAC read", d, 8'hF8);
    repeat (8192 * 3) @(negedge clk);
    chk("fs tick spacing", gap, 8192);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
