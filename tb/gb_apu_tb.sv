// gb_apu_tb: register map of the APU through its bus port: read masks,
// wave RAM, triggering a voice (NR52 status bit), the length counter run
// by the frame-sequencer tick, the mixer output moving, and power-down
// clearing the registers.
module gb_apu_tb;
  logic clk = 0, rst_n = 0, wr = 0, fs_tick = 0;
  logic [15:0] addr = 16'hFF26;
  logic [7:0] wdata = 0, rdata;
  logic signed [15:0] left, right, mono;
  int checks = 0, failures = 0, minv = 32767, maxv = -32768;

  gb_apu dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin if (mono < minv) minv = mono; if (mono > maxv) maxv = mono; end

  task automatic chk(input string s, input int got, input int exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s got %0h exp %0h", s, got, exp); end
  endtask
  task automatic w(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1; @(negedge clk); wr = 0;
  endtask
  task automatic r(input logic [15:0] a, output logic [7:0] d);
    @(negedge clk); addr = a; #1 d = rdata;
  endtask
  task automatic tick(input int n);
    repeat (n) begin @(negedge clk); fs_tick = 1; @(negedge clk); fs_tick = 0; end
  endtask

  initial begin
    logic [7:0] d;
    #12 rst_n = 1;
    w(16'hFF11, 8'h00); r(16'hFF11, d); chk("NR11 mask", d, 8'h3F);
    w(16'hFF12, 8'hF3); r(16'hFF12, d); chk("NR12", d, 8'hF3);
    w(16'hFF13, 8'h55); r(16'hFF13, d); chk("NR13 write only", d, 8'hFF);
    w(16'hFF30, 8'hA5); r(16'hFF30, d); chk("wave RAM", d, 8'hA5);
    w(16'hFF24, 8'h77); w(16'hFF25, 8'hFF);
    r(16'hFF26, d); chk("NR52 idle", d, 8'hF0);
    w(16'hFF11, 8'h80 | 8'd62); w(16'hFF13, 8'h00); w(16'hFF14, 8'hC7); // length 2, enabled, trigger
    r(16'hFF26, d); chk("pulse A on", d, 8'hF1);
    repeat (20000) @(negedge clk);
    chk("mixer output swings", (maxv - minv > 10000) ? 1 : 0, 1);
    tick(4);   // steps 0..3: length ticks at steps 0 and 2
    r(16'hFF26, d); chk("length expired", d, 8'hF0);
    w(16'hFF26, 8'h00); r(16'hFF12, d); chk("power off clears", d, 8'h00);
    r(16'hFF26, d); chk("NR52 off", d, 8'h70);
    w(16'hFF12, 8'hF0); r(16'hFF12, d); chk("writes ignored when off", d, 8'h00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
