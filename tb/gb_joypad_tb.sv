// gb_joypad_tb: selects the direction and action groups, presses keys and
// checks the active-low read value and the joypad interrupt pulse.
module gb_joypad_tb;
  logic clk = 0, rst_n = 0, wr = 0, irq;
  logic [7:0] buttons = 0, wdata = 0, rdata;
  logic [15:0] addr = 16'hFF00;
  int checks = 0, failures = 0, irqs = 0;

  gb_joypad dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (irq && rst_n) irqs++;

  task automatic chk(input string s, input int got, input int exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", s, got, exp); end
  endtask
  task automatic sel(input logic [1:0] s);
    @(negedge clk); wdata = {2'b00, s, 4'h0}; wr = 1; @(negedge clk); wr = 0;
  endtask

  initial begin
    #12 rst_n = 1;
    sel(2'b10);                                  // directions
    buttons = 8'b0010_0101;                      // B, up, right
    repeat (5) @(negedge clk);
    chk("dir read", rdata, 8'hE0 | 4'b1010);
    chk("irq on press", irqs, 1);
    sel(2'b01);                                  // actions
    repeat (3) @(negedge clk);
    chk("act read", rdata, 8'hD0 | 4'b1101);
    irqs = 0; buttons = 8'b1010_0101;            // press start
    repeat (5) @(negedge clk);
    chk("act read start", rdata, 8'hD0 | 4'b0101);
    chk("irq on start", irqs, 1);
    irqs = 0; buttons = 8'b1010_0111;            // left is not selected
    repeat (5) @(negedge clk);
    chk("no irq unselected", irqs, 0);
    sel(2'b11);
    chk("none selected", rdata, 8'hFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
