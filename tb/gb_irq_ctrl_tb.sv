// gb_irq_ctrl_tb: sets IE, raises requests, acknowledges them and writes
// IF directly, comparing IF, IE and irq_pending with a scoreboard.
module gb_irq_ctrl_tb;
  logic clk = 0, rst_n = 0, wr = 0;
  logic [15:0] addr = 16'h0000;
  logic [7:0] wdata = 0, rdata;
  logic [4:0] irq_req = 0, irq_ack = 0, irq_pending;
  logic [4:0] sb_if = 5'h01;
  logic [7:0] sb_ie = 8'h00;
  int checks = 0, failures = 0;

  gb_irq_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input string s, input int got, input int exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", s, got, exp); end
  endtask

  initial begin
    #12 rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      wr = 0; irq_req = 5'($urandom) & 5'($urandom); irq_ack = 5'($urandom) & 5'($urandom);
      wdata = 8'($urandom);
      case ($urandom % 4)
        0: begin wr = 1; addr = 16'hFF0F; end
        1: begin wr = 1; addr = 16'hFFFF; end
        default: addr = 16'hC000;
      endcase
      @(posedge clk); #1;
      if (wr && addr == 16'hFF0F) sb_if = wdata[4:0] | irq_req;
      else sb_if = (sb_if & ~irq_ack) | irq_req;
      if (wr && addr == 16'hFFFF) sb_ie = wdata;
      wr = 0; irq_req = 0; irq_ack = 0;
      addr = 16'hFF0F; #1 chk("IF", rdata, {3'b111, sb_if});
      addr = 16'hFFFF; #1 chk("IE", rdata, sb_ie);
      chk("pending", irq_pending, sb_if & sb_ie[4:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
