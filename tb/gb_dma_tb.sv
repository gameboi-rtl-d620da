// gb_dma_tb: starts a transfer from page 0xC1 with ce every fourth clock,
// serves the source reads from a model memory and checks every OAM write,
// the transfer length in machine cycles and the register read-back.
module gb_dma_tb;
  logic clk = 0, rst_n = 0, ce = 0, wr = 0, active, oam_we;
  logic [15:0] addr = 16'hFF46, src_addr;
  logic [7:0] wdata = 0, rdata, src_data, oam_addr, oam_wdata;
  logic [7:0] oam [160];
  int checks = 0, failures = 0, cyc = 0, writes = 0, act_cycles = 0;

  gb_dma dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin cyc++; ce <= (cyc % 4 == 3); end
  assign src_data = src_addr[7:0] ^ 8'h5A;
  always @(posedge clk) begin
    if (oam_we) begin oam[oam_addr] = oam_wdata; writes++; end
    if (ce && active) act_cycles++;
  end

  initial begin
    #12 rst_n = 1;
    @(negedge clk); wdata = 8'hC1; wr = 1; @(negedge clk); wr = 0;
    checks++; if (rdata !== 8'hC1) begin failures++; $display("FAIL readback %h", rdata); end
    wait (active); wait (!active); repeat (8) @(negedge clk);
    checks++; if (writes != 160) begin failures++; $display("FAIL writes %0d", writes); end
    checks++; if (act_cycles != 160) begin failures++; $display("FAIL machine cycles %0d", act_cycles); end
    for (int i = 0; i < 160; i++) begin
      checks++; if (oam[i] !== (8'(i) ^ 8'h5A)) begin failures++; $display("FAIL oam[%0d]=%h", i, oam[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
