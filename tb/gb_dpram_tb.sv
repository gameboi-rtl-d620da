// gb_dpram_tb: random writes on port A and reads on both ports, checked
// one clock later against a scoreboard array.
module gb_dpram_tb;
  localparam int AW = 6;
  logic clk = 0, a_we = 0;
  logic [AW-1:0] a_addr = 0, b_addr = 0;
  logic [7:0] a_wdata = 0, a_rdata, b_rdata;
  logic [7:0] sb [2**AW];
  logic [7:0] ea, eb;
  int checks = 0, failures = 0;

  gb_dpram #(.AW(AW), .DW(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk); a_addr = AW'(i); a_we = 1; a_wdata = 8'(i * 7 + 3); sb[i] = a_wdata;
    end
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      a_addr = AW'($urandom); b_addr = AW'($urandom); a_we = 1'($urandom); a_wdata = 8'($urandom);
      ea = sb[a_addr]; eb = sb[b_addr];
      @(posedge clk); #1;
      checks += 2;
      if (a_rdata !== ea || b_rdata !== eb) begin failures++; $display("FAIL read %h %h exp %h %h", a_rdata, b_rdata, ea, eb); end
      if (a_we) sb[a_addr] = a_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
