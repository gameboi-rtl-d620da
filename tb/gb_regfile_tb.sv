// gb_regfile_tb: checks the post-boot reset values, 8-bit writes through
// both read ports, the pair write port, the flag port and that F's low
// nibble always reads zero, against a scoreboard array kept in the bench.
module gb_regfile_tb;
  import gb_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0;
  reg_e r1_sel, r2_sel, w_sel;
  logic [7:0] r1_data, r2_data, w_data, f_data;
  logic we = 0, f_we = 0, pw_en = 0;
  logic [1:0] pw_sel;
  logic [15:0] pw_data;
  logic [7:0] regs [8];
  logic [7:0] sb [8];
  int checks = 0, failures = 0;

  gb_regfile dut (.*);
  always #5 clk = ~clk;

  task automatic cmp_all(input string tag);
    for (int i = 0; i < 8; i++) begin
      r1_sel = reg_e'(i); r2_sel = reg_e'(7 - i); #1;
      checks += 2;
      if (r1_data !== sb[i] || r2_data !== sb[7-i]) begin
        failures++; $display("FAIL %s reg %0d: %h/%h exp %h/%h", tag, i, r1_data, r2_data, sb[i], sb[7-i]);
      end
    end
  endtask

  initial begin
    sb = '{8'h00, 8'h13, 8'h00, 8'hD8, 8'h01, 8'h4D, 8'hB0, 8'h01};
    pw_sel = 0; pw_data = 0; w_sel = R_B; w_data = 0; f_data = 0;
    #12 rst_n = 1;
    cmp_all("reset");
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      ce = 1'($urandom); we = 1'($urandom); f_we = 1'($urandom); pw_en = 1'($urandom);
      w_sel = reg_e'($urandom); w_data = 8'($urandom); f_data = 8'($urandom);
      pw_sel = 2'($urandom); pw_data = 16'($urandom);
      @(posedge clk); #1;
      if (ce) begin
        if (pw_en) begin
          case (pw_sel)
            0: begin sb[0] = pw_data[15:8]; sb[1] = pw_data[7:0]; end
            1: begin sb[2] = pw_data[15:8]; sb[3] = pw_data[7:0]; end
            2: begin sb[4] = pw_data[15:8]; sb[5] = pw_data[7:0]; end
            default: begin sb[7] = pw_data[15:8]; sb[6] = pw_data[7:0] & 8'hF0; end
          endcase
        end
        if (we) sb[w_sel] = (w_sel == R_F) ? (w_data & 8'hF0) : w_data;
        if (f_we) sb[6] = f_data & 8'hF0;
      end
      we = 0; f_we = 0; pw_en = 0;
      cmp_all("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
