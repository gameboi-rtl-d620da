// gb_alu_tb: drives the ALU with random operands, carries and every
// operation, and compares result and flags with a reference model written
// here from the flag rules of the console's CPU (bit-level, not shared
// with the design). Also checks a few hand-worked cases.
module gb_alu_tb;
  import gb_pkg::*;
  alu_op_e    op;
  logic [7:0] a, b, fi, y, fo;
  int checks = 0, failures = 0;

  gb_alu dut (.op, .a, .b, .flags_in(fi), .y, .flags_out(fo));

  function automatic logic [15:0] model(input int o, input logic [7:0] x, input logic [7:0] v, input logic c);
    int r, hh; logic [7:0] ry; logic zf, nf, hf, cf;
    nf = 0; hf = 0; cf = 0;
    case (o)
      0, 1: begin r = x + v + ((o == 1) ? c : 0); hh = (x % 16) + (v % 16) + ((o == 1) ? c : 0);
                  ry = r[7:0]; hf = hh > 15; cf = r > 255; end
      2, 3, 7: begin r = x - v - ((o == 3) ? c : 0); hh = (x % 16) - (v % 16) - ((o == 3) ? c : 0);
                  ry = r[7:0]; hf = hh < 0; cf = r < 0; nf = 1; end
      4: begin ry = x & v; hf = 1; end
      5: ry = x ^ v;
      6: ry = x | v;
      8: begin ry = (x << 1) | (x >> 7); cf = x[7]; end
      9: begin ry = (x >> 1) | (x << 7); cf = x[0]; end
      10: begin ry = (x << 1) | c; cf = x[7]; end
      11: begin ry = (x >> 1) | (c << 7); cf = x[0]; end
      12: begin ry = x << 1; cf = x[7]; end
      13: begin ry = (x >> 1) | (x & 8'h80); cf = x[0]; end
      14: ry = (x << 4) | (x >> 4);
      default: begin ry = x >> 1; cf = x[0]; end
    endcase
    zf = (ry == 0);
    if (o == 7) ry = x;
    return {ry, zf, nf, hf, cf, 4'h0};
  endfunction

  initial begin
    logic [15:0] exp;
    for (int i = 0; i < 4000; i++) begin
      op = alu_op_e'(i % 16); a = 8'($urandom); b = 8'($urandom); fi = {3'($urandom), 1'($urandom), 4'h0};
      if (i < 16) begin a = 8'h0F; b = 8'h01; end
      #1;
      exp = model(i % 16, a, b, fi[4]);
      checks++;
      if ({y, fo} !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d a=%h b=%h f=%h: got %h %h exp %h %h", i % 16, a, b, fi, y, fo, exp[15:8], exp[7:0]);
      end
    end
    // hand-worked: 0x3A + 0xC6 = 0x00 with Z, H and C set
    op = ALU_ADD; a = 8'h3A; b = 8'hC6; fi = 8'h00; #1;
    checks++; if ({y, fo} !== 16'h00B0) begin failures++; $display("FAIL add 3A+C6 -> %h %h", y, fo); end
    // SWAP 0xF1 = 0x1F
    op = ALU_SWAP; a = 8'hF1; #1;
    checks++; if ({y, fo} !== 16'h1F00) begin failures++; $display("FAIL swap -> %h %h", y, fo); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
