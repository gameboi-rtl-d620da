// gb_alu: the CPU's single 8-bit ALU.
// Two 8-bit operands, the current flag byte and a 4-bit operation select
// produce an 8-bit result and a new flag byte (Z, N, H, C in bits 7..4,
// low nibble always zero). Purely combinational. Operations: add/adc/sub/sbc,
// and/xor/or/compare, and the eight rotate/shift/swap operations, which act
// on operand A only. Sixteen-bit arithmetic is done by the CPU as two passes
// through this unit (low byte, then high byte with carry).
// Following the console, the fourth flag is the subtract flag N rather than
// an overflow flag; the operation encoding is this design's own.
module gb_alu
  import gb_pkg::*;
(
  input  alu_op_e    op,
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic [7:0] flags_in,
  output logic [7:0] y,
  output logic [7:0] flags_out
);
  logic       cin;
  logic [8:0] sum;
  logic [4:0] hsum;
  logic       z, n, h, c;

  always_comb begin
    cin  = flags_in[FLAG_C];
    y    = 8'h00;
    n    = 1'b0;
    h    = 1'b0;
    c    = 1'b0;
    sum  = 9'h000;
    hsum = 5'h00;
    unique case (op)
      ALU_ADD, ALU_ADC: begin
        sum  = {1'b0, a} + {1'b0, b} + {8'h00, (op == ALU_ADC) & cin};
        hsum = {1'b0, a[3:0]} + {1'b0, b[3:0]} + {4'h0, (op == ALU_ADC) & cin};
        y = sum[7:0]; h = hsum[4]; c = sum[8];
      end
      ALU_SUB, ALU_SBC, ALU_CP: begin
        sum  = {1'b0, a} - {1'b0, b} - {8'h00, (op == ALU_SBC) & cin};
        hsum = {1'b0, a[3:0]} - {1'b0, b[3:0]} - {4'h0, (op == ALU_SBC) & cin};
        y = (op == ALU_CP) ? a : sum[7:0]; n = 1'b1; h = hsum[4]; c = sum[8];
      end
      ALU_AND:  begin y = a & b; h = 1'b1; end
      ALU_XOR:  y = a ^ b;
      ALU_OR:   y = a | b;
      ALU_RLC:  begin y = {a[6:0], a[7]}; c = a[7]; end
      ALU_RRC:  begin y = {a[0], a[7:1]}; c = a[0]; end
      ALU_RL:   begin y = {a[6:0], cin};  c = a[7]; end
      ALU_RR:   begin y = {cin, a[7:1]};  c = a[0]; end
      ALU_SLA:  begin y = {a[6:0], 1'b0}; c = a[7]; end
      ALU_SRA:  begin y = {a[7], a[7:1]}; c = a[0]; end
      ALU_SWAP: y = {a[3:0], a[7:4]};
      ALU_SRL:  begin y = {1'b0, a[7:1]}; c = a[0]; end
      default:  y = a;
    endcase
    z = (op == ALU_CP) ? (sum[7:0] == 8'h00) : (y == 8'h00);
    flags_out = {z, n, h, c, 4'h0};
  end
endmodule
