// gb_regfile: the CPU's eight 8-bit registers B, C, D, E, H, L, F, A.
// Two asynchronous read ports (r1, r2) as in the CPU datapath drawing, plus
// every register brought out so the CPU can form the 16-bit pairs BC, DE, HL
// and AF. Three write ports act on the rising clock edge when ce is high:
// an 8-bit port, a separate flag port (so an ALU operation updates A and F
// in the same cycle) and a 16-bit pair port (0 = BC, 1 = DE, 2 = HL, 3 = AF).
// The low nibble of F always reads as zero. Reset values are the console's
// state after its boot program (A=01 F=B0 B=00 C=13 D=00 E=D8 H=01 L=4D),
// which this design assumes because it starts games at 0x0100.
module gb_regfile
  import gb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  reg_e        r1_sel,
  output logic [7:0]  r1_data,
  input  reg_e        r2_sel,
  output logic [7:0]  r2_data,
  input  logic        we,
  input  reg_e        w_sel,
  input  logic [7:0]  w_data,
  input  logic        f_we,
  input  logic [7:0]  f_data,
  input  logic        pw_en,
  input  logic [1:0]  pw_sel,
  input  logic [15:0] pw_data,
  output logic [7:0]  regs [8]
);
  logic [7:0] rf [8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rf[R_B] <= 8'h00; rf[R_C] <= 8'h13; rf[R_D] <= 8'h00; rf[R_E] <= 8'hD8;
      rf[R_H] <= 8'h01; rf[R_L] <= 8'h4D; rf[R_F] <= 8'hB0; rf[R_A] <= 8'h01;
    end else if (ce) begin
      if (pw_en) begin
        unique case (pw_sel)
          2'd0: begin rf[R_B] <= pw_data[15:8]; rf[R_C] <= pw_data[7:0]; end
          2'd1: begin rf[R_D] <= pw_data[15:8]; rf[R_E] <= pw_data[7:0]; end
          2'd2: begin rf[R_H] <= pw_data[15:8]; rf[R_L] <= pw_data[7:0]; end
          default: begin rf[R_A] <= pw_data[15:8]; rf[R_F] <= {pw_data[7:4], 4'h0}; end
        endcase
      end
      if (we) rf[w_sel] <= (w_sel == R_F) ? {w_data[7:4], 4'h0} : w_data;
      if (f_we) rf[R_F] <= {f_data[7:4], 4'h0};
    end
  end

  assign r1_data = rf[r1_sel];
  assign r2_data = rf[r2_sel];
  assign regs    = rf;
endmodule
