// gb_pkg: types and constants shared by the emulator's modules.
// ALU operation codes (a 4-bit operation input, as the ALU description asks),
// flag bit positions of the F register, interrupt bit numbers and the PPU
// modes. The bit positions and register addresses follow the original
// console's documented memory map; the ALU encoding is this design's own.
package gb_pkg;

  // 4-bit ALU operation code: eight arithmetic/logic ops, eight shift/rotate ops
  typedef enum logic [3:0] {
    ALU_ADD  = 4'h0, ALU_ADC  = 4'h1, ALU_SUB  = 4'h2, ALU_SBC  = 4'h3,
    ALU_AND  = 4'h4, ALU_XOR  = 4'h5, ALU_OR   = 4'h6, ALU_CP   = 4'h7,
    ALU_RLC  = 4'h8, ALU_RRC  = 4'h9, ALU_RL   = 4'hA, ALU_RR   = 4'hB,
    ALU_SLA  = 4'hC, ALU_SRA  = 4'hD, ALU_SWAP = 4'hE, ALU_SRL  = 4'hF
  } alu_op_e;

  // F register flag positions
  localparam int FLAG_Z = 7;
  localparam int FLAG_N = 6;
  localparam int FLAG_H = 5;
  localparam int FLAG_C = 4;

  // interrupt bits of IF/IE
  localparam int IRQ_VBLANK = 0;
  localparam int IRQ_STAT   = 1;
  localparam int IRQ_TIMER  = 2;
  localparam int IRQ_SERIAL = 3;
  localparam int IRQ_JOYPAD = 4;

  // PPU modes as reported in STAT[1:0]
  typedef enum logic [1:0] {
    MODE_HBLANK = 2'd0, MODE_VBLANK = 2'd1, MODE_OAM = 2'd2, MODE_DRAW = 2'd3
  } ppu_mode_e;

  // register file index
  typedef enum logic [2:0] {
    R_B = 3'd0, R_C = 3'd1, R_D = 3'd2, R_E = 3'd3,
    R_H = 3'd4, R_L = 3'd5, R_F = 3'd6, R_A = 3'd7
  } reg_e;

  // one pixel in the PPU's pixel FIFO: background colour index and the
  // sprite mixed over it (colour 0 = none/transparent)
  typedef struct packed {
    logic [1:0] bg;
    logic [1:0] spr;
    logic       pal;
    logic       behind;
  } pix_t;

endpackage
