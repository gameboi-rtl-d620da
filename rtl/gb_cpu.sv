// gb_cpu: 8-bit CISC CPU of the Game Boy (a mix of 8080 and Z80 features).
//
// How it works: every machine cycle (one clock with ce high) the CPU makes at
// most one access on its single, non-dual-ported memory bus. The address,
// read/write strobes and write data are registered at the ce edge that starts
// a machine cycle; the read data (mem_rdata) is sampled at the ce edge that
// ends it. The two pipeline stages overlap: the last machine cycle of an
// instruction fetches the next opcode, and the edge that ends that fetch also
// decodes the opcode and performs its first step. Multi-cycle instructions
// are sequenced by a step counter (mc) per instruction family; the temporary
// byte registers Z and W hold immediate and popped bytes (the upper/lower
// byte registers of the datapath). One 8-bit ALU does all arithmetic;
// 16-bit ADD HL,rr is split into two ALU passes on successive cycles, while
// INC/DEC rr and the PC use a 16-bit incrementer. Machine cycle counts match
// the console (NOP 1, LD r,n 2, CALL 6, RET 4, taken JR 3 ...).
//
// Interrupts: at each instruction boundary, if IME is set and
// irq_pending (IE & IF) is non-zero, the fetched opcode is dropped and a
// 5-cycle dispatch pushes PC and jumps to 0x40 + 8*n for the lowest pending n,
// pulsing irq_ack. HALT idles until an interrupt is pending. EI takes effect
// after the following instruction. pause_req stops the CPU at the next
// instruction boundary (paused = 1) so the game-switch logic can save it.
//
// Bus timing: mem_wr is held for the whole machine cycle; the memory system
// must perform the write once, on the ce edge that ends it. The ISA is the
// console's; the cycle-per-access sequencing, RESET_PC (no boot ROM, start at
// the cartridge entry point) and treating STOP and the unused opcodes as NOP
// are this design's choices.
module gb_cpu
  import gb_pkg::*;
#(
  parameter logic [15:0] RESET_PC = 16'h0100,
  parameter logic [15:0] RESET_SP = 16'hFFFE
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,          // one machine cycle per ce pulse
  output logic [15:0] mem_addr,
  output logic        mem_rd,
  output logic        mem_wr,
  output logic [7:0]  mem_wdata,
  input  logic [7:0]  mem_rdata,
  input  logic [4:0]  irq_pending, // IE & IF
  output logic [4:0]  irq_ack,     // one-hot, clear the IF bit at this clock edge
  input  logic        pause_req,
  output logic        paused,
  output logic        halted,
  output logic [15:0] pc_o,
  output logic [15:0] sp_o,
  output logic [15:0] af_o,        // register pairs, for saving state while paused
  output logic [15:0] bc_o,
  output logic [15:0] de_o,
  output logic [15:0] hl_o,
  output logic        ime_o,
  output logic        instr_done   // high on the ce edge that decodes an opcode
);
  typedef enum logic [1:0] {PH_EXEC, PH_IRQ, PH_HALT, PH_PAUSE} phase_e;

  phase_e      phase, phase_n;
  logic [2:0]  mc, mc_n;
  logic [7:0]  ir, ir_n, cbop, cbop_n, z, z_n, w, w_n;
  logic [15:0] pc, pc_n, sp, sp_n;
  logic        ime, ime_n, ei_pend, ei_pend_n;
  logic [15:0] a_n;
  logic        rd_n, wr_n;
  logic [7:0]  wd_n;
  logic [4:0]  ack_n;
  logic        done_n;

  // register file
  reg_e        r1_sel, r2_sel, w_sel;
  logic [7:0]  r1_data, r2_data, w_data, f_data;
  logic        rf_we, f_we, pw_en;
  logic [1:0]  pw_sel;
  logic [15:0] pw_data;
  logic [7:0]  regs [8];

  gb_regfile u_rf (
    .clk, .rst_n, .ce,
    .r1_sel, .r1_data, .r2_sel, .r2_data,
    .we(rf_we), .w_sel, .w_data, .f_we, .f_data,
    .pw_en, .pw_sel, .pw_data, .regs
  );

  // ALU
  alu_op_e     alu_op;
  logic [7:0]  alu_a, alu_b, alu_y, alu_f;
  gb_alu u_alu (.op(alu_op), .a(alu_a), .b(alu_b), .flags_in(regs[R_F]), .y(alu_y), .flags_out(alu_f));

  // decoded fields
  logic [7:0]  op;
  logic [1:0]  ox, p;
  logic [2:0]  oy, oz;
  logic        q;
  logic [15:0] bc, de, hl, af, rp, rp2;
  logic        cond;
  logic        do_fetch, do_imm;
  logic [7:0]  fl;          // current flags
  logic [8:0]  tmp9;
  logic [7:0]  tmp8;
  logic [15:0] sp_e;
  logic [2:0]  irq_n;
  logic        lz, lc;

  function automatic logic [2:0] lowest(input logic [4:0] v);
    for (int i = 0; i < 5; i++) if (v[i]) return 3'(i);
    return 3'd0;
  endfunction

  always_comb begin
    op  = (phase == PH_EXEC && mc == 3'd0) ? mem_rdata : ir;
    ox  = op[7:6]; oy = op[5:3]; oz = op[2:0]; p = op[5:4]; q = op[3];
    bc  = {regs[R_B], regs[R_C]};
    de  = {regs[R_D], regs[R_E]};
    hl  = {regs[R_H], regs[R_L]};
    af  = {regs[R_A], regs[R_F]};
    fl  = regs[R_F];
    unique case (p)
      2'd0: begin rp = bc; rp2 = bc; end
      2'd1: begin rp = de; rp2 = de; end
      2'd2: begin rp = hl; rp2 = hl; end
      default: begin rp = sp; rp2 = af; end
    endcase
    unique case (oy[1:0])
      2'd0: cond = !fl[FLAG_Z];
      2'd1: cond =  fl[FLAG_Z];
      2'd2: cond = !fl[FLAG_C];
      default: cond = fl[FLAG_C];
    endcase
    sp_e  = sp + {{8{z[7]}}, z};
    irq_n = lowest(irq_pending);

    // defaults: hold everything, no access
    phase_n = phase; mc_n = mc + 3'd1; ir_n = op; cbop_n = cbop; z_n = z; w_n = w;
    pc_n = pc; sp_n = sp; ime_n = ime; ei_pend_n = ei_pend;
    a_n = pc; rd_n = 1'b0; wr_n = 1'b0; wd_n = 8'h00; ack_n = 5'd0; done_n = 1'b0;
    do_fetch = 1'b0; do_imm = 1'b0;
    r1_sel = reg_e'(oz); r2_sel = reg_e'(oy); w_sel = reg_e'(oy); w_data = r1_data;
    rf_we = 1'b0; f_we = 1'b0; f_data = alu_f; pw_en = 1'b0; pw_sel = p; pw_data = 16'h0000;
    alu_op = alu_op_e'({1'b0, oy}); alu_a = regs[R_A]; alu_b = r1_data;
    tmp9 = 9'h000; tmp8 = 8'h00; lz = 1'b0; lc = 1'b0;

    unique case (phase)
      PH_HALT: begin
        mc_n = 3'd0;
        if (|irq_pending) begin phase_n = PH_EXEC; do_fetch = 1'b1; end
      end
      PH_PAUSE: begin
        mc_n = 3'd0;
        if (!pause_req) begin phase_n = PH_EXEC; do_fetch = 1'b1; end
      end
      PH_IRQ: begin
        // mc 1: idle; mc 2: push PCh; mc 3: push PCl; mc 4: jump
        unique case (mc)
          3'd1: sp_n = sp - 16'd1;
          3'd2: begin a_n = sp; wr_n = 1'b1; wd_n = pc[15:8]; sp_n = sp - 16'd1; end
          3'd3: begin a_n = sp; wr_n = 1'b1; wd_n = pc[7:0]; end
          default: begin
            // acknowledge what is pending now (a higher priority may have arrived)
            ack_n = 5'(1) << irq_n;
            pc_n = 16'h0040 + {10'd0, irq_n, 3'd0};
            phase_n = PH_EXEC; do_fetch = 1'b1;
          end
        endcase
      end
      default: begin // PH_EXEC
        if (mc == 3'd0) begin
          done_n = 1'b1;
          if (ei_pend) begin ime_n = 1'b1; ei_pend_n = 1'b0; end
        end
        if (mc == 3'd0 && ime && |irq_pending) begin
          // drop the fetched opcode and dispatch
          phase_n = PH_IRQ; mc_n = 3'd1; ime_n = 1'b0; ei_pend_n = 1'b0; pc_n = pc - 16'd1;
          done_n = 1'b0;
        end else if (cbop_active()) begin
          exec_cb();
        end else begin
          exec_main();
        end
      end
    endcase

    if (do_imm) begin a_n = pc_n; rd_n = 1'b1; pc_n = pc_n + 16'd1; end
    if (do_fetch) begin
      mc_n = 3'd0;
      if (pause_req) begin
        phase_n = PH_PAUSE; rd_n = 1'b0;
      end else begin
        a_n = pc_n; rd_n = 1'b1; pc_n = pc_n + 16'd1;
      end
    end
  end

  // CB-prefixed instructions are active from the step after the prefix byte
  function automatic logic cbop_active();
    return (ir == 8'hCB) && (mc != 3'd0);
  endfunction

  // ---------------------------------------------------------------------------
  // CB-prefixed: rotates/shifts/swap, BIT, RES, SET
  task automatic exec_cb();
    logic [7:0] c, v, res;
    logic [7:0] fr;
    ir_n = ir;
    c = (mc == 3'd1) ? mem_rdata : cbop;
    if (mc == 3'd1) cbop_n = mem_rdata;
    r1_sel = reg_e'(c[2:0]);
    v = (c[2:0] == 3'd6) ? mem_rdata : r1_data;
    alu_op = alu_op_e'({1'b1, c[5:3]});
    alu_a  = v;
    res = alu_y; fr = alu_f;
    unique case (c[7:6])
      2'd0: begin res = alu_y; fr = alu_f; end
      2'd1: begin res = v; fr = {~v[c[5:3]], 1'b0, 1'b1, fl[FLAG_C], 4'h0}; end
      2'd2: begin res = v & ~(8'd1 << c[5:3]); fr = fl; end
      default: begin res = v | (8'd1 << c[5:3]); fr = fl; end
    endcase
    if (c[2:0] != 3'd6) begin
      // register operand: done in this step
      w_sel = reg_e'(c[2:0]); w_data = res; rf_we = (c[7:6] != 2'd1);
      f_data = fr; f_we = 1'b1;
      do_fetch = 1'b1;
    end else begin
      unique case (mc)
        3'd1: begin a_n = hl; rd_n = 1'b1; end
        3'd2: begin
          f_data = fr; f_we = 1'b1;
          if (c[7:6] == 2'd1) do_fetch = 1'b1;
          else begin a_n = hl; wr_n = 1'b1; wd_n = res; end
        end
        default: do_fetch = 1'b1;
      endcase
    end
  endtask

  // ---------------------------------------------------------------------------
  task automatic exec_main();
    unique case (ox)
      // ---------------- LD r,r' / HALT
      2'd1: begin
        if (op == 8'h76) begin
          if (|irq_pending) do_fetch = 1'b1;
          else begin phase_n = PH_HALT; mc_n = 3'd0; end
        end else if (oz == 3'd6) begin
          if (mc == 3'd0) begin a_n = hl; rd_n = 1'b1; end
          else begin w_data = mem_rdata; rf_we = 1'b1; do_fetch = 1'b1; end
        end else if (oy == 3'd6) begin
          if (mc == 3'd0) begin a_n = hl; wr_n = 1'b1; wd_n = r1_data; end
          else do_fetch = 1'b1;
        end else begin
          rf_we = 1'b1; do_fetch = 1'b1;
        end
      end
      // ---------------- ALU A,r
      2'd2: begin
        if (oz == 3'd6 && mc == 3'd0) begin a_n = hl; rd_n = 1'b1; end
        else begin
          if (oz == 3'd6) alu_b = mem_rdata;
          w_sel = R_A; w_data = alu_y; rf_we = (oy != 3'd7); f_we = 1'b1;
          do_fetch = 1'b1;
        end
      end
      2'd0: exec_x0();
      default: exec_x3();
    endcase
  endtask

  task automatic exec_x0();
    logic [15:0] addr;
    unique case (oz)
      3'd0: begin
        unique case (oy)
          3'd0, 3'd2: do_fetch = 1'b1;             // NOP, STOP (treated as NOP)
          3'd1: unique case (mc)                   // LD (nn),SP
            3'd0: do_imm = 1'b1;
            3'd1: begin z_n = mem_rdata; do_imm = 1'b1; end
            3'd2: begin w_n = mem_rdata; a_n = {mem_rdata, z}; wr_n = 1'b1; wd_n = sp[7:0]; end
            3'd3: begin a_n = {w, z} + 16'd1; wr_n = 1'b1; wd_n = sp[15:8]; end
            default: do_fetch = 1'b1;
          endcase
          default: unique case (mc)                // JR e / JR cc,e
            3'd0: do_imm = 1'b1;
            3'd1: begin
              z_n = mem_rdata;
              if (oy != 3'd3 && !cond) do_fetch = 1'b1;
            end
            default: begin pc_n = pc + {{8{z[7]}}, z}; do_fetch = 1'b1; end
          endcase
        endcase
      end
      3'd1: begin
        if (!q) unique case (mc)                   // LD rr,nn
          3'd0: do_imm = 1'b1;
          3'd1: begin z_n = mem_rdata; do_imm = 1'b1; end
          default: begin
            if (p == 2'd3) sp_n = {mem_rdata, z};
            else begin pw_en = 1'b1; pw_data = {mem_rdata, z}; end
            do_fetch = 1'b1;
          end
        endcase
        else unique case (mc)                      // ADD HL,rr: two ALU passes
          3'd0: begin
            alu_op = ALU_ADD; alu_a = regs[R_L]; alu_b = rp[7:0];
            w_sel = R_L; w_data = alu_y; rf_we = 1'b1;
            f_data = {fl[FLAG_Z], 1'b0, alu_f[FLAG_H], alu_f[FLAG_C], 4'h0}; f_we = 1'b1;
          end
          default: begin
            alu_op = ALU_ADC; alu_a = regs[R_H]; alu_b = rp[15:8];
            w_sel = R_H; w_data = alu_y; rf_we = 1'b1;
            f_data = {fl[FLAG_Z], 1'b0, alu_f[FLAG_H], alu_f[FLAG_C], 4'h0}; f_we = 1'b1;
            do_fetch = 1'b1;
          end
        endcase
      end
      3'd2: begin                                  // LD (rr),A / LD A,(rr) with HL+/HL-
        addr = (p == 2'd0) ? bc : (p == 2'd1) ? de : hl;
        if (mc == 3'd0) begin
          a_n = addr;
          if (q) rd_n = 1'b1; else begin wr_n = 1'b1; wd_n = regs[R_A]; end
          if (p[1]) begin pw_en = 1'b1; pw_sel = 2'd2; pw_data = p[0] ? hl - 16'd1 : hl + 16'd1; end
        end else begin
          if (q) begin w_sel = R_A; w_data = mem_rdata; rf_we = 1'b1; end
          do_fetch = 1'b1;
        end
      end
      3'd3: begin                                  // INC/DEC rr
        if (mc == 3'd0) begin
          if (p == 2'd3) sp_n = q ? sp - 16'd1 : sp + 16'd1;
          else begin pw_en = 1'b1; pw_data = q ? rp - 16'd1 : rp + 16'd1; end
        end else do_fetch = 1'b1;
      end
      3'd4, 3'd5: begin                            // INC/DEC r
        alu_op = oz[0] ? ALU_SUB : ALU_ADD; alu_b = 8'h01;
        r1_sel = reg_e'(oy);
        alu_a = (oy == 3'd6) ? mem_rdata : r1_data;
        f_data = {alu_f[7:5], fl[FLAG_C], 4'h0};
        if (oy != 3'd6) begin
          w_data = alu_y; rf_we = 1'b1; f_we = 1'b1; do_fetch = 1'b1;
        end else unique case (mc)
          3'd0: begin a_n = hl; rd_n = 1'b1; end
          3'd1: begin a_n = hl; wr_n = 1'b1; wd_n = alu_y; f_we = 1'b1; end
          default: do_fetch = 1'b1;
        endcase
      end
      3'd6: unique case (mc)                       // LD r,n
        3'd0: do_imm = 1'b1;
        3'd1: begin
          if (oy != 3'd6) begin w_data = mem_rdata; rf_we = 1'b1; do_fetch = 1'b1; end
          else begin a_n = hl; wr_n = 1'b1; wd_n = mem_rdata; end
        end
        default: do_fetch = 1'b1;
      endcase
      default: begin                               // accumulator/flag ops
        do_fetch = 1'b1;
        w_sel = R_A; rf_we = 1'b1; f_we = 1'b1;
        alu_a = regs[R_A];
        unique case (oy)
          3'd0, 3'd1, 3'd2, 3'd3: begin             // RLCA RRCA RLA RRA
            alu_op = alu_op_e'({2'b10, oy[1:0]});
            w_data = alu_y; f_data = {1'b0, 1'b0, 1'b0, alu_f[FLAG_C], 4'h0};
          end
          3'd4: begin                               // DAA
            tmp8 = regs[R_A]; lc = fl[FLAG_C];
            if (!fl[FLAG_N]) begin
              if (fl[FLAG_C] || tmp8 > 8'h99) begin tmp8 = tmp8 + 8'h60; lc = 1'b1; end
              if (fl[FLAG_H] || regs[R_A][3:0] > 4'h9) tmp8 = tmp8 + 8'h06;
            end else begin
              if (fl[FLAG_C]) tmp8 = tmp8 - 8'h60;
              if (fl[FLAG_H]) tmp8 = tmp8 - 8'h06;
            end
            lz = (tmp8 == 8'h00);
            w_data = tmp8; f_data = {lz, fl[FLAG_N], 1'b0, lc, 4'h0};
          end
          3'd5: begin w_data = ~regs[R_A]; f_data = {fl[FLAG_Z], 1'b1, 1'b1, fl[FLAG_C], 4'h0}; end // CPL
          3'd6: begin w_data = regs[R_A]; f_data = {fl[FLAG_Z], 1'b0, 1'b0, 1'b1, 4'h0}; end      // SCF
          default: begin w_data = regs[R_A]; f_data = {fl[FLAG_Z], 1'b0, 1'b0, ~fl[FLAG_C], 4'h0}; end // CCF
        endcase
      end
    endcase
  endtask

  task automatic exec_x3();
    unique case (oz)
      3'd0: begin
        if (!oy[2]) unique case (mc)               // RET cc
          3'd0: ;                                  // condition check cycle
          3'd1: if (cond) begin a_n = sp; rd_n = 1'b1; sp_n = sp + 16'd1; end
                else do_fetch = 1'b1;
          3'd2: begin z_n = mem_rdata; a_n = sp; rd_n = 1'b1; sp_n = sp + 16'd1; end
          3'd3: pc_n = {mem_rdata, z};
          default: do_fetch = 1'b1;
        endcase
        else unique case (oy[1:0])
          2'd0: unique case (mc)                   // LDH (n),A
            3'd0: do_imm = 1'b1;
            3'd1: begin a_n = {8'hFF, mem_rdata}; wr_n = 1'b1; wd_n = regs[R_A]; end
            default: do_fetch = 1'b1;
          endcase
          2'd2: unique case (mc)                   // LDH A,(n)
            3'd0: do_imm = 1'b1;
            3'd1: begin a_n = {8'hFF, mem_rdata}; rd_n = 1'b1; end
            default: begin w_sel = R_A; w_data = mem_rdata; rf_we = 1'b1; do_fetch = 1'b1; end
          endcase
          2'd1: unique case (mc)                   // ADD SP,e
            3'd0: do_imm = 1'b1;
            3'd1: z_n = mem_rdata;
            3'd2: ;
            default: begin
              tmp9 = {1'b0, sp[7:0]} + {1'b0, z};
              sp_n = sp_e;
              f_data = {2'b00, (sp[3:0] + z[3:0]) > 5'h0F ? 1'b1 : 1'b0, tmp9[8], 4'h0}; f_we = 1'b1;
              do_fetch = 1'b1;
            end
          endcase
          default: unique case (mc)                // LD HL,SP+e
            3'd0: do_imm = 1'b1;
            3'd1: z_n = mem_rdata;
            default: begin
              tmp9 = {1'b0, sp[7:0]} + {1'b0, z};
              pw_en = 1'b1; pw_sel = 2'd2; pw_data = sp_e;
              f_data = {2'b00, ({1'b0, sp[3:0]} + {1'b0, z[3:0]}) > 5'h0F ? 1'b1 : 1'b0, tmp9[8], 4'h0}; f_we = 1'b1;
              do_fetch = 1'b1;
            end
          endcase
        endcase
      end
      3'd1: begin
        if (!q) unique case (mc)                   // POP rr
          3'd0: begin a_n = sp; rd_n = 1'b1; sp_n = sp + 16'd1; end
          3'd1: begin z_n = mem_rdata; a_n = sp; rd_n = 1'b1; sp_n = sp + 16'd1; end
          default: begin pw_en = 1'b1; pw_data = {mem_rdata, z}; do_fetch = 1'b1; end
        endcase
        else unique case (p)
          2'd0, 2'd1: unique case (mc)             // RET / RETI
            3'd0: begin a_n = sp; rd_n = 1'b1; sp_n = sp + 16'd1; end
            3'd1: begin z_n = mem_rdata; a_n = sp; rd_n = 1'b1; sp_n = sp + 16'd1; end
            3'd2: begin pc_n = {mem_rdata, z}; if (p[0]) ime_n = 1'b1; end
            default: do_fetch = 1'b1;
          endcase
          2'd2: begin pc_n = hl; do_fetch = 1'b1; end // JP HL
          default: if (mc == 3'd0) sp_n = hl; else do_fetch = 1'b1; // LD SP,HL
        endcase
      end
      3'd2: begin
        if (!oy[2]) unique case (mc)               // JP cc,nn
          3'd0: do_imm = 1'b1;
          3'd1: begin z_n = mem_rdata; do_imm = 1'b1; end
          3'd2: begin w_n = mem_rdata; if (!cond) do_fetch = 1'b1; end
          default: begin pc_n = {w, z}; do_fetch = 1'b1; end
        endcase
        else unique case (oy[1:0])
          2'd0: if (mc == 3'd0) begin a_n = {8'hFF, regs[R_C]}; wr_n = 1'b1; wd_n = regs[R_A]; end
                else do_fetch = 1'b1;              // LD (C),A
          2'd2: if (mc == 3'd0) begin a_n = {8'hFF, regs[R_C]}; rd_n = 1'b1; end
                else begin w_sel = R_A; w_data = mem_rdata; rf_we = 1'b1; do_fetch = 1'b1; end // LD A,(C)
          2'd1: unique case (mc)                   // LD (nn),A
            3'd0: do_imm = 1'b1;
            3'd1: begin z_n = mem_rdata; do_imm = 1'b1; end
            3'd2: begin a_n = {mem_rdata, z}; wr_n = 1'b1; wd_n = regs[R_A]; end
            default: do_fetch = 1'b1;
          endcase
          default: unique case (mc)                // LD A,(nn)
            3'd0: do_imm = 1'b1;
            3'd1: begin z_n = mem_rdata; do_imm = 1'b1; end
            3'd2: begin a_n = {mem_rdata, z}; rd_n = 1'b1; end
            default: begin w_sel = R_A; w_data = mem_rdata; rf_we = 1'b1; do_fetch = 1'b1; end
          endcase
        endcase
      end
      3'd3: unique case (oy)
        3'd0: unique case (mc)                     // JP nn
          3'd0: do_imm = 1'b1;
          3'd1: begin z_n = mem_rdata; do_imm = 1'b1; end
          3'd2: w_n = mem_rdata;
          default: begin pc_n = {w, z}; do_fetch = 1'b1; end
        endcase
        3'd1: do_imm = 1'b1;                       // CB prefix: read the second byte
        3'd6: begin ime_n = 1'b0; ei_pend_n = 1'b0; do_fetch = 1'b1; end // DI
        3'd7: begin ei_pend_n = 1'b1; do_fetch = 1'b1; end                // EI
        default: do_fetch = 1'b1;                  // unused opcodes
      endcase
      3'd4, 3'd5: begin
        if (oz == 3'd5 && !q) unique case (mc)     // PUSH rr
          3'd0: sp_n = sp - 16'd1;
          3'd1: begin a_n = sp; wr_n = 1'b1; wd_n = rp2[15:8]; sp_n = sp - 16'd1; end
          3'd2: begin a_n = sp; wr_n = 1'b1; wd_n = rp2[7:0]; end
          default: do_fetch = 1'b1;
        endcase
        else if ((oz == 3'd4 && !oy[2]) || op == 8'hCD) unique case (mc) // CALL cc,nn / CALL nn
          3'd0: do_imm = 1'b1;
          3'd1: begin z_n = mem_rdata; do_imm = 1'b1; end
          3'd2: begin
            w_n = mem_rdata;
            if (op != 8'hCD && !cond) do_fetch = 1'b1;
            else sp_n = sp - 16'd1;
          end
          3'd3: begin a_n = sp; wr_n = 1'b1; wd_n = pc[15:8]; sp_n = sp - 16'd1; end
          3'd4: begin a_n = sp; wr_n = 1'b1; wd_n = pc[7:0]; end
          default: begin pc_n = {w, z}; do_fetch = 1'b1; end
        endcase
        else do_fetch = 1'b1;                      // unused opcodes
      end
      3'd6: unique case (mc)                       // ALU A,n
        3'd0: do_imm = 1'b1;
        default: begin
          alu_b = mem_rdata; w_sel = R_A; w_data = alu_y; rf_we = (oy != 3'd7); f_we = 1'b1;
          do_fetch = 1'b1;
        end
      endcase
      default: unique case (mc)                    // RST n
        3'd0: sp_n = sp - 16'd1;
        3'd1: begin a_n = sp; wr_n = 1'b1; wd_n = pc[15:8]; sp_n = sp - 16'd1; end
        3'd2: begin a_n = sp; wr_n = 1'b1; wd_n = pc[7:0]; end
        default: begin pc_n = {10'd0, oy, 3'd0}; do_fetch = 1'b1; end
      endcase
    endcase
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_EXEC; mc <= 3'd0; ir <= 8'h00; cbop <= 8'h00; z <= 8'h00; w <= 8'h00;
      pc <= RESET_PC + 16'd1; sp <= RESET_SP; ime <= 1'b0; ei_pend <= 1'b0;
      mem_addr <= RESET_PC; mem_rd <= 1'b1; mem_wr <= 1'b0; mem_wdata <= 8'h00;
    end else if (ce) begin
      phase <= phase_n; mc <= mc_n; ir <= ir_n; cbop <= cbop_n; z <= z_n; w <= w_n;
      pc <= pc_n; sp <= sp_n; ime <= ime_n; ei_pend <= ei_pend_n;
      mem_addr <= a_n; mem_rd <= rd_n; mem_wr <= wr_n; mem_wdata <= wd_n;
    end
  end

  assign irq_ack    = ce ? ack_n : 5'd0;
  assign instr_done = ce & done_n;
  assign paused = (phase == PH_PAUSE);
  assign halted = (phase == PH_HALT);
  assign pc_o   = pc;
  assign af_o   = {regs[R_A], regs[R_F]};
  assign bc_o   = {regs[R_B], regs[R_C]};
  assign de_o   = {regs[R_D], regs[R_E]};
  assign hl_o   = {regs[R_H], regs[R_L]};
  assign ime_o  = ime;
  assign sp_o   = sp;
endmodule
