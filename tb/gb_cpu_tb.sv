// gb_cpu_tb: runs a short program on the CPU against a 64 KiB memory model
// with one-cycle access (ce every clock). It checks the bytes the program
// stores (arithmetic, DAA, loops, CALL/RET, PUSH/POP, SWAP), the machine cycle
// on which the first store happens, and an interrupt dispatch to 0x0050
// with return by RETI. Expected values were worked out by hand.
module gb_cpu_tb;
  logic        clk = 0, rst_n = 0;
  logic [15:0] mem_addr;
  logic        mem_rd, mem_wr;
  logic [7:0]  mem_wdata, mem_rdata;
  logic [4:0]  if_reg, irq_ack;
  logic        paused, halted, instr_done;
  logic [15:0] pc_o, sp_o;
  logic [7:0]  mem [65536];
  int          checks = 0, failures = 0, cyc = 0, first_wr = -1, n_irq = 0;

  gb_cpu dut (.clk, .rst_n, .ce(1'b1), .mem_addr, .mem_rd, .mem_wr, .mem_wdata, .mem_rdata,
              .irq_pending(if_reg), .irq_ack, .pause_req(1'b0), .paused, .halted, .pc_o, .sp_o, .instr_done);

  always #5 clk = ~clk;
  assign mem_rdata = mem[mem_addr];

  always_ff @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (mem_wr) begin
      mem[mem_addr] <= mem_wdata;
      if (first_wr < 0) first_wr <= cyc + 1;
    end
    if (mem_wr && mem_addr == 16'hC005) if_reg[2] <= 1'b1;
    if (|irq_ack) begin if_reg <= if_reg & ~irq_ack; n_irq <= n_irq + 1; end
  end

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  task automatic put(input int a, input logic [7:0] b[]);
    foreach (b[i]) mem[a+i] = b[i];
  endtask

  initial begin
    foreach (mem[i]) mem[i] = 8'h00;
    if_reg = 5'd0;
    put('h0100, '{8'h31,8'hFE,8'hFF, 8'h3E,8'h12, 8'h06,8'h34, 8'h80, 8'h21,8'h00,8'hC0, 8'h77,
                  8'h2C, 8'h36,8'h99, 8'h7E, 8'hC6,8'h01, 8'h27, 8'hEA,8'h02,8'hC0,
                  8'hCD,8'h40,8'h01, 8'hEA,8'h03,8'hC0, 8'h16,8'h05, 8'h3C, 8'h15, 8'h20,8'hFC,
                  8'hEA,8'h04,8'hC0, 8'hCB,8'h37, 8'hEA,8'h05,8'hC0, 8'hFB, 8'h00, 8'h18,8'hFE});
    put('h0140, '{8'h3E,8'h77, 8'hD6,8'h07, 8'hC5, 8'h01,8'h00,8'h00, 8'hC1, 8'h78, 8'h80, 8'hC9});
    put('h0050, '{8'h3E,8'hAA, 8'hEA,8'h06,8'hC0, 8'hD9});
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (400) @(posedge clk);
    chk("first store cycle", first_wr, 13);
    chk("C000 ADD", mem['hC000], 'h46);
    chk("C001 LD (HL),n", mem['hC001], 'h99);
    chk("C002 DAA", mem['hC002], 'h00);
    chk("C003 CALL/SUB/PUSH/POP", mem['hC003], 'h68);
    chk("C004 loop", mem['hC004], 'h6D);
    chk("C005 SWAP", mem['hC005], 'hD6);
    chk("C006 interrupt handler", mem['hC006], 'hAA);
    chk("interrupt acks", n_irq, 1);
    chk("SP restored", sp_o, 'hFFFE);
    chk("back in loop", (pc_o >= 'h012D && pc_o <= 'h0130) ? 1 : 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
