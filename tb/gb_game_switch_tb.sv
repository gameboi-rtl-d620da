// gb_game_switch_tb: drives random request timing against a CPU model that
// takes a random number of clocks to pause. Checks that pause_req only
// rises on a frame boundary, that switch_ack only comes while paused, and
// that clear_state lasts CLEAR_CYCLES clocks after the request is released.
module gb_game_switch_tb;
  logic clk = 0, rst_n = 0, switch_req = 0, frame_done = 0, paused = 0;
  logic pause_req, switch_ack, clear_state, busy, pr_q = 0, fd_q = 0;
  int checks = 0, failures = 0, clr = 0;

  gb_game_switch #(.CLEAR_CYCLES(16)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input string s, input int got, input int exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s got %0d exp %0d", s, got, exp); end
  endtask

  // frame_done every 300 clocks; CPU pauses 1..20 clocks after request
  int fcnt = 0;
  always @(posedge clk) begin
    fcnt <= (fcnt == 299) ? 0 : fcnt + 1;
    frame_done <= (fcnt == 299);
  end
  always @(posedge clk) begin
    if (pause_req && !paused) begin repeat ($urandom_range(1, 20)) @(posedge clk); paused <= pause_req; end
    else if (!pause_req) paused <= 1'b0;
  end
  always @(posedge clk) if (rst_n) begin
    pr_q <= pause_req; fd_q <= frame_done;
    if (pause_req && !pr_q) chk("pause starts after frame_done", fd_q, 1);
    if (switch_ack) begin checks++; if (!paused) begin failures++; $display("FAIL ack while running"); end end
    if (clear_state) clr++;
  end

  initial begin
    #22 rst_n = 1;
    for (int k = 0; k < 6; k++) begin
      repeat ($urandom_range(10, 500)) @(posedge clk);
      switch_req <= 1;
      wait (switch_ack); chk("ack with req", switch_req, 1);
      repeat ($urandom_range(1, 50)) @(posedge clk);
      clr = 0; switch_req <= 0;
      wait (!busy); @(posedge clk);
      chk("clear length", clr, 16);
      chk("running again", pause_req, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
