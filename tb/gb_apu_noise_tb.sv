// gb_apu_noise_tb: runs the noise voice in 15-bit and 7-bit modes and
// compares its output, sampled once per LFSR period, with an LFSR model;
// checks the period formula and the envelope start volume.
module gb_apu_noise_tb;
  logic clk = 0, rst_n = 0, len_en = 0, trigger = 0, len_load = 0, len_tick = 0, env_tick = 0, power = 1;
  logic [7:0] nr1 = 0, nr2 = 8'hA0, nr3 = 0;
  logic [3:0] sample;
  logic active;
  int checks = 0, failures = 0, changes = 0;

  gb_apu_noise dut (.*);
  always #5 clk = ~clk;

  task automatic pulse(ref logic sig);
    @(negedge clk); sig = 1; @(negedge clk); sig = 0;
  endtask

  initial begin
    logic [14:0] m; logic x; int per;
    #12 rst_n = 1;
    for (int mode = 0; mode < 2; mode++) begin
      nr3 = {4'd2, 1'(mode), 3'd1};       // s = 2, r = 1: (16) << 2 = 64 clocks
      per = 64;
      pulse(trigger);                     // trigger lands on the second edge
      m = 15'h7FFF;
      repeat (per / 2) @(negedge clk);
      for (int k = 0; k < 300; k++) begin
        checks++;
        if (sample !== (m[0] ? 4'd0 : 4'd10)) begin
          failures++; if (failures < 5) $display("FAIL mode %0d step %0d got %0d", mode, k, sample);
        end
        x = m[0] ^ m[1]; m = {x, m[14:1]}; if (mode) m[6] = x;
        repeat (per) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
