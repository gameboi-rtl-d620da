// gb_apu_wave_tb: plays a wave RAM pattern and checks each sample, its
// spacing ((2048 - f) * 2 clocks), the output-level shifts, the length
// counter and the DAC-off bit.
module gb_apu_wave_tb;
  logic clk = 0, rst_n = 0, len_en = 0, trigger = 0, len_load = 0, len_tick = 0, power = 1;
  logic [7:0] nr0 = 8'h80, nr1 = 0, nr2 = 8'h20, wave_byte;
  logic [10:0] freq = 11'd2016;
  logic [3:0] wave_idx, sample;
  logic active;
  logic [7:0] wram [16];
  int checks = 0, failures = 0;

  gb_apu_wave dut (.*);
  assign wave_byte = wram[wave_idx];
  always #5 clk = ~clk;

  task automatic chk(input string s, input int got, input int exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s got %0d exp %0d", s, got, exp); end
  endtask
  task automatic pulse(ref logic sig);
    @(negedge clk); sig = 1; @(negedge clk); sig = 0;
  endtask

  initial begin
    int nib;
    for (int i = 0; i < 16; i++) wram[i] = 8'($urandom);
    #12 rst_n = 1;
    for (int lvl = 1; lvl < 4; lvl++) begin
      nr2 = {1'b0, 2'(lvl), 5'd0};
      pulse(trigger);          // sample 0 plays for (2048-2016)*2 = 64 clocks
      repeat (30) @(negedge clk);
      for (int k = 0; k < 40; k++) begin
        nib = (k % 32) % 2 ? wram[(k % 32) / 2] & 15 : wram[(k % 32) / 2] >> 4;
        chk($sformatf("level %0d sample %0d", lvl, k), sample, nib >> (lvl - 1));
        repeat (64) @(negedge clk);
      end
    end
    nr2 = 8'h00; #1 chk("mute", sample, 0);
    nr1 = 8'd254; len_en = 1; nr2 = 8'h20; pulse(len_load); pulse(trigger);
    pulse(len_tick); chk("active", active, 1);
    pulse(len_tick); chk("length 2 expired", active, 0);
    len_en = 0; pulse(trigger); nr0 = 8'h00; @(negedge clk); chk("DAC off", active, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
