// gb_apu_mixer_tb: random voice samples and NR50/NR51 settings compared
// with the mixing formula evaluated here, one clock later.
module gb_apu_mixer_tb;
  logic clk = 0, rst_n = 0, power = 1;
  logic [3:0] ch [4];
  logic [7:0] nr50 = 0, nr51 = 0;
  logic signed [15:0] left, right, mono;
  int checks = 0, failures = 0;

  gb_apu_mixer dut (.*);
  always #5 clk = ~clk;

  initial begin
    int l, r, m;
    #12 rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      foreach (ch[n]) ch[n] = 4'($urandom);
      nr50 = 8'($urandom); nr51 = 8'($urandom); power = ($urandom % 8) != 0;
      l = 0; r = 0;
      for (int n = 0; n < 4; n++) begin
        if (nr51[4+n]) l += 2 * ch[n] - 15;
        if (nr51[n])   r += 2 * ch[n] - 15;
      end
      l = l * (nr50[6:4] + 1) * 64; r = r * (nr50[2:0] + 1) * 64;
      m = (l + r) >>> 1;
      if (!power) begin l = 0; r = 0; m = 0; end
      @(negedge clk);
      checks++;
      if (left !== 16'(l) || right !== 16'(r) || mono !== 16'(m)) begin
        failures++; if (failures < 5) $display("FAIL got %0d %0d %0d exp %0d %0d %0d", left, right, mono, l, r, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
