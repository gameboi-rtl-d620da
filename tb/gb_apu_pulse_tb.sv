// gb_apu_pulse_tb: checks the tone period ((2048 - f) * 32 clocks), the
// duty cycles, the length counter, the envelope and the frequency sweep
// (new value written back, overflow silences the voice).
module gb_apu_pulse_tb;
  logic clk = 0, rst_n = 0, len_en = 0, trigger = 0, len_load = 0, len_tick = 0, env_tick = 0, sweep_tick = 0, power = 1;
  logic [7:0] nr0 = 0, nr1 = 0, nr2 = 0;
  logic [10:0] freq = 0, sweep_freq;
  logic [3:0] sample;
  logic active, sweep_wr;
  int checks = 0, failures = 0, cyc = 0, hi = 0, rises = 0, last_rise = 0, period = 0, sw_n = 0;
  logic [3:0] s_q = 0;
  logic [10:0] sw_val;

  gb_apu_pulse #(.HAS_SWEEP(1'b1)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (sample != 0) hi++;
    if (sample != 0 && s_q == 0) begin rises++; period = cyc - last_rise; last_rise = cyc; end
    s_q <= sample;
    if (sweep_wr) begin sw_n++; sw_val = sweep_freq; end
  end

  task automatic chk(input string s, input int got, input int exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s got %0d exp %0d", s, got, exp); end
  endtask
  task automatic pulse(ref logic sig);
    @(negedge clk); sig = 1; @(negedge clk); sig = 0;
  endtask

  initial begin
    #12 rst_n = 1;
    for (int d = 0; d < 4; d++) begin
      nr1 = {2'(d), 6'd0}; nr2 = 8'hF0; freq = 11'd1792;
      pulse(trigger);
      repeat (8192) @(negedge clk);
      hi = 0; repeat (8192 * 4) @(negedge clk);
      chk($sformatf("duty %0d", d), hi, (d == 0 ? 1 : d == 1 ? 2 : d == 2 ? 4 : 6) * 1024 * 4);
      chk("tone period", period, 8192);
      chk("volume", (sample == 0 || sample == 15), 1);
    end
    // length: 64 - 60 = 4 ticks
    nr1 = 8'h80 | 8'd60; len_en = 1; pulse(len_load); pulse(trigger);
    repeat (3) pulse(len_tick);
    chk("active before length end", active, 1);
    pulse(len_tick);
    chk("length expired", active, 0);
    len_en = 0;
    // envelope: start 15, decrease every tick
    nr2 = 8'hF1; pulse(trigger);
    repeat (3) pulse(env_tick);
    chk("envelope volume", dut.vol, 12);
    nr2 = 8'h29; pulse(trigger); repeat (2) pulse(env_tick); chk("envelope up, period 1", dut.vol, 4);
    // sweep: period 1, add, shift 1: 1000 -> 1500 -> overflow
    nr2 = 8'hF0; nr0 = 8'h11; freq = 11'd1000; pulse(trigger);
    pulse(sweep_tick); @(negedge clk);
    chk("sweep writes", sw_n, 1);
    chk("sweep value", sw_val, 1500);
    freq = sw_val;
    pulse(sweep_tick);
    chk("sweep overflow silences", active, 0);
    nr2 = 8'h00; nr0 = 0; pulse(trigger);
    chk("DAC off", active, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
