// gb_dac_if_tb: counts sample strobes over 10 ms of simulated time (expects
// the sample rate), and checks that each DAC load shows the sample that
// was present at the strobe, with /CS,/L1 pulses before the LDAC pulse.
module gb_dac_if_tb;
  localparam int CLK = 4194304;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] sample = 0;
  logic [15:0] db, held, last;
  logic cs_n, l1_n, ldac, strobe;
  int checks = 0, failures = 0, strobes = 0, loads = 0, latches = 0, state = 0;

  gb_dac_if #(.CLK_HZ(CLK), .SAMPLE_HZ(50000)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input string s, input int got, input int exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s got %0d exp %0d", s, got, exp); end
  endtask

  always @(negedge clk) if (rst_n) sample <= 16'($urandom);
  always @(posedge clk) if (rst_n) begin
    if (strobe) begin strobes++; held = last; end
    if (!cs_n && !l1_n) begin latches++; if (db !== held) begin failures++; $display("FAIL db"); end checks++; state = 1; end
    if (ldac) begin if (state == 1) loads++; state = 0; end
    last = sample;
  end

  initial begin
    #22 rst_n = 1;
    repeat (CLK / 100) @(posedge clk);   // 10 ms: 500 samples, +-1 for phase
    chk("strobes per 10 ms", (strobes >= 499 && strobes <= 500) ? 1 : 0, 1);
    chk("ldac after cs per sample", loads, strobes);
    chk("two-clock latch pulses", latches, 2 * strobes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
