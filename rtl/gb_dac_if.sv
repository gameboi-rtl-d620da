// gb_dac_if: parallel-load interface to a 16-bit audio DAC with a
// double-buffered input (AD669 style: DB15..DB0, /CS, /L1, LDAC).
// How: a phase accumulator turns the system clock into a sample strobe at
// SAMPLE_HZ. On each strobe the current audio sample is latched, driven on
// db, and a fixed sequence follows: /CS and /L1 low for two clocks (loads
// the input rank), both high, then LDAC high for two clocks (moves the
// input rank to the output rank so the analog output changes at once).
// Interface: sample (two's complement), db/cs_n/l1_n/ldac to the DAC pins,
// strobe marks each new sample (one clock). Timing: one load sequence of 7
// clocks per sample; at a 4.19 MHz clock and 50 kHz that is about 84 clocks
// per sample, so sequences never overlap.
// From the document: 16-bit DAC, 50 kHz sample rate, the pin names. Own
// choices: the 2-clock pulse widths, the phase accumulator and the two's
// complement data format.
// Lint note: rst_n is reported as used both as an asynchronous reset and
// synchronously; the synchronous use is only an assertion's disable
// condition, so it stands.
module gb_dac_if #(
  parameter int unsigned CLK_HZ    = 4194304,
  parameter int unsigned SAMPLE_HZ = 50000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [15:0] sample,
  output logic [15:0]        db,
  output logic               cs_n,
  output logic               l1_n,
  output logic               ldac,
  output logic               strobe
);
  logic [31:0] acc;
  logic [32:0] acc_sum;
  logic [2:0]  seq;

  initial assert (SAMPLE_HZ * 8 <= CLK_HZ) else $error("clock too slow for the DAC load sequence");

  assign acc_sum = {1'b0, acc} + 33'(SAMPLE_HZ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; seq <= '0; db <= '0; cs_n <= 1'b1; l1_n <= 1'b1; ldac <= 1'b0; strobe <= 1'b0;
    end else begin
      strobe <= 1'b0;
      if (acc_sum >= 33'(CLK_HZ)) begin
        acc    <= 32'(acc_sum - 33'(CLK_HZ));
        strobe <= 1'b1;
        db     <= sample;
        seq    <= 3'd1;
      end else acc <= acc_sum[31:0];
      if (seq != 3'd0) seq <= (seq == 3'd6) ? 3'd0 : seq + 3'd1;
      cs_n <= !(seq == 3'd1 || seq == 3'd2);
      l1_n <= !(seq == 3'd1 || seq == 3'd2);
      ldac <= (seq == 3'd4 || seq == 3'd5);
    end
  end

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) strobe |-> (seq == 3'd1));
endmodule
