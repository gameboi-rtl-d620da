// gb_apu_mixer: combines the four decoded voices into one audio signal,
// under the three sound-controller registers:
//   NR50 (0xFF24, channel control): left volume [6:4], right volume [2:0]
//   NR51 (0xFF25, output terminal select): bit 4+n sends voice n to the
//        left, bit n to the right (n = 0 pulse A, 1 pulse B, 2 wave, 3 noise)
//   NR52 (0xFF26, sound on/off) bit 7 is the master enable (input power)
// Each 4-bit sample s becomes the signed value 2s - 15; a side's sum of up
// to four voices is scaled by (volume + 1) and by 64, giving at most
// +/-30720 in 16-bit two's complement. mono is the average of the two
// sides, for the single DAC on the board. Registered, one clock of latency.
// The register roles are the document's; the number format and scaling
// are this design's.
module gb_apu_mixer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  ch [4],
  input  logic [7:0]  nr50,
  input  logic [7:0]  nr51,
  input  logic        power,
  output logic signed [15:0] left,
  output logic signed [15:0] right,
  output logic signed [15:0] mono
);
  logic signed [8:0]  sum_l, sum_r;
  logic signed [15:0] l_n, r_n;
  logic signed [16:0] m_n;

  always_comb begin
    sum_l = '0; sum_r = '0;
    for (int n = 0; n < 4; n++) begin
      if (nr51[4+n]) sum_l = sum_l + (9'sd2 * $signed({5'd0, ch[n]}) - 9'sd15);
      if (nr51[n])   sum_r = sum_r + (9'sd2 * $signed({5'd0, ch[n]}) - 9'sd15);
    end
    l_n = 16'(sum_l * $signed({1'b0, {1'b0, nr50[6:4]} + 4'd1}) * 16'sd64);
    r_n = 16'(sum_r * $signed({1'b0, {1'b0, nr50[2:0]} + 4'd1}) * 16'sd64);
    m_n = (17'(l_n) + 17'(r_n)) >>> 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left <= '0; right <= '0; mono <= '0;
    end else begin
      left  <= power ? l_n : 16'sd0;
      right <= power ? r_n : 16'sd0;
      mono  <= power ? m_n[15:0] : 16'sd0;
    end
  end
endmodule
