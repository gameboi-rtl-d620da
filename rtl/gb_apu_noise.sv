// gb_apu_noise: decoder for the noise voice, a 15-bit linear feedback shift
// register clocked every (r = 0 ? 8 : 16 * r) << s clocks of the 4.194304
// MHz clock, with s = NR43[7:4] and r = NR43[2:0]. Each clock shifts the
// register right, feeding back bit0 XOR bit1 into bit 14 (and into bit 6 as
// well when NR43[3] selects the short 7-bit sequence). The output is the
// envelope volume while bit 0 is 0, else 0.
//   NR41 length load (64 - n)  NR42 envelope as for the pulse voices
//   NR44 [7] trigger, [6] length enable
// Register meanings follow the console's documented APU.
module gb_apu_noise (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  nr1,
  input  logic [7:0]  nr2,
  input  logic [7:0]  nr3,
  input  logic        len_en,
  input  logic        trigger,
  input  logic        len_load,
  input  logic        len_tick,
  input  logic        env_tick,
  input  logic        power,
  output logic [3:0]  sample,
  output logic        active
);
  logic [21:0] timer, period;
  logic [14:0] lfsr;
  logic [6:0]  len_cnt;
  logic [3:0]  vol;
  logic [2:0]  env_cnt;
  logic        fb, dac_on;

  assign dac_on = nr2[7:3] != 5'd0;
  assign period = ((nr3[2:0] == 3'd0) ? 22'd8 : {15'd0, nr3[2:0], 4'd0}) << nr3[7:4];
  assign fb     = lfsr[0] ^ lfsr[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer <= 22'd0; lfsr <= 15'h7FFF; len_cnt <= 7'd0; vol <= 4'd0; env_cnt <= 3'd0; active <= 1'b0;
    end else if (!power) begin
      active <= 1'b0; len_cnt <= 7'd0;
    end else begin
      if (timer <= 22'd1) begin
        timer <= period;
        lfsr  <= {fb, lfsr[14:1]};
        if (nr3[3]) lfsr[6] <= fb;
      end else timer <= timer - 22'd1;
      if (len_load) len_cnt <= 7'd64 - {1'b0, nr1[5:0]};
      else if (len_tick && len_en && len_cnt != 7'd0) begin
        len_cnt <= len_cnt - 7'd1;
        if (len_cnt == 7'd1) active <= 1'b0;
      end
      if (env_tick && nr2[2:0] != 3'd0) begin
        if (env_cnt <= 3'd1) begin
          env_cnt <= nr2[2:0];
          if (nr2[3] && vol != 4'hF) vol <= vol + 4'd1;
          else if (!nr2[3] && vol != 4'h0) vol <= vol - 4'd1;
        end else env_cnt <= env_cnt - 3'd1;
      end
      if (trigger) begin
        active  <= dac_on;
        lfsr    <= 15'h7FFF;
        timer   <= period;
        vol     <= nr2[7:4];
        env_cnt <= nr2[2:0];
        if (len_cnt == 7'd0) len_cnt <= 7'd64;
      end
      if (!dac_on) active <= 1'b0;
    end
  end

  assign sample = (active && !lfsr[0]) ? vol : 4'd0;
endmodule
