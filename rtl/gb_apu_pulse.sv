// gb_apu_pulse: decoder for a pulse (square wave) voice. It turns the
// voice's registers into a 4-bit amplitude sample:
//   NRx0 sweep (voice A only): period [6:4], negate [3], shift [2:0]
//   NRx1 duty [7:6] (12.5/25/50/75 %), length load [5:0] (64 - n)
//   NRx2 envelope: initial volume [7:4], increase [3], period [2:0];
//        [7:3] = 0 turns the voice's DAC off
//   NRx3/NRx4 11-bit frequency value f, length enable NRx4[6]
// A frequency timer steps the 8-step duty pattern every (2048 - f) * 4
// clocks of the 4.194304 MHz clock, i.e. a tone of 131072 / (2048 - f) Hz.
// trigger (a write of NRx4 with bit 7 set) restarts the voice. The frame
// sequencer's ticks clock the length counter (256 Hz), the sweep (128 Hz)
// and the envelope (64 Hz). When the sweep changes the frequency it pulses
// sweep_wr with the new value so the register file can store it. Register
// meanings follow the console's documented APU; the timer structure is
// this design's.
module gb_apu_pulse #(
  parameter bit HAS_SWEEP = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  nr0,
  input  logic [7:0]  nr1,
  input  logic [7:0]  nr2,
  input  logic [10:0] freq,
  input  logic        len_en,
  input  logic        trigger,
  input  logic        len_load,
  input  logic        len_tick,
  input  logic        env_tick,
  input  logic        sweep_tick,
  input  logic        power,
  output logic [3:0]  sample,
  output logic        active,
  output logic        sweep_wr,
  output logic [10:0] sweep_freq
);
  logic [13:0] timer, period;
  logic [2:0]  pos;
  logic [6:0]  len_cnt;
  logic [3:0]  vol;
  logic [2:0]  env_cnt, sw_cnt;
  logic [10:0] shadow;
  logic [11:0] sw_next;
  logic [7:0]  pattern;
  logic        dac_on;

  assign dac_on = nr2[7:3] != 5'd0;
  assign period = 14'(12'd2048 - {1'b0, freq}) << 2;

  always_comb begin
    unique case (nr1[7:6])
      2'd0: pattern = 8'b0000_0001;
      2'd1: pattern = 8'b1000_0001;
      2'd2: pattern = 8'b1000_0111;
      default: pattern = 8'b0111_1110;
    endcase
    sw_next = nr0[3] ? {1'b0, shadow} - {1'b0, shadow >> nr0[2:0]}
                     : {1'b0, shadow} + {1'b0, shadow >> nr0[2:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer <= 14'd0; pos <= 3'd0; len_cnt <= 7'd0; vol <= 4'd0; env_cnt <= 3'd0;
      sw_cnt <= 3'd0; shadow <= 11'd0; active <= 1'b0; sweep_wr <= 1'b0; sweep_freq <= 11'd0;
    end else if (!power) begin
      active <= 1'b0; len_cnt <= 7'd0; sweep_wr <= 1'b0;
    end else begin
      sweep_wr <= 1'b0;
      // frequency timer and duty step
      if (timer == 14'd0) begin
        timer <= period - 14'd1;
        pos   <= pos + 3'd1;
      end else timer <= timer - 14'd1;
      // length
      if (len_load) len_cnt <= 7'd64 - {1'b0, nr1[5:0]};
      else if (len_tick && len_en && len_cnt != 7'd0) begin
        len_cnt <= len_cnt - 7'd1;
        if (len_cnt == 7'd1) active <= 1'b0;
      end
      // envelope
      if (env_tick && nr2[2:0] != 3'd0) begin
        if (env_cnt <= 3'd1) begin
          env_cnt <= nr2[2:0];
          if (nr2[3] && vol != 4'hF) vol <= vol + 4'd1;
          else if (!nr2[3] && vol != 4'h0) vol <= vol - 4'd1;
        end else env_cnt <= env_cnt - 3'd1;
      end
      // sweep
      if (HAS_SWEEP && sweep_tick && nr0[6:4] != 3'd0) begin
        if (sw_cnt <= 3'd1) begin
          sw_cnt <= nr0[6:4];
          if (sw_next > 12'd2047) active <= 1'b0;
          else if (nr0[2:0] != 3'd0) begin
            shadow <= sw_next[10:0]; sweep_wr <= 1'b1; sweep_freq <= sw_next[10:0];
          end
        end else sw_cnt <= sw_cnt - 3'd1;
      end
      if (trigger) begin
        active  <= dac_on;
        if (len_cnt == 7'd0) len_cnt <= 7'd64;
        timer   <= period - 14'd1;
        vol     <= nr2[7:4];
        env_cnt <= nr2[2:0];
        shadow  <= freq;
        sw_cnt  <= nr0[6:4];
      end
      if (!dac_on) active <= 1'b0;
    end
  end

  assign sample = (active && pattern[pos]) ? vol : 4'd0;
endmodule
