// gb_apu_wave: decoder for the wave voice. It plays 32 4-bit samples from
// the 16-byte wave RAM (0xFF30-0xFF3F, high nibble first), advancing one
// sample every (2048 - f) * 2 clocks of the 4.194304 MHz clock.
//   NR30 [7] DAC on    NR31 length load (256 - n)
//   NR32 [6:5] output level: 0 mute, 1 full, 2 half, 3 quarter
//   NR33/NR34 11-bit frequency f, NR34[6] length enable
// The voice reads wave RAM through wave_idx/wave_byte (combinational).
// trigger restarts at sample 0. Register meanings follow the console's
// documented APU.
module gb_apu_wave (
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
  input  logic        power,
  output logic [3:0]  wave_idx,
  input  logic [7:0]  wave_byte,
  output logic [3:0]  sample,
  output logic        active
);
  logic [12:0] timer, period;
  logic [4:0]  pos;
  logic [8:0]  len_cnt;
  logic [3:0]  nib;

  assign period = 13'(12'd2048 - {1'b0, freq}) << 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer <= 13'd0; pos <= 5'd0; len_cnt <= 9'd0; active <= 1'b0;
    end else if (!power) begin
      active <= 1'b0; len_cnt <= 9'd0;
    end else begin
      if (timer == 13'd0) begin
        timer <= period - 13'd1;
        pos   <= pos + 5'd1;
      end else timer <= timer - 13'd1;
      if (len_load) len_cnt <= 9'd256 - {1'b0, nr1};
      else if (len_tick && len_en && len_cnt != 9'd0) begin
        len_cnt <= len_cnt - 9'd1;
        if (len_cnt == 9'd1) active <= 1'b0;
      end
      if (trigger) begin
        active <= nr0[7];
        pos    <= 5'd0;
        timer  <= period - 13'd1;
        if (len_cnt == 9'd0) len_cnt <= 9'd256;
      end
      if (!nr0[7]) active <= 1'b0;
    end
  end

  assign wave_idx = pos[4:1];
  assign nib      = pos[0] ? wave_byte[3:0] : wave_byte[7:4];
  always_comb begin
    unique case (nr2[6:5])
      2'd0: sample = 4'd0;
      2'd1: sample = nib;
      2'd2: sample = nib >> 1;
      default: sample = nib >> 2;
    endcase
    if (!active) sample = 4'd0;
  end
endmodule
