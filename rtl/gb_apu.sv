// gb_apu: Audio Processing Unit. The CPU programs it only by writing its
// registers, which sit in the I/O page:
//   FF10-FF14 pulse A (with sweep)   FF16-FF19 pulse B
//   FF1A-FF1E wave                    FF20-FF23 noise
//   FF24 NR50 channel control, FF25 NR51 output select, FF26 NR52 on/off
//   FF30-FF3F wave RAM (32 4-bit samples)
// Four decoders turn their voice's registers into 4-bit samples; the mixer
// combines them under NR50/NR51/NR52 into left, right and mono 16-bit
// signals. A frame sequencer, stepped by the 512 Hz fs_tick from the
// divider, clocks the length counters (256 Hz), the sweep (128 Hz) and
// the envelopes (64 Hz). Writing NRx4 with bit 7 set triggers a voice;
// writing NRx1 loads its length. Clearing NR52 bit 7 powers the APU down
// and clears its registers; NR52's low bits read which voices are on.
// Unused register bits read as 1 (the console's read masks). Register
// map and behaviour follow the console; reads are combinational.
// The five-registers-per-voice layout follows the document; the frame
// sequencer source and the one-clock trigger delay are this design's.
module gb_apu (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] addr,
  input  logic        wr,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  input  logic        fs_tick,
  output logic signed [15:0] left,
  output logic signed [15:0] right,
  output logic signed [15:0] mono
);
  localparam int NR10 = 0,  NR11 = 1,  NR12 = 2,  NR13 = 3,  NR14 = 4;
  localparam int NR21 = 6,  NR22 = 7,  NR23 = 8,  NR24 = 9;
  localparam int NR30 = 10, NR31 = 11, NR32 = 12, NR33 = 13, NR34 = 14;
  localparam int NR41 = 16, NR42 = 17, NR43 = 18, NR44 = 19, NR50 = 20, NR51 = 21;
  logic [7:0] nr [22];            // FF10..FF25, index = address - FF10
  logic [4:0] ridx;
  logic [7:0] wave_ram [16];
  logic       power;
  logic [2:0] fs_step;
  logic       len_tick, env_tick, sweep_tick;
  logic [3:0] trig_n, lenld_n, trig, lenld;  // strobes delayed a clock so the voices see the new register value
  logic [3:0] ch [4];
  logic [3:0] act;
  logic [3:0] wave_idx;
  logic       sw_wr;
  logic [10:0] sw_freq;
  logic       io_w;

  assign ridx = 5'(addr[5:0] - 6'h10);
  assign io_w = wr && addr >= 16'hFF10 && addr <= 16'hFF25 && power;

  always_comb begin
    trig_n  = '0;
    lenld_n = '0;
    if (io_w && wdata[7]) begin
      if (addr == 16'hFF14) trig_n[0] = 1'b1;
      if (addr == 16'hFF19) trig_n[1] = 1'b1;
      if (addr == 16'hFF1E) trig_n[2] = 1'b1;
      if (addr == 16'hFF23) trig_n[3] = 1'b1;
    end
    if (io_w) begin
      if (addr == 16'hFF11) lenld_n[0] = 1'b1;
      if (addr == 16'hFF16) lenld_n[1] = 1'b1;
      if (addr == 16'hFF1B) lenld_n[2] = 1'b1;
      if (addr == 16'hFF20) lenld_n[3] = 1'b1;
    end
    len_tick   = fs_tick && !fs_step[0];
    sweep_tick = fs_tick && (fs_step == 3'd2 || fs_step == 3'd6);
    env_tick   = fs_tick && fs_step == 3'd7;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 22; i++) nr[i] <= 8'h00;
      for (int i = 0; i < 16; i++) wave_ram[i] <= 8'h00;
      power <= 1'b1; fs_step <= 3'd0; trig <= '0; lenld <= '0;
    end else begin
      trig <= trig_n; lenld <= lenld_n;
      if (fs_tick) fs_step <= fs_step + 3'd1;
      if (io_w) nr[ridx] <= wdata;
      if (sw_wr) begin nr[NR13] <= sw_freq[7:0]; nr[NR14][2:0] <= sw_freq[10:8]; end
      if (wr && addr[15:4] == 12'hFF3) wave_ram[addr[3:0]] <= wdata;
      if (wr && addr == 16'hFF26) begin
        power <= wdata[7];
        if (!wdata[7]) for (int i = 0; i < 22; i++) nr[i] <= 8'h00;
        if (wdata[7] && !power) fs_step <= 3'd0;
      end
    end
  end

  gb_apu_pulse #(.HAS_SWEEP(1'b1)) u_pa (
    .clk, .rst_n, .nr0(nr[NR10]), .nr1(nr[NR11]), .nr2(nr[NR12]),
    .freq({nr[NR14][2:0], nr[NR13]}), .len_en(nr[NR14][6]),
    .trigger(trig[0]), .len_load(lenld[0]), .len_tick, .env_tick, .sweep_tick, .power,
    .sample(ch[0]), .active(act[0]), .sweep_wr(sw_wr), .sweep_freq(sw_freq)
  );
  gb_apu_pulse #(.HAS_SWEEP(1'b0)) u_pb (
    .clk, .rst_n, .nr0(8'h00), .nr1(nr[NR21]), .nr2(nr[NR22]),
    .freq({nr[NR24][2:0], nr[NR23]}), .len_en(nr[NR24][6]),
    .trigger(trig[1]), .len_load(lenld[1]), .len_tick, .env_tick, .sweep_tick(1'b0), .power,
    .sample(ch[1]), .active(act[1]), .sweep_wr(), .sweep_freq()
  );
  gb_apu_wave u_wv (
    .clk, .rst_n, .nr0(nr[NR30]), .nr1(nr[NR31]), .nr2(nr[NR32]),
    .freq({nr[NR34][2:0], nr[NR33]}), .len_en(nr[NR34][6]),
    .trigger(trig[2]), .len_load(lenld[2]), .len_tick, .power,
    .wave_idx, .wave_byte(wave_ram[wave_idx]), .sample(ch[2]), .active(act[2])
  );
  gb_apu_noise u_ns (
    .clk, .rst_n, .nr1(nr[NR41]), .nr2(nr[NR42]), .nr3(nr[NR43]),
    .len_en(nr[NR44][6]), .trigger(trig[3]), .len_load(lenld[3]), .len_tick, .env_tick, .power,
    .sample(ch[3]), .active(act[3])
  );
  gb_apu_mixer u_mix (
    .clk, .rst_n, .ch, .nr50(nr[NR50]), .nr51(nr[NR51]), .power, .left, .right, .mono
  );

  // read masks: bits that are write-only or unused read as 1
  function automatic logic [7:0] rmask(input logic [15:0] a);
    unique case (a[7:0])
      8'h10: return 8'h80; 8'h11: return 8'h3F; 8'h12: return 8'h00; 8'h13: return 8'hFF;
      8'h14: return 8'hBF; 8'h16: return 8'h3F; 8'h17: return 8'h00; 8'h18: return 8'hFF;
      8'h19: return 8'hBF; 8'h1A: return 8'h7F; 8'h1B: return 8'hFF; 8'h1C: return 8'h9F;
      8'h1D: return 8'hFF; 8'h1E: return 8'hBF; 8'h20: return 8'hFF; 8'h21: return 8'h00;
      8'h22: return 8'h00; 8'h23: return 8'hBF; 8'h24: return 8'h00; 8'h25: return 8'h00;
      default: return 8'hFF;
    endcase
  endfunction

  always_comb begin
    if (addr >= 16'hFF10 && addr <= 16'hFF25) rdata = nr[ridx] | rmask(addr);
    else if (addr == 16'hFF26) rdata = {power, 3'b111, act};
    else if (addr[15:4] == 12'hFF3) rdata = wave_ram[addr[3:0]];
    else rdata = 8'hFF;
  end
endmodule
