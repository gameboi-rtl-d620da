// gb_timer: the console's divider and programmable timer.
// A 16-bit counter advances every clock (the 4.194304 MHz T-cycle clock);
// DIV (0xFF04) is its upper byte and any write to DIV clears it. TIMA
// (0xFF05) counts falling edges of one counter bit chosen by TAC[1:0]
// (bit 9, 3, 5, 7: 4096, 262144, 65536, 16384 Hz) while TAC[2] is set.
// On overflow TIMA is reloaded from TMA (0xFF06) and irq pulses for one
// clock. fs_tick pulses at 512 Hz (falling edge of counter bit 12) and
// clocks the audio frame sequencer. The register set and rates are the
// console's; reloading in the same cycle as the overflow (the console waits
// one machine cycle) is this design's simplification.
module gb_timer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] addr,
  input  logic        wr,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  output logic        irq,
  output logic        fs_tick
);
  logic [15:0] div_q;
  logic [7:0]  tima, tma;
  logic [2:0]  tac;
  logic        sel_bit, sel_q, fs_q;

  always_comb begin
    unique case (tac[1:0])
      2'd0: sel_bit = div_q[9];
      2'd1: sel_bit = div_q[3];
      2'd2: sel_bit = div_q[5];
      default: sel_bit = div_q[7];
    endcase
    sel_bit = sel_bit & tac[2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_q <= 16'h0000; tima <= 8'h00; tma <= 8'h00; tac <= 3'b000;
      sel_q <= 1'b0; fs_q <= 1'b0; irq <= 1'b0; fs_tick <= 1'b0;
    end else begin
      irq     <= 1'b0;
      fs_tick <= fs_q & ~div_q[12];
      fs_q    <= div_q[12];
      sel_q   <= sel_bit;
      div_q   <= (wr && addr == 16'hFF04) ? 16'h0000 : div_q + 16'd1;
      if (wr && addr == 16'hFF05) tima <= wdata;
      else if (sel_q && !sel_bit) begin
        if (tima == 8'hFF) begin tima <= tma; irq <= 1'b1; end
        else tima <= tima + 8'd1;
      end
      if (wr && addr == 16'hFF06) tma <= wdata;
      if (wr && addr == 16'hFF07) tac <= wdata[2:0];
    end
  end

  always_comb begin
    unique case (addr)
      16'hFF04: rdata = div_q[15:8];
      16'hFF05: rdata = tima;
      16'hFF06: rdata = tma;
      16'hFF07: rdata = {5'b11111, tac};
      default:  rdata = 8'hFF;
    endcase
  end
endmodule
