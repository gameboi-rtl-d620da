// gb_dpram: synchronous RAM with one read/write port (A) and one read-only
// port (B), both on one clock. Reads return the addressed word on the clock
// edge after the address is presented; a write on port A happens on the
// edge where a_we is high. Used for VRAM (CPU on A, PPU on B), OAM (CPU or
// DMA on A, PPU on B), work RAM and HRAM. Written as a plain array so FPGA
// tools infer block RAM. Contents are not initialised, as on the console.
// The document only names the memories; this RAM form is this design's.
module gb_dpram #(
  parameter int AW = 13,
  parameter int DW = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] a_addr,
  input  logic          a_we,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  input  logic [AW-1:0] b_addr,
  output logic [DW-1:0] b_rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end
endmodule
