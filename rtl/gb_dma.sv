// gb_dma: OAM DMA. Writing a page number XX to 0xFF46 copies the 160 bytes
// XX00..XX9F into OAM (0xFE00..0xFE9F). One byte moves per machine cycle
// (ce): the engine reads the source on the bus in one cycle and writes the
// byte it got into OAM on the next, so a transfer takes 161 machine cycles.
// While active is high the memory system gives the bus to src_addr and the
// CPU may only use HRAM. The register reads back the last page written.
// The 160-byte length and page source follow the console; the one-cycle
// read/write pipelining is this design's.
module gb_dma (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic [15:0] addr,
  input  logic        wr,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  output logic        active,
  output logic [15:0] src_addr,
  input  logic [7:0]  src_data,
  output logic        oam_we,
  output logic [7:0]  oam_addr,
  output logic [7:0]  oam_wdata
);
  logic [7:0] page, idx;
  logic       rd_pend, start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      page <= 8'hFF; idx <= 8'd0; active <= 1'b0; rd_pend <= 1'b0; start <= 1'b0;
    end else begin
      if (wr && addr == 16'hFF46) begin page <= wdata; start <= 1'b1; end
      if (ce) begin
        rd_pend <= 1'b0;
        if (start) begin
          start <= 1'b0; active <= 1'b1; idx <= 8'd0; rd_pend <= 1'b1;
        end else if (active) begin
          if (idx == 8'd159) active <= 1'b0;
          else begin idx <= idx + 8'd1; rd_pend <= 1'b1; end
        end
      end
    end
  end

  assign src_addr  = {page, idx};
  // the byte read during the last machine cycle lands in OAM at its end
  assign oam_we    = ce & rd_pend;
  assign oam_addr  = idx;
  assign oam_wdata = src_data;
  assign rdata     = (addr == 16'hFF46) ? page : 8'hFF;
endmodule
