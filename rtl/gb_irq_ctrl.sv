// gb_irq_ctrl: interrupt flag (IF, 0xFF0F) and interrupt enable (IE, 0xFFFF)
// registers. Sources pulse irq_req for one clock to set their IF bit (bit 0
// V-Blank, 1 LCD STAT, 2 timer, 3 serial, 4 joypad); the CPU clears a bit by
// pulsing irq_ack when it dispatches. irq_pending = IE & IF goes to the CPU,
// which services the lowest set bit first. Register writes take effect on
// the clock where wr is high; a request arriving together with a write or
// an acknowledge wins. Unused IF bits read as 1, as on the console.
// Interrupt sources follow the document; register bit order is the
// console's, as this design assumes.
module gb_irq_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] addr,
  input  logic        wr,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  input  logic [4:0]  irq_req,
  input  logic [4:0]  irq_ack,
  output logic [4:0]  irq_pending
);
  logic [4:0] if_q;
  logic [7:0] ie_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      if_q <= 5'h01;
      ie_q <= 8'h00;
    end else begin
      if (wr && addr == 16'hFF0F) if_q <= wdata[4:0] | irq_req;
      else                        if_q <= (if_q & ~irq_ack) | irq_req;
      if (wr && addr == 16'hFFFF) ie_q <= wdata;
    end
  end

  always_comb begin
    rdata = 8'hFF;
    if (addr == 16'hFF0F) rdata = {3'b111, if_q};
    else if (addr == 16'hFFFF) rdata = ie_q;
  end

  assign irq_pending = if_q & ie_q[4:0];
endmodule
