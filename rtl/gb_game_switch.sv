// gb_game_switch: handshake that stops the emulated machine cleanly so a
// controller outside the FPGA can swap the game, then restarts it.
// How: switch_req (asynchronous, from the controller) is synchronized.
// When it rises, the block waits for the end of the current frame
// (frame_done from the PPU), then raises pause_req to the CPU and waits
// for paused. It then raises switch_ack: the CPU is stopped between
// instructions and the memories are quiet, so the controller may copy
// state out and load a new game. When switch_req falls, clear_state is
// held for CLEAR_CYCLES clocks (a soft reset of the machine state), then
// pause_req drops and the new game runs.
// Interface/timing: pause_req and clear_state are registered; switch_ack
// stays high until switch_req is released.
// From the document: finish the current screen, stop the CPU, save,
// clear, load the new game. Own choices: the request/ack handshake, the
// synchronizer and the soft-reset length. Moving the saved CPU state back
// into the CPU is not part of this block.
// Lint note: rst_n is reported as used both as an asynchronous reset and
// synchronously; the synchronous use is only an assertion's disable
// condition, so it stands.
module gb_game_switch #(
  parameter int unsigned CLEAR_CYCLES = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic switch_req,
  input  logic frame_done,
  input  logic paused,
  output logic pause_req,
  output logic switch_ack,
  output logic clear_state,
  output logic busy
);
  typedef enum logic [2:0] {S_RUN, S_FRAME, S_STOP, S_HELD, S_CLEAR} state_e;
  state_e st;
  logic [1:0] sync;
  logic [$clog2(CLEAR_CYCLES+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync <= '0; st <= S_RUN; cnt <= '0;
      pause_req <= 1'b0; switch_ack <= 1'b0; clear_state <= 1'b0;
    end else begin
      sync <= {sync[0], switch_req};
      unique case (st)
        S_RUN:   if (sync[1]) st <= S_FRAME;
        S_FRAME: if (frame_done) begin st <= S_STOP; pause_req <= 1'b1; end
        S_STOP:  if (paused) begin st <= S_HELD; switch_ack <= 1'b1; end
        S_HELD:  if (!sync[1]) begin
                   st <= S_CLEAR; switch_ack <= 1'b0; clear_state <= 1'b1; cnt <= '0;
                 end
        S_CLEAR: if (cnt == $bits(cnt)'(CLEAR_CYCLES - 1)) begin
                   st <= S_RUN; clear_state <= 1'b0; pause_req <= 1'b0;
                 end else cnt <= cnt + 1'b1;
        default: st <= S_RUN;
      endcase
    end
  end
  assign busy = st != S_RUN;

  a_ack_paused: assert property (@(posedge clk) disable iff (!rst_n) switch_ack |-> pause_req);
endmodule
