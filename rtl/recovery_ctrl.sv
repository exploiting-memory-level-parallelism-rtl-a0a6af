// recovery_ctrl: sequences the network's recovery after a violation inside the
// vulnerability window (VIVW).
//
// Any access history buffer that sees a sibling's miss on one of its recent words
// raises its `vivw`; the OR of them is the exception (`vivw_irq`, held until the
// processor acknowledges it with `irq_ack`). The accelerators are then kept off the
// caches (`recovering`) while the memory state is rolled back to the last commit in
// the order the source gives:
//   1. VICTIM  every speculative cache puts its uncommitted victim lines back into
//              its array (`rec_victim` until all report `victim_done`);
//   2. UNDO    every history buffer writes its overwritten values, newest first,
//              onto the request bus (`rec_undo` until all report `undo_done`);
//   3. DONE    `recover_done` pulses; the processor then copies the committed
//              register values and continues the work itself (steps outside this
//              block), and acknowledges the interrupt.
// A miss already on the bus when the exception is raised is allowed to finish.
//
// Timing: one state per phase, transitions at the rising edge; outputs are decoded
// from the state.
module recovery_ctrl #(
  parameter int N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] vivw,
  input  logic [N-1:0] victim_done,
  input  logic [N-1:0] undo_done,
  input  logic         irq_ack,
  output logic         rec_victim,
  output logic         rec_undo,
  output logic         recovering,
  output logic         vivw_irq,
  output logic         recover_done
);

  typedef enum logic [1:0] {R_IDLE, R_VICTIM, R_UNDO, R_DONE} rstate_e;
  rstate_e state;

  assign rec_victim   = state == R_VICTIM;
  assign rec_undo     = state == R_UNDO;
  assign recovering   = state != R_IDLE;
  assign vivw_irq     = state != R_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= R_IDLE;
      recover_done <= 1'b0;
    end else begin
      recover_done <= 1'b0;
      unique case (state)
        R_IDLE:   if (|vivw) state <= R_VICTIM;
        R_VICTIM: if (&victim_done) state <= R_UNDO;
        R_UNDO:   if (&undo_done) begin
          state        <= R_DONE;
          recover_done <= 1'b1;
        end
        R_DONE:   if (irq_ack) state <= R_IDLE;
        default:  state <= R_IDLE;
      endcase
    end
  end

endmodule
