// reg_checkpoint_store: the small special cache in which an accelerator checkpoints
// the values of the original program's processor registers.
//
// The generated accelerator issues extra stores of its register values whenever a
// loop is entered or left and whenever a new iteration of the innermost loop starts.
// Those stores land in a staging copy (`acc_we`, `acc_idx`, `acc_wdata`); `commit`,
// raised at the same checkpoints, copies the staging registers into the committed
// copy, merging in a write made in the commit cycle itself. After an exception the
// processor reads the committed copy (`proc_idx` -> `proc_rdata`) and continues from
// there. The store itself and its purpose are the source's; the staging/committed
// split is this design's way of keeping an unfinished checkpoint invisible.
// NREGS = 8 matches the general-purpose registers of the 32-bit x86 code the
// accelerators were generated from.
//
// Timing: writes and commit at the rising edge; the read port is combinational.
module reg_checkpoint_store
  import mcn_pkg::*;
#(
  parameter int NREGS = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     acc_we,
  input  logic [$clog2(NREGS)-1:0] acc_idx,
  input  word_t                    acc_wdata,
  input  logic                     commit,
  input  logic [$clog2(NREGS)-1:0] proc_idx,
  output word_t                    proc_rdata
);

  word_t stage [NREGS];
  word_t comm  [NREGS];

  assign proc_rdata = comm[proc_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) begin
        stage[i] <= '0;
        comm[i]  <= '0;
      end
    end else begin
      if (acc_we) stage[acc_idx] <= acc_wdata;
      if (commit)
        for (int i = 0; i < NREGS; i++)
          comm[i] <= (acc_we && acc_idx == ($clog2(NREGS))'(i)) ? acc_wdata : stage[i];
    end
  end

endmodule
