// access_history_buffer: record of a partition cache's most recent accesses, used to
// detect a violation inside the vulnerability window (VIVW) and to undo writes.
//
// Every access the cache performs is shifted into entry 0 (the newest); the oldest
// entry drops out of entry DEPTH-1, so the buffer always spans the last DEPTH
// accesses, DEPTH being the partition's vulnerability window. An entry holds the word
// address, whether the access was a write and, for a write, the value it overwrote.
// One comparator per entry watches the misses broadcast on the internal memory
// request bus; any match raises `vivw` in the same cycle (the OR of the comparators).
// These are the structure and rules of the source. Comparison is on word addresses
// (the partitioning's comparison frame is the word), a choice of this design, and a
// miss from a read-only cache does not match a recorded read (two partitions may
// share data they only read), a rule this design derives from the partitioning.
//
// Commit and clear (this design's additions): `commit` marks every recorded write as
// committed, so that a later recovery never undoes it, while its address stays for
// detection (the source lets old entries simply age out of the window). `clear`
// empties the buffer; it is held while the owning accelerator is not running, so
// that the processor reading an accelerator's results is not taken for a violation.
//
// Undo walk: while `undo_req` is high the buffer offers its write entries one at a
// time, newest first (`undo_valid`, `undo_addr`, `undo_data`); `undo_ack` retires the
// offered entry. When no write entry is left, `undo_done` is high and the buffer is
// cleared. With HAS_DATA = 0 (the buffer of a read-only cache) no old values are
// kept and the walk ends at once.
//
// Timing: push, clear and undo retire take effect at the rising clock edge; `vivw`
// and the undo outputs are combinational from the stored entries.
module access_history_buffer
  import mcn_pkg::*;
#(
  parameter int DEPTH    = 5,   // vulnerability window, in accesses
  parameter bit HAS_DATA = 1'b1 // keep overwritten values (W and RW caches)
) (
  input  logic  clk,
  input  logic  rst_n,
  // access record, one per access performed by the cache
  input  logic  push,
  input  addr_t push_addr,
  input  logic  push_write,
  input  word_t push_old,     // value overwritten by a write
  input  logic  commit,
  input  logic  clear,
  // miss seen on the request bus (already qualified: a sibling's miss)
  input  logic  cmp_valid,
  input  addr_t cmp_addr,
  input  logic  cmp_reader,   // the missing cache is read-only
  output logic  vivw,
  // undo walk
  input  logic  undo_req,
  output logic  undo_valid,
  output addr_t undo_addr,
  output word_t undo_data,
  input  logic  undo_ack,
  output logic  undo_done
);

  typedef struct packed {
    logic  valid;
    logic  wr;      // the access was a write
    logic  write;   // ... and its old value is still to be restored on an undo
    logic [ADDR_W-3:0] waddr;   // word address
    word_t old;
  } ahb_entry_t;

  ahb_entry_t ent [DEPTH];
  logic [DEPTH-1:0] match;
  logic [DEPTH-1:0] pending;    // write entries still to be undone

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      match[i]   = cmp_valid && ent[i].valid && (ent[i].waddr == cmp_addr[ADDR_W-1:2]) &&
                   (ent[i].wr || !cmp_reader);
      pending[i] = HAS_DATA && ent[i].valid && ent[i].write;
    end
  end
  assign vivw = |match;

  // newest pending write entry (lowest index)
  logic [$clog2(DEPTH+1)-1:0] sel;
  always_comb begin
    sel = '0;
    for (int i = DEPTH-1; i >= 0; i--)
      if (pending[i]) sel = ($clog2(DEPTH+1))'(i);
  end

  assign undo_valid = undo_req && (|pending);
  assign undo_done  = undo_req && !(|pending);
  assign undo_addr  = {ent[sel].waddr, 2'b00};
  assign undo_data  = ent[sel].old;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) ent[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < DEPTH; i++) ent[i] <= '0;
    end else if (undo_req) begin
      if (undo_done) begin
        for (int i = 0; i < DEPTH; i++) ent[i] <= '0;
      end else if (undo_ack && undo_valid) begin
        ent[sel].write <= 1'b0;
      end
    end else begin
      if (commit)
        for (int i = 0; i < DEPTH; i++) ent[i].write <= 1'b0;
      if (push) begin
        ent[0].valid <= 1'b1;
        ent[0].wr    <= push_write;
        ent[0].write <= push_write && !commit;
        ent[0].waddr <= push_addr[ADDR_W-1:2];
        ent[0].old   <= HAS_DATA ? push_old : '0;
        for (int i = 1; i < DEPTH; i++) ent[i] <= commit ? '{ent[i-1].valid, ent[i-1].wr, 1'b0, ent[i-1].waddr, ent[i-1].old}
                                                         : ent[i-1];
      end
    end
  end

  // no new accesses are recorded while a recovery walk is in progress
  assert property (@(posedge clk) disable iff (!rst_n) undo_req |-> !push);

endmodule
