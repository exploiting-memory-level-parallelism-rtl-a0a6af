// victim_buffer: holds the dirty lines a partition cache evicts until the next commit.
//
// A line evicted while the accelerator runs speculatively must not reach external
// memory before the work that wrote it is known to be valid. The buffer is a FIFO of
// DEPTH lines. `commit` marks every line it holds at that moment as committed;
// committed lines at the head are offered for write-back (`head_valid` with
// `head_committed`). On a recovery, the cache pops the uncommitted lines back into
// its own array instead. Both behaviours are the source's; the FIFO organisation and
// the commit counter are this design's choice.
//
// The buffer also answers snoops: a sibling's miss (or an undo write) whose line is
// held here hits (`snp_hit`, `snp_data`) and, when `snp_inval` is set, the entry is
// dropped, so that a buffered line remains the single valid copy in the network.
// Dropped entries leave the FIFO silently when they reach the head.
//
// Timing: push, pop, commit and snoop invalidation at the rising edge; head and snoop
// outputs are combinational. Push and pop may occur in the same cycle.
module victim_buffer
  import mcn_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   push,
  input  laddr_t push_laddr,
  input  line_t  push_data,
  input  logic   commit,
  output logic   full,
  output logic   empty,
  output logic   head_valid,      // a live entry is at the head
  output logic   head_committed,  // ... and it was present at a commit
  output laddr_t head_laddr,
  output line_t  head_data,
  input  logic   pop,
  input  logic   snp_en,
  input  laddr_t snp_laddr,
  input  logic   snp_inval,
  output logic   snp_hit,
  output line_t  snp_data
);

  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH+1);

  logic   [DEPTH-1:0] vld;
  laddr_t             tag  [DEPTH];
  line_t              data [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [CW-1:0] count, ncommit;

  assign full  = (count == CW'(DEPTH));
  assign empty = (count == '0);

  assign head_valid     = !empty && vld[rd_ptr];
  assign head_committed = (ncommit != '0);
  assign head_laddr     = tag[rd_ptr];
  assign head_data      = data[rd_ptr];

  // a dropped entry at the head leaves on its own
  logic do_pop;
  assign do_pop = !empty && (pop || !vld[rd_ptr]);

  logic [DEPTH-1:0] hit_vec;
  always_comb begin
    snp_data = '0;
    for (int i = 0; i < DEPTH; i++) begin
      hit_vec[i] = snp_en && vld[i] && (tag[i] == snp_laddr);
      if (hit_vec[i]) snp_data = data[i];
    end
  end
  assign snp_hit = |hit_vec;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  logic do_push;
  assign do_push = push && !full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld     <= '0;
      rd_ptr  <= '0;
      wr_ptr  <= '0;
      count   <= '0;
      ncommit <= '0;
    end else begin
      if (snp_inval)
        for (int i = 0; i < DEPTH; i++)
          if (hit_vec[i]) vld[i] <= 1'b0;
      if (do_pop) begin
        vld[rd_ptr] <= 1'b0;
        rd_ptr      <= inc(rd_ptr);
      end
      if (do_push) begin
        vld[wr_ptr]  <= 1'b1;
        tag[wr_ptr]  <= push_laddr;
        data[wr_ptr] <= push_data;
        wr_ptr       <= inc(wr_ptr);
      end
      count <= count + CW'(do_push) - CW'(do_pop);
      // commit covers everything held after this cycle's pop (pushes of this cycle included)
      if (commit)
        ncommit <= count + CW'(do_push) - CW'(do_pop);
      else if (do_pop && ncommit != '0)
        ncommit <= ncommit - 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid);

endmodule
