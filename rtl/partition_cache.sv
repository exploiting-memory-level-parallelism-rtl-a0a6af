// partition_cache: the cache that serves one memory partition of an accelerator (or
// the processor) inside the multi-cache network.
//
// Each partition groups memory instructions that never touch the data of another
// partition (or only read shared data), so each partition gets a cache of its own
// and the accelerator can reach all of them in the same cycle. The KIND parameter
// follows the partition's instructions: CK_R (loads only, read port only), CK_W
// (stores only, write port only) or CK_RW. W and RW caches are write-back with
// write-allocate, as in the source. Organisation: SETS sets of WAYS ways (the
// source lets each cache choose its associativity; WAYS = 1 is direct-mapped), lines
// of LINE_WORDS words. A fill takes the first invalid way of the set, else the way
// named by a replacement pointer that advances on every fill (this design's choice;
// the source names no replacement policy). The line size is one for the whole
// network, while the source lets it differ per cache.
//
// Accelerator port: `acc_valid` with `acc_write`, `acc_addr` (word aligned) and
// `acc_wdata` is held until `acc_done`, which is high in the cycle the access is
// performed (a hit is performed in its first cycle); `acc_rdata` is valid with
// `acc_done`. On a miss the cache goes to the request bus and refills, then performs
// the access.
//
// Coherence (snooping the request bus): when a sibling's miss names a line held
// here, the cache answers with the line; it keeps its copy only if both caches are
// read-only, otherwise it invalidates it (the source's action table). A line received
// from a sibling that held it modified stays modified. An undo write invalidates
// every copy, this cache's own included.
//
// Speculation support (SPECULATIVE = 1, accelerator caches): every performed access
// is recorded in an access_history_buffer, whose comparators raise `vivw` when a
// sibling misses on a recorded word (a read-only sibling's miss only on a recorded
// write); `commit` marks the recorded writes as no longer
// to be undone, and the buffer is kept empty while `active` is low. Dirty lines evicted between commits go to a
// victim_buffer instead of memory; `commit` lets the buffered lines drain to memory.
// During recovery, `rec_victim` makes the cache pull its uncommitted victims back
// into the array (a dirty line they displace is written back), and `rec_undo` makes
// it send each recorded overwritten value, newest first, as an undo write on the
// request bus. Both engines are described by the source; their sequencing is this
// design's. With SPECULATIVE = 0 (processor cache) there is no history buffer and
// every eviction is committed at once.
//
// A miss whose line is still in this cache's own victim buffer takes it back from
// there (this design's choice, needed so that the buffer never holds a stale copy).
// The victim buffer must have room for the dirty evictions of one commit interval;
// a miss that would overflow it waits for the next commit.
//
// Timing: tag and data arrays are read combinationally and written at the rising
// edge. Misses take at least five cycles (grant, snoop, response, install, access).
module partition_cache
  import mcn_pkg::*;
#(
  parameter int          ID          = 0,
  parameter cache_kind_e KIND        = CK_RW,
  parameter int          SETS        = 512,
  parameter int          WAYS        = 1,
  parameter bit          SPECULATIVE = 1'b1,
  parameter int          AHB_DEPTH   = 5,
  parameter int          VB_DEPTH    = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  // accelerator / processor port
  input  logic      acc_valid,
  input  logic      acc_write,
  input  addr_t     acc_addr,
  input  word_t     acc_wdata,
  output logic      acc_done,
  output word_t     acc_rdata,
  input  logic      commit,
  input  logic      active,     // the owning accelerator is running
  // internal memory request bus
  output logic      breq_valid,
  output bus_req_t  breq,
  input  logic      breq_grant,
  input  logic      snoop_valid,
  input  bus_req_t  snoop,
  output logic      snp_hit,
  output logic      snp_dirty,
  output line_t     snp_data,
  // internal memory response bus
  input  logic      resp_valid,
  input  bus_resp_t resp,
  // recovery
  input  logic      rec_victim,
  output logic      rec_victim_done,
  input  logic      rec_undo,
  output logic      rec_undo_done,
  output logic      vivw,
  // events, one-cycle pulses
  output logic      ev_miss,
  output logic      ev_evict,
  output logic      ev_restore
);

  localparam int IDX_W = $clog2(SETS);
  localparam int TAG_W = LADDR_W - IDX_W;
  localparam int WAY_W = WAYS > 1 ? $clog2(WAYS) : 1;
  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [WAY_W-1:0] way_t;

  typedef enum logic [2:0] {S_IDLE, S_MISS_REQ, S_MISS_WAIT, S_WB_REQ, S_WB_WAIT, S_UNDO_WAIT} state_e;
  state_e state;

  logic [SETS-1:0][WAYS-1:0] valid, dirty;
  tag_t                      tags  [SETS][WAYS];
  line_t                     lines [SETS][WAYS];
  way_t                      repl_q;   // replacement pointer when all ways are valid

  // the way holding line tag `t` in set `i`
  function automatic logic find(input idx_t i, input tag_t t, output way_t w);
    logic f;
    f = 1'b0;
    w = '0;
    for (int k = 0; k < WAYS; k++)
      if (!f && valid[i][k] && tags[i][k] == t) begin
        f = 1'b1;
        w = way_t'(k);
      end
    return f;
  endfunction
  // the way to fill in set `i`: the first invalid one, else the replacement pointer
  function automatic way_t fill_way(input idx_t i);
    way_t w;
    logic f;
    f = 1'b0;
    w = repl_q;
    for (int k = 0; k < WAYS; k++)
      if (!f && !valid[i][k]) begin
        f = 1'b1;
        w = way_t'(k);
      end
    return w;
  endfunction

  // ---------------------------------------------------------------- lookups
  laddr_t acc_l;
  idx_t   acc_i;
  logic   acc_hit;
  way_t   acc_w, vic_w;             // way hit, way to fill on a miss
  assign acc_l   = line_of(acc_addr);
  assign acc_i   = acc_l[IDX_W-1:0];
  always_comb acc_hit = find(acc_i, acc_l[LADDR_W-1:IDX_W], acc_w);
  assign vic_w   = fill_way(acc_i);

  logic   sib_snoop;            // a request this cache must answer is on the bus
  laddr_t snp_l;
  idx_t   snp_i;
  logic   snp_cache_hit, snp_keep, snp_found;
  way_t   snp_w;
  // a sibling's miss or undo write, or this cache's own undo write (which must
  // remove the line from this cache as well)
  assign sib_snoop     = snoop_valid && snoop.op != OP_WB &&
                         (snoop.src != cid_t'(ID) || snoop.op == OP_UNDO);
  assign snp_l         = line_of(snoop.addr);
  assign snp_i         = snp_l[IDX_W-1:0];
  always_comb snp_found = find(snp_i, snp_l[LADDR_W-1:IDX_W], snp_w);
  assign snp_cache_hit = sib_snoop && snp_found;
  // read-only caches share a line with read-only requesters; everything else moves it
  assign snp_keep      = KIND == CK_R && snoop.kind == CK_R && snoop.op == OP_READ;

  // ---------------------------------------------------------------- victim buffer
  logic   vb_push, vb_full, vb_empty, vb_head_valid, vb_head_committed, vb_pop;
  laddr_t vb_push_l, vb_head_l;
  line_t  vb_push_d, vb_head_d, vb_snp_data;
  logic   vb_snp_en, vb_snp_inval, vb_snp_hit;
  laddr_t vb_snp_l;

  // the buffer's lookup port serves bus snoops, and own misses when the bus is quiet
  assign vb_snp_en = sib_snoop || (!snoop_valid && state == S_IDLE && acc_valid);
  assign vb_snp_l  = sib_snoop ? snp_l : acc_l;

  victim_buffer #(.DEPTH(VB_DEPTH)) u_vb (
    .clk, .rst_n,
    .push(vb_push), .push_laddr(vb_push_l), .push_data(vb_push_d),
    .commit(SPECULATIVE ? commit : 1'b1),
    .full(vb_full), .empty(vb_empty),
    .head_valid(vb_head_valid), .head_committed(vb_head_committed),
    .head_laddr(vb_head_l), .head_data(vb_head_d),
    .pop(vb_pop),
    .snp_en(vb_snp_en), .snp_laddr(vb_snp_l), .snp_inval(vb_snp_inval),
    .snp_hit(vb_snp_hit), .snp_data(vb_snp_data)
  );

  assign snp_hit   = snp_cache_hit || (sib_snoop && vb_snp_hit);
  assign snp_dirty = snp_cache_hit ? (dirty[snp_i][snp_w] && !snp_keep) : (sib_snoop && vb_snp_hit);
  assign snp_data  = snp_cache_hit ? lines[snp_i][snp_w] : vb_snp_data;

  // ---------------------------------------------------------------- history buffer
  logic  ahb_push, undo_valid, undo_done;
  addr_t undo_addr;
  word_t undo_data, old_word;
  logic  undo_ack;
  assign old_word = lines[acc_i][acc_w][word_of(acc_addr)];

  if (SPECULATIVE) begin : g_ahb
    access_history_buffer #(.DEPTH(AHB_DEPTH), .HAS_DATA(KIND != CK_R)) u_ahb (
      .clk, .rst_n,
      .push(ahb_push), .push_addr(acc_addr), .push_write(acc_write), .push_old(old_word),
      .commit(commit), .clear(!active),
      .cmp_valid(sib_snoop && snoop.op == OP_READ), .cmp_addr(snoop.addr),
      .cmp_reader(snoop.kind == CK_R), .vivw(vivw),
      .undo_req(rec_undo), .undo_valid(undo_valid), .undo_addr(undo_addr),
      .undo_data(undo_data), .undo_ack(undo_ack), .undo_done(undo_done)
    );
  end else begin : g_no_ahb
    assign vivw       = 1'b0;
    assign undo_valid = 1'b0;
    assign undo_addr  = '0;
    assign undo_data  = '0;
    assign undo_done  = 1'b1;
  end

  // ---------------------------------------------------------------- control
  addr_t  miss_addr_q;
  way_t   miss_w_q;
  laddr_t wb_l_q;
  line_t  wb_d_q;

  logic idle, drain, blocked, conflict, do_hit, do_miss, own_vb, evict_dirty;
  assign idle     = state == S_IDLE;
  assign drain    = idle && vb_head_valid && vb_head_committed;
  assign blocked  = rec_victim || rec_undo || drain;
  assign conflict = sib_snoop && snp_l == acc_l;
  assign do_hit   = idle && acc_valid && !blocked && !conflict && acc_hit;
  // misses are handled when the bus is quiet, so the victim buffer port is free
  assign own_vb      = vb_snp_hit && !sib_snoop;
  assign evict_dirty = valid[acc_i][vic_w] && dirty[acc_i][vic_w];
  assign do_miss  = idle && acc_valid && !blocked && !acc_hit && !snoop_valid &&
                    !(evict_dirty && vb_full);

  // victim restore: uncommitted head goes back into the array
  logic   do_restore, restore_displace;
  idx_t   rest_i;
  way_t   rest_w;
  assign rest_i           = vb_head_l[IDX_W-1:0];
  assign rest_w           = fill_way(rest_i);
  assign do_restore       = idle && rec_victim && !drain && vb_head_valid && !snoop_valid;
  assign restore_displace = valid[rest_i][rest_w] && dirty[rest_i][rest_w];

  assign acc_done  = do_hit;
  assign acc_rdata = lines[acc_i][acc_w][word_of(acc_addr)];
  assign ahb_push  = do_hit;

  assign vb_push   = do_miss && evict_dirty;
  assign vb_push_l = {tags[acc_i][vic_w], acc_i};
  assign vb_push_d = lines[acc_i][vic_w];
  assign vb_pop    = (drain && breq_grant) || do_restore;
  assign vb_snp_inval = (sib_snoop && vb_snp_hit) || (do_miss && own_vb);

  assign undo_ack  = idle && rec_undo && !drain && undo_valid && breq_grant;

  assign rec_victim_done = rec_victim && idle && vb_empty;
  assign rec_undo_done   = rec_undo && idle && !drain && undo_done;

  assign ev_miss    = do_miss;
  assign ev_evict   = vb_push;
  assign ev_restore = do_restore;

  // request bus
  always_comb begin
    breq_valid = 1'b0;
    breq       = '0;
    breq.src   = cid_t'(ID);
    breq.kind  = KIND;
    unique case (state)
      S_IDLE: begin
        if (drain) begin
          breq_valid = 1'b1;
          breq.op    = OP_WB;
          breq.addr  = {vb_head_l, {(WOFF_W+2){1'b0}}};
          breq.data  = vb_head_d;
        end else if (rec_undo && undo_valid) begin
          breq_valid   = 1'b1;
          breq.op      = OP_UNDO;
          breq.addr    = undo_addr;
          breq.data[0] = undo_data;
        end
      end
      S_MISS_REQ: begin
        breq_valid = 1'b1;
        breq.op    = OP_READ;
        breq.addr  = miss_addr_q;
      end
      S_WB_REQ: begin
        breq_valid = 1'b1;
        breq.op    = OP_WB;
        breq.addr  = {wb_l_q, {(WOFF_W+2){1'b0}}};
        breq.data  = wb_d_q;
      end
      default: ;
    endcase
  end

  logic my_resp;
  assign my_resp = resp_valid && resp.dst == cid_t'(ID);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      valid       <= '0;
      dirty       <= '0;
      miss_addr_q <= '0;
      miss_w_q    <= '0;
      repl_q      <= '0;
      wb_l_q      <= '0;
      wb_d_q      <= '0;
    end else begin
      // snoop actions
      if (snp_cache_hit && !snp_keep) begin
        valid[snp_i][snp_w] <= 1'b0;
        dirty[snp_i][snp_w] <= 1'b0;
      end
      if (do_miss || do_restore)
        repl_q <= (int'(repl_q) == WAYS - 1) ? '0 : repl_q + 1'b1;
      unique case (state)
        S_IDLE: begin
          if (do_hit && acc_write) begin
            lines[acc_i][acc_w][word_of(acc_addr)] <= acc_wdata;
            dirty[acc_i][acc_w] <= 1'b1;
          end else if (do_miss) begin
            if (own_vb) begin
              // take the line back from the victim buffer
              valid[acc_i][vic_w] <= 1'b1;
              dirty[acc_i][vic_w] <= 1'b1;
              tags[acc_i][vic_w]  <= acc_l[LADDR_W-1:IDX_W];
              lines[acc_i][vic_w] <= vb_snp_data;
            end else begin
              valid[acc_i][vic_w] <= 1'b0;
              dirty[acc_i][vic_w] <= 1'b0;
              miss_addr_q  <= acc_addr;
              miss_w_q     <= vic_w;
              state        <= S_MISS_REQ;
            end
          end else if (drain) begin
            if (breq_grant) state <= S_WB_WAIT;
          end else if (rec_undo && undo_valid) begin
            if (breq_grant) state <= S_UNDO_WAIT;
          end else if (do_restore) begin
            valid[rest_i][rest_w] <= 1'b1;
            dirty[rest_i][rest_w] <= 1'b1;
            tags[rest_i][rest_w]  <= vb_head_l[LADDR_W-1:IDX_W];
            lines[rest_i][rest_w] <= vb_head_d;
            if (restore_displace) begin
              wb_l_q <= {tags[rest_i][rest_w], rest_i};
              wb_d_q <= lines[rest_i][rest_w];
              state  <= S_WB_REQ;
            end
          end
        end
        S_MISS_REQ: if (breq_grant) state <= S_MISS_WAIT;
        S_MISS_WAIT: if (my_resp) begin
          valid[line_of(miss_addr_q)[IDX_W-1:0]][miss_w_q] <= 1'b1;
          dirty[line_of(miss_addr_q)[IDX_W-1:0]][miss_w_q] <= resp.dirty;
          tags[line_of(miss_addr_q)[IDX_W-1:0]][miss_w_q]  <= line_of(miss_addr_q)[LADDR_W-1:IDX_W];
          lines[line_of(miss_addr_q)[IDX_W-1:0]][miss_w_q] <= resp.data;
          state <= S_IDLE;
        end
        S_WB_REQ:    if (breq_grant) state <= S_WB_WAIT;
        S_WB_WAIT:   if (my_resp) state <= S_IDLE;
        S_UNDO_WAIT: if (my_resp) state <= S_IDLE;
        default:     state <= S_IDLE;
      endcase
    end
  end

  // port rules of the partition's kind
  assert property (@(posedge clk) disable iff (!rst_n) acc_valid && acc_write |-> KIND != CK_R);
  assert property (@(posedge clk) disable iff (!rst_n) acc_valid && !acc_write |-> KIND != CK_W);
  assert property (@(posedge clk) disable iff (!rst_n) acc_valid |-> acc_addr[1:0] == 2'b00);

endmodule
