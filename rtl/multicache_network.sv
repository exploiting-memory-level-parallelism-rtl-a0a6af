// multicache_network: application-specific memory access network for a CPU plus
// several accelerators on one FPGA.
//
// Instead of one cache shared by the processor and all accelerators, every memory
// partition of every accelerator gets a cache of its own, so an accelerator can issue
// several independent memory accesses per cycle. All caches hang off two shared
// buses: the internal memory request bus, where every miss is serialised and
// broadcast for snooping, and the internal memory response bus, which returns the
// line from a sibling cache or from external memory. A snooping protocol keeps one
// valid copy of each line unless only read-only caches hold it. Because partitions
// come from profiling and may still conflict at run time, each accelerator cache
// records its recent accesses (access history buffer) and holds evicted dirty lines
// until commit (victim buffer); a sibling miss on a recently accessed word (not a read of a read) raises a
// VIVW exception, after which recovery_ctrl rolls memory back to the last commit and
// the processor takes over from the checkpointed register values.
//
// Default configuration (the arrangement of the original system): cache 0 is
// the processor's RW cache; accelerator 1 has an R, an RW and a W cache (caches 1-3),
// accelerator 2 an R and an RW cache (4-5), accelerator 3 a W and an RW cache (6-7).
// The eight caches share 64 KB of data, 8 KB each (512 lines of 16 bytes),
// direct-mapped by default. As in the source, each cache can be given its own
// organisation (SETS, WAYS) and its own history depth (AHB_DEPTH, the partition's
// vulnerability window in accesses); the line size is common to all caches here.
//
// Interfaces (all signals on `clk`, active-low asynchronous `rst_n`):
//  - processor port: `proc_valid` with write/address/data, held until `proc_done`.
//  - accelerator ports, indexed by cache: `acc_port_en[c]`, `acc_write[c]`,
//    `acc_addr[c]`, `acc_wdata[c]`, `acc_rdata[c]`; per accelerator a bundle valid
//    `acc_valid[a]`, `acc_stall[a]` (hold the bundle), `acc_bundle_done[a]`, a
//    `acc_commit[a]` pulse at each checkpoint and `acc_active[a]`, high while the
//    accelerator runs a kernel (its history buffers are empty otherwise).
//  - register checkpoints: accelerator a stores with `acc_reg_we[a]`; the processor
//    reads committed values through `proc_reg_acc`/`proc_reg_idx`.
//  - external memory: line-wide request/ready, read response (see bus_controller).
//  - exception: `vivw_irq` until `irq_ack`; `recover_done` pulses when memory has
//    been rolled back; `recovering` while accelerators are held off.
//  - `ev_*`: one-cycle event pulses for performance counting. Entries that belong
//    to the processor's cache are constant zero: `acc_rdata[0]` (the processor reads
//    through `proc_rdata`) and `ev_restore[0]` (its cache has no speculation).
//  - `mon_*`: coherence miss statistics (coherence_monitor): per cache misses,
//    misses served by siblings and by which sibling, and `mon_hot`, the caches whose
//    coherence miss rate is above 0.1, for tuning the partitioning.
module multicache_network
  import mcn_pkg::*;
#(
  parameter int          NCACHE = 8,
  parameter int          NACC   = 3,
  parameter cache_kind_e KINDS [NCACHE] = '{CK_RW, CK_R, CK_RW, CK_W, CK_R, CK_RW, CK_W, CK_RW},
  parameter int          OWNER [NCACHE] = '{0, 1, 1, 1, 2, 2, 3, 3},  // 0: processor
  // per cache: sets, ways and history depth (vulnerability window) of each partition
  parameter int          SETS      [NCACHE] = '{default: 512},
  parameter int          WAYS      [NCACHE] = '{default: 1},
  parameter int          AHB_DEPTH [NCACHE] = '{default: 5},
  parameter int          VB_DEPTH  = 4,
  parameter int          NREGS     = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  // processor
  input  logic  proc_valid,
  input  logic  proc_write,
  input  addr_t proc_addr,
  input  word_t proc_wdata,
  output logic  proc_done,
  output word_t proc_rdata,
  // accelerators
  input  logic [NACC-1:0]   acc_active,
  input  logic [NACC-1:0]   acc_valid,
  input  logic [NCACHE-1:0] acc_port_en,
  input  logic [NCACHE-1:0] acc_write,
  input  addr_t             acc_addr  [NCACHE],
  input  word_t             acc_wdata [NCACHE],
  output word_t             acc_rdata [NCACHE],
  output logic [NACC-1:0]   acc_stall,
  output logic [NACC-1:0]   acc_bundle_done,
  input  logic [NACC-1:0]   acc_commit,
  // register checkpoints
  input  logic [NACC-1:0]            acc_reg_we,
  input  logic [$clog2(NREGS)-1:0]   acc_reg_idx   [NACC],
  input  word_t                      acc_reg_wdata [NACC],
  input  logic [$clog2(NACC)-1:0]    proc_reg_acc,
  input  logic [$clog2(NREGS)-1:0]   proc_reg_idx,
  output word_t                      proc_reg_rdata,
  // external memory
  output logic  mem_req_valid,
  output logic  mem_req_write,
  output laddr_t mem_req_laddr,
  output line_t mem_req_wdata,
  output logic [LINE_WORDS-1:0] mem_req_wmask,
  input  logic  mem_req_ready,
  input  logic  mem_resp_valid,
  input  line_t mem_resp_data,
  // exception
  output logic  vivw_irq,
  input  logic  irq_ack,
  output logic  recovering,
  output logic  recover_done,
  // events
  output logic [NCACHE-1:0] ev_miss,
  output logic [NCACHE-1:0] ev_evict,
  output logic [NCACHE-1:0] ev_restore,
  output logic              ev_sibling_fill,
  output logic              ev_memory_fill,
  // coherence miss statistics for partition tuning
  input  logic              mon_clear,
  input  logic [$clog2(NCACHE)-1:0] mon_cache,
  input  logic [$clog2(NCACHE)-1:0] mon_server,
  output logic [31:0]       mon_misses,
  output logic [31:0]       mon_coh_misses,
  output logic [31:0]       mon_served,
  output logic [NCACHE-1:0] mon_hot
);

  function automatic logic [NCACHE-1:0] owned_by(int o);
    logic [NCACHE-1:0] m;
    for (int c = 0; c < NCACHE; c++) m[c] = (OWNER[c] == o);
    return m;
  endfunction

  localparam logic [NCACHE-1:0] SPEC = ~owned_by(0);

  // buses
  logic [NCACHE-1:0] breq_valid, breq_grant, snp_hit, snp_dirty;
  bus_req_t          breq [NCACHE];
  line_t             snp_data [NCACHE];
  logic              snoop_valid, resp_valid;
  logic [$clog2(NCACHE)-1:0] ev_server;
  bus_req_t          snoop;
  bus_resp_t         resp;

  // cache ports
  logic [NCACHE-1:0] c_valid, c_done;
  logic [NCACHE-1:0] c_write;
  addr_t             c_addr  [NCACHE];
  word_t             c_wdata [NCACHE];
  word_t             c_rdata [NCACHE];
  logic [NCACHE-1:0] commit_c, active_c;

  // recovery
  logic [NCACHE-1:0] vivw, vic_done, undo_done;
  logic              rec_victim, rec_undo;

  // per-accelerator port synchronisers
  logic [NCACHE-1:0] sync_req [NACC];
  word_t             sync_rdata [NACC][NCACHE];

  for (genvar a = 0; a < NACC; a++) begin : g_acc
    accel_port_sync #(.N(NCACHE), .MASK(owned_by(a + 1))) u_sync (
      .clk, .rst_n,
      .bundle_valid(acc_valid[a]),
      .port_en     (acc_port_en),
      .flush       (recovering),
      .port_req    (sync_req[a]),
      .port_done   (c_done),
      .port_rdata  (c_rdata),
      .rdata       (sync_rdata[a]),
      .stall       (acc_stall[a]),
      .bundle_done (acc_bundle_done[a])
    );
  end

  word_t reg_rdata [NACC];
  for (genvar a = 0; a < NACC; a++) begin : g_regs
    reg_checkpoint_store #(.NREGS(NREGS)) u_regs (
      .clk, .rst_n,
      .acc_we    (acc_reg_we[a]),
      .acc_idx   (acc_reg_idx[a]),
      .acc_wdata (acc_reg_wdata[a]),
      .commit    (acc_commit[a]),
      .proc_idx  (proc_reg_idx),
      .proc_rdata(reg_rdata[a])
    );
  end
  assign proc_reg_rdata = reg_rdata[proc_reg_acc];

  for (genvar c = 0; c < NCACHE; c++) begin : g_cache
    if (OWNER[c] == 0) begin : g_proc
      assign c_valid[c]  = proc_valid;
      assign c_write[c]  = proc_write;
      assign c_addr[c]   = proc_addr;
      assign c_wdata[c]  = proc_wdata;
      assign commit_c[c] = 1'b1;
      assign active_c[c] = 1'b1;
      assign acc_rdata[c] = '0;
    end else begin : g_accp
      assign c_valid[c]  = sync_req[OWNER[c]-1][c];
      assign c_write[c]  = acc_write[c];
      assign c_addr[c]   = acc_addr[c];
      assign c_wdata[c]  = acc_wdata[c];
      assign commit_c[c] = acc_commit[OWNER[c]-1];
      assign active_c[c] = acc_active[OWNER[c]-1];
      assign acc_rdata[c] = sync_rdata[OWNER[c]-1][c];
    end

    partition_cache #(
      .ID(c), .KIND(KINDS[c]), .SETS(SETS[c]), .WAYS(WAYS[c]), .SPECULATIVE(SPEC[c]),
      .AHB_DEPTH(AHB_DEPTH[c]), .VB_DEPTH(VB_DEPTH)
    ) u_cache (
      .clk, .rst_n,
      .acc_valid (c_valid[c]),
      .acc_write (c_write[c]),
      .acc_addr  (c_addr[c]),
      .acc_wdata (c_wdata[c]),
      .acc_done  (c_done[c]),
      .acc_rdata (c_rdata[c]),
      .commit    (commit_c[c]),
      .active    (active_c[c]),
      .breq_valid(breq_valid[c]),
      .breq      (breq[c]),
      .breq_grant(breq_grant[c]),
      .snoop_valid, .snoop,
      .snp_hit   (snp_hit[c]),
      .snp_dirty (snp_dirty[c]),
      .snp_data  (snp_data[c]),
      .resp_valid, .resp,
      .rec_victim     (rec_victim && SPEC[c]),
      .rec_victim_done(vic_done[c]),
      .rec_undo       (rec_undo && SPEC[c]),
      .rec_undo_done  (undo_done[c]),
      .vivw      (vivw[c]),
      .ev_miss   (ev_miss[c]),
      .ev_evict  (ev_evict[c]),
      .ev_restore(ev_restore[c])
    );
  end

  assign proc_done  = c_done[0];
  assign proc_rdata = c_rdata[0];

  bus_controller #(.N(NCACHE)) u_bus (
    .clk, .rst_n,
    .breq_valid, .breq, .breq_grant,
    .snoop_valid, .snoop, .snp_hit, .snp_dirty, .snp_data,
    .resp_valid, .resp,
    .mem_req_valid, .mem_req_write, .mem_req_laddr, .mem_req_wdata, .mem_req_wmask,
    .mem_req_ready, .mem_resp_valid, .mem_resp_data,
    .ev_sibling_fill, .ev_server, .ev_memory_fill
  );

  coherence_monitor #(.N(NCACHE), .CNT_W(32)) u_mon (
    .clk, .rst_n,
    .clear     (mon_clear),
    .miss_valid(snoop_valid && snoop.op == OP_READ),
    .miss_src  (snoop.src[$clog2(NCACHE)-1:0]),
    .sib_fill  (ev_sibling_fill),
    .server    (ev_server),
    .rd_cache  (mon_cache),
    .rd_server (mon_server),
    .rd_misses (mon_misses),
    .rd_coh_misses(mon_coh_misses),
    .rd_served (mon_served),
    .hot       (mon_hot)
  );

  recovery_ctrl #(.N(NCACHE)) u_rec (
    .clk, .rst_n,
    .vivw,
    .victim_done(vic_done | ~SPEC),
    .undo_done  (undo_done | ~SPEC),
    .irq_ack,
    .rec_victim, .rec_undo, .recovering, .vivw_irq, .recover_done
  );

  // the processor's cache must be cache 0 (it is the one brought out as proc_*)
  initial assert (OWNER[0] == 0);

endmodule
