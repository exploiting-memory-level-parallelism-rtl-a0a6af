// coherence_monitor: miss statistics of the multi-cache network for partition tuning.
//
// Partitions that turn out to share data cost coherence misses: a miss that a
// sibling cache serves because it holds the line. Tuning the partitioning needs,
// for every cache, its miss count, how many of those misses were coherence misses,
// and which siblings served them. A cache whose coherence miss rate exceeds 0.1 is a
// candidate for merging its partition with its main servers. This block keeps those
// numbers while the network runs and flags the caches above that rate.
//
// How it works: the request bus carries every miss once, so one observation point
// suffices. Each cycle with `miss_valid` adds one to the miss counter of `miss_src`;
// if `sib_fill` is also high, the coherence miss counter of `miss_src` and the
// counter served[miss_src][server] also advance. Counters saturate at their maximum.
// `hot[c]` is high while coh_misses[c] * 10 > misses[c]: a rate above 0.1, computed
// without a divider. `clear` zeroes all counters.
//
// Interface: the event inputs come from the bus controller's snoop cycle. Reading is
// combinational: `rd_cache` selects a cache, `rd_server` a sibling, and `rd_misses`,
// `rd_coh_misses` and `rd_served` show its counters in the same cycle.
//
// The quantities monitored and the 0.1 threshold follow the source's tuning
// procedure. Ranking the top five servers and deciding merges are left to software
// reading these counters. Counter width, saturation and the read port are this
// design's choices.
module coherence_monitor #(
  parameter int N     = 8,    // caches on the bus
  parameter int CNT_W = 32    // counter width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  // events, one per miss transaction
  input  logic                 miss_valid,   // a read miss is on the request bus
  input  logic [$clog2(N)-1:0] miss_src,     // the missing cache
  input  logic                 sib_fill,     // ... and a sibling cache serves it
  input  logic [$clog2(N)-1:0] server,       // the serving sibling
  // read port
  input  logic [$clog2(N)-1:0] rd_cache,
  input  logic [$clog2(N)-1:0] rd_server,
  output logic [CNT_W-1:0]     rd_misses,
  output logic [CNT_W-1:0]     rd_coh_misses,
  output logic [CNT_W-1:0]     rd_served,
  // coherence miss rate above 0.1, per cache
  output logic [N-1:0]         hot
);

  typedef logic [CNT_W-1:0] cnt_t;
  cnt_t misses     [N];
  cnt_t coh_misses [N];
  cnt_t served     [N][N];

  function automatic cnt_t sat_inc(cnt_t x);
    return (x == '1) ? x : x + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        misses[i]     <= '0;
        coh_misses[i] <= '0;
        for (int j = 0; j < N; j++) served[i][j] <= '0;
      end
    end else if (clear) begin
      for (int i = 0; i < N; i++) begin
        misses[i]     <= '0;
        coh_misses[i] <= '0;
        for (int j = 0; j < N; j++) served[i][j] <= '0;
      end
    end else if (miss_valid) begin
      misses[miss_src] <= sat_inc(misses[miss_src]);
      if (sib_fill) begin
        coh_misses[miss_src]     <= sat_inc(coh_misses[miss_src]);
        served[miss_src][server] <= sat_inc(served[miss_src][server]);
      end
    end
  end

  assign rd_misses     = misses[rd_cache];
  assign rd_coh_misses = coh_misses[rd_cache];
  assign rd_served     = served[rd_cache][rd_server];

  // rate above 0.1: 10 * coh > misses, compared at CNT_W + 4 bits
  for (genvar c = 0; c < N; c++) begin : g_hot
    assign hot[c] = ({4'b0, coh_misses[c]} * (CNT_W + 4)'(10)) > {4'b0, misses[c]};
  end

  // a sibling never serves its own miss
  assert property (@(posedge clk) disable iff (!rst_n) miss_valid && sib_fill |-> server != miss_src);

endmodule
