// accel_port_sync: keeps the cache ports of one accelerator in step and stalls the
// accelerator while any of them is waiting for a miss.
//
// The accelerator presents a bundle: `bundle_valid` with, for each of its cache
// ports, an enable (`port_en`) and the access itself (wired straight to the caches).
// It holds the bundle while `stall` is high. A port whose access completes
// (`port_done` from its cache) is marked finished and is not re-issued, and its read
// data is held; the bundle completes (`bundle_done`, `stall` low) in the cycle its
// last port finishes. So one or more misses in a cycle stall the accelerator, and it
// resumes only when every cache has its data, as the source describes; marking
// finished ports is this design's choice, which keeps a write that hit from being
// performed (and recorded) twice.
//
// `flush` (recovery in progress) withdraws every request and clears the marks.
// Only the ports in MASK belong to this accelerator; the others are ignored.
//
// Timing: `port_req`, `stall`, `bundle_done` and `rdata` are combinational; the marks
// and held data update at the rising edge.
module accel_port_sync
  import mcn_pkg::*;
#(
  parameter int           N    = 8,
  parameter logic [N-1:0] MASK = '1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bundle_valid,
  input  logic [N-1:0] port_en,
  input  logic         flush,
  output logic [N-1:0] port_req,
  input  logic [N-1:0] port_done,
  input  word_t        port_rdata [N],
  output word_t        rdata [N],
  output logic         stall,
  output logic         bundle_done
);

  logic [N-1:0] done_q, used, finished;
  word_t        hold [N];

  assign used        = port_en & MASK;
  assign port_req    = (bundle_valid && !flush) ? (used & ~done_q) : '0;
  assign finished    = done_q | (port_done & port_req);
  assign bundle_done = bundle_valid && !flush && ((finished & used) == used);
  assign stall       = bundle_valid && !bundle_done;

  always_comb
    for (int i = 0; i < N; i++)
      rdata[i] = done_q[i] ? hold[i] : port_rdata[i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_q <= '0;
      for (int i = 0; i < N; i++) hold[i] <= '0;
    end else begin
      if (bundle_done || flush) done_q <= '0;
      else                      done_q <= finished;
      for (int i = 0; i < N; i++)
        if (port_done[i] && port_req[i]) hold[i] <= port_rdata[i];
    end
  end

endmodule
