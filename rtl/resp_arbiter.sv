// resp_arbiter: chooses the sibling cache whose snooped data goes onto the internal
// memory response bus.
//
// When a miss is broadcast, every cache (or victim buffer) holding the line answers
// in the same cycle. Under the coherence rules at most one of them can hold the line
// modified, but several read-only caches can hold the same clean line and answer
// together; the source only says that an arbiter then picks one. This arbiter gives a
// modified copy precedence and otherwise takes the lowest-numbered responder. It is
// purely combinational.
module resp_arbiter
  import mcn_pkg::*;
#(
  parameter int N = 8
) (
  input  logic [N-1:0]         hit,
  input  logic [N-1:0]         dirty,
  input  line_t                data [N],
  output logic                 any,
  output logic [$clog2(N)-1:0] sel,
  output logic                 sel_dirty,
  output line_t                sel_data
);

  localparam int IW = $clog2(N);
  logic [N-1:0] dhit;
  assign dhit = hit & dirty;

  always_comb begin
    sel = '0;
    for (int i = N-1; i >= 0; i--)
      if (hit[i]) sel = IW'(i);
    for (int i = N-1; i >= 0; i--)
      if (dhit[i]) sel = IW'(i);
  end

  assign any       = |hit;
  assign sel_dirty = any && dirty[sel];
  assign sel_data  = data[sel];

endmodule
