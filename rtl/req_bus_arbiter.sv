// req_bus_arbiter: round-robin arbiter in front of the internal memory request bus.
//
// The request bus is the single point where the requests of all caches (misses,
// victim write-backs, undo writes) are serialised. When `en` is high (the bus is
// free) the arbiter grants one of the requesting caches, one-hot on `grant` with its
// index on `grant_idx`. Priority rotates: the cache after the last one granted comes
// first, so no cache can be starved. The source asks only that requests be
// serialised; the round-robin policy is this design's choice.
//
// Timing: `grant` is combinational from `req` and `en`; the rotating pointer moves
// at the rising edge after a grant.
module req_bus_arbiter #(
  parameter int N = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [N-1:0]         req,
  output logic [N-1:0]         grant,
  output logic [$clog2(N)-1:0] grant_idx,
  output logic                 granted
);

  localparam int IW = $clog2(N);
  logic [IW-1:0] last;   // last granted index

  always_comb begin
    int c;
    c         = 0;
    grant     = '0;
    grant_idx = '0;
    granted   = 1'b0;
    if (en) begin
      for (int k = N; k >= 1; k--) begin
        // candidate k positions after `last`; the loop runs downwards so that the
        // nearest requester wins
        c = (int'(last) + k) % N;
        if (req[c]) begin
          grant_idx = IW'(c);
          granted   = 1'b1;
        end
      end
      if (granted) grant[grant_idx] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       last <= IW'(N-1);
    else if (granted) last <= grant_idx;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  assert property (@(posedge clk) disable iff (!rst_n) granted |-> req[grant_idx]);

endmodule
