// bus_controller: runs the internal memory request bus and response bus of the
// multi-cache network, and its port to external memory.
//
// One transaction is in flight at a time:
//   ARB    the request arbiter grants one cache; its request is latched.
//   SNOOP  the request is broadcast to every cache (`snoop_valid`, `snoop`). Each
//          sibling holding the line answers in this cycle with its copy; the
//          response arbiter chooses one. Caches apply the coherence rules (keep or
//          invalidate their copy) at the end of this cycle.
//   then, by operation:
//     OP_READ  a sibling answered: its line goes onto the response bus, marked dirty
//              if the sibling held it modified. Otherwise the line is read from
//              external memory and returned clean.
//     OP_WB    the line is written to external memory, then acknowledged.
//     OP_UNDO  the old word is merged into the line a cache returned (the requester
//              answers its own undo too) and the whole line is written to memory;
//              with no cached copy only that word is written (word mask). Then
//              acknowledged.
//   RESP   one cycle of `resp_valid` to the requester.
// After RESP the controller spends one cycle in ARB before the next snoop, so that a
// cache that has just received a line can use it before a sibling can take it away.
// Serialisation, snooping, sibling-to-sibling transfer and forwarding to external
// memory are the source's; the state sequence and the memory port are this design's.
//
// External memory port: a request (`mem_req_valid`, line address, write, data, word
// mask) is taken when `mem_req_ready` is high; a read returns its line with a one-
// cycle `mem_resp_valid`, at any later cycle. Writes get no response.
module bus_controller
  import mcn_pkg::*;
#(
  parameter int N = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  // requests from the caches
  input  logic [N-1:0] breq_valid,
  input  bus_req_t   breq [N],
  output logic [N-1:0] breq_grant,
  // request bus broadcast and snoop answers
  output logic       snoop_valid,
  output bus_req_t   snoop,
  input  logic [N-1:0] snp_hit,
  input  logic [N-1:0] snp_dirty,
  input  line_t      snp_data [N],
  // response bus
  output logic       resp_valid,
  output bus_resp_t  resp,
  // external memory
  output logic       mem_req_valid,
  output logic       mem_req_write,
  output laddr_t     mem_req_laddr,
  output line_t      mem_req_wdata,
  output logic [LINE_WORDS-1:0] mem_req_wmask,
  input  logic       mem_req_ready,
  input  logic       mem_resp_valid,
  input  line_t      mem_resp_data,
  // events, one-cycle pulses
  output logic       ev_sibling_fill,  // miss served by a sibling cache
  output logic [$clog2(N)-1:0] ev_server, // ... the sibling, valid with ev_sibling_fill
  output logic       ev_memory_fill    // miss served by external memory
);

  typedef enum logic [2:0] {S_ARB, S_SNOOP, S_MEM_REQ, S_MEM_WAIT, S_RESP} state_e;
  state_e state;

  bus_req_t cur;
  line_t    line_q;
  logic     dirty_q;
  logic     full_line_q;   // OP_UNDO: write the whole merged line

  // request arbitration
  logic [$clog2(N)-1:0] gidx;
  logic                 granted;
  req_bus_arbiter #(.N(N)) u_req_arb (
    .clk, .rst_n,
    .en       (state == S_ARB),
    .req      (breq_valid),
    .grant    (breq_grant),
    .grant_idx(gidx),
    .granted  (granted)
  );

  // snoop answer selection
  logic                 any_hit, sel_dirty;
  logic [$clog2(N)-1:0] sel_idx;
  line_t                sel_data;
  resp_arbiter #(.N(N)) u_resp_arb (
    .hit(snp_hit), .dirty(snp_dirty), .data(snp_data),
    .any(any_hit), .sel(sel_idx), .sel_dirty(sel_dirty), .sel_data(sel_data)
  );

  assign snoop_valid = (state == S_SNOOP);
  assign snoop       = cur;

  assign resp_valid  = (state == S_RESP);
  assign resp.dst    = cur.src;
  assign resp.dirty  = dirty_q;
  assign resp.data   = line_q;

  assign mem_req_valid = (state == S_MEM_REQ);
  assign mem_req_write = (cur.op != OP_READ);
  assign mem_req_laddr = line_of(cur.addr);
  assign mem_req_wdata = line_q;
  always_comb begin
    mem_req_wmask = '1;
    if (cur.op == OP_UNDO && !full_line_q) begin
      mem_req_wmask = '0;
      mem_req_wmask[word_of(cur.addr)] = 1'b1;
    end
  end

  assign ev_sibling_fill = snoop_valid && cur.op == OP_READ && any_hit;
  assign ev_server       = sel_idx;
  assign ev_memory_fill  = (state == S_MEM_WAIT) && mem_resp_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_ARB;
      cur         <= '0;
      line_q      <= '0;
      dirty_q     <= 1'b0;
      full_line_q <= 1'b0;
    end else begin
      unique case (state)
        S_ARB: if (granted) begin
          cur   <= breq[gidx];
          state <= S_SNOOP;
        end
        S_SNOOP: begin
          dirty_q     <= 1'b0;
          full_line_q <= 1'b0;
          unique case (cur.op)
            OP_READ: begin
              if (any_hit) begin
                line_q  <= sel_data;
                dirty_q <= sel_dirty;
                state   <= S_RESP;
              end else begin
                state   <= S_MEM_REQ;
              end
            end
            OP_WB: begin
              line_q <= cur.data;
              state  <= S_MEM_REQ;
            end
            default: begin // OP_UNDO
              line_q <= any_hit ? sel_data : '0;
              line_q[word_of(cur.addr)] <= cur.data[0];
              full_line_q <= any_hit;
              state  <= S_MEM_REQ;
            end
          endcase
        end
        S_MEM_REQ: if (mem_req_ready) state <= mem_req_write ? S_RESP : S_MEM_WAIT;
        S_MEM_WAIT: if (mem_resp_valid) begin
          line_q <= mem_resp_data;
          state  <= S_RESP;
        end
        S_RESP:  state <= S_ARB;
        default: state <= S_ARB;
      endcase
    end
  end

  // a cache never answers its own miss
  assert property (@(posedge clk) disable iff (!rst_n)
                   snoop_valid && cur.op == OP_READ |-> !(snp_hit[cur.src[$clog2(N)-1:0]]));

endmodule
