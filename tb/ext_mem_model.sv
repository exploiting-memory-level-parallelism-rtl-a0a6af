// ext_mem_model: behavioural model of the external memory behind the multi-cache
// network (testbench only; the off-chip RAM is not part of the design).
//
// Line-wide port: a request is accepted when `req_ready` is high (random back-pressure
// when RANDOM_READY is set); a read returns its line LATENCY cycles later with a one-
// cycle `resp_valid`; a write updates the words selected by `req_wmask`. A word never
// written reads as init_word(address), so testbenches can predict it. Reads are
// answered in order, one at a time.
`timescale 1ns/1ps
module ext_mem_model
  import mcn_pkg::*;
#(
  parameter int LATENCY      = 4,
  parameter bit RANDOM_READY = 1'b1
) (
  input  logic   clk,
  input  logic   req_valid,
  input  logic   req_write,
  input  laddr_t req_laddr,
  input  line_t  req_wdata,
  input  logic [LINE_WORDS-1:0] req_wmask,
  output logic   req_ready,
  output logic   resp_valid,
  output line_t  resp_data
);

  word_t mem [addr_t];   // sparse, keyed by word address
  int    reads = 0, writes = 0;

  function automatic word_t init_word(addr_t a);
    return a ^ 32'h5a5a_0000;
  endfunction

  function automatic word_t peek(addr_t a);
    addr_t k;
    k = {a[ADDR_W-1:2], 2'b00};
    return mem.exists(k) ? mem[k] : init_word(k);
  endfunction

  function automatic void poke(addr_t a, word_t v);
    mem[{a[ADDR_W-1:2], 2'b00}] = v;
  endfunction

  logic busy = 1'b0;
  int   count = 0;
  laddr_t rd_l;

  initial begin
    req_ready  = 1'b0;
    resp_valid = 1'b0;
    resp_data  = '0;
  end

  always @(posedge clk) begin
    resp_valid <= 1'b0;
    if (req_valid && req_ready) begin
      if (req_write) begin
        for (int w = 0; w < LINE_WORDS; w++)
          if (req_wmask[w]) poke({req_laddr, WOFF_W'(w), 2'b00}, req_wdata[w]);
        writes++;
      end else begin
        busy  <= 1'b1;
        count <= LATENCY;
        rd_l  <= req_laddr;
        reads++;
      end
    end
    if (busy) begin
      if (count <= 1) begin
        busy       <= 1'b0;
        resp_valid <= 1'b1;
        for (int w = 0; w < LINE_WORDS; w++) resp_data[w] <= peek({rd_l, WOFF_W'(w), 2'b00});
      end else count <= count - 1;
    end
    req_ready <= !busy && !(req_valid && req_ready && !req_write) &&
                 (!RANDOM_READY || $urandom_range(0, 3) != 0);
  end

endmodule
