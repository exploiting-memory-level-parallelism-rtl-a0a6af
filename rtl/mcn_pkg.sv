// mcn_pkg: types and constants shared by the multi-cache memory access network.
//
// The network connects several small partition caches (read-only, write-only and
// read-write) to two shared buses: an internal memory request bus, on which every
// miss, victim write-back and undo write is serialised, and an internal memory
// response bus that returns a cache line (or an acknowledge) to the requester.
// Addresses are byte addresses; caches move whole lines of LINE_WORDS 32-bit
// words. Line size and address width are this design's choice (the source fixes
// neither); accesses from the accelerators are whole 32-bit words.
package mcn_pkg;

  localparam int ADDR_W     = 32;                 // byte address width
  localparam int DATA_W     = 32;                 // word width
  localparam int LINE_WORDS = 4;                  // words per cache line (16 bytes)
  localparam int WOFF_W     = $clog2(LINE_WORDS); // word-in-line offset bits
  localparam int LADDR_W    = ADDR_W - 2 - WOFF_W;// line address width
  localparam int SRC_W      = 4;                  // cache identifier width (up to 16 caches)

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [DATA_W-1:0]  word_t;
  typedef logic [LADDR_W-1:0] laddr_t;
  typedef logic [LINE_WORDS-1:0][DATA_W-1:0] line_t;
  typedef logic [SRC_W-1:0]   cid_t;

  // Kind of a partition cache: follows the mix of loads and stores in its partition.
  typedef enum logic [1:0] {
    CK_R  = 2'd0,   // partition holds only loads
    CK_W  = 2'd1,   // partition holds only stores
    CK_RW = 2'd2    // partition holds loads and stores
  } cache_kind_e;

  // Operations carried on the internal memory request bus.
  typedef enum logic [1:0] {
    OP_READ = 2'd0, // miss: fetch a line from a sibling cache or external memory
    OP_WB   = 2'd1, // committed victim line written to external memory
    OP_UNDO = 2'd2  // restore one word's pre-write value, invalidating every copy of the line
  } bus_op_e;

  typedef struct packed {
    bus_op_e     op;
    cid_t        src;    // requesting cache
    cache_kind_e kind;   // kind of the requesting cache (selects the snoop action)
    addr_t       addr;   // byte address (OP_READ/OP_WB: any address in the line)
    line_t       data;   // OP_WB: the line; OP_UNDO: word 0 holds the old value
  } bus_req_t;

  typedef struct packed {
    cid_t  dst;          // cache the response is for
    logic  dirty;        // line came from a sibling holding it modified
    line_t data;         // OP_READ: the line; otherwise don't-care (acknowledge)
  } bus_resp_t;

  function automatic laddr_t line_of(addr_t a);
    return a[ADDR_W-1 -: LADDR_W];
  endfunction

  function automatic logic [WOFF_W-1:0] word_of(addr_t a);
    return a[2 +: WOFF_W];
  endfunction

endpackage
