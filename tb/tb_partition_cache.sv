// Testbench for partition_cache (a speculative two-way RW cache of 4 sets, so that
// lines are evicted often; the end-to-end testbench covers the direct-mapped case). The testbench plays the accelerator, the request/response buses
// and every other cache of the network:
//  - random reads and writes over 16 lines; every read must return the last value
//    written (a golden image), whether it hits, misses or comes back from the
//    victim buffer;
//  - sibling misses are injected between accesses; the cache must answer with the
//    current line exactly when it holds it, and must have invalidated it afterwards
//    (the next access to the line misses); a sibling miss on one of the last five
//    words accessed must raise `vivw` (unless both sides only read), any other must not;
//  - evicted dirty lines must not be written to memory before a commit;
//  - a hit completes in its first cycle;
//  - finally a commit, four speculative writes, and a recovery (victim restore, then
//    undo): afterwards memory must read exactly as at the commit.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_partition_cache;
  import mcn_pkg::*;
  localparam int ID = 1;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic acc_valid, acc_write, acc_done, commit, active;
  addr_t acc_addr;
  word_t acc_wdata, acc_rdata;
  logic breq_valid, breq_grant, snoop_valid, snp_hit, snp_dirty, resp_valid;
  bus_req_t breq, snoop;
  line_t snp_data;
  bus_resp_t resp;
  logic rec_victim, rec_victim_done, rec_undo, rec_undo_done, vivw;
  logic ev_miss, ev_evict, ev_restore;

  partition_cache #(.ID(ID), .KIND(CK_RW), .SETS(4), .WAYS(2), .SPECULATIVE(1'b1),
                    .AHB_DEPTH(5), .VB_DEPTH(4)) dut (.*);

  // golden image (what the program has written) and the rest of the world's memory
  word_t gold  [addr_t];
  word_t world [addr_t];
  function automatic word_t init_word(addr_t a); return a * 32'h9E37_79B9; endfunction
  function automatic word_t rd(ref word_t m [addr_t], input addr_t a);
    return m.exists(a) ? m[a] : init_word(a);
  endfunction
  function automatic line_t line_from(ref word_t m [addr_t], input laddr_t l);
    line_t x;
    for (int w = 0; w < LINE_WORDS; w++) x[w] = rd(m, {l, WOFF_W'(w), 2'b00});
    return x;
  endfunction

  int misses = 0, evicts = 0, restores = 0, wbs = 0, undos = 0, vivws = 0, sib_hits = 0;
  bit committed_once = 0;
  always @(posedge clk) begin
    if (ev_miss) misses++;
    if (ev_evict) evicts++;
    if (ev_restore) restores++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ bus model
  // Serves the cache's own requests; `inject` requests a sibling miss between them.
  semaphore bus = new(1);

  task automatic serve_own();
    bus_req_t q;
    @(negedge clk);
    if (!breq_valid) return;
    q = breq;
    breq_grant = 1;
    @(negedge clk);
    breq_grant = 0;
    // snoop cycle of the cache's own request: it answers only its own undo
    snoop_valid = 1; snoop = q;
    #1;
    if (q.op == OP_READ) `CHECK(!snp_hit, "a cache does not answer its own miss")
    if (q.op == OP_UNDO && snp_hit)
      for (int w = 0; w < LINE_WORDS; w++) world[{line_of(q.addr), WOFF_W'(w), 2'b00}] = snp_data[w];
    @(negedge clk);
    snoop_valid = 0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
    resp = '0; resp.dst = cid_t'(ID);
    unique case (q.op)
      OP_READ: resp.data = line_from(world, line_of(q.addr));
      OP_WB: begin
        `CHECK(committed_once, "no write-back before the first commit")
        for (int w = 0; w < LINE_WORDS; w++) world[{line_of(q.addr), WOFF_W'(w), 2'b00}] = q.data[w];
        wbs++;
      end
      default: begin
        world[{q.addr[31:2], 2'b00}] = q.data[0];
        undos++;
      end
    endcase
    resp_valid = 1;
    @(negedge clk);
    resp_valid = 0;
  endtask

  initial begin
    breq_grant = 0; snoop_valid = 0; snoop = '0; resp_valid = 0; resp = '0;
    wait (rst_n);
    forever begin
      bus.get();
      serve_own();
      bus.put();
    end
  end

  // sibling miss on `a`, from a cache of kind k
  addr_t recent[$];
  logic  recent_wr[$];
  task automatic inject(addr_t a, cache_kind_e k, output logic hit);
    bus_req_t q;
    logic exp_vivw;
    bus.get();
    @(negedge clk);
    q = '0; q.op = OP_READ; q.src = cid_t'(ID + 1); q.kind = k; q.addr = a;
    snoop_valid = 1; snoop = q;
    #1;
    hit = snp_hit;
    exp_vivw = 0;
    // a read-only requester conflicts only with a recorded write
    foreach (recent[i]) if (recent[i] == a && (recent_wr[i] || k != CK_R)) exp_vivw = 1;
    `CHECK(vivw == exp_vivw, $sformatf("vivw for sibling miss on %h", a))
    if (vivw) vivws++;
    if (snp_hit) begin
      sib_hits++;
      `CHECK(snp_data == line_from(gold, line_of(a)), $sformatf("snooped line %h is current", a))
      for (int w = 0; w < LINE_WORDS; w++) world[{line_of(a), WOFF_W'(w), 2'b00}] = snp_data[w];
    end
    @(negedge clk);
    snoop_valid = 0;
    bus.put();
  endtask

  // ------------------------------------------------------------ accelerator port
  logic bus_busy;
  int   wb0;
  task automatic access(logic wr, addr_t a, word_t d, output int cycles, output logic missed);
    int m0;
    m0 = misses;
    @(negedge clk);
    acc_valid = 1; acc_write = wr; acc_addr = a; acc_wdata = d;
    cycles = 0;
    #1;
    wb0 = wbs;
    forever begin
      #1;
      cycles++;
      if (acc_done) break;
      @(negedge clk);
    end
    if (!wr) `CHECK(acc_rdata == rd(gold, a), $sformatf("read %h: %h expected %h", a, acc_rdata, rd(gold, a)))
    else gold[a] = d;
    @(negedge clk);
    acc_valid = 0;
    missed = (misses != m0);
    bus_busy = (wbs != wb0);   // the cache wrote back a committed victim first
    recent.push_front(a);
    recent_wr.push_front(wr);
    if (recent.size() > 5) begin
      void'(recent.pop_back());
      void'(recent_wr.pop_back());
    end
  endtask

  function automatic addr_t rnd_addr();
    return 32'h0000_8000 + 32'($urandom_range(0, 63) * 4);
  endfunction

  int cyc;
  logic missed, hit;
  word_t snap [addr_t];

  initial begin
    acc_valid = 0; acc_write = 0; acc_addr = '0; acc_wdata = '0; commit = 0; active = 1;
    rec_victim = 0; rec_undo = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // random traffic
    for (int n = 0; n < 1500; n++) begin
      addr_t a;
      a = rnd_addr();
      access(1'($urandom), a, $urandom, cyc, missed);
      if (!missed && !bus_busy) `CHECK(cyc == 1, $sformatf("hit completes in its first cycle (%0d)", cyc))
      if ($urandom_range(0, 5) == 0) begin
        addr_t s;
        s = ($urandom_range(0, 1) == 0) ? recent[$urandom_range(0, recent.size()-1)] : rnd_addr();
        inject(s, ($urandom_range(0,1) == 0) ? CK_R : CK_RW, hit);
        // an RW cache gives the line up whatever the requester is
        access(1'b0, s, '0, cyc, missed);
        `CHECK(missed, "line invalidated by the sibling miss")
      end
      // an "iteration" is three accesses (plus a possible re-read): at most four
      // dirty evictions between commits, which the victim buffer holds
      if (n % 3 == 2) begin
        @(negedge clk); commit = 1; committed_once = 1;
        @(negedge clk); commit = 0;
      end
    end
    // recovery scenario
    // five reads fill the history buffer with accesses that need no undo
    for (int i = 0; i < 5; i++) access(1'b0, rnd_addr(), '0, cyc, missed);
    @(negedge clk); commit = 1; committed_once = 1;
    @(negedge clk); commit = 0;
    repeat (60) @(negedge clk);            // let the committed victims drain
    snap = gold;
    foreach (world[k]) if (!snap.exists(k)) snap[k] = world[k];
    // speculative writes to four lines of one set: dirty evictions into the victim buffer
    access(1'b1, 32'h0000_8010, 32'h1111_0001, cyc, missed);
    access(1'b1, 32'h0000_8150, 32'h1111_0002, cyc, missed);
    access(1'b1, 32'h0000_8094, 32'h1111_0003, cyc, missed);
    access(1'b1, 32'h0000_81d8, 32'h1111_0004, cyc, missed);
    @(negedge clk); rec_victim = 1;
    while (!rec_victim_done) @(negedge clk);
    rec_victim = 0;
    @(negedge clk); rec_undo = 1;
    while (!rec_undo_done) @(negedge clk);
    rec_undo = 0;
    gold = snap;
    for (int i = 0; i < 128; i++) access(1'b0, 32'h0000_8000 + 32'(i*4), '0, cyc, missed);
    $display("misses=%0d evictions=%0d write-backs=%0d sibling hits=%0d vivw=%0d restores=%0d undos=%0d",
             misses, evicts, wbs, sib_hits, vivws, restores, undos);
    `CHECK(evicts > 50 && wbs > 20 && sib_hits > 20 && vivws > 20, "mechanisms exercised")
    `CHECK(restores > 0 && undos == 4, "recovery restored victims and undid four writes")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
