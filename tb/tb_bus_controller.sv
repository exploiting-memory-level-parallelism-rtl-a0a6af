// Testbench for bus_controller with three requesters and the external memory model.
// Directed transactions check every path: a miss served by memory, a miss served by
// a sibling (clean and modified), the modified copy preferred when several answer,
// a victim write-back, an undo write merged into a sibling's line and an undo write
// of a single word. A final phase lets all three requesters issue at once and checks
// that the request bus carries one transaction at a time and that every requester is
// answered with the right line. Every sibling fill must name a server that holds the line.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_bus_controller;
  import mcn_pkg::*;
  localparam int N = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] breq_valid, breq_grant, snp_hit, snp_dirty;
  bus_req_t breq [N];
  line_t snp_data [N];
  logic snoop_valid, resp_valid;
  bus_req_t snoop;
  bus_resp_t resp;
  logic mem_req_valid, mem_req_write, mem_req_ready, mem_resp_valid;
  laddr_t mem_req_laddr;
  line_t mem_req_wdata, mem_resp_data;
  logic [LINE_WORDS-1:0] mem_req_wmask;
  logic ev_sibling_fill, ev_memory_fill;
  logic [$clog2(N)-1:0] ev_server;

  bus_controller #(.N(N)) dut (.*);
  ext_mem_model #(.LATENCY(3)) mem (
    .clk, .req_valid(mem_req_valid), .req_write(mem_req_write), .req_laddr(mem_req_laddr),
    .req_wdata(mem_req_wdata), .req_wmask(mem_req_wmask), .req_ready(mem_req_ready),
    .resp_valid(mem_resp_valid), .resp_data(mem_resp_data));

  // snoop answers: which caches hold a line, and how
  logic [N-1:0] hold_hit, hold_dirty;
  line_t        hold_data [N];
  always_comb
    for (int i = 0; i < N; i++) begin
      snp_hit[i]   = snoop_valid && hold_hit[i] && snoop.src != cid_t'(i);
      snp_dirty[i] = hold_dirty[i];
      snp_data[i]  = hold_data[i];
    end

  int sib_fills = 0, mem_fills = 0, snoops = 0;
  always @(posedge clk) begin
    if (ev_sibling_fill) begin
      sib_fills++;
      `CHECK(snp_hit[ev_server], "the reported server holds the line")
    end
    if (ev_memory_fill) mem_fills++;
    if (snoop_valid) snoops++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic line_t mem_line(laddr_t l);
    line_t x;
    for (int w = 0; w < LINE_WORDS; w++) x[w] = mem.peek({l, WOFF_W'(w), 2'b00});
    return x;
  endfunction

  function automatic line_t rnd_line();
    line_t x;
    for (int w = 0; w < LINE_WORDS; w++) x[w] = $urandom;
    return x;
  endfunction

  // one requester's transaction: request until granted, then wait for the response
  task automatic txn(int src, bus_op_e op, addr_t addr, line_t data, output bus_resp_t r);
    @(negedge clk);
    breq_valid[src] = 1;
    breq[src].op = op; breq[src].src = cid_t'(src); breq[src].kind = CK_RW;
    breq[src].addr = addr; breq[src].data = data;
    do @(posedge clk); while (!breq_grant[src]);
    @(negedge clk);
    breq_valid[src] = 0;
    do @(posedge clk); while (!(resp_valid && resp.dst == cid_t'(src)));
    r = resp;
  endtask

  bus_resp_t r;
  line_t l1, l2, exp;

  initial begin
    breq_valid = '0; hold_hit = '0; hold_dirty = '0;
    for (int i = 0; i < N; i++) begin breq[i] = '0; hold_data[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. miss served by external memory
    txn(0, OP_READ, 32'h0000_1234, '0, r);
    `CHECK(r.data == mem_line(line_of(32'h1234)) && !r.dirty, "memory fill")
    `CHECK(mem_fills == 1 && sib_fills == 0, "memory fill counted")

    // 2. miss served by a sibling holding the line modified
    l1 = rnd_line();
    hold_hit = 3'b100; hold_dirty = 3'b100; hold_data[2] = l1;
    txn(0, OP_READ, 32'h0000_2000, '0, r);
    `CHECK(r.data == l1 && r.dirty, "sibling fill, modified")
    `CHECK(sib_fills == 1 && mem.reads == 1, "no memory read for sibling fill")

    // 3. two siblings answer, the modified copy wins; then a clean one alone
    l2 = rnd_line();
    hold_hit = 3'b011; hold_dirty = 3'b010; hold_data[0] = l2; hold_data[1] = l1;
    txn(2, OP_READ, 32'h0000_2004, '0, r);
    `CHECK(r.data == l1 && r.dirty, "modified responder preferred")
    hold_dirty = 3'b000;
    txn(2, OP_READ, 32'h0000_2004, '0, r);
    `CHECK(r.data == l2 && !r.dirty, "clean responder, lowest index")
    hold_hit = '0;

    // 4. victim write-back
    l1 = rnd_line();
    txn(1, OP_WB, 32'h0000_3000, l1, r);
    `CHECK(mem_line(line_of(32'h3000)) == l1, "write-back reaches memory")

    // 5. undo write merged into a sibling's line
    l2 = rnd_line();
    hold_hit = 3'b001; hold_dirty = 3'b001; hold_data[0] = l2;
    exp = l2; exp[2] = 32'hCAFE_0001;
    l1 = '0; l1[0] = 32'hCAFE_0001;
    txn(1, OP_UNDO, 32'h0000_4008, l1, r);
    `CHECK(mem_line(line_of(32'h4000)) == exp, "undo merged into sibling line")
    hold_hit = '0;

    // 6. undo write of one word, no copy anywhere
    exp = mem_line(line_of(32'h3000)); exp[1] = 32'hBEEF_0002;
    l1 = '0; l1[0] = 32'hBEEF_0002;
    txn(2, OP_UNDO, 32'h0000_3004, l1, r);
    `CHECK(mem_line(line_of(32'h3000)) == exp, "undo writes only its word")

    // 7. three requesters at once
    fork
      begin bus_resp_t q; txn(0, OP_READ, 32'h0001_0000, '0, q);
        `CHECK(q.data == mem_line(line_of(32'h1_0000)), "concurrent 0") end
      begin bus_resp_t q; txn(1, OP_READ, 32'h0002_0000, '0, q);
        `CHECK(q.data == mem_line(line_of(32'h2_0000)), "concurrent 1") end
      begin bus_resp_t q; txn(2, OP_READ, 32'h0003_0000, '0, q);
        `CHECK(q.data == mem_line(line_of(32'h3_0000)), "concurrent 2") end
    join
    `CHECK(snoops == 10, $sformatf("one snoop per transaction (%0d)", snoops))
    `CHECK(mem_fills == 4 && sib_fills == 3, "fill counts")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the request bus carries one transaction at a time
  always @(posedge clk) if (rst_n && snoop_valid) begin
    checks++;
    if (resp_valid) begin failures++; $display("FAIL: snoop during response"); end
  end
endmodule
