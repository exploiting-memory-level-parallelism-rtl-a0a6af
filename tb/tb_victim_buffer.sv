// Testbench for victim_buffer. Lines are pushed, committed, drained, snooped away and
// restored in a fixed scenario plus a random phase; a queue model gives the expected
// head, commit marking, fullness and snoop answers after every step.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_victim_buffer;
  import mcn_pkg::*;
  localparam int DEPTH = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic push, commit, full, empty, head_valid, head_committed, pop;
  logic snp_en, snp_inval, snp_hit;
  laddr_t push_laddr, head_laddr, snp_laddr;
  line_t push_data, head_data, snp_data;

  victim_buffer #(.DEPTH(DEPTH)) dut (.*);

  typedef struct { laddr_t l; line_t d; logic v; logic c; } ent_t;
  ent_t q[$];   // model, head at index 0

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model: entries snooped away leave when they reach the head (the DUT needs one
  // more clock edge for that, during which it shows no head)
  function automatic void settle();
    while (q.size() > 0 && !q[0].v) void'(q.pop_front());
  endfunction

  task automatic check_head(string tag);
    int live = 0;
    foreach (q[i]) live++;
    #1;
    `CHECK(full == (q.size() == DEPTH), {tag, ": full"})
    if (q.size() > 0 && q[0].v) begin
      `CHECK(head_valid && head_laddr == q[0].l && head_data == q[0].d, $sformatf("%s: head v=%b l=%h exp %h qsize=%0d cnt=%0d", tag, head_valid, head_laddr, q[0].l, q.size(), dut.count))
      `CHECK(head_committed == q[0].c, {tag, ": head committed"})
    end else begin
      `CHECK(!head_valid, {tag, ": no head"})
    end
  endtask

  task automatic do_cycle(logic pu, laddr_t l, line_t d, logic co, logic po);
    @(negedge clk);
    push = pu; push_laddr = l; push_data = d; commit = co; pop = po;
    @(negedge clk);
    push = 0; commit = 0; pop = 0;
    if (po) begin
      void'(q.pop_front());
      @(negedge clk);  // a dropped entry that became head leaves on the next edge
    end
    if (pu) begin ent_t e; e.l = l; e.d = d; e.v = 1; e.c = 0; q.push_back(e); end
    if (co) foreach (q[i]) q[i].c = 1;
    settle();
  endtask

  function automatic line_t rnd_line();
    line_t x;
    for (int w = 0; w < LINE_WORDS; w++) x[w] = $urandom;
    return x;
  endfunction

  task automatic snoop(laddr_t l, logic inval);
    logic exp_hit = 0; line_t exp_d = '0;
    foreach (q[i]) if (q[i].v && q[i].l == l) begin exp_hit = 1; exp_d = q[i].d; end
    @(negedge clk);
    snp_en = 1; snp_laddr = l; snp_inval = inval;
    #1;
    `CHECK(snp_hit == exp_hit, $sformatf("snoop hit %h", l))
    if (exp_hit) `CHECK(snp_data == exp_d, "snoop data")
    @(negedge clk);
    snp_en = 0; snp_inval = 0;
    if (inval) foreach (q[i]) if (q[i].l == l) q[i].v = 0;
    settle();
    @(negedge clk);  // a dropped head entry leaves on the following edge
  endtask

  initial begin
    push = 0; commit = 0; pop = 0; snp_en = 0; snp_inval = 0;
    push_laddr = '0; push_data = '0; snp_laddr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check_head("reset");
    `CHECK(empty, "empty after reset")
    do_cycle(1, 28'h10, rnd_line(), 0, 0); check_head("push A");
    do_cycle(1, 28'h20, rnd_line(), 0, 0); check_head("push B");
    do_cycle(1, 28'h30, rnd_line(), 0, 0); check_head("push C");
    do_cycle(0, '0, '0, 1, 0);             check_head("commit");
    do_cycle(0, '0, '0, 0, 1);             check_head("pop A");
    snoop(28'h20, 1);                      check_head("snoop B away");
    snoop(28'h99, 1);                      check_head("snoop miss");
    do_cycle(1, 28'h40, rnd_line(), 0, 0); check_head("push D");
    do_cycle(0, '0, '0, 0, 1);             check_head("pop C");
    do_cycle(1, 28'h50, rnd_line(), 0, 0);
    do_cycle(1, 28'h60, rnd_line(), 0, 0);
    do_cycle(1, 28'h70, rnd_line(), 0, 0); check_head("full");
    `CHECK(full, "full with four lines")
    snoop(28'h60, 0);                      check_head("snoop without invalidate");
    // random phase
    for (int n = 0; n < 400; n++) begin
      int act;
      act = $urandom_range(0, 3);
      if (act == 0 && q.size() < DEPTH) begin
        // a line is never buffered twice (the cache holds one copy of it)
        laddr_t l;
        logic dup;
        do begin
          l = 28'($urandom_range(0, 15));
          dup = 0;
          foreach (q[i]) if (q[i].l == l && q[i].v) dup = 1;
        end while (dup);
        do_cycle(1, l, rnd_line(), 1'($urandom_range(0,3) == 0), 0);
      end
      else if (act == 1 && q.size() > 0 && q[0].v)
        do_cycle(0, '0, '0, 1'($urandom_range(0,3) == 0), 1);
      else if (act == 2)
        snoop(28'($urandom_range(0, 15)), 1'($urandom));
      else
        do_cycle(0, '0, '0, 1, 0);
      check_head($sformatf("random %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
