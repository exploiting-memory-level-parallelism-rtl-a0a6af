// Testbench for access_history_buffer. A queue model keeps the last DEPTH accesses;
// random accesses are pushed and, after each, the comparator output is checked
// against addresses inside and outside the window. The undo walk must then return
// exactly the recorded writes, newest first, with their overwritten values. A second
// instance without data storage (read-only cache) must finish its walk at once.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_access_history_buffer;
  import mcn_pkg::*;
  localparam int DEPTH = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  push, push_write, cmp_valid, undo_req, undo_ack, commit, clear, cmp_reader;
  addr_t push_addr, cmp_addr, undo_addr;
  word_t push_old, undo_data;
  logic  vivw, undo_valid, undo_done;
  logic  vivw_r, uv_r, ud_r;
  addr_t ua_r; word_t udat_r;

  access_history_buffer #(.DEPTH(DEPTH), .HAS_DATA(1'b1)) dut (.*);
  access_history_buffer #(.DEPTH(DEPTH), .HAS_DATA(1'b0)) dut_r (
    .clk, .rst_n, .push, .push_addr, .push_write, .push_old, .commit, .clear, .cmp_valid, .cmp_addr, .cmp_reader,
    .vivw(vivw_r), .undo_req, .undo_valid(uv_r), .undo_addr(ua_r), .undo_data(udat_r),
    .undo_ack, .undo_done(ud_r));

  typedef struct { addr_t a; logic w; logic wr; word_t old; } rec_t;
  rec_t hist[$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a miss from a read-only cache only conflicts with a recorded write
  function automatic logic in_window(addr_t a);
    foreach (hist[i]) if (hist[i].a[31:2] == a[31:2] && (hist[i].wr || !cmp_reader)) return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    push = 0; push_write = 0; cmp_valid = 0; undo_req = 0; undo_ack = 0; commit = 0; clear = 0; cmp_reader = 0;
    push_addr = '0; cmp_addr = '0; push_old = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // empty buffer matches nothing
    cmp_valid = 1; cmp_addr = 32'h100; #1;
    `CHECK(!vivw && !vivw_r, "empty buffer must not signal")
    for (int n = 0; n < 40; n++) begin
      rec_t r;
      r.a = {26'h0, 4'($urandom_range(0, 11)), 2'b00} + 32'h1000;
      r.w = 1'($urandom);
      r.wr = r.w;
      r.old = $urandom;
      @(negedge clk);
      cmp_valid = 0;
      push = 1; push_addr = r.a; push_write = r.w; push_old = r.old;
      @(negedge clk);
      push = 0;
      hist.push_front(r);
      if (hist.size() > DEPTH) void'(hist.pop_back());
      // an occasional commit: committed writes are never undone, addresses stay
      if (n % 7 == 3 && n < 30) begin
        commit = 1;
        @(negedge clk);
        commit = 0;
        foreach (hist[i]) hist[i].w = 0;
      end
      // probe every address of the range
      for (int k = 0; k < 12; k++) begin
        cmp_valid = 1; cmp_addr = 32'h1000 + 32'(k*4) + 32'($urandom_range(0,3));
        cmp_reader = 1'($urandom);
        #1;
        `CHECK(vivw == in_window(cmp_addr), $sformatf("vivw for %h", cmp_addr))
        `CHECK(vivw_r == in_window(cmp_addr), "vivw of data-less buffer")
      end
      cmp_valid = 0; #1;
      `CHECK(!vivw, "no compare, no vivw")
    end
    // undo walk: writes newest first
    @(negedge clk);
    undo_req = 1;
    foreach (hist[i]) begin
      if (hist[i].w) begin
        #1;
        `CHECK(undo_valid && !undo_done, "undo entry expected")
        `CHECK(undo_addr == hist[i].a && undo_data == hist[i].old,
               $sformatf("undo %0d: got %h/%h want %h/%h", i, undo_addr, undo_data, hist[i].a, hist[i].old))
        undo_ack = 1;
        @(negedge clk);
        undo_ack = 0;
      end
    end
    #1;
    `CHECK(!undo_valid && undo_done, "walk finished")
    `CHECK(ud_r && !uv_r, "data-less buffer walk finishes at once")
    @(negedge clk);
    undo_req = 0;
    // buffer was cleared
    for (int k = 0; k < 12; k++) begin
      cmp_valid = 1; cmp_addr = 32'h1000 + 32'(k*4); #1;
      `CHECK(!vivw, "cleared after undo")
    end
    // clear empties the buffer
    for (int n = 0; n < 3; n++) begin
      @(negedge clk);
      push = 1; push_addr = 32'h2000 + 32'(n*4); push_write = 1; push_old = 0;
    end
    @(negedge clk);
    push = 0; cmp_valid = 1; cmp_addr = 32'h2004; #1;
    `CHECK(vivw, "recorded before clear")
    clear = 1;
    @(negedge clk);
    clear = 0; #1;
    `CHECK(!vivw, "nothing recorded after clear")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
