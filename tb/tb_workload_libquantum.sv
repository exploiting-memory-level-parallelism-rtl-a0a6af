// Workload testbench: the memory behaviour of the libquantum gate loop on the default
// network (no parameter overrides).
//
// The loop's two memory instructions were placed into different partitions, and in
// every iteration they touch two words that are one word apart. No element is used
// twice. Here accelerator 1 runs that pattern over an array X of N word pairs:
//     t = X[2i+1]          (load, R cache 1)
//     X[2i] = t ^ MASK     (store, RW cache 2)
// The two partitions share every cache line. Each access therefore takes the line
// away from the other cache, and every access of the loop misses, half of them as
// coherence misses served by the sibling. The loop gains no hit from either cache.
// The testbench checks:
//  - the results, read back by the processor (lines come from cache 2 or cache 1);
//  - that every access of the loop missed;
//  - that the coherence statistics count the sibling transfers and flag both caches
//    (coherence miss rate above 0.1), the signal that these two partitions should
//    be merged;
//  - that no violation was raised: the two instructions never touch the same word.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_workload_libquantum;
  import mcn_pkg::*;
  localparam int NCACHE = 8, NACC = 3;
  localparam int N = 512;                       // word pairs (4 KB)
  localparam addr_t X_BASE = 32'h0003_0000;
  localparam word_t MASK = 32'h0000_8001;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic proc_valid, proc_write, proc_done;
  addr_t proc_addr;
  word_t proc_wdata, proc_rdata;
  logic [NACC-1:0] acc_active, acc_valid, acc_stall, acc_bundle_done, acc_commit, acc_reg_we;
  logic [NCACHE-1:0] acc_port_en, acc_write;
  addr_t acc_addr [NCACHE];
  word_t acc_wdata [NCACHE], acc_rdata [NCACHE];
  logic [2:0] acc_reg_idx [NACC];
  word_t acc_reg_wdata [NACC];
  logic [1:0] proc_reg_acc;
  logic [2:0] proc_reg_idx;
  word_t proc_reg_rdata;
  logic mem_req_valid, mem_req_write, mem_req_ready, mem_resp_valid;
  laddr_t mem_req_laddr;
  line_t mem_req_wdata, mem_resp_data;
  logic [LINE_WORDS-1:0] mem_req_wmask;
  logic vivw_irq, irq_ack, recovering, recover_done;
  logic [NCACHE-1:0] ev_miss, ev_evict, ev_restore;
  logic ev_sibling_fill, ev_memory_fill;
  logic mon_clear;
  logic [2:0] mon_cache, mon_server;
  logic [31:0] mon_misses, mon_coh_misses, mon_served;
  logic [NCACHE-1:0] mon_hot;

  multicache_network dut (.*);

  ext_mem_model #(.LATENCY(6)) mem (
    .clk, .req_valid(mem_req_valid), .req_write(mem_req_write), .req_laddr(mem_req_laddr),
    .req_wdata(mem_req_wdata), .req_wmask(mem_req_wmask), .req_ready(mem_req_ready),
    .resp_valid(mem_resp_valid), .resp_data(mem_resp_data));

  int miss1, miss2, irqs;
  always @(posedge clk) if (rst_n) begin
    if (ev_miss[1]) miss1++;
    if (ev_miss[2]) miss2++;
    if (vivw_irq) irqs++;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic proc_read(addr_t a, output word_t q);
    @(negedge clk);
    proc_valid = 1; proc_write = 0; proc_addr = a;
    forever begin
      #1;
      if (proc_done) break;
      @(negedge clk);
    end
    q = proc_rdata;
    @(negedge clk);
    proc_valid = 0;
  endtask

  word_t t, q;
  initial begin
    proc_valid = 0; proc_write = 0; proc_addr = '0; proc_wdata = '0;
    acc_active = '0; acc_valid = '0; acc_commit = '0; acc_reg_we = '0;
    acc_port_en = '0; acc_write = '0;
    for (int c = 0; c < NCACHE; c++) begin acc_addr[c] = '0; acc_wdata[c] = '0; end
    for (int a = 0; a < NACC; a++) begin acc_reg_idx[a] = '0; acc_reg_wdata[a] = '0; end
    proc_reg_acc = 0; proc_reg_idx = 0; irq_ack = 0;
    mon_clear = 0; mon_cache = 0; mon_server = 0;
    miss1 = 0; miss2 = 0; irqs = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;

    acc_active[0] = 1;
    for (int i = 0; i < N; i++) begin
      // load of this iteration; the store uses the loaded value one bundle later
      @(negedge clk);
      acc_port_en = 8'b0000_0010; acc_write = '0;
      acc_addr[1] = X_BASE + 32'(8*i + 4);
      acc_valid[0] = 1;
      forever begin
        #1;
        if (acc_bundle_done[0]) break;
        @(negedge clk);
      end
      t = acc_rdata[1];
      `CHECK(t == mem.init_word(X_BASE + 32'(8*i + 4)), $sformatf("X[%0d] loaded", 2*i + 1))
      @(negedge clk);
      acc_port_en = 8'b0000_0100; acc_write = 8'b0000_0100;
      acc_addr[2] = X_BASE + 32'(8*i); acc_wdata[2] = t ^ MASK;
      forever begin
        #1;
        if (acc_bundle_done[0]) break;
        @(negedge clk);
      end
      acc_commit[0] = 1;                 // end of the iteration
      @(negedge clk);
      acc_commit[0] = 0;
      acc_valid[0] = 0;
    end
    acc_active[0] = 0;

    // statistics of the loop
    @(negedge clk);
    `CHECK(miss1 == N && miss2 == N, $sformatf("every access missed: %0d and %0d of %0d", miss1, miss2, N))
    mon_cache = 1; mon_server = 2; #1;
    `CHECK(mon_misses == N, "monitor: misses of the load partition")
    `CHECK(mon_coh_misses >= N / 2 - 1 && mon_served == mon_coh_misses,
           $sformatf("load partition: %0d coherence misses, all from the store partition", mon_coh_misses))
    `CHECK(mon_hot[1] && mon_hot[2], "both partitions flagged for merging")
    $display("load cache: %0d misses, %0d served by the store cache", mon_misses, mon_coh_misses);
    mon_cache = 2; mon_server = 1; #1;
    $display("store cache: %0d misses, %0d served by the load cache", mon_misses, mon_coh_misses);
    `CHECK(irqs == 0, "no violation inside the window")

    // results
    for (int i = 0; i < N; i++) begin
      proc_read(X_BASE + 32'(8*i), q);
      `CHECK(q == (mem.init_word(X_BASE + 32'(8*i + 4)) ^ MASK), $sformatf("X[%0d] = %h", 2*i, q))
      proc_read(X_BASE + 32'(8*i + 4), q);
      `CHECK(q == mem.init_word(X_BASE + 32'(8*i + 4)), $sformatf("X[%0d] unchanged", 2*i + 1))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
