// End-to-end testbench of multicache_network at its default configuration (eight
// 8 KB caches: the processor's, and three accelerators with R/RW/W, R/RW and W/RW
// partition caches). The testbench plays the processor, the three accelerators and
// the external memory (ext_mem_model).
//
//  1. The processor writes the input arrays A and B through its own cache.
//  2. Three kernels run at the same time, each as a stream of port bundles with a
//     commit (and a register checkpoint store) at the end of every iteration:
//       acc 1: C[i] = |B[A[i] & 255]| >> 2, a three-stage pipeline, one bundle per
//              iteration (load A, load B, store C in three partitions: R, RW, W);
//       acc 2: a histogram H[A[i] & 63]++ (reads A in its own R cache, so lines of
//              A are shared by two read-only caches);
//       acc 3: D[j] = 3j + 1 and a running sum S (W and RW partitions).
//  3. Acc 1 repeats the last 64 iterations on cached data: with every access a hit,
//     one iteration must complete per cycle.
//  4. The processor reads C, H, D and S back (lines come from the sibling caches)
//     and compares them with a model.
//  5. A partition violation: after a commit, acc 3 writes three words of D (one
//     through a line its own victim buffer holds), then a load in its other
//     partition reads one of them. The network must raise the exception, restore
//     the victims, undo the writes, and the processor must see D and the checkpointed
//     register exactly as they were at the commit.
//  6. The coherence statistics must agree with the fills seen on the memory port
//     and the event outputs, and must flag at least one partition for tuning.
// Every mechanism (stall, miss, memory fill, sibling fill, dirty eviction, victim
// write-back, exception, victim restore, recovery) is counted and must occur.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_multicache_network;
  import mcn_pkg::*;
  localparam int NCACHE = 8, NACC = 3;
  localparam int N  = 3000;   // kernel 1 iterations
  localparam int N2 = 600;    // kernel 2 iterations
  localparam int N3 = 500;    // kernel 3 iterations
  localparam addr_t A_BASE = 32'h0001_0000, B_BASE = 32'h0002_0000, C_BASE = 32'h0004_0000,
                    H_BASE = 32'h0006_0000, D_BASE = 32'h0008_0000, S_ADDR = 32'h000A_0000;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // DUT ports
  logic  proc_valid, proc_write, proc_done;
  addr_t proc_addr;
  word_t proc_wdata, proc_rdata;
  logic [NACC-1:0]   acc_active, acc_valid, acc_stall, acc_bundle_done, acc_commit, acc_reg_we;
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
  logic [$clog2(NCACHE)-1:0] mon_cache, mon_server;
  logic [31:0] mon_misses, mon_coh_misses, mon_served;
  logic [NCACHE-1:0] mon_hot;

  multicache_network dut (.*);

  ext_mem_model #(.LATENCY(6)) mem (
    .clk, .req_valid(mem_req_valid), .req_write(mem_req_write), .req_laddr(mem_req_laddr),
    .req_wdata(mem_req_wdata), .req_wmask(mem_req_wmask), .req_ready(mem_req_ready),
    .resp_valid(mem_resp_valid), .resp_data(mem_resp_data));

  // per-accelerator drive (one process each)
  logic  act_a [NACC], val_a [NACC], com_a [NACC], rwe_a [NACC];
  logic  en_c [NCACHE], wr_c [NCACHE];
  always_comb
    for (int a = 0; a < NACC; a++) begin
      acc_active[a] = act_a[a];
      acc_valid[a]  = val_a[a];
      acc_commit[a] = com_a[a] && acc_bundle_done[a];   // commit with the iteration's last bundle
      acc_reg_we[a] = rwe_a[a] && acc_bundle_done[a];
    end
  always_comb
    for (int c = 0; c < NCACHE; c++) begin
      acc_port_en[c] = en_c[c];
      acc_write[c]   = wr_c[c];
    end

  // ------------------------------------------------------------ event counters
  int n_stall, n_miss, n_memfill, n_sibfill, n_evict, n_restore, n_irq, n_recover, n_bundle,
      n_commit, n_wb;
  always @(posedge clk) if (rst_n) begin
    n_stall   += $countones(acc_stall);
    n_miss    += $countones(ev_miss);
    n_evict   += $countones(ev_evict);
    n_restore += $countones(ev_restore);
    n_bundle  += $countones(acc_bundle_done);
    n_commit  += $countones(acc_commit);
    if (ev_memory_fill) n_memfill++;
    if (ev_sibling_fill) n_sibfill++;
    if (recover_done) n_recover++;
    if (vivw_irq && !$past(vivw_irq)) n_irq++;
    if (mem_req_valid && mem_req_ready && mem_req_write && mem_req_wmask == '1) n_wb++;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ processor
  task automatic proc_access(logic wr, addr_t a, word_t d, output word_t q);
    @(negedge clk);
    proc_valid = 1; proc_write = wr; proc_addr = a; proc_wdata = d;
    forever begin
      #1;
      if (proc_done) break;
      @(negedge clk);
    end
    q = proc_rdata;
    @(negedge clk);
    proc_valid = 0;
  endtask

  // ------------------------------------------------------------ accelerator bundle
  // ports: caches used in this bundle; returns the read data of every port
  task automatic bundle(int a, logic [NCACHE-1:0] ports, logic [NCACHE-1:0] wmask,
                        addr_t addr [NCACHE], word_t wd [NCACHE], logic commit,
                        logic regwe, word_t regval, output word_t rd [NCACHE],
                        output logic flushed);
    @(negedge clk);
    for (int c = 0; c < NCACHE; c++)
      if (dut.OWNER[c] == a + 1) begin
        en_c[c] = ports[c]; wr_c[c] = wmask[c]; acc_addr[c] = addr[c]; acc_wdata[c] = wd[c];
      end
    val_a[a] = 1; com_a[a] = commit; rwe_a[a] = regwe;
    acc_reg_idx[a] = 3'd3; acc_reg_wdata[a] = regval;
    flushed = 0;
    forever begin
      #1;
      if (acc_bundle_done[a]) break;
      if (recovering) begin flushed = 1; break; end
      @(negedge clk);
    end
    rd = acc_rdata;
    @(negedge clk);
    val_a[a] = 0; com_a[a] = 0; rwe_a[a] = 0;
  endtask

  // ------------------------------------------------------------ model
  function automatic word_t a_val(int i); return (i * 32'h0101_0137) ^ 32'h00C0_FFEE; endfunction
  function automatic word_t b_val(int i); return word_t'($signed(16'(i * 977 - 30000))); endfunction
  function automatic word_t kern1(word_t t);
    word_t m;
    m = ($signed(t) < 0) ? -t : t;
    return m >> 2;
  endfunction

  word_t q, rd [NCACHE], ad [NCACHE], wdv [NCACHE];
  logic  fl;
  int    hist [64];
  word_t sum;
  int    t0, t1, bundles0;

  task automatic run_kernel1(int first, int last);
    word_t a_prev, t_prev;
    addr_t ad1 [NCACHE];
    word_t wd1 [NCACHE], rd1 [NCACHE];
    logic  f;
    a_prev = 0; t_prev = 0;
    for (int k = first; k <= last + 2; k++) begin
      logic [NCACHE-1:0] ports;
      ports = '0;
      for (int c = 0; c < NCACHE; c++) begin ad1[c] = '0; wd1[c] = '0; end
      if (k <= last)                 begin ports[1] = 1; ad1[1] = A_BASE + 32'(4*k); end
      if (k >= first + 1 && k <= last + 1) begin ports[2] = 1; ad1[2] = B_BASE + 32'(4*(a_prev & 255)); end
      if (k >= first + 2)            begin ports[3] = 1; ad1[3] = C_BASE + 32'(4*(k-2)); wd1[3] = kern1(t_prev); end
      bundle(0, ports, 8'b0000_1000, ad1, wd1, 1'b1, 1'b1, word_t'(k), rd1, f);
      if (ports[1]) `CHECK(rd1[1] == a_val(k), $sformatf("acc1 reads A[%0d]: %h expected %h", k, rd1[1], a_val(k)))
      if (ports[2]) `CHECK(rd1[2] == b_val(int'(a_prev & 255)), "acc1 reads B")
      if (ports[2]) t_prev = rd1[2];
      if (ports[1]) a_prev = rd1[1];
    end
  endtask

  task automatic run_kernel2();
    addr_t ad2 [NCACHE];
    word_t wd2 [NCACHE], rd2 [NCACHE];
    logic  f;
    word_t x, h;
    for (int c = 0; c < NCACHE; c++) begin ad2[c] = '0; wd2[c] = '0; end
    for (int i = 0; i < N2; i++) begin
      ad2[4] = A_BASE + 32'(4*i);
      bundle(1, 8'b0001_0000, '0, ad2, wd2, 1'b0, 1'b0, 0, rd2, f);
      x = rd2[4];
      `CHECK(x == a_val(i), "acc2 reads A")
      ad2[5] = H_BASE + 32'(4*(x & 63));
      bundle(1, 8'b0010_0000, '0, ad2, wd2, 1'b0, 1'b0, 0, rd2, f);
      h = rd2[5];
      wd2[5] = h + 1;
      bundle(1, 8'b0010_0000, 8'b0010_0000, ad2, wd2, 1'b1, 1'b1, word_t'(i), rd2, f);
    end
  endtask

  task automatic run_kernel3();
    addr_t ad3 [NCACHE];
    word_t wd3 [NCACHE], rd3 [NCACHE];
    logic  f;
    word_t s;
    for (int c = 0; c < NCACHE; c++) begin ad3[c] = '0; wd3[c] = '0; end
    for (int j = 0; j < N3; j++) begin
      ad3[6] = D_BASE + 32'(4*j); wd3[6] = word_t'(3*j + 1);
      ad3[7] = S_ADDR;
      bundle(2, 8'b1100_0000, 8'b0100_0000, ad3, wd3, 1'b0, 1'b0, 0, rd3, f);
      s = rd3[7];
      wd3[7] = s + word_t'(j);
      bundle(2, 8'b1000_0000, 8'b1000_0000, ad3, wd3, 1'b1, 1'b1, word_t'(j), rd3, f);
    end
  endtask

  // coherence statistics: every read miss is served either by memory or by a
  // sibling, the per-server counts add up, and the rate flag is coh * 10 > misses
  task automatic check_monitor();
    longint tot_miss, tot_coh, row;
    tot_miss = 0; tot_coh = 0;
    for (int c = 0; c < NCACHE; c++) begin
      @(negedge clk);
      mon_cache = ($clog2(NCACHE))'(c);
      row = 0;
      for (int s = 0; s < NCACHE; s++) begin
        mon_server = ($clog2(NCACHE))'(s); #1;
        row += mon_served;
        if (s == c) `CHECK(mon_served == 0, "a cache never serves itself")
      end
      tot_miss += mon_misses;
      tot_coh  += mon_coh_misses;
      `CHECK(row == longint'(mon_coh_misses), $sformatf("cache %0d: served counts add up", c))
      `CHECK(mon_coh_misses <= mon_misses, "coherence misses are misses")
      `CHECK(mon_hot[c] == (longint'(mon_coh_misses) * 10 > longint'(mon_misses)),
             $sformatf("cache %0d: rate flag", c))
    end
    `CHECK(tot_miss == longint'(n_memfill + n_sibfill), $sformatf("misses %0d = memory + sibling fills", tot_miss))
    `CHECK(tot_coh == longint'(n_sibfill), "coherence misses = sibling fills")
    // the processor read C back from accelerator 1's W cache
    mon_cache = 0; mon_server = 3; #1;
    `CHECK(mon_served > 0, "cache 3 served the processor")
    `CHECK(mon_hot != '0, "some partition is flagged for tuning")
    @(negedge clk); mon_clear = 1;
    @(negedge clk); mon_clear = 0; #1;
    `CHECK(mon_misses == 0 && mon_served == 0, "counters cleared")
  endtask

  initial begin
    proc_valid = 0; proc_write = 0; proc_addr = '0; proc_wdata = '0;
    proc_reg_acc = 0; proc_reg_idx = 0; irq_ack = 0;
    mon_clear = 0; mon_cache = 0; mon_server = 0;
    for (int a = 0; a < NACC; a++) begin
      act_a[a] = 0; val_a[a] = 0; com_a[a] = 0; rwe_a[a] = 0;
      acc_reg_idx[a] = 0; acc_reg_wdata[a] = 0;
    end
    for (int c = 0; c < NCACHE; c++) begin
      en_c[c] = 0; wr_c[c] = 0; acc_addr[c] = '0; acc_wdata[c] = '0;
    end
    {n_stall, n_miss, n_memfill, n_sibfill, n_evict, n_restore, n_irq, n_recover, n_bundle, n_commit, n_wb} = '0;
    repeat (4) @(posedge clk);
    rst_n = 1;

    // 1. processor initialises A and B
    for (int i = 0; i < N; i++) proc_access(1, A_BASE + 32'(4*i), a_val(i), q);
    for (int i = 0; i < 256; i++) proc_access(1, B_BASE + 32'(4*i), b_val(i), q);
    for (int i = 0; i < 64; i++) proc_access(1, H_BASE + 32'(4*i), 0, q);
    proc_access(1, S_ADDR, 0, q);
    $display("init done at %0t", $time);

    // 2. three kernels at once
    for (int a = 0; a < NACC; a++) act_a[a] = 1;
    fork
      run_kernel1(0, N-1);
      run_kernel2();
      run_kernel3();
    join
    $display("kernels done at %0t", $time);

    // 3. repeat the last 64 iterations of kernel 1: all hits, one iteration per cycle
    run_kernel1(N-64, N-1);   // make sure every line is resident
    bundles0 = n_bundle;
    t0 = $time;
    run_kernel1(N-64, N-1);
    t1 = $time;
    `CHECK(n_bundle - bundles0 == 66, "bundle count of the hit run")
    // each bundle() call spends two clock periods in the testbench, one cycle in the DUT
    `CHECK((t1 - t0) / 10 == 2 * 66, $sformatf("one iteration per cycle on hits: %0d cycles for 66", (t1 - t0) / 20))
    for (int a = 0; a < NACC; a++) act_a[a] = 0;

    // 4. processor checks the results
    for (int i = 0; i < N; i++) begin
      proc_access(0, C_BASE + 32'(4*i), 0, q);
      `CHECK(q == kern1(b_val(int'(a_val(i) & 255))), $sformatf("C[%0d] = %h", i, q))
    end
    foreach (hist[b]) hist[b] = 0;
    for (int i = 0; i < N2; i++) hist[a_val(i) & 63]++;
    for (int b = 0; b < 64; b++) begin
      proc_access(0, H_BASE + 32'(4*b), 0, q);
      `CHECK(q == word_t'(hist[b]), $sformatf("H[%0d] = %0d expected %0d", b, q, hist[b]))
    end
    sum = 0;
    for (int j = 0; j < N3; j++) begin
      sum += word_t'(j);
      proc_access(0, D_BASE + 32'(4*j), 0, q);
      `CHECK(q == word_t'(3*j + 1), $sformatf("D[%0d]", j))
    end
    proc_access(0, S_ADDR, 0, q);
    `CHECK(q == sum, "S")
    `CHECK(n_irq == 0, "no exception while partitions were respected")
    $display("results checked at %0t", $time);

    // 5. partition violation on accelerator 3
    act_a[2] = 1;
    for (int c = 0; c < NCACHE; c++) begin ad[c] = '0; wdv[c] = '0; end
    ad[6] = D_BASE + 32'(4*100); wdv[6] = 32'hAAAA_0100;
    bundle(2, 8'b0100_0000, 8'b0100_0000, ad, wdv, 1'b1, 1'b1, 100, rd, fl);   // committed
    ad[6] = D_BASE + 32'(4*101); wdv[6] = 32'hBBBB_0101;
    bundle(2, 8'b0100_0000, 8'b0100_0000, ad, wdv, 1'b0, 1'b1, 101, rd, fl);   // speculative
    ad[6] = D_BASE + 32'(4*(100 + 2048)); wdv[6] = 32'hBBBB_2148;             // same set: evicts
    bundle(2, 8'b0100_0000, 8'b0100_0000, ad, wdv, 1'b0, 1'b0, 0, rd, fl);
    ad[6] = D_BASE + 32'(4*102); wdv[6] = 32'hBBBB_0102;                      // line back from the victim buffer
    bundle(2, 8'b0100_0000, 8'b0100_0000, ad, wdv, 1'b0, 1'b0, 0, rd, fl);
    `CHECK(n_irq == 0, "no exception yet")
    ad[7] = D_BASE + 32'(4*101);                                              // the other partition
    bundle(2, 8'b1000_0000, 8'b0000_0000, ad, wdv, 1'b0, 1'b0, 0, rd, fl);
    `CHECK(fl, "bundle withdrawn by the exception")
    while (!recover_done) @(negedge clk);
    `CHECK(vivw_irq && recovering, "exception pending until acknowledged")
    act_a[2] = 0;
    proc_reg_acc = 2; proc_reg_idx = 3; #1;
    `CHECK(proc_reg_rdata == 100, $sformatf("checkpointed register %0d", proc_reg_rdata))
    @(negedge clk); irq_ack = 1;
    @(negedge clk); irq_ack = 0;
    proc_access(0, D_BASE + 32'(4*100), 0, q);
    `CHECK(q == 32'hAAAA_0100, "committed write kept")
    proc_access(0, D_BASE + 32'(4*101), 0, q);
    `CHECK(q == word_t'(3*101 + 1), $sformatf("D[101] undone: %h", q))
    proc_access(0, D_BASE + 32'(4*102), 0, q);
    `CHECK(q == word_t'(3*102 + 1), $sformatf("D[102] undone: %h", q))
    proc_access(0, D_BASE + 32'(4*(100 + 2048)), 0, q);
    `CHECK(q == mem.init_word(D_BASE + 32'(4*(100 + 2048))), $sformatf("D[2148] undone: %h", q))

    $display("stall cycles=%0d misses=%0d memory fills=%0d sibling fills=%0d evictions=%0d write-backs=%0d",
             n_stall, n_miss, n_memfill, n_sibfill, n_evict, n_wb);
    $display("bundles=%0d commits=%0d exceptions=%0d victim restores=%0d recoveries=%0d",
             n_bundle, n_commit, n_irq, n_restore, n_recover);
    `CHECK(n_stall > 0,   "stall happened")
    `CHECK(n_miss > 0,    "miss happened")
    `CHECK(n_memfill > 0, "memory fill happened")
    `CHECK(n_sibfill > 0, "sibling fill happened")
    `CHECK(n_evict > 0,   "dirty eviction happened")
    `CHECK(n_wb > 0,      "victim write-back happened")
    `CHECK(n_irq == 1,    "one exception")
    `CHECK(n_restore > 0, "victim restore happened")
    `CHECK(n_recover == 1, "one recovery")
    check_monitor();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
