// Testbench for coherence_monitor (6 caches, 5-bit counters so that saturation is
// reached). Random miss events, some served by a sibling, are applied; a model in
// the testbench keeps the same counts (saturating) and after every event the read
// port is compared for a random cache/server pair, and the rate flags for all
// caches against coh * 10 > misses. Finally `clear` must zero every counter.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_coherence_monitor;
  localparam int N = 6, CNT_W = 5, IW = $clog2(N);
  localparam int MAXC = (1 << CNT_W) - 1;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, miss_valid, sib_fill;
  logic [IW-1:0] miss_src, server, rd_cache, rd_server;
  logic [CNT_W-1:0] rd_misses, rd_coh_misses, rd_served;
  logic [N-1:0] hot;

  coherence_monitor #(.N(N), .CNT_W(CNT_W)) dut (.*);

  int m [N], ch [N], sv [N][N];
  function automatic int sat(int x); return (x >= MAXC) ? MAXC : x + 1; endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int saturated;
  initial begin
    clear = 0; miss_valid = 0; sib_fill = 0; miss_src = 0; server = 0; rd_cache = 0; rd_server = 0;
    for (int i = 0; i < N; i++) begin
      m[i] = 0; ch[i] = 0;
      for (int j = 0; j < N; j++) sv[i][j] = 0;
    end
    saturated = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int s, v;
      @(negedge clk);
      s = $urandom_range(0, N - 1);
      v = $urandom_range(0, N - 2);
      if (v >= s) v++;
      miss_valid = ($urandom_range(0, 3) != 0);
      sib_fill   = ($urandom_range(0, 2) == 0) || (s == 1);   // cache 1 mostly coherence misses
      miss_src   = IW'(s);
      server     = IW'(v);
      if (miss_valid) begin
        m[s] = sat(m[s]);
        if (sib_fill) begin
          ch[s] = sat(ch[s]);
          sv[s][v] = sat(sv[s][v]);
        end
      end
      @(negedge clk);
      miss_valid = 0; sib_fill = 0;
      rd_cache  = IW'($urandom_range(0, N - 1));
      rd_server = IW'($urandom_range(0, N - 1));
      #1;
      `CHECK(rd_misses == CNT_W'(m[rd_cache]), $sformatf("misses of %0d: %0d expected %0d", rd_cache, rd_misses, m[rd_cache]))
      `CHECK(rd_coh_misses == CNT_W'(ch[rd_cache]), "coherence misses")
      `CHECK(rd_served == CNT_W'(sv[rd_cache][rd_server]), "served count")
      for (int c = 0; c < N; c++)
        `CHECK(hot[c] == (ch[c] * 10 > m[c]), $sformatf("rate flag of %0d", c))
      if (m[rd_cache] == MAXC) saturated++;
    end
    `CHECK(saturated > 0, "saturation reached")
    `CHECK(hot[1], "cache 1 is flagged")
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    for (int c = 0; c < N; c++) begin
      rd_cache = IW'(c); rd_server = IW'((c + 1) % N); #1;
      `CHECK(rd_misses == 0 && rd_coh_misses == 0 && rd_served == 0 && !hot[c], "cleared")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
