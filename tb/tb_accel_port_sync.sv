// Testbench for accel_port_sync. A model of the caches finishes each requested port
// after a random delay (a hit at once, a miss later) and returns a random word. The
// checks: a finished port is never asked again in the same bundle, the accelerator
// stalls until every enabled port of its own has finished, the bundle completes in
// exactly that cycle, and the read data delivered is each port's own. A flush in
// the middle of a bundle withdraws all requests.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_accel_port_sync;
  import mcn_pkg::*;
  localparam int N = 4;
  localparam logic [N-1:0] MASK = 4'b0111;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic bundle_valid, flush, stall, bundle_done;
  logic [N-1:0] port_en, port_req, port_done;
  word_t port_rdata [N], rdata [N];
  accel_port_sync #(.N(N), .MASK(MASK)) dut (.*);

  int delay [N];
  logic [N-1:0] fin;
  word_t val [N];
  int bundles = 0, stalls = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bundle_valid = 0; flush = 0; port_en = '0; port_done = '0;
    for (int i = 0; i < N; i++) port_rdata[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 300; b++) begin
      int cyc;
      logic do_flush;
      cyc = 0;
      do_flush = (b % 37 == 36);
      @(negedge clk);
      bundle_valid = 1;
      port_en = N'($urandom) | 4'b1000;   // port 3 belongs to another accelerator
      fin = '0;
      for (int i = 0; i < N; i++) begin
        delay[i] = ($urandom_range(0, 1) == 0) ? 0 : $urandom_range(1, 6);
        val[i] = $urandom;
      end
      forever begin
        logic [N-1:0] used;
        logic         ended;
        used = port_en & MASK;
        if (do_flush && cyc == 1) flush = 1;
        #1;
        // cache model answers the ports asked in this cycle
        for (int i = 0; i < N; i++) begin
          port_done[i] = port_req[i] && (delay[i] == 0);
          port_rdata[i] = port_done[i] ? val[i] : 32'hdead0000;
        end
        #1;
        `CHECK((port_req & ~used) == '0, "request outside the accelerator's ports")
        if (!flush) begin
          `CHECK((port_req & fin) == '0, $sformatf("finished port asked again req=%b fin=%b en=%b dq=%b", port_req, fin, port_en, dut.done_q))
          `CHECK(port_req == (used & ~fin), "every unfinished port asked")
        end else begin
          `CHECK(port_req == '0, "flush withdraws requests")
        end
        fin |= port_done;
        if (!flush) begin
          `CHECK(bundle_done == ((fin & used) == used), "bundle completes with its last port")
          `CHECK(stall == !bundle_done, "stall")
        end
        if (bundle_done) begin
          for (int i = 0; i < N; i++)
            if (used[i]) `CHECK(rdata[i] == val[i], $sformatf("rdata port %0d", i))
          bundles++;
        end else stalls++;
        ended = bundle_done || flush;
        @(negedge clk);
        for (int i = 0; i < N; i++) if (delay[i] > 0) delay[i]--;
        if (ended) break;
        cyc++;
      end
      flush = 0; port_done = '0;
      bundle_valid = 0;
    end
    `CHECK(bundles > 250 && stalls > 100, "bundles completed and stalls seen")
    $display("bundles=%0d stall cycles=%0d", bundles, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
