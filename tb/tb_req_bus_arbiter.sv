// Testbench for req_bus_arbiter: random request patterns and enables; a model of the
// rotating priority gives the expected grant each cycle. With every cache requesting,
// the grants must visit all of them in turn.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_req_bus_arbiter;
  localparam int N = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en, granted;
  logic [N-1:0] req, grant;
  logic [$clog2(N)-1:0] grant_idx;
  req_bus_arbiter #(.N(N)) dut (.*);

  int last = N-1;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int exp;
      exp = -1;
      @(negedge clk);
      en  = (n < 1000) ? 1'b1 : 1'($urandom_range(0, 3) != 0);
      req = (n < 50) ? '1 : N'($urandom);
      #1;
      if (en) for (int k = 1; k <= N; k++) if (exp < 0 && req[(last + k) % N]) exp = (last + k) % N;
      if (exp >= 0) begin
        `CHECK(granted && grant_idx == exp && grant == (N'(1) << exp),
               $sformatf("cycle %0d: grant %0d expected %0d", n, grant_idx, exp))
        last = exp;
      end else begin
        `CHECK(!granted && grant == '0, "no grant expected")
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
