// Testbench for resp_arbiter: random answer patterns; the expected choice is the
// lowest-numbered cache holding the line modified, else the lowest-numbered holder.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_resp_arbiter;
  import mcn_pkg::*;
  localparam int N = 6;
  int checks = 0, failures = 0;
  logic [N-1:0] hit, dirty;
  line_t data [N];
  logic any, sel_dirty;
  logic [$clog2(N)-1:0] sel;
  line_t sel_data;
  resp_arbiter #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int exp;
      exp = -1;
      hit = N'($urandom); dirty = N'($urandom);
      if (n % 3 == 0) dirty = '0;
      for (int i = 0; i < N; i++) for (int w = 0; w < LINE_WORDS; w++) data[i][w] = $urandom;
      #1;
      for (int i = N-1; i >= 0; i--) if (hit[i]) exp = i;
      for (int i = N-1; i >= 0; i--) if (hit[i] && dirty[i]) exp = i;
      `CHECK(any == (hit != '0), "any")
      if (exp >= 0) begin
        `CHECK(sel == exp, $sformatf("sel %0d expected %0d (hit %b dirty %b)", sel, exp, hit, dirty))
        `CHECK(sel_data == data[exp] && sel_dirty == dirty[exp], "selected data")
      end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
