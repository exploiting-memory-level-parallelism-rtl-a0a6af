// Testbench for reg_checkpoint_store: random register stores and commits; a model
// holds the staged and the committed values. The processor's read port must always
// show the values of the last commit, a store in the commit cycle included.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_reg_checkpoint_store;
  import mcn_pkg::*;
  localparam int NREGS = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic acc_we, commit;
  logic [2:0] acc_idx, proc_idx;
  word_t acc_wdata, proc_rdata;
  reg_checkpoint_store #(.NREGS(NREGS)) dut (.*);
  word_t stage [NREGS], comm [NREGS];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acc_we = 0; commit = 0; acc_idx = 0; proc_idx = 0; acc_wdata = 0;
    for (int i = 0; i < NREGS; i++) begin stage[i] = 0; comm[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      acc_we = 1'($urandom); acc_idx = 3'($urandom); acc_wdata = $urandom;
      commit = ($urandom_range(0, 4) == 0);
      @(negedge clk);
      if (acc_we) stage[acc_idx] = acc_wdata;
      if (commit) comm = stage;
      acc_we = 0; commit = 0;
      for (int i = 0; i < NREGS; i++) begin
        proc_idx = 3'(i); #1;
        `CHECK(proc_rdata == comm[i], $sformatf("register %0d", i))
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
