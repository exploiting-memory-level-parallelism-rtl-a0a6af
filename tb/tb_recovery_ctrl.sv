// Testbench for recovery_ctrl: raises a violation from one cache, then finishes the
// victim-restore and undo phases cache by cache, checking that each phase waits for
// every cache, that the phases come in order, that `recover_done` pulses once and
// that the interrupt holds until acknowledged. Repeated for each cache.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_recovery_ctrl;
  localparam int N = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] vivw, victim_done, undo_done;
  logic irq_ack, rec_victim, rec_undo, recovering, vivw_irq, recover_done;
  recovery_ctrl #(.N(N)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vivw = '0; victim_done = '0; undo_done = '0; irq_ack = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 2*N; round++) begin
      int src;
      src = round % N;
      @(negedge clk);
      `CHECK(!recovering && !vivw_irq && !rec_victim && !rec_undo, "idle")
      vivw[src] = 1;
      @(negedge clk);
      vivw = '0;
      `CHECK(vivw_irq && recovering && rec_victim && !rec_undo, "victim phase entered")
      for (int c = 0; c < N; c++) begin
        repeat ($urandom_range(0, 3)) begin
          @(negedge clk);
          `CHECK(rec_victim && !rec_undo, "waits for all victim engines")
        end
        victim_done[c] = 1;
        if (c < N-1) begin
          @(negedge clk);
          `CHECK(rec_victim, "still in victim phase")
        end
      end
      // undo_done raised early must not skip the order
      undo_done = '1;
      @(negedge clk);
      victim_done = '0; undo_done = '0;
      `CHECK(rec_undo && !rec_victim, "undo phase after victim phase")
      for (int c = 0; c < N; c++) begin
        @(negedge clk);
        `CHECK(rec_undo && !recover_done, "waits for all undo walks")
        undo_done[c] = 1;
      end
      @(negedge clk);
      undo_done = '0;
      `CHECK(recover_done && !rec_undo && vivw_irq, "recovery finished")
      repeat (3) begin
        @(negedge clk);
        `CHECK(!recover_done && vivw_irq && recovering, "interrupt held until acknowledged")
      end
      irq_ack = 1;
      @(negedge clk);
      irq_ack = 0;
      `CHECK(!vivw_irq && !recovering, "acknowledged")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
