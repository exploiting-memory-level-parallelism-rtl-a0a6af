// Shared check helpers for the self-checking testbenches: each testbench declares
// `int checks, failures;` and uses CHECK(condition, message).
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      $display("FAIL @%0t: %s", $time, msg); \
    end \
  end
`endif
