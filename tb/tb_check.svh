// Shared check macro for the testbenches: counts a check, and a failure
// with a message when the condition is false.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      $display("FAIL %0t: %s", $time, msg); \
    end \
  end
`endif
