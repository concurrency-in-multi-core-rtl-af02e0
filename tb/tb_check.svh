// Shared check macro for the self-checking testbenches: counts a check, and a
// failure with a message when the condition is false. Expects `int checks`
// and `int failures` in the including module.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      $display("FAIL t=%0t: %s", $time, msg); \
    end \
  end
`endif
