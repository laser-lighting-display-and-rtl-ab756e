// tb_check.svh: shared checking helpers for the self-checking testbenches.
// CHECK(cond, msg) counts one check and, if cond is false, one failure
// with a message. TB_FINISH prints the summary line and ends simulation.
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
`define TB_FINISH \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end
`endif
