// Self-checking helpers shared by the testbenches.
// Each testbench declares "int checks = 0, failures = 0;" and uses CHECK to
// compare an observed value with an expected one worked out independently.
//
// These helpers are this design's own verification scaffolding and do not
// come from the document.
`ifndef CHECK_SVH
`define CHECK_SVH
`define CHECK(got, exp, what) \
  begin \
    checks++; \
    if ((got) !== (exp)) begin \
      failures++; \
      $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time); \
    end \
  end
`define TB_DONE \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end
`endif
