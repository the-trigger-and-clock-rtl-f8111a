// Shared testbench helpers: a 250 MHz clock, check counting, a watchdog and
// the final result line. Include inside a testbench module that declares
// `logic clk` and `int checks, failures`.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      $display("FAIL: %s (time %0t)", msg, $time); \
    end \
  end
`define TB_CLOCK initial clk = 1'b0; always #2 clk = ~clk;
`define TB_WATCHDOG(ncycles) \
  initial begin \
    repeat (ncycles) @(posedge clk); \
    failures++; \
    $display("FAIL: watchdog expired"); \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end
`define TB_DONE \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end
`endif
