// Testbench for slow_clock_phase: the phase counts 0..3 and a resync
// restarts it at 0 in the next cycle, whatever the phase was.
`include "tb_check.svh"
module slow_clock_phase_tb;
  logic clk;
  int checks = 0, failures = 0;
  `TB_CLOCK
  `TB_WATCHDOG(10000)

  logic rst, resync, clk_125, clk_62;
  logic [1:0] phase;
  slow_clock_phase dut (.*);

  int expected;
  initial begin
    rst = 1; resync = 0;
    @(posedge clk); #1 rst = 0; expected = 0;
    repeat (200) begin
      `CHECK(phase == 2'(expected), "phase sequence")
      `CHECK(clk_62 == (expected < 2) && clk_125 == (expected % 2 == 0), "divided clocks")
      resync = ($urandom % 11) == 0;
      @(posedge clk); #1;
      expected = resync ? 0 : (expected + 1) % 4;
      resync = 0;
    end
    `TB_DONE
  end
endmodule
