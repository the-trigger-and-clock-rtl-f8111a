// Testbench for signal_distribution: every payload slot gets the input
// bundle and the BUSY output is the OR of the slot BUSY lines.
`include "tb_check.svh"
module signal_distribution_tb;
  logic clk;
  int checks = 0, failures = 0;
  `TB_CLOCK
  `TB_WATCHDOG(10000)

  logic [18:0] in_bundle;
  logic [15:0][18:0] out_bundle;
  logic [15:0] busy_in;
  logic busy_out;
  signal_distribution dut (.*);

  initial begin
    repeat (200) begin
      in_bundle = 19'($urandom);
      busy_in = ($urandom % 2) ? 16'(1 << ($urandom % 16)) : 16'h0;
      #1;
      for (int s = 0; s < 16; s++) `CHECK(out_bundle[s] == in_bundle, "fan-out")
      `CHECK(busy_out == (busy_in != 0), "BUSY merge")
      @(posedge clk);
    end
    `TB_DONE
  end
endmodule
