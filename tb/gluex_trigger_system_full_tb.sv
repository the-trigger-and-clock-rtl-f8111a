// End-to-end testbench of gluex_trigger_system at full size with the default
// parameters: 16 TDs x 8 crates = 128 front-end crates of 16 slots, each
// behind a fibre of its own length. The environment, sequence and checks are
// in gluex_trigger_system_tb_body.svh.
`include "tb_check.svh"
module gluex_trigger_system_full_tb;
  localparam int unsigned N_TD        = 16;
  localparam int unsigned N_TI_PER_TD = 8;

  `include "gluex_trigger_system_tb_body.svh"
  `TB_WATCHDOG(200000)
  gluex_trigger_system dut (.*);
endmodule
