// End-to-end testbench of gluex_trigger_system, reduced size: 2 TDs with 2
// crates each (4 front-end crates, all with different fibre lengths). The
// environment, sequence and checks are in gluex_trigger_system_tb_body.svh.
`include "tb_check.svh"
module gluex_trigger_system_tb;
  localparam int unsigned N_TD        = 2;
  localparam int unsigned N_TI_PER_TD = 2;

  `include "gluex_trigger_system_tb_body.svh"
  `TB_WATCHDOG(200000)
  gluex_trigger_system #(.N_TD(N_TD), .N_TI_PER_TD(N_TI_PER_TD)) dut (.*);
endmodule
