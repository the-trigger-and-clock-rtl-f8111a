// Testbench for ts_trigger_mux: random types for each select value.
`include "tb_check.svh"
module ts_trigger_mux_tb;
  import gt_pkg::*;
  logic clk;
  int checks = 0, failures = 0;
  `TB_CLOCK
  `TB_WATCHDOG(10000)

  trig_src_e   sel;
  logic [13:0] gtp_type, ttype;
  logic [7:0]  ext_type, vme_type;
  logic [2:0]  collision_mask;
  ts_trigger_mux dut (.*);

  initial begin
    repeat (400) begin
      gtp_type = 14'($urandom); ext_type = 8'($urandom); vme_type = 8'($urandom);
      collision_mask = 3'($urandom); sel = trig_src_e'(2'($urandom));
      #1;
      case (sel)
        SRC_GTP:       `CHECK(ttype == gtp_type, "GTP type")
        SRC_EXT:       `CHECK(ttype == {6'b0, ext_type}, "external type")
        SRC_VME:       `CHECK(ttype == {6'b0, vme_type}, "VME type")
        SRC_COLLISION: `CHECK(ttype == {11'b0, collision_mask}, "collision data")
      endcase
      @(posedge clk);
    end
    `TB_DONE
  end
endmodule
