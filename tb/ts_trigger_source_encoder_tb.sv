// Testbench for ts_trigger_source_encoder: all combinations of the three
// sources, throttle and ready, checked against the source-code table
// (01 GTP, 10 external, 11 VME, 00 collision) and the counters.
`include "tb_check.svh"
module ts_trigger_source_encoder_tb;
  import gt_pkg::*;
  logic clk;
  int checks = 0, failures = 0;
  `TB_CLOCK
  `TB_WATCHDOG(10000)

  logic rst, gtp_trig, ext_trig, vme_trig, allow, ready, trig, collision, throttled;
  trig_src_e src;
  logic [2:0] collision_mask;
  logic [31:0] lost_count, collision_count;
  ts_trigger_source_encoder dut (.*);

  int exp_lost = 0, exp_coll = 0;
  initial begin
    rst = 1; {gtp_trig, ext_trig, vme_trig, allow, ready} = '0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int v = 0; v < 32; v++) begin
      {vme_trig, ext_trig, gtp_trig, allow, ready} = 5'(v);
      #0;
      begin
        automatic logic any = gtp_trig | ext_trig | vme_trig;
        automatic int n = int'(gtp_trig) + int'(ext_trig) + int'(vme_trig);
        automatic trig_src_e e = (n > 1) ? SRC_COLLISION : vme_trig ? SRC_VME :
                                 ext_trig ? SRC_EXT : gtp_trig ? SRC_GTP : SRC_COLLISION;
        `CHECK(trig == (any && allow && ready), "trigger gating")
        if (any) `CHECK(src == e, "source code")
        `CHECK(collision_mask == {vme_trig, ext_trig, gtp_trig}, "collision data")
        `CHECK(collision == (trig && n > 1), "collision flag")
        `CHECK(throttled == (any && !(allow && ready)), "throttled flag")
        if (any && !(allow && ready)) exp_lost++;
        if (trig && n > 1) exp_coll++;
      end
      @(posedge clk); #1;
    end
    `CHECK(lost_count == 32'(exp_lost), "lost counter")
    `CHECK(collision_count == 32'(exp_coll), "collision counter")
    `TB_DONE
  end
endmodule
