// Testbench for ts_top (trigger supervisor): loads look-up table entries for
// a few patterns, then checks the trigger words produced for GTP, front-panel
// and VME triggers (type, source, 4 ns time), a GTP+VME collision, the
// prescaler, BUSY throttling, the SYNC-event waiting mode, VME command
// words, and one SYNC command on the Manchester output.
`include "tb_check.svh"
module ts_top_tb;
  import gt_pkg::*;
  logic clk;
  int checks = 0, failures = 0;
  `TB_CLOCK
  `TB_WATCHDOG(20000)

  logic rst, vme_trig, lut_wr_en, lut_wr_sel, run_enable, vme_inhibit, cmd_valid, cmd_accept;
  logic sync_cmd_valid, sync_cmd_accept, busy_in, trig_word_valid;
  logic trig_sent, collision, prescale_dropped, throttled, waiting;
  logic [31:0] gtp_in, ext_in, busy_time, lost_count, collision_count, trig_count;
  logic [7:0] vme_type;
  logic [1:0] lut_wr_table, sync_phase_offset, sync_chips, phase;
  logic [15:0] lut_wr_addr, gtp_prescale, ext_prescale, trig_word;
  logic [14:0] lut_wr_data;
  trig_cmd_e cmd_code;
  logic [10:0] cmd_data;
  logic [3:0] sync_cmd;
  ts_top dut (.*);

  task automatic lw(input logic sel, input logic [1:0] t, input logic [15:0] a, input logic [14:0] d);
    lut_wr_en = 1; lut_wr_sel = sel; lut_wr_table = t; lut_wr_addr = a; lut_wr_data = d;
    @(posedge clk); #1 lut_wr_en = 0;
  endtask

  // collect trigger-type words
  logic [15:0] words [$];
  always @(posedge clk) if (trig_word_valid && trig_word[14:13] != 2'b00) words.push_back(trig_word);

  task automatic expect_trigger(input trig_src_e s, input logic [13:0] ty, input int t, input string what);
    repeat (16) @(posedge clk); #1;
    `CHECK(words.size() == 2, {what, ": trigger and content word"})
    if (words.size() == 2) begin
      `CHECK(words[0][14:13] == 2'b10 && words[0][10:0] == ty[10:0] && word_ok(words[0]) &&
             (t < 0 || words[0][12:11] == 2'(t)), {what, ": trigger word"})
      if (t >= 0 && words[0][12:11] != 2'(t)) $display("time field %0d expected %0d", words[0][12:11], t);
      `CHECK(words[1] == make_word(WT_CONTENT, s, {8'b0, ty[13:11]}), {what, ": content word"})
    end
    words.delete();
  endtask
  task automatic expect_none(input string what);
    repeat (16) @(posedge clk); #1;
    `CHECK(words.size() == 0, what)
    words.delete();
  endtask

  // GTP pattern A -> type 14'h2abc, front-panel pattern B -> type 8'h5a
  localparam logic [31:0] PA = 32'h0003_0001;
  localparam logic [31:0] PB = 32'h0100_0200;
  task automatic pulse_gtp();
    gtp_in = PA; @(posedge clk); #1 gtp_in = 0;
  endtask

  int busy_cycles = 0, n_dropped = 0;
  always @(posedge clk) if (!rst && prescale_dropped) n_dropped++;
  always @(posedge clk) if (!rst && busy_in) busy_cycles++;
  initial begin
    rst = 1; {vme_trig, lut_wr_en, lut_wr_sel, vme_inhibit, cmd_valid, sync_cmd_valid, busy_in} = '0;
    run_enable = 0; gtp_in = 0; ext_in = 0; vme_type = 0; lut_wr_table = 0; lut_wr_addr = 0;
    lut_wr_data = 0; sync_phase_offset = 2'd3; gtp_prescale = 0; ext_prescale = 0;
    cmd_code = TC_VME; cmd_data = 0; sync_cmd = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int s = 0; s < 2; s++) begin
      lw(1'(s), 0, 16'h0, 15'h0); lw(1'(s), 1, 16'h0, 15'h0); lw(1'(s), 2, 16'h0, 15'h0);
    end
    lw(0, 0, 16'h0001, 15'h11); lw(0, 1, 16'h0003, 15'h22); lw(0, 2, 16'h2211, {1'b1, 14'h2abc});
    lw(1, 0, 16'h0200, 15'h33); lw(1, 1, 16'h0100, 15'h44); lw(1, 2, 16'h4433, {6'b0, 1'b1, 8'h5a});
    run_enable = 1;
    repeat (20) @(posedge clk); #1 words.delete();

    pulse_gtp();
    expect_trigger(SRC_GTP, 14'h2abc, -1, "GTP");
    ext_in = PB; @(posedge clk); #1 ext_in = 0;
    expect_trigger(SRC_EXT, 14'h5a, -1, "front panel");
    for (int p = 0; p < 4; p++) begin
      while (phase != 2'(p)) begin @(posedge clk); #1; end
      // phase is sampled after the edge: the trigger is seen in this cycle
      vme_trig = 1; vme_type = 8'(8'h70 + p); @(posedge clk); #1 vme_trig = 0;
      expect_trigger(SRC_VME, 14'(8'h70 + p), p, "VME trigger 4 ns position");
    end
    // collision: GTP table output and VME trigger in the same cycle
    gtp_in = PA; @(posedge clk); #1 gtp_in = 0; @(posedge clk); #1;
    vme_trig = 1; @(posedge clk); #1 vme_trig = 0;
    `CHECK(collision_count == 1, "collision counted")
    expect_trigger(SRC_COLLISION, 14'b101, -1, "collision");
    // prescale 2: of two GTP triggers only the first passes
    gtp_prescale = 2;
    pulse_gtp(); repeat (20) @(posedge clk); #1 words.delete();
    pulse_gtp(); expect_none("prescaled trigger removed");
    `CHECK(n_dropped == 1, "prescale drop reported")
    pulse_gtp(); expect_trigger(SRC_GTP, 14'h2abc, -1, "prescaled trigger passed");
    gtp_prescale = 0;
    // BUSY blocks
    busy_in = 1;
    vme_trig = 1; @(posedge clk); #1 vme_trig = 0;
    expect_none("BUSY blocks triggers");
    busy_in = 0;
    // SYNC event: command word, then waiting until BUSY round trip
    cmd_valid = 1; cmd_code = TC_SYNCEVENT; cmd_data = 0;
    do @(posedge clk); while (!cmd_accept);
    #1 cmd_valid = 0;
    repeat (16) @(posedge clk); #1;
    `CHECK(words.size() == 1 && words[0] == make_word(WT_COMMAND, TC_SYNCEVENT, 11'd0), "SYNC event word")
    `CHECK(waiting, "waiting after SYNC event")
    words.delete();
    vme_trig = 1; @(posedge clk); #1 vme_trig = 0;
    expect_none("no trigger while waiting");
    busy_in = 1; repeat (5) @(posedge clk); #1 busy_in = 0;
    `CHECK(!waiting, "BUSY ends waiting")
    vme_trig = 1; vme_type = 8'h01; @(posedge clk); #1 vme_trig = 0;
    expect_trigger(SRC_VME, 14'h01, -1, "trigger after SYNC event");
    // VME command word
    cmd_valid = 1; cmd_code = TC_VME; cmd_data = 11'h4c7;
    do @(posedge clk); while (!cmd_accept);
    #1 cmd_valid = 0;
    repeat (8) @(posedge clk); #1;
    `CHECK(words.size() == 1 && words[0] == make_word(WT_COMMAND, TC_VME, 11'h4c7), "VME command word")
    words.delete();
    // SYNC: Manchester stream carries start bit and code MSB first
    sync_cmd_valid = 1; sync_cmd = 4'b1101;
    do @(posedge clk); while (!sync_cmd_accept);
    #1 sync_cmd_valid = 0;
    begin
      logic [4:0] got;
      for (int b = 4; b >= 0; b--) begin
        got[b] = (sync_chips == 2'b01);
        @(posedge clk); #1;
      end
      `CHECK(got == 5'b0_1101, "SYNC start bit and code on the line")
    end
    `CHECK(busy_time == 32'(busy_cycles), "BUSY time recorded")
    `TB_DONE
  end
endmodule
