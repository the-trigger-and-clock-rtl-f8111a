// Testbench for ti_trigger_decoder: a word stream of timer, trigger +
// content, SYNC-event and VME command words (one per slot) is decoded;
// checks trigger position (cycle v+1+t), rebuilt 14-bit type and source,
// SYNC-event handling, command output, parity rejection, link-disable and
// the timer sync check (a dropped word must flag sync_error).
`include "tb_check.svh"
module ti_trigger_decoder_tb;
  import gt_pkg::*;
  logic clk;
  int checks = 0, failures = 0;
  `TB_CLOCK
  `TB_WATCHDOG(50000)

  logic rst, enable, in_valid, trig_out, event_valid, event_syncevent, vme_cmd_valid;
  logic sync_error, parity_error;
  logic [15:0] in_word;
  logic [13:0] event_type;
  trig_src_e event_src;
  logic [10:0] vme_cmd_data;
  logic [31:0] trig_count;
  ti_trigger_decoder dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int exp_fire = -1, n_trig = 0, n_sync_err = 0, n_par = 0;
  logic [12:0] timer = 0;
  always @(posedge clk) if (!rst) begin
    if (trig_out) begin
      `CHECK(cyc == exp_fire, "trigger at its 4 ns position")
      exp_fire = -1;
      n_trig++;
    end
    if (sync_error) n_sync_err++;
    if (parity_error) n_par++;
  end

  // send one word in this slot (in_valid one cycle, then three idle cycles)
  task automatic send(input logic [15:0] w);
    in_valid = 1; in_word = w;
    @(posedge clk); #1;
    in_valid = 0;
    repeat (3) @(posedge clk);
    #1;
  endtask
  task automatic send_timer();
    send(make_word(WT_TIMER, timer[12:11], timer[10:0]));
    timer++;
  endtask

  initial begin
    rst = 1; enable = 1; in_valid = 0; in_word = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int k = 0; k < 300; k++) begin
      automatic int kind = $urandom % 5;
      if (kind == 0 || kind == 1) begin
        automatic logic [1:0] t = 2'($urandom);
        automatic logic [13:0] ty = 14'($urandom);
        automatic trig_src_e s = trig_src_e'(2'($urandom));
        in_valid = 1; in_word = make_word(WT_TRIGGER, t, ty[10:0]);
        exp_fire = cyc + 1 + int'(t);
        @(posedge clk); #1; in_valid = 0; repeat (3) @(posedge clk); #1;
        timer++;
        in_valid = 1; in_word = make_word(WT_CONTENT, s, {8'b0, ty[13:11]});
        @(posedge clk); #1; in_valid = 0;
        `CHECK(event_valid && event_type == ty && event_src == s && !event_syncevent, "event type and source")
        repeat (3) @(posedge clk); #1;
        timer++;
      end else if (kind == 2) begin
        automatic logic [10:0] d = 11'($urandom);
        in_valid = 1; in_word = make_word(WT_COMMAND, TC_VME, d);
        @(posedge clk); #1; in_valid = 0;
        `CHECK(vme_cmd_valid && vme_cmd_data == d, "VME command word")
        repeat (3) @(posedge clk); #1;
        timer++;
      end else if (kind == 3) begin
        in_valid = 1; in_word = make_word(WT_COMMAND, TC_SYNCEVENT, 11'd0);
        exp_fire = cyc + 1;
        @(posedge clk); #1; in_valid = 0;
        `CHECK(event_valid && event_syncevent, "SYNC event becomes an event")
        repeat (3) @(posedge clk); #1;
        timer++;
      end else begin
        send_timer();
      end
    end
    `CHECK(n_sync_err == 0, "no sync error on an unbroken stream")
    `CHECK(exp_fire == -1, "every trigger fired")
    `CHECK(trig_count == 32'(n_trig), "trigger count")
    // parity error: a trigger word with a flipped bit is ignored
    send(make_word(WT_TRIGGER, 2'd0, 11'h5) ^ 16'h0004);
    `CHECK(n_par == 1 && n_trig == int'(trig_count), "bad parity rejected")
    timer++;
    // link disabled: no trigger
    enable = 0;
    send(make_word(WT_TRIGGER, 2'd0, 11'h5));
    timer++;
    `CHECK(trig_count == 32'(n_trig), "no trigger while link disabled")
    enable = 1;
    send_timer();
    // drop a word: the next timer word is one slot off
    timer++;
    send_timer();
    `CHECK(n_sync_err == 1, "dropped word detected by timer check")
    `TB_DONE
  end
endmodule
