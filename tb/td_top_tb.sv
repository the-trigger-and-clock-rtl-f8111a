// Testbench for td_top (trigger distribution): checks fan-out of words and
// SYNC to all eight links, the loop-back of the latency test pulse, trigger
// word detection feeding the per-link event limit (limit 1: event locking),
// release by one link's acknowledge only for that link, and BUSY merging of
// a single TI's BUSY.
`include "tb_check.svh"
module td_top_tb;
  import gt_pkg::*;
  logic clk;
  int checks = 0, failures = 0;
  `TB_CLOCK
  `TB_WATCHDOG(20000)

  logic rst, trig_word_valid, busy, trig_seen;
  logic [15:0] trig_word, limit;
  logic [1:0] sync_chips;
  logic [7:0][15:0] link_word, link_status;
  logic [7:0] link_word_valid, loop_out, link_status_valid, loop_in, link_busy, link_limit_busy;
  logic [7:0][1:0] link_sync;
  logic [7:0] block_size;
  td_top dut (.*);

  function automatic logic [15:0] sw(input logic b, input logic ack);
    status_word_t s;
    s = '0; s.busy = b; s.readout_ack = ack;
    s.parity = odd_parity(15'(s));
    return s;
  endfunction

  initial begin
    rst = 1; trig_word_valid = 0; trig_word = 0; sync_chips = 2'b01; loop_in = 0;
    link_status_valid = 0; link_status = '0; limit = 1; block_size = 1;
    repeat (3) @(posedge clk); #1 rst = 0;
    repeat (50) begin
      trig_word = 16'($urandom); trig_word_valid = 1'($urandom); sync_chips = 2'($urandom);
      loop_in = 8'($urandom);
      #1;
      for (int i = 0; i < 8; i++) begin
        `CHECK(link_word[i] == trig_word && link_word_valid[i] == trig_word_valid, "word fan-out")
        `CHECK(link_sync[i] == sync_chips, "SYNC fan-out")
      end
      `CHECK(loop_out == loop_in, "loop-back")
      @(posedge clk); #1;
    end
    trig_word_valid = 0; loop_in = 0;
    rst = 1; @(posedge clk); #1 rst = 0;
    // a timer word is not a trigger
    trig_word = make_word(WT_TIMER, 2'd0, 11'd5); trig_word_valid = 1; #1;
    `CHECK(!trig_seen, "timer word is not a trigger")
    // a trigger word
    trig_word = make_word(WT_TRIGGER, 2'd2, 11'd5); #1;
    `CHECK(trig_seen, "trigger word detected")
    @(posedge clk); #1 trig_word_valid = 0;
    repeat (2) @(posedge clk); #1;
    `CHECK(busy && link_limit_busy == 8'hff, "event locking on all links")
    for (int i = 0; i < 8; i++) begin
      link_status_valid[i] = 1; link_status[i] = sw(1'b0, i == 3);
    end
    @(posedge clk); #1 link_status_valid = 0;
    repeat (2) @(posedge clk); #1;
    `CHECK(link_limit_busy == 8'hf7, "acknowledge releases only its link")
    limit = 0;
    repeat (2) @(posedge clk); #1;
    `CHECK(!busy, "limit off")
    link_status_valid[5] = 1; link_status[5] = sw(1'b1, 1'b0);
    @(posedge clk); #1 link_status_valid = 0;
    `CHECK(busy && link_busy == 8'h20, "one TI BUSY makes the TD BUSY")
    `TB_DONE
  end
endmodule
