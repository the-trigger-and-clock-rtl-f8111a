// Testbench for td_link_monitor: event-locking mode (limit 1, block 1),
// block mode (block 4, limit 2), limit off, TI BUSY passed through, and
// status words with bad parity ignored and counted.
`include "tb_check.svh"
module td_link_monitor_tb;
  import gt_pkg::*;
  logic clk;
  int checks = 0, failures = 0;
  `TB_CLOCK
  `TB_WATCHDOG(20000)

  logic rst, status_valid, trig_sent, busy, ti_busy, limit_busy;
  logic [15:0] status_word, limit, blocks_sent, blocks_acked, parity_errors;
  logic [7:0] block_size;
  logic [31:0] trig_received;
  td_link_monitor dut (.*);

  function automatic logic [15:0] sw(input logic b, input logic ack);
    status_word_t s;
    s = '0; s.busy = b; s.readout_ack = ack;
    s.parity = odd_parity(15'(s));
    return s;
  endfunction

  task automatic trig();
    trig_sent = 1; @(posedge clk); #1 trig_sent = 0;
    repeat (2) @(posedge clk); #1;
  endtask
  task automatic ack();
    status_valid = 1; status_word = sw(1'b0, 1'b1); @(posedge clk); #1 status_valid = 0;
    repeat (2) @(posedge clk); #1;
  endtask

  initial begin
    rst = 1; status_valid = 0; trig_sent = 0; status_word = 0; block_size = 1; limit = 1;
    repeat (3) @(posedge clk); #1 rst = 0;
    @(posedge clk); #1;
    `CHECK(!busy, "idle")
    // event locking
    trig();
    `CHECK(busy && limit_busy, "event locking: BUSY after one trigger")
    ack();
    `CHECK(!busy, "event locking: BUSY released by acknowledge")
    // blocks of 4, limit 2
    block_size = 4; limit = 2;
    rst = 1; @(posedge clk); #1 rst = 0;
    repeat (7) trig();
    `CHECK(!busy && blocks_sent == 1, "one block sent, below limit")
    trig();
    `CHECK(busy && blocks_sent == 2, "two blocks sent: at limit")
    ack();
    `CHECK(!busy, "block acknowledge releases BUSY")
    // limit off
    limit = 0;
    repeat (20) trig();
    `CHECK(!limit_busy, "limit 0: pipeline mode")
    // TI BUSY
    status_valid = 1; status_word = sw(1'b1, 1'b0); @(posedge clk); #1 status_valid = 0;
    `CHECK(busy && ti_busy, "TI BUSY passed on")
    status_valid = 1; status_word = sw(1'b0, 1'b0) ^ 16'h0001; @(posedge clk); #1 status_valid = 0;
    `CHECK(busy && parity_errors == 1, "bad status word ignored")
    status_valid = 1; status_word = sw(1'b0, 1'b0); @(posedge clk); #1 status_valid = 0;
    `CHECK(!busy, "TI BUSY released")
    `TB_DONE
  end
endmodule
