// Testbench for ti_status_word: one status word per slot with odd parity;
// BUSY is the OR of crate BUSY, own BUSY and SYNC-event BUSY (set by a SYNC
// event, cleared by roc_sync_ack); bursts of acknowledges and trigger marks
// come out one per slot with none lost; a sync error is reported once.
`include "tb_check.svh"
module ti_status_word_tb;
  import gt_pkg::*;
  logic clk;
  int checks = 0, failures = 0;
  `TB_CLOCK
  `TB_WATCHDOG(20000)

  logic rst, sd_busy, own_busy, syncevent, roc_sync_ack, readout_ack, trig_received, sync_error;
  logic busy, syncevent_busy, status_valid;
  logic [1:0] phase;
  logic [15:0] status;
  ti_status_word dut (.*);

  always @(posedge clk) phase <= rst ? 2'd0 : phase + 1'b1;

  status_word_t sw;
  assign sw = status_word_t'(status);
  int n_ack = 0, n_trig = 0, n_err = 0, last = -1, cyc = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (status_valid) begin
      `CHECK(word_ok(status), "status parity")
      if (last >= 0) `CHECK(cyc - last == 4, "one status word per slot")
      last = cyc;
      n_ack += int'(sw.readout_ack);
      n_trig += int'(sw.trig_received);
      n_err += int'(sw.sync_error);
    end
  end

  initial begin
    rst = 1; {sd_busy, own_busy, syncevent, roc_sync_ack, readout_ack, trig_received, sync_error} = '0;
    repeat (3) @(posedge clk); #1 rst = 0;
    `CHECK(!busy, "idle not busy")
    sd_busy = 1; #1 `CHECK(busy, "crate BUSY"); sd_busy = 0;
    own_busy = 1; #1 `CHECK(busy, "own BUSY"); own_busy = 0;
    syncevent = 1; @(posedge clk); #1 syncevent = 0;
    `CHECK(busy && syncevent_busy, "SYNC-event BUSY set")
    repeat (8) @(posedge clk); #1;
    `CHECK(sw.busy && sw.syncevent_busy, "status word carries BUSY")
    roc_sync_ack = 1; @(posedge clk); #1 roc_sync_ack = 0;
    `CHECK(!busy, "SYNC-event BUSY cleared by ROC")
    // bursts
    repeat (5) begin readout_ack = 1; trig_received = 1; @(posedge clk); #1; end
    readout_ack = 0; trig_received = 0;
    sync_error = 1; @(posedge clk); #1 sync_error = 0;
    repeat (40) @(posedge clk); #1;
    `CHECK(n_ack == 5 && n_trig == 5, "acknowledges and trigger marks not lost")
    `CHECK(n_err == 1, "sync error reported once")
    `TB_DONE
  end
endmodule
