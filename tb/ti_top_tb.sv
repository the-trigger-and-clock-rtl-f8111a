// Testbench for ti_top (trigger interface): two TIs sit behind fibres of 5
// and 41 cycles, fed by one testbench-generated trigger-word and SYNC stream
// (one word per 16 ns slot, Manchester SYNC). Checks: measured round trip is
// twice the fibre delay; after clock resync, trigger stop and trigger start
// both TIs fire every trigger in the same cycle, at a fixed latency after the
// supervisor's trigger and at its 4 ns position; event data (number, type,
// source) reach the ROC port; block interrupt and acknowledge go back in the
// status word; a SYNC event sets BUSY until the ROC's ready; front-end
// reset is executed by both in the same cycle.
`include "tb_check.svh"
module ti_top_tb;
  import gt_pkg::*;
  logic clk;
  int checks = 0, failures = 0;
  `TB_CLOCK
  `TB_WATCHDOG(40000)

  localparam int D [2] = '{5, 41};
  logic rst;
  // source stream (plays the supervisor + TD)
  logic [15:0] s_word;
  logic s_valid;
  logic [1:0] s_sync;
  logic [1:0] s_phase;
  logic [12:0] s_timer;

  logic [7:0] latency_target, block_size;
  logic measure_start;

  logic [15:0] f_word [2], f_status [2], t_status [2];
  logic f_valid [2], f_loop_rx [2], f_status_valid [2], f_loop_tx [2], t_status_valid [2], t_loop_in [2];
  logic [1:0] f_sync [2];
  logic trig_out [2], fe_reset [2], irq [2], ev_empty [2], latency_done [2], link_enabled [2];
  logic busy [2], syncevent_busy [2], error_flags [2];
  logic roc_ack [2], roc_sync_ack [2], ev_rd_en [2];
  ti_event_t ev_data [2];
  logic [11:0] round_trip [2];
  logic [1:0] phase [2];

  for (genvar k = 0; k < 2; k++) begin : g
    logic [15:0] blocks_ready;
    logic [7:0] sync_delay;
    logic [10:0] vme_cmd;
    logic [31:0] trig_count;
    logic vme_dcm_reset;
    fiber_model #(.DELAY(D[k])) u_fib (
      .clk, .td_word(s_word), .td_word_valid(s_valid), .td_sync(s_sync), .td_loop_out(t_loop_in[k]),
      .td_status(t_status[k]), .td_status_valid(t_status_valid[k]), .td_loop_in(t_loop_in[k]),
      .ti_word(f_word[k]), .ti_word_valid(f_valid[k]), .ti_sync(f_sync[k]), .ti_loop_rx(f_loop_rx[k]),
      .ti_status(f_status[k]), .ti_status_valid(f_status_valid[k]), .ti_loop_tx(f_loop_tx[k])
    );
    ti_top dut (
      .clk, .rst, .fib_word(f_word[k]), .fib_word_valid(f_valid[k]), .fib_sync(f_sync[k]),
      .fib_loop_rx(f_loop_rx[k]), .fib_status(f_status[k]), .fib_status_valid(f_status_valid[k]),
      .fib_loop_tx(f_loop_tx[k]), .latency_target, .block_size, .measure_start,
      .sd_busy(1'b0), .trig_out(trig_out[k]), .fe_reset(fe_reset[k]), .vme_dcm_reset,
      .irq(irq[k]), .blocks_ready, .ev_rd_en(ev_rd_en[k]), .ev_data(ev_data[k]), .ev_empty(ev_empty[k]),
      .roc_ack(roc_ack[k]), .roc_sync_ack(roc_sync_ack[k]), .phase(phase[k]),
      .latency_done(latency_done[k]), .round_trip(round_trip[k]), .sync_delay,
      .link_enabled(link_enabled[k]), .busy(busy[k]), .syncevent_busy(syncevent_busy[k]),
      .error_flags(error_flags[k]), .vme_cmd, .trig_count
    );
  end

  // ---- source: one word per slot from a queue, timer words otherwise
  logic [15:0] wq [$];
  int cyc = 0;
  int sent_cycle [$];     // cycle in which each trigger happened at the source
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst) begin
      s_phase <= 0; s_valid <= 0; s_timer <= 0; s_word <= 0;
    end else begin
      s_phase <= s_phase + 1'b1;
      s_valid <= (s_phase == 2'd3);
      if (s_phase == 2'd3) begin
        s_timer <= s_timer + 1'b1;
        if (wq.size() > 0) s_word <= wq.pop_front();
        else s_word <= make_word(WT_TIMER, s_timer[12:11], s_timer[10:0]);
      end
    end
  end

  task automatic sync_cmd(input logic [3:0] c);
    // start bit at a fixed slot phase (3), then four bits, then idle
    while (s_phase != 2'd3) begin @(posedge clk); #1; end
    s_sync = 2'b10; @(posedge clk); #1;
    for (int b = 3; b >= 0; b--) begin s_sync = c[b] ? 2'b01 : 2'b10; @(posedge clk); #1; end
    s_sync = 2'b01;
    repeat (8) @(posedge clk); #1;
  endtask

  // queue a trigger for the next free slot; it is recorded as happening at
  // position t of the slot before the one that carries it
  task automatic trigger(input logic [1:0] t, input logic [13:0] ty, input trig_src_e s);
    while (s_phase != 2'd0) begin @(posedge clk); #1; end
    sent_cycle.push_back(cyc + int'(t));
    wq.push_back(make_word(WT_TRIGGER, t, ty[10:0]));
    wq.push_back(make_word(WT_CONTENT, s, {8'b0, ty[13:11]}));
  endtask

  // ---- observe trigger outputs
  int fire [2][$];
  always @(posedge clk) for (int k = 0; k < 2; k++) if (trig_out[k]) fire[k].push_back(cyc);
  int acks_seen [2] = '{0, 0};
  always @(posedge clk) for (int k = 0; k < 2; k++)
    if (t_status_valid[k] && t_status[k][1]) acks_seen[k]++;

  logic [13:0] types [$];
  trig_src_e srcs [$];
  initial begin
    rst = 1; s_sync = 2'b01; latency_target = 8'd60; block_size = 8'd2; measure_start = 0;
    for (int k = 0; k < 2; k++) begin roc_ack[k] = 0; roc_sync_ack[k] = 0; ev_rd_en[k] = 0; end
    repeat (4) @(posedge clk); #1 rst = 0;
    measure_start = 1; @(posedge clk); #1 measure_start = 0;
    repeat (100) @(posedge clk); #1;
    for (int k = 0; k < 2; k++)
      `CHECK(latency_done[k] && round_trip[k] == 12'(2 * D[k]), "loop-back round trip")
    sync_cmd(SYNC_CLK_RESYNC);
    sync_cmd(SYNC_TRIG_STOP);
    sync_cmd(SYNC_TRIG_START);
    repeat (80) @(posedge clk); #1;
    `CHECK(phase[0] == phase[1], "slot phases aligned by resync")
    `CHECK(link_enabled[0] && link_enabled[1], "trigger link enabled")
    for (int i = 0; i < 8; i++) begin
      automatic logic [13:0] ty = 14'($urandom);
      automatic trig_src_e s = trig_src_e'(2'($urandom));
      types.push_back(ty); srcs.push_back(s);
      trigger(2'(i % 4), ty, s);
      repeat (12 + $urandom % 20) @(posedge clk); #1;
    end
    repeat (150) @(posedge clk); #1;
    `CHECK(fire[0].size() == 8 && fire[1].size() == 8, "all triggers fired")
    if (fire[0].size() == 8 && fire[1].size() == 8) begin
      for (int i = 0; i < 8; i++) begin
        `CHECK(fire[0][i] == fire[1][i], "both crates fire in the same cycle")
        `CHECK(fire[0][i] - sent_cycle[i] == fire[0][0] - sent_cycle[0], "fixed latency incl. 4 ns position")
      end
      $display("trigger latency source->TI output: %0d cycles", fire[0][0] - sent_cycle[0]);
    end
    // event data and blocks
    for (int k = 0; k < 2; k++) begin
      `CHECK(irq[k], "block interrupt")
      for (int i = 0; i < 8; i++) begin
        `CHECK(!ev_empty[k] && ev_data[k].event_number == 32'(i + 1) &&
               ev_data[k].ttype == types[i] && ev_data[k].src == srcs[i] && !ev_data[k].syncevent,
               "event record")
        ev_rd_en[k] = 1; @(posedge clk); #1 ev_rd_en[k] = 0;
        if (i % 2 == 1) begin roc_ack[k] = 1; @(posedge clk); #1 roc_ack[k] = 0; end
      end
    end
    repeat (100) @(posedge clk); #1;
    `CHECK(acks_seen[0] == 4 && acks_seen[1] == 4, $sformatf("block acknowledges sent to the TD %0d %0d", acks_seen[0], acks_seen[1]))
    `CHECK(!irq[0] && !irq[1], "interrupt cleared")
    // SYNC event
    while (s_phase != 2'd0) begin @(posedge clk); #1; end
    wq.push_back(make_word(WT_COMMAND, TC_SYNCEVENT, 11'd0));
    repeat (150) @(posedge clk); #1;
    `CHECK(syncevent_busy[0] && syncevent_busy[1] && busy[0] && busy[1], "SYNC event sets BUSY")
    `CHECK(fire[0].size() == 9 && fire[0][8] == fire[1][8], "SYNC event fired together")
    `CHECK(ev_data[0].syncevent, "SYNC event in the event data")
    roc_sync_ack[0] = 1; roc_sync_ack[1] = 1; @(posedge clk); #1; roc_sync_ack[0] = 0; roc_sync_ack[1] = 0;
    `CHECK(!busy[0] && !busy[1], "ROC ready releases BUSY")
    // front-end reset executes in both crates in the same cycle
    fork
      sync_cmd(SYNC_FE_RESET);
      begin
        int c0 = -1, c1 = -2;
        repeat (120) begin
          @(posedge clk);
          if (fe_reset[0]) c0 = cyc;
          if (fe_reset[1]) c1 = cyc;
        end
        `CHECK(c0 == c1 && c0 > 0, "front-end reset in the same cycle")
      end
    join
    #1;
    `CHECK(ev_empty[0] && ev_empty[1], "front-end reset clears event data")
    `CHECK(!error_flags[0] && !error_flags[1], "no FIFO/timer/parity errors")
    `TB_DONE
  end
endmodule
