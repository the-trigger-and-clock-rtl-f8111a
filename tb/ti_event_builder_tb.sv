// Testbench for ti_event_builder: random triggers/events with block size 3;
// a ROC model reads events when irq is up, checks event number, time stamp
// (taken at trig_fire), type, source and SYNC-event flag against a queue,
// and acknowledges each block. Checks blocks_ready, ack_out, BUSY near full
// and front-end reset.
`include "tb_check.svh"
module ti_event_builder_tb;
  import gt_pkg::*;
  logic clk;
  int checks = 0, failures = 0;
  `TB_CLOCK
  `TB_WATCHDOG(100000)

  logic rst, fe_reset, trig_fire, event_valid, event_syncevent, rd_en, empty, irq, roc_ack, ack_out, busy;
  logic [13:0] event_type;
  trig_src_e event_src;
  logic [7:0] block_size;
  ti_event_t rd_data;
  logic [6:0] count;
  logic [15:0] blocks_ready, overflows;
  ti_event_builder #(.DEPTH(64)) dut (.*);

  ti_event_t q [$];
  longint ticks = 0;
  always @(posedge clk) ticks <= (rst || fe_reset) ? 0 : ticks + 1;

  int evn = 0, n_ack = 0, n_acked_seen = 0;
  always @(posedge clk) if (ack_out) n_acked_seen++;

  task automatic make_event(input logic se);
    automatic ti_event_t e;
    trig_fire = 1;
    e.timestamp = 48'(ticks);
    @(posedge clk); #1 trig_fire = 0;
    repeat ($urandom % 6) @(posedge clk);
    #1;
    evn++;
    e.event_number = 32'(evn); e.ttype = 14'($urandom); e.src = trig_src_e'(2'($urandom));
    e.syncevent = se;
    event_valid = 1; event_type = e.ttype; event_src = e.src; event_syncevent = se;
    q.push_back(e);
    @(posedge clk); #1 event_valid = 0;
  endtask

  task automatic roc_read_block();
    for (int i = 0; i < int'(block_size); i++) begin
      `CHECK(!empty, "event available")
      `CHECK(rd_data == q[0], "event record")
      void'(q.pop_front());
      rd_en = 1; @(posedge clk); #1 rd_en = 0;
    end
    roc_ack = 1; @(posedge clk); #1 roc_ack = 0;
    n_ack++;
  endtask

  initial begin
    rst = 1; fe_reset = 0; trig_fire = 0; event_valid = 0; event_syncevent = 0; rd_en = 0; roc_ack = 0;
    event_type = 0; event_src = SRC_GTP; block_size = 8'd3;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int b = 0; b < 40; b++) begin
      for (int i = 0; i < 3; i++) begin
        `CHECK(!irq, "no interrupt before block complete")
        make_event(i == 1 && b % 5 == 0);
      end
      @(posedge clk); #1;
      `CHECK(irq && blocks_ready == 16'd1, "interrupt when block complete")
      roc_read_block();
      @(posedge clk); #1;
      `CHECK(!irq && blocks_ready == 0, "acknowledge clears block")
    end
    `CHECK(n_acked_seen == n_ack, "acknowledge passed on")
    // fill up: BUSY before full
    for (int i = 0; i < 57; i++) make_event(1'b0);
    `CHECK(busy && count == 7'd57, "BUSY when nearly full")
    `CHECK(blocks_ready == 16'd19, "blocks counted while full")
    fe_reset = 1; @(posedge clk); #1 fe_reset = 0;
    `CHECK(empty && !busy && !irq, "front-end reset clears")
    q.delete(); evn = 0;
    make_event(1'b0);
    `CHECK(rd_data.event_number == 32'd1, "event numbers restart")
    `TB_DONE
  end
endmodule
