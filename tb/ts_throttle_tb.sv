// Testbench for ts_throttle: BUSY, inhibit and run enable gating, the SYNC
// event waiting mode (blocked until BUSY has been seen and has fallen) and
// the BUSY-time counter.
`include "tb_check.svh"
module ts_throttle_tb;
  logic clk;
  int checks = 0, failures = 0;
  `TB_CLOCK
  `TB_WATCHDOG(10000)

  logic rst, run_enable, vme_inhibit, busy, syncevent_sent, allow, waiting;
  logic [31:0] busy_time;
  ts_throttle dut (.*);

  int busy_cycles = 0;
  always @(posedge clk) if (!rst && busy) busy_cycles++;

  initial begin
    rst = 1; run_enable = 0; vme_inhibit = 0; busy = 0; syncevent_sent = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    `CHECK(!allow, "blocked while run disabled")
    run_enable = 1; #1;
    `CHECK(allow, "allowed when enabled")
    vme_inhibit = 1; #1; `CHECK(!allow, "VME inhibit blocks"); vme_inhibit = 0;
    busy = 1; #1; `CHECK(!allow, "BUSY blocks");
    repeat (7) @(posedge clk); #1 busy = 0; #1;
    `CHECK(allow, "allowed after BUSY falls")
    // SYNC event
    syncevent_sent = 1; @(posedge clk); #1 syncevent_sent = 0;
    `CHECK(waiting && !allow, "waiting after SYNC event")
    repeat (20) @(posedge clk); #1;
    `CHECK(waiting && !allow, "still waiting without BUSY")
    busy = 1; @(posedge clk); #1;
    `CHECK(!waiting && !allow, "BUSY ends waiting but still blocks")
    repeat (10) @(posedge clk); #1 busy = 0; #1;
    `CHECK(allow, "triggers resume after BUSY falls")
    @(posedge clk); #1;
    `CHECK(busy_time == 32'(busy_cycles), "BUSY time counter")
    `TB_DONE
  end
endmodule
