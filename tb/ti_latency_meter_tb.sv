// Testbench for ti_latency_meter: a loop-back of known delay (two fibre
// latencies) is placed between test_tx and test_rx; round_trip must equal it
// and latency its half. A missing loop-back must end in timeout.
`include "tb_check.svh"
module ti_latency_meter_tb;
  logic clk;
  int checks = 0, failures = 0;
  `TB_CLOCK
  `TB_WATCHDOG(100000)

  logic rst, start, test_tx, test_rx, measuring, done, timeout;
  logic [11:0] round_trip, latency;
  ti_latency_meter dut (.*);

  int rtt;
  logic cut;
  int cycle = 0, tx_cycle = -100000;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (test_tx) tx_cycle <= cycle;
  end
  // test_rx is high exactly rtt cycles after the cycle in which test_tx was high
  assign test_rx = !cut && ((rtt == 0) ? test_tx : (cycle == tx_cycle + rtt));

  int rtts [5] = '{0, 2, 9, 150, 700};
  initial begin
    rst = 1; start = 0; rtt = 0; cut = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    foreach (rtts[k]) begin
      rtt = rtts[k];
      start = 1; @(posedge clk); #1 start = 0;
      wait (done || timeout); @(posedge clk); #1;
      if (round_trip != 12'(rtt)) $display("rtt %0d got %0d", rtt, round_trip);
      `CHECK(done && round_trip == 12'(rtt), "round trip count")
      `CHECK(latency == 12'(rtt / 2), "one-way latency")
    end
    cut = 1;
    start = 1; @(posedge clk); #1 start = 0;
    wait (done || timeout); @(posedge clk); #1;
    `CHECK(timeout && !done, "timeout without loop-back")
    `TB_DONE
  end
endmodule
