// Testbench for ti_sync_delay: random command strobes through delays of 0,
// 1, 37 and 255 cycles must come out exactly that many cycles later.
`include "tb_check.svh"
module ti_sync_delay_tb;
  logic clk;
  int checks = 0, failures = 0;
  `TB_CLOCK
  `TB_WATCHDOG(20000)

  logic rst, in_valid, out_valid;
  logic [7:0] delay;
  logic [3:0] in_cmd, out_cmd;
  ti_sync_delay dut (.*);

  logic [4:0] hist [$];
  int delays [4] = '{0, 1, 37, 255};
  initial begin
    rst = 1; in_valid = 0; in_cmd = 0; delay = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    foreach (delays[k]) begin
      delay = 8'(delays[k]);
      rst = 1; @(posedge clk); #1 rst = 0;
      hist.delete();
      for (int c = 0; c < 800; c++) begin
        in_valid = ($urandom % 9) == 0;
        in_cmd = 4'($urandom);
        #0;
        hist.push_back({in_valid, in_cmd});
        if (c >= delays[k]) begin
          automatic logic [4:0] e = hist[c - delays[k]];
          `CHECK(out_valid == e[4], "delayed strobe")
          if (e[4]) `CHECK(out_cmd == e[3:0], "delayed command")
        end else begin
          `CHECK(!out_valid, "nothing before the delay")
        end
        @(posedge clk); #1;
      end
    end
    `TB_DONE
  end
endmodule
