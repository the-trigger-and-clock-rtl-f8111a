// Testbench for ts_prescaler: random trigger streams with several prescale
// factors; the number of passed triggers and their positions are compared
// with a count kept by the testbench. A prescale lowered to 0 while the
// count is running must pass the next trigger.
`include "tb_check.svh"
module ts_prescaler_tb;
  logic clk;
  int checks = 0, failures = 0;
  `TB_CLOCK
  `TB_WATCHDOG(100000)

  logic rst, in_trig, out_trig, dropped;
  logic [15:0] prescale;
  ts_prescaler dut (.*);

  initial begin
    rst = 1; in_trig = 0; prescale = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    foreach (prescale_list[k]) begin
      int n_in, n_out;
      prescale = prescale_list[k];
      rst = 1; @(posedge clk); #1 rst = 0;
      n_in = 0; n_out = 0;
      repeat (2000) begin
        in_trig = ($urandom % 3) == 0;
        #0;
        if (in_trig) begin
          automatic int p = (prescale <= 1) ? 1 : int'(prescale);
          `CHECK(out_trig == ((n_in % p) == 0), "prescaler passes every Nth trigger")
          `CHECK(dropped == !out_trig, "dropped flag")
          n_in++;
          if (out_trig) n_out++;
        end else begin
          `CHECK(!out_trig && !dropped, "no output without input")
        end
        @(posedge clk); #1;
      end
      in_trig = 0;
      $display("prescale %0d: %0d in, %0d out", prescale, n_in, n_out);
    end
    // lowering the prescale in the middle of a count takes effect at once
    prescale = 3; rst = 1; @(posedge clk); #1 rst = 0;
    in_trig = 1; @(posedge clk); #1;
    prescale = 0; #1;
    `CHECK(out_trig && !dropped, "prescale set to 0 passes the next trigger")
    @(posedge clk); #1;
    `CHECK(out_trig, "and the one after")
    in_trig = 0;
    `TB_DONE
  end
  int prescale_list [5] = '{0, 1, 2, 7, 100};
endmodule
