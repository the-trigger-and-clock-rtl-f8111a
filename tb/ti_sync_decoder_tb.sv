// Testbench for ti_sync_decoder: the testbench Manchester-encodes random
// SYNC commands (with idle gaps of four or more '1's and a few chip-level
// code violations in the idle line) and checks each decoded code, the
// invalid-code flag for 0000/1111, the 5-cycle latency and the violation
// count.
`include "tb_check.svh"
module ti_sync_decoder_tb;
  import gt_pkg::*;
  logic clk;
  int checks = 0, failures = 0;
  `TB_CLOCK
  `TB_WATCHDOG(40000)

  logic rst, cmd_valid, cmd_invalid;
  logic [1:0] chips;
  logic [3:0] cmd;
  logic [15:0] violations;
  ti_sync_decoder dut (.*);

  function automatic logic [1:0] man(input logic b);
    return b ? 2'b01 : 2'b10;
  endfunction

  int n_viol = 0, n_ok = 0, n_bad = 0, exp_bad = 0, cyc = 0, start_cyc = 0;
  logic [3:0] exp_code;
  logic exp_pending = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (cmd_valid || cmd_invalid) begin
      `CHECK(exp_pending, "decoded only what was sent")
      `CHECK(cmd == exp_code, "decoded code")
      `CHECK(cmd_invalid == sync_code_invalid(exp_code), "invalid-code flag")
      `CHECK(cyc - start_cyc == 5, "five-cycle decode latency")
      exp_pending = 0;
      if (cmd_valid) n_ok++; else n_bad++;
    end
  end

  initial begin
    rst = 1; chips = man(1'b1);
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int k = 0; k < 400; k++) begin
      automatic logic [3:0] c = (k % 20 == 0) ? 4'b0000 : (k % 20 == 10) ? 4'b1111 : 4'($urandom);
      automatic int gap = 4 + $urandom % 8;
      for (int g = 0; g < gap; g++) begin
        if (g == 1 && (k % 7) == 0) begin chips = 2'b11; n_viol++; end
        else chips = man(1'b1);
        @(posedge clk); #1;
      end
      exp_code = c; exp_pending = 1; if (sync_code_invalid(c)) exp_bad++; start_cyc = cyc + 1;
      chips = man(1'b0); @(posedge clk); #1;
      for (int b = 3; b >= 0; b--) begin chips = man(c[b]); @(posedge clk); #1; end
    end
    chips = man(1'b1);
    repeat (10) @(posedge clk);
    `CHECK(!exp_pending, "last command decoded")
    `CHECK(violations == 16'(n_viol), "code violations counted")
    `CHECK(n_bad == exp_bad && n_ok == 400 - exp_bad && exp_bad >= 40, "valid/invalid split")
    `TB_DONE
  end
endmodule
