// Testbench for ts_sync_encoder: random SYNC commands are queued; the chip
// stream is decoded by the testbench (Manchester: 01 = '1', 10 = '0') and
// checked: idle '1', start bit launched at the configured slot phase, four
// command bits MSB first in the order requested, at least four '1's between
// commands.
`include "tb_check.svh"
module ts_sync_encoder_tb;
  logic clk;
  int checks = 0, failures = 0;
  `TB_CLOCK
  `TB_WATCHDOG(40000)

  logic rst, cmd_valid, cmd_accept, sync_bit;
  logic [1:0] phase, phase_offset, chips;
  logic [3:0] cmd;
  ts_sync_encoder dut (.*);

  always @(posedge clk) phase <= rst ? 2'd0 : phase + 1'b1;

  logic [3:0] sent [$];
  int ones = 0, bits_left = 0, n_rx = 0;
  logic [3:0] sh;
  logic [1:0] prev_phase;
  always @(posedge clk) if (!rst) begin
    `CHECK(chips == 2'b01 || chips == 2'b10, "valid Manchester chips")
    `CHECK(chips == (sync_bit ? 2'b01 : 2'b10), "chips match bit")
    if (bits_left > 0) begin
      sh = {sh[2:0], sync_bit};
      bits_left--;
      if (bits_left == 0) begin
        `CHECK(sent.size() > 0 && sh == sent[0], "command bits in order")
        if (sent.size() > 0) void'(sent.pop_front());
        n_rx++;
        ones = 0;
      end
    end else if (!sync_bit) begin
      `CHECK(ones >= 4, "at least four 1s before a command")
      // the start bit leaves one cycle after the phase_offset cycle
      `CHECK(prev_phase == phase_offset, "start bit phase")
      bits_left = 4;
    end else begin
      ones++;
    end
    prev_phase = phase;
  end

  initial begin
    rst = 1; cmd_valid = 0; cmd = 0; phase_offset = 2'd3;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int k = 0; k < 300; k++) begin
      if (k == 150) phase_offset = 2'd1;
      cmd_valid = 1; cmd = 4'($urandom);
      do @(posedge clk); while (!cmd_accept);
      sent.push_back(cmd);
      #1 cmd_valid = 0;
      repeat ($urandom % 12) @(posedge clk);
      #1;
    end
    repeat (12) @(posedge clk);
    `CHECK(n_rx == 300, "all commands sent")
    `TB_DONE
  end
endmodule
