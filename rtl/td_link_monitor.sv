// td_link_monitor: status and event-limit logic of one TD fibre link.
//
// Each slot the TI on this link sends a status word. The monitor checks its
// parity, keeps the TI's BUSY, and counts the blocks the TI has acknowledged.
// It also counts the triggers fanned out on the link, grouped into blocks of
// `block_size` triggers (1 = every trigger is a block). When blocks sent minus
// blocks acknowledged reaches `limit`, the link asserts BUSY until enough
// acknowledges arrive; limit 1 with block size 1 is event-locking mode, and
// limit 0 turns the check off (pipeline mode, throttled by front-end BUSY
// only). The counting rule follows the document, which says BUSY is set when
// the difference is "over a preset limit" but also that limit 1 sends no second
// trigger before the first is read out; this design sets BUSY at difference >=
// limit, which meets the second sentence. A block counts as sent when its
// last trigger has gone out.
//
// Timing: busy is registered from the counters and the last status word.
module td_link_monitor
  import gt_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] status_word,
  input  logic        status_valid,
  input  logic        trig_sent,
  input  logic [7:0]  block_size,
  input  logic [15:0] limit,
  output logic        busy,
  output logic        ti_busy,
  output logic        limit_busy,
  output logic [15:0] blocks_sent,
  output logic [15:0] blocks_acked,
  output logic [31:0] trig_received,
  output logic [15:0] parity_errors
);
  status_word_t sw;
  logic [7:0]   in_block;
  logic [15:0]  diff;

  assign sw   = status_word_t'(status_word);
  assign diff = blocks_sent - blocks_acked;

  always_ff @(posedge clk) begin
    if (rst) begin
      ti_busy       <= 1'b0;
      limit_busy    <= 1'b0;
      blocks_sent   <= '0;
      blocks_acked  <= '0;
      trig_received <= '0;
      parity_errors <= '0;
      in_block      <= '0;
    end else begin
      if (trig_sent) begin
        if (in_block + 8'd1 >= block_size) begin
          in_block    <= '0;
          blocks_sent <= blocks_sent + 1'b1;
        end else begin
          in_block <= in_block + 1'b1;
        end
      end
      if (status_valid) begin
        if (word_ok(status_word)) begin
          ti_busy <= sw.busy;
          if (sw.readout_ack)   blocks_acked  <= blocks_acked + 1'b1;
          if (sw.trig_received) trig_received <= trig_received + 1'b1;
        end else begin
          parity_errors <= parity_errors + 1'b1;
        end
      end
      limit_busy <= (limit != '0) && (diff >= limit);
    end
  end

  assign busy = ti_busy || limit_busy;
endmodule
