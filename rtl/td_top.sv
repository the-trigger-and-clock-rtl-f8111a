// td_top: Trigger Distribution (TD) board logic.
//
// The TD takes the trigger-word stream and the SYNC stream from the SD of the
// distribution crate and fans both out to N_LINKS fibre links, one TI per
// link. For each link it loops the TI's latency-test pulse straight back, and
// it decodes the TI status words in a td_link_monitor (TI BUSY, readout
// acknowledges, event limit). The link BUSYs are ORed into the BUSY sent to
// the SD. It spots trigger words (and SYNC-event command words) on their way
// through to count triggers per link. Fan-out, loop-back, status decoding,
// event limit and BUSY merging are the document's; the fan-out is
// combinational here so that trigger words and SYNC keep the same latency.
module td_top
  import gt_pkg::*;
#(
  parameter int unsigned N_LINKS = 8
) (
  input  logic                      clk,
  input  logic                      rst,
  // from the SD (P0 backplane)
  input  logic [15:0]               trig_word,
  input  logic                      trig_word_valid,
  input  logic [1:0]                sync_chips,
  output logic                      busy,
  // fibre links
  output logic [N_LINKS-1:0][15:0]  link_word,
  output logic [N_LINKS-1:0]        link_word_valid,
  output logic [N_LINKS-1:0][1:0]   link_sync,
  output logic [N_LINKS-1:0]        loop_out,
  input  logic [N_LINKS-1:0][15:0]  link_status,
  input  logic [N_LINKS-1:0]        link_status_valid,
  input  logic [N_LINKS-1:0]        loop_in,
  // configuration
  input  logic [7:0]                block_size,
  input  logic [15:0]               limit,
  // monitoring
  output logic [N_LINKS-1:0]        link_busy,
  output logic [N_LINKS-1:0]        link_limit_busy,
  output logic                      trig_seen
);
  trig_word_t w;
  assign w = trig_word_t'(trig_word);

  assign trig_seen = trig_word_valid && word_ok(trig_word) &&
                     ((w.wtype == WT_TRIGGER) ||
                      (w.wtype == WT_COMMAND && w.field == TC_SYNCEVENT));

  always_comb begin
    for (int i = 0; i < N_LINKS; i++) begin
      link_word[i]       = trig_word;
      link_word_valid[i] = trig_word_valid;
      link_sync[i]       = sync_chips;
    end
  end

  assign loop_out = loop_in;

  for (genvar i = 0; i < N_LINKS; i++) begin : g_link
    logic        ti_busy_unused;
    logic [15:0] sent_unused, acked_unused, perr_unused;
    logic [31:0] trec_unused;
    td_link_monitor u_mon (
      .clk, .rst,
      .status_word(link_status[i]), .status_valid(link_status_valid[i]),
      .trig_sent(trig_seen), .block_size, .limit,
      .busy(link_busy[i]), .ti_busy(ti_busy_unused), .limit_busy(link_limit_busy[i]),
      .blocks_sent(sent_unused), .blocks_acked(acked_unused),
      .trig_received(trec_unused), .parity_errors(perr_unused)
    );
  end

  assign busy = |link_busy;
endmodule
