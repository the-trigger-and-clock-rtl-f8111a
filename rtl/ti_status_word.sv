// ti_status_word: BUSY combination and status word of the TI.
//
// The TI ORs the BUSY merged by its crate's SD (front-end modules) with its
// own BUSY (event buffer nearly full) and with the SYNC-event BUSY, which is
// set when a SYNC event arrives and cleared when the ROC signals, by
// roc_sync_ack, that the crate has emptied its buffers. Every slot it sends
// the TD one status word (see gt_pkg::status_word_t) carrying that BUSY and
// at most one readout acknowledge and one trigger-received mark; further ones
// wait in small counters for later slots. sync_error is held until sent.
// Which status the word carries is the document's; the layout and the
// one-per-slot counters are this design's.
//
// Timing: status/status_valid are registered, valid at slot phase 0.
module ti_status_word
  import gt_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [1:0]  phase,
  input  logic        sd_busy,
  input  logic        own_busy,
  input  logic        syncevent,
  input  logic        roc_sync_ack,
  input  logic        readout_ack,
  input  logic        trig_received,
  input  logic        sync_error,
  output logic        busy,
  output logic        syncevent_busy,
  output logic [15:0] status,
  output logic        status_valid
);
  logic [3:0]   acks_pend, trigs_pend;
  logic         err_pend;
  logic         send_ack, send_trig;
  status_word_t sw;

  assign busy      = sd_busy || own_busy || syncevent_busy;
  assign send_ack  = (phase == 2'd3) && (acks_pend != '0);
  assign send_trig = (phase == 2'd3) && (trigs_pend != '0);

  always_comb begin
    sw                = '0;
    sw.busy           = busy;
    sw.readout_ack    = send_ack;
    sw.trig_received  = send_trig;
    sw.syncevent_busy = syncevent_busy;
    sw.sync_error     = err_pend;
    sw.parity         = odd_parity(15'(sw));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acks_pend      <= '0;
      trigs_pend     <= '0;
      err_pend       <= 1'b0;
      syncevent_busy <= 1'b0;
      status         <= '0;
      status_valid   <= 1'b0;
    end else begin
      if (syncevent)         syncevent_busy <= 1'b1;
      else if (roc_sync_ack) syncevent_busy <= 1'b0;
      acks_pend  <= acks_pend  + 4'(readout_ack   && acks_pend  != '1) - 4'(send_ack);
      trigs_pend <= trigs_pend + 4'(trig_received && trigs_pend != '1) - 4'(send_trig);
      status_valid <= (phase == 2'd3);
      if (phase == 2'd3) begin
        status   <= sw;
        err_pend <= sync_error;
      end else if (sync_error) begin
        err_pend <= 1'b1;
      end
    end
  end
endmodule
