// ti_trigger_decoder: trigger-word decoder of the TI.
//
// Takes the words read from the trigger FIFO (one per 16 ns slot) and
//  - drops words with bad parity (counted);
//  - for a trigger word, fires trig_out `time` cycles (0..3, bits 12:11)
//    after a fixed point of the slot, so the 4 ns position the supervisor saw
//    is restored; the low 11 type bits are kept until the trigger-content word
//    of the next slot brings the source and the upper type bits, and then
//    event_valid hands the full trigger to the event builder;
//  - for a SYNC-event command word, fires trig_out at position 0 and hands on
//    an event marked syncevent at once; other command words go to
//    vme_cmd_valid/vme_cmd_data;
//  - for a timer word, checks that the 13-bit slot count equals the previous
//    one plus the number of words since (sync_error pulses otherwise).
// Triggers are only acted on while `enable` (trigger link enabled by SYNC).
// Word types follow the document; layouts of content and timer words and the
// timer check rule are this design's (see gt_pkg).
//
// Timing: for a trigger word arriving with in_valid in cycle v and time t,
// trig_out is high in cycle v+1+t.
module ti_trigger_decoder
  import gt_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic        in_valid,
  input  logic [15:0] in_word,
  output logic        trig_out,
  output logic        event_valid,
  output logic [13:0] event_type,
  output trig_src_e   event_src,
  output logic        event_syncevent,
  output logic        vme_cmd_valid,
  output logic [10:0] vme_cmd_data,
  output logic        sync_error,
  output logic        parity_error,
  output logic [31:0] trig_count
);
  trig_word_t  w;
  logic        ok;
  logic        fire_pend;
  logic [1:0]  fire_cnt;
  logic        await_content;
  logic [10:0] type_lo;
  logic        timer_seen;
  logic [12:0] last_timer;
  logic [12:0] words_since;

  assign w  = trig_word_t'(in_word);
  assign ok = word_ok(in_word);

  always_ff @(posedge clk) begin
    if (rst) begin
      trig_out        <= 1'b0;
      fire_pend       <= 1'b0;
      fire_cnt        <= '0;
      event_valid     <= 1'b0;
      event_type      <= '0;
      event_src       <= SRC_COLLISION;
      event_syncevent <= 1'b0;
      vme_cmd_valid   <= 1'b0;
      vme_cmd_data    <= '0;
      sync_error      <= 1'b0;
      parity_error    <= 1'b0;
      await_content   <= 1'b0;
      type_lo         <= '0;
      timer_seen      <= 1'b0;
      last_timer      <= '0;
      words_since     <= '0;
      trig_count      <= '0;
    end else begin
      trig_out      <= 1'b0;
      event_valid   <= 1'b0;
      vme_cmd_valid <= 1'b0;
      sync_error    <= 1'b0;
      parity_error  <= 1'b0;

      // trigger output at its 4 ns position
      if (fire_pend) begin
        if (fire_cnt == '0) begin
          trig_out  <= 1'b1;
          fire_pend <= 1'b0;
        end else begin
          fire_cnt <= fire_cnt - 1'b1;
        end
      end

      if (in_valid) begin
        words_since <= words_since + 1'b1;
        if (!ok) begin
          parity_error  <= 1'b1;
          await_content <= 1'b0;
        end else begin
          await_content <= 1'b0;
          unique case (w.wtype)
            WT_TRIGGER: if (enable) begin
              if (w.field == 2'd0) trig_out <= 1'b1;
              else begin
                fire_pend <= 1'b1;
                fire_cnt  <= w.field - 2'd1;
              end
              type_lo       <= w.payload;
              await_content <= 1'b1;
              trig_count    <= trig_count + 1'b1;
            end
            WT_CONTENT: if (await_content) begin
              event_valid     <= 1'b1;
              event_type      <= {w.payload[2:0], type_lo};
              event_src       <= trig_src_e'(w.field);
              event_syncevent <= 1'b0;
            end
            WT_COMMAND: begin
              if (w.field == TC_SYNCEVENT) begin
                if (enable) begin
                  trig_out        <= 1'b1;
                  event_valid     <= 1'b1;
                  event_type      <= '0;
                  event_src       <= SRC_VME;
                  event_syncevent <= 1'b1;
                  trig_count      <= trig_count + 1'b1;
                end
              end else begin
                vme_cmd_valid <= 1'b1;
                vme_cmd_data  <= w.payload;
              end
            end
            WT_TIMER: begin
              timer_seen  <= 1'b1;
              last_timer  <= {w.field, w.payload};
              words_since <= 13'd1;
              if (timer_seen && ({w.field, w.payload} != last_timer + words_since))
                sync_error <= 1'b1;
            end
            default: ;
          endcase
        end
      end
    end
  end
endmodule
