// ts_trigger_word_assembler: builds the supervisor's 16-bit trigger words.
//
// One word leaves per 16 ns slot (every fourth 250 MHz cycle) for the
// transceiver that serialises it. A trigger accepted in slot w goes out in the
// word registered at the last cycle of slot w, with its 4 ns position in the
// slot (0..3) in bits 12:11 and the low 11 bits of its type in bits 10:0; the
// following slot carries a trigger-content word with the source code and the
// upper three type bits. While a trigger or its content word is pending the
// assembler is not ready, so at most one trigger is taken per two slots (about
// 32 ns of dead time). Slots with no trigger carry a queued VME command word
// (trigger command in 12:11, command in 10:0) or, when idle, a timer word with
// the 13-bit slot count, which the TIs use to check that no word was lost.
// Word types and the one-word-per-16 ns rate are the document's; the content
// and timer word layouts and the priority trigger > content > command > timer
// are this design's.
//
// Timing: word/word_valid are registered; word_valid is high for one cycle,
// at slot phase 0, every four cycles.
module ts_trigger_word_assembler
  import gt_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [1:0]  phase,
  // trigger from the source encoder and multiplexer
  input  logic        trig,
  input  trig_src_e   src,
  input  logic [13:0] ttype,
  output logic        ready,
  // command words (VME command or SYNC event)
  input  logic        cmd_valid,
  input  trig_cmd_e   cmd_code,
  input  logic [10:0] cmd_data,
  output logic        cmd_accept,
  // output to the serialiser
  output logic [15:0] word,
  output logic        word_valid,
  output logic        syncevent_sent,
  output logic [31:0] trig_count,
  output logic [12:0] timer
);
  logic        trig_pend;
  logic [1:0]  pend_time;
  trig_src_e   pend_src;
  logic [13:0] pend_type;
  logic        content_due;
  trig_src_e   content_src;
  logic [2:0]  content_hi;

  logic boundary;
  assign boundary = (phase == 2'd3);
  assign ready    = !trig_pend && !content_due;

  // word chosen at a slot boundary
  logic [15:0] next_word;
  logic        send_trig, send_content, send_cmd;
  logic [1:0]  t_time;
  trig_src_e   t_src;
  logic [13:0] t_type;

  always_comb begin
    send_trig    = trig_pend || trig;
    send_content = !send_trig && content_due;
    send_cmd     = !send_trig && !send_content && cmd_valid;
    t_time       = trig_pend ? pend_time : phase;
    t_src        = trig_pend ? pend_src  : src;
    t_type       = trig_pend ? pend_type : ttype;
    if (send_trig)         next_word = make_word(WT_TRIGGER, t_time, t_type[10:0]);
    else if (send_content) next_word = make_word(WT_CONTENT, content_src, {8'b0, content_hi});
    else if (send_cmd)     next_word = make_word(WT_COMMAND, cmd_code, cmd_data);
    else                   next_word = make_word(WT_TIMER, timer[12:11], timer[10:0]);
  end

  assign cmd_accept = boundary && send_cmd;

  always_ff @(posedge clk) begin
    if (rst) begin
      trig_pend      <= 1'b0;
      pend_time      <= '0;
      pend_src       <= SRC_COLLISION;
      pend_type      <= '0;
      content_due    <= 1'b0;
      content_src    <= SRC_COLLISION;
      content_hi     <= '0;
      word           <= make_word(WT_TIMER, 2'b0, 11'b0);
      word_valid     <= 1'b0;
      syncevent_sent <= 1'b0;
      trig_count     <= '0;
      timer          <= '0;
    end else begin
      word_valid     <= boundary;
      syncevent_sent <= boundary && send_cmd && (cmd_code == TC_SYNCEVENT);
      if (boundary) begin
        word        <= next_word;
        timer       <= timer + 1'b1;
        trig_pend   <= 1'b0;
        content_due <= send_trig;
        if (send_trig) begin
          content_src <= t_src;
          content_hi  <= t_type[13:11];
          trig_count  <= trig_count + 1'b1;
        end
      end else if (trig) begin
        trig_pend <= 1'b1;
        pend_time <= phase;
        pend_src  <= src;
        pend_type <= ttype;
      end
    end
  end

  // A trigger may only arrive when the assembler is ready.
  a_trig_ready: assert property (@(posedge clk) disable iff (rst) trig |-> ready);
endmodule
