// Testbench for ts_trigger_word_assembler: random triggers (whenever the
// assembler is ready), command requests and idle slots. An independent model
// predicts every word: a trigger word with the trigger's 4 ns position in the
// slot it occurred in, a content word in the next slot, commands in free
// slots, timer words otherwise. Also checks one word per 16 ns (4 cycles) and
// odd parity.
`include "tb_check.svh"
module ts_trigger_word_assembler_tb;
  import gt_pkg::*;
  logic clk;
  int checks = 0, failures = 0;
  `TB_CLOCK
  `TB_WATCHDOG(50000)

  logic rst, trig, ready, cmd_valid, cmd_accept, word_valid, syncevent_sent;
  logic [1:0] phase;
  trig_src_e src;
  logic [13:0] ttype;
  trig_cmd_e cmd_code;
  logic [10:0] cmd_data;
  logic [15:0] word;
  logic [31:0] trig_count;
  logic [12:0] timer;
  ts_trigger_word_assembler dut (.*);

  // model state
  logic m_pend, m_content;
  logic [1:0] m_time;
  trig_src_e m_src, m_csrc;
  logic [13:0] m_type;
  logic [2:0] m_chi;
  logic [12:0] m_timer;
  logic [15:0] expected;
  logic exp_due;
  int last_valid = -1, cyc = 0, n_trig = 0, n_cmd = 0, n_timer = 0, n_content = 0;

  always @(posedge clk) if (!rst) begin
    cyc++;
    // compare the word registered at the previous boundary
    if (word_valid) begin
      `CHECK(exp_due && word == expected, "word content")
      `CHECK(word_ok(word), "odd parity")
      if (last_valid >= 0) `CHECK(cyc - last_valid == 4, "one word every 16 ns")
      last_valid = cyc;
      case (word[14:13])
        2'b10: n_trig++;
        2'b11: n_content++;
        2'b01: n_cmd++;
        default: n_timer++;
      endcase
      exp_due = 0;
    end
    `CHECK(ready == (!m_pend && !m_content), "ready")
    // model of this cycle
    if (phase == 2'd3) begin
      exp_due = 1;
      if (m_pend || trig) begin
        expected = make_word(WT_TRIGGER, m_pend ? m_time : 2'd3, m_pend ? m_type[10:0] : ttype[10:0]);
        m_csrc = m_pend ? m_src : src;
        m_chi = m_pend ? m_type[13:11] : ttype[13:11];
        m_content = 1;
      end else if (m_content) begin
        expected = make_word(WT_CONTENT, m_csrc, {8'b0, m_chi});
        m_content = 0;
      end else if (cmd_valid) begin
        expected = make_word(WT_COMMAND, cmd_code, cmd_data);
        `CHECK(cmd_accept, "command accepted in a free slot")
      end else begin
        expected = make_word(WT_TIMER, m_timer[12:11], m_timer[10:0]);
      end
      m_timer++;
      m_pend = 0;
    end else if (trig) begin
      m_pend = 1; m_time = phase; m_src = src; m_type = ttype;
    end
  end

  always @(posedge clk) begin
    if (rst) phase <= 0; else phase <= phase + 1'b1;
  end

  initial begin
    rst = 1; trig = 0; cmd_valid = 0; src = SRC_GTP; ttype = 0; cmd_code = TC_VME; cmd_data = 0;
    m_pend = 0; m_content = 0; m_timer = 0; exp_due = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    repeat (4000) begin
      trig = ready && (($urandom % 5) == 0);
      src = trig_src_e'(2'($urandom));
      ttype = 14'($urandom);
      if (!cmd_valid && ($urandom % 17) == 0) begin
        cmd_valid = 1; cmd_code = trig_cmd_e'(2'($urandom % 2)); cmd_data = 11'($urandom);
      end
      @(posedge clk); #1;
      if (cmd_accept === 1'b1) ; // handled below
    end
    trig = 0;
    repeat (8) @(posedge clk);
    $display("words: %0d trigger, %0d content, %0d command, %0d timer", n_trig, n_content, n_cmd, n_timer);
    `CHECK(n_trig > 50 && n_cmd > 20 && n_timer > 50 && n_content == n_trig, "all word types seen")
    `CHECK(trig_count == 32'(n_trig), "trigger count")
    `TB_DONE
  end

  // drop the command request once it has been taken
  always @(posedge clk) if (cmd_accept) #1 cmd_valid = 0;
endmodule
