// Shared body of the end-to-end testbenches of gluex_trigger_system. The
// including module declares localparams N_TD and N_TI_PER_TD, then
// instantiates the system as `dut` with implicit port connections after this
// file.
//
// Environment: every TD link is joined to its TI by a fiber_model with its own
// delay (4..90 cycles, so every crate has a different fibre length); the
// front-end modules are BUSY inputs; each crate has a read-out controller model
// that drains events, checks them against the list of triggers the testbench
// produced, acknowledges every block and answers a SYNC event with its ready
// signal.
//
// Sequence and what is checked:
//   1. look-up tables loaded, loop-back latency measured in every crate
//      (round trip = 2 x fibre delay);
//   2. SYNC clock resync, trigger stop, trigger start, front-end reset:
//      the reset reaches every front-end slot of every crate in one cycle;
//   3. GTP, front-panel and VME triggers at all four 4 ns positions: every
//      front-end slot of every crate fires in the same cycle, at a fixed
//      latency after the supervisor accepted the trigger; event data
//      (number, type, source, time stamp equal in all crates) reach every ROC;
//   4. collision (GTP and VME in one cycle), prescaling, front-end BUSY
//      throttling, event-limit BUSY (limit 1 with the ROCs stopped),
//      SYNC event with the supervisor's waiting mode and the ROC ready,
//      a VME command word received by every TI, timer words checked by every
//      TI with no error flag raised;
//   0. before all that, one 32-bit shift on each of the supervisor's JTAG
//      ports (looped through a one-bit bypass register) and one I2C transfer
//      on each of its switch-slot buses (no device: missing acknowledge).
// Each of these mechanisms is counted while it happens, and one that never
// happened is a failure.
import gt_pkg::*;
localparam int unsigned N_TI = N_TD * N_TI_PER_TD;
localparam int unsigned N_FE = 16;
localparam logic [31:0] PA = 32'h0003_0001;   // GTP pattern loaded in the tables
localparam logic [31:0] PB = 32'h0100_0200;   // front-panel pattern
localparam logic [13:0] TA = 14'h2abc;
localparam logic [7:0]  TB = 8'h5a;
localparam int unsigned BLOCK = 4;

function automatic int unsigned fibre_delay(input int unsigned i);
  return 4 + (i * 37) % 87;
endfunction

logic clk;
int checks = 0, failures = 0;
`TB_CLOCK

logic        rst;
logic [31:0] gtp_in, ext_in;
logic        vme_trig;
logic [7:0]  vme_type;
logic        lut_wr_en, lut_wr_sel;
logic [1:0]  lut_wr_table;
logic [15:0] lut_wr_addr;
logic [14:0] lut_wr_data;
logic [15:0] gtp_prescale, ext_prescale;
logic        run_enable, vme_inhibit;
logic [1:0]  sync_phase_offset;
logic        cmd_valid, cmd_accept;
trig_cmd_e   cmd_code;
logic [10:0] cmd_data;
logic        sync_cmd_valid, sync_cmd_accept;
logic [3:0]  sync_cmd;
logic [1:0]  ts_phase;
logic        ts_trig_sent, ts_collision, ts_prescale_dropped, ts_throttled, ts_waiting, ts_busy;
logic [31:0] ts_busy_time, ts_trig_count;
logic [7:0]  td_block_size;
logic [15:0] td_limit;
logic [N_TD-1:0] td_busy;
logic [N_TI-1:0] td_link_limit_busy;
logic [N_TI-1:0][15:0] td_fib_word, td_fib_status, ti_fib_word, ti_fib_status;
logic [N_TI-1:0]       td_fib_word_valid, td_fib_loop_out, td_fib_status_valid, td_fib_loop_in;
logic [N_TI-1:0]       ti_fib_word_valid, ti_fib_loop_rx, ti_fib_status_valid, ti_fib_loop_tx;
logic [N_TI-1:0][1:0]  td_fib_sync, ti_fib_sync;
logic [7:0]  ti_latency_target, ti_block_size;
logic        ti_measure_start;
logic [N_TI-1:0]       ti_latency_done, ti_link_enabled, ti_busy, ti_syncevent_busy, ti_error_flags;
logic [N_TI-1:0][11:0] ti_round_trip;
logic [N_TI-1:0][10:0] ti_vme_cmd;
logic [N_TI-1:0][N_FE-1:0] fe_trig, fe_reset, fe_busy;
logic [N_TI-1:0]       roc_irq, roc_ev_rd_en, roc_ev_empty, roc_ack, roc_sync_ack;
ti_event_t [N_TI-1:0]  roc_ev_data;
logic [1:0]            jtag_start, jtag_busy, jtag_done, jtag_tck, jtag_tms, jtag_tdi, jtag_tdo;
logic [1:0][5:0]       jtag_nbits;
logic [1:0][31:0]      jtag_tms_word, jtag_tdi_word, jtag_tdo_word;
logic [1:0]            i2c_start, i2c_read, i2c_ack_error, i2c_busy, i2c_done, i2c_scl_low, i2c_sda_low;
logic [1:0]            i2c_scl_in, i2c_sda_in;
logic [1:0][6:0]       i2c_dev_addr;
logic [1:0][7:0]       i2c_wr_data, i2c_rd_data;
// slow-control ports: each JTAG port loops TDI to TDO (a one-bit bypass
// register: TDO follows TDI by one TCK); the I2C buses have no device, so a
// transfer ends with a missing acknowledge
logic [1:0] tdo_q = '0;
for (genvar e = 0; e < 2; e++) begin : g_slow
  always @(posedge jtag_tck[e]) tdo_q[e] <= jtag_tdi[e];
  assign jtag_tdo[e]   = tdo_q[e];
  assign i2c_scl_in[e] = !i2c_scl_low[e];
  assign i2c_sda_in[e] = !i2c_sda_low[e];
end

for (genvar i = 0; i < N_TI; i++) begin : g_fibre
  fiber_model #(.DELAY(fibre_delay(i))) u_fibre (
    .clk,
    .td_word(td_fib_word[i]), .td_word_valid(td_fib_word_valid[i]), .td_sync(td_fib_sync[i]),
    .td_loop_out(td_fib_loop_out[i]), .td_status(td_fib_status[i]),
    .td_status_valid(td_fib_status_valid[i]), .td_loop_in(td_fib_loop_in[i]),
    .ti_word(ti_fib_word[i]), .ti_word_valid(ti_fib_word_valid[i]), .ti_sync(ti_fib_sync[i]),
    .ti_loop_rx(ti_fib_loop_rx[i]), .ti_status(ti_fib_status[i]),
    .ti_status_valid(ti_fib_status_valid[i]), .ti_loop_tx(ti_fib_loop_tx[i])
  );
end

// ---------------- bookkeeping ----------------
int cyc = 0;
always @(posedge clk) cyc <= cyc + 1;

// expected events, in order, for every crate
trig_src_e   exp_src  [$];
logic [13:0] exp_type [$];
logic        exp_sync [$];
longint      stamp [int];          // time stamp seen for event n, first crate to read it

// supervisor acceptance cycles (-1 for a SYNC event, which has no source trigger)
int sent_q [$];
int fires = 0, latency = -1;
always @(posedge clk) if (!rst && ts_trig_sent) sent_q.push_back(cyc);

int m_gtp = 0, m_ext = 0, m_vme = 0, m_collision = 0, m_prescale = 0, m_busy_throttle = 0;
int m_limit_busy = 0, m_limit_throttle = 0, m_waiting = 0, m_waiting_throttle = 0;
int m_syncevent_busy = 0, m_sync_ack = 0, m_fe_reset = 0, m_vme_cmd = 0, m_timer = 0;
int m_jtag = 0, m_i2c = 0;
int m_block_ack = 0, m_irq = 0, m_latency = 0, m_position [4] = '{0, 0, 0, 0};
logic throttle_expected = 1'b0;

always @(posedge clk) if (!rst) begin
  // every front-end slot of every crate fires / resets in the same cycle
  if (fe_trig != '0 && fe_trig != '1) begin
    failures++; $display("FAIL: front-end triggers not simultaneous (cycle %0d)", cyc);
  end
  if (fe_reset != '0 && fe_reset != '1) begin
    failures++; $display("FAIL: front-end resets not simultaneous (cycle %0d)", cyc);
  end
  if (fe_reset[0][0]) m_fe_reset++;
  if (fe_trig[0][0]) begin
    fires++;
    if (sent_q.size() == 0) begin
      failures++; $display("FAIL: front-end trigger with no supervisor trigger (cycle %0d)", cyc);
    end else begin
      automatic int s = sent_q.pop_front();
      if (s >= 0) begin
        if (latency < 0) latency = cyc - s;
        checks++;
        if (cyc - s != latency) begin
          failures++; $display("FAIL: trigger latency %0d, expected %0d", cyc - s, latency);
        end else m_position[s % 4]++;
      end
    end
  end
  if (ts_collision) m_collision++;
  if (ts_prescale_dropped) m_prescale++;
  if (ts_throttled) begin
    if (!throttle_expected && run_enable) begin
      failures++;
      $display("FAIL: unexpected throttling (cycle %0d): busy %0d td_busy %h ti_busy %h limit %h",
               cyc, ts_busy, td_busy, ti_busy, td_link_limit_busy);
    end
    if (ts_waiting) m_waiting_throttle++;
    else if (td_link_limit_busy != '0) m_limit_throttle++;
    else if (fe_busy != '0) m_busy_throttle++;
  end
  if (td_link_limit_busy == '1) m_limit_busy++;
  if (ts_waiting) m_waiting++;
  if (ti_syncevent_busy == '1) m_syncevent_busy++;
  if (roc_irq != '0) m_irq++;
  if (ti_fib_word_valid[0] && ti_fib_word[0][14:13] == 2'b00) m_timer++;
end

// ---------------- read-out controller models ----------------
logic roc_run = 1'b1;
int   nread [N_TI];
for (genvar i = 0; i < N_TI; i++) begin : g_roc
  initial begin
    roc_ev_rd_en[i] = 0; roc_ack[i] = 0; roc_sync_ack[i] = 0; nread[i] = 0;
    forever begin
      @(posedge clk); #1;
      roc_ev_rd_en[i] = 0; roc_ack[i] = 0; roc_sync_ack[i] = 0;
      if (roc_run && !rst && !roc_ev_empty[i]) begin
        automatic ti_event_t e = roc_ev_data[i];
        automatic int n = nread[i];
        checks++;
        if (n >= exp_src.size()) begin
          failures++; $display("FAIL: crate %0d: unexpected event %0d", i, n + 1);
        end else if (e.event_number != 32'(n + 1) || e.syncevent != exp_sync[n] ||
                     (!exp_sync[n] && (e.src != exp_src[n] || e.ttype != exp_type[n]))) begin
          failures++;
          $display("FAIL: crate %0d event %0d: got n=%0d src=%0d type=%h sync=%0d, expected src=%0d type=%h sync=%0d",
                   i, n + 1, e.event_number, e.src, e.ttype, e.syncevent, exp_src[n], exp_type[n], exp_sync[n]);
        end
        if (stamp.exists(n)) begin
          checks++;
          if (stamp[n] != longint'(e.timestamp)) begin
            failures++; $display("FAIL: crate %0d event %0d: time stamp differs between crates", i, n + 1);
          end
        end else stamp[n] = longint'(e.timestamp);
        roc_ev_rd_en[i] = 1;
        nread[i] = n + 1;
        if (nread[i] % BLOCK == 0) begin roc_ack[i] = 1; if (i == 0) m_block_ack++; end
        if (e.syncevent) begin
          // the ROC empties its buffers before it reports ready
          tick(); roc_ev_rd_en[i] = 0; roc_ack[i] = 0;
          tick(300);
          roc_sync_ack[i] = 1; if (i == 0) m_sync_ack++;
        end
      end
    end
  end
end

// ---------------- stimulus ----------------
task automatic tick(input int n = 1);
  repeat (n) @(posedge clk); #1;
endtask

task automatic lw(input logic sel, input logic [1:0] t, input logic [15:0] a, input logic [14:0] d);
  lut_wr_en = 1; lut_wr_sel = sel; lut_wr_table = t; lut_wr_addr = a; lut_wr_data = d;
  tick(); lut_wr_en = 0;
endtask

task automatic send_sync(input logic [3:0] c);
  sync_cmd = c; sync_cmd_valid = 1;
  do tick(); while (!sync_cmd_accept);
  sync_cmd_valid = 0;
  tick(40);
endtask

task automatic send_cmd(input trig_cmd_e code, input logic [10:0] data);
  cmd_code = code; cmd_data = data; cmd_valid = 1;
  // cmd_accept is combinational from the slot boundary: sample before the edge
  while (!cmd_accept) tick();
  tick(); cmd_valid = 0;
endtask

// BUSY from crates with different fibre lengths reaches the supervisor at
// different times: idle means no BUSY for longer than any round trip
task automatic wait_idle();
  int n = 0, quiet = 0;
  while (quiet < 200 && n < 20000) begin
    quiet = (ts_busy || ts_waiting) ? 0 : quiet + 1;
    tick(); n++;
  end
endtask

// one trigger of kind k (0 GTP, 1 front panel, 2 VME) at 4 ns position pos
task automatic fire(input int k, input int pos, input logic [7:0] vt = 8'h00);
  while (ts_phase != 2'(pos)) tick();
  // GTP and front-panel patterns take two cycles through the tables
  if (k < 2) begin
    tick(2);
    while (ts_phase != 2'((pos + 2) % 4)) tick();
    if (k == 0) gtp_in = PA; else ext_in = PB;
    tick(); gtp_in = 0; ext_in = 0;
  end else begin
    vme_trig = 1; vme_type = vt; tick(); vme_trig = 0;
  end
endtask

task automatic trigger(input int k, input int pos);
  logic [7:0] vt = 8'($urandom);
  fire(k, pos, vt);
  case (k)
    0: begin exp_src.push_back(SRC_GTP); exp_type.push_back(TA); m_gtp++; end
    1: begin exp_src.push_back(SRC_EXT); exp_type.push_back({6'b0, TB}); m_ext++; end
    default: begin exp_src.push_back(SRC_VME); exp_type.push_back({6'b0, vt}); m_vme++; end
  endcase
  exp_sync.push_back(1'b0);

  tick(24 + $urandom % 8);
endtask

task automatic expect_throttled(input string what);
  int n0 = m_busy_throttle + m_limit_throttle + m_waiting_throttle;
  throttle_expected = 1;
  vme_trig = 1; vme_type = 8'hee; tick(); vme_trig = 0;
  tick(2);
  throttle_expected = 0;
  `CHECK(m_busy_throttle + m_limit_throttle + m_waiting_throttle == n0 + 1, what)
endtask

task automatic wait_read_all();
  int n = 0;
  bit done = 0;
  while (!done && n < 20000) begin
    done = 1;
    for (int i = 0; i < N_TI; i++) if (nread[i] != exp_src.size()) done = 0;
    tick(); n++;
  end
  `CHECK(done, "every crate read every event")
endtask

initial begin
  rst = 1;
  gtp_in = 0; ext_in = 0; vme_trig = 0; vme_type = 0;
  lut_wr_en = 0; lut_wr_sel = 0; lut_wr_table = 0; lut_wr_addr = 0; lut_wr_data = 0;
  gtp_prescale = 0; ext_prescale = 0; run_enable = 0; vme_inhibit = 0; sync_phase_offset = 2'd3;
  cmd_valid = 0; cmd_code = TC_VME; cmd_data = 0; sync_cmd_valid = 0; sync_cmd = 0;
  td_block_size = 8'(BLOCK); td_limit = 0; ti_latency_target = 8'd120; ti_block_size = 8'(BLOCK);
  ti_measure_start = 0; fe_busy = '0;
  jtag_start = '0; jtag_nbits = '0; jtag_tms_word = '0; jtag_tdi_word = '0;
  i2c_start = '0; i2c_dev_addr = '0; i2c_read = '0; i2c_wr_data = '0;
  // reset longer than the longest fibre round trip, so that nothing sent by
  // a board before its reset is still on a fibre afterwards
  tick(200); rst = 0;

  // 0. slow control: one 32-bit JTAG shift and one I2C transfer per engine
  jtag_nbits = {6'd32, 6'd32}; jtag_tdi_word = {32'h0123_4567, 32'h89ab_cdef};
  i2c_dev_addr = {7'h21, 7'h20}; i2c_wr_data = {8'h5a, 8'ha5};
  jtag_start = 2'b11; i2c_start = 2'b11; tick(); jtag_start = '0; i2c_start = '0;
  while (jtag_busy != '0 || i2c_busy != '0) tick();
  for (int e = 0; e < 2; e++) begin
    // bit i of TDO is TDI bit i-1 (bit 0 is the bypass register's reset 0)
    `CHECK(jtag_tdo_word[e] == {jtag_tdi_word[e][30:0], 1'b0}, "JTAG shift through a bypass register")
    if (jtag_tdo_word[e] == {jtag_tdi_word[e][30:0], 1'b0}) m_jtag++;
    `CHECK(i2c_ack_error[e], "I2C transfer with no device ends with a missing acknowledge")
    if (i2c_ack_error[e]) m_i2c++;
  end

  // 1. tables and fibre latency
  for (int s = 0; s < 2; s++) begin
    lw(1'(s), 0, 16'h0, 15'h0); lw(1'(s), 1, 16'h0, 15'h0); lw(1'(s), 2, 16'h0, 15'h0);
  end
  lw(0, 0, PA[15:0], 15'h11); lw(0, 1, PA[31:16], 15'h22); lw(0, 2, 16'h2211, {1'b1, TA});
  lw(1, 0, PB[15:0], 15'h33); lw(1, 1, PB[31:16], 15'h44); lw(1, 2, 16'h4433, {6'b0, 1'b1, TB});
  ti_measure_start = 1; tick(); ti_measure_start = 0;
  tick(400);
  for (int i = 0; i < N_TI; i++) begin
    `CHECK(ti_latency_done[i] && ti_round_trip[i] == 12'(2 * fibre_delay(i)),
           $sformatf("crate %0d: fibre round trip %0d measured, %0d expected", i, ti_round_trip[i], 2 * fibre_delay(i)))
    if (ti_latency_done[i] && ti_round_trip[i] == 12'(2 * fibre_delay(i))) m_latency++;
  end

  // 2. SYNC start-up sequence
  send_sync(SYNC_CLK_RESYNC);
  send_sync(SYNC_TRIG_STOP);
  send_sync(SYNC_TRIG_START);
  send_sync(SYNC_FE_RESET);
  tick(300);
  `CHECK(ti_link_enabled == '1, "trigger links enabled")
  `CHECK(m_fe_reset == 1, "front-end reset seen once, everywhere in one cycle")
  run_enable = 1;
  tick(20);

  // 3. triggers of every source at every 4 ns position
  for (int j = 0; j < 12; j++) trigger(j % 3, (j / 3) % 4);
  for (int j = 0; j < 4; j++) trigger($urandom % 3, $urandom % 4);

  // 4a. collision: GTP pattern and VME trigger reach the encoder together
  while (ts_phase != 2'd1) tick();
  gtp_in = PA; tick(); gtp_in = 0; tick();
  vme_trig = 1; vme_type = 8'h11; tick(); vme_trig = 0;
  exp_src.push_back(SRC_COLLISION); exp_type.push_back(14'b101); exp_sync.push_back(1'b0);
  tick(30);
  `CHECK(m_collision == 1, "collision trigger")

  // 4b. prescale 2: of three GTP triggers the middle one is removed
  gtp_prescale = 2;
  trigger(0, 0);
  fire(0, 1); tick(30);
  trigger(0, 2);
  gtp_prescale = 0;
  `CHECK(m_prescale == 1, "prescaled trigger removed")

  // 4c. VME command word
  send_cmd(TC_VME, 11'h3a5);
  tick(300);
  `CHECK(ti_vme_cmd == {N_TI{11'h3a5}}, "VME command word received by every TI")
  if (ti_vme_cmd == {N_TI{11'h3a5}}) m_vme_cmd++;

  // pad to whole blocks, let the ROCs drain
  while (exp_src.size() % BLOCK != 0) trigger(2, 3);
  wait_read_all();

  // 4d. front-end BUSY in one slot of the last crate throttles the supervisor
  fe_busy[N_TI - 1][5] = 1'b1;
  tick(400);
  `CHECK(ts_busy, "front-end BUSY reaches the supervisor")
  expect_throttled("trigger blocked by front-end BUSY");
  fe_busy = '0;
  wait_idle();
  `CHECK(!ts_busy, "BUSY released")

  // 4e. event limit 1 with the ROCs stopped: one block, then BUSY
  roc_run = 0;
  td_limit = 1;
  for (int j = 0; j < BLOCK; j++) trigger(2, j);
  tick(20);
  `CHECK(td_link_limit_busy == '1 && ts_busy, "event limit reached on every link")
  expect_throttled("trigger blocked by the event limit");
  roc_run = 1;
  wait_read_all();
  wait_idle();
  `CHECK(!ts_busy && td_link_limit_busy == '0, "acknowledges release the event limit")
  trigger(2, 0);
  td_limit = 0;
  while (exp_src.size() % BLOCK != 0) trigger(2, 1);
  wait_read_all();
  wait_idle();

  // 4f. SYNC event: supervisor waits for BUSY, crates hold BUSY until ROC ready
  exp_src.push_back(SRC_COLLISION); exp_type.push_back('0); exp_sync.push_back(1'b1);
  cmd_code = TC_SYNCEVENT; cmd_data = '0; cmd_valid = 1;
  while (!cmd_accept) tick();
  sent_q.push_back(-1);
  tick(); cmd_valid = 0;
  tick(4);
  `CHECK(ts_waiting, "supervisor waits after a SYNC event")
  expect_throttled("trigger blocked while waiting for SYNC-event BUSY");
  wait_read_all();
  wait_idle();
  `CHECK(m_syncevent_busy > 0 && m_sync_ack > 0 && !ts_busy, "SYNC-event BUSY held until ROC ready")
  trigger(1, 2);
  trigger(0, 3);
  while (exp_src.size() % BLOCK != 0) trigger(2, 0);
  wait_read_all();
  tick(300);

  // final checks
  `CHECK(fires == exp_src.size(), "one front-end trigger per event")
  `CHECK(ts_trig_count == 32'(exp_src.size() - 1), "supervisor trigger count")
  `CHECK(ti_error_flags == '0, "no timer, FIFO or parity errors in any TI")
  $display("crates %0d, events %0d, trigger latency %0d cycles, busy time %0d cycles, run %0d cycles",
           N_TI, exp_src.size(), latency, ts_busy_time, cyc);
  `CHECK(m_gtp > 0,  "mechanism: GTP trigger")
  `CHECK(m_ext > 0,  "mechanism: front-panel trigger")
  `CHECK(m_vme > 0,  "mechanism: VME trigger")
  for (int p = 0; p < 4; p++) `CHECK(m_position[p] > 0, "mechanism: trigger at each 4 ns position")
  `CHECK(m_collision > 0, "mechanism: collision")
  `CHECK(m_prescale > 0, "mechanism: prescale")
  `CHECK(m_busy_throttle > 0, "mechanism: front-end BUSY throttle")
  `CHECK(m_limit_busy > 0 && m_limit_throttle > 0, "mechanism: event-limit BUSY")
  `CHECK(m_waiting > 0 && m_waiting_throttle > 0, "mechanism: SYNC-event wait")
  `CHECK(m_syncevent_busy > 0 && m_sync_ack > 0, "mechanism: SYNC-event BUSY and ROC ready")
  `CHECK(m_fe_reset > 0, "mechanism: front-end reset")
  `CHECK(m_vme_cmd > 0, "mechanism: VME command word")
  `CHECK(m_timer > 0, "mechanism: timer words")
  `CHECK(m_block_ack > 0 && m_irq > 0, "mechanism: block interrupt and acknowledge")
  `CHECK(m_latency == N_TI, "mechanism: fibre latency measurement")
  `CHECK(m_jtag == 2 && m_i2c == 2, "mechanism: JTAG and I2C slow-control transfers")
  `TB_DONE
end
