// gluex_trigger_system: the complete trigger and clock distribution system.
//
// One global distribution crate and N_TD*N_TI_PER_TD front-end crates:
//
//   TS --P0--> SD --P0--> TD[0..N_TD-1] ==fibre bundles==> TI[0..N_TI-1]
//   TS <-BUSY- SD <-BUSY- TD            <==status words==  TI
//                                                          |  P0
//                                         front-end SD <---+---> N_FE_SLOTS
//                                         (trigger, reset out; BUSY OR in)
//
// The trigger supervisor (TS) forms triggers and SYNC commands; the signal
// distribution board (SD) of the global crate fans them to up to 16 trigger
// distribution boards (TD), each driving eight fibre bundles to the trigger
// interfaces (TI) of the front-end crates. BUSY flows back the same way and
// throttles the TS. All boards share the one 250 MHz clock `clk`. The TS's
// two JTAG engines (FPGA and PROM port) and two I2C engines (one per switch
// slot) are brought out as ports.
//
// The fibres themselves are outside this module: each TD link's outputs
// (td_fib_*) and each TI's fibre inputs (ti_fib_*) are ports, and the
// environment connects them, with whatever fibre delay each crate has. Link
// i of the flattened arrays is link (i % N_TI_PER_TD) of TD (i / N_TI_PER_TD).
// Front-end modules and read-out controllers are likewise ports.
// rst must be held for longer than the longest fibre round trip, so that no
// word or test pulse sent before the reset is still on a fibre after it.
// Default sizes are the document's full system: 16 TDs x 8 TIs = 128
// front-end crates with 16 payload slots each.
module gluex_trigger_system
  import gt_pkg::*;
#(
  parameter int unsigned N_TD        = 16,
  parameter int unsigned N_TI_PER_TD = 8,
  parameter int unsigned N_FE_SLOTS  = 16,
  localparam int unsigned N_TI       = N_TD * N_TI_PER_TD
) (
  input  logic        clk,
  input  logic        rst,
  // ---- trigger supervisor inputs and slow control
  input  logic [31:0] gtp_in,
  input  logic [31:0] ext_in,
  input  logic        vme_trig,
  input  logic [7:0]  vme_type,
  input  logic        lut_wr_en,
  input  logic        lut_wr_sel,
  input  logic [1:0]  lut_wr_table,
  input  logic [15:0] lut_wr_addr,
  input  logic [14:0] lut_wr_data,
  input  logic [15:0] gtp_prescale,
  input  logic [15:0] ext_prescale,
  input  logic        run_enable,
  input  logic        vme_inhibit,
  input  logic [1:0]  sync_phase_offset,
  input  logic        cmd_valid,
  input  trig_cmd_e   cmd_code,
  input  logic [10:0] cmd_data,
  output logic        cmd_accept,
  input  logic        sync_cmd_valid,
  input  logic [3:0]  sync_cmd,
  output logic        sync_cmd_accept,
  // ---- trigger supervisor monitoring
  output logic [1:0]  ts_phase,
  output logic        ts_trig_sent,
  output logic        ts_collision,
  output logic        ts_prescale_dropped,
  output logic        ts_throttled,
  output logic        ts_waiting,
  output logic        ts_busy,
  output logic [31:0] ts_busy_time,
  output logic [31:0] ts_trig_count,
  // ---- TD slow control and monitoring
  input  logic [7:0]  td_block_size,
  input  logic [15:0] td_limit,
  output logic [N_TD-1:0] td_busy,
  output logic [N_TI-1:0] td_link_limit_busy,
  // ---- fibres: TD side
  output logic [N_TI-1:0][15:0] td_fib_word,
  output logic [N_TI-1:0]       td_fib_word_valid,
  output logic [N_TI-1:0][1:0]  td_fib_sync,
  output logic [N_TI-1:0]       td_fib_loop_out,
  input  logic [N_TI-1:0][15:0] td_fib_status,
  input  logic [N_TI-1:0]       td_fib_status_valid,
  input  logic [N_TI-1:0]       td_fib_loop_in,
  // ---- fibres: TI side
  input  logic [N_TI-1:0][15:0] ti_fib_word,
  input  logic [N_TI-1:0]       ti_fib_word_valid,
  input  logic [N_TI-1:0][1:0]  ti_fib_sync,
  input  logic [N_TI-1:0]       ti_fib_loop_rx,
  output logic [N_TI-1:0][15:0] ti_fib_status,
  output logic [N_TI-1:0]       ti_fib_status_valid,
  output logic [N_TI-1:0]       ti_fib_loop_tx,
  // ---- TI slow control and monitoring
  input  logic [7:0]  ti_latency_target,
  input  logic [7:0]  ti_block_size,
  input  logic        ti_measure_start,
  output logic [N_TI-1:0]       ti_latency_done,
  output logic [N_TI-1:0][11:0] ti_round_trip,
  output logic [N_TI-1:0]       ti_link_enabled,
  output logic [N_TI-1:0]       ti_busy,
  output logic [N_TI-1:0]       ti_syncevent_busy,
  output logic [N_TI-1:0]       ti_error_flags,
  output logic [N_TI-1:0][10:0] ti_vme_cmd,
  // ---- front-end modules (through each crate's SD)
  output logic [N_TI-1:0][N_FE_SLOTS-1:0] fe_trig,
  output logic [N_TI-1:0][N_FE_SLOTS-1:0] fe_reset,
  input  logic [N_TI-1:0][N_FE_SLOTS-1:0] fe_busy,
  // ---- read-out controllers
  output logic [N_TI-1:0]       roc_irq,
  input  logic [N_TI-1:0]       roc_ev_rd_en,
  output ti_event_t [N_TI-1:0]  roc_ev_data,
  output logic [N_TI-1:0]       roc_ev_empty,
  input  logic [N_TI-1:0]       roc_ack,
  input  logic [N_TI-1:0]       roc_sync_ack,
  // ---- the supervisor's two slow-control-to-JTAG engines (FPGA and PROM port)
  input  logic [1:0]            jtag_start,
  input  logic [1:0][5:0]       jtag_nbits,
  input  logic [1:0][31:0]      jtag_tms_word,
  input  logic [1:0][31:0]      jtag_tdi_word,
  output logic [1:0][31:0]      jtag_tdo_word,
  output logic [1:0]            jtag_busy,
  output logic [1:0]            jtag_done,
  output logic [1:0]            jtag_tck,
  output logic [1:0]            jtag_tms,
  output logic [1:0]            jtag_tdi,
  input  logic [1:0]            jtag_tdo,
  // ---- the supervisor's two slow-control-to-I2C engines (one per switch slot)
  input  logic [1:0]            i2c_start,
  input  logic [1:0][6:0]       i2c_dev_addr,
  input  logic [1:0]            i2c_read,
  input  logic [1:0][7:0]       i2c_wr_data,
  output logic [1:0][7:0]       i2c_rd_data,
  output logic [1:0]            i2c_ack_error,
  output logic [1:0]            i2c_busy,
  output logic [1:0]            i2c_done,
  output logic [1:0]            i2c_scl_low,
  output logic [1:0]            i2c_sda_low,
  input  logic [1:0]            i2c_scl_in,
  input  logic [1:0]            i2c_sda_in
);
  localparam int unsigned GSD_SLOTS = 16;   // payload slots of a VXS crate
  localparam int unsigned GW        = 19;   // word, valid, SYNC chips

  initial assert (N_TD <= GSD_SLOTS) else $error("at most 16 TDs per SD");

  // ---------------- global distribution crate ----------------
  logic [15:0] ts_word;
  logic        ts_word_valid;
  logic [1:0]  ts_sync;

  ts_top u_ts (
    .clk, .rst, .gtp_in, .ext_in, .vme_trig, .vme_type,
    .lut_wr_en, .lut_wr_sel, .lut_wr_table, .lut_wr_addr, .lut_wr_data,
    .gtp_prescale, .ext_prescale, .run_enable, .vme_inhibit, .sync_phase_offset,
    .cmd_valid, .cmd_code, .cmd_data, .cmd_accept,
    .sync_cmd_valid, .sync_cmd, .sync_cmd_accept,
    .busy_in(ts_busy),
    .trig_word(ts_word), .trig_word_valid(ts_word_valid), .sync_chips(ts_sync),
    .phase(ts_phase), .trig_sent(ts_trig_sent), .collision(ts_collision),
    .prescale_dropped(ts_prescale_dropped), .throttled(ts_throttled),
    .waiting(ts_waiting), .busy_time(ts_busy_time),
    .lost_count(), .collision_count(), .trig_count(ts_trig_count)
  );

  for (genvar e = 0; e < 2; e++) begin : g_ts_slow
    jtag_engine u_jtag (
      .clk, .rst, .start(jtag_start[e]), .nbits(jtag_nbits[e]), .tms_word(jtag_tms_word[e]),
      .tdi_word(jtag_tdi_word[e]), .tdo_word(jtag_tdo_word[e]), .busy(jtag_busy[e]),
      .done(jtag_done[e]), .tck(jtag_tck[e]), .tms(jtag_tms[e]), .tdi(jtag_tdi[e]), .tdo(jtag_tdo[e])
    );
    i2c_engine u_i2c (
      .clk, .rst, .start(i2c_start[e]), .dev_addr(i2c_dev_addr[e]), .read(i2c_read[e]),
      .wr_data(i2c_wr_data[e]), .rd_data(i2c_rd_data[e]), .ack_error(i2c_ack_error[e]),
      .busy(i2c_busy[e]), .done(i2c_done[e]), .scl_low(i2c_scl_low[e]), .sda_low(i2c_sda_low[e]),
      .scl_in(i2c_scl_in[e]), .sda_in(i2c_sda_in[e])
    );
  end

  logic [GSD_SLOTS-1:0][GW-1:0] gsd_out;
  logic [GSD_SLOTS-1:0]         gsd_busy_in;

  signal_distribution #(.N_SLOTS(GSD_SLOTS), .W(GW)) u_gsd (
    .in_bundle({ts_word, ts_word_valid, ts_sync}), .out_bundle(gsd_out),
    .busy_in(gsd_busy_in), .busy_out(ts_busy)
  );

  always_comb begin
    gsd_busy_in = '0;
    for (int t = 0; t < N_TD; t++) gsd_busy_in[t] = td_busy[t];
  end

  for (genvar t = 0; t < N_TD; t++) begin : g_td
    localparam int unsigned B = t * N_TI_PER_TD;
    logic trig_seen_unused;
    td_top #(.N_LINKS(N_TI_PER_TD)) u_td (
      .clk, .rst,
      .trig_word(gsd_out[t][18:3]), .trig_word_valid(gsd_out[t][2]), .sync_chips(gsd_out[t][1:0]),
      .busy(td_busy[t]),
      .link_word(td_fib_word[B +: N_TI_PER_TD]),
      .link_word_valid(td_fib_word_valid[B +: N_TI_PER_TD]),
      .link_sync(td_fib_sync[B +: N_TI_PER_TD]),
      .loop_out(td_fib_loop_out[B +: N_TI_PER_TD]),
      .link_status(td_fib_status[B +: N_TI_PER_TD]),
      .link_status_valid(td_fib_status_valid[B +: N_TI_PER_TD]),
      .loop_in(td_fib_loop_in[B +: N_TI_PER_TD]),
      .block_size(td_block_size), .limit(td_limit),
      .link_busy(), .link_limit_busy(td_link_limit_busy[B +: N_TI_PER_TD]),
      .trig_seen(trig_seen_unused)
    );
  end

  // ---------------- front-end crates ----------------
  for (genvar i = 0; i < N_TI; i++) begin : g_crate
    logic trig, rst_fe, sd_busy;
    logic [N_FE_SLOTS-1:0][1:0] fan;

    ti_top u_ti (
      .clk, .rst,
      .fib_word(ti_fib_word[i]), .fib_word_valid(ti_fib_word_valid[i]),
      .fib_sync(ti_fib_sync[i]), .fib_loop_rx(ti_fib_loop_rx[i]),
      .fib_status(ti_fib_status[i]), .fib_status_valid(ti_fib_status_valid[i]),
      .fib_loop_tx(ti_fib_loop_tx[i]),
      .latency_target(ti_latency_target), .block_size(ti_block_size),
      .measure_start(ti_measure_start),
      .sd_busy, .trig_out(trig), .fe_reset(rst_fe), .vme_dcm_reset(),
      .irq(roc_irq[i]), .blocks_ready(), .ev_rd_en(roc_ev_rd_en[i]),
      .ev_data(roc_ev_data[i]), .ev_empty(roc_ev_empty[i]),
      .roc_ack(roc_ack[i]), .roc_sync_ack(roc_sync_ack[i]),
      .phase(), .latency_done(ti_latency_done[i]), .round_trip(ti_round_trip[i]),
      .sync_delay(), .link_enabled(ti_link_enabled[i]), .busy(ti_busy[i]),
      .syncevent_busy(ti_syncevent_busy[i]), .error_flags(ti_error_flags[i]),
      .vme_cmd(ti_vme_cmd[i]), .trig_count()
    );

    signal_distribution #(.N_SLOTS(N_FE_SLOTS), .W(2)) u_fesd (
      .in_bundle({trig, rst_fe}), .out_bundle(fan),
      .busy_in(fe_busy[i]), .busy_out(sd_busy)
    );

    always_comb begin
      for (int s = 0; s < N_FE_SLOTS; s++) begin
        fe_trig[i][s]  = fan[s][1];
        fe_reset[i][s] = fan[s][0];
      end
    end
  end
endmodule
