// ti_top: Trigger Interface (TI) board logic of a front-end crate.
//
// SYNC path: the Manchester SYNC stream from the fibre is decoded; the raw
// command (arriving with the fibre latency, like the trigger words) resets the
// trigger FIFO write counter on trigger-stop. The command is then delayed by
// sync_delay = latency_target - fibre latency (measured with the loop-back
// pulse, in 4 ns steps), so that every TI executes it in the same cycle:
// clock resynchronisation realigns the slot phase, trigger start/stop
// enable/disable the trigger link and start/stop FIFO reading, front-end
// crate reset clears the event data and goes to the crate, the GTP-status
// reset clears the sticky error flags.
// Trigger path: fibre words -> fixed-latency FIFO -> decoder -> trig_out to
// the crate's SD at the trigger's 4 ns position, and -> event builder
// (event number, time stamp, type, blocks, ROC interrupt and acknowledge).
// Status path: crate BUSY, own BUSY, SYNC-event BUSY, acknowledges and trigger
// marks go back to the TD in one status word per slot.
// latency_target must be at least the largest fibre latency in the system.
// The structure follows the document; register-style slow control replaces
// VME, and the fine (sub-4 ns) SYNC alignment of the board is not built.
module ti_top
  import gt_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH  = 128,
  parameter int unsigned DELAY_DEPTH = 256,
  parameter int unsigned EVENT_DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst,
  // fibre bundle from the TD
  input  logic [15:0] fib_word,
  input  logic        fib_word_valid,
  input  logic [1:0]  fib_sync,
  input  logic        fib_loop_rx,
  // fibre bundle to the TD
  output logic [15:0] fib_status,
  output logic        fib_status_valid,
  output logic        fib_loop_tx,
  // configuration
  input  logic [$clog2(DELAY_DEPTH)-1:0] latency_target,
  input  logic [7:0]  block_size,
  input  logic        measure_start,
  // crate (through the SD)
  input  logic        sd_busy,
  output logic        trig_out,
  output logic        fe_reset,
  output logic        vme_dcm_reset,
  // read-out controller
  output logic        irq,
  output logic [15:0] blocks_ready,
  input  logic        ev_rd_en,
  output ti_event_t   ev_data,
  output logic        ev_empty,
  input  logic        roc_ack,
  input  logic        roc_sync_ack,
  // monitoring
  output logic [1:0]  phase,
  output logic        latency_done,
  output logic [11:0] round_trip,
  output logic [$clog2(DELAY_DEPTH)-1:0] sync_delay,
  output logic        link_enabled,
  output logic        busy,
  output logic        syncevent_busy,
  output logic        error_flags,      // sticky FIFO / timer / parity error
  output logic [10:0] vme_cmd,
  output logic [31:0] trig_count
);
  localparam int unsigned DW = $clog2(DELAY_DEPTH);

  // ---------------- SYNC path ----------------
  logic          raw_valid, raw_invalid, del_valid;
  logic [3:0]    raw_cmd, del_cmd;
  logic [15:0]   violations_unused;
  sync_actions_t raw_act, act;

  ti_sync_decoder u_sdec (
    .clk, .rst, .chips(fib_sync), .cmd_valid(raw_valid), .cmd(raw_cmd),
    .cmd_invalid(raw_invalid), .violations(violations_unused)
  );

  assign raw_act = raw_valid ? decode_sync(raw_cmd) : '0;

  logic [11:0] latency;
  logic        lat_measuring_unused, lat_timeout_unused;

  ti_latency_meter #(.CNT_W(12)) u_lat (
    .clk, .rst, .start(measure_start), .test_tx(fib_loop_tx), .test_rx(fib_loop_rx),
    .measuring(lat_measuring_unused), .done(latency_done), .timeout(lat_timeout_unused),
    .round_trip, .latency
  );

  always_comb begin
    if (12'(latency_target) > latency) sync_delay = DW'(12'(latency_target) - latency);
    else                               sync_delay = '0;
  end

  ti_sync_delay #(.DEPTH(DELAY_DEPTH)) u_sdel (
    .clk, .rst, .delay(sync_delay), .in_valid(raw_valid), .in_cmd(raw_cmd),
    .out_valid(del_valid), .out_cmd(del_cmd)
  );

  assign act = del_valid ? decode_sync(del_cmd) : '0;

  logic clk_125_unused, clk_62_unused;
  slow_clock_phase u_phase (
    .clk, .rst, .resync(act.clk_resync), .phase, .clk_125(clk_125_unused), .clk_62(clk_62_unused)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      link_enabled  <= 1'b0;
      fe_reset      <= 1'b0;
      vme_dcm_reset <= 1'b0;
    end else begin
      if (act.trig_start)     link_enabled <= 1'b1;
      else if (act.trig_stop) link_enabled <= 1'b0;
      fe_reset      <= act.fe_reset;
      vme_dcm_reset <= act.vme_dcm_reset;
    end
  end

  // ---------------- trigger path ----------------
  logic        f_valid, fifo_error, fifo_reading_unused;
  logic [15:0] f_word;
  logic [$clog2(FIFO_DEPTH):0] fifo_occ_unused;

  ti_trigger_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .wr_valid(fib_word_valid), .wr_word(fib_word), .wr_reset(raw_act.trig_stop),
    .rd_phase(phase), .rd_reset(act.trig_start), .rd_stop(act.trig_stop),
    .rd_valid(f_valid), .rd_word(f_word), .reading(fifo_reading_unused),
    .occupancy(fifo_occ_unused), .clear_error(act.gtp_status_reset), .error(fifo_error)
  );

  logic        ev_valid, ev_sync, dec_sync_err, dec_par_err, cmd_valid;
  logic [13:0] ev_type;
  trig_src_e   ev_src;
  logic [10:0] cmd_data;

  ti_trigger_decoder u_dec (
    .clk, .rst, .enable(link_enabled), .in_valid(f_valid), .in_word(f_word),
    .trig_out, .event_valid(ev_valid), .event_type(ev_type), .event_src(ev_src),
    .event_syncevent(ev_sync), .vme_cmd_valid(cmd_valid), .vme_cmd_data(cmd_data),
    .sync_error(dec_sync_err), .parity_error(dec_par_err), .trig_count
  );

  always_ff @(posedge clk) begin
    if (rst) vme_cmd <= '0;
    else if (cmd_valid) vme_cmd <= cmd_data;
  end

  logic                         own_busy, ack_out;
  logic [$clog2(EVENT_DEPTH):0] ev_count_unused;
  logic [15:0]                  ev_overflows_unused;

  ti_event_builder #(.DEPTH(EVENT_DEPTH)) u_evb (
    .clk, .rst, .fe_reset, .trig_fire(trig_out), .event_valid(ev_valid),
    .event_type(ev_type), .event_src(ev_src), .event_syncevent(ev_sync),
    .block_size, .rd_en(ev_rd_en), .rd_data(ev_data), .empty(ev_empty),
    .count(ev_count_unused), .blocks_ready, .irq, .roc_ack, .ack_out,
    .busy(own_busy), .overflows(ev_overflows_unused)
  );

  // ---------------- status path ----------------
  logic sync_error_any;
  assign sync_error_any = dec_sync_err || dec_par_err;

  ti_status_word u_stat (
    .clk, .rst, .phase, .sd_busy, .own_busy,
    .syncevent(ev_valid && ev_sync), .roc_sync_ack, .readout_ack(ack_out),
    .trig_received(trig_out), .sync_error(sync_error_any),
    .busy, .syncevent_busy, .status(fib_status), .status_valid(fib_status_valid)
  );

  logic err_sticky;
  always_ff @(posedge clk) begin
    if (rst || act.gtp_status_reset) err_sticky <= 1'b0;
    else if (sync_error_any || raw_invalid) err_sticky <= 1'b1;
  end
  assign error_flags = err_sticky || fifo_error;
endmodule
