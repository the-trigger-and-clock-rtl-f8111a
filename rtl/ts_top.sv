// ts_top: trigger supervisor (TS) FPGA logic.
//
// The supervisor turns trigger decisions into the serial trigger-word stream
// and the SYNC stream of the whole system:
//   32 GTP bits   -> two-level look-up table -> prescaler --+
//   4x8 ext bits  -> two-level look-up table -> prescaler --+-> source encoder
//   VME trigger (8-bit type) --------------------------------+   + throttle
//   source select -> type multiplexer -> word assembler -> 16-bit word / 16 ns
//   SYNC command (slow control) -> SYNC serialiser/Manchester encoder
// The throttle blocks triggers on BUSY from the distribution crate, VME
// inhibit, and after a SYNC event until the BUSY round trip has happened.
// The block structure follows the document's trigger-word diagram; slow
// control is a plain register interface here in place of VME.
//
// Timing: a GTP or front-panel pattern reaches the source encoder two cycles
// after it is applied (block-RAM tables); the VME trigger enters directly.
// trig_word_valid pulses every fourth cycle (62.5 MHz).
module ts_top
  import gt_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // trigger inputs
  input  logic [31:0] gtp_in,
  input  logic [31:0] ext_in,          // four groups of eight, group 0 in [7:0]
  input  logic        vme_trig,
  input  logic [7:0]  vme_type,
  // look-up table load (slow control): sel 0 = GTP tables, 1 = front-panel
  input  logic        lut_wr_en,
  input  logic        lut_wr_sel,
  input  logic [1:0]  lut_wr_table,
  input  logic [15:0] lut_wr_addr,
  input  logic [14:0] lut_wr_data,
  // configuration
  input  logic [15:0] gtp_prescale,
  input  logic [15:0] ext_prescale,
  input  logic        run_enable,
  input  logic        vme_inhibit,
  input  logic [1:0]  sync_phase_offset,
  // commands (slow control)
  input  logic        cmd_valid,
  input  trig_cmd_e   cmd_code,
  input  logic [10:0] cmd_data,
  output logic        cmd_accept,
  input  logic        sync_cmd_valid,
  input  logic [3:0]  sync_cmd,
  output logic        sync_cmd_accept,
  // BUSY from the distribution crate SD
  input  logic        busy_in,
  // outputs to the SD
  output logic [15:0] trig_word,
  output logic        trig_word_valid,
  output logic [1:0]  sync_chips,
  // monitoring
  output logic [1:0]  phase,
  output logic        trig_sent,        // pulse: a trigger was accepted
  output logic        collision,        // pulse: collision trigger
  output logic        prescale_dropped, // pulse: prescaler removed a trigger
  output logic        throttled,        // pulse: trigger blocked by throttle
  output logic        waiting,          // SYNC-event waiting mode
  output logic [31:0] busy_time,
  output logic [31:0] lost_count,
  output logic [31:0] collision_count,
  output logic [31:0] trig_count
);
  logic        gtp_lut_trig, ext_lut_trig;
  logic [13:0] gtp_lut_type;
  logic [7:0]  ext_lut_type;
  logic        gtp_trig, ext_trig, gtp_drop, ext_drop;
  logic        allow, ready, trig;
  trig_src_e   src;
  logic [2:0]  cmask;
  logic [13:0] ttype;
  logic        syncevent_sent;
  logic        sync_bit_unused;
  logic        clk_125_unused, clk_62_unused;
  logic [12:0] timer_unused;

  slow_clock_phase u_phase (
    .clk, .rst, .resync(1'b0), .phase, .clk_125(clk_125_unused), .clk_62(clk_62_unused)
  );

  ts_trigger_lut #(.OUT_W(15)) u_gtp_lut (
    .clk, .pattern(gtp_in), .trig(gtp_lut_trig), .ttype(gtp_lut_type),
    .wr_en(lut_wr_en && !lut_wr_sel), .wr_table(lut_wr_table),
    .wr_addr(lut_wr_addr), .wr_data(lut_wr_data)
  );

  ts_trigger_lut #(.OUT_W(9)) u_ext_lut (
    .clk, .pattern(ext_in), .trig(ext_lut_trig), .ttype(ext_lut_type),
    .wr_en(lut_wr_en && lut_wr_sel), .wr_table(lut_wr_table),
    .wr_addr(lut_wr_addr), .wr_data(lut_wr_data[8:0])
  );

  ts_prescaler u_gtp_ps (
    .clk, .rst, .prescale(gtp_prescale), .in_trig(gtp_lut_trig),
    .out_trig(gtp_trig), .dropped(gtp_drop)
  );

  ts_prescaler u_ext_ps (
    .clk, .rst, .prescale(ext_prescale), .in_trig(ext_lut_trig),
    .out_trig(ext_trig), .dropped(ext_drop)
  );

  assign prescale_dropped = gtp_drop || ext_drop;

  ts_throttle u_throttle (
    .clk, .rst, .run_enable, .vme_inhibit, .busy(busy_in),
    .syncevent_sent, .allow, .waiting, .busy_time
  );

  ts_trigger_source_encoder u_enc (
    .clk, .rst, .gtp_trig, .ext_trig, .vme_trig, .allow, .ready,
    .trig, .src, .collision_mask(cmask), .collision, .throttled,
    .lost_count, .collision_count
  );

  ts_trigger_mux u_mux (
    .sel(src), .gtp_type(gtp_lut_type), .ext_type(ext_lut_type),
    .vme_type, .collision_mask(cmask), .ttype
  );

  ts_trigger_word_assembler u_asm (
    .clk, .rst, .phase, .trig, .src, .ttype, .ready,
    .cmd_valid, .cmd_code, .cmd_data, .cmd_accept,
    .word(trig_word), .word_valid(trig_word_valid),
    .syncevent_sent, .trig_count, .timer(timer_unused)
  );

  ts_sync_encoder u_sync (
    .clk, .rst, .phase, .phase_offset(sync_phase_offset),
    .cmd_valid(sync_cmd_valid), .cmd(sync_cmd), .cmd_accept(sync_cmd_accept),
    .sync_bit(sync_bit_unused), .chips(sync_chips)
  );

  assign trig_sent = trig;
endmodule
