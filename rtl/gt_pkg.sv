// gt_pkg: types and constants shared by the trigger/clock distribution blocks.
//
// Everything runs on the single 250 MHz system clock that the supervisor
// distributes. The 62.5 MHz word clock is represented by a 2-bit slot phase
// (0..3): one 16-bit trigger word or status word crosses a link per 16 ns slot.
//
// Trigger word (16 bits, one per slot), following the document's table:
//   bit 15     parity
//   bits 14:13 word type: 10 trigger, 01 command, 00 timer, 11 trigger content
//   bits 12:11 trigger time in the slot (4 ns units) / trigger command /
//              upper timer bits / trigger source
//   bits 10:0  trigger type / VME command / lower timer bits / extra type bits
// Odd parity over all 16 bits and the layout of the content and timer words
// are choices of this design.
//
// SYNC command codes are the document's. The Manchester convention
// (a '1' is sent low-then-high) and MSB-first bit order are this design's.
package gt_pkg;

  localparam int unsigned SLOT_CYCLES = 4;   // 250 MHz cycles per 16 ns slot

  typedef enum logic [1:0] {
    WT_TIMER   = 2'b00,
    WT_COMMAND = 2'b01,
    WT_TRIGGER = 2'b10,
    WT_CONTENT = 2'b11
  } word_type_e;

  typedef struct packed {
    logic        parity;
    word_type_e  wtype;
    logic [1:0]  field;
    logic [10:0] payload;
  } trig_word_t;

  // Trigger source codes (mux select) of the source encoder.
  typedef enum logic [1:0] {
    SRC_COLLISION = 2'b00,
    SRC_GTP       = 2'b01,
    SRC_EXT       = 2'b10,
    SRC_VME       = 2'b11
  } trig_src_e;

  // Trigger-command field of a command word.
  typedef enum logic [1:0] {
    TC_VME       = 2'b00,   // generic VME command, payload stored by the TI
    TC_SYNCEVENT = 2'b01    // SYNC event: special trigger, TI goes BUSY
  } trig_cmd_e;

  // SYNC command codes.
  localparam logic [3:0] SYNC_FE_RESET        = 4'b1101;
  localparam logic [3:0] SYNC_TRIG_START      = 4'b0101;
  localparam logic [3:0] SYNC_TRIG_STOP       = 4'b0111;
  localparam logic [3:0] SYNC_CLK_RESYNC      = 4'b0010;
  localparam logic [3:0] SYNC_VME_DCM_RESET   = 4'b0001;
  localparam logic [3:0] SYNC_GTP_STAT_RESET  = 4'b0100;

  typedef struct packed {
    logic fe_reset;
    logic trig_start;
    logic trig_stop;
    logic clk_resync;
    logic vme_dcm_reset;
    logic gtp_status_reset;
  } sync_actions_t;

  // Status word sent by a TI to its TD every slot.
  typedef struct packed {
    logic       parity;
    logic [9:0] reserved;
    logic       sync_error;      // timer check or FIFO error seen
    logic       syncevent_busy;  // waiting for the ROC after a SYNC event
    logic       trig_received;   // one trigger received since last word
    logic       readout_ack;     // one block acknowledged by the ROC
    logic       busy;            // merged crate BUSY
  } status_word_t;

  // One TI event record.
  typedef struct packed {
    logic [31:0] event_number;
    logic [47:0] timestamp;     // 250 MHz ticks since front-end reset
    logic [13:0] ttype;
    trig_src_e   src;
    logic        syncevent;
  } ti_event_t;

  function automatic logic odd_parity(input logic [14:0] bits);
    return ~^bits;
  endfunction

  function automatic logic [15:0] make_word(input word_type_e t, input logic [1:0] f,
                                            input logic [10:0] p);
    logic [14:0] b;
    b = {t, f, p};
    return {odd_parity(b), b};
  endfunction

  function automatic logic word_ok(input logic [15:0] w);
    return ^w;   // odd number of ones
  endfunction

  function automatic sync_actions_t decode_sync(input logic [3:0] c);
    sync_actions_t a;
    a = '0;
    unique case (c)
      SYNC_FE_RESET:       a.fe_reset         = 1'b1;
      SYNC_TRIG_START:     a.trig_start       = 1'b1;
      SYNC_TRIG_STOP:      a.trig_stop        = 1'b1;
      SYNC_CLK_RESYNC:     a.clk_resync       = 1'b1;
      SYNC_VME_DCM_RESET:  a.vme_dcm_reset    = 1'b1;
      SYNC_GTP_STAT_RESET: a.gtp_status_reset = 1'b1;
      default:             a = '0;
    endcase
    return a;
  endfunction

  function automatic logic sync_code_invalid(input logic [3:0] c);
    return (c == 4'b0000) || (c == 4'b1111);
  endfunction

endpackage
