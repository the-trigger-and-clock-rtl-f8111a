// ts_trigger_source_encoder: trigger source encoding of the trigger supervisor.
//
// Three 1-bit trigger sources (GTP look-up table, front-panel look-up table,
// VME-generated trigger) are combined into one trigger pulse and a 2-bit
// multiplexer select: 01 GTP, 10 external, 11 VME, and 00 when more than one
// source fires in the same 4 ns cycle (a collision). The collision data is the
// mask {vme, ext, gtp} of the sources that fired. These codes are the
// document's. A trigger is passed only when the throttle allows it and the
// word assembler can take it; otherwise it is counted as lost. Purely
// combinational apart from the lost/collision counters.
module ts_trigger_source_encoder
  import gt_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        gtp_trig,
  input  logic        ext_trig,
  input  logic        vme_trig,
  input  logic        allow,        // throttle: not BUSY, not inhibited
  input  logic        ready,        // word assembler can accept a trigger
  output logic        trig,
  output trig_src_e   src,
  output logic [2:0]  collision_mask,
  output logic        collision,    // pulse: a collision trigger was passed
  output logic        throttled,    // pulse: a trigger was blocked
  output logic [31:0] lost_count,
  output logic [31:0] collision_count
);
  logic [2:0] fired;
  assign fired = {vme_trig, ext_trig, gtp_trig};

  always_comb begin
    unique case (fired)
      3'b001:  src = SRC_GTP;
      3'b010:  src = SRC_EXT;
      3'b100:  src = SRC_VME;
      default: src = SRC_COLLISION;
    endcase
  end

  assign collision_mask = fired;
  assign trig           = (fired != 3'b000) && allow && ready;
  assign collision      = trig && (src == SRC_COLLISION);
  assign throttled      = (fired != 3'b000) && !(allow && ready);

  always_ff @(posedge clk) begin
    if (rst) begin
      lost_count      <= '0;
      collision_count <= '0;
    end else begin
      if (throttled) lost_count      <= lost_count + 1'b1;
      if (collision) collision_count <= collision_count + 1'b1;
    end
  end
endmodule
