// ts_trigger_mux: trigger type multiplexer of the trigger supervisor.
//
// Selects the trigger type that goes with the trigger pulse, by the source
// encoder's select: the 14-bit type from the GTP look-up table, the 8-bit type
// from the front-panel look-up table or the 8-bit VME trigger type (both
// zero-extended), or, for a collision, the 3-bit mask of colliding sources.
// Widths follow the document's diagram; zero extension and the collision
// format are this design's. Combinational.
module ts_trigger_mux
  import gt_pkg::*;
(
  input  trig_src_e   sel,
  input  logic [13:0] gtp_type,
  input  logic [7:0]  ext_type,
  input  logic [7:0]  vme_type,
  input  logic [2:0]  collision_mask,
  output logic [13:0] ttype
);
  always_comb begin
    unique case (sel)
      SRC_GTP:       ttype = gtp_type;
      SRC_EXT:       ttype = {6'b0, ext_type};
      SRC_VME:       ttype = {6'b0, vme_type};
      SRC_COLLISION: ttype = {11'b0, collision_mask};
      default:       ttype = '0;
    endcase
  end
endmodule
