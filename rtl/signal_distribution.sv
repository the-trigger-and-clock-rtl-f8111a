// signal_distribution: Signal Distribution (SD) switch-slot board.
//
// The SD sits in the switch slot of a VXS crate. It fans the signal bundle it
// receives from the board in payload slot 18 (the TS in the distribution
// crate, the TI in a front-end crate) out to the N_SLOTS payload slots, and
// merges the BUSY lines coming back from those slots into one BUSY (a logic
// OR). Fan-out and OR are the document's; the bundle width W is whatever the
// crate carries. Combinational: the board has no clocked logic on this path.
// The jitter-cleaning PLL of the SD is an analog part and not modelled.
module signal_distribution #(
  parameter int unsigned N_SLOTS = 16,
  parameter int unsigned W       = 19
) (
  input  logic [W-1:0]              in_bundle,
  output logic [N_SLOTS-1:0][W-1:0] out_bundle,
  input  logic [N_SLOTS-1:0]        busy_in,
  output logic                      busy_out
);
  always_comb begin
    for (int i = 0; i < N_SLOTS; i++) out_bundle[i] = in_bundle;
  end
  assign busy_out = |busy_in;
endmodule
