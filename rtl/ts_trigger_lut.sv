// ts_trigger_lut: two-level trigger look-up table of the trigger supervisor.
//
// A 32-bit input pattern is split into two 16-bit halves. Each half addresses
// a first-level table (2^16 x 8); the two 8-bit results, high half first,
// form the 16-bit address of a second-level table (2^16 x OUT_W) whose word is
// {trigger bit, trigger type}. The supervisor uses one instance for the 32 GTP
// inputs (OUT_W = 15: 1-bit trigger and 14-bit type) and one for the four
// groups of eight front-panel inputs (OUT_W = 9: 1-bit trigger, 8-bit type).
// The two-level 16-bit-address / 8-bit-output structure and the table sizes
// follow the document; the load port and the split into halves are this
// design's own. Tables are synchronous block RAMs: trig/ttype follow the
// pattern by two clock cycles.
//
// Load port: wr_table 0 = first-level table of pattern[15:0], 1 = first-level
// table of pattern[31:16], 2 = second-level table. Only the low L1_W bits of
// wr_data are used for the first-level tables.
module ts_trigger_lut #(
  parameter int unsigned IN_W   = 32,
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned L1_W   = 8,
  parameter int unsigned OUT_W  = 15
) (
  input  logic              clk,
  input  logic [IN_W-1:0]   pattern,
  output logic              trig,
  output logic [OUT_W-2:0]  ttype,
  input  logic              wr_en,
  input  logic [1:0]        wr_table,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [OUT_W-1:0]  wr_data
);
  localparam int unsigned DEPTH = 2 ** ADDR_W;

  initial begin
    assert (IN_W == 2 * ADDR_W) else $error("IN_W must be twice ADDR_W");
    assert (2 * L1_W == ADDR_W) else $error("two L1_W outputs must form an ADDR_W address");
  end

  logic [L1_W-1:0]  l1_lo [DEPTH];
  logic [L1_W-1:0]  l1_hi [DEPTH];
  logic [OUT_W-1:0] l2    [DEPTH];

  logic [L1_W-1:0]  lo_q, hi_q;
  logic [OUT_W-1:0] l2_q;

  always_ff @(posedge clk) begin
    if (wr_en && wr_table == 2'd0) l1_lo[wr_addr] <= wr_data[L1_W-1:0];
    if (wr_en && wr_table == 2'd1) l1_hi[wr_addr] <= wr_data[L1_W-1:0];
    if (wr_en && wr_table == 2'd2) l2[wr_addr]    <= wr_data;
  end

  always_ff @(posedge clk) begin
    lo_q <= l1_lo[pattern[ADDR_W-1:0]];
    hi_q <= l1_hi[pattern[IN_W-1:ADDR_W]];
    l2_q <= l2[{hi_q, lo_q}];
  end

  assign trig  = l2_q[OUT_W-1];
  assign ttype = l2_q[OUT_W-2:0];
endmodule
