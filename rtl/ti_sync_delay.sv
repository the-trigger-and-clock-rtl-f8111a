// ti_sync_delay: programmable delay of the decoded SYNC command in the TI.
//
// A TI on a short fibre receives SYNC earlier than one on a long fibre. Each
// TI delays its decoded SYNC command by `delay` cycles of the 250 MHz clock
// (0..DEPTH-1), chosen so that fibre latency plus delay is the same in every
// front-end crate and all TIs act on a command in the same clock cycle. The
// 4 ns step is the document's; the circular-buffer delay line is this
// design's. Delay 0 passes the command through combinationally.
module ti_sync_delay #(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] delay,
  input  logic          in_valid,
  input  logic [3:0]    in_cmd,
  output logic          out_valid,
  output logic [3:0]    out_cmd
);
  logic [3:0]       cmd_mem [DEPTH];
  logic [DEPTH-1:0] valid_mem;
  logic [AW-1:0]    wp, rp;

  assign rp = wp - delay;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp        <= '0;
      valid_mem <= '0;
    end else begin
      wp            <= wp + 1'b1;
      valid_mem[wp] <= in_valid;
    end
  end

  always_ff @(posedge clk) cmd_mem[wp] <= in_cmd;

  assign out_valid = (delay == '0) ? in_valid : valid_mem[rp];
  assign out_cmd   = (delay == '0) ? in_cmd   : cmd_mem[rp];
endmodule
