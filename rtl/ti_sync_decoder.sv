// ti_sync_decoder: Manchester decoder and SYNC command deframer of the TI.
//
// Input is the SYNC fibre stream as two Manchester chips per 250 MHz cycle,
// already phase-aligned to the clock (the FPGA input delay does that on the
// board). '01' is a '1', '10' a '0'; '00' and '11' are code violations, which
// are counted and read as the idle '1'. The line idles at '1'; a '0' starts a
// command and the next four bits, MSB first, are the command code. A valid
// code gives a one-cycle cmd_valid; the reserved codes 0000 and 1111 give
// cmd_invalid instead. Framing, codes and Manchester coding follow the
// document; the chip convention matches ts_sync_encoder.
//
// Timing: cmd_valid is registered, five cycles after the start bit's chips.
module ti_sync_decoder
  import gt_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [1:0]  chips,
  output logic        cmd_valid,
  output logic [3:0]  cmd,
  output logic        cmd_invalid,
  output logic [15:0] violations
);
  logic       bit_in;
  logic [2:0] bits_left;
  logic [3:0] sh;

  assign bit_in = (chips != 2'b10);   // violations read as idle '1'

  always_ff @(posedge clk) begin
    if (rst) begin
      bits_left   <= '0;
      sh          <= '0;
      cmd         <= '0;
      cmd_valid   <= 1'b0;
      cmd_invalid <= 1'b0;
      violations  <= '0;
    end else begin
      cmd_valid   <= 1'b0;
      cmd_invalid <= 1'b0;
      if (chips == 2'b00 || chips == 2'b11) violations <= violations + 1'b1;
      if (bits_left != 0) begin
        sh        <= {sh[2:0], bit_in};
        bits_left <= bits_left - 1'b1;
        if (bits_left == 3'd1) begin
          cmd         <= {sh[2:0], bit_in};
          cmd_valid   <= !sync_code_invalid({sh[2:0], bit_in});
          cmd_invalid <=  sync_code_invalid({sh[2:0], bit_in});
        end
      end else if (!bit_in) begin
        bits_left <= 3'd4;
      end
    end
  end
endmodule
