// ts_sync_encoder: SYNC command serialiser and Manchester encoder.
//
// The SYNC line idles at '1'. A 4-bit command is sent as one '0' start bit
// followed by the four command bits, MSB first, one bit per 250 MHz cycle
// (250 Mb/s), and at least four '1's separate two commands. The start bit is
// launched only when the slot phase equals `phase_offset`, so every command
// has a fixed phase relation to the 62.5 MHz word clock; with the default
// offset 3 the four command bits fill exactly one 16 ns slot. This framing is
// the document's; the launch rule and MSB-first order are this design's.
// Each bit is Manchester encoded for the AC-coupled fibre as two half-bit
// chips, chips[1] first: '1' -> 01, '0' -> 10 (a DDR output would send them).
//
// Handshake: cmd_valid/cmd is held until cmd_accept pulses. The bit appears
// on sync_bit/chips one cycle after cmd_accept (the start bit).
module ts_sync_encoder (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] phase,
  input  logic [1:0] phase_offset,
  input  logic       cmd_valid,
  input  logic [3:0] cmd,
  output logic       cmd_accept,
  output logic       sync_bit,
  output logic [1:0] chips
);
  logic [3:0] sh;
  logic [2:0] bits_left;
  logic [2:0] ones;

  assign cmd_accept = (bits_left == 0) && cmd_valid && (ones >= 3'd4) && (phase == phase_offset);
  assign chips      = sync_bit ? 2'b01 : 2'b10;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_bit  <= 1'b1;
      sh        <= '0;
      bits_left <= '0;
      ones      <= '0;
    end else if (bits_left != 0) begin
      sync_bit  <= sh[3];
      sh        <= {sh[2:0], 1'b0};
      bits_left <= bits_left - 1'b1;
      ones      <= '0;
    end else if (cmd_accept) begin
      sync_bit  <= 1'b0;
      sh        <= cmd;
      bits_left <= 3'd4;
      ones      <= '0;
    end else begin
      sync_bit <= 1'b1;
      if (ones < 3'd4) ones <= ones + 1'b1;
    end
  end
endmodule
