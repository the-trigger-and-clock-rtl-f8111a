// ti_trigger_fifo: fixed-latency trigger-word buffer of the TI.
//
// Received trigger words are written, one per slot, at a write counter that
// restarts at 0 on the trigger-stop SYNC command as it arrives over the fibre
// (wr_reset): word number k is therefore the same word in every TI, whatever
// its fibre length. The read counter restarts on the trigger-start command
// after the TI's SYNC delay (rd_reset), which all TIs see in the same clock
// cycle; from the next slot phase 0 one word is read per slot. Every TI thus
// hands on word k at the same instant, which is what lines up the triggers
// of all front-end crates. rd_stop (trigger stop after the delay) halts
// reading. The write/read counter resets by the two SYNC codes are the
// document's; the depth and the error checks are this design's.
//
// Timing: rd_valid/rd_word are registered, at slot phase 1.
// `error` is sticky (cleared by clear_error or reset): a read found no
// word written yet (underrun) or the writer got DEPTH words ahead (overrun).
module ti_trigger_fifo #(
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        wr_valid,
  input  logic [15:0] wr_word,
  input  logic        wr_reset,
  input  logic [1:0]  rd_phase,
  input  logic        rd_reset,
  input  logic        rd_stop,
  output logic        rd_valid,
  output logic [15:0] rd_word,
  output logic        reading,
  output logic [AW:0] occupancy,
  input  logic        clear_error,
  output logic        error
);
  logic [15:0] mem [DEPTH];
  logic [AW:0] wp, rp;
  logic        do_read;

  assign occupancy = wp - rp;
  assign do_read   = reading && (rd_phase == 2'd0);

  always_ff @(posedge clk) begin
    if (wr_valid) mem[wr_reset ? '0 : wp[AW-1:0]] <= wr_word;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp       <= '0;
      rp       <= '0;
      reading  <= 1'b0;
      rd_valid <= 1'b0;
      rd_word  <= '0;
      error    <= 1'b0;
    end else begin
      if (wr_reset)      wp <= {{AW{1'b0}}, wr_valid};
      else if (wr_valid) wp <= wp + 1'b1;

      rd_valid <= 1'b0;
      if (rd_reset) begin
        reading <= 1'b1;
        rp      <= '0;
      end else if (rd_stop) begin
        reading <= 1'b0;
      end else if (do_read) begin
        rd_word  <= mem[rp[AW-1:0]];
        rd_valid <= 1'b1;
        rp       <= rp + 1'b1;
      end

      if (clear_error) error <= 1'b0;
      else if (do_read && !rd_reset && !rd_stop && !wr_reset &&
               (occupancy == '0 || 32'(occupancy) > DEPTH)) error <= 1'b1;
    end
  end
endmodule
