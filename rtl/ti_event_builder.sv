// ti_event_builder: TI event data, block building and ROC hand-shake.
//
// For every trigger the TI records an event: event number (counting from 1
// after front-end reset), 48-bit time stamp in 250 MHz ticks taken when the
// trigger left the TI (trig_fire), 14-bit trigger type, 2-bit source, and a
// SYNC-event flag. Events go into a DEPTH-entry FIFO that the read-out
// controller (ROC) drains through rd_en/rd_data (show-ahead). Events are
// grouped in blocks of `block_size` (0 is taken as 1); each completed block
// raises the count `blocks_ready`, and `irq` (interrupt request / poll flag) is
// high while it is non-zero. When the ROC has read a block it pulses roc_ack:
// blocks_ready drops by one and ack_out pulses to go back to the TD in the
// status word. `busy` is raised when the FIFO has room for fewer than
// ALMOST_FULL_MARGIN events. The event contents, block readout and
// acknowledge are the document's; the record layout, FIFO and BUSY threshold
// are this design's.
module ti_event_builder
  import gt_pkg::*;
#(
  parameter int unsigned DEPTH              = 64,
  parameter int unsigned ALMOST_FULL_MARGIN = 8,
  localparam int unsigned AW                = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        fe_reset,
  input  logic        trig_fire,
  input  logic        event_valid,
  input  logic [13:0] event_type,
  input  trig_src_e   event_src,
  input  logic        event_syncevent,
  input  logic [7:0]  block_size,
  input  logic        rd_en,
  output ti_event_t   rd_data,
  output logic        empty,
  output logic [AW:0] count,
  output logic [15:0] blocks_ready,
  output logic        irq,
  input  logic        roc_ack,
  output logic        ack_out,
  output logic        busy,
  output logic [15:0] overflows
);
  ti_event_t   mem [DEPTH];
  logic [AW:0] wp, rp;
  logic [31:0] evnum;
  logic [47:0] tstamp, trig_time;
  logic [7:0]  in_block;
  logic        do_write, do_read, block_done;
  logic [7:0]  bsize;

  assign bsize      = (block_size == '0) ? 8'd1 : block_size;
  assign count      = wp - rp;
  assign empty      = (count == '0);
  assign do_write   = event_valid && (32'(count) < DEPTH);
  assign do_read    = rd_en && !empty;
  assign block_done = event_valid && (in_block + 8'd1 >= bsize);
  assign rd_data    = mem[rp[AW-1:0]];
  assign irq        = (blocks_ready != '0);
  assign busy       = (32'(count) + ALMOST_FULL_MARGIN >= DEPTH);

  always_ff @(posedge clk) begin
    if (do_write) mem[wp[AW-1:0]] <= '{event_number: evnum + 1'b1, timestamp: trig_time,
                                      ttype: event_type, src: event_src,
                                      syncevent: event_syncevent};
  end

  always_ff @(posedge clk) begin
    if (rst || fe_reset) begin
      wp           <= '0;
      rp           <= '0;
      evnum        <= '0;
      tstamp       <= '0;
      trig_time    <= '0;
      in_block     <= '0;
      blocks_ready <= '0;
      ack_out      <= 1'b0;
      overflows    <= '0;
    end else begin
      tstamp  <= tstamp + 1'b1;
      ack_out <= 1'b0;
      if (trig_fire) trig_time <= tstamp;
      if (event_valid) begin
        evnum <= evnum + 1'b1;
        if (!do_write) overflows <= overflows + 1'b1;
        in_block <= block_done ? 8'd0 : in_block + 8'd1;
      end
      if (do_write) wp <= wp + 1'b1;
      if (do_read)  rp <= rp + 1'b1;
      if (block_done && !(roc_ack && blocks_ready != '0)) blocks_ready <= blocks_ready + 1'b1;
      else if (!block_done && roc_ack && blocks_ready != '0) blocks_ready <= blocks_ready - 1'b1;
      if (roc_ack && blocks_ready != '0) ack_out <= 1'b1;
    end
  end
endmodule
