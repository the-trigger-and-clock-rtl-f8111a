// Testbench for ti_trigger_fifo: two FIFOs fed with the same numbered word
// stream, one delayed by 3 and one by 37 cycles (two fibre lengths), each
// with its write reset arriving with its own stream delay and both read
// resets in the same cycle. Both must then hand out the same word in the same
// cycle, one per slot, in order, with no error; a late read start that lets
// the writer lap the reader must raise the error flag.
`include "tb_check.svh"
module ti_trigger_fifo_tb;
  logic clk;
  int checks = 0, failures = 0;
  `TB_CLOCK
  `TB_WATCHDOG(20000)

  logic rst, rd_reset, rd_stop, clear_error;
  logic [1:0] phase;
  logic [15:0] src_word;
  logic src_valid, src_wreset;
  // two delayed copies of the source stream
  logic [17:0] line [64];
  always @(posedge clk) begin
    line[0] <= {src_valid, src_wreset, src_word};
    for (int i = 1; i < 64; i++) line[i] <= line[i-1];
  end
  localparam int D0 = 3, D1 = 37;

  logic        rv [2];
  logic [15:0] rw [2];
  logic        reading [2];
  logic [7:0]  occ [2];
  logic        err [2];
  for (genvar k = 0; k < 2; k++) begin : g
    localparam int D = (k == 0) ? D0 : D1;
    ti_trigger_fifo #(.DEPTH(128)) dut (
      .clk, .rst, .wr_valid(line[D-1][17]), .wr_word(line[D-1][15:0]), .wr_reset(line[D-1][16]),
      .rd_phase(phase), .rd_reset, .rd_stop, .rd_valid(rv[k]), .rd_word(rw[k]),
      .reading(reading[k]), .occupancy(occ[k]), .clear_error, .error(err[k])
    );
  end

  int cyc = 0, n_read = 0;
  logic [15:0] last = 0;
  always @(posedge clk) begin
    phase <= rst ? 2'd0 : phase + 1'b1;
    cyc <= cyc + 1;
  end
  // source: a numbered word per slot
  always @(posedge clk) begin
    src_valid <= !rst && (phase == 2'd3);
    if (!rst && phase == 2'd3) src_word <= src_word + 1'b1;
  end

  logic checking = 1;
  always @(posedge clk) if (checking && (rv[0] || rv[1])) begin
    `CHECK(rv[0] && rv[1], "both FIFOs read in the same cycle")
    `CHECK(rw[0] == rw[1], "same word in every crate")
    `CHECK(phase == 2'd1, "word read at slot phase 0, valid at phase 1")
    if (n_read > 0) `CHECK(rw[0] == last + 1'b1, "words in order, one per slot")
    last = rw[0];
    n_read++;
  end

  initial begin
    rst = 1; rd_reset = 0; rd_stop = 0; clear_error = 0; src_wreset = 0; src_word = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    repeat (10) @(posedge clk); #1;
    src_wreset = 1; @(posedge clk); #1 src_wreset = 0;   // trigger stop, sent down the fibres
    repeat (60) @(posedge clk); #1;                       // compensated delay: later than D1
    rd_reset = 1; @(posedge clk); #1 rd_reset = 0;
    repeat (400) @(posedge clk); #1;
    `CHECK(n_read > 90, "reading continuously")
    `CHECK(!err[0] && !err[1], "no FIFO error")
    // stop reading; the writers lap the reader; restart -> error
    rd_stop = 1; @(posedge clk); #1 rd_stop = 0;
    `CHECK(!reading[0], "reading stopped")
    repeat (4 * 140) @(posedge clk); #1;
    rd_stop = 0;
    // restart reading long after the write reset: the writer is more than
    // DEPTH words ahead, which must be flagged
    checking = 0;
    rd_reset = 1; @(posedge clk); #1 rd_reset = 0;
    repeat (8) @(posedge clk); #1;
    `CHECK(err[0] && err[1], "overrun detected")
    clear_error = 1; @(posedge clk); #1 clear_error = 0;
    `CHECK(!err[0], "error cleared")
    `TB_DONE
  end
endmodule
