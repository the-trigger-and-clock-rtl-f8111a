// ti_latency_meter: fibre latency measurement of the TI.
//
// On `start` the TI sends a one-cycle test pulse on the spare fibre of its
// bundle; the TD loops it back on the other fibre of the pair. The meter
// counts 250 MHz cycles from the cycle the pulse leaves (test_tx high) to the
// cycle it returns (test_rx high); round_trip is that count and `latency`,
// half of it, is the one-way fibre latency used to set the SYNC delay. The
// loop-back scheme and the halving are the document's; the sub-cycle
// carry-chain measurement of the board is not built, so the result is in
// whole 4 ns cycles. If nothing returns within 2^CNT_W - 1 cycles, `timeout`
// is set.
module ti_latency_meter #(
  parameter int unsigned CNT_W = 12
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  output logic             test_tx,
  input  logic             test_rx,
  output logic             measuring,
  output logic             done,
  output logic             timeout,
  output logic [CNT_W-1:0] round_trip,
  output logic [CNT_W-1:0] latency
);
  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      test_tx    <= 1'b0;
      measuring  <= 1'b0;
      done       <= 1'b0;
      timeout    <= 1'b0;
      cnt        <= '0;
      round_trip <= '0;
    end else begin
      test_tx <= 1'b0;
      if (start && !measuring) begin
        test_tx   <= 1'b1;
        measuring <= 1'b1;
        done      <= 1'b0;
        timeout   <= 1'b0;
        cnt       <= '0;
      end else if (measuring) begin
        if (test_rx) begin
          round_trip <= cnt;
          measuring  <= 1'b0;
          done       <= 1'b1;
        end else if (cnt == '1) begin
          measuring <= 1'b0;
          timeout   <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  assign latency = round_trip >> 1;
endmodule
