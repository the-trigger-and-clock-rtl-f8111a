// fiber_model: behavioural model of one fibre bundle between a TD link and a
// TI, for testbenches. Every signal travels DELAY clock cycles in each
// direction (trigger words and SYNC down, status words up, and the latency
// test pulse down and back through the spare pair). DELAY must be at least 1.
module fiber_model #(
  parameter int unsigned DELAY = 10
) (
  input  logic        clk,
  // TD side
  input  logic [15:0] td_word,
  input  logic        td_word_valid,
  input  logic [1:0]  td_sync,
  input  logic        td_loop_out,
  output logic [15:0] td_status,
  output logic        td_status_valid,
  output logic        td_loop_in,
  // TI side
  output logic [15:0] ti_word,
  output logic        ti_word_valid,
  output logic [1:0]  ti_sync,
  output logic        ti_loop_rx,
  input  logic [15:0] ti_status,
  input  logic        ti_status_valid,
  input  logic        ti_loop_tx
);
  logic [19:0] down [DELAY];
  logic [17:0] up   [DELAY];
  initial begin
    for (int i = 0; i < int'(DELAY); i++) begin
      down[i] = {16'h0, 1'b0, 2'b01, 1'b0};
      up[i]   = '0;
    end
  end
  always @(posedge clk) begin
    down[0] <= {td_word, td_word_valid, td_sync, td_loop_out};
    up[0]   <= {ti_status, ti_status_valid, ti_loop_tx};
    for (int i = 1; i < int'(DELAY); i++) begin
      down[i] <= down[i-1];
      up[i]   <= up[i-1];
    end
  end
  assign {ti_word, ti_word_valid, ti_sync, ti_loop_rx}  = down[DELAY-1];
  assign {td_status, td_status_valid, td_loop_in}       = up[DELAY-1];
endmodule
