// ts_prescaler: trigger prescaler of the trigger supervisor.
//
// Passes the first trigger and then one of every `prescale` triggers of its
// source (prescale 0 or 1 passes all). The output is combinational: a passed
// trigger leaves in the same cycle it arrives, so the trigger type that
// travels beside it stays aligned. The document says only that the supervisor
// can prescale its trigger inputs; the counter scheme is this design's.
module ts_prescaler #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [CNT_W-1:0] prescale,
  input  logic             in_trig,
  output logic             out_trig,
  output logic             dropped   // a trigger was removed this cycle
);
  logic [CNT_W-1:0] cnt;

  logic pass;

  // a prescale changed to a smaller value takes effect at once
  assign pass     = (prescale <= 1) || (cnt == '0);
  assign out_trig = in_trig && pass;
  assign dropped  = in_trig && !pass;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
    end else if (in_trig) begin
      if (prescale <= 1 || cnt >= prescale - 1) cnt <= '0;
      else                                      cnt <= cnt + 1'b1;
    end
  end
endmodule
