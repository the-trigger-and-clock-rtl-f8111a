// slow_clock_phase: phase of the 62.5 MHz word clock in 250 MHz cycles.
//
// The supervisor derives its 125 MHz and 62.5 MHz clocks from the 250 MHz
// clock (a clock manager); a TI derives its slower clocks with a divider chip
// whose outputs are restarted by the clock-resynchronisation SYNC command, so
// that all TIs, which receive that command at the same instant, end up in
// phase. This counter stands for those divided clocks: `phase` counts 0..3,
// and `resync` forces it to 0 in the next cycle. clk_62 and clk_125 are the
// divided clocks as levels, for reference.
module slow_clock_phase (
  input  logic       clk,
  input  logic       rst,
  input  logic       resync,
  output logic [1:0] phase,
  output logic       clk_125,
  output logic       clk_62
);
  always_ff @(posedge clk) begin
    if (rst || resync) phase <= '0;
    else               phase <= phase + 1'b1;
  end

  assign clk_125 = ~phase[0];
  assign clk_62  = ~phase[1];
endmodule
