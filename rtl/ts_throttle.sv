// ts_throttle: trigger throttling of the trigger supervisor.
//
// Triggers are allowed only while the run is enabled, the merged BUSY from the
// distribution crate is low and the VME inhibit is off. After a SYNC event has
// been sent the supervisor waits: triggers stay blocked until BUSY has been
// seen high (the TIs answering the SYNC event), and then, as usual, until BUSY
// falls again. The number of 250 MHz cycles with BUSY high is counted for
// efficiency monitoring. The waiting rule and BUSY-time record follow the
// document; the enable and inhibit inputs are slow-control registers.
module ts_throttle (
  input  logic        clk,
  input  logic        rst,
  input  logic        run_enable,
  input  logic        vme_inhibit,
  input  logic        busy,
  input  logic        syncevent_sent,
  output logic        allow,
  output logic        waiting,
  output logic [31:0] busy_time
);
  typedef enum logic {ST_RUN, ST_WAIT_BUSY} state_e;
  state_e state;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= ST_RUN;
      busy_time <= '0;
    end else begin
      if (busy) busy_time <= busy_time + 1'b1;
      unique case (state)
        ST_RUN:       if (syncevent_sent) state <= ST_WAIT_BUSY;
        ST_WAIT_BUSY: if (busy)           state <= ST_RUN;
        default:      state <= ST_RUN;
      endcase
    end
  end

  assign waiting = (state == ST_WAIT_BUSY);
  assign allow   = run_enable && !vme_inhibit && !busy && !waiting && !syncevent_sent;
endmodule
