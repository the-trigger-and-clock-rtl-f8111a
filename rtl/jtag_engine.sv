// jtag_engine: slow-control to JTAG engine of the trigger supervisor.
//
// One slow-control command shifts up to 32 bits through a JTAG port: the
// host writes a TMS word, a TDI word and a bit count and pulses `start`; the
// engine then drives bit 0 first, one bit per TCK period, and collects TDO
// into `tdo_word` (bit i = TDO sampled at the i-th TCK rising edge). `busy` is
// high while shifting and `done` pulses for one cycle at the end. The
// supervisor carries two of these, one on its FPGA's JTAG port and one on its
// configuration PROM's, to load the PROM and read chip identification.
// Loading 32 bits per command through the FPGA (instead of one bit per bus
// transfer through discrete logic) is the document's; the register interface,
// LSB-first order and TCK rate are this design's.
//
// Timing: TCK = clk / (2*HALF) (31.25 MHz for HALF = 4 on 250 MHz). TMS and
// TDI change only while TCK is low, HALF cycles before the rising edge; TDO is
// sampled at the rising edge. TCK rests low between commands.
module jtag_engine #(
  parameter int unsigned HALF = 4,     // clk cycles per TCK half period
  parameter int unsigned W    = 32     // bits per command
) (
  input  logic                 clk,
  input  logic                 rst,
  // command
  input  logic                 start,
  input  logic [$clog2(W+1)-1:0] nbits,   // 1..W (0 is taken as W)
  input  logic [W-1:0]         tms_word,
  input  logic [W-1:0]         tdi_word,
  output logic [W-1:0]         tdo_word,
  output logic                 busy,
  output logic                 done,
  // JTAG port
  output logic                 tck,
  output logic                 tms,
  output logic                 tdi,
  input  logic                 tdo
);
  localparam int unsigned CW = $clog2(W+1);
  localparam int unsigned HW = $clog2(HALF+1);

  logic [W-1:0]  tms_sh, tdi_sh;
  logic [CW-1:0] left, count;
  logic [HW-1:0] div;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      tck      <= 1'b0;
      tms      <= 1'b1;
      tdi      <= 1'b0;
      tdo_word <= '0;
      tms_sh   <= '0;
      tdi_sh   <= '0;
      left     <= '0;
      count    <= '0;
      div      <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy     <= 1'b1;
          tms      <= tms_word[0];
          tdi      <= tdi_word[0];
          tms_sh   <= tms_word >> 1;
          tdi_sh   <= tdi_word >> 1;
          left     <= (nbits == '0 || nbits > CW'(W)) ? CW'(W) : nbits;
          count    <= '0;
          tdo_word <= '0;
          div      <= '0;
        end
      end else if (div != HW'(HALF - 1)) begin
        div <= div + 1'b1;
      end else begin
        div <= '0;
        if (!tck) begin
          // rising edge: the device samples TMS/TDI, we sample TDO
          tck             <= 1'b1;
          tdo_word[count] <= tdo;
          count           <= count + 1'b1;
          left            <= left - 1'b1;
        end else begin
          // falling edge: next bit, or finish
          tck <= 1'b0;
          if (left == '0) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            tms    <= tms_sh[0];
            tdi    <= tdi_sh[0];
            tms_sh <= tms_sh >> 1;
            tdi_sh <= tdi_sh >> 1;
          end
        end
      end
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (rst) start |-> !busy)
    else $error("jtag_engine: start while busy");
endmodule
