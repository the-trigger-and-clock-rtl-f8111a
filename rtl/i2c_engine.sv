// i2c_engine: slow-control to I2C bridge for a switch-slot board.
//
// The VXS switch slots have no VME access, so the supervisor (and each TI)
// reaches the board in a switch slot through I2C. One slow-control command
// runs one I2C transfer of a single byte: START, 7-bit device address with the
// read/write bit, then one data byte written to the device (write) or read
// from it and answered with NACK (read), then STOP. `ack_error` reports a
// missing device acknowledge (the transfer still ends with STOP). That the
// bridge exists and connects to a switch slot is the document's; the transfer
// format, one byte per command and the bus rate are this design's.
//
// Bus: open drain. scl_low/sda_low pull the line low when high; the lines are
// read back on scl_in/sda_in. Each bit takes four quarters of QUARTER clock
// cycles: SCL falls, SDA changes, SCL rises, and SDA is sampled one quarter
// after the rising edge. QUARTER = 625 gives 100 kHz from a
// 250 MHz clock. The device may not stretch the clock (not supported).
module i2c_engine #(
  parameter int unsigned QUARTER = 625
) (
  input  logic       clk,
  input  logic       rst,
  // command
  input  logic       start,
  input  logic [6:0] dev_addr,
  input  logic       read,       // 1 = read one byte, 0 = write wr_data
  input  logic [7:0] wr_data,
  output logic [7:0] rd_data,
  output logic       ack_error,
  output logic       busy,
  output logic       done,
  // I2C bus (open drain)
  output logic       scl_low,
  output logic       sda_low,
  input  logic       scl_in,
  input  logic       sda_in
);
  localparam int unsigned QW = $clog2(QUARTER + 1);

  typedef enum logic [1:0] {S_IDLE, S_START, S_BITS, S_STOP} state_e;
  state_e      state;
  logic [QW-1:0] qcnt;
  logic [1:0]  q;          // quarter within a bit / START / STOP
  logic [4:0]  bitn;       // 0..17: two 9-bit frames
  logic [17:0] tx;         // bit sent in each frame position (1 = release SDA)
  logic        rd;
  logic        tick;

  assign tick = (qcnt == QW'(QUARTER - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      qcnt      <= '0;
      q         <= '0;
      bitn      <= '0;
      tx        <= '1;
      rd        <= 1'b0;
      rd_data   <= '0;
      ack_error <= 1'b0;
      busy      <= 1'b0;
      done      <= 1'b0;
      scl_low   <= 1'b0;
      sda_low   <= 1'b0;
    end else begin
      done <= 1'b0;
      qcnt <= (state == S_IDLE || tick) ? '0 : qcnt + 1'b1;
      case (state)
        S_IDLE: begin
          scl_low <= 1'b0;
          sda_low <= 1'b0;
          if (start) begin
            // frame 0: address + R/W, device ACK; frame 1: data, ACK
            // (written byte: device ACK; read byte: released, master NACK)
            tx        <= {dev_addr, read, 1'b1, read ? 8'hff : wr_data, 1'b1};
            rd        <= read;
            ack_error <= 1'b0;
            busy      <= 1'b1;
            q         <= '0;
            state     <= S_START;
          end
        end
        S_START: if (tick) begin
          // q0: both high; q1: SDA falls with SCL high; q2: hold
          q <= q + 1'b1;
          if (q == 2'd0) sda_low <= 1'b1;
          if (q == 2'd2) begin
            q     <= '0;
            bitn  <= 5'd0;
            state <= S_BITS;
          end
        end
        S_BITS: if (tick) begin
          q <= q + 1'b1;
          case (q)
            2'd0: scl_low <= 1'b1;
            2'd1: sda_low <= !tx[17 - bitn];
            2'd2: scl_low <= 1'b0;
            default: begin
              // sample: device ACKs at positions 8 and (write) 17; read data 9..16
              if ((bitn == 5'd8 || (bitn == 5'd17 && !rd)) && sda_in) ack_error <= 1'b1;
              if (rd && bitn >= 5'd9 && bitn <= 5'd16) rd_data <= {rd_data[6:0], sda_in};
              if (bitn == 5'd17) begin
                q     <= '0;
                state <= S_STOP;
              end
              bitn <= bitn + 1'b1;
            end
          endcase
        end
        S_STOP: if (tick) begin
          // q0: SCL low; q1: SDA low; q2: SCL high; q3: SDA rises with SCL high
          q <= q + 1'b1;
          case (q)
            2'd0: scl_low <= 1'b1;
            2'd1: sda_low <= 1'b1;
            2'd2: scl_low <= 1'b0;
            default: begin
              sda_low <= 1'b0;
              busy    <= 1'b0;
              done    <= 1'b1;
              state   <= S_IDLE;
            end
          endcase
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
