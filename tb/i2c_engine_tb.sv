// Testbench for i2c_engine: an open-drain bus with a behavioural I2C device
// (address 0x50, one 8-bit register) that detects START/STOP, samples SDA on
// SCL rising edges and drives ACK/data while SCL is low. Checks: a write
// reaches the register; a read returns it; a wrong address gives ack_error
// and leaves the register alone; exactly one START and one STOP per transfer
// (an SDA change while SCL is high would count as an extra one); busy/done
// and the transfer time.
`include "tb_check.svh"
module i2c_engine_tb;
  logic clk;
  int checks = 0, failures = 0;
  `TB_CLOCK
  `TB_WATCHDOG(20000)

  localparam int Q = 5;
  logic rst, start, read, ack_error, busy, done, scl_low, sda_low, scl_in, sda_in;
  logic [6:0] dev_addr;
  logic [7:0] wr_data, rd_data;
  i2c_engine #(.QUARTER(Q)) dut (.*);

  // wired-AND bus
  logic dev_sda_low = 0;
  assign scl_in = !scl_low;
  assign sda_in = !(sda_low || dev_sda_low);

  // ---------------- behavioural device ----------------
  localparam logic [6:0] MY_ADDR = 7'h50;
  logic [7:0] regv = 8'h00, sh;
  int nbit = 0, n_start = 0, n_stop = 0;
  logic active = 0, selected = 0, dev_read = 0, scl_q = 1, sda_q = 1;
  always @(posedge clk) begin
    // START / STOP: SDA edges while SCL stays high
    if (scl_in && scl_q && sda_q && !sda_in) begin active = 1; nbit = 0; selected = 0; n_start++; end
    else if (scl_in && scl_q && !sda_q && sda_in) begin active = 0; dev_sda_low = 0; n_stop++; end
    else if (active && scl_in && !scl_q) begin
      // rising SCL: sample
      if (nbit < 8) sh = {sh[6:0], sda_in};
      if (nbit == 7) begin selected = (sh[7:1] == MY_ADDR); dev_read = sh[0]; end
      if (nbit >= 9 && nbit <= 16 && selected && !dev_read) sh = {sh[6:0], sda_in};
      if (nbit == 16 && selected && !dev_read) regv = sh;
      nbit++;
    end else if (active && !scl_in && scl_q) begin
      // falling SCL: drive the next bit
      dev_sda_low = 0;
      if (selected && (nbit == 8 || (nbit == 17 && !dev_read))) dev_sda_low = 1;        // ACK
      if (selected && dev_read && nbit >= 9 && nbit <= 16) dev_sda_low = !regv[16 - nbit];
    end
    scl_q = scl_in; sda_q = sda_in;
  end

  task automatic xfer(input logic [6:0] a, input logic r, input logic [7:0] d);
    int t0;
    dev_addr = a; read = r; wr_data = d; start = 1;
    @(posedge clk); #1 start = 0;
    t0 = $time;
    `CHECK(busy, "busy after start")
    while (!done) begin @(posedge clk); #1; end
    // START 3 quarters + 18 bits x 4 + STOP 4 quarters, 4 ns per cycle
    `CHECK(($time - t0) / 4 >= (3 + 18 * 4 + 4) * Q && ($time - t0) / 4 <= (3 + 18 * 4 + 4) * Q + 3,
           "transfer time")
    repeat (3 * Q) @(posedge clk); #1;
  endtask

  initial begin
    rst = 1; start = 0; read = 0; dev_addr = 0; wr_data = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    repeat (10) @(posedge clk); #1;
    xfer(MY_ADDR, 0, 8'hc5);
    `CHECK(!ack_error && regv == 8'hc5, "write reaches the device")
    xfer(MY_ADDR, 1, 8'h00);
    `CHECK(!ack_error && rd_data == 8'hc5, "read returns the register")
    xfer(7'h51, 0, 8'h3c);
    `CHECK(ack_error && regv == 8'hc5, "no device: ack_error, register unchanged")
    regv = 8'h96;
    xfer(MY_ADDR, 1, 8'h00);
    `CHECK(!ack_error && rd_data == 8'h96, "second read")
    `CHECK(n_start == 4 && n_stop == 4, "one START and one STOP per transfer")
    `CHECK(scl_in && sda_in, "bus released when idle")
    `TB_DONE
  end
endmodule
