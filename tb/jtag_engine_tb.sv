// Testbench for jtag_engine: the port drives a behavioural JTAG TAP (the
// standard 16-state controller, IR of 4 bits, an IDCODE register and a
// 32-bit data register selected by instruction 0x2). Checks: TAP reset and
// IDCODE read in one 32-bit command after a TMS preamble; a 32-bit word
// written into the data register comes back on the next shift; a partial
// (13-bit) command; TCK period and that TMS/TDI never change while TCK is
// high; busy/done hand-shake.
`include "tb_check.svh"
module jtag_engine_tb;
  logic clk;
  int checks = 0, failures = 0;
  `TB_CLOCK
  `TB_WATCHDOG(40000)

  logic rst, start, busy, done, tck, tms, tdi, tdo;
  logic [5:0] nbits;
  logic [31:0] tms_word, tdi_word, tdo_word;
  jtag_engine dut (.*);

  // ---------------- behavioural TAP ----------------
  localparam logic [31:0] IDCODE = 32'h1234_5093;
  typedef enum logic [3:0] {TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PAU_DR, EX2_DR, UPD_DR,
                            SEL_IR, CAP_IR, SH_IR, EX1_IR, PAU_IR, EX2_IR, UPD_IR} tap_e;
  tap_e st = TLR;
  logic [3:0]  ir = 4'h1, ir_sh;
  logic [31:0] dr_sh, user_reg = 32'h0;
  always @(posedge tck) begin
    case (st)
      CAP_DR: dr_sh <= (ir == 4'h1) ? IDCODE : user_reg;
      SH_DR:  dr_sh <= {tdi, dr_sh[31:1]};
      CAP_IR: ir_sh <= 4'b0001;
      SH_IR:  ir_sh <= {tdi, ir_sh[3:1]};
      UPD_IR: ;
      default: ;
    endcase
    if (st == UPD_DR && ir == 4'h2) user_reg <= dr_sh;
    if (st == UPD_IR) ir <= ir_sh;
    if (st == TLR) ir <= 4'h1;
    case (st)
      TLR:    st <= tms ? TLR    : RTI;
      RTI:    st <= tms ? SEL_DR : RTI;
      SEL_DR: st <= tms ? SEL_IR : CAP_DR;
      CAP_DR: st <= tms ? EX1_DR : SH_DR;
      SH_DR:  st <= tms ? EX1_DR : SH_DR;
      EX1_DR: st <= tms ? UPD_DR : PAU_DR;
      PAU_DR: st <= tms ? EX2_DR : PAU_DR;
      EX2_DR: st <= tms ? UPD_DR : SH_DR;
      UPD_DR: st <= tms ? SEL_DR : RTI;
      SEL_IR: st <= tms ? TLR    : CAP_IR;
      CAP_IR: st <= tms ? EX1_IR : SH_IR;
      SH_IR:  st <= tms ? EX1_IR : SH_IR;
      EX1_IR: st <= tms ? UPD_IR : PAU_IR;
      PAU_IR: st <= tms ? EX2_IR : PAU_IR;
      EX2_IR: st <= tms ? UPD_IR : SH_IR;
      UPD_IR: st <= tms ? SEL_DR : RTI;
    endcase
  end
  // TDO is valid in the shift states and changes on the falling edge
  always @(negedge tck) tdo <= (st == SH_DR) ? dr_sh[0] : (st == SH_IR) ? ir_sh[0] : 1'b0;

  // ---------------- port timing checks ----------------
  int last_rise = -1, cyc = 0, bad_period = 0, bad_change = 0;
  logic tck_d, tms_d, tdi_d;
  always @(posedge clk) begin
    cyc++;
    if (tck && !tck_d) begin
      if (last_rise >= 0 && busy && cyc - last_rise != 8) bad_period++;
      last_rise = cyc;
    end
    if (tck && tck_d && (tms != tms_d || tdi != tdi_d)) bad_change++;
    tck_d = tck; tms_d = tms; tdi_d = tdi;
  end

  task automatic shift(input int n, input logic [31:0] tm, input logic [31:0] ti);
    nbits = 6'(n); tms_word = tm; tdi_word = ti; start = 1;
    @(posedge clk); #1 start = 0;
    `CHECK(busy, "busy after start")
    while (!done) begin @(posedge clk); #1; end
    `CHECK(!busy, "idle with done")
    last_rise = -1;
  endtask

  initial begin
    rst = 1; start = 0; nbits = 0; tms_word = 0; tdi_word = 0; tdo = 0; tck_d = 0; tms_d = 1; tdi_d = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    // 5 x TMS=1 -> TLR, 0 -> RTI, 1 -> SEL_DR, 0 -> CAP_DR, 0 -> SH_DR (9 bits)
    shift(9, 32'b0_0101_1111, 32'h0);
    `CHECK(st == SH_DR, "TAP in Shift-DR after the preamble")
    // IDCODE: 32 bits, TMS 1 on the last one (exit)
    shift(32, 32'h8000_0000, 32'h0);
    `CHECK(tdo_word == IDCODE, "IDCODE read in one command")
    `CHECK(st == EX1_DR, "TAP in Exit1-DR")
    // update, go to IR: EX1 -1-> UPD -1-> SEL_DR -1-> SEL_IR -0-> CAP_IR -0-> SH_IR,
    // shift 4 IR bits (0x2, TMS 1 on last) -1-> UPD_IR -0-> RTI   (11 bits)
    shift(11, 32'b0_1_1000_00_111, 32'b0_0_0010_00_000);
    `CHECK(ir == 4'h2 && st == RTI, "instruction 0x2 loaded")
    // RTI -1-> SEL_DR -0-> CAP_DR -0-> SH_DR, then 32 data bits
    shift(3, 32'b001, 32'h0);
    shift(32, 32'h8000_0000, 32'hcafe_f00d);
    shift(2, 32'b01, 32'h0);           // EX1 -1-> UPD -0-> RTI
    `CHECK(user_reg == 32'hcafe_f00d, "32 bits loaded per command")
    shift(3, 32'b001, 32'h0);
    shift(13, 32'h0, 32'h0);
    `CHECK(tdo_word == 32'(13'(32'hcafe_f00d)), "partial 13-bit command reads back")
    shift(19, 32'h4_0000, 32'h0);
    `CHECK(tdo_word == 32'(19'(32'hcafe_f00d >> 13)), "rest of the word in a second command")
    `CHECK(bad_period == 0, "TCK period 8 clock cycles")
    `CHECK(bad_change == 0, "TMS/TDI stable while TCK high")
    `TB_DONE
  end
endmodule
