// Testbench for ts_trigger_lut: loads first- and second-level tables with
// values from a reference model, applies random patterns and checks trigger
// bit and type two cycles later against the model.
`include "tb_check.svh"
module ts_trigger_lut_tb;
  logic clk;
  int checks = 0, failures = 0;
  `TB_CLOCK
  `TB_WATCHDOG(400000)

  logic [31:0] pattern;
  logic        trig, wr_en;
  logic [13:0] ttype;
  logic [1:0]  wr_table;
  logic [15:0] wr_addr;
  logic [14:0] wr_data;

  ts_trigger_lut #(.OUT_W(15)) dut (.*);

  // reference: l1(x) = x[7:0] ^ x[15:8] ^ k, l2 = hash of address
  function automatic logic [7:0] m1(input logic [15:0] a, input logic [7:0] k);
    return a[7:0] ^ a[15:8] ^ k;
  endfunction
  function automatic logic [14:0] m2(input logic [15:0] a);
    return {a[3] ^ a[12], a[13:0] ^ 14'h2a5c};
  endfunction

  task automatic write(input logic [1:0] t, input logic [15:0] a, input logic [14:0] d);
    wr_en = 1; wr_table = t; wr_addr = a; wr_data = d;
    @(posedge clk); #1;
    wr_en = 0;
  endtask

  logic [15:0] a2;
  logic [14:0] exp_w;
  initial begin
    wr_en = 0; pattern = '0; wr_table = 0; wr_addr = 0; wr_data = 0;
    @(posedge clk); #1;
    for (int a = 0; a < 65536; a++) begin
      wr_en = 1; wr_table = 0; wr_addr = 16'(a); wr_data = 15'(m1(16'(a), 8'h11));
      @(posedge clk); #1;
      wr_table = 1; wr_data = 15'(m1(16'(a), 8'hc3));
      @(posedge clk); #1;
      wr_table = 2; wr_data = m2(16'(a));
      @(posedge clk); #1;
    end
    wr_en = 0;
    repeat (500) begin
      pattern = $urandom;
      @(posedge clk); #1;
      @(posedge clk); #1;
      a2    = {m1(pattern[31:16], 8'hc3), m1(pattern[15:0], 8'h11)};
      exp_w = m2(a2);
      `CHECK(trig == exp_w[14] && ttype == exp_w[13:0], "lut output mismatch")
    end
    // pipelined: a new pattern every cycle, outputs two cycles later
    begin
      logic [31:0] p [4];
      for (int i = 0; i < 4; i++) p[i] = $urandom;
      for (int i = 0; i < 6; i++) begin
        if (i < 4) pattern = p[i];
        @(posedge clk); #1;
        if (i >= 1 && i - 1 < 4) begin
          a2 = {m1(p[i-1][31:16], 8'hc3), m1(p[i-1][15:0], 8'h11)};
          exp_w = m2(a2);
          `CHECK({trig, ttype} == exp_w, "pipelined lut output (2-cycle latency)")
        end
      end
    end
    `TB_DONE
  end
endmodule
