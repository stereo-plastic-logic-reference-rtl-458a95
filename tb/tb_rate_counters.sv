// tb_rate_counters: self-checking test of the rate counters.
// Feeds random pulse patterns, keeps its own count per channel, and checks
// the latched bank after each enable/latch/clear sequence, including that
// pulses while rt_enable is low are not counted and that a counter
// saturates at full scale.
`timescale 1ns/1ps
module tb_rate_counters;
  logic clk = 0, rst_n = 0;
  logic [31:0] pulse = '0;
  logic rt_enable = 0, rt_latch = 0, rt_clr_n = 1;
  logic [4:0] rd_idx = '0;
  logic [15:0] rd_data, chk_data;
  logic [4:0] chk_idx = 5'd3;
  int checks = 0, failures = 0;
  int model [32];

  always #10 clk = ~clk;
  rate_counters #(.N(32), .WIDTH(16)) dut (.*);

  task automatic step(input int ncyc);
    for (int i = 0; i < 32; i++) model[i] = 0;
    @(negedge clk); rt_enable = 1;
    for (int c = 0; c < ncyc; c++) begin
      @(negedge clk);
      pulse = $urandom;
      for (int i = 0; i < 32; i++) if (pulse[i] && model[i] < 65535) model[i]++;
    end
    @(negedge clk); pulse = '0; rt_enable = 0;
    @(negedge clk); pulse = '1;               // not counted: disabled
    @(negedge clk); pulse = '0; rt_latch = 1;
    @(negedge clk); rt_latch = 0;
    @(negedge clk); rt_clr_n = 0;
    @(negedge clk); rt_clr_n = 1;
    for (int i = 0; i < 32; i++) begin
      rd_idx = 5'(i);
      #1;
      checks++;
      chk_idx = 5'(31 - i);
      #1;
      if (chk_data !== 16'(model[31 - i])) begin failures++; $display("FAIL chk port %0d", i); end
      checks++;
      if (rd_data != 16'(model[i])) begin
        failures++; $display("FAIL rt(%0d) %0d exp %0d", i, rd_data, model[i]);
      end
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #35 rst_n = 1;
    step(100);
    step(37);
    step(140000);   // > 65535 pulses on most channels: saturation
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
