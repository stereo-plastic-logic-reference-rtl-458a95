// tb_stim_gen: self-checking test of the stimulus generator.
// Measures the half period of the stimulus for several STIM_FREQ values
// against 16*(stim_freq+1) clocks (800 kHz at stim_freq = 0) and checks the
// enable gating.
`timescale 1ns/1ps
module tb_stim_gen;
  logic clk = 0, rst_n = 0;
  logic [15:0] stim_freq = 0;
  logic [4:0] stim_enable = 5'b11111;
  logic [4:0] stim;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;
  stim_gen dut (.*);

  task automatic measure(input logic [15:0] f);
    realtime t0;
    int c;
    stim_freq = f;
    @(posedge stim[0]); @(posedge stim[0]);
    t0 = $realtime;
    @(negedge stim[0]);
    c = int'(($realtime - t0) / 20.0);
    checks++;
    if (c !== 16 * (int'(f) + 1)) begin failures++; $display("FAIL f=%0d half=%0d", f, c); end
  endtask

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #35 rst_n = 1;
    measure(0);
    measure(1);
    measure(255);
    measure(1000);
    stim_enable = 5'b01010;
    repeat (20000) begin
      @(posedge clk);
      if (stim[0] || stim[2] || stim[4] || stim[1] != stim[3]) begin
        failures++; $display("FAIL gating"); break;
      end
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
