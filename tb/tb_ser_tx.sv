// tb_ser_tx: self-checking test of the gated serial transmitter.
// Sends random 16-bit words, samples sdata on rising sclk while the gate is
// high, and checks the word, the bit count, the clk/8 bit period (3.2 MHz at
// 25.6 MHz) and the gate length of 16*8 clocks.
`timescale 1ns/1ps
module tb_ser_tx;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] data;
  logic ready, gate, sclk, sdata;
  int checks = 0, failures = 0;
  logic [15:0] got;
  int nb, gate_len, last_rise, period_bad;

  always #10 clk = ~clk;
  ser_tx #(.WIDTH(16), .DIV(8)) dut (.*);

  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (gate) gate_len++;
  end
  always @(posedge sclk) if (gate) begin
    got = {got[14:0], sdata};
    nb++;
    if (nb > 1 && cyc - last_rise != 8) period_bad++;
    last_rise = cyc;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #35 rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      logic [15:0] w;
      w = 16'($urandom);
      nb = 0; gate_len = 0; period_bad = 0;
      @(negedge clk);
      wait (ready);
      @(negedge clk);
      data = w; start = 1;
      @(negedge clk);
      start = 0;
      @(negedge clk);
      wait (ready);
      checks += 4;
      if (got !== w) begin failures++; $display("FAIL word %h exp %h", got, w); end
      if (nb !== 16) begin failures++; $display("FAIL bits %0d", nb); end
      if (gate_len !== 128) begin failures++; $display("FAIL gate %0d", gate_len); end
      if (period_bad !== 0) begin failures++; $display("FAIL period"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
