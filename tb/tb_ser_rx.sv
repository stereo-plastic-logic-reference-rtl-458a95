// tb_ser_rx: self-checking test of the gated serial receiver.
// Drives 24-bit frames at clk/8 with the data changing on falling sclk and
// checks the received word and bit count.
`timescale 1ns/1ps
module tb_ser_rx;
  logic clk = 0, rst_n = 0, gate = 0, sclk = 0, sdata = 0;
  logic valid;
  logic [23:0] data;
  logic [7:0] nbits;
  int checks = 0, failures = 0, nvalid = 0;
  logic [23:0] exp_w;

  always #10 clk = ~clk;
  ser_rx #(.WIDTH(24)) dut (.*);

  always @(posedge clk) if (rst_n && valid) begin
    nvalid++;
    checks += 2;
    if (data !== exp_w) begin failures++; $display("FAIL %h exp %h", data, exp_w); end
    if (nbits !== 24) begin failures++; $display("FAIL nbits %0d", nbits); end
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #35 rst_n = 1;
    for (int n = 0; n < 15; n++) begin
      exp_w = 24'($urandom);
      gate = 1;
      for (int i = 23; i >= 0; i--) begin
        sdata = exp_w[i];
        #80 sclk = 1;
        #80 sclk = 0;
      end
      gate = 0; sdata = 0;
      #400;
    end
    checks++;
    if (nvalid !== 15) begin failures++; $display("FAIL frames %0d", nvalid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
