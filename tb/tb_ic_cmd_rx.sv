// tb_ic_cmd_rx: self-checking test of the serial command receiver.
// Sends random commands with correct parity, a frame with wrong parity, a
// frame without its stop bit and an all-zero command (whose parity bit must
// be 1), with random idle gaps, and checks word and error flags.
`timescale 1ns/1ps
module tb_ic_cmd_rx;
  logic clk = 0, rst_n = 0, cmd_clk = 0, cmd_dat = 0;
  logic valid, parity_err, frame_err;
  logic [23:0] word;
  int checks = 0, failures = 0;
  logic [23:0] exp_word;
  logic exp_par, exp_frm;
  int nvalid = 0;

  always #10 clk = ~clk;
  ic_cmd_rx dut (.*);

  task automatic bitp(input logic b);
    cmd_dat = b;
    #100 cmd_clk = 1;
    #100 cmd_clk = 0;
  endtask

  task automatic frame(input logic [23:0] w, input logic bad_par, input logic stop);
    logic p;
    p = ~(^w) ^ bad_par;
    exp_word = w; exp_par = bad_par; exp_frm = !stop;
    bitp(1'b1);
    for (int i = 23; i >= 0; i--) bitp(w[i]);
    bitp(p);
    bitp(stop);
    repeat ($urandom_range(0, 3)) bitp(1'b0);
    #200;
  endtask

  always @(posedge clk) if (rst_n && valid) begin
    nvalid++;
    checks += 3;
    if (word !== exp_word) begin failures++; $display("FAIL word %h exp %h", word, exp_word); end
    if (parity_err !== exp_par) begin failures++; $display("FAIL parity flag"); end
    if (frame_err !== exp_frm) begin failures++; $display("FAIL frame flag"); end
  end

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50 rst_n = 1;
    repeat (3) bitp(1'b0);
    frame(24'h000000, 0, 1);
    for (int n = 0; n < 20; n++) frame(24'($urandom), 0, 1);
    frame(24'h131234, 1, 1);
    frame(24'h1100A5, 0, 0);
    frame(24'hFFFFFF, 0, 1);
    #1000;
    checks++;
    if (nvalid !== 24) begin failures++; $display("FAIL frame count %0d", nvalid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
