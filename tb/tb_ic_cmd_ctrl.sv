// tb_ic_cmd_ctrl: self-checking test of the command decoder and counters.
// Drives decoded commands directly and checks counters, exemptions, sticky
// status flags (cleared on read), control register, telemetry headers and
// forwarding of logic-board commands.
`timescale 1ns/1ps
module tb_ic_cmd_ctrl;
  import plastic_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] sysid = 2'b10;
  logic cmd_valid = 0, parity_err = 0, frame_err = 0;
  ic_cmd_t cmd = '0;
  logic [7:0] ctrl_reg;
  logic idpu_reset, time_msg, fwd_valid, tlm_valid;
  ic_cmd_t fwd_cmd;
  logic [15:0] tlm_header, tlm_data;
  int checks = 0, failures = 0;
  logic [15:0] got_h, got_d;
  int ntlm = 0, nfwd = 0;

  always #10 clk = ~clk;
  ic_cmd_ctrl dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (tlm_valid) begin got_h = tlm_header; got_d = tlm_data; ntlm++; end
    if (fwd_valid) nfwd++;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  task automatic send(input logic [23:0] w, input logic pe = 0, input logic fe = 0);
    @(negedge clk);
    cmd = w; parity_err = pe; frame_err = fe; cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0; parity_err = 0; frame_err = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #35 rst_n = 1;
    send(24'h11_0042);                 // control write
    check("ctrl", ctrl_reg, 8'h42);
    send(24'h12_0000);                 // control read
    check("ctrl rd hdr", got_h, {6'b000010, 10'd0});
    check("ctrl rd data", got_d, 16'h0042);
    send(24'h31_0512);                 // LB immediate: forwarded
    check("fwd cmd", fwd_cmd, 24'h31_0512);
    send(24'h25_0012);                 // IC memory command: not forwarded
    check("ic mem no fwd", nfwd, 1);
    send(24'h41_0012);                 // LB memory command: forwarded
    send(24'h14_0000);                 // read received counter (exempt)
    check("rx cnt hdr", got_h, {6'b001001, 10'd0});
    check("rx cnt", got_d, 16'd5);
    send(24'hF0_1234);                 // time message, exempt, not forwarded
    check("time msg no fwd", nfwd, 2);
    send(24'h15_0000);
    check("ex cnt", got_d, 16'd5);
    send(24'h17_0000);                 // unknown IC command
    send(24'h61_0000);                 // unused module
    send(24'hF5_0000);                 // illegal IDPU cmd: no error count
    send(24'h11_0001, 1, 0);           // parity error
    send(24'h11_0001, 0, 1);           // frame error
    check("ctrl unchanged by bad cmd", ctrl_reg, 8'h42);
    send(24'h16_0000);                 // error counters
    check("err hdr", got_h, {6'b000001, 10'd0});
    check("err cnt", got_d, {4'd2, 4'd1, 4'd1, 4'd4});
    send(24'h14_0000);
    check("rx cnt with errors", got_d, 16'd9);
    send(24'h13_0000);                 // status read: flags set
    check("status", got_d, {8'b10_10_1111, 8'b10_10_1111});
    send(24'h13_0000);                 // flags cleared by previous read
    check("status cleared", got_d, {8'b10_10_0000, 8'b10_10_0000});
    send(24'hFF_0000);
    check("idpu reset counted", dut.rx_cnt, 16'd12);
    send(24'h11_0080);                 // clear counters
    send(24'h16_0000);
    check("err cnt cleared", got_d, 16'h0000);
    send(24'h14_0000);
    check("rx cnt cleared", got_d, 16'd0);
    check("telemetry count", ntlm, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
