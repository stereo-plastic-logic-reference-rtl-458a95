// tb_wap_event: self-checking test of the WAP event selection.
// Runs single events through each rule: a valid single-position event
// (quadrant 3), no position, multiple positions, tmode2 = 1 with and
// without a stop, a TAC2 overflow, a TOF outside the window, blanking by
// sel2_disable and a disabled position channel. Checks the PHA word, the
// rate pulses, the window length and the 26-clock tac2_reset pulse.
`timescale 1ns/1ps
module tb_wap_event;
  import plastic_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sel2_disable = 0, tmode2 = 0;
  logic [7:0] sel2_window = 8'd20, pos_dis2 = 8'h00;
  logic [9:0] tac2_under = 10'd0, tac2_over = 10'h3FF;
  logic [6:0] esa_step = 7'd77;
  logic [4:0] defl_step = 5'd9;
  logic tac2_sf = 0, tac2_sfr = 0, tac2_stp = 0;
  logic [7:0] pos = 0;
  logic tac2_reset, adc_req, pha_valid;
  logic adc_done = 0, ofw_n = 1;
  logic [8:0] adc_data = 0;
  pha_word_t pha;
  logic [13:0] rates;
  int checks = 0, failures = 0;
  int cnt [14];
  int nvalid = 0, rst_len = 0, rst_max = 0;
  pha_word_t last;
  int wcyc = 0;
  always @(posedge clk) if (rst_n && dut.st == dut.W_WINDOW) wcyc++;

  always #10 clk = ~clk;
  wap_event dut (.*);

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 14; i++) if (rates[i]) cnt[i]++;
    if (pha_valid) begin nvalid++; last = pha; end
    if (tac2_reset) rst_len++; else begin if (rst_len > rst_max) rst_max = rst_len; rst_len = 0; end
  end
  // ADC model: answers 5 clocks after a request
  always @(posedge clk) if (rst_n && adc_req) begin
    repeat (5) @(posedge clk);
    adc_done <= 1; @(posedge clk); adc_done <= 0;
  end

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask
  task automatic pulse_sf(); @(negedge clk); tac2_sf = 1; @(negedge clk); tac2_sf = 0; endtask
  task automatic pulse_pos(input logic [7:0] p); @(negedge clk); pos = p; @(negedge clk); pos = 0; endtask
  task automatic pulse_sfr(); @(negedge clk); tac2_sfr = 1; @(negedge clk); tac2_sfr = 0; endtask
  task automatic settle(); repeat (80) @(negedge clk); endtask
  function automatic pha_word_t expw(input logic [1:0] q, input logic [5:0] p, input logic [9:0] t);
    pha_word_t w;
    w = '0; w.swpe = 7'd77; w.swpd = 5'd9; w.quadrant = q; w.position = p; w.tof = t; w.section = 2'b11;
    return w;
  endfunction

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #35 rst_n = 1;
    // 1: valid, pos3_1 (channel 5) -> quadrant 3, position 24
    adc_data = 9'd100;
    pulse_sf(); pulse_pos(8'b0010_0000); pulse_sfr(); settle();
    check("ev1 valid", nvalid, 1);
    check("ev1 word", last, expw(2'b11, 6'd24, 10'd100));
    check("tac2_reset width", rst_max, 26);
    // 2: no position -> abort, w_no_pos
    pulse_sf(); pulse_sfr(); settle();
    check("ev2 no valid", nvalid, 1);
    check("w_no_pos", cnt[13], 1);
    // 3: two positions -> abort, w_mult_pos
    pulse_sf(); pulse_pos(8'b0000_0011); pulse_sfr(); settle();
    check("ev3 no valid", nvalid, 1);
    check("w_mult_pos", cnt[12], 1);
    // 4: tmode2 = 1, two positions with stop -> valid, quadrant 2 position 8
    tmode2 = 1; adc_data = 9'd300;
    pulse_sf(); pulse_pos(8'b1000_0001); pulse_sfr(); settle();
    check("ev4 valid", nvalid, 2);
    check("ev4 word", last, expw(2'b10, 6'd8, 10'd300));
    // 5: tmode2 = 1, no stop: window expiry aborts
    wcyc = 0;
    pulse_sf(); pulse_pos(8'b0000_0100);
    settle();
    check("window length = sel2_window+1", wcyc, 21);
    check("ev5 no valid", nvalid, 2);
    tmode2 = 0;
    // 6: TAC2 overflow -> abort
    ofw_n = 0;
    pulse_sf(); pulse_pos(8'b0000_0100); pulse_sfr(); settle();
    check("ev6 no valid", nvalid, 2);
    ofw_n = 1;
    // 7: TOF outside window -> abort; then inside -> valid (pos2_2 -> q2, 40)
    tac2_over = 10'd50; adc_data = 9'd60;
    pulse_sf(); pulse_pos(8'b0000_0100); pulse_sfr(); settle();
    check("ev7 out of range", nvalid, 2);
    adc_data = 9'd50;
    pulse_sf(); pulse_pos(8'b0000_0100); pulse_sfr(); settle();
    check("ev7b valid", nvalid, 3);
    check("ev7b word", last, expw(2'b10, 6'd40, 10'd50));
    // 8: blanked by sel2_disable
    sel2_disable = 1;
    pulse_sf(); pulse_pos(8'b0000_0100); pulse_sfr(); settle();
    check("ev8 blanked", nvalid, 3);
    sel2_disable = 0;
    // 9: disabled channel does not count and gives no position
    pos_dis2 = 8'b0000_0100;
    pulse_sf(); pulse_pos(8'b0000_0100); pulse_sfr(); settle();
    check("ev9 disabled -> no pos", nvalid, 3);
    check("w_no_pos 2", cnt[13], 2);
    check("w_valid", cnt[11], 3);
    check("sf2 count", cnt[10], 10);
    check("pos2_2 count (rt 5)", cnt[5], 5);
    check("pos3_1 count (rt 2)", cnt[2], 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
