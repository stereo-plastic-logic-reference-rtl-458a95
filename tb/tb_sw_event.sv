// tb_sw_event: self-checking test of the quadrant 0/1 event selection.
// Converter, SSD and RA-table responders answer the handshakes after a few
// clocks. Events in modes 0, 1, 8 and 10 are checked field by field, plus
// rejected events (missing energy, multiple positions, blanking) and the
// event-type rate pulses (valid, energy (not) required, no/multiple
// position, no energy, RA saturation) and the 1 us reset pulses.
`timescale 1ns/1ps
module tb_sw_event;
  import plastic_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] tmode0 = 0;
  logic sel0_disable = 0, ssd_disable = 0, s_ch_en = 0;
  logic [7:0] sel0_window = 8'd30;
  logic [2:0] pos_dis0 = 3'b000;
  logic [9:0] tac0_under = 0, tac0_over = 10'h3FF, ssd_under = 0, ssd_over = 10'h3FF;
  logic [6:0] esa_step = 7'd5;
  logic [4:0] defl_step = 5'd17;
  logic tac0_sf = 0, tac0_sfr = 0, tac0_stp = 0, ra_trig = 0, pos1_0 = 0, pos1_1 = 0;
  logic ssd_trig = 0, trig_sw = 0, trig_st = 0;
  logic tac0_reset, s_sync, adc_req, ssd_req, ra_req, pha_valid;
  logic adc_done = 0, ssd_done = 0, ra_done = 0, ofw_n = 1;
  logic [8:0] adc_data = 0;
  logic [15:0] ssd_word = 0;
  logic [7:0] ra_tab = 0;
  pha_word_t pha, last;
  logic [17:0] rates;
  int checks = 0, failures = 0, nvalid = 0, cnt [18], rst_len = 0, rst_max = 0, sync_n = 0;

  always #10 clk = ~clk;
  sw_event dut (.*);

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 18; i++) if (rates[i]) cnt[i]++;
    if (pha_valid) begin nvalid++; last = pha; end
    if (tac0_reset) rst_len++; else begin if (rst_len > rst_max) rst_max = rst_len; rst_len = 0; end
  end
  always @(posedge s_sync) if (rst_n) sync_n++;
  always @(posedge clk) if (rst_n && adc_req) begin repeat (3) @(posedge clk); adc_done <= 1; @(posedge clk); adc_done <= 0; end
  always @(posedge clk) if (rst_n && ssd_req) begin repeat (4) @(posedge clk); ssd_done <= 1; @(posedge clk); ssd_done <= 0; end
  always @(posedge clk) if (rst_n && ra_req) begin repeat (2) @(posedge clk); ra_done <= 1; @(posedge clk); ra_done <= 0; end

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask
  task automatic p1(ref logic s); @(negedge clk); s = 1; @(negedge clk); s = 0; endtask
  task automatic settle(); repeat (80) @(negedge clk); endtask
  function automatic pha_word_t w(input logic [1:0] q, input logic [3:0] id, input logic [9:0] e,
                                  input logic [9:0] t, input logic [5:0] p, input logic [1:0] s);
    pha_word_t x;
    x = '0; x.swpe = 7'd5; x.swpd = 5'd17; x.quadrant = q; x.ssd_id = id; x.ssde = e;
    x.tof = t; x.position = p; x.section = s;
    return x;
  endfunction

  initial begin
    #2ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #35 rst_n = 1;
    // 1: mode 0 full event through the resistive anode
    tmode0 = 0; adc_data = 9'd200; ssd_word = {4'd3, 1'b0, 1'b0, 10'd300}; ra_tab = 8'h14;
    p1(tac0_sf); p1(ra_trig); p1(ssd_trig); p1(tac0_sfr); settle();
    check("ev1 valid", nvalid, 1);
    check("ev1 word", last, w(2'b00, 4'd3, 10'd300, 10'd200, 6'd20, 2'b00));
    check("tac0_reset 1us", rst_max, 26);
    check("s_sync sent", sync_n, 1);
    // 2: mode 0 without energy: rejected, counts as energy-not-required
    p1(tac0_sf); p1(pos1_0); p1(tac0_sfr); settle();
    check("ev2 rejected", nvalid, 1);
    check("s_no_e", cnt[12], 1);
    check("s_e_not_req", cnt[16], 2);
    check("s_e_req", cnt[15], 1);
    // 3: mode 1 without energy, pos1_1: valid, quadrant 1 position 24, section 2
    tmode0 = 1;
    p1(tac0_sf); p1(pos1_1); p1(tac0_sfr); settle();
    check("ev3 valid", nvalid, 2);
    check("ev3 word", last, w(2'b01, 4'd0, 10'd0, 10'd200, 6'd24, 2'b10));
    // 4: mode 0 with two positions: rejected, s_mult_pos
    tmode0 = 0;
    p1(tac0_sf); @(negedge clk); pos1_0 = 1; pos1_1 = 1; @(negedge clk); pos1_0 = 0; pos1_1 = 0;
    p1(ssd_trig); p1(tac0_sfr); settle();
    check("ev4 rejected", nvalid, 2);
    check("s_mult_pos", cnt[13], 1);
    // 5: mode 8: position starts, SSD ends window; TOF 1023, no TAC0 reset
    tmode0 = 8; rst_max = 0; ssd_word = {4'd12, 1'b0, 1'b0, 10'd77};
    p1(pos1_0); p1(ssd_trig); settle();
    check("ev5 valid", nvalid, 3);
    check("ev5 word", last, w(2'b01, 4'd12, 10'd77, 10'h3FF, 6'd8, 2'b10));
    check("ev5 no tac0 reset", rst_max, 0);
    // 6: mode 10: SSD channel 5 on the S channel -> quadrant 0 position 34 section 1
    tmode0 = 10; s_ch_en = 1; ssd_word = {4'd5, 1'b0, 1'b0, 10'd500};
    p1(ssd_trig); settle();
    check("ev6 valid", nvalid, 4);
    check("ev6 word", last, w(2'b00, 4'd5, 10'd500, 10'h3FF, 6'd34, 2'b01));
    // 7: mode 10 with multi-hit: rejected, s_mult_e
    ssd_word = {4'd5, 1'b0, 1'b1, 10'd500};
    p1(ssd_trig); settle();
    check("ev7 rejected", nvalid, 4);
    check("s_mult_e", cnt[11], 1);
    // 8: RA saturation on both axes
    tmode0 = 0; ra_tab = 8'hC0; s_ch_en = 0;
    p1(tac0_sf); p1(ra_trig); p1(tac0_sfr); settle();
    check("ra_sat_both", cnt[8], 1);
    // 9: blanked by sel0_disable
    sel0_disable = 1;
    p1(tac0_sf); p1(pos1_0); p1(ssd_trig); p1(tac0_sfr); settle();
    check("ev9 blanked", nvalid, 4);
    sel0_disable = 0;
    check("s_valid", cnt[17], 4);
    check("sf0 count", cnt[5], 6);
    check("ra_trig count", cnt[2], 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
