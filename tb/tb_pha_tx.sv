// tb_pha_tx: self-checking test of the PHA link sender.
// A receiver in the testbench samples the six lines on falling ser_clk
// while ser_gat is high, and a busy model holds busy for 30 clocks after
// each word. Checks word contents and order, the clk/2 bit clock, the 16
// clock word time, alternation between the two sources, and dropping of a
// word that arrives while its slot is full.
`timescale 1ns/1ps
module tb_pha_tx;
  import plastic_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sw_valid = 0, wap_valid = 0, busy = 0;
  pha_word_t sw_word = '0, wap_word = '0;
  logic ser_clk, ser_gat;
  logic [5:0] ser_dat;
  logic [7:0] dropped;
  logic [15:0] sent;
  int checks = 0, failures = 0;
  logic [47:0] q [$];
  logic [7:0] sr [6];
  int nb = 0, gate_len = 0, nrx = 0;

  always #10 clk = ~clk;
  pha_tx dut (.*);

  always @(negedge ser_clk) if (rst_n && ser_gat) begin
    for (int k = 0; k < 6; k++) sr[k] = {sr[k][6:0], ser_dat[k]};
    nb++;
  end
  always @(posedge clk) if (rst_n && ser_gat) gate_len++;
  always @(negedge ser_gat) if (rst_n) begin
    logic [47:0] w, e;
    w = {sr[5], sr[4], sr[3], sr[2], sr[1], sr[0]};
    e = q.pop_front();
    nrx++;
    checks += 3;
    if (w !== e) begin failures++; $display("FAIL word %h exp %h", w, e); end
    if (nb !== 8) begin failures++; $display("FAIL bits %0d", nb); end
    if (gate_len !== 16) begin failures++; $display("FAIL gate %0d clocks", gate_len); end
    nb = 0; gate_len = 0;
    repeat (3) @(posedge clk);
    busy = 1;
    repeat (30) @(posedge clk);
    busy = 0;
  end

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    pha_word_t a, b, c, d;
    #35 rst_n = 1;
    a = pha_word_t'({$urandom, 16'($urandom)}); b = pha_word_t'({$urandom, 16'($urandom)});
    c = pha_word_t'({$urandom, 16'($urandom)}); d = pha_word_t'({$urandom, 16'($urandom)});
    // both sources at once: SSD word first, then WAP
    @(negedge clk); sw_word = a; wap_word = b; sw_valid = 1; wap_valid = 1;
    @(negedge clk); sw_valid = 0; wap_valid = 0;
    q.push_back(a); q.push_back(b);
    // a second SSD word while the first is waiting in its slot? a was taken at
    // once, so c queues; then d arrives while c waits -> dropped
    @(negedge clk); sw_word = c; sw_valid = 1; @(negedge clk); sw_valid = 0;
    @(negedge clk); sw_word = d; sw_valid = 1; @(negedge clk); sw_valid = 0;
    q.push_back(c);
    repeat (400) @(negedge clk);
    checks += 3;
    if (nrx !== 3) begin failures++; $display("FAIL received %0d", nrx); end
    if (dropped !== 1) begin failures++; $display("FAIL dropped %0d", dropped); end
    if (sent !== 3) begin failures++; $display("FAIL sent %0d", sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
