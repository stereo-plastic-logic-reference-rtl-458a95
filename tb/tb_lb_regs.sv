// tb_lb_regs: self-checking test of the logic-board register file.
// Checks reset defaults, a write to every register field, the no-operation
// and unknown addresses, and the write-log port exemptions.
`timescale 1ns/1ps
module tb_lb_regs;
  import plastic_pkg::*;
  logic clk = 0, rst_n = 0, wr = 0;
  logic [7:0] addr = 0, wdata = 0;
  lb_cfg_t cfg;
  logic bad_addr, log_wr;
  logic [7:0] log_addr, log_data;
  int checks = 0, failures = 0, nlog = 0, nbad = 0;

  always #10 clk = ~clk;
  lb_regs dut (.*);
  always @(posedge clk) if (rst_n) begin
    if (log_wr) nlog++;
    if (bad_addr) nbad++;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask
  task automatic w(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1;
    @(negedge clk); wr = 0;
  endtask

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #35 rst_n = 1;
    check("def logic_ctl_a", cfg.logic_ctl_a, 8'h03);
    check("def logic_ctl_b", cfg.logic_ctl_b, 8'h04);
    check("def tac_pwr", cfg.tac_pwr_n, 2'b11);
    check("def tac0_over", cfg.tac0_over, 10'h3FF);
    check("def tac2_over", cfg.tac2_over, 10'h3FF);
    check("def ssd_over", cfg.ssd_over, 10'h3FF);
    check("def sel", cfg.sel_disable, 2'b11);
    check("def stim", cfg.stim_freq, 16'hFFFF);
    check("def mode", cfg.mode, 3'd0);
    w(8'h01, 8'h03); check("mode", cfg.mode, 3'd3);
    w(8'h06, 8'h01); check("s_ch_en", cfg.s_ch_en, 1'b1);
    check("no log for mode/event", nlog, 0);
    w(8'h07, 8'h9F); check("rate_chk", cfg.rate_chk, 1'b1); check("rlim_ch", cfg.rlim_ch, 5'h1F);
    w(8'h08, 8'h12); w(8'h09, 8'h34); check("rlim", cfg.rlim, 16'h1234);
    w(8'h43, 8'hA5); check("pos_dis2", cfg.pos_dis2, 8'hA5);
    w(8'h48, 8'h02); w(8'h49, 8'h10); check("tac0_under", cfg.tac0_under, 10'h210);
    w(8'h4E, 8'h01); w(8'h4F, 8'h20); check("tac2_over", cfg.tac2_over, 10'h120);
    w(8'h56, 8'h00); w(8'h57, 8'h80); check("ssd_over", cfg.ssd_over, 10'h080);
    w(8'h61, 8'h85); check("tmode2", cfg.tmode2, 1'b1); check("tmode0", cfg.tmode0, 4'h5);
    w(8'h71, 8'h00); w(8'h72, 8'h07); check("stim_freq", cfg.stim_freq, 16'h0007);
    w(8'h75, 8'h40); check("sel0_window", cfg.sel0_window, 8'h40);
    w(8'h76, 8'h41); check("sel2_window", cfg.sel2_window, 8'h41);
    w(8'h3F, 8'hFF); w(8'h99, 8'hFF); w(8'h62, 8'h12);
    repeat (2) @(negedge clk);
    check("bad addr count", nbad, 2);
    check("log count", nlog, 15);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
