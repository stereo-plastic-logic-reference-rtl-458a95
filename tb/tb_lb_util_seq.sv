// tb_lb_util_seq: self-checking test of the util_dat word sequencer. A
// behavioural transmitter accepts a word on tx_start and stays busy for a
// random time; a rate memory answers rd_idx with random contents. The test
// requests deflection-step bursts and energy-step words, also overlapping
// (an energy step ending while a burst runs), and checks the exact word
// stream: step word {s_ch, esa_step, 000, defl_step-1}, the NRATES rates in
// order, then the pending energy-step word {00, s_ch, esa_step}.
module tb_lb_util_seq;
  localparam int NR = 8;
  logic clk = 0, rst_n = 0;
  logic defl_done = 0, esa_done = 0, s_ch = 0, tx_ready = 1, tx_start;
  logic [6:0] esa_step = 0; logic [4:0] defl_step = 0;
  logic [2:0] rd_idx; logic [15:0] rd_data, tx_data, words_sent;
  logic [15:0] rates [NR];
  int checks = 0, failures = 0;
  logic [15:0] got [$], exp [$];

  lb_util_seq #(.NRATES(NR)) dut (.*);
  assign rd_data = rates[rd_idx];
  always #5 clk = ~clk;
  initial begin #1ms; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end

  // transmitter model
  always @(posedge clk) if (rst_n && tx_start) begin
    if (!tx_ready) begin failures++; $display("FAIL start while busy"); end
    got.push_back(tx_data);
    tx_ready <= 0;
    repeat ($urandom_range(3, 20)) @(posedge clk);
    tx_ready <= 1;
  end

  task automatic pulse(ref logic s); @(negedge clk); s = 1; @(negedge clk); s = 0; endtask
  task automatic burst(input logic [6:0] e, input logic [4:0] d, input logic sc);
    esa_step = e; defl_step = d; s_ch = sc;
    foreach (rates[i]) rates[i] = 16'($urandom);
    pulse(defl_done);
    exp.push_back({sc, e, 3'b000, 5'(d - 5'd1)});
    foreach (rates[i]) exp.push_back(rates[i]);
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    burst(7'd3, 5'd1, 1'b0);
    repeat (400) @(negedge clk);
    burst(7'd3, 5'd0, 1'b1);                        // wrapped: defl_step-1 = 31
    repeat (20) @(negedge clk);
    esa_step = 7'd3; s_ch = 1'b1; pulse(esa_done);  // during the burst
    exp.push_back({8'h00, 1'b1, 7'd3});
    repeat (600) @(negedge clk);
    for (int k = 0; k < 5; k++) begin
      logic [6:0] e = 7'($urandom);
      burst(e, 5'($urandom_range(1, 31)), 1'($urandom));
      repeat (500) @(negedge clk);
    end
    checks++;
    if (got.size() !== exp.size()) begin failures++; $display("FAIL %0d words, expected %0d", got.size(), exp.size()); end
    foreach (exp[i]) if (i < got.size()) begin
      checks++;
      if (got[i] !== exp[i]) begin failures++; $display("FAIL word %0d: %h expected %h", i, got[i], exp[i]); end
    end
    checks++;
    if (words_sent !== 16'(exp.size())) begin failures++; $display("FAIL words_sent %0d", words_sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
