// tb_sweep_ctrl: self-checking test of the mode-3 sweep sequencer at reduced
// sizes (3 energy steps of 4 deflection steps of 64 clocks, 4 strobes per
// deflection step). It counts every strobe, trigger and handshake pulse of a
// sweep against the numbers the sequence implies, checks pulse widths,
// event blanking during HV settling, the rate-counter latch/clear order, the
// step numbering, the rate-limit S-channel switch (set and cleared per
// energy step) and that leaving mode 3 stops the sweep.
module tb_sweep_ctrl;
  localparam int E = 3, D = 4, DC = 64, NS = 4, STB = 6, TRG = 5, SET = 30, RST = 3;
  logic clk = 0, rst_n = 0;
  logic [2:0] mode = 3'd3;
  logic time_sync = 0, s_ch_en = 0, rate_chk = 0;
  logic [15:0] rlim = 16'd100, rate_sel = 16'd0;
  logic [6:0] esa_step; logic [4:0] defl_step;
  logic s_ch_eff, s_ch_auto, e_stp_stb, d_stp_stb, deflection_trig, e_step_trig, retrace_trig;
  logic sel_disable, evt_reset, rt_enable, rt_latch, rt_clr_n, defl_done, dac_load, esa_done, running;
  int checks = 0, failures = 0;

  sweep_ctrl #(.ESA_STEPS(E), .DEFL_STEPS(D), .DEFL_CYCLES(DC), .DSTB_PER_DEFL(NS),
               .STB_CYCLES(STB), .TRIG_CYCLES(TRG), .SETTLE_CYCLES(SET), .RESET_CYCLES(RST)) dut (.*);

  always #5 clk = ~clk;
  initial begin #2000000; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // edge counters and width monitors
  int n_dstb, n_estb, n_dtrig, n_etrig, n_rtrig, n_ddone, n_edone, n_dac, n_latch, n_reset;
  int w_dtrig, w_dstb, bad_w, sel_err, seq_err, last_esa, esa_err;
  logic p_dstb = 0, p_estb = 0, p_dtrig = 0, p_etrig = 0, p_rtrig = 0, p_latch = 0, p_reset = 0;
  logic clr_seen;
  always @(posedge clk) if (rst_n) begin
    p_dstb <= d_stp_stb; p_estb <= e_stp_stb; p_dtrig <= deflection_trig; p_etrig <= e_step_trig;
    p_rtrig <= retrace_trig; p_latch <= rt_latch; p_reset <= evt_reset;
    if (d_stp_stb && !p_dstb) n_dstb++;
    if (e_stp_stb && !p_estb) n_estb++;
    if (deflection_trig && !p_dtrig) begin n_dtrig++; w_dtrig = 0; end
    if (deflection_trig) w_dtrig++;
    if (!deflection_trig && p_dtrig && w_dtrig != TRG) begin bad_w++; $display("dtrig w %0d", w_dtrig); end
    if (d_stp_stb && !p_dstb) w_dstb = 0;
    if (d_stp_stb) w_dstb++;
    if (!d_stp_stb && p_dstb && w_dstb != STB && mode == 3'd3) begin bad_w++; $display("dstb w %0d at %0t", w_dstb, $time); end
    if (e_step_trig && !p_etrig) n_etrig++;
    if (retrace_trig && !p_rtrig) n_rtrig++;
    if (evt_reset && !p_reset) n_reset++;
    if (rt_latch && !p_latch) begin
      n_latch++;
      if (rt_enable) seq_err++;       // counters must be stopped while latching
    end
    if (defl_done) n_ddone++;
    if (esa_done) begin
      n_edone++;
      if (int'(esa_step) != last_esa) esa_err++;
      last_esa++;
    end
    if (dac_load) n_dac++;
    // blanking: no d strobe while the HV settles
    if (sel_disable && d_stp_stb && running && p_dstb == 0) sel_err++;
  end

  initial begin
    real t0, t1;
    {n_dstb, n_estb, n_dtrig, n_etrig, n_rtrig, n_ddone, n_edone, n_dac, n_latch, n_reset} = '0;
    {bad_w, sel_err, seq_err, esa_err, last_esa} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check(!running && sel_disable, "idle before time_sync");
    @(negedge clk) time_sync = 1; @(negedge clk) time_sync = 0;
    t0 = $realtime;
    @(posedge clk); #1;
    check(running && !sel_disable && evt_reset && !rt_clr_n, "start actions");
    wait (retrace_trig); t1 = $realtime;
    check((t1 - t0) / 10 > real'(2 * STB + E * (D * DC + SET)) - 3 && (t1 - t0) / 10 < real'(2 * STB + E * (D * DC + SET)) + 3,
          $sformatf("sweep length %0f cycles", (t1 - t0) / 10));
    wait (!running);
    repeat (20) @(posedge clk);
    check(n_dstb === 1 + E * D * NS, $sformatf("d_stp_stb count %0d", n_dstb));
    check(n_estb === 1 + 2 * E, $sformatf("e_stp_stb count %0d", n_estb));
    check(n_dtrig === E * D, $sformatf("deflection_trig count %0d", n_dtrig));
    check(n_etrig === E, $sformatf("e_step_trig count %0d", n_etrig));
    check(n_rtrig === 1, "retrace_trig count");
    check(n_ddone === E * D, "defl_done count");
    check(n_edone === E, "esa_done count");
    check(n_dac === E, "dac_load count");
    check(n_latch === E * D && seq_err === 0, "rate latch sequence");
    check(n_reset === 1, "evt_reset pulses");
    check(bad_w === 0, "strobe and trigger widths");
    check(sel_err === 0, "no strobes while blanked");
    check(esa_err === 0, "esa_step numbering");
    check(esa_step === 0 && defl_step === 0, "counters reset after sweep");

    // rate-limit check: rate below the limit switches the S channel on
    rate_chk = 1; rate_sel = 16'd50;
    @(negedge clk) time_sync = 1; @(negedge clk) time_sync = 0;
    @(posedge defl_done); @(posedge clk); #1;
    check(s_ch_auto && s_ch_eff, "rate below limit sets s_ch");
    rate_sel = 16'd150;
    @(posedge defl_done); @(posedge clk); #1;
    check(!s_ch_auto && !s_ch_eff, "rate above limit clears s_ch");
    rate_sel = 16'd10;
    @(posedge defl_done); @(posedge clk); #1;
    check(s_ch_auto, "set again");
    wait (esa_done); @(posedge clk); #1;
    check(!s_ch_auto, "cleared after the energy step");
    s_ch_en = 1; #1;
    check(s_ch_eff, "manual s_ch_en");
    // leaving mode 3 stops the sweep
    @(negedge clk) mode = 3'd1;
    repeat (2) @(posedge clk); #1;
    check(!running && sel_disable, "mode change stops sweep");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
