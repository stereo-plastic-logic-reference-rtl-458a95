// tb_plastic_top: end-to-end test of the whole design at reduced sweep
// timing (2 energy steps of 4 deflection steps of 8192 clocks). The test
// drives the IDPU command line bit by bit, configures the logic board with
// immediate commands (which travel over the UTIL command link), starts the
// mode-3 sweep with the IDPU time message and, while it runs, fires SW and
// WAP events through behavioural TAC/ADC/RA responders and the SSD board
// model ssd_model; it also sends an SSD command, a housekeeping read and a
// master reset over the SSD link. Classifier
// EEPROM and RAM are behavioural arrays. Every mechanism of the design is
// counted; one that never happens is a failure, as are wrong counts of
// strobes, trigs, util words, HV words, bank swaps and PHA words.
`timescale 1ns/1ps
module tb_plastic_top;
  import plastic_pkg::*;
  localparam int E = 2, D = 4, DC = 8192, NS = 4, STB = 64, TRG = 64, SET = 512;

  logic clk = 0, rst_n = 0;
  logic [1:0] sysid = 2'b01;
  logic cmd_clk = 0, cmd_dat = 0;
  logic tlm_valid, idpu_reset, ic_util_valid, util_cmd_busy, sweep_running, s_ch_auto;
  logic [15:0] tlm_header, tlm_data, ic_util_data, util_words;
  logic [7:0] ic_ctrl_reg, lb_log_addr, lb_log_data;
  lb_cfg_t cfg;
  logic lb_bad_addr, lb_log_wr;
  logic [6:0] esa_step; logic [4:0] defl_step;
  logic e_step_trig, deflection_trig, retrace_trig;
  logic [15:0] swp_next = 16'hA55A;
  logic swp_busy, swp_gate, swp_sclk, swp_sdata, e_stp_stb, d_stp_stb;
  logic [4:0] stim;
  logic tac0_sf = 0, tac0_sfr = 0, tac0_stp = 0, ra_trig = 0, pos1_0 = 0, pos1_1 = 0;
  logic ssd_trig = 0, trig_sw = 0, trig_st = 0;
  logic tac0_reset, s_sync, adc0_req, ra_req;
  logic adc0_done = 0, ra_done = 0, adc0_ofw_n = 1;
  logic ssd_cmd_clk, ssd_cmd_in, ssd_cmd_strobe, ssd_m_reset, ssd_dat0, ssd_dat1;
  logic ssd_hk_valid, ssd_rd_err, ssd_busy;
  logic [15:0] ssd_hk_word, ssd_last_cmd;
  int ssd_n_cmd, ssd_n_reset;
  logic [8:0] adc0_data = 9'd200;
  logic [15:0] ssd_word = {4'd3, 1'b0, 1'b0, 10'd300};
  logic [7:0] ra_tab = 8'h14;
  logic tac2_sf = 0, tac2_sfr = 0, tac2_stp = 0;
  logic [7:0] pos2 = 0;
  logic tac2_reset, adc2_req, adc2_done = 0, adc2_ofw_n = 1;
  logic [8:0] adc2_data = 9'd150;
  logic [7:0] pha_dropped; logic [15:0] pha_sent;
  logic cls_busy, ram_sel, ee_oe_n, ram_oe_n, ram_we_n, tab_tri, dat2_w, bins_tri, cls_spare;
  logic [16:0] ee_addr; logic [3:0] ee_cs_n; logic [7:0] ee_rdata, ram_wdata, ram_rdata;
  logic [14:0] ram_addr; logic [1:0] ram_cs_n;

  plastic_top #(.ESA_STEPS(E), .DEFL_STEPS(D), .DEFL_CYCLES(DC), .DSTB_PER_DEFL(NS),
                .STB_CYCLES(STB), .TRIG_CYCLES(TRG), .SETTLE_CYCLES(SET)) dut (.*);

  always #19.531 clk = ~clk;   // 25.6 MHz

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #20ms;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  // ---------------- behavioural surroundings ----------------
  logic [7:0] ram [2][32768];
  initial for (int b = 0; b < 2; b++) for (int a = 0; a < 32768; a++) ram[b][a] = 8'h00;
  always_comb begin
    ee_rdata = 8'hFF;
    if (!ee_oe_n && ee_cs_n != 4'hF) ee_rdata = ee_addr[7:0] ^ ee_addr[15:8] ^ {3'b000, ee_cs_n, 1'b0};
    ram_rdata = 8'h00;
    if (!ram_oe_n && !ram_cs_n[0]) ram_rdata = ram[0][ram_addr];
    if (!ram_oe_n && !ram_cs_n[1]) ram_rdata = ram[1][ram_addr];
  end
  int n_ram_wr = 0;
  always @(posedge clk) if (rst_n && !ram_we_n) begin
    n_ram_wr++;
    if (!ram_cs_n[0]) ram[0][ram_addr] <= ram_wdata;
    if (!ram_cs_n[1]) ram[1][ram_addr] <= ram_wdata;
  end

  always @(posedge clk) if (rst_n && adc0_req) begin repeat (3) @(posedge clk); adc0_done <= 1; @(posedge clk); adc0_done <= 0; end
  always @(posedge clk) if (rst_n && adc2_req) begin repeat (3) @(posedge clk); adc2_done <= 1; @(posedge clk); adc2_done <= 0; end
  ssd_model #(.SKEW0_NS(30), .SKEW1_NS(70)) ssd_board (.cmd_clk(ssd_cmd_clk), .cmd_in(ssd_cmd_in),
    .cmd_strobe(ssd_cmd_strobe), .m_reset(ssd_m_reset), .word(ssd_word), .dat0(ssd_dat0), .dat1(ssd_dat1),
    .n_cmd(ssd_n_cmd), .n_reset(ssd_n_reset), .last_cmd(ssd_last_cmd));
  always @(posedge clk) if (rst_n && ra_req) begin repeat (2) @(posedge clk); ra_done <= 1; @(posedge clk); ra_done <= 0; end

  // HV word receiver (DAC board side): data valid on the rising sclk
  logic [15:0] swp_sr = 0; int swp_bits = 0, n_swp = 0, swp_bad = 0;
  always @(posedge swp_sclk) if (rst_n && swp_gate) begin swp_sr = {swp_sr[14:0], swp_sdata}; swp_bits++; end
  always @(negedge swp_gate) if (rst_n) begin
    n_swp++;
    if (swp_bits != 16 || swp_sr != swp_next) swp_bad++;
    swp_bits = 0;
  end

  // ---------------- mechanism counters ----------------
  int n_tlm, n_tlm_rx, n_logwr, n_bad, n_dtrig, n_etrig, n_rtrig, n_dstb, n_estb, n_util;
  int n_util_head, n_util_rate_nz, n_util_esa, n_stim, n_sw_rst, n_wap_rst, n_busy, n_bank;
  int n_sync, n_sch, n_idpu_rst, n_ssd, n_ssd_hk, n_ra, n_adc0, n_adc2;
  logic p_dtrig = 0, p_etrig = 0, p_rtrig = 0, p_dstb = 0, p_estb = 0, p_stim = 0, p_sw = 0;
  logic p_wap = 0, p_busy = 0, p_bank = 0, p_sync = 0;
  int util_k;   // position in the current util burst
  always @(posedge clk) if (rst_n) begin
    p_dtrig <= deflection_trig; p_etrig <= e_step_trig; p_rtrig <= retrace_trig;
    p_dstb <= d_stp_stb; p_estb <= e_stp_stb; p_stim <= stim[0]; p_sw <= tac0_reset;
    p_wap <= tac2_reset; p_busy <= cls_busy; p_bank <= ram_sel; p_sync <= s_sync;
    if (tlm_valid) begin
      n_tlm++;
      if (tlm_header[15:10] == MID_RX_CNT) n_tlm_rx++;
    end
    if (lb_log_wr) n_logwr++;
    if (lb_bad_addr) n_bad++;
    if (deflection_trig && !p_dtrig) n_dtrig++;
    if (e_step_trig && !p_etrig) begin n_etrig++; util_k = -1; end
    if (retrace_trig && !p_rtrig) n_rtrig++;
    if (d_stp_stb && !p_dstb) n_dstb++;
    if (e_stp_stb && !p_estb) n_estb++;
    if (stim[0] != p_stim) n_stim++;
    if (tac0_reset && !p_sw) n_sw_rst++;
    if (tac2_reset && !p_wap) n_wap_rst++;
    if (cls_busy && !p_busy) n_busy++;   // the first is the table initialisation
    if (ram_sel != p_bank) n_bank++;
    if (s_sync && !p_sync) n_sync++;
    if (s_ch_auto) n_sch++;
    if (idpu_reset) n_idpu_rst++;
    if (dut.ssd_done) n_ssd++;
    if (ssd_hk_valid) n_ssd_hk++;
    if (ra_req) n_ra++;
    if (adc0_req) n_adc0++;
    if (adc2_req) n_adc2++;
    if (deflection_trig && !p_dtrig) util_k = 0;
    if (ic_util_valid) begin
      n_util++;
      if (util_k == 0) begin
        n_util_head++;
        if (ic_util_data[15:8] != {1'b1, esa_step} && ic_util_data[15:8] != {1'b0, esa_step})
          $display("NOTE head %h", ic_util_data);
      end else if (util_k > 0 && util_k <= 32) begin
        if (ic_util_data != 0) n_util_rate_nz++;
      end else n_util_esa++;
      util_k++;
    end
  end

  // ---------------- IDPU command line ----------------
  task automatic bitp(input logic b);
    cmd_dat = b;
    #200 cmd_clk = 1;
    #200 cmd_clk = 0;
  endtask
  task automatic send_cmd(input logic [23:0] w);
    bitp(1'b1);
    for (int i = 23; i >= 0; i--) bitp(w[i]);
    bitp(~(^w));
    bitp(1'b1);
    bitp(1'b0); bitp(1'b0);
    #2000;
  endtask
  task automatic lb_write(input logic [7:0] a, input logic [7:0] d);
    send_cmd({MOD_LB_IMM, 4'h1, a, d});
    #8000;
  endtask

  // ---------------- event sources ----------------
  task automatic p1(ref logic s); @(negedge clk); s = 1; @(negedge clk); s = 0; endtask
  task automatic sw_event_pulse();
    p1(tac0_sf); p1(ra_trig); p1(ssd_trig); p1(tac0_sfr);
  endtask
  task automatic wap_event_pulse(input int ch);
    p1(tac2_sf);
    @(negedge clk); pos2 = 8'(1 << ch); @(negedge clk); pos2 = 0;
    p1(tac2_sfr);
  endtask

  bit events_on = 0;
  int n_sw_sent, n_wap_sent;
  initial begin
    forever begin
      repeat ($urandom_range(150, 400)) @(negedge clk);
      if (events_on) begin
        if ($urandom_range(0, 1)) begin sw_event_pulse(); n_sw_sent++; end
        else begin wap_event_pulse($urandom_range(0, 7)); n_wap_sent++; end
      end
    end
  end

  // ---------------- sequence ----------------
  initial begin
    int nz;
    {n_tlm, n_tlm_rx, n_logwr, n_bad, n_dtrig, n_etrig, n_rtrig, n_dstb, n_estb, n_util} = '0;
    {n_util_head, n_util_rate_nz, n_util_esa, n_stim, n_sw_rst, n_wap_rst, n_busy, n_bank} = '0;
    {n_sync, n_sch, n_idpu_rst, n_ssd, n_ssd_hk, n_ra, n_adc0, n_adc2, n_ram_wr, n_swp, swp_bad, swp_bits} = '0;
    util_k = 99;
    #500 rst_n = 1;
    #10us;
    // IC counter read
    send_cmd({MOD_IC, 4'h4, 16'h0000});
    #3000;
    check(n_tlm_rx === 1, "rx counter telemetry");
    // logic board configuration
    lb_write(8'h60, 8'h00);        // selection enabled on both TACs
    lb_write(8'h61, 8'h00);        // tmode0 = 0, tmode2 = 0
    lb_write(8'h75, 8'd30);
    lb_write(8'h76, 8'd20);
    lb_write(8'h70, 8'h1F);        // all stimulus outputs
    lb_write(8'h71, 8'h00);
    lb_write(8'h72, 8'h01);
    lb_write(8'h07, 8'h80 | 8'd14);// rate check on rt14 (sfr2)
    lb_write(8'h08, 8'h7F);
    lb_write(8'h09, 8'hFF);
    lb_write(8'hEE, 8'h00);        // not a register
    lb_write(8'h01, 8'h03);        // mode 3
    check(cfg.mode === 3'd3 && cfg.sel_disable === 2'b00 && cfg.stim_enable === 5'h1F, "configuration written");
    check(n_logwr === 10, $sformatf("register log writes %0d", n_logwr));
    check(n_bad === 1, "bad address flagged");
    // SSD board command and housekeeping read over the optical link
    lb_write(8'h51, 8'hA5);
    lb_write(8'h52, 8'h3C);
    lb_write(8'h50, 8'h04);        // send cmd
    #20us;
    check(ssd_n_cmd === 1 && ssd_last_cmd === 16'hA53C, $sformatf("SSD command %h", ssd_last_cmd));
    lb_write(8'h50, 8'h02);        // send hkc
    #20us;
    check(n_ssd_hk === 1 && ssd_hk_word === ssd_word && !ssd_rd_err, $sformatf("SSD hk word %h", ssd_hk_word));
    nz = ssd_n_reset;
    lb_write(8'h50, 8'h10);        // force reset
    #5us;
    check(ssd_n_reset === nz + 1, "SSD master reset");
    // start the sweep
    events_on = 1;
    send_cmd({MOD_IDPU, 4'h0, 16'h0000});
    wait (retrace_trig);
    events_on = 0;
    wait (!sweep_running);
    #400us;
    send_cmd({MOD_IDPU, 4'hF, 16'h0000});
    #5us;

    nz = 0;
    for (int b = 0; b < 2; b++) for (int a = 0; a < 32768; a++) if (ram[b][a] != 0) nz++;
    check(n_dtrig === E * D, $sformatf("deflection_trig %0d", n_dtrig));
    check(n_etrig === E, $sformatf("e_step_trig %0d", n_etrig));
    check(n_rtrig === 1, "retrace_trig");
    check(n_dstb === 1 + E * D * NS, $sformatf("d_stp_stb %0d", n_dstb));
    check(n_estb === 1 + 2 * E, $sformatf("e_stp_stb %0d", n_estb));
    check(n_util === E * D * 33 + E, $sformatf("util words %0d (sent %0d)", n_util, util_words));
    check(n_util_head === E * D, $sformatf("util step words %0d", n_util_head));
    check(n_util_esa === E, $sformatf("util esa words %0d", n_util_esa));
    check(n_util_rate_nz > 0, "some rates nonzero");
    check(n_swp === E && swp_bad === 0, $sformatf("HV words %0d bad %0d", n_swp, swp_bad));
    check(n_bank === E, $sformatf("RAM bank swaps %0d", n_bank));
    check(n_stim > 100, "stimulus toggles");
    check(n_sw_sent > 3 && n_wap_sent > 3, "events injected");
    check(n_busy > 1 && 16'(n_busy - 1) === pha_sent, $sformatf("PHA words %0d busy %0d", pha_sent, n_busy));
    check(n_ram_wr > 0 && nz > 0, $sformatf("classifier RAM writes %0d nonzero bytes %0d", n_ram_wr, nz));
    check(n_idpu_rst > 0, "IDPU reset command");

    // mechanism census
    begin
      string names [$];
      int cnts [$];
      names = '{"telemetry", "lb register log", "bad address", "deflection_trig",
        "e_step_trig", "retrace_trig", "d_stp_stb", "e_stp_stb", "util words", "stimulus",
        "tac0 reset", "tac2 reset", "classifier busy", "bank swap", "s_sync", "rate-limit s_ch",
        "idpu reset", "ssd read", "ssd command", "ssd hk read", "ssd m_reset", "ra read", "adc0", "adc2", "ram write", "HV word", "PHA word"};
      cnts = '{n_tlm, n_logwr, n_bad, n_dtrig, n_etrig, n_rtrig, n_dstb, n_estb, n_util,
        n_stim, n_sw_rst, n_wap_rst, n_busy, n_bank, n_sync, n_sch, n_idpu_rst, n_ssd, ssd_n_cmd, n_ssd_hk, ssd_n_reset, n_ra,
        n_adc0, n_adc2, n_ram_wr, n_swp, n_busy - 1};
      foreach (names[i]) begin
        $display("mechanism %-16s %0d", names[i], cnts[i]);
        check(cnts[i] > 0, {"mechanism never seen: ", names[i]});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
