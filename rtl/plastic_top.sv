// plastic_top: the PLASTIC digital electronics as one design - instrument
// controller command path, logic board (ACTEL 1: registers, mode-3 sweep,
// rate counters, stimulus, util data), event selection (ACTEL 2: SW and WAP
// quadrants, PHA serial link) and the classifier. Everything runs from the
// one 25.6 MHz clock clk; the PHA link clock is clk/2 as generated by the
// PHA transmitter.
//
// Data flow:
//   IDPU cmd_clk/cmd_dat -> ic_cmd_rx -> ic_cmd_ctrl -> telemetry (tlm_*)
//   ic_cmd_ctrl forwards logic-board commands as 24-bit UTIL commands
//   (ser_tx, 3.2 MHz) -> ser_rx on the logic board -> lb_regs, whose
//   lb_cfg_t configures every other block and is also a port (cfg).
//   The IDPU time message starts the mode-3 sweep (sweep_ctrl), which steps
//   esa_step/defl_step, drives the DAC strobes and the three trigs, blanks
//   event selection while the HV settles and runs the rate counters.
//   After each deflection step lb_util_seq sends the step word and the 32
//   rates, after each energy step the step number, as 16-bit util_dat words
//   (ser_tx) back to the instrument controller's ser_rx (ic_util_*).
//   The HV next-state word swp_next (from the sweep tables of the DAC EEPROM,
//   outside this design) is sent on swp_* when the sweep asks for it.
//   sw_event (quadrants 0/1) and wap_event (quadrants 2/3) build 48-bit PHA
//   words from the TAC, ADC, SSD and RA board signals, which are ports;
//   the SSD energy word comes over the optical link through ssd_link, which
//   also sends the SSD_CMD word and reads housekeeping words on request of
//   the SSD_CTRL register;
//   their 32 rate pulses feed rate_counters; pha_tx sends the words over
//   the 6-line serial link to the classifier, which bins them through its
//   EEPROM tables into its RAM (both memories are ports). On every
//   e_step_trig the instrument controller swaps the classifier RAM bank
//   (ram_sel).
// Analog boards, memories, the IDPU and the DAC board are outside the design
// and appear as ports. Parameters default to the reference's sizes and
// times; a test may shrink the sweep timing.
// The undefined LOGIC_CTL_B bits 5..4 of cfg are constant 0.
module plastic_top
  import plastic_pkg::*;
#(
  parameter int unsigned ESA_STEPS     = 128,
  parameter int unsigned DEFL_STEPS    = 32,
  parameter int unsigned DEFL_CYCLES   = 327680,
  parameter int unsigned DSTB_PER_DEFL = 16,
  parameter int unsigned STB_CYCLES    = 10240,
  parameter int unsigned TRIG_CYCLES   = 10240,
  parameter int unsigned SETTLE_CYCLES = 665600,
  parameter int unsigned RESET_CYCLES  = 26,
  parameter int unsigned CLS_INIT      = 205
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  sysid,
  // IDPU command and telemetry
  input  logic        cmd_clk,
  input  logic        cmd_dat,
  output logic        tlm_valid,
  output logic [15:0] tlm_header,
  output logic [15:0] tlm_data,
  output logic        idpu_reset,
  output logic        ic_util_valid,
  output logic [15:0] ic_util_data,
  output logic [7:0]  ic_ctrl_reg,
  output logic        util_cmd_busy,  // a UTIL command is being sent
  output logic [15:0] util_words,     // util_dat words sent by the logic board
  // logic board configuration and status
  output lb_cfg_t     cfg,
  output logic        lb_bad_addr,
  output logic        lb_log_wr,
  output logic [7:0]  lb_log_addr,
  output logic [7:0]  lb_log_data,
  output logic [6:0]  esa_step,
  output logic [4:0]  defl_step,
  output logic        sweep_running,
  output logic        s_ch_auto,      // S channel switched on by the rate-limit check
  // trigs to the instrument controller
  output logic        e_step_trig,
  output logic        deflection_trig,
  output logic        retrace_trig,
  // DAC board
  input  logic [15:0] swp_next,
  output logic        swp_busy,
  output logic        swp_gate,
  output logic        swp_sclk,
  output logic        swp_sdata,
  output logic        e_stp_stb,
  output logic        d_stp_stb,
  // stimulus outputs (ra, ssd, tac0, tac2, pos)
  output logic [4:0]  stim,
  // TAC0 / SW quadrants
  input  logic        tac0_sf,
  input  logic        tac0_sfr,
  input  logic        tac0_stp,
  input  logic        ra_trig,
  input  logic        pos1_0,
  input  logic        pos1_1,
  input  logic        ssd_trig,
  input  logic        trig_sw,
  input  logic        trig_st,
  output logic        tac0_reset,
  output logic        s_sync,
  output logic        adc0_req,
  input  logic        adc0_done,
  input  logic [8:0]  adc0_data,
  input  logic        adc0_ofw_n,
  // SSD optical link
  output logic        ssd_cmd_clk,
  output logic        ssd_cmd_in,
  output logic        ssd_cmd_strobe,
  output logic        ssd_m_reset,
  input  logic        ssd_dat0,
  input  logic        ssd_dat1,
  output logic        ssd_hk_valid,
  output logic [15:0] ssd_hk_word,
  output logic        ssd_rd_err,
  output logic        ssd_busy,
  output logic        ra_req,
  input  logic        ra_done,
  input  logic [7:0]  ra_tab,
  // TAC2 / WAP quadrants
  input  logic        tac2_sf,
  input  logic        tac2_sfr,
  input  logic        tac2_stp,
  input  logic [7:0]  pos2,
  output logic        tac2_reset,
  output logic        adc2_req,
  input  logic        adc2_done,
  input  logic [8:0]  adc2_data,
  input  logic        adc2_ofw_n,
  // PHA link status
  output logic [7:0]  pha_dropped,
  output logic [15:0] pha_sent,
  // classifier memories
  output logic        cls_busy,
  output logic        ram_sel,
  output logic [16:0] ee_addr,
  output logic [3:0]  ee_cs_n,
  output logic        ee_oe_n,
  input  logic [7:0]  ee_rdata,
  output logic [14:0] ram_addr,
  output logic [1:0]  ram_cs_n,
  output logic        ram_oe_n,
  output logic        ram_we_n,
  output logic [7:0]  ram_wdata,
  input  logic [7:0]  ram_rdata,
  output logic        tab_tri,
  output logic        dat2_w,
  output logic        bins_tri,
  output logic        cls_spare
);
  // ---------------- instrument controller ----------------
  logic        rx_valid, rx_perr, rx_ferr;
  logic [23:0] rx_word;
  logic        time_msg, fwd_valid;
  ic_cmd_t     fwd_cmd;

  ic_cmd_rx u_ic_rx (
    .clk, .rst_n, .cmd_clk, .cmd_dat,
    .valid(rx_valid), .word(rx_word), .parity_err(rx_perr), .frame_err(rx_ferr)
  );

  ic_cmd_ctrl u_ic_ctrl (
    .clk, .rst_n, .sysid,
    .cmd_valid(rx_valid), .cmd(ic_cmd_t'(rx_word)), .parity_err(rx_perr), .frame_err(rx_ferr),
    .ctrl_reg(ic_ctrl_reg), .idpu_reset, .time_msg,
    .fwd_valid, .fwd_cmd,
    .tlm_valid, .tlm_header, .tlm_data
  );

  // UTIL command: instrument controller -> logic board
  logic ucmd_ready, ucmd_gate, ucmd_sclk, ucmd_sdata;
  assign util_cmd_busy = ~ucmd_ready;
  ser_tx #(.WIDTH(24), .DIV(8)) u_util_cmd_tx (
    .clk, .rst_n, .start(fwd_valid), .data(24'(fwd_cmd)),
    .ready(ucmd_ready), .gate(ucmd_gate), .sclk(ucmd_sclk), .sdata(ucmd_sdata)
  );

  logic        lcmd_valid;
  logic [23:0] lcmd_data;
  logic [7:0]  lcmd_nbits;
  ser_rx #(.WIDTH(24)) u_util_cmd_rx (
    .clk, .rst_n, .gate(ucmd_gate), .sclk(ucmd_sclk), .sdata(ucmd_sdata),
    .valid(lcmd_valid), .data(lcmd_data), .nbits(lcmd_nbits)
  );

  // classifier RAM bank swap on each e_step_trig
  logic etrig_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      etrig_q <= 1'b0; ram_sel <= 1'b0;
    end else begin
      etrig_q <= e_step_trig;
      if (e_step_trig && !etrig_q) ram_sel <= ~ram_sel;
    end
  end

  // ---------------- logic board (ACTEL 1) ----------------
  ic_cmd_t lcmd;
  logic    lb_wr;
  assign lcmd  = ic_cmd_t'(lcmd_data);
  assign lb_wr = lcmd_valid && (lcmd_nbits == 8'd24) && (lcmd.modaddr == MOD_LB_IMM) && (lcmd.cmd == 4'h1);

  lb_regs u_lb_regs (
    .clk, .rst_n, .wr(lb_wr), .addr(lcmd.data[15:8]), .wdata(lcmd.data[7:0]),
    .cfg, .bad_addr(lb_bad_addr), .log_wr(lb_log_wr), .log_addr(lb_log_addr), .log_data(lb_log_data)
  );

  logic        rt_enable, rt_latch, rt_clr_n, sw_seldis, evt_reset, defl_done, dac_load, esa_done;
  logic        s_ch_eff;
  logic [15:0] rate_sel;
  sweep_ctrl #(
    .ESA_STEPS(ESA_STEPS), .DEFL_STEPS(DEFL_STEPS), .DEFL_CYCLES(DEFL_CYCLES),
    .DSTB_PER_DEFL(DSTB_PER_DEFL), .STB_CYCLES(STB_CYCLES), .TRIG_CYCLES(TRIG_CYCLES),
    .SETTLE_CYCLES(SETTLE_CYCLES), .RESET_CYCLES(RESET_CYCLES)
  ) u_sweep (
    .clk, .rst_n, .mode(cfg.mode), .time_sync(time_msg),
    .s_ch_en(cfg.s_ch_en), .rate_chk(cfg.rate_chk), .rlim(cfg.rlim), .rate_sel,
    .esa_step, .defl_step, .s_ch_eff, .s_ch_auto,
    .e_stp_stb, .d_stp_stb, .deflection_trig, .e_step_trig, .retrace_trig,
    .sel_disable(sw_seldis), .evt_reset, .rt_enable, .rt_latch, .rt_clr_n,
    .defl_done, .dac_load, .esa_done, .running(sweep_running)
  );

  // HV next-state word to the DAC board
  logic swp_ready;
  assign swp_busy = ~swp_ready;
  ser_tx #(.WIDTH(16), .DIV(8)) u_swp_tx (
    .clk, .rst_n, .start(dac_load), .data(swp_next),
    .ready(swp_ready), .gate(swp_gate), .sclk(swp_sclk), .sdata(swp_sdata)
  );

  // rate counters: rt(31..14) from the SW quadrants, rt(13..0) from WAP
  logic [17:0] sw_rates;
  logic [13:0] wap_rates;
  logic [4:0]  rd_idx;
  logic [15:0] rd_data;
  rate_counters #(.N(32), .WIDTH(16)) u_rates (
    .clk, .rst_n, .pulse({sw_rates, wap_rates}),
    .rt_enable, .rt_latch, .rt_clr_n,
    .rd_idx, .rd_data, .chk_idx(cfg.rlim_ch), .chk_data(rate_sel)
  );

  // util_dat: logic board -> instrument controller
  logic        udat_ready, udat_start, udat_gate, udat_sclk, udat_sdata;
  logic [15:0] udat_data;
  lb_util_seq #(.NRATES(32)) u_util_seq (
    .clk, .rst_n, .defl_done, .esa_done, .esa_step, .defl_step, .s_ch(s_ch_eff),
    .rd_idx, .rd_data, .tx_ready(udat_ready), .tx_start(udat_start), .tx_data(udat_data),
    .words_sent(util_words)
  );

  ser_tx #(.WIDTH(16), .DIV(8)) u_util_dat_tx (
    .clk, .rst_n, .start(udat_start), .data(udat_data),
    .ready(udat_ready), .gate(udat_gate), .sclk(udat_sclk), .sdata(udat_sdata)
  );

  logic [7:0] udat_nbits;
  logic       udat_valid;
  ser_rx #(.WIDTH(16)) u_util_dat_rx (
    .clk, .rst_n, .gate(udat_gate), .sclk(udat_sclk), .sdata(udat_sdata),
    .valid(udat_valid), .data(ic_util_data), .nbits(udat_nbits)
  );
  assign ic_util_valid = udat_valid && (udat_nbits == 8'd16);

  stim_gen u_stim (
    .clk, .rst_n, .stim_freq(cfg.stim_freq), .stim_enable(cfg.stim_enable), .stim
  );

  // ---------------- event selection (ACTEL 2) ----------------
  logic [1:0] sel_dis;
  assign sel_dis = cfg.sel_disable | {2{sweep_running & sw_seldis}};

  logic      sw_valid, wap_valid, tac0_rst_sel, tac2_rst_sel;
  logic        ssd_req, ssd_done, sw_sync, link_sync;
  logic [15:0] ssd_word;
  pha_word_t sw_pha, wap_pha;

  sw_event #(.RESET_CYCLES(RESET_CYCLES)) u_sw (
    .clk, .rst_n, .tmode0(cfg.tmode0), .sel0_disable(sel_dis[0]), .sel0_window(cfg.sel0_window),
    .pos_dis0(cfg.pos_dis0), .tac0_under(cfg.tac0_under), .tac0_over(cfg.tac0_over),
    .ssd_under(cfg.ssd_under), .ssd_over(cfg.ssd_over), .ssd_disable(cfg.ssd_disable),
    .s_ch_en(s_ch_eff), .esa_step, .defl_step,
    .tac0_sf, .tac0_sfr, .tac0_stp, .ra_trig, .pos1_0, .pos1_1, .ssd_trig, .trig_sw, .trig_st,
    .tac0_reset(tac0_rst_sel), .s_sync(sw_sync),
    .adc_req(adc0_req), .adc_done(adc0_done), .adc_data(adc0_data), .ofw_n(adc0_ofw_n),
    .ssd_req, .ssd_done, .ssd_word, .ra_req, .ra_done, .ra_tab,
    .pha_valid(sw_valid), .pha(sw_pha), .rates(sw_rates)
  );

  // SSD link: energy reads for the SW event logic, SSD_CTRL commands
  ssd_link u_ssd (
    .clk, .rst_n, .ctrl(cfg.ssd_ctrl), .cmd(cfg.ssd_cmd), .rd_req(ssd_req), .rd_done(ssd_done),
    .rd_word(ssd_word), .hk_valid(ssd_hk_valid), .hk_word(ssd_hk_word), .rd_err(ssd_rd_err),
    .busy(ssd_busy), .cmd_clk(ssd_cmd_clk), .cmd_in(ssd_cmd_in), .cmd_strobe(ssd_cmd_strobe),
    .dat0(ssd_dat0), .dat1(ssd_dat1), .m_reset(ssd_m_reset), .sync(link_sync)
  );
  assign s_sync = sw_sync | link_sync;

  wap_event #(.RESET_CYCLES(RESET_CYCLES)) u_wap (
    .clk, .rst_n, .sel2_disable(sel_dis[1]), .sel2_window(cfg.sel2_window), .tmode2(cfg.tmode2),
    .pos_dis2(cfg.pos_dis2), .tac2_under(cfg.tac2_under), .tac2_over(cfg.tac2_over),
    .esa_step, .defl_step, .tac2_sf, .tac2_sfr, .tac2_stp, .pos(pos2),
    .tac2_reset(tac2_rst_sel),
    .adc_req(adc2_req), .adc_done(adc2_done), .adc_data(adc2_data), .ofw_n(adc2_ofw_n),
    .pha_valid(wap_valid), .pha(wap_pha), .rates(wap_rates)
  );

  // the sweep start also resets both TACs
  assign tac0_reset = tac0_rst_sel | evt_reset;
  assign tac2_reset = tac2_rst_sel | evt_reset;

  logic ser_clk, ser_gat;
  logic [5:0] ser_dat;
  pha_tx #(.BUSY_WAIT(16)) u_pha_tx (
    .clk, .rst_n, .sw_valid, .sw_word(sw_pha), .wap_valid, .wap_word(wap_pha),
    .busy(cls_busy), .ser_clk, .ser_gat, .ser_dat, .dropped(pha_dropped), .sent(pha_sent)
  );

  // ---------------- classifier ----------------
  classifier #(.EE_CYC(4), .RAM_CYC(4), .INIT_CYCLES(CLS_INIT)) u_cls (
    .clk, .n_rst(rst_n), .ser_clk, .ser_gat, .ser_dat, .ram_sel,
    .busy(cls_busy), .ee_addr, .ee_cs_n, .ee_oe_n, .ee_rdata,
    .ram_addr, .ram_cs_n, .ram_oe_n, .ram_we_n, .ram_wdata, .ram_rdata,
    .tab_tri, .dat2_w, .bins_tri, .spare(cls_spare)
  );
endmodule
