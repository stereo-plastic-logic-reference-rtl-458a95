// sw_event: event selection for the SSD quadrants 0 and 1 (solar-wind
// sector and SSD WAP).
// How an event starts depends on the trigger mode tmode0:
//   modes 0-7  a TAC0 start flag opens a window in which the stop
//              coincidence (sfr), position (ra_trig, pos1_0, pos1_1) and SSD
//              energy trigger are latched; it ends on sfr or after
//              sel0_window+1 clocks. Modes 0-3 then read the TAC0 ADC
//              (TOF = {~ofw_n, adc[8:0]}); modes 4-5 report TOF = 1023.
//   modes 8-9  an enabled position pulse opens the window, which ends on
//              the SSD trigger or after the window time.
//   mode 10    the SSD trigger itself is the event; the position comes from
//              the SSD channel (ssd_pos_map).
// If the SSD fired, its 16-bit energy word is read (ssd_req/ssd_done:
// channel 15..12, h/e 11, multi-hit 10, energy 9..0); if the resistive
// anode fired, its table value is read (ra_req/ra_done: bit 7 saturation A,
// bit 6 saturation B, bits 5..0 position). sw_validate applies the mode's
// requirements; a valid event pulses s_valid and presents the PHA word.
// The event ends with a TAC0 reset of RESET_CYCLES clocks (1 us; modes 0-7)
// and, if an energy was read, an s_sync pulse of the same length to re-arm
// the SSD board. sel0_disable blanks new events. Event flow, PHA fields and
// rate meanings follow the reference. This design's choices: inputs are
// synchronous one-clock pulses; the ADC, SSD and RA reads are simple
// request/done handshakes to the converters and the EEPROM; the reference
// gives three different encodings of RA saturation, and this design follows
// the one in the rates section (bit 7 = A, bit 6 = B, both = both); an
// event with no or several positions is reported as quadrant 0, position 0,
// section 0.
// The spare bits of the PHA word are always 0, and a few rate pulses are
// the synchronised trigger inputs themselves.
module sw_event
  import plastic_pkg::*;
#(
  parameter int unsigned RESET_CYCLES = 26
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration
  input  logic [3:0]  tmode0,
  input  logic        sel0_disable,
  input  logic [7:0]  sel0_window,
  input  logic [2:0]  pos_dis0,       // pos1_1, pos1_0, ra_trig
  input  logic [9:0]  tac0_under,
  input  logic [9:0]  tac0_over,
  input  logic [9:0]  ssd_under,
  input  logic [9:0]  ssd_over,
  input  logic        ssd_disable,
  input  logic        s_ch_en,
  input  logic [6:0]  esa_step,
  input  logic [4:0]  defl_step,
  // detector pulses
  input  logic        tac0_sf,
  input  logic        tac0_sfr,
  input  logic        tac0_stp,
  input  logic        ra_trig,
  input  logic        pos1_0,
  input  logic        pos1_1,
  input  logic        ssd_trig,       // TRIGGER_VE
  input  logic        trig_sw,
  input  logic        trig_st,
  // converters and tables
  output logic        tac0_reset,
  output logic        s_sync,
  output logic        adc_req,
  input  logic        adc_done,
  input  logic [8:0]  adc_data,
  input  logic        ofw_n,
  output logic        ssd_req,
  input  logic        ssd_done,
  input  logic [15:0] ssd_word,
  output logic        ra_req,
  input  logic        ra_done,
  input  logic [7:0]  ra_tab,
  // results
  output logic        pha_valid,
  output pha_word_t   pha,
  output logic [17:0] rates           // rt(31..14)
);
  typedef enum logic [3:0] {
    E_IDLE, E_WINDOW, E_TOF, E_ENERGY, E_RA, E_EVAL, E_RESET
  } estate_t;
  estate_t     st;
  logic        sf_l, sfr_l, e_l;
  logic [2:0]  p_l;                   // pos1_1, pos1_0, ra
  logic [8:0]  wcnt;
  logic [7:0]  rcnt;
  logic [9:0]  tof;
  logic [15:0] ew;
  logic [7:0]  ra_q;
  logic [2:0]  pos_en;
  logic        v_valid, v_enr, v_er, one_pos;
  logic [1:0]  npos;
  logic [1:0]  m_quad, q;
  logic [5:0]  m_pos, p;
  logic [1:0]  m_sec, sec;
  logic        grp_a, grp_b, grp_c;
  logic [17:0] ev_rates;

  assign grp_a  = (tmode0 < 4'd8);
  assign grp_b  = (tmode0 == 4'd8) || (tmode0 == 4'd9);
  assign grp_c  = (tmode0 == 4'd10);
  assign pos_en = {pos1_1, pos1_0, ra_trig} & ~pos_dis0;
  assign npos   = 2'(p_l[0]) + 2'(p_l[1]) + 2'(p_l[2]);
  assign one_pos = (npos == 2'd1);

  sw_validate u_val (
    .mode(tmode0), .sf(sf_l), .sfr(sfr_l), .one_pos, .energy(e_l),
    .multi_e(e_l & ew[10]), .e_hk(e_l & ew[11]), .ofw(tof[9] && tmode0 < 4'd4),
    .tof_ok(tof >= tac0_under && tof <= tac0_over),
    .e_ok(ew[9:0] >= ssd_under && ew[9:0] <= ssd_over),
    .ssd_disable, .valid(v_valid), .e_not_rqd(v_enr), .e_rqd(v_er));

  ssd_pos_map u_map (.ssd_id(ew[15:12]), .s_channel(s_ch_en),
                     .quadrant(m_quad), .position(m_pos), .section(m_sec));

  // position, quadrant and section of the event
  always_comb begin
    q = 2'b00; p = 6'd0; sec = SEC_SW_MAIN;
    if (grp_c) begin
      q = m_quad; p = m_pos; sec = m_sec;
    end else if (one_pos) begin
      if (p_l[0]) begin
        q = 2'b00; p = ra_q[5:0];
        sec = (ra_q[5:0] >= 6'd16 && ra_q[5:0] <= 6'd47) ? {1'b0, s_ch_en} : SEC_WAP_SSD;
      end else begin
        q = 2'b01; p = p_l[1] ? 6'd8 : 6'd24; sec = SEC_WAP_SSD;
      end
    end
  end

  // rt(31..14): s_valid, s_e_not_req, s_e_req, s_no_pos, s_mult_pos, s_no_e,
  // s_mult_e, ra_sat_a, ra_sat_b, ra_sat_both, ssd_sw, ssd_st, sf0, sfr0,
  // stp0, ra_trig, pos1_0, pos1_1
  always_comb begin
    rates = ev_rates;
    rates[7] = trig_sw;
    rates[6] = trig_st;
    rates[5] = tac0_sf;
    rates[4] = tac0_sfr;
    rates[3] = tac0_stp;
    rates[2] = pos_en[0];
    rates[1] = pos_en[1];
    rates[0] = pos_en[2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= E_IDLE; sf_l <= 1'b0; sfr_l <= 1'b0; e_l <= 1'b0; p_l <= '0;
      wcnt <= '0; rcnt <= '0; tof <= '0; ew <= '0; ra_q <= '0;
      tac0_reset <= 1'b0; s_sync <= 1'b0; adc_req <= 1'b0; ssd_req <= 1'b0; ra_req <= 1'b0;
      pha_valid <= 1'b0; pha <= '0; ev_rates <= '0;
    end else begin
      pha_valid <= 1'b0;
      ev_rates  <= '0;
      adc_req   <= 1'b0;
      ssd_req   <= 1'b0;
      ra_req    <= 1'b0;
      case (st)
        E_IDLE: begin
          sf_l <= 1'b0; sfr_l <= 1'b0; e_l <= 1'b0; p_l <= '0; ew <= '0; ra_q <= '0;
          tof  <= TOF_NONE;
          wcnt <= '0;
          if (grp_a && tac0_sf) begin
            sf_l <= 1'b1;
            if (sel0_disable) begin st <= E_RESET; rcnt <= '0; tac0_reset <= 1'b1; end
            else st <= E_WINDOW;
          end else if (grp_b && pos_en != 3'b000 && !sel0_disable) begin
            p_l <= pos_en;
            st  <= E_WINDOW;
          end else if (grp_c && ssd_trig) begin
            e_l <= 1'b1;
            st  <= E_ENERGY;
            ssd_req <= 1'b1;
          end
        end
        E_WINDOW: begin
          sfr_l <= sfr_l | (grp_a & tac0_sfr);
          p_l   <= p_l | pos_en;
          e_l   <= e_l | ssd_trig;
          wcnt  <= wcnt + 9'd1;
          if ((grp_a && (tac0_sfr || sfr_l)) || (grp_b && (ssd_trig || e_l)) ||
              wcnt == {1'b0, sel0_window}) begin
            if (grp_a && tmode0 < 4'd4) begin
              st <= E_TOF; adc_req <= 1'b1;
            end else begin
              st <= E_ENERGY;
              ssd_req <= e_l | ssd_trig;
            end
          end
        end
        E_TOF: if (adc_done) begin
          tof <= {~ofw_n, adc_data};
          st  <= E_ENERGY;
          ssd_req <= e_l;
        end
        E_ENERGY: begin
          if (!e_l || ssd_done) begin
            if (e_l) ew <= ssd_word;
            st <= E_RA;
            ra_req <= p_l[0];
          end
        end
        E_RA: begin
          if (!p_l[0] || ra_done) begin
            if (p_l[0]) ra_q <= ra_tab;
            st <= E_EVAL;
          end
        end
        E_EVAL: begin
          ev_rates[17] <= v_valid;
          ev_rates[16] <= v_enr;
          ev_rates[15] <= v_er;
          ev_rates[14] <= (npos == 2'd0) && !grp_c;
          ev_rates[13] <= (npos > 2'd1);
          ev_rates[12] <= !e_l;
          ev_rates[11] <= e_l && ew[10];
          ev_rates[10] <= p_l[0] && ra_q[7] && !ra_q[6];
          ev_rates[9]  <= p_l[0] && ra_q[6] && !ra_q[7];
          ev_rates[8]  <= p_l[0] && ra_q[7] && ra_q[6];
          if (v_valid) begin
            pha_valid    <= 1'b1;
            pha.swpe     <= esa_step;
            pha.swpd     <= defl_step;
            pha.quadrant <= q;
            pha.ssd_id   <= e_l ? ew[15:12] : 4'd0;
            pha.ssde     <= e_l ? ew[9:0] : 10'd0;
            pha.tof      <= (tmode0 < 4'd4) ? tof : TOF_NONE;
            pha.position <= p;
            pha.section  <= sec;
            pha.spare    <= 2'b00;
          end
          st   <= E_RESET;
          rcnt <= '0;
          tac0_reset <= grp_a;
          s_sync     <= e_l;
        end
        E_RESET: begin
          rcnt <= rcnt + 8'd1;
          if (rcnt == 8'(RESET_CYCLES - 1)) begin
            tac0_reset <= 1'b0;
            s_sync     <= 1'b0;
            st <= E_IDLE;
          end
        end
        default: st <= E_IDLE;
      endcase
    end
  end
endmodule
