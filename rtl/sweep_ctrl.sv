// sweep_ctrl: normal-mode (mode 3) sweep sequencer of the logic board.
// One time_sync starts a sweep of ESA_STEPS energy steps. After the start
// (TAC/SSD reset pulse evt_reset, rate-counter reset, event blanking off,
// e_stp_stb and d_stp_stb together, then one strobe-width gap) each energy step runs DEFL_STEPS
// deflection steps of DEFL_CYCLES clocks (12.8 ms). Within a deflection step
// DSTB_PER_DEFL d_stp_stb strobes of STB_CYCLES (400 us) advance the DAC
// deflection ramp; at its end deflection_trig (TRIG_CYCLES, 400 us) is sent,
// the rate counters run the enable-low / latch / clear / enable sequence,
// defl_step advances and defl_done asks for the rates to be sent. An
// e_stp_stb follows the first half of the deflection steps and the last;
// after the last come e_step_trig, event blanking (sel_disable), the DAC
// next-state load request (dac_load) and SETTLE_CYCLES (26 ms) of HV
// settling, then esa_done reports the finished step and esa_step advances one clock
// later.
// After the last energy step retrace_trig is sent and the sequencer waits
// for the next time_sync. Rate-limit check: with rate_chk set, after each
// deflection step s_ch_auto is set when rlim exceeds the rate of channel
// rlim_ch and cleared otherwise; it is cleared after each energy step, as
// the reference states; the effective S-channel flag is s_ch_en | s_ch_auto.
// The step counts, strobe counts, widths and the order of events are the
// reference's; placing each strobe at the start of its sub-interval and
// starting a whole sweep from one time_sync are this design's reading.
module sweep_ctrl #(
  parameter int unsigned ESA_STEPS     = 128,
  parameter int unsigned DEFL_STEPS    = 32,
  parameter int unsigned DEFL_CYCLES   = 327680,  // 12.8 ms at 25.6 MHz
  parameter int unsigned DSTB_PER_DEFL = 16,
  parameter int unsigned STB_CYCLES    = 10240,   // 400 us
  parameter int unsigned TRIG_CYCLES   = 10240,   // 400 us
  parameter int unsigned SETTLE_CYCLES = 665600,  // 26 ms
  parameter int unsigned RESET_CYCLES  = 26       // 1 us
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  mode,
  input  logic        time_sync,
  input  logic        s_ch_en,
  input  logic        rate_chk,
  input  logic [15:0] rlim,
  input  logic [15:0] rate_sel,      // latched rate of channel rlim_ch
  output logic [6:0]  esa_step,
  output logic [4:0]  defl_step,
  output logic        s_ch_eff,
  output logic        s_ch_auto,
  output logic        e_stp_stb,
  output logic        d_stp_stb,
  output logic        deflection_trig,
  output logic        e_step_trig,
  output logic        retrace_trig,
  output logic        sel_disable,
  output logic        evt_reset,
  output logic        rt_enable,
  output logic        rt_latch,
  output logic        rt_clr_n,
  output logic        defl_done,
  output logic        dac_load,
  output logic        esa_done,
  output logic        running
);
  localparam int unsigned SUB = DEFL_CYCLES / DSTB_PER_DEFL;
  typedef enum logic [2:0] {Q_WAIT, Q_START, Q_DEFL, Q_SETTLE, Q_RETRACE} qstate_t;
  qstate_t     st;
  logic [31:0] tcnt, sub_cnt, trig_cnt, estb_cnt, etrig_cnt;
  logic [2:0]  rseq;
  logic [31:0] sub_nxt;

  assign sub_nxt = (sub_cnt == 32'(SUB - 1)) ? '0 : sub_cnt + 1;

  assign s_ch_eff = s_ch_en | s_ch_auto;
  assign running  = (st != Q_WAIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= Q_WAIT; tcnt <= '0; sub_cnt <= '0; trig_cnt <= '0; estb_cnt <= '0; etrig_cnt <= '0;
      rseq <= '0; esa_step <= '0; defl_step <= '0; s_ch_auto <= 1'b0;
      e_stp_stb <= 1'b0; d_stp_stb <= 1'b0; deflection_trig <= 1'b0; e_step_trig <= 1'b0;
      retrace_trig <= 1'b0; sel_disable <= 1'b1; evt_reset <= 1'b0;
      rt_enable <= 1'b1; rt_latch <= 1'b0; rt_clr_n <= 1'b1;
      defl_done <= 1'b0; dac_load <= 1'b0; esa_done <= 1'b0;
    end else begin
      defl_done <= 1'b0;
      dac_load  <= 1'b0;
      esa_done  <= 1'b0;
      // pulse timers
      if (trig_cnt != 0) trig_cnt <= trig_cnt - 1; else deflection_trig <= 1'b0;
      if (estb_cnt != 0) estb_cnt <= estb_cnt - 1; else e_stp_stb <= 1'b0;
      if (etrig_cnt != 0) etrig_cnt <= etrig_cnt - 1; else begin e_step_trig <= 1'b0; retrace_trig <= 1'b0; end
      // rate-control sequence after each deflection step
      case (rseq)
        3'd1: begin rt_latch <= 1'b1; rseq <= 3'd2; end
        3'd2: begin rt_latch <= 1'b0; rt_clr_n <= 1'b0; rseq <= 3'd3; end
        3'd3: begin
          rt_clr_n  <= 1'b1; rt_enable <= 1'b1; rseq <= 3'd0;
          defl_done <= 1'b1;
          if (rate_chk) s_ch_auto <= (rlim > rate_sel);
        end
        default: ;
      endcase

      if (mode != 3'd3) begin
        st <= Q_WAIT;
        d_stp_stb <= 1'b0;
        sel_disable <= 1'b1;
      end else begin
        case (st)
          Q_WAIT: if (time_sync) begin
            st <= Q_START; tcnt <= '0;
            evt_reset <= 1'b1;
            rt_clr_n <= 1'b0;
            sel_disable <= 1'b0;
            e_stp_stb <= 1'b1; estb_cnt <= 32'(STB_CYCLES - 1);
            d_stp_stb <= 1'b1;
            esa_step <= '0; defl_step <= '0;
          end
          Q_START: begin
            tcnt <= tcnt + 1;
            if (tcnt == 32'(RESET_CYCLES - 1)) begin evt_reset <= 1'b0; rt_clr_n <= 1'b1; end
            if (tcnt == 32'(STB_CYCLES - 1)) d_stp_stb <= 1'b0;
            if (tcnt == 32'(2 * STB_CYCLES - 1)) begin
              d_stp_stb <= 1'b1;
              st <= Q_DEFL; tcnt <= '0; sub_cnt <= '0;
            end
          end
          Q_DEFL: begin
            if (esa_done) esa_step <= esa_step + 7'd1;  // after reporting it
            tcnt    <= tcnt + 1;
            sub_cnt   <= sub_nxt;
            d_stp_stb <= (sub_nxt < 32'(STB_CYCLES));
            if (tcnt == 32'(DEFL_CYCLES - 1)) begin
              tcnt <= '0;
              sub_cnt <= '0;
              deflection_trig <= 1'b1; trig_cnt <= 32'(TRIG_CYCLES - 1);
              rt_enable <= 1'b0; rseq <= 3'd1;
              if (defl_step == 5'(DEFL_STEPS / 2 - 1)) begin
                e_stp_stb <= 1'b1; estb_cnt <= 32'(STB_CYCLES - 1);
              end
              if (defl_step == 5'(DEFL_STEPS - 1)) begin
                e_stp_stb <= 1'b1; estb_cnt <= 32'(STB_CYCLES - 1);
                e_step_trig <= 1'b1; etrig_cnt <= 32'(TRIG_CYCLES - 1);
                sel_disable <= 1'b1;
                dac_load <= 1'b1;
                d_stp_stb <= 1'b0;
                st <= Q_SETTLE;
              end
              defl_step <= defl_step + 5'd1;
            end
          end
          Q_SETTLE: begin
            tcnt <= tcnt + 1;
            if (tcnt == 32'(SETTLE_CYCLES - 1)) begin
              tcnt      <= '0;
              esa_done  <= 1'b1;
              defl_step <= '0;
              s_ch_auto <= 1'b0;
              if (esa_step == 7'(ESA_STEPS - 1)) begin
                st <= Q_RETRACE;
                retrace_trig <= 1'b1; etrig_cnt <= 32'(TRIG_CYCLES - 1);
              end else begin
                sel_disable <= 1'b0;
                sub_cnt     <= '0;
                d_stp_stb   <= 1'b1;
                st <= Q_DEFL;
              end
            end
          end
          Q_RETRACE: if (!retrace_trig) begin
            esa_step <= '0;
            st <= Q_WAIT;
          end
          default: st <= Q_WAIT;
        endcase
      end
    end
  end
endmodule
