// wap_event: event selection for the non-SSD WAP quadrants 2 and 3.
// A TAC2 start flag opens an event (unless sel2_disable blanks it); the
// eight position channels pos2_0..pos3_3 and the TAC2 stop coincidence
// (sfr) are then latched until sfr arrives or the sel2 window of
// (sel2_window+1) clocks ends. The event is judged as in the reference:
// no position pulses w_no_pos, several pulse w_mult_pos; with tmode2 = 0
// either aborts the event, with tmode2 = 1 a missing sfr aborts it. Then the
// TAC2 ADC is read (adc_req/adc_done handshake); TOF = {~ofw_n, adc[8:0]},
// and an overflow or a TOF outside [tac2_under, tac2_over] aborts. A valid
// event pulses w_valid and presents a PHA word (quadrant 2 or 3, position
// 8/24/40/56 for the anode within the quadrant, section 3). Every event,
// valid or aborted, ends with a tac2_reset pulse of RESET_CYCLES clocks
// (1 us at 25.6 MHz) with all latches cleared. Rate pulses for sf2, sfr2,
// stp2 and the enabled position channels are produced for every input
// pulse, independent of the event. Inputs are taken as synchronous
// one-clock pulses (this design's choice). With tmode2 = 1 the reference
// gives both "quadrant 2, position 8" and "position 0"; this design uses
// position 8, which also matches its PHA word table.
// The WAP quadrants have no SSDs: SSD_ID, SSDE and the spare bits of its
// PHA words are constant 0, and the position rate pulses follow the inputs.
module wap_event
  import plastic_pkg::*;
#(
  parameter int unsigned RESET_CYCLES = 26
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration
  input  logic        sel2_disable,
  input  logic [7:0]  sel2_window,
  input  logic        tmode2,
  input  logic [7:0]  pos_dis2,      // bit i disables channel i (pos2_0 = bit 0 ... pos3_3 = bit 7)
  input  logic [9:0]  tac2_under,
  input  logic [9:0]  tac2_over,
  input  logic [6:0]  esa_step,
  input  logic [4:0]  defl_step,
  // TAC2 board and position anodes
  input  logic        tac2_sf,
  input  logic        tac2_sfr,
  input  logic        tac2_stp,
  input  logic [7:0]  pos,           // pos3_3..pos2_0 packed as pos[7:0] = {pos3_3..pos3_0, pos2_3..pos2_0}
  output logic        tac2_reset,
  output logic        adc_req,
  input  logic        adc_done,
  input  logic [8:0]  adc_data,
  input  logic        ofw_n,
  // results
  output logic        pha_valid,
  output pha_word_t   pha,
  output logic [13:0] rates          // rt(13..0): w_no_pos, w_mult_pos, w_valid, sf2, sfr2, stp2, pos2_0..pos3_3
);
  typedef enum logic [2:0] {W_IDLE, W_WINDOW, W_EVAL, W_ADC, W_CHECK, W_RESET} wstate_t;
  wstate_t     st;
  logic [7:0]  plat;
  logic        sfr_lat;
  logic [8:0]  wcnt;
  logic [7:0]  rcnt;
  logic [9:0]  tof;
  logic [3:0]  npos;
  logic [2:0]  pidx;
  logic        no_pos_p, mult_pos_p, valid_p;
  logic [7:0]  pos_en;

  assign pos_en = pos & ~pos_dis2;

  always_comb begin
    npos = '0;
    pidx = '0;
    for (int i = 0; i < 8; i++) if (plat[i]) begin npos = npos + 4'd1; pidx = 3'(i); end
  end

  // rt(7..0) are pos2_0..pos3_3 in that order, i.e. rt(7-i) is channel i
  always_comb begin
    rates = '0;
    rates[13] = no_pos_p;
    rates[12] = mult_pos_p;
    rates[11] = valid_p;
    rates[10] = tac2_sf;
    rates[9]  = tac2_sfr;
    rates[8]  = tac2_stp;
    for (int i = 0; i < 8; i++) rates[7 - i] = pos_en[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= W_IDLE; plat <= '0; sfr_lat <= 1'b0; wcnt <= '0; rcnt <= '0; tof <= '0;
      tac2_reset <= 1'b0; adc_req <= 1'b0; pha_valid <= 1'b0; pha <= '0;
      no_pos_p <= 1'b0; mult_pos_p <= 1'b0; valid_p <= 1'b0;
    end else begin
      pha_valid  <= 1'b0;
      no_pos_p   <= 1'b0;
      mult_pos_p <= 1'b0;
      valid_p    <= 1'b0;
      adc_req    <= 1'b0;
      case (st)
        W_IDLE: if (tac2_sf) begin
          if (sel2_disable) begin
            st <= W_RESET; rcnt <= '0; tac2_reset <= 1'b1;
          end else begin
            st <= W_WINDOW; wcnt <= '0; plat <= '0; sfr_lat <= 1'b0;
          end
        end
        W_WINDOW: begin
          plat    <= plat | pos_en;
          sfr_lat <= sfr_lat | tac2_sfr;
          wcnt    <= wcnt + 9'd1;
          if (tac2_sfr || sfr_lat || wcnt == {1'b0, sel2_window}) st <= W_EVAL;
        end
        W_EVAL: begin
          no_pos_p   <= (npos == 0);
          mult_pos_p <= (npos > 1);
          if ((!tmode2 && npos != 4'd1) || (tmode2 && !sfr_lat)) begin
            st <= W_RESET; rcnt <= '0; tac2_reset <= 1'b1;
          end else begin
            st <= W_ADC; adc_req <= 1'b1;
          end
        end
        W_ADC: if (adc_done) begin
          tof <= {~ofw_n, adc_data};
          st  <= W_CHECK;
        end
        W_CHECK: begin
          if (!tof[9] && tof >= tac2_under && tof <= tac2_over) begin
            valid_p      <= 1'b1;
            pha_valid    <= 1'b1;
            pha          <= '0;
            pha.swpe     <= esa_step;
            pha.swpd     <= defl_step;
            pha.tof      <= tof;
            pha.section  <= SEC_WAP;
            if (tmode2 || npos != 4'd1) begin
              pha.quadrant <= 2'b10;
              pha.position <= 6'b001000;
            end else begin
              pha.quadrant <= {1'b1, pidx[2]};
              pha.position <= {pidx[1:0], 4'b1000};
            end
          end
          st <= W_RESET; rcnt <= '0; tac2_reset <= 1'b1;
        end
        W_RESET: begin
          plat <= '0; sfr_lat <= 1'b0;
          rcnt <= rcnt + 8'd1;
          if (rcnt == 8'(RESET_CYCLES - 1)) begin
            tac2_reset <= 1'b0;
            st <= W_IDLE;
          end
        end
        default: st <= W_IDLE;
      endcase
    end
  end
endmodule
