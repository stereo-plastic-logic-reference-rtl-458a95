// pha_tx: sends PHA words from the event logic to the classifier.
// Holds one pending word from the SSD-quadrant selector (sw_*) and one from
// the WAP selector (wap_*); a word that arrives while its slot is still
// full is dropped and counted on "dropped". When the classifier is not busy
// the next word (SSD quadrants first, then WAP, alternating when both wait)
// is shifted out on six lines, byte k of the word on ser_dat[k], MSB first,
// with ser_clk = clk/2 (12.8 MHz) running only while ser_gat is high. The
// gate and the data change when ser_clk rises, and the classifier samples
// on the falling edge, as the reference's classifier interface requires.
// After a word the sender waits for the classifier's busy to rise (or
// BUSY_WAIT clocks) and fall again. A word occupies the link for 16 clocks.
// Slot handling, the alternation and the drop counter are this design's
// choices; the reference does not say how two selectors share the link.
module pha_tx
  import plastic_pkg::*;
#(
  parameter int unsigned BUSY_WAIT = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sw_valid,
  input  pha_word_t  sw_word,
  input  logic       wap_valid,
  input  pha_word_t  wap_word,
  input  logic       busy,          // from the classifier (asynchronous)
  output logic       ser_clk,
  output logic       ser_gat,
  output logic [5:0] ser_dat,
  output logic [7:0] dropped,
  output logic [15:0] sent
);
  typedef enum logic [1:0] {T_IDLE, T_SHIFT, T_WAITHI, T_WAITLO} tstate_t;
  tstate_t    st;
  pha_word_t  sw_q, wap_q, cur;
  logic       sw_p, wap_p, last_wap;
  logic [4:0] ph;
  logic [1:0] busy_s;
  logic [4:0] wcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_IDLE; sw_q <= '0; wap_q <= '0; cur <= '0; sw_p <= 1'b0; wap_p <= 1'b0;
      last_wap <= 1'b1; ph <= '0; busy_s <= '0; wcnt <= '0;
      ser_clk <= 1'b0; ser_gat <= 1'b0; ser_dat <= '0; dropped <= '0; sent <= '0;
    end else begin
      busy_s <= {busy_s[0], busy};
      if (sw_valid) begin
        if (sw_p) dropped <= dropped + 8'd1;
        else begin sw_q <= sw_word; sw_p <= 1'b1; end
      end
      if (wap_valid) begin
        if (wap_p) dropped <= dropped + 8'd1;
        else begin wap_q <= wap_word; wap_p <= 1'b1; end
      end
      case (st)
        T_IDLE: if (!busy_s[1] && (sw_p || wap_p)) begin
          if (sw_p && (!wap_p || last_wap)) begin
            cur <= sw_q; sw_p <= 1'b0; last_wap <= 1'b0;
          end else begin
            cur <= wap_q; wap_p <= 1'b0; last_wap <= 1'b1;
          end
          st <= T_SHIFT;
          ph <= '0;
        end
        T_SHIFT: begin
          ph <= ph + 5'd1;
          if (ph[0] == 1'b0) begin
            if (ph == 5'd16) begin
              ser_gat <= 1'b0;
              ser_dat <= '0;
              st      <= T_WAITHI;
              wcnt    <= '0;
              sent    <= sent + 16'd1;
            end else begin
              ser_clk <= 1'b1;
              ser_gat <= 1'b1;
              for (int k = 0; k < 6; k++) ser_dat[k] <= cur[8*k + 7 - int'(ph[3:1])];
            end
          end else begin
            ser_clk <= 1'b0;
          end
        end
        T_WAITHI: begin
          wcnt <= wcnt + 5'd1;
          if (busy_s[1] || wcnt == 5'(BUSY_WAIT - 1)) st <= T_WAITLO;
        end
        T_WAITLO: if (!busy_s[1]) st <= T_IDLE;
        default: st <= T_IDLE;
      endcase
    end
  end
endmodule
