// lb_util_seq: sequencer of the logic board's util_dat words to the
// instrument controller. After each deflection step (defl_done) it sends a
// step word {s_ch, esa_step, 3'b000, defl_step-1} followed by the NRATES
// latched rate counters, read one by one through rd_idx/rd_data; after each
// energy step (esa_done) it sends the finished step {8'h00, s_ch, esa_step}.
// Words are handed to a serial transmitter through tx_start/tx_data and
// tx_ready (one word in flight). A request arriving while a burst runs is
// remembered (one of each kind) and served afterwards, energy step first.
// The reference gives the content (the esa step with bit 7 = s_ch_en and
// defl_step-1, then the rates; the previous esa step after e_step_trig);
// word order and the zero padding are this design's choices.
module lb_util_seq #(
  parameter int unsigned NRATES = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      defl_done,
  input  logic                      esa_done,
  input  logic [6:0]                esa_step,
  input  logic [4:0]                defl_step,
  input  logic                      s_ch,
  output logic [$clog2(NRATES)-1:0] rd_idx,
  input  logic [15:0]               rd_data,
  input  logic                      tx_ready,
  output logic                      tx_start,
  output logic [15:0]               tx_data,
  output logic [15:0]               words_sent
);
  typedef enum logic [1:0] {U_IDLE, U_HEAD, U_RATE, U_ESA} ustate_t;
  ustate_t   st;
  logic      pend_defl, pend_esa;
  logic [15:0] head_w, esa_w;
  logic [$clog2(NRATES):0] n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= U_IDLE; pend_defl <= 1'b0; pend_esa <= 1'b0; head_w <= '0; esa_w <= '0;
      n <= '0; rd_idx <= '0; tx_start <= 1'b0; tx_data <= '0; words_sent <= '0;
    end else begin
      tx_start <= 1'b0;
      if (defl_done) begin
        pend_defl <= 1'b1;
        head_w    <= {s_ch, esa_step, 3'b000, defl_step - 5'd1};
      end
      if (esa_done) begin
        pend_esa <= 1'b1;
        esa_w    <= {8'h00, s_ch, esa_step};
      end
      case (st)
        U_IDLE: if (tx_ready && !tx_start) begin
          if (pend_esa) begin
            pend_esa <= 1'b0; tx_data <= esa_w; tx_start <= 1'b1; words_sent <= words_sent + 1'b1;
            st <= U_ESA;
          end else if (pend_defl) begin
            pend_defl <= 1'b0; tx_data <= head_w; tx_start <= 1'b1; words_sent <= words_sent + 1'b1;
            n <= '0; rd_idx <= '0;
            st <= U_HEAD;
          end
        end
        U_HEAD, U_RATE: if (tx_ready && !tx_start) begin
          if (n == ($clog2(NRATES)+1)'(NRATES)) st <= U_IDLE;
          else begin
            tx_data    <= rd_data;
            tx_start   <= 1'b1;
            words_sent <= words_sent + 1'b1;
            n          <= n + 1'b1;
            rd_idx     <= rd_idx + 1'b1;
            st         <= U_RATE;
          end
        end
        U_ESA: if (tx_ready && !tx_start) st <= U_IDLE;
        default: st <= U_IDLE;
      endcase
    end
  end
endmodule
