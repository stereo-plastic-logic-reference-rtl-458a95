// ssd_link: logic-board side of the optical link to the SSD board.
// One shared clock line, cmd_clk, serves two kinds of transfer:
//  - command: the 16-bit word of the SSD_CMD_H/SSD_CMD_L registers is sent on
//    cmd_in MSB first. cmd_in changes when cmd_clk falls and is sampled by the
//    SSD board when it rises. cmd_strobe rises with the leading edge of the
//    last bit (bit 0) and stays high for one and a half cmd_clk periods. A
//    command is started by a 0-to-1 change of the "send cmd" bit of SSD_CTRL;
//  - read: ten cmd_clk pulses with cmd_in low and no strobe. The SSD board
//    answers on dat1 and dat0, each with a high start bit, eight data bits
//    MSB first and a low stop bit, changing on the falling edge of cmd_clk.
//    Each line has its own receiver: it synchronises the line (two flops),
//    starts on the rising edge of the start bit and samples each data bit
//    half a bit time later, so the two lines may be skewed from the clock and
//    from each other by up to about a quarter bit. rd_req (the energy read of
//    the SW event logic) answers with rd_done/rd_word; a 0-to-1 change of the
//    "send hkc" bit reads a housekeeping/status word into hk_word/hk_valid.
//    rd_err is set with rd_done/hk_valid if a line never gave eight bits.
// A 0-to-1 change of "force reset" gives a 1 us m_reset pulse (M_RESET is
// 1 us wide in the reference); "force sync" gives a sync pulse of the same
// length. All three lines are low when idle.
// Follows the reference: bit order, edge use, strobe placement and width, the
// ten-clock read with start and stop bits, the 16-bit command word from
// 51h/52h and the SSD_CTRL bits. This design's choices: cmd_clk = clk/DIV
// (3.2 MHz, the rate of the board's other serial links), dat1 carries
// bits 15..8 and dat0 bits 7..0, one transfer at a time (read, then
// housekeeping, then command when several are waiting), edge-triggered
// control bits, and a read lasting 11 cmd_clk periods (one period of margin
// for skew after the tenth pulse). A command takes 16.5 periods.
module ssd_link #(
  parameter int unsigned DIV           = 8,   // clk cycles per cmd_clk period
  parameter int unsigned PULSE_CYCLES  = 26   // m_reset / sync width (1 us)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  ctrl,        // SSD_CTRL bits 4..1: force reset, force sync, send cmd, send hkc
  input  logic [15:0] cmd,         // SSD_CMD_H & SSD_CMD_L
  input  logic        rd_req,      // energy read request (one-clock pulse)
  output logic        rd_done,
  output logic [15:0] rd_word,
  output logic        hk_valid,
  output logic [15:0] hk_word,
  output logic        rd_err,
  output logic        busy,
  output logic        cmd_clk,
  output logic        cmd_in,
  output logic        cmd_strobe,
  input  logic        dat0,
  input  logic        dat1,
  output logic        m_reset,
  output logic        sync
);
  localparam int unsigned H      = DIV / 2;            // clocks per half period
  localparam int unsigned HW     = $clog2(H + 1);
  localparam int unsigned CW     = $clog2(DIV + H);
  localparam int unsigned FIRST  = DIV + H - 1;        // start edge seen -> middle of first data bit
  localparam int unsigned CMD_HALVES = 33;             // 16 bits + half period of strobe
  localparam int unsigned RD_HALVES  = 22;             // 10 pulses + one period of margin

  initial begin
    assert (DIV >= 4 && DIV % 2 == 0) else $error("ssd_link: DIV must be even and at least 4");
  end

  typedef enum logic [1:0] {L_IDLE, L_CMD, L_READ} lst_t;
  lst_t st;

  logic [3:0]  ctrl_q;
  logic        rd_pend, hk_pend, cmd_pend, is_hk;
  logic [HW-1:0] ph;                 // clock within the half period
  logic [5:0]  half;                 // half period index
  logic [14:0] sr;                   // bits still to send after cmd_in
  logic [$clog2(PULSE_CYCLES+1)-1:0] rcnt, scnt;

  wire [3:0] rise = ctrl & ~ctrl_q;
  wire       half_end = (ph == HW'(H - 1));

  // ---- line receivers ----
  logic [1:0] s0, s1;                // synchronisers, [1] is the settled value
  logic       p0, p1;
  logic       rx_en;
  logic [7:0] w0, w1;
  logic [3:0] n0, n1;                // bits received, 0..8
  logic       a0, a1;                // receiver running
  logic [CW-1:0] c0, c1;           // clocks to the next sample

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0 <= '0; s1 <= '0; p0 <= 1'b0; p1 <= 1'b0;
      w0 <= '0; w1 <= '0; n0 <= '0; n1 <= '0; a0 <= 1'b0; a1 <= 1'b0; c0 <= '0; c1 <= '0;
    end else begin
      s0 <= {s0[0], dat0};
      s1 <= {s1[0], dat1};
      p0 <= s0[1];
      p1 <= s1[1];
      if (!rx_en) begin
        n0 <= '0; n1 <= '0; a0 <= 1'b0; a1 <= 1'b0;
      end else begin
        if (!a0 && n0 == 4'd0 && s0[1] && !p0) begin a0 <= 1'b1; c0 <= CW'(FIRST); end
        else if (a0) begin
          c0 <= (c0 == '0) ? CW'(DIV - 1) : c0 - 1'b1;
          if (c0 == '0) begin
            w0 <= {w0[6:0], s0[1]};
            n0 <= n0 + 4'd1;
            if (n0 == 4'd7) a0 <= 1'b0;
          end
        end
        if (!a1 && n1 == 4'd0 && s1[1] && !p1) begin a1 <= 1'b1; c1 <= CW'(FIRST); end
        else if (a1) begin
          c1 <= (c1 == '0) ? CW'(DIV - 1) : c1 - 1'b1;
          if (c1 == '0) begin
            w1 <= {w1[6:0], s1[1]};
            n1 <= n1 + 4'd1;
            if (n1 == 4'd7) a1 <= 1'b0;
          end
        end
      end
    end
  end

  assign busy = (st != L_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= L_IDLE; ctrl_q <= '0; rd_pend <= 1'b0; hk_pend <= 1'b0; cmd_pend <= 1'b0; is_hk <= 1'b0;
      ph <= '0; half <= '0; sr <= '0; rx_en <= 1'b0;
      cmd_clk <= 1'b0; cmd_in <= 1'b0; cmd_strobe <= 1'b0;
      rd_done <= 1'b0; rd_word <= '0; hk_valid <= 1'b0; hk_word <= '0; rd_err <= 1'b0;
      rcnt <= '0; scnt <= '0; m_reset <= 1'b0; sync <= 1'b0;
    end else begin
      ctrl_q   <= ctrl;
      rd_done  <= 1'b0;
      hk_valid <= 1'b0;
      if (rd_req)  rd_pend  <= 1'b1;
      if (rise[0]) hk_pend  <= 1'b1;
      if (rise[1]) cmd_pend <= 1'b1;

      // reset and sync pulses
      if (rise[3]) rcnt <= ($clog2(PULSE_CYCLES+1))'(PULSE_CYCLES);
      else if (rcnt != 0) rcnt <= rcnt - 1'b1;
      m_reset <= rise[3] || rcnt > 1;
      if (rise[2]) scnt <= ($clog2(PULSE_CYCLES+1))'(PULSE_CYCLES);
      else if (scnt != 0) scnt <= scnt - 1'b1;
      sync <= rise[2] || scnt > 1;

      case (st)
        L_IDLE: begin
          ph <= '0; half <= '0;
          if (rd_pend || hk_pend) begin
            st    <= L_READ;
            is_hk <= !rd_pend;
            if (rd_pend) rd_pend <= 1'b0; else hk_pend <= 1'b0;
            rx_en <= 1'b1;
          end else if (cmd_pend) begin
            st       <= L_CMD;
            cmd_pend <= 1'b0;
            sr       <= cmd[14:0];
            cmd_in   <= cmd[15];
          end
        end
        L_CMD: begin
          ph <= half_end ? '0 : ph + 1'b1;
          if (half_end) begin
            half <= half + 6'd1;
            // next half: odd halves have the clock high
            cmd_clk <= (half < 6'(CMD_HALVES - 2)) && !half[0];
            if (half[0] && half < 6'(CMD_HALVES - 1)) begin
              // a bit ends with this half: next bit, or low after bit 0
              cmd_in <= (half < 6'(CMD_HALVES - 2)) ? sr[14] : 1'b0;
              sr     <= {sr[13:0], 1'b0};
            end
            cmd_strobe <= (half >= 6'(CMD_HALVES - 4)) && (half < 6'(CMD_HALVES - 1));
            if (half == 6'(CMD_HALVES - 1)) begin
              st <= L_IDLE; cmd_clk <= 1'b0; cmd_in <= 1'b0; cmd_strobe <= 1'b0;
            end
          end
        end
        L_READ: begin
          ph <= half_end ? '0 : ph + 1'b1;
          if (half_end) begin
            half    <= half + 6'd1;
            cmd_clk <= (half < 6'd19) && !half[0];
            if (half == 6'(RD_HALVES - 1)) begin
              st    <= L_IDLE;
              rx_en <= 1'b0;
              rd_err <= (n0 != 4'd8) || (n1 != 4'd8);
              if (is_hk) begin hk_word <= {w1, w0}; hk_valid <= 1'b1; end
              else       begin rd_word <= {w1, w0}; rd_done  <= 1'b1; end
            end
          end
        end
        default: st <= L_IDLE;
      endcase
    end
  end
endmodule
