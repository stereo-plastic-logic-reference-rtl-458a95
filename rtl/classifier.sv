// classifier: event classifier (the classifier board PGA).
// Receives a 48-bit PHA word over six serial lines, classifies it through
// three external EEPROM table sets and accumulates it into 16-bit bin
// counters in one of two external 32k x 8 bins RAMs, then stores the word
// itself, tagged with its priority, in the PHA area of the same RAM.
//
// Processing, after ser_gat falls (ser_gat is synchronised into clk):
//   1. latch the word and compress SSDE from 10 to 8 bits;
//   2. read Nm from the mass table (EEPROM 0 or 1 by tof[9]),
//      Nq from the M/Q table (EEPROM 2), then the two bytes of bins_dat from
//      the bins table (EEPROM 3);
//   3. read-modify-write six 16-bit bin counters (low byte first), addresses
//      from cls_bins_addr, unused bins going to a scratch word;
//   4. write the six bytes of the stored PHA word (spare bits replaced by
//      the priority) at cls_pha_addr's slot.
// busy is high for PROC_CYCLES = 139 clk cycles per event (the reference's
// figure), counted from the clock that sees ser_gat low; that total comes
// from this design's access timing: EE_CYC = 4 clocks per EEPROM read
// (120 ns parts at 25.6 MHz), RAM_CYC = 4 clocks per RAM access, plus one
// clock each for latching, address forming and finishing. After reset busy
// stays high for INIT_CYCLES (about 8 us) before the first event.
// Memory buses are split into separate read and write data ports instead of
// bidirectional pins; chip selects and strobes are active low. ram_sel
// picks bins RAM A (0) or B (1); a change of ram_sel while idle empties the
// PHA-slot counters. Test outputs tab_tri, bins_tri, dat2_w and spare follow
// the reference's definitions.
module classifier
  import plastic_pkg::*;
#(
  parameter int unsigned EE_CYC      = 4,
  parameter int unsigned RAM_CYC     = 4,
  parameter int unsigned INIT_CYCLES = 205
) (
  input  logic        clk,        // 25.6 MHz
  input  logic        n_rst,
  input  logic        ser_clk,    // 12.8 MHz, unrelated to clk
  input  logic        ser_gat,
  input  logic [5:0]  ser_dat,
  input  logic        ram_sel,
  output logic        busy,
  // classifier table EEPROMs (4 x 128k x 8)
  output logic [16:0] ee_addr,
  output logic [3:0]  ee_cs_n,
  output logic        ee_oe_n,
  input  logic [7:0]  ee_rdata,
  // bins RAMs (2 x 32k x 8)
  output logic [14:0] ram_addr,
  output logic [1:0]  ram_cs_n,
  output logic        ram_oe_n,
  output logic        ram_we_n,
  output logic [7:0]  ram_wdata,
  input  logic [7:0]  ram_rdata,
  // test outputs
  output logic        tab_tri,
  output logic        dat2_w,
  output logic        bins_tri,
  output logic        spare
);
  typedef enum logic [3:0] {
    S_INIT, S_IDLE, S_LATCH, S_EE_MASS, S_EE_MQ, S_EE_BLO, S_EE_BHI,
    S_ADDR, S_CNT, S_PHA, S_DONE
  } state_t;

  state_t      state;
  logic [47:0] rx_word;
  pha_word_t   word;
  logic [7:0]  ecomp, nq;
  logic [6:0]  nm;
  bins_dat_t   bdat;
  logic [4:0]  pos;
  logic [14:0] baddr [6];
  logic [14:0] baddr_q [6];
  logic [11:0] pha_base;
  logic [7:0]  cyc;
  logic [2:0]  idx;     // counter number (S_CNT) or byte number (S_PHA)
  logic [1:0]  acc;     // 0 rd lo, 1 rd hi, 2 wr lo, 3 wr hi
  logic [15:0] cval;
  logic [2:0]  gat_s;
  logic [1:0]  sel_s;
  logic        sel_q;
  logic        pha_inc;
  pha_word_t   stored;

  cls_pha_rx u_rx (.ser_clk, .ser_gat, .ser_dat, .word(rx_word));

  cls_pos_bin u_pos (.quadrant(word.quadrant), .position(word.position),
                     .section(word.section), .pos);

  cls_bins_addr u_baddr (.bdat, .pos, .swpd(word.swpd), .section(word.section),
                         .addr(baddr));

  cls_pha_addr u_paddr (.clk, .rst_n(n_rst), .clr(state == S_IDLE && sel_s[1] != sel_q),
                        .inc(pha_inc), .section1(word.section[1]),
                        .pha_rates(bdat.pha_pri), .base(pha_base));

  always_comb begin
    stored       = word;
    stored.spare = bdat.pha_pri;
  end

  wire last_ee  = (cyc == 8'(EE_CYC - 1));
  wire last_ram = (cyc == 8'(RAM_CYC - 1));

  always_ff @(posedge clk or negedge n_rst) begin
    if (!n_rst) begin
      state   <= S_INIT;
      busy    <= 1'b1;
      cyc     <= '0;
      idx     <= '0;
      acc     <= '0;
      word    <= '0;
      ecomp   <= '0;
      nm      <= '0;
      nq      <= '0;
      bdat    <= '0;
      cval    <= '0;
      gat_s   <= '0;
      sel_s   <= '0;
      sel_q   <= 1'b0;
      pha_inc <= 1'b0;
      for (int i = 0; i < 6; i++) baddr_q[i] <= '0;
    end else begin
      gat_s   <= {gat_s[1:0], ser_gat};
      sel_s   <= {sel_s[0], ram_sel};
      pha_inc <= 1'b0;
      case (state)
        S_INIT: begin
          cyc <= cyc + 8'd1;
          if (cyc == 8'(INIT_CYCLES - 1)) begin
            state <= S_IDLE;
            busy  <= 1'b0;
            sel_q <= sel_s[1];
            cyc   <= '0;
          end
        end
        S_IDLE: begin
          sel_q <= sel_s[1];
          if (gat_s[2] && !gat_s[1]) begin
            word  <= pha_word_t'(rx_word);
            state <= S_LATCH;
            busy  <= 1'b1;
          end
        end
        S_LATCH: begin
          ecomp <= compress_energy(word.ssde);
          state <= S_EE_MASS;
          cyc   <= '0;
        end
        S_EE_MASS, S_EE_MQ, S_EE_BLO, S_EE_BHI: begin
          cyc <= cyc + 8'd1;
          if (last_ee) begin
            cyc <= '0;
            unique case (state)
              S_EE_MASS: begin nm <= ee_rdata[6:0]; state <= S_EE_MQ;  end
              S_EE_MQ:   begin nq <= ee_rdata;              state <= S_EE_BLO; end
              S_EE_BLO:  begin bdat[7:0]  <= ee_rdata;      state <= S_EE_BHI; end
              default:   begin bdat[15:8] <= ee_rdata;      state <= S_ADDR;   end
            endcase
          end
        end
        S_ADDR: begin
          for (int i = 0; i < 6; i++) baddr_q[i] <= baddr[i];
          state <= S_CNT;
          idx   <= '0;
          acc   <= '0;
          cyc   <= '0;
        end
        S_CNT: begin
          cyc <= cyc + 8'd1;
          if (last_ram) begin
            cyc <= '0;
            case (acc)
              2'd0: cval[7:0]  <= ram_rdata;
              2'd1: cval[15:8] <= ram_rdata;
              default: ;
            endcase
            if (acc == 2'd1) cval <= {ram_rdata, cval[7:0]} + 16'd1;
            acc <= acc + 2'd1;
            if (acc == 2'd3) begin
              if (idx == 3'd5) begin
                idx   <= '0;
                state <= S_PHA;
              end else begin
                idx <= idx + 3'd1;
              end
            end
          end
        end
        S_PHA: begin
          cyc <= cyc + 8'd1;
          if (last_ram) begin
            cyc <= '0;
            if (idx == 3'd5) begin
              state   <= S_DONE;
              pha_inc <= 1'b1;
            end else begin
              idx <= idx + 3'd1;
            end
          end
        end
        S_DONE: begin
          state <= S_IDLE;
          busy  <= 1'b0;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Memory strobes. EEPROM reads hold address and select for the whole
  // access; RAM writes pulse we_n in the middle clocks of the access so that
  // address and data are set up before and held after the strobe.
  wire ee_phase  = state inside {S_EE_MASS, S_EE_MQ, S_EE_BLO, S_EE_BHI};
  wire ram_phase = state inside {S_CNT, S_PHA};
  wire ram_wr    = (state == S_PHA) || (state == S_CNT && acc[1]);

  always_comb begin
    ee_addr = '0;
    ee_cs_n = 4'b1111;
    case (state)
      S_EE_MASS: begin
        ee_addr = {word.tof[8:0], ecomp};
        ee_cs_n = word.tof[9] ? 4'b1101 : 4'b1110;
      end
      S_EE_MQ: begin
        ee_addr = {word.tof, word.swpe};
        ee_cs_n = 4'b1011;
      end
      S_EE_BLO, S_EE_BHI: begin
        ee_addr = {word.quadrant[1], nm, nq, state == S_EE_BHI};
        ee_cs_n = 4'b0111;
      end
      default: ;
    endcase
    ee_oe_n = !ee_phase;

    ram_addr  = '0;
    ram_wdata = '0;
    if (state == S_CNT) begin
      ram_addr  = baddr_q[idx] | 15'(acc[0]);
      ram_wdata = acc[0] ? cval[15:8] : cval[7:0];
    end else if (state == S_PHA) begin
      ram_addr  = {pha_base, idx[2:1], idx[0]};
      ram_wdata = stored[8*idx +: 8];
    end
    ram_cs_n = ram_phase ? (sel_q ? 2'b01 : 2'b10) : 2'b11;
    ram_oe_n = !(ram_phase && !ram_wr);
    ram_we_n = !(ram_phase && ram_wr && cyc != 8'd0 && !last_ram);
  end

  assign tab_tri  = !ee_phase;
  assign bins_tri = !ram_phase;
  assign dat2_w   = ram_phase && ram_wr;
  assign spare    = rx_word[0];

endmodule
