// plastic_pkg: types and constants shared by the PLASTIC digital logic.
// Holds the 48-bit PHA event word (the word the event-selection logic builds
// and the classifier stores), the 16-bit classifier bins_dat word, the
// instrument-controller command fields and the telemetry message IDs. Field
// layouts and code values follow the instrument's logic reference; the
// enum names are this design's own. Linted on its own, the package reports
// its constants as unused; the modules that import it use them.
package plastic_pkg;

  // 48-bit PHA word, MSB first: SWPE 47..41, SWPD 40..36, QUADRANT 35..34,
  // SSD_ID 33..30, SSDE 29..20, TOF 19..10, POSITION 9..4, SECTION 3..2,
  // SPARE (to classifier) / PRIORITY (stored) 1..0.
  typedef struct packed {
    logic [6:0] swpe;
    logic [4:0] swpd;
    logic [1:0] quadrant;
    logic [3:0] ssd_id;
    logic [9:0] ssde;
    logic [9:0] tof;
    logic [5:0] position;
    logic [1:0] section;
    logic [1:0] spare;
  } pha_word_t;

  // Instrument sections carried in the PHA word.
  localparam logic [1:0] SEC_SW_MAIN = 2'd0;
  localparam logic [1:0] SEC_SW_S    = 2'd1;
  localparam logic [1:0] SEC_WAP_SSD = 2'd2;
  localparam logic [1:0] SEC_WAP     = 2'd3;

  localparam logic [9:0] TOF_NONE = 10'h3FF;  // 1023 = no time of flight

  // bins_dat word read from the bins tables (two bytes).
  typedef struct packed {
    logic [1:0] pha_pri;    // PHA priority rate
    logic [2:0] supra_noe;  // 111 = do not bin
    logic [3:0] supra_wid;  // 1111 = do not bin
    logic [3:0] sw_zgr2;    // 1111 = do not bin
    logic       sw_all;     // 1 = do not bin
    logic [1:0] sw_halpha;  // 11 = do not bin
  } bins_dat_t;

  // Instrument-controller command word: 4-bit module, 4-bit command, 16-bit data.
  typedef struct packed {
    logic [3:0]  modaddr;
    logic [3:0]  cmd;
    logic [15:0] data;
  } ic_cmd_t;

  localparam logic [3:0] MOD_IC      = 4'b0001;
  localparam logic [3:0] MOD_IC_MEM  = 4'b0010;
  localparam logic [3:0] MOD_LB_IMM  = 4'b0011;
  localparam logic [3:0] MOD_LB_MEM  = 4'b0100;
  localparam logic [3:0] MOD_IDPU    = 4'b1111;

  // Telemetry MESSAGE_ID codes (6 MSBs of the header word).
  localparam logic [5:0] MID_ERR_CNT  = 6'b000001;
  localparam logic [5:0] MID_CTRL_RD  = 6'b000010;
  localparam logic [5:0] MID_STAT_RD  = 6'b000011;
  localparam logic [5:0] MID_RX_CNT   = 6'b001001;
  localparam logic [5:0] MID_EX_CNT   = 6'b001010;

  // Register fields of the logic board (ACTEL 1, 00h-09h) and of the event
  // selection logic (ACTEL 2, 41h-76h), as written by immediate commands.
  typedef struct packed {
    logic [2:0]  reset_ctl;    // 00h reset_hv, reset3, reset2
    logic [2:0]  mode;         // 01h MODE_CTL
    logic [7:0]  logic_ctl_a;  // 02h
    logic [7:0]  logic_ctl_b;  // 03h
    logic [1:0]  tac_pwr_n;    // 04h tac2_pwr_n, tac0_pwr_n
    logic [3:0]  reg_seq;      // 05h
    logic        s_ch_en;      // 06h EVENT_CTL
    logic        rate_chk;     // 07h bit 7
    logic [4:0]  rlim_ch;      // 07h bits 4..0
    logic [15:0] rlim;         // 08h/09h
    logic [6:0]  pos_ctrl;     // 41h
    logic [2:0]  pos_dis0;     // 42h pos1_1, pos1_0, ra_trig
    logic [7:0]  pos_dis2;     // 43h pos3_3..pos2_0
    logic [1:0]  tac0_ctrl;    // 44h force_rst, write_tac
    logic [7:0]  tac0_dac;     // 45h
    logic [1:0]  tac2_ctrl;    // 46h
    logic [7:0]  tac2_dac;     // 47h
    logic [9:0]  tac0_under;   // 48h/49h
    logic [9:0]  tac0_over;    // 4Ah/4Bh
    logic [9:0]  tac2_under;   // 4Ch/4Dh
    logic [9:0]  tac2_over;    // 4Eh/4Fh
    logic [3:0]  ssd_ctrl;     // 50h bits 4..1: force reset, force sync, send cmd, send hkc
    logic [15:0] ssd_cmd;      // 51h/52h
    logic        ssd_disable;  // 53h
    logic [9:0]  ssd_under;    // 54h/55h
    logic [9:0]  ssd_over;     // 56h/57h
    logic [1:0]  sel_disable;  // 60h sel2_disable, sel0_disable
    logic        tmode2;       // 61h bit 7
    logic [3:0]  tmode0;       // 61h bits 3..0
    logic [4:0]  stim_enable;  // 70h ra, ssd, tac0, tac2, pos
    logic [15:0] stim_freq;    // 71h/72h
    logic [7:0]  sel0_window;  // 75h
    logic [7:0]  sel2_window;  // 76h
  } lb_cfg_t;

  // Energy compression 10 -> 8 bits: Ec = Ed below 96, else
  // Ec = floor(Ed / 2^L) + 48*L with L = floor(log2(Ed/48)).
  function automatic logic [7:0] compress_energy(input logic [9:0] ed);
    logic [2:0] l;
    logic [9:0] sh;
    if      (ed < 10'd96)  l = 3'd0;
    else if (ed < 10'd192) l = 3'd1;
    else if (ed < 10'd384) l = 3'd2;
    else if (ed < 10'd768) l = 3'd3;
    else                   l = 3'd4;
    sh = ed >> l;
    return 8'(sh + 10'(6'd48 * l));
  endfunction

endpackage
