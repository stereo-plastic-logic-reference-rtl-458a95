// lb_regs: immediate-command register file of the logic board.
// Holds the ACTEL 1 control registers (00h-09h) and the event-selection
// registers of ACTEL 2 (41h-76h) that are written by "Logic Board Immediate
// Command" (8-bit register address, 8-bit data). Reset values are the
// register defaults of the reference; bits shown as "x" reset to 0 here.
// 3Fh is a no-operation, ESA_STEP, DEFL_STEP (62h/63h) and POS_RA (80h and
// up) are driven by the sweep and event logic and are not written here, and
// writes to unknown addresses are ignored (flagged on bad_addr). Every write
// to a register other than MODE_CTL and EVENT_CTL is reported on the log_*
// port for the register write log kept in logic-board RAM (0300h + address).
// The reference asks for mode 0 before other commands while in mode 3, with
// EVENT_CTL as the exception; that is a rule for the operator and is not
// enforced. Registered outputs, one write per clock.
// LOGIC_CTL_B bits 5..4 are not defined and always read 0.
module lb_regs
  import plastic_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr,
  input  logic [7:0] addr,
  input  logic [7:0] wdata,
  output lb_cfg_t    cfg,
  output logic       bad_addr,
  output logic       log_wr,
  output logic [7:0] log_addr,
  output logic [7:0] log_data
);
  function automatic lb_cfg_t defaults();
    lb_cfg_t d;
    d = '0;
    d.logic_ctl_a = 8'b0000_0011;
    d.logic_ctl_b = 8'b0000_0100;
    d.tac_pwr_n   = 2'b11;
    d.tac0_over   = 10'h3FF;
    d.tac2_over   = 10'h3FF;
    d.ssd_over    = 10'h3FF;
    d.sel_disable = 2'b11;
    d.stim_freq   = 16'hFFFF;
    return d;
  endfunction

  logic known;

  always_comb begin
    known = 1'b1;
    case (addr)
      8'h00, 8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06, 8'h07, 8'h08, 8'h09,
      8'h3F, 8'h41, 8'h42, 8'h43, 8'h44, 8'h45, 8'h46, 8'h47, 8'h48, 8'h49,
      8'h4A, 8'h4B, 8'h4C, 8'h4D, 8'h4E, 8'h4F, 8'h50, 8'h51, 8'h52, 8'h53,
      8'h54, 8'h55, 8'h56, 8'h57, 8'h60, 8'h61, 8'h70, 8'h71, 8'h72, 8'h75,
      8'h76: known = 1'b1;
      default: known = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg      <= defaults();
      bad_addr <= 1'b0;
      log_wr   <= 1'b0;
      log_addr <= '0;
      log_data <= '0;
    end else begin
      bad_addr <= wr && !known;
      log_wr   <= wr && known && addr != 8'h01 && addr != 8'h06 && addr != 8'h3F;
      log_addr <= addr;
      log_data <= wdata;
      if (wr) begin
        case (addr)
          8'h00: cfg.reset_ctl   <= wdata[2:0];
          8'h01: cfg.mode        <= wdata[2:0];
          8'h02: cfg.logic_ctl_a <= wdata;
          8'h03: cfg.logic_ctl_b <= {wdata[7:6], 2'b00, wdata[3:0]};
          8'h04: cfg.tac_pwr_n   <= wdata[1:0];
          8'h05: cfg.reg_seq     <= wdata[3:0];
          8'h06: cfg.s_ch_en     <= wdata[0];
          8'h07: begin cfg.rate_chk <= wdata[7]; cfg.rlim_ch <= wdata[4:0]; end
          8'h08: cfg.rlim[15:8]  <= wdata;
          8'h09: cfg.rlim[7:0]   <= wdata;
          8'h41: cfg.pos_ctrl    <= wdata[6:0];
          8'h42: cfg.pos_dis0    <= wdata[2:0];
          8'h43: cfg.pos_dis2    <= wdata;
          8'h44: cfg.tac0_ctrl   <= wdata[1:0];
          8'h45: cfg.tac0_dac    <= wdata;
          8'h46: cfg.tac2_ctrl   <= wdata[1:0];
          8'h47: cfg.tac2_dac    <= wdata;
          8'h48: cfg.tac0_under[9:8] <= wdata[1:0];
          8'h49: cfg.tac0_under[7:0] <= wdata;
          8'h4A: cfg.tac0_over[9:8]  <= wdata[1:0];
          8'h4B: cfg.tac0_over[7:0]  <= wdata;
          8'h4C: cfg.tac2_under[9:8] <= wdata[1:0];
          8'h4D: cfg.tac2_under[7:0] <= wdata;
          8'h4E: cfg.tac2_over[9:8]  <= wdata[1:0];
          8'h4F: cfg.tac2_over[7:0]  <= wdata;
          8'h50: cfg.ssd_ctrl    <= wdata[4:1];
          8'h51: cfg.ssd_cmd[15:8] <= wdata;
          8'h52: cfg.ssd_cmd[7:0]  <= wdata;
          8'h53: cfg.ssd_disable <= wdata[0];
          8'h54: cfg.ssd_under[9:8] <= wdata[1:0];
          8'h55: cfg.ssd_under[7:0] <= wdata;
          8'h56: cfg.ssd_over[9:8]  <= wdata[1:0];
          8'h57: cfg.ssd_over[7:0]  <= wdata;
          8'h60: cfg.sel_disable <= wdata[1:0];
          8'h61: begin cfg.tmode2 <= wdata[7]; cfg.tmode0 <= wdata[3:0]; end
          8'h70: cfg.stim_enable <= wdata[4:0];
          8'h71: cfg.stim_freq[15:8] <= wdata;
          8'h72: cfg.stim_freq[7:0]  <= wdata;
          8'h75: cfg.sel0_window <= wdata;
          8'h76: cfg.sel2_window <= wdata;
          default: ;
        endcase
      end
    end
  end
endmodule
