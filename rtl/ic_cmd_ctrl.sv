// ic_cmd_ctrl: command decoder, counters and registers of the instrument
// controller.
// Takes each received command (from ic_cmd_rx) and
//  - counts it: 16-bit received and executed counters, 4-bit unknown-command,
//    frame-error and parity-error counters, and a 4-bit command-error counter
//    that counts any of the three;
//  - executes it if it is error free: control-register write, control,
//    status and counter reads (each answered by a two-word telemetry message:
//    header {MESSAGE_ID, length code 0} and one data word), or forwarding of
//    logic-board commands (module addresses 0011, 0100) on the fwd_* port;
//    instrument-controller memory commands (0010) are received and counted
//    but not acted on, since that memory is not part of this design;
//  - keeps the status register, whose four error flags are sticky and are
//    cleared when it is read; the same byte is repeated in both halves.
// Following the reference, the three counter reads and the IDPU time command
// do not change the received or executed counts, and an unknown module-1111
// command does not count as an error. This design's choices: a command with
// a parity or frame error is still counted as received; counters wrap;
// writing the control register with bit 7 set clears all counters in that
// clock and the bit is kept as written; the IDPU reset command pulses
// idpu_reset. All timing is in clk; outputs are registered.
module ic_cmd_ctrl
  import plastic_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  sysid,
  // from the serial receiver
  input  logic        cmd_valid,
  input  ic_cmd_t     cmd,
  input  logic        parity_err,
  input  logic        frame_err,
  // control register fields
  output logic [7:0]  ctrl_reg,
  output logic        idpu_reset,
  output logic        time_msg,     // IDPU sample-clock message received
  // forwarded commands for the logic board / memory handling
  output logic        fwd_valid,
  output ic_cmd_t     fwd_cmd,
  // telemetry response
  output logic        tlm_valid,
  output logic [15:0] tlm_header,
  output logic [15:0] tlm_data
);
  logic [15:0] rx_cnt, ex_cnt;
  logic [3:0]  unk_cnt, frm_cnt, par_cnt, err_cnt;
  logic        unk_f, frm_f, par_f;
  logic        known, exempt, idpu_mod;
  logic [7:0]  status_byte;

  assign status_byte = {2'b10, sysid, unk_f, frm_f, par_f, unk_f | frm_f | par_f};

  always_comb begin
    idpu_mod = (cmd.modaddr == MOD_IDPU);
    unique case (cmd.modaddr)
      MOD_IC:     known = cmd.cmd inside {4'd1, 4'd2, 4'd3, 4'd4, 4'd5, 4'd6};
      MOD_IC_MEM,
      MOD_LB_MEM: known = cmd.cmd inside {4'd1, 4'd2, 4'd3, 4'd4, 4'd5, 4'd8, 4'd9};
      MOD_LB_IMM: known = (cmd.cmd == 4'd1);
      MOD_IDPU:   known = (cmd.cmd == 4'h0) || (cmd.cmd == 4'hF);
      default:    known = 1'b0;
    endcase
    exempt = (cmd.modaddr == MOD_IC && cmd.cmd inside {4'd4, 4'd5, 4'd6}) ||
             (idpu_mod && cmd.cmd == 4'h0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_cnt <= '0; ex_cnt <= '0;
      unk_cnt <= '0; frm_cnt <= '0; par_cnt <= '0; err_cnt <= '0;
      unk_f <= 1'b0; frm_f <= 1'b0; par_f <= 1'b0;
      ctrl_reg <= '0;
      idpu_reset <= 1'b0; time_msg <= 1'b0;
      fwd_valid <= 1'b0; fwd_cmd <= '0;
      tlm_valid <= 1'b0; tlm_header <= '0; tlm_data <= '0;
    end else begin
      idpu_reset <= 1'b0;
      time_msg   <= 1'b0;
      fwd_valid  <= 1'b0;
      tlm_valid  <= 1'b0;
      if (cmd_valid) begin
        if (parity_err || frame_err) begin
          rx_cnt  <= rx_cnt + 16'd1;
          err_cnt <= err_cnt + 4'd1;
          if (parity_err) begin par_cnt <= par_cnt + 4'd1; par_f <= 1'b1; end
          if (frame_err)  begin frm_cnt <= frm_cnt + 4'd1; frm_f <= 1'b1; end
        end else if (!known) begin
          if (!idpu_mod) begin
            rx_cnt  <= rx_cnt + 16'd1;
            unk_cnt <= unk_cnt + 4'd1;
            err_cnt <= err_cnt + 4'd1;
            unk_f   <= 1'b1;
          end
        end else begin
          if (!exempt) begin
            rx_cnt <= rx_cnt + 16'd1;
            ex_cnt <= ex_cnt + 16'd1;
          end
          unique case (cmd.modaddr)
            MOD_IC: begin
              tlm_valid <= (cmd.cmd != 4'd1);
              unique case (cmd.cmd)
                4'd1: begin
                  ctrl_reg <= cmd.data[7:0];
                  if (cmd.data[7]) begin
                    rx_cnt <= '0; ex_cnt <= '0;
                    unk_cnt <= '0; frm_cnt <= '0; par_cnt <= '0; err_cnt <= '0;
                  end
                end
                4'd2: begin
                  tlm_header <= {MID_CTRL_RD, 10'd0};
                  tlm_data   <= {8'h00, ctrl_reg};
                end
                4'd3: begin
                  tlm_header <= {MID_STAT_RD, 10'd0};
                  tlm_data   <= {status_byte, status_byte};
                  unk_f <= 1'b0; frm_f <= 1'b0; par_f <= 1'b0;
                end
                4'd4: begin
                  tlm_header <= {MID_RX_CNT, 10'd0};
                  tlm_data   <= rx_cnt;
                end
                4'd5: begin
                  tlm_header <= {MID_EX_CNT, 10'd0};
                  tlm_data   <= ex_cnt;
                end
                default: begin
                  tlm_header <= {MID_ERR_CNT, 10'd0};
                  tlm_data   <= {unk_cnt, frm_cnt, par_cnt, err_cnt};
                end
              endcase
            end
            MOD_IDPU: begin
              if (cmd.cmd == 4'hF) idpu_reset <= 1'b1;
              else                 time_msg   <= 1'b1;
            end
            MOD_IC_MEM: ;   // classifier memory access: not part of this design
            default: begin
              fwd_valid <= 1'b1;
              fwd_cmd   <= cmd;
            end
          endcase
        end
      end
    end
  end
endmodule
