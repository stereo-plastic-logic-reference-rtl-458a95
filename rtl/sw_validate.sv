// sw_validate: mode requirements for events in the SSD quadrants 0 and 1.
// Given what an event collected (TAC0 start and stop-coincidence flags,
// exactly one position, an energy, the SSD multi-hit and house-keeping
// flags, the TAC0 ADC overflow and the TOF/energy window checks), decides
// for the trigger mode tmode0 (0..10) whether the event is valid and
// whether it counts as an "energy not required" or "energy required" event.
// Each mode's requirement lists are the reference's (modes 0-3 TOF modes,
// 4-5 start flag only, 8-9 position only, 10 energy only; 6, 7 and 11-15 are
// unused and accept nothing). Requirement bits, in order: sf, sfr, one
// position, energy, no multi-energy, no energy-hk, no tac0 overflow. With
// ssd_disable set the multi-energy and energy-hk requirements are dropped
// from validation. The TOF window is applied where a TOF is required (modes
// 0-3) and the energy window where an energy was measured; the reference
// states both windows for "all modes" without saying how they apply when
// the quantity is absent, so this is this design's reading. Combinational.
module sw_validate (
  input  logic [3:0] mode,
  input  logic       sf,
  input  logic       sfr,
  input  logic       one_pos,
  input  logic       energy,
  input  logic       multi_e,
  input  logic       e_hk,
  input  logic       ofw,
  input  logic       tof_ok,
  input  logic       e_ok,
  input  logic       ssd_disable,
  output logic       valid,
  output logic       e_not_rqd,
  output logic       e_rqd
);
  // requirement masks: {sf, sfr, one_pos, energy, no_multi, no_hk, no_ofw}
  typedef logic [6:0] req_t;
  localparam req_t R_NONE = 7'b0;
  req_t v_req, n_req, r_req, have, v_eff;
  logic used;

  always_comb begin
    used = 1'b1;
    unique case (mode)
      4'd0:  begin v_req = 7'b1111111; n_req = 7'b1110001; r_req = 7'b1111111; end
      4'd1:  begin v_req = 7'b1110111; n_req = 7'b1110001; r_req = 7'b1111111; end
      4'd2:  begin v_req = 7'b1101111; n_req = 7'b1100001; r_req = 7'b1101111; end
      4'd3:  begin v_req = 7'b1100111; n_req = 7'b1100001; r_req = 7'b1101111; end
      4'd4:  begin v_req = 7'b1011110; n_req = 7'b1010000; r_req = 7'b1011110; end
      4'd5:  begin v_req = 7'b1010110; n_req = 7'b1010000; r_req = 7'b1011110; end
      4'd8:  begin v_req = 7'b0011110; n_req = 7'b0010000; r_req = 7'b0011110; end
      4'd9:  begin v_req = 7'b0010110; n_req = 7'b0010000; r_req = 7'b0011110; end
      4'd10: begin v_req = 7'b0001110; n_req = R_NONE;     r_req = 7'b0001110; end
      default: begin v_req = R_NONE; n_req = R_NONE; r_req = R_NONE; used = 1'b0; end
    endcase
    have  = {sf, sfr, one_pos, energy, !multi_e, !e_hk, !ofw};
    v_eff = ssd_disable ? (v_req & 7'b1111001) : v_req;
    valid     = used && ((have & v_eff) == v_eff) && (!(mode < 4'd4) || tof_ok) && (!energy || e_ok);
    e_not_rqd = used && (n_req != R_NONE) && ((have & n_req) == n_req);
    e_rqd     = used && ((have & r_req) == r_req);
  end
endmodule
