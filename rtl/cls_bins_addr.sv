// cls_bins_addr: bins-RAM address logic of the classifier.
// For one classified event it forms the six byte addresses (low byte,
// a_lsb = 0) of the 16-bit bin counters to increment: sw H/alpha, sw all,
// sw Z>2, supra wide, supra noE and the PHA priority rate. A bin whose
// bins_dat code is "do not bin", or that does not apply to the event's
// section, is pointed at the scratch word 0x30FE so that every event performs
// the same six read-modify-write cycles. Purely combinational.
// The field packing and the scratch address follow the reference memory map.
// Address bit 0 (a_lsb) and the high bits fixed by the memory map are
// constant, so synthesis sees those output bits as tied.
module cls_bins_addr
  import plastic_pkg::*;
(
  input  bins_dat_t   bdat,
  input  logic [4:0]  pos,
  input  logic [4:0]  swpd,
  input  logic [1:0]  section,
  output logic [14:0] addr [6]
);
  localparam logic [14:0] ADDR_NULL = {14'b011_0000_1111_111, 1'b0};

  always_comb begin
    addr[0] = (bdat.sw_halpha == 2'b11 || section[1]) ? ADDR_NULL
            : {2'b00, bdat.sw_halpha, pos, swpd, 1'b0};
    addr[1] = (bdat.sw_all || section[1]) ? ADDR_NULL
            : {4'b0011, pos, swpd, 1'b0};
    addr[2] = (bdat.sw_zgr2 == 4'b1111 || section[1]) ? ADDR_NULL
            : {3'b010, bdat.sw_zgr2, pos[4:1], swpd[4:2], 1'b0};
    addr[3] = (bdat.supra_wid == 4'b1111 || section != SEC_WAP_SSD) ? ADDR_NULL
            : {7'b011_0000, bdat.supra_wid, pos[2:0], 1'b0};
    addr[4] = (bdat.supra_noe == 3'b111 || !section[1]) ? ADDR_NULL
            : {7'b011_0001, bdat.supra_noe, pos[2:0], section[0], 1'b0};
    addr[5] = !section[1] ? {7'b010_1111, bdat.pha_pri, swpd, 1'b0}
            : {12'b011_0010_0000_0, bdat.pha_pri[1], section[0], 1'b0};
  end
endmodule
