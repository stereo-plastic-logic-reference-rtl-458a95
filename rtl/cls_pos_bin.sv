// cls_pos_bin: position-bin reduction of the classifier.
// Maps the 6-bit position, quadrant and section of a PHA word onto the 5-bit
// "pos" index used to address the bins RAM. Solar-wind sections (0 and 1)
// keep the 32 resistive-anode steps 16..47 as pos = {~position[4],
// position[3:0]}; quadrant 0 in the SSD WAP section folds its four 8-step
// sectors onto bins 0..3; every other quadrant uses {quadrant[0],
// position[5:4]} so each discrete anode is one bin. Purely combinational.
// The mapping is the one the instrument's reference gives; nothing here is
// this design's own.
module cls_pos_bin
  import plastic_pkg::*;
(
  input  logic [1:0] quadrant,
  input  logic [5:0] position,
  input  logic [1:0] section,
  output logic [4:0] pos
);
  always_comb begin
    if (section == SEC_SW_MAIN || section == SEC_SW_S)
      pos = {~position[4], position[3:0]};
    else if (quadrant == 2'b00)
      pos = {3'b000, position[4:3]};
    else
      pos = {2'b00, quadrant[0], position[5:4]};
  end
endmodule
