// ssd_pos_map: position of an event from the SSD that fired (mode 10).
// In trigger mode 10 no position anode is used, so the SSD channel number
// gives the quadrant, the 6-bit position and the section: channels 1-8 are
// the solar-wind SSDs behind positions 18, 22, ..., 46 of quadrant 0 (section
// 0 or 1 from the sweep's main/S-channel state); channels 0 and 9 are the
// WAP SSDs at positions 8 and 56 of quadrant 0; channels 10-12 and 13-15
// are the WAP SSDs of quadrant 1 at positions 8 and 24 (section 2). The
// mapping is the reference's, written here arithmetically. Combinational.
// position[0] is constant 0: every position in the SSD table is even.
module ssd_pos_map (
  input  logic [3:0] ssd_id,
  input  logic       s_channel,
  output logic [1:0] quadrant,
  output logic [5:0] position,
  output logic [1:0] section
);
  always_comb begin
    if (ssd_id >= 4'd1 && ssd_id <= 4'd8) begin
      quadrant = 2'b00;
      position = 6'd18 + 6'({ssd_id - 4'd1, 2'b00});
      section  = {1'b0, s_channel};
    end else begin
      section  = 2'b10;
      if (ssd_id == 4'd0) begin
        quadrant = 2'b00; position = 6'd8;
      end else if (ssd_id == 4'd9) begin
        quadrant = 2'b00; position = 6'd56;
      end else begin
        quadrant = 2'b01;
        position = (ssd_id <= 4'd12) ? 6'd8 : 6'd24;
      end
    end
  end
endmodule
