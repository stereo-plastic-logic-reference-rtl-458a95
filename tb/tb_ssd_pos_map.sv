// tb_ssd_pos_map: exhaustive test of the mode-10 SSD position map against
// the reference table of SSD channel -> quadrant, position, section.
`timescale 1ns/1ps
module tb_ssd_pos_map;
  logic [3:0] ssd_id;
  logic s_channel;
  logic [1:0] quadrant, section;
  logic [5:0] position;
  int checks = 0, failures = 0;
  // expected {quadrant, position} for channels 0..15; section 2 unless S
  localparam logic [7:0] EXP [16] = '{
    {2'd0, 6'd8},  {2'd0, 6'd18}, {2'd0, 6'd22}, {2'd0, 6'd26},
    {2'd0, 6'd30}, {2'd0, 6'd34}, {2'd0, 6'd38}, {2'd0, 6'd42},
    {2'd0, 6'd46}, {2'd0, 6'd56}, {2'd1, 6'd8},  {2'd1, 6'd8},
    {2'd1, 6'd8},  {2'd1, 6'd24}, {2'd1, 6'd24}, {2'd1, 6'd24}};

  ssd_pos_map dut (.*);

  initial begin
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 16; i++) begin
        logic [1:0] es;
        ssd_id = 4'(i); s_channel = s[0];
        #1;
        es = (i >= 1 && i <= 8) ? {1'b0, s[0]} : 2'b10;
        checks++;
        if ({quadrant, position} !== EXP[i] || section !== es) begin
          failures++;
          $display("FAIL id %0d s %0d: %0d %0d %0d", i, s, quadrant, position, section);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
