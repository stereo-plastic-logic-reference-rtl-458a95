// cls_pha_rx: serial PHA-word receiver of the classifier.
// Six serial lines ser_dat[5:0] each carry one byte of the 48-bit PHA word,
// MSB first; ser_dat[5] carries the most significant byte. A bit is taken on
// each falling edge of ser_clk while ser_gat is high, so after eight clocks
// the word is complete and stays put while ser_clk is idle. The consumer
// latches "word" after ser_gat falls (see classifier). Runs entirely in the
// ser_clk domain; no reset is needed because a new gate period always
// shifts in all eight bits. Follows the reference's line assignment and edge
// rules.
module cls_pha_rx (
  input  logic        ser_clk,
  input  logic        ser_gat,
  input  logic [5:0]  ser_dat,
  output logic [47:0] word
);
  logic [7:0] sr [6];

  always_ff @(negedge ser_clk) begin
    if (ser_gat)
      for (int i = 0; i < 6; i++) sr[i] <= {sr[i][6:0], ser_dat[i]};
  end

  assign word = {sr[5], sr[4], sr[3], sr[2], sr[1], sr[0]};
endmodule
