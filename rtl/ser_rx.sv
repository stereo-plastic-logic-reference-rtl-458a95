// ser_rx: gated serial receiver of the logic board.
// Counterpart of ser_tx: samples sdata on each rising edge of sclk while
// gate is high, MSB first, and when gate falls presents the last WIDTH bits
// with a one-clock valid pulse and the number of bits seen (so a short
// frame can be rejected). All three lines pass through two-flop
// synchronisers, so the bit clock must be at most a quarter of clk (3.2 MHz
// against 25.6 MHz in the instrument). Used for the 24-bit UTIL command
// link; the bit order and rate follow the reference, the edge choice is
// this design's.
module ser_rx #(
  parameter int unsigned WIDTH = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             gate,
  input  logic             sclk,
  input  logic             sdata,
  output logic             valid,
  output logic [WIDTH-1:0] data,
  output logic [7:0]       nbits
);
  logic [2:0]       g_s, c_s;
  logic [1:0]       d_s;
  logic [WIDTH-1:0] sr;
  logic [7:0]       cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_s <= '0; c_s <= '0; d_s <= '0; sr <= '0; cnt <= '0;
      valid <= 1'b0; data <= '0; nbits <= '0;
    end else begin
      g_s   <= {g_s[1:0], gate};
      c_s   <= {c_s[1:0], sclk};
      d_s   <= {d_s[0], sdata};
      valid <= 1'b0;
      if (g_s[1] && c_s[1] && !c_s[2]) begin
        sr  <= {sr[WIDTH-2:0], d_s[1]};
        cnt <= cnt + 8'd1;
      end
      if (g_s[2] && !g_s[1]) begin
        valid <= 1'b1;
        data  <= sr;
        nbits <= cnt;
        cnt   <= '0;
      end
    end
  end
endmodule
