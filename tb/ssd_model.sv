// ssd_model: behavioural model of the SSD board's end of the optical link,
// for testbenches. It shifts cmd_in in on each rising edge of cmd_clk and
// takes the last 16 bits as a command when cmd_strobe falls after at
// least 16 clocks (last_cmd, n_cmd). On the falling edges of cmd_clk it sends the 16-bit word: the
// first falling edge raises the start bit on both lines, the next eight put
// out bits 15..8 on dat1 and 7..0 on dat0 MSB first, and the tenth returns
// both lines low. A strobe or m_reset restarts that count. Each line has its
// own delay (SKEW0_NS, SKEW1_NS) to stand for the optical path.
module ssd_model #(
  parameter int SKEW0_NS = 0,
  parameter int SKEW1_NS = 0
) (
  input  logic        cmd_clk,
  input  logic        cmd_in,
  input  logic        cmd_strobe,
  input  logic        m_reset,
  input  logic [15:0] word,
  output logic        dat0,
  output logic        dat1,
  output int          n_cmd,
  output int          n_reset,
  output logic [15:0] last_cmd
);
  logic [15:0] sr;
  int          rc, nb;
  logic        d0, d1;

  initial begin
    sr = '0; rc = 0; nb = 0; d0 = 1'b0; d1 = 1'b0; dat0 = 1'b0; dat1 = 1'b0;
    n_cmd = 0; n_reset = 0; last_cmd = '0;
  end

  always @(posedge cmd_clk) begin sr = {sr[14:0], cmd_in}; nb++; end

  always @(negedge cmd_clk) begin
    rc = rc + 1;
    if (rc == 1) begin d0 = 1'b1; d1 = 1'b1; end
    else if (rc <= 9) begin d1 = word[17 - rc]; d0 = word[9 - rc]; end
    else begin d0 = 1'b0; d1 = 1'b0; rc = 0; end
  end

  always @(negedge cmd_strobe) begin
    if (nb >= 16) begin last_cmd = sr; n_cmd++; end
    nb = 0; rc = 0; d0 = 1'b0; d1 = 1'b0;
  end

  always @(posedge m_reset) begin
    n_reset++; rc = 0; d0 = 1'b0; d1 = 1'b0;
  end

  always @(d0) dat0 <= #(SKEW0_NS) d0;
  always @(d1) dat1 <= #(SKEW1_NS) d1;
endmodule
