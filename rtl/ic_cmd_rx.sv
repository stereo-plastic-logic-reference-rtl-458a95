// ic_cmd_rx: serial command receiver of the instrument controller.
// A command frame is a start bit, 24 command bits MSB first, an odd-parity
// bit over the 24 command bits, and a stop bit, one bit per rising edge of
// the serial clock; any number of idle bit periods may separate frames.
// The serial clock and data are sampled into the system clock domain
// through two-flop synchronisers, so the serial clock must be slower than a
// quarter of clk. Line levels are this design's choice: the line idles low,
// the start bit and stop bit are high, so a missing stop bit reads as 0 and
// is reported as a framing error. At the end of each frame a one-clock
// "valid" pulse delivers the 24-bit word with its parity_err and frame_err
// flags; a command with either flag set must not be executed.
module ic_cmd_rx (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_clk,
  input  logic        cmd_dat,
  output logic        valid,
  output logic [23:0] word,
  output logic        parity_err,
  output logic        frame_err
);
  logic [2:0]  clk_s;
  logic [1:0]  dat_s;
  logic        busy;
  logic [4:0]  nbit;      // bits received after the start bit
  logic [24:0] sr;        // 24 command bits + parity
  logic        rise;

  assign rise = clk_s[1] && !clk_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_s      <= '0;
      dat_s      <= '0;
      busy       <= 1'b0;
      nbit       <= '0;
      sr         <= '0;
      valid      <= 1'b0;
      word       <= '0;
      parity_err <= 1'b0;
      frame_err  <= 1'b0;
    end else begin
      clk_s <= {clk_s[1:0], cmd_clk};
      dat_s <= {dat_s[0], cmd_dat};
      valid <= 1'b0;
      if (rise) begin
        if (!busy) begin
          if (dat_s[1]) begin       // start bit
            busy <= 1'b1;
            nbit <= '0;
          end
        end else if (nbit < 5'd25) begin
          sr   <= {sr[23:0], dat_s[1]};
          nbit <= nbit + 5'd1;
        end else begin              // stop-bit period
          busy       <= 1'b0;
          valid      <= 1'b1;
          word       <= sr[24:1];
          parity_err <= !(^sr);     // 24 bits + parity must hold an odd count of ones
          frame_err  <= !dat_s[1];
        end
      end
    end
  end
endmodule
