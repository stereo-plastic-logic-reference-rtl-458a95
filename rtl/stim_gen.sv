// stim_gen: test-pulser stimulus generator of the event logic.
// Produces a square wave of frequency 25.6 MHz / (2 * (16*stim_freq + 16)),
// i.e. the output toggles every 16*(stim_freq+1) clocks: 800 kHz for
// stim_freq = 0, 12.2 Hz for the default 65535, as the STIM_FREQ register
// definition gives. The wave is gated onto five outputs by the STIM_ENABLE
// bits (bit 4 ra, 3 ssd, 2 tac0, 1 tac2, 0 pos). The divider is this
// design's (a 20-bit down counter reloaded from the register; a changed
// register value restarts the half period at once).
module stim_gen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] stim_freq,
  input  logic [4:0]  stim_enable,
  output logic [4:0]  stim
);
  logic [19:0] cnt;
  logic        wave;
  logic [15:0] freq_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      wave   <= 1'b0;
      freq_q <= '0;
    end else if (stim_freq != freq_q) begin
      freq_q <= stim_freq;                // new frequency: restart the half period
      cnt    <= {stim_freq, 4'hF};
    end else if (cnt == 20'd0) begin
      cnt  <= {stim_freq, 4'hF};    // 16*(stim_freq+1) - 1
      wave <= ~wave;
    end else begin
      cnt <= cnt - 20'd1;
    end
  end

  assign stim = stim_enable & {5{wave}};
endmodule
