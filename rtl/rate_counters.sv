// rate_counters: the 32 event-rate counters rt(31..0).
// Each counter counts one-clock pulses on its bit of "pulse" while
// rt_enable is high. rt_latch copies all counters into a readout bank and
// rt_clr_n low clears the counters (sequence per deflection step: enable
// low, latch, clear, enable high). The readout bank is read by index for
// transmission, so counting can resume while the previous step is sent.
// A second read port (chk_*) serves the rate-limit check of the sweep.
// The three control signals and their sequence follow the reference's rate
// control timing; the counter width (16 bits, matching the 16-bit UTIL data
// word) and saturation at full scale are this design's choices.
module rate_counters #(
  parameter int unsigned N     = 32,
  parameter int unsigned WIDTH = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         pulse,
  input  logic                 rt_enable,
  input  logic                 rt_latch,
  input  logic                 rt_clr_n,
  input  logic [$clog2(N)-1:0] rd_idx,
  output logic [WIDTH-1:0]     rd_data,
  input  logic [$clog2(N)-1:0] chk_idx,
  output logic [WIDTH-1:0]     chk_data
);
  logic [WIDTH-1:0] cnt  [N];
  logic [WIDTH-1:0] held [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin cnt[i] <= '0; held[i] <= '0; end
    end else begin
      if (rt_latch)
        for (int i = 0; i < N; i++) held[i] <= cnt[i];
      for (int i = 0; i < N; i++) begin
        if (!rt_clr_n)
          cnt[i] <= '0;
        else if (rt_enable && pulse[i] && cnt[i] != '1)
          cnt[i] <= cnt[i] + 1'b1;
      end
    end
  end

  assign rd_data  = held[rd_idx];
  assign chk_data = held[chk_idx];
endmodule
