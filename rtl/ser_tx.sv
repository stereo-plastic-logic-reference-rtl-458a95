// ser_tx: gated serial transmitter of the logic board.
// Sends a WIDTH-bit word MSB first on sdata with a gate (high for the whole
// word) and a bit clock of clk/DIV; 3.2 MHz from the 25.6 MHz system clock
// for the HV (swp_*: 8-bit address then 8-bit data), house-keeping command
// (hk_*: 8 bits) and UTIL (util_dat_*: 16 bits; util_cmd_*: 24 bits) links
// described in the reference, which fixes the rate, the bit order and the
// signal set. Edge placement is this design's choice: sdata and gate change
// when sclk falls, and the receiver samples on the rising edge, which falls
// in the middle of each bit. start is accepted when ready is high; a word
// takes WIDTH*DIV + DIV clocks, the last DIV being a gap with the gate low.
module ser_tx #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DIV   = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] data,
  output logic             ready,
  output logic             gate,
  output logic             sclk,
  output logic             sdata
);
  localparam int unsigned CW = $clog2(DIV);
  logic [WIDTH-1:0]           sr;
  logic [$clog2(WIDTH+1)-1:0] nleft;
  logic [CW-1:0]              ph;
  logic                       gap;

  assign ready = (nleft == 0) && !gap;
  assign sdata = gate & sr[WIDTH-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0; nleft <= '0; ph <= '0; gap <= 1'b0; gate <= 1'b0; sclk <= 1'b0;
    end else if (ready) begin
      sclk <= 1'b0;
      if (start) begin
        sr    <= data;
        nleft <= ($clog2(WIDTH+1))'(WIDTH);
        ph    <= '0;
        gate  <= 1'b1;
      end
    end else begin
      ph <= ph + 1'b1;
      if (gap) begin
        if (ph == CW'(DIV - 1)) gap <= 1'b0;
      end else begin
        if (ph == CW'(DIV/2 - 1)) sclk <= 1'b1;
        if (ph == CW'(DIV - 1)) begin
          sclk  <= 1'b0;
          sr    <= sr << 1;
          nleft <= nleft - 1'b1;
          if (nleft == 1) begin
            gate <= 1'b0;
            gap  <= 1'b1;
          end
        end
      end
    end
  end
endmodule
