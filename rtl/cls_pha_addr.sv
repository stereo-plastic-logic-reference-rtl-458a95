// cls_pha_addr: PHA-word storage address generator of the classifier.
// Keeps one 8-bit word counter per PHA priority region (sw0..sw3, wap0,
// wap1) and forms the RAM base address {1, section[1], pha_rates, count}
// from which the six bytes of a stored PHA word are written
// (base & word[1:0] & lsb). Region sizes follow the reference memory map:
// 64, 64, 160, 160, 32 and 32 words. Once a region is full its counter is
// parked at 255, the scratch slot at the top of the region, so further
// events overwrite only scratch; the reference shows the scratch slots but
// does not spell out this rule, which is this design's reading of the map.
// inc advances the selected counter after a write cycle; clr empties all
// counters (used when the RAM bank is switched). One clock, active-low reset.
// base[11] is always 1 and the section/priority bits of base are the
// inputs themselves, as the memory map lays the regions out.
module cls_pha_addr (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        inc,
  input  logic        section1,
  input  logic [1:0]  pha_rates,
  output logic [11:0] base
);
  localparam logic [7:0] SCRATCH = 8'd255;
  logic [7:0] cnt [6];
  logic [2:0] sel;
  logic [7:0] cur;

  assign sel = {section1, pha_rates};

  function automatic logic [7:0] limit(input logic [2:0] s);
    case (s)
      3'd0, 3'd1: return 8'd64;
      3'd2, 3'd3: return 8'd160;
      default:    return 8'd32;
    endcase
  endfunction

  always_comb cur = (sel < 3'd6) ? cnt[sel] : 8'd0;
  assign base = {1'b1, section1, pha_rates, cur};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 6; i++) cnt[i] <= '0;
    end else if (clr) begin
      for (int i = 0; i < 6; i++) cnt[i] <= '0;
    end else if (inc && sel < 3'd6 && cnt[sel] != SCRATCH) begin
      cnt[sel] <= (cnt[sel] + 8'd1 >= limit(sel)) ? SCRATCH : cnt[sel] + 8'd1;
    end
  end
endmodule
