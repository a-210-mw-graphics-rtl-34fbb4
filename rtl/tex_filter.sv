// tex_filter: bilinear texture filter of one pixel processor. It blends the
// four texels of a 2x2 footprint (t00 at s,t; t10 at s+1,t; t01 at s,t+1;
// t11 at s+1,t+1) into one 24-bit RGB colour with the 4-bit fractional
// weights fs (along s) and ft (along t):
//   top = t00 + (t10 - t00) * fs/16, bottom likewise, out = top + (bottom - top) * ft/16
// per 8-bit channel, truncated. With `point` high the filter is bypassed
// and t00 is passed on (point sampling). Combinational: the chip blends
// four texels into one every cycle. The 4-bit weights and the truncation
// are this design's.
module tex_filter (
  input  logic [23:0] t00,
  input  logic [23:0] t10,
  input  logic [23:0] t01,
  input  logic [23:0] t11,
  input  logic [3:0]  fs,
  input  logic [3:0]  ft,
  input  logic        point,
  output logic [23:0] rgb
);
  function automatic logic [7:0] lerp(input logic [7:0] a, input logic [7:0] b, input logic [3:0] f);
    logic [12:0] s;
    s = 13'(a) * 13'(5'd16 - {1'b0, f}) + 13'(b) * 13'(f);
    return 8'(s >> 4);
  endfunction

  always_comb begin
    for (int c = 0; c < 3; c++) begin
      logic [7:0] top, bot;
      top = lerp(t00[8*c +: 8], t10[8*c +: 8], fs);
      bot = lerp(t01[8*c +: 8], t11[8*c +: 8], fs);
      rgb[8*c +: 8] = point ? t00[8*c +: 8] : lerp(top, bot, ft);
    end
  end
endmodule
