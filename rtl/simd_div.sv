// simd_div: 8-way SIMD divider of the triangle setup engine. It divides
// eight attribute differences (X, Z, R, G, B, U, V, W) by one common 8-bit
// divisor dY in a single combinational pass. A 256-entry table gives the
// reciprocal of dY as an 8-bit mantissa and a 3-bit exponent; each lane
// multiplies its difference by the mantissa and shifts the product right by
// the exponent. Quotients carry 8 fraction bits (value = d/dY * 256).
// Lane widths follow the chip: X, R, G, B differences are 9-bit signed with
// 17-bit results, Z, U, V, W differences 17-bit with 25-bit results; all
// lanes use 17-bit inputs and 25-bit outputs here, and the narrow lanes only
// look at their low 9 input bits. The table contents (formula in g3d_pkg)
// and the dY = 1 approximation (255/256) are this design's choices.
module simd_div
  import g3d_pkg::*;
(
  input  logic [7:0]         dy,
  input  logic signed [16:0] d [8],
  output logic signed [24:0] q [8]
);
  logic [7:0] mant;
  logic [2:0] expo;

  // The table is filled at elaboration from the recip_dy formula.
  logic [10:0] lut [256];
  initial for (int i = 0; i < 256; i++) lut[i] = recip_dy(8'(i));

  assign {expo, mant} = lut[dy];

  always_comb begin
    for (int l = 0; l < 8; l++) begin
      logic signed [16:0] dl;
      logic signed [25:0] p;
      if (l == L_X || l == L_R || l == L_G || l == L_B) dl = 17'($signed(d[l][8:0]));
      else                                              dl = d[l];
      p    = 26'(dl) * $signed({18'd0, mant});
      q[l] = 25'(p >>> expo);
    end
  end
endmodule
