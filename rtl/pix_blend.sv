// pix_blend: pixel blending stage of one pixel processor. It first combines
// the interpolated (Gouraud) colour with the filtered texture colour:
//   tex_mode 0: colour only, 1: replace (texture), 2: modulate
//   (c * (t + 1) / 256 per channel), 3: add with saturation.
// Then, with alpha_en, it blends the result with the colour already in the
// frame buffer: out = (a * src + (256 - a) * dst) / 256 with a = alpha + 1
// for alpha >= 128 (so 255 means fully opaque) and a = alpha below. Alpha is one value per
// primitive (the frame buffer keeps no alpha). Combinational; the frame
// buffer read, this blend and the write-back happen in one cycle.
// Texture and alpha blending with per-vertex (not per-pixel) alpha follow
// the chip; the four texture modes and the blend arithmetic are this
// design's.
module pix_blend (
  input  logic [23:0] color,
  input  logic [23:0] texel,
  input  logic [1:0]  tex_mode,
  input  logic        alpha_en,
  input  logic [7:0]  alpha,
  input  logic [23:0] dst,
  output logic [23:0] out
);
  always_comb begin
    logic [8:0]  a9;
    a9 = {1'b0, alpha} + {8'd0, alpha[7]};
    for (int c = 0; c < 3; c++) begin
      logic [7:0]  cc, tt, ss, dd;
      logic [15:0] m;
      logic [8:0]  sum;
      logic [16:0] bl;
      cc = color[8*c +: 8];
      tt = texel[8*c +: 8];
      m   = 16'(cc) * (16'(tt) + 16'd1);
      sum = {1'b0, cc} + {1'b0, tt};
      case (tex_mode)
        2'd0: ss = cc;
        2'd1: ss = tt;
        2'd2: ss = m[15:8];
        default: ss = sum[8] ? 8'hff : sum[7:0];
      endcase
      dd = dst[8*c +: 8];
      bl = 17'(a9) * 17'(ss) + 17'(9'd256 - a9) * 17'(dd);
      out[8*c +: 8] = alpha_en ? 8'(bl >> 8) : ss;
    end
  end
endmodule
