// tex_addr: texture address unit of one pixel processor (address
// calculation and address generation).
// Perspective division: U = u/w and V = v/w with 16-bit u, v, w and
// w >= u, v, so U and V lie in [0, 1]. w is normalised by its leading zeros
// and only the next 8 bits (rounded) address a 256-entry reciprocal table;
// u and v are shifted left by the same amount, multiplied by the table
// value and give U and V as 12-bit fractions (4095 = just below 1).
// Address generation: with the level of detail `lod` (computed for the pixel
// pair outside), the level is 2^(log2size-lod) texels wide. Bilinear mode
// gives the four texels around the sample point, half a texel up-left,
// with 4-bit weights fs, ft; point mode gives only the nearest texel
// (request 0). Coordinates wrap (repeat). Each request address is the texel
// position at its level, {t[7:0], s[7:0]}. Purely combinational.
// The 8-bit-mantissa table division, the 16-bit operands, the 12-bit U, V
// and the 16-bit request addresses follow the chip; the rounding, the
// table formula (in g3d_pkg), the wrap mode and the request order
// (0: s,t  1: s+1,t  2: s,t+1  3: s+1,t+1) are this design's.
module tex_addr
  import g3d_pkg::*;
(
  input  logic [15:0] u,
  input  logic [15:0] v,
  input  logic [15:0] w,
  input  logic [3:0]  log2size,
  input  logic [3:0]  lod,
  input  logic        point_sample,
  output logic [11:0] uu,
  output logic [11:0] vv,
  output logic [15:0] req_addr [4],
  output logic [3:0]  req_mask,
  output logic [3:0]  fs,
  output logic [3:0]  ft
);
  logic [9:0] lut [256];
  initial for (int i = 0; i < 256; i++) lut[i] = recip_w(8'(i));

  logic [3:0]  lz;
  logic [15:0] wn, un, vn;
  logic [8:0]  m9;
  logic [7:0]  m8;
  logic [9:0]  rw;

  function automatic logic [11:0] scale(input logic [15:0] n, input logic [9:0] r);
    logic [25:0] p;
    p = 26'(n) * 26'(r);
    p = p >> 12;
    return (p > 26'd4095) ? 12'd4095 : 12'(p);
  endfunction

  always_comb begin
    lz = 4'd0;
    for (int b = 0; b < 16; b++) if (w[b]) lz = 4'(15 - b);
    wn = w << lz;
    un = u << lz;
    vn = v << lz;
    m9 = {1'b0, wn[15:8]} + {8'd0, wn[7]};
    m8 = m9[8] ? 8'hff : m9[7:0];
    rw = lut[m8];
    uu = (w == 0) ? 12'd0 : scale(un, rw);
    vv = (w == 0) ? 12'd0 : scale(vn, rw);
  end

  always_comb begin
    logic [3:0]         sl;
    logic [7:0]         msk;
    logic signed [21:0] sf, tf;
    logic [7:0]         s0, t0, s1, t1;
    sl  = (lod > log2size) ? 4'd0 : log2size - lod;
    msk = 8'((9'd1 << sl) - 9'd1);
    if (point_sample) begin
      sf = $signed({10'd0, uu} << sl);
      tf = $signed({10'd0, vv} << sl);
    end else begin
      sf = $signed({10'd0, uu} << sl) - 22'sd2048;
      tf = $signed({10'd0, vv} << sl) - 22'sd2048;
    end
    s0 = 8'(sf >>> 12) & msk;
    t0 = 8'(tf >>> 12) & msk;
    s1 = (s0 + 8'd1) & msk;
    t1 = (t0 + 8'd1) & msk;
    req_addr[0] = {t0, s0};
    req_addr[1] = {t0, s1};
    req_addr[2] = {t1, s0};
    req_addr[3] = {t1, s1};
    if (point_sample) begin
      req_mask = 4'b0001;
      fs = 4'd0;
      ft = 4'd0;
    end else begin
      req_mask = 4'b1111;
      fs = sf[11:8];
      ft = tf[11:8];
    end
  end
endmodule
