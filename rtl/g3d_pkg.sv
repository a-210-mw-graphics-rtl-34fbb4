// g3d_pkg: types, constants and table functions shared by the mobile 3-D
// graphics engine. Screen and buffer sizes follow the chip's 256x256
// display with 24-bit colour and 16-bit depth. Fixed-point values inside the
// setup and span logic carry FRAC (8) fraction bits; that precision, the
// 128-bit command encoding and the table formulas below are this design's
// own choices where the chip description gives no detail.
package g3d_pkg;

  localparam int SCR_W = 256;         // display width in pixels
  localparam int SCR_H = 256;         // display height in pixels
  localparam int FRAC  = 8;           // fraction bits of setup/span values

  // Attribute lanes of the 8-way SIMD setup datapath (order of the divider).
  localparam int L_X = 0, L_Z = 1, L_R = 2, L_G = 3, L_B = 4, L_U = 5, L_V = 6, L_W = 7;

  // One vertex as carried by the vertex buffer.
  typedef struct packed {
    logic [7:0]  x;
    logic [7:0]  y;
    logic [15:0] z;
    logic [7:0]  r;
    logic [7:0]  g;
    logic [7:0]  b;
    logic [15:0] u;
    logic [15:0] v;
    logic [15:0] w;
  } vertex_t;

  // Result of triangle setup: vertices sorted top to bottom and the
  // per-edge slopes dA/dY (edges 0-2 long, 0-1 and 1-2 short) and per-x
  // gradients dA/dX in the 8 lanes X, Z, R, G, B, U, V, W, all scaled by 2^FRAC.
  typedef struct packed {
    vertex_t               v0;
    vertex_t               v1;
    vertex_t               v2;
    logic [7:0][24:0]      s02;
    logic [7:0][24:0]      s01;
    logic [7:0][24:0]      s12;
    logic [7:0][24:0]      hg;
    logic                  mid_right;  // middle vertex lies right of the long edge
  } setup_t;

  // Value of SIMD lane `l` (X, Z, R, G, B, U, V, W) of a vertex, zero-extended.
  function automatic logic [16:0] lane_val(input vertex_t v, input int l);
    case (l)
      L_X: return 17'(v.x);
      L_Z: return 17'(v.z);
      L_R: return 17'(v.r);
      L_G: return 17'(v.g);
      L_B: return 17'(v.b);
      L_U: return 17'(v.u);
      L_V: return 17'(v.v);
      default: return 17'(v.w);
    endcase
  endfunction

  // One horizontal span [xs, xe) of a row, produced by the edge walker.
  // Attribute lanes 0..6 = Z, R, G, B, U, V, W, scaled by 2^FRAC.
  typedef struct packed {
    logic [7:0]            y;
    logic [8:0]            xs;
    logic [8:0]            xe;
    logic                  is2d;
    logic [6:0][33:0]      a0;    // value at x = xs
    logic [6:0][24:0]      grad;  // change per pixel step in x
  } span_t;

  // Per-pixel values leaving the interpolator.
  typedef struct packed {
    logic [15:0] z;
    logic [7:0]  r;
    logic [7:0]  g;
    logic [7:0]  b;
    logic [15:0] u;
    logic [15:0] v;
    logic [15:0] w;
  } pixel_t;

  // A pair of horizontally adjacent pixels: PP0 takes even x, PP1 odd x.
  typedef struct packed {
    logic [7:0]  y;
    logic [6:0]  xp;      // pair index = x >> 1
    logic [1:0]  mask;    // bit k: pixel of PPk is inside the primitive
    logic        is2d;    // 2-D fill: no depth test, no texture, no blending
    pixel_t      p1;
    pixel_t      p0;
  } pair_t;

  // Render state written by the STATE command.
  typedef struct packed {
    logic        depth_test;
    logic        tex_en;
    logic        point_sample;
    logic [1:0]  tex_mode;   // 0 colour only, 1 replace, 2 modulate, 3 add
    logic        alpha_en;
    logic [7:0]  alpha;
    logic [3:0]  log2size;   // level-0 texture is 2^log2size square (<= 8)
    logic [17:0] tex_base;   // word offset of the texture in each texture macro
  } rstate_t;

  // Opcodes in bits [127:124] of a vertex-buffer entry.
  typedef enum logic [3:0] {
    OP_NOP   = 4'd0,
    OP_VTX   = 4'd1,
    OP_TRI   = 4'd2,
    OP_RECT  = 4'd3,
    OP_STATE = 4'd4,
    OP_TEXW  = 4'd5,
    OP_SWAP  = 4'd6,
    OP_MPCMD = 4'd7
  } opcode_e;

  // Memory-programmer post-filter operations (bits [15:13] of its command).
  typedef enum logic [2:0] {
    MP_PASS = 3'd0,
    MP_FSAA = 3'd1,
    MP_FOG  = 3'd2
  } mp_op_e;

  // Reciprocal table of the setup divider: {exp[2:0], mant[7:0]} such that
  // 256/dy ~= (mant >> exp) with mant normalised to [128,255].
  // exp = ceil(log2(dy)) - 1 and mant = round(2^(8+exp) / dy); dy = 1 is
  // approximated by mant 255, exp 0; dy = 0 gives 0.
  function automatic logic [10:0] recip_dy(input logic [7:0] dy);
    int e;
    int m;
    if (dy == 0) return 11'd0;
    if (dy == 1) return {3'd0, 8'd255};
    e = 0;
    while ((1 << (e + 1)) < int'(dy)) e++;
    m = ((1 << (9 + e)) / int'(dy) + 1) >> 1;
    if (m > 255) m = 255;
    return {3'(e), 8'(m)};
  endfunction

  // Reciprocal table of the texture-address divider, indexed by the 8-bit
  // normalised mantissa m (128..255) of w: round(2^16 / m), 9..10 bits.
  function automatic logic [9:0] recip_w(input logic [7:0] m);
    if (m == 0) return 10'd0;
    return 10'((((1 << 17) / int'(m)) + 1) >> 1);
  endfunction

  // Word offset of mip level `lod` inside one texture macro for a level-0
  // texture of 2^log2size texels square. Each level is spread over the four
  // macros, so one macro holds a quarter of it (at least one word).
  function automatic logic [17:0] level_offset(input logic [3:0] log2size, input logic [3:0] lod);
    int off;
    int sz;
    off = 0;
    for (int l = 0; l < 9; l++) begin
      if (l < int'(lod)) begin
        sz = (int'(log2size) > l) ? (1 << (int'(log2size) - l - 1)) : 1;
        off += sz * sz;
      end
    end
    return 18'(off);
  endfunction

  // Level of detail of a pixel pair from the texture-coordinate step
  // between its two pixels (U, V as 12-bit fractions of the texture size):
  // floor(log2(max(|dU|, |dV|) in level-0 texels)), 0 below one texel,
  // at most log2size.
  function automatic logic [3:0] pair_lod(input logic [11:0] u0, input logic [11:0] v0,
                                         input logic [11:0] u1, input logic [11:0] v1,
                                         input logic [3:0] log2size);
    logic [11:0] du, dv, dm;
    logic [23:0] dt;
    logic [3:0]  l;
    du = (u0 > u1) ? u0 - u1 : u1 - u0;
    dv = (v0 > v1) ? v0 - v1 : v1 - v0;
    dm = (du > dv) ? du : dv;
    dt = {12'd0, dm} << log2size;
    l  = 4'd0;
    for (int b = 13; b < 24; b++) if (dt[b]) l = 4'(b - 12);
    return (l > log2size) ? log2size : l;
  endfunction

endpackage
