// slimshader: pixel pipeline of the rendering engine, two pixel processors
// (PP0 even x, PP1 odd x) working on one pixel pair per clock.
//   D  depth compare. The pair's depth words are read from the two back
//      depth macros (latency 0), compared with the new depth and written
//      back in the same clock; write mask = 1 when new Z > stored Z (or
//      depth test off / 2-D fill). Depth-first clock gating: only a pair
//      with at least one visible pixel is loaded into the texture-stage
//      latch, so hidden pixels cause no texture requests and no blending.
//   T  texture addressing. Two tex_addr units divide u/w, v/w; the pair's
//      LOD comes from the step in U, V between its two pixels; the eight
//      requests of visible, textured pixels go to the address alignment
//      logic (aal), which fetches from the four texture macros.
//   B  filtering and blending. When aal delivers the pair's texels, each
//      PP filters its four texels (tex_filter), blends with its colour and
//      the frame-buffer colour (pix_blend) and writes the back frame macro
//      in the same clock (read-modify-write, write mask = visible).
// A pair enters with in_valid/in_ready; in_ready drops only while the
// texture stage waits for aal (a second macro access on a conflict). Buffer
// word of pixel (x, y) in its macro: {y, x[7:1]}. Events for statistics are
// pulses: ev_dfcg (pair dropped by depth-first gating), ev_zfail (per PP),
// ev_conflict, and the aligners' per-pair masks (the last three once per
// pair, in the clock aal accepts it).
// Stage order, depth before texturing, the gating, single-cycle RMW on both
// buffers and two pixels per clock follow the chip; the LOD rule, the
// address layout and the handshakes are this design's.
module slimshader
  import g3d_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  rstate_t     st,
  input  logic        flush,
  input  logic        in_valid,
  input  pair_t       in,
  output logic        in_ready,
  output logic        busy,
  // back depth buffer, one macro per PP
  output logic        db_en    [2],
  output logic [14:0] db_addr  [2],
  output logic        db_we    [2],
  output logic [15:0] db_wdata [2],
  input  logic [15:0] db_rdata [2],
  // back frame buffer, one macro per PP
  output logic        fb_en    [2],
  output logic [14:0] fb_addr  [2],
  output logic        fb_we    [2],
  output logic [23:0] fb_wdata [2],
  input  logic [23:0] fb_rdata [2],
  // texture macros
  output logic [3:0]  tm_en,
  output logic [17:0] tm_addr  [4],
  input  logic [23:0] tm_rdata [4],
  // statistics
  output logic        ev_dfcg,
  output logic [1:0]  ev_zfail,
  output logic        ev_conflict,
  output logic [7:0]  ev_spmask,
  output logic [7:0]  ev_tpmask
);
  // ---------------- D: depth compare ----------------
  logic       fire;
  logic [1:0] pass;
  logic       t_valid, t_ready;
  pair_t      t_pair;
  logic [1:0] t_pass;

  always_comb begin
    logic [15:0] nz;
    for (int k = 0; k < 2; k++) begin
      nz          = (k == 0) ? in.p0.z : in.p1.z;
      db_addr[k]  = {in.y, in.xp};
      db_en[k]    = fire && in.mask[k];
      pass[k]     = in.mask[k] && (in.is2d || !st.depth_test || nz > db_rdata[k]);
      db_we[k]    = fire && pass[k];
      db_wdata[k] = nz;
      ev_zfail[k] = fire && in.mask[k] && !pass[k];
    end
  end

  assign fire     = in_valid && t_ready;
  assign in_ready = t_ready;
  assign ev_dfcg  = fire && (|in.mask) && !(|pass);

  // ---------------- T: texture addressing ----------------
  logic        aal_ready, aal_out_valid, accept;
  logic [11:0] uu [2], vv [2];
  logic [15:0] ra [2][4];
  logic [3:0]  rm [2];
  logic [3:0]  fs [2], ft [2];
  logic [3:0]  lod;
  logic [15:0] req_addr [8];
  logic [7:0]  req_mask;
  logic        texon;

  localparam int SW = 2 + 2 + 15 + 48 + 16;
  logic [SW-1:0] side_in, side_out;

  assign t_ready = !t_valid || aal_ready;
  assign accept  = t_valid && aal_ready;
  assign texon   = st.tex_en && !t_pair.is2d;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) t_valid <= 1'b0;
    else if (t_ready) t_valid <= fire && (|pass);

  // The texture-stage latch is loaded only for a visible pair.
  always_ff @(posedge clk)
    if (fire && (|pass)) begin
      t_pair <= in;
      t_pass <= pass;
    end

  tex_addr u_ta0 (.u(t_pair.p0.u), .v(t_pair.p0.v), .w(t_pair.p0.w), .log2size(st.log2size),
                  .lod(lod), .point_sample(st.point_sample), .uu(uu[0]), .vv(vv[0]),
                  .req_addr(ra[0]), .req_mask(rm[0]), .fs(fs[0]), .ft(ft[0]));
  tex_addr u_ta1 (.u(t_pair.p1.u), .v(t_pair.p1.v), .w(t_pair.p1.w), .log2size(st.log2size),
                  .lod(lod), .point_sample(st.point_sample), .uu(uu[1]), .vv(vv[1]),
                  .req_addr(ra[1]), .req_mask(rm[1]), .fs(fs[1]), .ft(ft[1]));

  assign lod = pair_lod(uu[0], vv[0], uu[1], vv[1], st.log2size);

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      req_addr[k]     = ra[0][k];
      req_addr[k + 4] = ra[1][k];
    end
    req_mask[3:0] = (texon && t_pass[0]) ? rm[0] : 4'd0;
    req_mask[7:4] = (texon && t_pass[1]) ? rm[1] : 4'd0;
    side_in = {t_pair.is2d, texon, t_pass, t_pair.y, t_pair.xp,
               t_pair.p1.r, t_pair.p1.g, t_pair.p1.b, t_pair.p0.r, t_pair.p0.g, t_pair.p0.b,
               ft[1], fs[1], ft[0], fs[0]};
  end

  logic [23:0] texel [8];
  logic [7:0]  spm, tpm;
  logic        cfl;

  aal #(.SW(SW)) u_aal (
    .clk, .rst_n, .flush,
    .in_valid (t_valid), .in_ready(aal_ready),
    .in_addr  (req_addr), .in_mask(req_mask), .in_lod(lod), .in_side(side_in),
    .tex_base (st.tex_base), .log2size(st.log2size),
    .tm_en, .tm_addr, .tm_rdata,
    .out_valid(aal_out_valid), .out_texel(texel), .out_side(side_out),
    .spmask   (spm), .tpmask(tpm), .conflict(cfl)
  );

  // statistics count each pair once, when aal accepts it
  assign ev_spmask   = accept ? spm : 8'd0;
  assign ev_tpmask   = accept ? tpm : 8'd0;
  assign ev_conflict = accept && cfl;

  // ---------------- B: filter and blend ----------------
  logic        b_is2d, b_tex;
  logic [1:0]  b_pass;
  logic [7:0]  b_y;
  logic [6:0]  b_xp;
  logic [23:0] b_col [2];
  logic [3:0]  b_fs [2], b_ft [2];
  logic [23:0] filt [2];
  logic [23:0] blended [2];

  assign {b_is2d, b_tex, b_pass, b_y, b_xp, b_col[1], b_col[0], b_ft[1], b_fs[1], b_ft[0], b_fs[0]} = side_out;

  for (genvar k = 0; k < 2; k++) begin : g_pp
    tex_filter u_tf (.t00(texel[4*k]), .t10(texel[4*k+1]), .t01(texel[4*k+2]), .t11(texel[4*k+3]),
                     .fs(b_fs[k]), .ft(b_ft[k]), .point(st.point_sample), .rgb(filt[k]));
    pix_blend u_pb (.color(b_col[k]), .texel(filt[k]), .tex_mode(b_tex ? st.tex_mode : 2'd0),
                    .alpha_en(st.alpha_en && !b_is2d), .alpha(st.alpha), .dst(fb_rdata[k]),
                    .out(blended[k]));
    assign fb_addr[k]  = {b_y, b_xp};
    assign fb_en[k]    = aal_out_valid && b_pass[k];
    assign fb_we[k]    = aal_out_valid && b_pass[k];
    assign fb_wdata[k] = blended[k];
  end

  // ---------------- occupancy ----------------
  logic [1:0] inflight;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) inflight <= '0;
    else inflight <= inflight + 2'(accept) - 2'(aal_out_valid);

  assign busy = t_valid || (inflight != 0);
endmodule
