// tse: hard-wired triangle setup engine. Three vertex registers feed a
// four-step sequence, one clock per step:
//   SORT  (tse_sort_t2b)  sort top to bottom with 3 x 9-way SIMD subtractors
//   DIV   (3 x simd_div)  dA/dY of the long edge 0-2 and short edges 0-1, 1-2
//   MID   (tse_mid_intpl) triangle type and horizontal differences at the
//                         middle row
//   HDIV                  per-pixel gradients dA/dX, reusing divider 0
// A triangle is accepted with in_valid/in_ready while idle; the result
// (setup_t) is offered with out_valid/out_ready four clocks later and held
// until taken. The three sorting subtractors, three 8-way LUT dividers and
// the midpoint interpolation follow the chip; computing dA/dX by a second
// pass through one divider and the step-per-clock sequencing are this
// design's choices.
module tse
  import g3d_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  vertex_t vtx [3],
  output logic    in_ready,
  output logic    out_valid,
  output setup_t  out,
  input  logic    out_ready
);
  typedef enum logic [2:0] {S_IDLE, S_SORT, S_DIV, S_MID, S_HDIV, S_DONE} state_e;
  state_e state;

  vertex_t            vreg [3];
  vertex_t            srt  [3];
  vertex_t            sv   [3];
  logic signed [16:0] c01 [8], c02 [8], c12 [8];
  logic signed [16:0] r01 [8], r02 [8], r12 [8];
  logic [7:0]         cy01, cy02, cy12, ry01, ry02, ry12;
  logic signed [24:0] q02 [8], q01 [8], q12 [8];
  logic signed [24:0] t02 [8], t01 [8], t12 [8], thg [8];
  logic               mid_r, reg_mid_r;
  logic [7:0]         mdx, reg_dx;
  logic signed [16:0] mnum [8], reg_num [8];
  logic [7:0]         div0_dy;
  logic signed [16:0] div0_d [8];

  tse_sort_t2b u_sort (.v(vreg), .s(srt), .d01(c01), .d02(c02), .d12(c12),
                       .dy01(cy01), .dy02(cy02), .dy12(cy12));

  // Divider 0 serves the long edge in DIV and the x gradients in HDIV.
  assign div0_dy = (state == S_HDIV) ? reg_dx  : ry02;
  assign div0_d  = (state == S_HDIV) ? reg_num : r02;

  simd_div u_div0 (.dy(div0_dy), .d(div0_d), .q(q02));
  simd_div u_div1 (.dy(ry01),    .d(r01),    .q(q01));
  simd_div u_div2 (.dy(ry12),    .d(r12),    .q(q12));

  tse_mid_intpl u_mid (.v0(sv[0]), .v1(sv[1]), .dy01(ry01), .s02(t02),
                       .mid_right(mid_r), .dx(mdx), .num(mnum));

  assign in_ready  = (state == S_IDLE);
  assign out_valid = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= S_IDLE;
    else case (state)
      S_IDLE: if (in_valid) state <= S_SORT;
      S_SORT: state <= S_DIV;
      S_DIV:  state <= S_MID;
      S_MID:  state <= S_HDIV;
      S_HDIV: state <= S_DONE;
      S_DONE: if (out_ready) state <= S_IDLE;
      default: state <= S_IDLE;
    endcase

  always_ff @(posedge clk) begin
    case (state)
      S_IDLE: if (in_valid) vreg <= vtx;
      S_SORT: begin
        sv <= srt;
        r01 <= c01; r02 <= c02; r12 <= c12;
        ry01 <= cy01; ry02 <= cy02; ry12 <= cy12;
      end
      S_DIV: begin
        t02 <= q02; t01 <= q01; t12 <= q12;
      end
      S_MID: begin
        reg_mid_r <= mid_r;
        reg_dx    <= mdx;
        reg_num   <= mnum;
      end
      S_HDIV: begin
        // divider 0 gives |dA|/|dX|; the sign follows the side of the middle vertex
        for (int l = 0; l < 8; l++) thg[l] <= reg_mid_r ? q02[l] : -q02[l];
      end
      default: ;
    endcase
  end

  always_comb begin
    out.v0 = sv[0];
    out.v1 = sv[1];
    out.v2 = sv[2];
    for (int l = 0; l < 8; l++) begin
      out.s02[l] = t02[l];
      out.s01[l] = t01[l];
      out.s12[l] = t12[l];
      out.hg[l]  = thg[l];
    end
    out.mid_right = reg_mid_r;
  end
endmodule
