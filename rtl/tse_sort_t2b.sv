// tse_sort_t2b: first stage of the triangle setup engine (SORT_T2B). Three
// 9-way SIMD subtractors form the pairwise differences v1-v0, v2-v0 and
// v2-v1 of all nine vertex values (X, Y, Z, R, G, B, U, V, W); the signs of
// the three Y differences decide the top-to-bottom order, and the
// differences of the sorted vertices are taken from the same subtractions
// (negated where the order is reversed). Purely combinational.
// Outputs: s0 (top), s1 (middle), s2 (bottom); d01, d02, d12 are the sorted
// differences in the eight divider lanes X, Z, R, G, B, U, V, W and dy01,
// dy02, dy12 the (non-negative) Y differences. Ties keep the input order.
module tse_sort_t2b
  import g3d_pkg::*;
(
  input  vertex_t            v   [3],
  output vertex_t            s   [3],
  output logic signed [16:0] d01 [8],
  output logic signed [16:0] d02 [8],
  output logic signed [16:0] d12 [8],
  output logic [7:0]         dy01,
  output logic [7:0]         dy02,
  output logic [7:0]         dy12
);
  // Unsorted pairwise differences: index 0 = v1-v0, 1 = v2-v0, 2 = v2-v1.
  logic signed [16:0] du [3][8];
  logic signed [8:0]  dyu [3];
  int                 ord [3];

  always_comb begin
    for (int l = 0; l < 8; l++) begin
      du[0][l] = $signed(lane_val(v[1], l)) - $signed(lane_val(v[0], l));
      du[1][l] = $signed(lane_val(v[2], l)) - $signed(lane_val(v[0], l));
      du[2][l] = $signed(lane_val(v[2], l)) - $signed(lane_val(v[1], l));
    end
    dyu[0] = $signed({1'b0, v[1].y}) - $signed({1'b0, v[0].y});
    dyu[1] = $signed({1'b0, v[2].y}) - $signed({1'b0, v[0].y});
    dyu[2] = $signed({1'b0, v[2].y}) - $signed({1'b0, v[1].y});

    // Sign bits of the Y differences give the order.
    ord = '{0, 1, 2};
    if (!dyu[0][8] && !dyu[2][8])      ord = '{0, 1, 2};  // y0<=y1<=y2
    else if (!dyu[1][8] && dyu[2][8])  ord = '{0, 2, 1};  // y0<=y2<y1
    else if (dyu[0][8] && !dyu[1][8])  ord = '{1, 0, 2};  // y1<y0<=y2
    else if (dyu[1][8] && !dyu[0][8])  ord = '{2, 0, 1};  // y2<y0<=y1
    else if (!dyu[2][8])               ord = '{1, 2, 0};  // y1<=y2<y0
    else                               ord = '{2, 1, 0};  // y2<y1<y0

    for (int i = 0; i < 3; i++) s[i] = v[ord[i]];

    for (int l = 0; l < 8; l++) begin
      d01[l] = pick(ord[0], ord[1], l);
      d02[l] = pick(ord[0], ord[2], l);
      d12[l] = pick(ord[1], ord[2], l);
    end
    dy01 = s[1].y - s[0].y;
    dy02 = s[2].y - s[0].y;
    dy12 = s[2].y - s[1].y;
  end

  // Difference v[b]-v[a] of lane l, taken from the unsorted subtractors.
  function automatic logic signed [16:0] pick(input int a, input int b, input int l);
    if (a == 0 && b == 1) return du[0][l];
    if (a == 0 && b == 2) return du[1][l];
    if (a == 1 && b == 2) return du[2][l];
    if (a == 1 && b == 0) return -du[0][l];
    if (a == 2 && b == 0) return -du[1][l];
    return -du[2][l];
  endfunction
endmodule
