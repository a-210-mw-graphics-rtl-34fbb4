// tse_mid_intpl: last stage of the triangle setup engine (MID_INTPL). It
// interpolates every value along the long edge (top to bottom vertex) down
// to the row of the middle vertex, A_mid = A0 + dy01 * dA/dY(long), and
// compares the interpolated X with the middle vertex's X to find the
// triangle type: mid_right = 1 when the middle vertex lies right of the long
// edge. It also prepares the horizontal divisions that give the per-pixel
// gradients: num[l] = A1 - A_mid (integer part, rounded) and
// dx = round(|X1 - X_mid|), saturated to 8 bits. Combinational; values with
// slopes carry 8 fraction bits. The comparison that decides the type is the
// chip's; preparing the x gradients here is this design's.
module tse_mid_intpl
  import g3d_pkg::*;
(
  input  vertex_t            v0,
  input  vertex_t            v1,
  input  logic [7:0]         dy01,
  input  logic signed [24:0] s02 [8],
  output logic               mid_right,
  output logic [7:0]         dx,
  output logic signed [16:0] num [8]
);
  logic signed [33:0] amid [8];
  logic signed [33:0] xdiff;
  logic signed [33:0] adx;

  always_comb begin
    for (int l = 0; l < 8; l++) begin
      logic signed [33:0] a1;
      logic signed [33:0] n;
      amid[l] = $signed({1'b0, lane_val(v0, l), 8'd0}) + $signed({1'b0, dy01}) * s02[l];
      a1      = $signed({1'b0, lane_val(v1, l), 8'd0});
      n       = (a1 - amid[l] + 34'sd128) >>> 8;
      if (n > 34'sd65535)       num[l] = 17'sd65535;    // saturate to the lane width
      else if (n < -34'sd65535) num[l] = -17'sd65535;
      else                      num[l] = 17'(n);
    end
    xdiff     = $signed({1'b0, 17'(v1.x), 8'd0}) - amid[L_X];
    mid_right = (xdiff > 0);
    adx       = xdiff < 0 ? -xdiff : xdiff;
    adx       = (adx + 34'sd128) >>> 8;
    dx        = (adx > 34'sd255) ? 8'd255 : 8'(adx);
  end
endmodule
