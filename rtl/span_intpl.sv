// span_intpl: interpolation stage of the two pixel processors. It steps
// along a span two pixels per clock: PP0 takes the even x and PP1 the odd
// x of pixel pair xp, each getting A(x) = A(xs) + (x - xs) * dA/dX, rounded
// from 8 fraction bits and clamped (depth, U, V, W to 16 bits, colours to 8
// bits). A pixel outside [xs, xe) has its mask bit cleared. Spans arrive
// with in_valid/in_ready; pairs leave with out_valid/out_ready, one per
// clock. Two pixels per clock is the chip's rate; the per-pixel
// multiply form of the interpolation is this design's.
module span_intpl
  import g3d_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  span_t in,
  output logic  in_ready,
  output logic  out_valid,
  output pair_t out,
  input  logic  out_ready,
  output logic  busy
);
  span_t      sp;
  logic       active;
  logic [6:0] xp;
  logic [6:0] xp_last;

  function automatic logic [15:0] clamp16(input logic signed [35:0] v);
    logic signed [35:0] r;
    r = (v + 36'sd128) >>> 8;
    if (r < 0)      return 16'd0;
    if (r > 65535)  return 16'hffff;
    return 16'(r);
  endfunction
  function automatic logic [7:0] clamp8(input logic signed [35:0] v);
    logic signed [35:0] r;
    r = (v + 36'sd128) >>> 8;
    if (r < 0)    return 8'd0;
    if (r > 255)  return 8'hff;
    return 8'(r);
  endfunction
  function automatic pixel_t interp(input span_t s, input logic [8:0] x);
    pixel_t             p;
    logic signed [35:0] a [7];
    for (int k = 0; k < 7; k++)
      a[k] = $signed(s.a0[k]) + ($signed({1'b0, x}) - $signed({1'b0, s.xs})) * $signed(s.grad[k]);
    p.z = clamp16(a[0]);
    p.r = clamp8(a[1]);
    p.g = clamp8(a[2]);
    p.b = clamp8(a[3]);
    p.u = clamp16(a[4]);
    p.v = clamp16(a[5]);
    p.w = clamp16(a[6]);
    return p;
  endfunction

  assign xp_last   = 7'((sp.xe - 9'd1) >> 1);
  assign in_ready  = !active;
  assign out_valid = active;
  assign busy      = active;

  always_comb begin
    logic [8:0] xe0, xo1;
    xe0 = {1'b0, xp, 1'b0};
    xo1 = {1'b0, xp, 1'b1};
    out.y       = sp.y;
    out.xp      = xp;
    out.is2d    = sp.is2d;
    out.mask[0] = (xe0 >= sp.xs) && (xe0 < sp.xe);
    out.mask[1] = (xo1 >= sp.xs) && (xo1 < sp.xe);
    out.p0      = interp(sp, xe0);
    out.p1      = interp(sp, xo1);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      active <= 1'b0;
      xp     <= '0;
    end else if (!active) begin
      if (in_valid && in.xs < in.xe) begin
        sp     <= in;
        xp     <= 7'(in.xs >> 1);
        active <= 1'b1;
      end
    end else if (out_ready) begin
      if (xp == xp_last) active <= 1'b0;
      else               xp <= xp + 7'd1;
    end
endmodule
