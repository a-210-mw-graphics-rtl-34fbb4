// span_gen: edge walker between triangle setup and the pixel processors.
// For a triangle it visits the rows y0 .. y2-1 of the sorted vertices, one
// row per clock. On each row it evaluates the long edge (0-2) and the short
// edge in use (0-1 above the middle row, 1-2 below) from the setup slopes,
// covers the pixels with left <= x < right (edges rounded up), and starts
// the attribute values at the first covered pixel from the long-edge value
// plus the per-pixel gradient times the distance. Empty rows produce no span.
// For a 2-D rectangle (rect_valid) it produces the rows y0..y1 with the
// columns x0..x1 and a constant colour and depth, marked is2d.
// Handshakes: tri_valid/rect_valid with in_ready (idle), spans with
// out_valid/out_ready. The chip states only that pixels are interpolated
// after setup; this edge walker, its sampling rule and the rectangle path
// are this design's.
module span_gen
  import g3d_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tri_valid,
  input  setup_t      tri_in,
  input  logic        rect_valid,
  input  logic [7:0]  rx0, ry0, rx1, ry1,   // inclusive corners, rx0<=rx1, ry0<=ry1
  input  logic [23:0] rcolor,
  input  logic [15:0] rz,
  output logic        in_ready,
  output logic        out_valid,
  output span_t       out,
  input  logic        out_ready,
  output logic        busy
);
  typedef enum logic [1:0] {S_IDLE, S_TRI, S_RECT} state_e;
  state_e state;

  setup_t      st;
  logic [7:0]  y;
  logic [7:0]  r_x0, r_y1, r_x1;
  logic [23:0] r_col;
  logic [15:0] r_z;

  span_t               tspan;
  logic                tnonempty;
  logic                last_row;

  function automatic logic [8:0] ceil_px(input logic signed [33:0] v);
    logic signed [33:0] c;
    c = (v + 34'sd255) >>> 8;
    if (c < 0)    return 9'd0;
    if (c > 256)  return 9'd256;
    return 9'(c);
  endfunction

  // Row evaluation of a triangle.
  always_comb begin
    logic signed [33:0] xl, xsh, xa, xb;
    logic signed [33:0] along;
    logic [7:0]         dyl;
    dyl = y - st.v0.y;
    xl  = $signed({1'b0, 17'(st.v0.x), 8'd0}) + $signed({1'b0, dyl}) * $signed(st.s02[L_X]);
    if (y < st.v1.y)
      xsh = $signed({1'b0, 17'(st.v0.x), 8'd0}) + $signed({1'b0, dyl}) * $signed(st.s01[L_X]);
    else
      xsh = $signed({1'b0, 17'(st.v1.x), 8'd0}) + $signed({1'b0, 8'(y - st.v1.y)}) * $signed(st.s12[L_X]);
    xa = st.mid_right ? xl  : xsh;
    xb = st.mid_right ? xsh : xl;
    tspan      = '0;
    tspan.y    = y;
    tspan.xs   = ceil_px(xa);
    tspan.xe   = ceil_px(xb);
    tspan.is2d = 1'b0;
    for (int k = 0; k < 7; k++) begin
      along         = $signed({1'b0, lane_val(st.v0, k + 1), 8'd0}) +
                      $signed({1'b0, dyl}) * $signed(st.s02[k+1]);
      tspan.a0[k]   = 34'(along + ((($signed({1'b0, tspan.xs, 8'd0}) - xl) * $signed(st.hg[k+1])) >>> 8));
      tspan.grad[k] = st.hg[k+1];
    end
    tnonempty = tspan.xs < tspan.xe;
  end

  always_comb begin
    out       = tspan;
    out_valid = 1'b0;
    last_row  = 1'b0;
    case (state)
      S_TRI: begin
        out_valid = tnonempty;
        last_row  = (y + 8'd1 >= st.v2.y);
      end
      S_RECT: begin
        out       = '0;
        out.y     = y;
        out.xs    = {1'b0, r_x0};
        out.xe    = {1'b0, r_x1} + 9'd1;
        out.is2d  = 1'b1;
        out.a0[0] = {10'd0, r_z, 8'd0};
        out.a0[1] = {18'd0, r_col[23:16], 8'd0};
        out.a0[2] = {18'd0, r_col[15:8], 8'd0};
        out.a0[3] = {18'd0, r_col[7:0], 8'd0};
        out_valid = 1'b1;
        last_row  = (y == r_y1);
      end
      default: ;
    endcase
  end

  assign in_ready = (state == S_IDLE);
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= S_IDLE;
      y     <= '0;
    end else case (state)
      S_IDLE:
        if (tri_valid) begin
          st <= tri_in;
          y  <= tri_in.v0.y;
          state <= (tri_in.v0.y == tri_in.v2.y) ? S_IDLE : S_TRI;
        end else if (rect_valid) begin
          r_x0 <= rx0; r_x1 <= rx1; r_y1 <= ry1;
          r_col <= rcolor; r_z <= rz;
          y <= ry0;
          state <= S_RECT;
        end
      S_TRI, S_RECT:
        if (!out_valid || out_ready) begin
          y <= y + 8'd1;
          if (last_row) state <= S_IDLE;
        end
      default: state <= S_IDLE;
    endcase
endmodule
