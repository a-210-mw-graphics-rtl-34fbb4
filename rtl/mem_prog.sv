// mem_prog: memory programmer. It owns the crossbars that split the four
// frame macros and the four depth macros into a back buffer (given to the
// rendering pipeline) and a front buffer, and post-processes the front
// buffer on its way to the display, one pixel per LCD clock tick, while the
// pipeline renders into the back buffer.
// The display scan runs over the 256 x 256 front buffer in raster order.
// For pixel (x, y) the SIMD datapath reads P = FB[x][y], Q = FB[x+1][y]
// (Q = P at the right edge; x and x+1 always sit in different macros) and
// Z = ZB[x][y] in the same tick and computes, by its 16-bit command:
//   PASS  OUT = P
//   FSAA  OUT = (a*P + b*Q) >> c                  (2x1 anti-aliasing filter)
//   FOG   OUT = color + (P - color) * f / 256,    f = min(255, (Z + bias) >> (k+1))
// per 8-bit channel, saturated. With the write-back bit the result is also
// written back into the front buffer at (x, y) in the same tick. The
// result appears on lcd_rgb with lcd_valid one clock after the tick.
// Command word: [15:13] op, [12:10] a, [9:7] b, [6:4] c, [3] write back,
// [2:0] k (fog depth scale 2^(k+9)). Commands and the fog colour and bias
// are loaded with cmd_we.
// The crossbars, the separate read/write buses, the SIMD post-filter with
// its own 16-bit commands, one pixel per LCD clock and the FSAA and fog
// formulas follow the chip; the command encoding, the fixed-point form of
// the fog factor and running the scan on a tick of the rendering clock are
// this design's. Motion blur is not provided: no formula for it is given.
module mem_prog
  import g3d_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        swap,
  input  logic        cmd_we,
  input  logic [15:0] cmd_in,
  input  logic [23:0] fog_color_in,
  input  logic [15:0] fog_bias_in,
  input  logic        lcd_tick,
  output logic        lcd_valid,
  output logic [23:0] lcd_rgb,
  output logic        lcd_frame_start,   // with lcd_valid: first pixel of a frame
  // back buffers, rendering-pipeline side
  input  logic        ss_fb_en    [2],
  input  logic [14:0] ss_fb_addr  [2],
  input  logic        ss_fb_we    [2],
  input  logic [23:0] ss_fb_wdata [2],
  output logic [23:0] ss_fb_rdata [2],
  input  logic        ss_db_en    [2],
  input  logic [14:0] ss_db_addr  [2],
  input  logic        ss_db_we    [2],
  input  logic [15:0] ss_db_wdata [2],
  output logic [15:0] ss_db_rdata [2],
  // macros
  output logic        fbm_en    [4],
  output logic [14:0] fbm_addr  [4],
  output logic        fbm_we    [4],
  output logic [23:0] fbm_wdata [4],
  input  logic [23:0] fbm_rdata [4],
  output logic        dbm_en    [4],
  output logic [14:0] dbm_addr  [4],
  output logic        dbm_we    [4],
  output logic [15:0] dbm_wdata [4],
  input  logic [15:0] dbm_rdata [4]
);
  logic [15:0] cmd;
  logic [23:0] fog_color;
  logic [15:0] fog_bias;
  logic [7:0]  sx, sy;

  logic        fr_fb_en [2], fr_fb_we [2], fr_db_en [2], fr_db_we [2];
  logic [14:0] fr_fb_addr [2], fr_db_addr [2];
  logic [23:0] fr_fb_wdata [2], fr_fb_rdata [2];
  logic [15:0] fr_db_wdata [2], fr_db_rdata [2];

  mem_xbar #(.AW(15), .DW(24)) u_fbx (
    .swap,
    .bk_en(ss_fb_en), .bk_addr(ss_fb_addr), .bk_we(ss_fb_we), .bk_wdata(ss_fb_wdata), .bk_rdata(ss_fb_rdata),
    .fr_en(fr_fb_en), .fr_addr(fr_fb_addr), .fr_we(fr_fb_we), .fr_wdata(fr_fb_wdata), .fr_rdata(fr_fb_rdata),
    .m_en(fbm_en), .m_addr(fbm_addr), .m_we(fbm_we), .m_wdata(fbm_wdata), .m_rdata(fbm_rdata));

  mem_xbar #(.AW(15), .DW(16)) u_dbx (
    .swap,
    .bk_en(ss_db_en), .bk_addr(ss_db_addr), .bk_we(ss_db_we), .bk_wdata(ss_db_wdata), .bk_rdata(ss_db_rdata),
    .fr_en(fr_db_en), .fr_addr(fr_db_addr), .fr_we(fr_db_we), .fr_wdata(fr_db_wdata), .fr_rdata(fr_db_rdata),
    .m_en(dbm_en), .m_addr(dbm_addr), .m_we(dbm_we), .m_wdata(dbm_wdata), .m_rdata(dbm_rdata));

  // ---------------- SIMD datapath ----------------
  logic        px, qx;        // macro (parity) of P and of Q
  logic [7:0]  x1;
  logic [23:0] p, q, res;
  logic [15:0] z;

  assign px = sx[0];
  assign qx = ~sx[0];
  assign x1 = (sx == 8'd255) ? sx : sx + 8'd1;

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      fr_fb_en[k]    = 1'b0;
      fr_fb_addr[k]  = {sy, sx[7:1]};
      fr_fb_we[k]    = 1'b0;
      fr_fb_wdata[k] = res;
      fr_db_en[k]    = 1'b0;
      fr_db_addr[k]  = {sy, sx[7:1]};
      fr_db_we[k]    = 1'b0;
      fr_db_wdata[k] = '0;
    end
    fr_fb_en[px]   = lcd_tick;
    fr_fb_we[px]   = lcd_tick && cmd[3];
    fr_db_en[px]   = lcd_tick;
    if (sx != 8'd255) begin
      fr_fb_en[qx]   = lcd_tick;
      fr_fb_addr[qx] = {sy, x1[7:1]};
    end
    p = fr_fb_rdata[px];
    q = (sx == 8'd255) ? p : fr_fb_rdata[qx];
    z = fr_db_rdata[px];
  end

  always_comb begin
    logic [16:0] fz;
    logic [7:0]  f;
    fz = ({1'b0, z} + {1'b0, fog_bias}) >> ({1'b0, cmd[2:0]} + 4'd1);
    f  = (fz > 17'd255) ? 8'd255 : 8'(fz);
    for (int c = 0; c < 3; c++) begin
      logic [7:0]         pc, qc, fc;
      logic [11:0]        s;
      logic signed [17:0] d;
      pc = p[8*c +: 8];
      qc = q[8*c +: 8];
      fc = fog_color[8*c +: 8];
      s  = (12'(cmd[12:10]) * 12'(pc) + 12'(cmd[9:7]) * 12'(qc)) >> cmd[6:4];
      d  = 18'(($signed({10'd0, pc}) - $signed({10'd0, fc})) * $signed({10'd0, f})) >>> 8;
      case (mp_op_e'(cmd[15:13]))
        MP_FSAA: res[8*c +: 8] = (s > 12'd255) ? 8'hff : 8'(s);
        MP_FOG:  res[8*c +: 8] = 8'($signed({10'd0, fc}) + d);
        default: res[8*c +: 8] = pc;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cmd <= '0; fog_color <= '0; fog_bias <= '0;
      sx <= '0; sy <= '0;
      lcd_valid <= 1'b0; lcd_rgb <= '0; lcd_frame_start <= 1'b0;
    end else begin
      if (cmd_we) begin
        cmd <= cmd_in; fog_color <= fog_color_in; fog_bias <= fog_bias_in;
      end
      lcd_valid <= lcd_tick;
      if (lcd_tick) begin
        lcd_rgb         <= res;
        lcd_frame_start <= (sx == 0 && sy == 0);
        sx <= sx + 8'd1;
        if (sx == 8'd255) sy <= sy + 8'd1;
      end
    end
endmodule
