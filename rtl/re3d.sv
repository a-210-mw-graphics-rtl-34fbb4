// re3d: 3-D rendering engine. It takes 128-bit commands from the vertex
// buffer, sets up and rasterises triangles and rectangles, shades, depth
// tests and textures two pixels per clock into the back buffer, and
// post-processes the front buffer to the display. Inside:
//   command decoder  vertex registers, render state, buffer swap, texture
//                    upload and memory-programmer commands
//   tse              triangle setup;  span_gen  edge walking into spans
//   span_intpl       per-pixel interpolation for PP0/PP1
//   slimshader       depth test with depth-first clock gating, texture
//                    addressing, address alignment, filtering, blending
//   mem_prog         crossbars, SIMD post-filter and LCD scan-out
//   4 fb_macro, 4 db_macro, 4 tm_macro  the 29 Mb of embedded DRAM
// Commands (bits [127:124] opcode):
//   VTX   [123:122] slot, [121:114] x, [113:106] y, [105:90] z, [89:82] r,
//         [81:74] g, [73:66] b, [65:50] u, [49:34] v, [33:18] w
//   TRI   draw the triangle of the three vertex registers
//   RECT  [121:114] x0, [113:106] y0, [105:98] x1, [97:90] y1 (inclusive),
//         [89:66] rgb, [65:50] z; a 2-D fill (no depth test, no texture)
//   STATE [123] depth test, [122] texture, [121] point sampling,
//         [120:119] texture mode, [118] alpha blend, [117:110] alpha,
//         [109:106] log2 texture size, [105:88] texture base
//   TEXW  [123:122] macro, [121:104] word, [103:80] texel
//   SWAP  exchange front and back buffers
//   MPCMD [123:108] post-filter command, [107:84] fog colour, [83:68] fog bias
// TRI and RECT are queued behind the drawing in progress; STATE, TEXW,
// SWAP and MPCMD wait until the pipeline is empty. The logic runs on
// `clk` (REclk) and the DRAM macros on `mem_clk` (MEMclk, same frequency
// and edges). The block partition and the memory organisation follow the
// chip; the command set and its encoding are this design's.
module re3d
  import g3d_pkg::*;
(
  input  logic         clk,
  input  logic         mem_clk,
  input  logic         rst_n,
  input  logic         cmd_valid,
  input  logic [127:0] cmd,
  output logic         cmd_ready,
  input  logic         lcd_tick,
  output logic         lcd_valid,
  output logic [23:0]  lcd_rgb,
  output logic         lcd_frame_start,
  output logic         idle,
  output logic         swap,
  // statistics pulses
  output logic         ev_dfcg,
  output logic [1:0]   ev_zfail,
  output logic         ev_conflict,
  output logic [7:0]   ev_spmask,
  output logic [7:0]   ev_tpmask,
  output logic [3:0]   ev_tm_act
);
  opcode_e op;
  assign op = opcode_e'(cmd[127:124]);

  vertex_t vreg [3];
  rstate_t st;
  logic    flush;

  // ---------------- pipeline ----------------
  logic   tse_in_ready, tse_out_valid, tse_in_valid;
  setup_t setup;
  logic   sg_in_ready, sg_busy, rect_valid;
  logic   sp_valid, sp_ready, si_busy;
  span_t  span;
  logic   pr_valid, pr_ready, ss_busy;
  pair_t  pair;

  tse u_tse (.clk, .rst_n, .in_valid(tse_in_valid), .vtx(vreg), .in_ready(tse_in_ready),
             .out_valid(tse_out_valid), .out(setup), .out_ready(sg_in_ready));

  span_gen u_sg (.clk, .rst_n, .tri_valid(tse_out_valid), .tri_in(setup),
                 .rect_valid, .rx0(cmd[121:114]), .ry0(cmd[113:106]), .rx1(cmd[105:98]),
                 .ry1(cmd[97:90]), .rcolor(cmd[89:66]), .rz(cmd[65:50]),
                 .in_ready(sg_in_ready), .out_valid(sp_valid), .out(span), .out_ready(sp_ready),
                 .busy(sg_busy));

  span_intpl u_si (.clk, .rst_n, .in_valid(sp_valid), .in(span), .in_ready(sp_ready),
                   .out_valid(pr_valid), .out(pair), .out_ready(pr_ready), .busy(si_busy));

  logic        db_en [2], db_we [2], fb_en [2], fb_we [2];
  logic [14:0] db_addr [2], fb_addr [2];
  logic [15:0] db_wdata [2], db_rdata [2];
  logic [23:0] fb_wdata [2], fb_rdata [2];
  logic [3:0]  ss_tm_en;
  logic [17:0] ss_tm_addr [4];
  logic [23:0] tm_rdata [4];

  slimshader u_ss (.clk, .rst_n, .st, .flush, .in_valid(pr_valid), .in(pair), .in_ready(pr_ready),
                   .busy(ss_busy),
                   .db_en, .db_addr, .db_we, .db_wdata, .db_rdata,
                   .fb_en, .fb_addr, .fb_we, .fb_wdata, .fb_rdata,
                   .tm_en(ss_tm_en), .tm_addr(ss_tm_addr), .tm_rdata,
                   .ev_dfcg, .ev_zfail, .ev_conflict, .ev_spmask, .ev_tpmask);

  assign idle = tse_in_ready && !tse_out_valid && !sg_busy && !si_busy && !ss_busy;

  // ---------------- command decoder ----------------
  logic mp_cmd_we, texw;

  always_comb begin
    cmd_ready    = 1'b0;
    tse_in_valid = 1'b0;
    rect_valid   = 1'b0;
    mp_cmd_we    = 1'b0;
    texw         = 1'b0;
    flush        = 1'b0;
    if (cmd_valid) begin
      case (op)
        OP_VTX: cmd_ready = 1'b1;
        OP_TRI: begin
          tse_in_valid = 1'b1;
          cmd_ready    = tse_in_ready;
        end
        OP_RECT: begin
          rect_valid = tse_in_ready && !tse_out_valid && sg_in_ready;
          cmd_ready  = rect_valid;
        end
        OP_STATE: begin
          cmd_ready = idle;
          flush     = idle;
        end
        OP_TEXW: begin
          cmd_ready = idle;
          texw      = idle;
        end
        OP_SWAP:  cmd_ready = idle;
        OP_MPCMD: begin
          cmd_ready = idle;
          mp_cmd_we = idle;
        end
        default: cmd_ready = 1'b1;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st   <= '0;
      swap <= 1'b0;
    end else if (cmd_valid && cmd_ready) begin
      case (op)
        OP_VTX:   vreg[cmd[123:122] == 2'd3 ? 2 : int'(cmd[123:122])] <= vertex_t'(cmd[121:18]);
        OP_STATE: st   <= rstate_t'(cmd[123:88]);
        OP_SWAP:  swap <= ~swap;
        default: ;
      endcase
    end

  // ---------------- memory programmer and DRAM ----------------
  logic        fbm_en [4], fbm_we [4], dbm_en [4], dbm_we [4];
  logic [14:0] fbm_addr [4], dbm_addr [4];
  logic [23:0] fbm_wdata [4], fbm_rdata [4];
  logic [15:0] dbm_wdata [4], dbm_rdata [4];

  mem_prog u_mp (.clk, .rst_n, .swap, .cmd_we(mp_cmd_we), .cmd_in(cmd[123:108]),
                 .fog_color_in(cmd[107:84]), .fog_bias_in(cmd[83:68]),
                 .lcd_tick, .lcd_valid, .lcd_rgb, .lcd_frame_start,
                 .ss_fb_en(fb_en), .ss_fb_addr(fb_addr), .ss_fb_we(fb_we), .ss_fb_wdata(fb_wdata),
                 .ss_fb_rdata(fb_rdata),
                 .ss_db_en(db_en), .ss_db_addr(db_addr), .ss_db_we(db_we), .ss_db_wdata(db_wdata),
                 .ss_db_rdata(db_rdata),
                 .fbm_en, .fbm_addr, .fbm_we, .fbm_wdata, .fbm_rdata,
                 .dbm_en, .dbm_addr, .dbm_we, .dbm_wdata, .dbm_rdata);

  for (genvar k = 0; k < 4; k++) begin : g_mem
    logic        tm_en_k, tm_we_k;
    logic [17:0] tm_addr_k;
    assign tm_en_k   = texw ? (cmd[123:122] == 2'(k)) : ss_tm_en[k];
    assign tm_we_k   = texw;
    assign tm_addr_k = texw ? cmd[121:104] : ss_tm_addr[k];
    assign ev_tm_act[k] = ss_tm_en[k];

    fb_macro u_fb (.clk(mem_clk), .en(fbm_en[k]), .addr(fbm_addr[k]), .wmask(fbm_we[k]),
                   .wdata(fbm_wdata[k]), .rdata(fbm_rdata[k]));
    db_macro u_db (.clk(mem_clk), .en(dbm_en[k]), .addr(dbm_addr[k]), .wmask(dbm_we[k]),
                   .wdata(dbm_wdata[k]), .rdata(dbm_rdata[k]));
    tm_macro u_tm (.clk(mem_clk), .en(tm_en_k), .we(tm_we_k), .addr(tm_addr_k),
                   .wdata(cmd[103:80]), .rdata(tm_rdata[k]));
  end
endmodule
