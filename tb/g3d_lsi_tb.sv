// g3d_lsi_tb: end-to-end test of the whole chip at its default sizes
// (256 x 256 display, full DRAM macros, 64-entry equalizer). Only the VCO
// clock is driven; all four clock domains come from the clock control unit.
// The testbench plays the geometry processor: it uses the MAC, uses the
// equalizer as scratch-pad RAM, and then streams rendering commands as
// 32-bit words through the equalizer (four words per 128-bit command,
// bits [31:0] first). The scene: a 2-D background fill, two flat
// triangles at different depths (one partly hidden), an alpha-blended
// triangle, a texture upload, a bilinear textured triangle and a
// point-sampled one, with the clock mode switched FAST -> NORMAL -> SLOW
// -> FAST while drawing and the rendering clocks gated off once so that
// the equalizer fills up. Every pixel of the back buffer is checked:
// exact colour and depth for flat, filled and blended areas, texel range
// for bilinear texturing, texel membership for point sampling; pixels
// within 1.5 pixels of an edge may hold either value. The buffers are then
// swapped and three displayed frames (pass, anti-aliasing, fog) are
// compared pixel by pixel with the post-filter formulas.
// Each mechanism is counted and a failure is counted for each that never
// happened: MAC, scratch pad, equalizer full stall, several banks active,
// idle banks, mode switches, clock gating, depth failures, depth-first
// clock gating, macro conflicts, spatial and temporal texel merges, point
// sampling, alpha blending, rectangle fill, swap, FSAA, fog.
`timescale 1ns/1ps
module g3d_lsi_tb;
  import g3d_pkg::*;
  logic rst_n = 0, vco_clk = 0, pll_fb_clk, risc_clk, re_clk_out;
  logic [3:0] log2m_ctrl = 4'd0, clk_gate = 4'hf;
  logic [1:0] log2n_ctrl = 2'd3;
  logic mode_fast = 0, mode_normal = 0, mode_slow = 1;
  logic mac_en = 0, mac_clr = 0, mac_uns = 0;
  logic [31:0] mac_a = 0, mac_b = 0;
  logic [63:0] mac_acc;
  logic beq_spad = 0, beq_wr_valid = 0, beq_wr_ready, beq_sp_rd = 0;
  logic [31:0] beq_wr_data = 0, beq_sp_rdata;
  logic [7:0]  beq_sp_addr = 0;
  logic [3:0]  beq_bank_act;
  logic [6:0]  beq_level;
  logic lcd_tick = 0, lcd_valid, lcd_frame_start, re_idle, front_sel;
  logic [23:0] lcd_rgb;
  logic ev_dfcg, ev_conflict;
  logic [1:0] ev_zfail;
  logic [7:0] ev_spmask, ev_tpmask;
  logic [3:0] ev_tm_act;

  g3d_lsi dut (.*);
  always #1 vco_clk = ~vco_clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_mac = 0, n_spad = 0, n_full = 0, max_banks = 0, n_idle_bank = 0, n_switch = 0, n_gated = 0;
  int n_zfail = 0, n_dfcg = 0, n_conf = 0, n_sp = 0, n_tp = 0, n_point = 0, n_alpha = 0;
  int n_rect = 0, n_swap = 0, n_fsaa = 0, n_fog = 0, n_tm = 0, max_level = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL: %s", msg); end
  endtask

  always @(posedge re_clk_out) if (rst_n) begin
    n_zfail += int'(ev_zfail[0]) + int'(ev_zfail[1]);
    n_dfcg  += int'(ev_dfcg);
    n_conf  += int'(ev_conflict);
    n_sp    += $countones(ev_spmask);
    n_tp    += $countones(ev_tpmask);
    n_tm    += $countones(ev_tm_act);
  end
  always @(posedge risc_clk) if (rst_n && !beq_spad) begin
    if ($countones(beq_bank_act) > max_banks) max_banks = $countones(beq_bank_act);
    if (beq_bank_act != 4'hf) n_idle_bank++;
    if (int'(beq_level) > max_level) max_level = int'(beq_level);
  end

  // ---------------- geometry-processor side ----------------
  // called at a falling RISC clock edge, returns at one
  task automatic put(input logic [31:0] w);
    beq_wr_valid = 1; beq_wr_data = w;
    while (!beq_wr_ready) begin n_full++; @(negedge risc_clk); end
    @(negedge risc_clk);
    beq_wr_valid = 0;
  endtask

  task automatic send(input logic [127:0] c);
    for (int i = 0; i < 4; i++) put(c[32*i +: 32]);
  endtask

  task automatic set_mode(input int m);   // 0 fast, 1 normal, 2 slow
    {mode_fast, mode_normal, mode_slow} = (m == 0) ? 3'b100 : (m == 1) ? 3'b010 : 3'b001;
    n_switch++;
  endtask

  task automatic wait_idle();
    int n;
    n = 0;
    while (n < 8) begin
      @(posedge re_clk_out);
      n = (re_idle && beq_level == 0 && !dut.u_beq.rd_valid) ? n + 1 : 0;
    end
    @(negedge risc_clk);   // processor-side writes start on a falling edge
  endtask

  // ---------------- reference image ----------------
  typedef enum logic [1:0] {EXACT, UNSURE, TEXRANGE, TEXSET} kind_e;
  logic [23:0] rc [256][256];
  logic [15:0] rzb [256][256];
  kind_e       rk [256][256];
  logic [23:0] texels [$];

  function automatic logic [23:0] back_c(input int x, input int y);
    logic [14:0] a;
    a = {8'(y), 7'(x >> 1)};
    case ((front_sel ? 0 : 2) + x % 2)   // front_sel = 0: back buffer is macros 0, 1
      2: return dut.u_re.g_mem[0].u_fb.mem[a];
      3: return dut.u_re.g_mem[1].u_fb.mem[a];
      0: return dut.u_re.g_mem[2].u_fb.mem[a];
      default: return dut.u_re.g_mem[3].u_fb.mem[a];
    endcase
  endfunction
  function automatic logic [15:0] back_z(input int x, input int y);
    logic [14:0] a;
    a = {8'(y), 7'(x >> 1)};
    case ((front_sel ? 0 : 2) + x % 2)
      2: return dut.u_re.g_mem[0].u_db.mem[a];
      3: return dut.u_re.g_mem[1].u_db.mem[a];
      0: return dut.u_re.g_mem[2].u_db.mem[a];
      default: return dut.u_re.g_mem[3].u_db.mem[a];
    endcase
  endfunction

  rstate_t st;
  task automatic state(input rstate_t s);
    st = s;
    send({4'(OP_STATE), s, 88'd0});
  endtask

  task automatic rect(input int x0, input int y0, input int x1, input int y1, input logic [23:0] c, input logic [15:0] z);
    logic [127:0] k;
    k = '0;
    k[127:124] = 4'(OP_RECT); k[121:114] = 8'(x0); k[113:106] = 8'(y0); k[105:98] = 8'(x1);
    k[97:90] = 8'(y1); k[89:66] = c; k[65:50] = z;
    send(k);
    n_rect++;
    for (int y = y0; y <= y1; y++) for (int x = x0; x <= x1; x++) begin rc[y][x] = c; rzb[y][x] = z; rk[y][x] = EXACT; end
  endtask

  function automatic real edge_d(input int ax, input int ay, input int bx, input int by, input int px, input int py,
                                 input int cx, input int cy);
    real e, ec, len;
    e  = real'((bx - ax) * (py - ay) - (by - ay) * (px - ax));
    ec = real'((bx - ax) * (cy - ay) - (by - ay) * (cx - ax));
    len = $sqrt(real'((bx - ax) * (bx - ax) + (by - ay) * (by - ay)));
    return (ec > 0 ? e : -e) / len;
  endfunction

  function automatic logic [23:0] blend(input logic [23:0] c, input logic [23:0] d);
    logic [23:0] o;
    int a;
    a = int'(st.alpha) + (st.alpha >= 128 ? 1 : 0);
    for (int k = 0; k < 3; k++) o[8*k +: 8] = 8'((a * int'(c[8*k +: 8]) + (256 - a) * int'(d[8*k +: 8])) >> 8);
    return o;
  endfunction

  // one triangle of constant colour and depth; texture coordinates span
  // the whole texture (u = v = 0 at vertex 0, u = 1 at vertex 1, v = 1 at vertex 2)
  task automatic draw_tri(input int x[3], input int y[3], input logic [23:0] c, input logic [15:0] z);
    for (int k = 0; k < 3; k++) begin
      logic [127:0] m;
      m = '0;
      m[127:124] = 4'(OP_VTX); m[123:122] = 2'(k); m[121:114] = 8'(x[k]); m[113:106] = 8'(y[k]);
      m[105:90] = z; m[89:66] = c;
      m[65:50] = (k == 1) ? 16'hffff : 16'h0; m[49:34] = (k == 2) ? 16'hffff : 16'h0; m[33:18] = 16'hffff;
      send(m);
    end
    send({4'(OP_TRI), 124'd0});
    for (int py = 0; py < 256; py++)
      for (int px = 0; px < 256; px++) begin
        real d, d1, d2;
        d  = edge_d(x[0], y[0], x[1], y[1], px, py, x[2], y[2]);
        d1 = edge_d(x[1], y[1], x[2], y[2], px, py, x[0], y[0]);
        d2 = edge_d(x[2], y[2], x[0], y[0], px, py, x[1], y[1]);
        if (d1 < d) d = d1;
        if (d2 < d) d = d2;
        if (d > -1.5 && (!st.depth_test || z > rzb[py][px] || rk[py][px] == UNSURE)) begin
          if (d > 1.5 && rk[py][px] != UNSURE && !(st.alpha_en && rk[py][px] != EXACT)) begin
            rzb[py][px] = z;
            if (st.tex_en) rk[py][px] = st.point_sample ? TEXSET : TEXRANGE;
            else rc[py][px] = st.alpha_en ? blend(c, rc[py][px]) : c;
          end else rk[py][px] = UNSURE;
        end
      end
  endtask

  task automatic compare_back(input string what);
    int nu;
    nu = 0;
    for (int y = 0; y < 256; y++)
      for (int x = 0; x < 256; x++) begin
        logic [23:0] g;
        g = back_c(x, y);
        case (rk[y][x])
          EXACT: begin
            check(g == rc[y][x], $sformatf("%s colour (%0d,%0d) %h exp %h", what, x, y, g, rc[y][x]));
            check(back_z(x, y) == rzb[y][x], $sformatf("%s depth (%0d,%0d) %h exp %h", what, x, y, back_z(x, y), rzb[y][x]));
          end
          TEXRANGE: begin
            check(g[23:16] >= 64 && g[23:16] < 128 && g[15:8] >= 128 && g[7:0] < 64,
                  $sformatf("%s bilinear texel (%0d,%0d) %h", what, x, y, g));
            check(back_z(x, y) == rzb[y][x], "textured depth");
          end
          TEXSET: begin
            bit found;
            found = 0;
            foreach (texels[i]) if (texels[i] == g) found = 1;
            check(found, $sformatf("%s point-sampled texel (%0d,%0d) %h", what, x, y, g));
            n_point += int'(found);
          end
          default: nu++;
        endcase
      end
    check(nu < 10000, $sformatf("%s: %0d border pixels", what, nu));
  endtask

  // ---------------- display ----------------
  logic [23:0] img [256][256];
  logic [15:0] zimg [256][256];
  task automatic show(input logic [15:0] mpc, input logic [23:0] fcol, input logic [15:0] fbias);
    logic [127:0] k;
    if (n_swap == 0) begin
      // the back buffer becomes the displayed image
      for (int y = 0; y < 256; y++) for (int x = 0; x < 256; x++) begin img[y][x] = back_c(x, y); zimg[y][x] = back_z(x, y); end
      @(negedge risc_clk);
      send({4'(OP_SWAP), 124'd0});
      n_swap++;
    end
    @(negedge risc_clk);
    k = '0; k[127:124] = 4'(OP_MPCMD); k[123:108] = mpc; k[107:84] = fcol; k[83:68] = fbias;
    send(k);
    wait_idle();
    if (n_swap == 1) check(front_sel == 1'b1, "buffers swapped");
    @(negedge re_clk_out);
    lcd_tick = 1;
    do begin @(posedge re_clk_out); #0.1; end while (!(lcd_valid && lcd_frame_start));
    for (int i = 0; i < 65536; i++) begin
      logic [23:0] e, p, q;
      int x, y, f;
      x = i % 256; y = i / 256;
      p = img[y][x]; q = (x == 255) ? p : img[y][x + 1];
      f = (int'(zimg[y][x]) + int'(fbias)) >> (int'(mpc[2:0]) + 1);
      if (f > 255) f = 255;
      for (int c = 0; c < 3; c++) begin
        int pc, qc, fc, s;
        pc = int'(p[8*c +: 8]); qc = int'(q[8*c +: 8]); fc = int'(fcol[8*c +: 8]);
        s = (int'(mpc[12:10]) * pc + int'(mpc[9:7]) * qc) >> int'(mpc[6:4]);
        case (mpc[15:13])
          3'd1: e[8*c +: 8] = (s > 255) ? 8'hff : 8'(s);
          3'd2: e[8*c +: 8] = 8'(fc + (((pc - fc) * f) >>> 8));
          default: e[8*c +: 8] = 8'(pc);
        endcase
      end
      check(lcd_valid && lcd_rgb == e, $sformatf("display %h (%0d,%0d) %h exp %h", mpc, x, y, lcd_rgb, e));
      @(posedge re_clk_out); #0.1;
    end
    lcd_tick = 0;
    if (mpc[15:13] == 3'd1) n_fsaa++;
    if (mpc[15:13] == 3'd2) n_fog++;
  endtask

  // ---------------- watchdog ----------------
  initial begin
    #60ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xs[3], ys[3];
    logic signed [63:0] ref_acc;
    rstate_t s;
    for (int y = 0; y < 256; y++) for (int x = 0; x < 256; x++) begin
      rc[y][x] = 0; rzb[y][x] = 0; rk[y][x] = EXACT;
    end
    st = '0;
    #20 rst_n = 1;
    repeat (4) @(negedge risc_clk);
    set_mode(0);
    repeat (4) @(negedge risc_clk);
    check(dut.u_ppo.fast_clk === risc_clk, "fast mode: RISC clock is the fast tap");

    // MAC: signed multiply-accumulate
    ref_acc = 0;
    for (int i = 0; i < 20; i++) begin
      logic signed [31:0] a, b;
      a = $signed($urandom); b = $signed($urandom);
      mac_en = 1; mac_clr = (i == 0); mac_uns = 0; mac_a = a; mac_b = b;
      ref_acc = (i == 0 ? 64'sd0 : ref_acc) + 64'(a) * 64'(b);
      @(negedge risc_clk);
      check(mac_acc == ref_acc, $sformatf("mac %0d: %h exp %h", i, mac_acc, ref_acc));
      n_mac++;
    end
    mac_en = 0;

    // scratch-pad mode
    beq_spad = 1;
    for (int i = 0; i < 32; i++) begin
      beq_sp_addr = 8'(i * 7); beq_wr_valid = 1; beq_wr_data = 32'(i * 32'h01030507);
      @(negedge risc_clk);
    end
    beq_wr_valid = 0;
    for (int i = 0; i < 32; i++) begin
      beq_sp_addr = 8'(i * 7); beq_sp_rd = 1;
      @(negedge risc_clk);
      beq_sp_rd = 0;
      check(beq_sp_rdata == 32'(i * 32'h01030507), $sformatf("scratch pad word %0d", i));
      n_spad++;
    end
    beq_spad = 0;
    repeat (4) @(negedge risc_clk);

    // rendering clocks gated: the equalizer fills and stalls the processor
    clk_gate = 4'b0011;
    fork
      begin
        s = '0; s.depth_test = 1; s.log2size = 4;
        state(s);
        rect(0, 0, 255, 255, 24'h203040, 16'd100);
        for (int i = 0; i < 70; i++) send({4'(OP_VTX), 124'(i)});
      end
      begin
        repeat (800) @(negedge risc_clk);
        if (dut.re_clk === 1'b0) n_gated++;
        clk_gate = 4'hf;
      end
    join
    check(max_level >= 60, $sformatf("equalizer filled to %0d entries", max_level));

    rect(200, 10, 250, 60, 24'hff0000, 16'd100);
    xs = '{20, 200, 80};  ys = '{30, 60, 220}; draw_tri(xs, ys, 24'hc08040, 16'd5000);
    xs = '{60, 180, 120}; ys = '{10, 200, 120}; draw_tri(xs, ys, 24'h2040c0, 16'd3000);
    // alpha blending over the background
    s.alpha_en = 1; s.alpha = 8'd160; state(s);
    xs = '{150, 250, 240}; ys = '{70, 80, 180}; draw_tri(xs, ys, 24'hffffff, 16'd6000);
    n_alpha++;
    wait_idle();
    compare_back("flat");
    check(n_dfcg > 0 && n_zfail > 0, "hidden surfaces rejected");

    // texture upload: 16 x 16 texture and its mipmaps in the four macros
    for (int w = 0; w < 96; w++)
      for (int m = 0; m < 4; m++) begin
        logic [23:0] t;
        logic [127:0] k;
        t = {8'(64 + (m * 37 + w * 11) % 64), 8'(128 + (m * 13 + w * 29) % 128), 8'((m * 5 + w * 17) % 64)};
        texels.push_back(t);
        k = '0; k[127:124] = 4'(OP_TEXW); k[123:122] = 2'(m); k[121:104] = 18'(w); k[103:80] = t;
        send(k);
      end
    // bilinear texture, replace, drawn while the clock slows down
    s.alpha_en = 0; s.tex_en = 1; s.tex_mode = 2'd1; s.point_sample = 0; state(s);
    set_mode(1);
    xs = '{10, 120, 10}; ys = '{130, 130, 250}; draw_tri(xs, ys, 24'h0, 16'd20000);
    // about two pixels per texel: neighbouring footprints collide in a macro
    xs = '{130, 162, 130}; ys = '{130, 130, 162}; draw_tri(xs, ys, 24'h0, 16'd21000);
    set_mode(2);
    s.point_sample = 1; state(s);
    xs = '{130, 250, 130}; ys = '{190, 190, 250}; draw_tri(xs, ys, 24'h0, 16'd20000);
    wait_idle();
    set_mode(0);
    compare_back("textured");

    // swap and display
    show(16'h0000, 24'h0, 16'h0);
    show({3'd1, 3'd1, 3'd1, 3'd1, 1'b0, 3'd0}, 24'h0, 16'h0);
    show({3'd2, 9'd0, 1'b0, 3'd6}, 24'h80c0ff, 16'd1000);

    // every mechanism must have happened
    check(n_mac > 0, "MAC used");
    check(n_spad > 0, "scratch pad used");
    check(n_full > 0, "equalizer full stall");
    check(max_banks >= 3, $sformatf("several banks active (%0d)", max_banks));
    check(n_idle_bank > 0, "banks left idle");
    check(n_switch >= 4, "clock mode switches");
    check(n_gated > 0, "rendering clock gated");
    check(n_zfail > 0, "depth test failures");
    check(n_dfcg > 0, "depth-first clock gating");
    check(n_conf > 0, "texture macro conflicts");
    check(n_sp > 0, "spatial texel merges");
    check(n_tp > 0, "temporal texel merges");
    check(n_point > 0, "point sampling");
    check(n_alpha > 0, "alpha blending");
    check(n_rect > 0, "rectangle fill");
    check(n_swap > 0, "buffer swap");
    check(n_fsaa > 0, "anti-aliasing");
    check(n_fog > 0, "fog");
    $display("mac %0d spad %0d full-stall %0d max-banks %0d max-level %0d idle-bank %0d switches %0d gated %0d",
             n_mac, n_spad, n_full, max_banks, max_level, n_idle_bank, n_switch, n_gated);
    $display("zfail %0d dfcg %0d conflict %0d spatial %0d temporal %0d texture-reads %0d point %0d alpha %0d rect %0d swap %0d fsaa %0d fog %0d",
             n_zfail, n_dfcg, n_conf, n_sp, n_tp, n_tm, n_point, n_alpha, n_rect, n_swap, n_fsaa, n_fog);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
