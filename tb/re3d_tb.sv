// re3d_tb: rendering engine driven by 128-bit commands. It fills
// rectangles (checked exactly over the whole back buffer), draws
// flat-coloured triangles at different depths so that they occlude each
// other, draws a textured triangle from an uploaded texture, and checks
// every pixel of the back buffer against a reference: pixels more than
// 1.5 pixels inside the visible triangle must have its colour and depth,
// pixels more than 1.5 pixels outside it must be unchanged, border pixels
// must hold one of the two. It then swaps the buffers and checks that the
// displayed frame equals the rendered image, once plainly and once with the
// anti-aliasing filter. Depth failures, pairs gated by the depth test,
// texture accesses and random command stalls must all occur.
module re3d_tb;
  import g3d_pkg::*;
  logic clk = 0, rst_n = 0, cmd_valid = 0, cmd_ready, lcd_tick = 0, lcd_valid, lcd_frame_start, idle, swap;
  logic [127:0] cmd = 0;
  logic [23:0]  lcd_rgb;
  logic ev_dfcg, ev_conflict;
  logic [1:0] ev_zfail;
  logic [7:0] ev_spmask, ev_tpmask;
  logic [3:0] ev_tm_act;
  int checks = 0, failures = 0, n_zfail = 0, n_dfcg = 0, n_tm = 0, n_stall = 0;

  re3d dut (.clk, .mem_clk(clk), .*);
  always #5 clk = ~clk;

  logic [23:0] rc [256][256];
  logic [15:0] rzb [256][256];

  always @(posedge clk) if (rst_n) begin
    n_zfail += int'(ev_zfail[0]) + int'(ev_zfail[1]);
    n_dfcg += int'(ev_dfcg);
    n_tm += $countones(ev_tm_act);
    n_stall += int'(cmd_valid && !cmd_ready);
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  task automatic send(input logic [127:0] c);
    @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    #1 cmd_valid = 0;
  endtask

  task automatic wait_idle();
    int n;
    n = 0;
    while (n < 4) begin @(posedge clk); n = idle ? n + 1 : 0; end
  endtask

  function automatic logic [23:0] back_c(input int x, input int y);
    logic [14:0] a;
    a = {8'(y), 7'(x >> 1)};
    case ((swap ? 2 : 0) + x % 2)
      0: return dut.g_mem[0].u_fb.mem[a];
      1: return dut.g_mem[1].u_fb.mem[a];
      2: return dut.g_mem[2].u_fb.mem[a];
      default: return dut.g_mem[3].u_fb.mem[a];
    endcase
  endfunction
  function automatic logic [15:0] back_z(input int x, input int y);
    logic [14:0] a;
    a = {8'(y), 7'(x >> 1)};
    case ((swap ? 2 : 0) + x % 2)
      0: return dut.g_mem[0].u_db.mem[a];
      1: return dut.g_mem[1].u_db.mem[a];
      2: return dut.g_mem[2].u_db.mem[a];
      default: return dut.g_mem[3].u_db.mem[a];
    endcase
  endfunction

  task automatic rect(input int x0, input int y0, input int x1, input int y1, input logic [23:0] c, input logic [15:0] z);
    logic [127:0] k;
    k = '0;
    k[127:124] = 4'(OP_RECT); k[121:114] = 8'(x0); k[113:106] = 8'(y0); k[105:98] = 8'(x1);
    k[97:90] = 8'(y1); k[89:66] = c; k[65:50] = z;
    send(k);
    for (int y = y0; y <= y1; y++) for (int x = x0; x <= x1; x++) begin rc[y][x] = c; rzb[y][x] = z; end
  endtask

  task automatic vtx(input int s, input int x, input int y, input logic [15:0] z, input logic [23:0] c,
                     input logic [15:0] u, input logic [15:0] v);
    logic [127:0] k;
    k = '0;
    k[127:124] = 4'(OP_VTX); k[123:122] = 2'(s); k[121:114] = 8'(x); k[113:106] = 8'(y);
    k[105:90] = z; k[89:66] = c; k[65:50] = u; k[49:34] = v; k[33:18] = 16'hffff;
    send(k);
  endtask

  task automatic state(input bit dt, input bit te, input bit ps, input logic [1:0] tm, input bit ae,
                       input logic [7:0] al, input logic [3:0] ls, input logic [17:0] base);
    logic [127:0] k;
    k = '0;
    k[127:124] = 4'(OP_STATE);
    k[123:88] = {dt, te, ps, tm, ae, al, ls, base};
    send(k);
  endtask

  // signed distance-like edge test for a triangle, positive inside
  function automatic real edge_d(input int ax, input int ay, input int bx, input int by, input int px, input int py,
                                 input int cx, input int cy);
    real e, ec, len;
    e  = real'((bx - ax) * (py - ay) - (by - ay) * (px - ax));
    ec = real'((bx - ax) * (cy - ay) - (by - ay) * (cx - ax));
    len = $sqrt(real'((bx - ax) * (bx - ax) + (by - ay) * (by - ay)));
    return (ec > 0 ? e : -e) / len;
  endfunction

  // Draw a triangle of one colour and depth; update the reference where it is
  // certainly inside and visible, mark the border as uncertain.
  logic unsure [256][256];
  task automatic tri_flat(input int x[3], input int y[3], input logic [23:0] c, input logic [15:0] z, input bit dt,
                          input bit textured, input logic [23:0] tcol);
    for (int k = 0; k < 3; k++) vtx(k, x[k], y[k], z, c, 16'h4000, 16'h4000);
    send({4'(OP_TRI), 124'd0});
    for (int py = 0; py < 256; py++)
      for (int px = 0; px < 256; px++) begin
        real d;
        d = edge_d(x[0], y[0], x[1], y[1], px, py, x[2], y[2]);
        d = (edge_d(x[1], y[1], x[2], y[2], px, py, x[0], y[0]) < d) ? edge_d(x[1], y[1], x[2], y[2], px, py, x[0], y[0]) : d;
        d = (edge_d(x[2], y[2], x[0], y[0], px, py, x[1], y[1]) < d) ? edge_d(x[2], y[2], x[0], y[0], px, py, x[1], y[1]) : d;
        if (d > -1.5 && (!dt || z > rzb[py][px] || unsure[py][px])) begin
          if (d > 1.5 && !unsure[py][px]) begin
            rc[py][px] = textured ? tcol : c; rzb[py][px] = z;
          end else unsure[py][px] = 1;
        end
      end
  endtask

  task automatic compare_back(input string what);
    int nu;
    nu = 0;
    for (int y = 0; y < 256; y++)
      for (int x = 0; x < 256; x++)
        if (!unsure[y][x]) begin
          check(back_c(x, y) == rc[y][x], $sformatf("%s colour (%0d,%0d) %h exp %h", what, x, y, back_c(x, y), rc[y][x]));
          check(back_z(x, y) == rzb[y][x], $sformatf("%s depth (%0d,%0d) %h exp %h", what, x, y, back_z(x, y), rzb[y][x]));
        end else nu++;
    check(nu < 8000, $sformatf("%s: %0d border pixels", what, nu));
  endtask

  task automatic show_frame(input logic [15:0] mpc, input bit fsaa);
    logic [127:0] k;
    logic [23:0] img [256][256];
    int n;
    for (int y = 0; y < 256; y++) for (int x = 0; x < 256; x++) img[y][x] = back_c(x, y);  // before swap: back
    k = '0; k[127:124] = 4'(OP_SWAP); send(k);
    k = '0; k[127:124] = 4'(OP_MPCMD); k[123:108] = mpc; send(k);
    @(negedge clk);
    // wait for the scan position to wrap to (0,0)
    n = 0;
    lcd_tick = 1;
    do begin @(posedge clk); #1; end while (!(lcd_valid && lcd_frame_start));
    for (int i = 0; i < 65536; i++) begin
      logic [23:0] e, p, q;
      int x, y;
      x = i % 256; y = i / 256;
      p = img[y][x]; q = (x == 255) ? p : img[y][x + 1];
      for (int c = 0; c < 3; c++) e[8*c +: 8] = fsaa ? 8'((int'(p[8*c +: 8]) + int'(q[8*c +: 8])) >> 1) : p[8*c +: 8];
      check(lcd_valid && lcd_rgb == e, $sformatf("display (%0d,%0d) %h exp %h", x, y, lcd_rgb, e));
      @(posedge clk); #1;
    end
    lcd_tick = 0;
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xs[3], ys[3];
    for (int y = 0; y < 256; y++) for (int x = 0; x < 256; x++) begin rc[y][x] = 0; rzb[y][x] = 0; unsure[y][x] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    state(1, 0, 0, 0, 0, 0, 4, 0);
    // background and rectangles
    rect(0, 0, 255, 255, 24'h101010, 16'd100);
    rect(10, 20, 60, 25, 24'hff0000, 16'd100);
    rect(101, 0, 101, 255, 24'h00ff00, 16'd100);
    rect(200, 200, 255, 255, 24'h0000ff, 16'd100);
    wait_idle();
    compare_back("rect");
    // overlapping triangles: near (large z) first, then a farther one that is hidden
    xs = '{20, 200, 80};  ys = '{30, 60, 220}; tri_flat(xs, ys, 24'hc08040, 16'd5000, 1, 0, 0);
    xs = '{60, 180, 120}; ys = '{10, 200, 120}; tri_flat(xs, ys, 24'h2040c0, 16'd3000, 1, 0, 0);
    xs = '{100, 250, 30}; ys = '{100, 130, 250}; tri_flat(xs, ys, 24'h40ff40, 16'd9000, 1, 0, 0);
    xs = '{5, 40, 5};     ys = '{5, 5, 40};      tri_flat(xs, ys, 24'h777777, 16'd50, 1, 0, 0);
    wait_idle();
    compare_back("triangles");
    check(n_zfail > 0 && n_dfcg > 0, $sformatf("occlusion: zfail %0d dfcg %0d", n_zfail, n_dfcg));
    // texture upload: constant texel in every macro, then a textured triangle
    for (int w = 0; w < 400; w++)
      for (int m = 0; m < 4; m++) begin
        logic [127:0] k;
        k = '0; k[127:124] = 4'(OP_TEXW); k[123:122] = 2'(m); k[121:104] = 18'(w); k[103:80] = 24'h5a3c96;
        send(k);
      end
    state(1, 1, 0, 2'd1, 0, 0, 4, 0);
    xs = '{150, 250, 170}; ys = '{10, 20, 90}; tri_flat(xs, ys, 24'h000000, 16'd20000, 1, 1, 24'h5a3c96);
    wait_idle();
    compare_back("texture");
    check(n_tm > 0, "texture macros read");
    check(n_stall > 0, "command stalls");
    show_frame(16'h0000, 0);
    show_frame({3'd1, 3'd1, 3'd1, 3'd1, 1'b0, 3'd0}, 1);
    $display("zfail %0d dfcg %0d texture reads %0d stalls %0d", n_zfail, n_dfcg, n_tm, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
