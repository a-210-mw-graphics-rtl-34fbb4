// slimshader_tb: drives random pixel pairs into the pixel pipeline, which is
// connected to real depth, frame and texture macros, over a small 16x8
// pixel window so that pixels are hit many times. A reference model keeps
// the expected depth and colour of every pixel and the expected number of
// depth failures and of pairs dropped by depth-first gating. Six phases
// change the render state: flat colour with depth test, 2-D fill, bilinear
// texture replace, point-sampled modulate, alpha blending, depth test off.
// Textures are filled with one colour per phase so the filtered texel is
// known exactly. After each phase the pipeline is drained and both buffers
// of the window are compared with the model.
module slimshader_tb;
  import g3d_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0, in_valid = 0, in_ready, busy;
  rstate_t st;
  pair_t   in;
  logic        db_en [2], db_we [2], fb_en [2], fb_we [2];
  logic [14:0] db_addr [2], fb_addr [2];
  logic [15:0] db_wdata [2], db_rdata [2];
  logic [23:0] fb_wdata [2], fb_rdata [2];
  logic [3:0]  tm_en;
  logic [17:0] tm_addr [4];
  logic [23:0] tm_rdata [4];
  logic        ev_dfcg, ev_conflict;
  logic [1:0]  ev_zfail;
  logic [7:0]  ev_spmask, ev_tpmask;
  int checks = 0, failures = 0;
  int n_zfail = 0, n_dfcg = 0, e_zfail = 0, e_dfcg = 0, n_tm = 0;

  slimshader dut (.*);
  always #5 clk = ~clk;

  db_macro u_db0 (.clk, .en(db_en[0]), .addr(db_addr[0]), .wmask(db_we[0]), .wdata(db_wdata[0]), .rdata(db_rdata[0]));
  db_macro u_db1 (.clk, .en(db_en[1]), .addr(db_addr[1]), .wmask(db_we[1]), .wdata(db_wdata[1]), .rdata(db_rdata[1]));
  fb_macro u_fb0 (.clk, .en(fb_en[0]), .addr(fb_addr[0]), .wmask(fb_we[0]), .wdata(fb_wdata[0]), .rdata(fb_rdata[0]));
  fb_macro u_fb1 (.clk, .en(fb_en[1]), .addr(fb_addr[1]), .wmask(fb_we[1]), .wdata(fb_wdata[1]), .rdata(fb_rdata[1]));
  tm_macro u_tm0 (.clk, .en(tm_en[0]), .we(1'b0), .addr(tm_addr[0]), .wdata(24'd0), .rdata(tm_rdata[0]));
  tm_macro u_tm1 (.clk, .en(tm_en[1]), .we(1'b0), .addr(tm_addr[1]), .wdata(24'd0), .rdata(tm_rdata[1]));
  tm_macro u_tm2 (.clk, .en(tm_en[2]), .we(1'b0), .addr(tm_addr[2]), .wdata(24'd0), .rdata(tm_rdata[2]));
  tm_macro u_tm3 (.clk, .en(tm_en[3]), .we(1'b0), .addr(tm_addr[3]), .wdata(24'd0), .rdata(tm_rdata[3]));

  logic [15:0] rz [8][16];
  logic [23:0] rc [8][16];

  always @(posedge clk) if (rst_n) begin
    n_zfail += int'(ev_zfail[0]) + int'(ev_zfail[1]);
    n_dfcg  += int'(ev_dfcg);
    n_tm    += $countones(tm_en);
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  task automatic fill_tex(input logic [23:0] t);
    for (int a = 0; a < 1024; a++) begin
      u_tm0.mem[a] = t; u_tm1.mem[a] = t; u_tm2.mem[a] = t; u_tm3.mem[a] = t;
    end
  endtask

  function automatic logic [23:0] shade(input logic [23:0] c, input logic [23:0] d, input logic [23:0] t);
    logic [23:0] o;
    int a;
    a = int'(st.alpha) + (st.alpha >= 128 ? 1 : 0);
    for (int k = 0; k < 3; k++) begin
      int cc, tt, ss, dd;
      cc = int'(c[8*k +: 8]); tt = int'(t[8*k +: 8]); dd = int'(d[8*k +: 8]);
      case (st.tex_en ? st.tex_mode : 2'd0)
        2'd0: ss = cc;
        2'd1: ss = tt;
        2'd2: ss = (cc * (tt + 1)) >> 8;
        default: ss = (cc + tt > 255) ? 255 : cc + tt;
      endcase
      o[8*k +: 8] = st.alpha_en ? 8'((a * ss + (256 - a) * dd) >> 8) : 8'(ss);
    end
    return o;
  endfunction

  task automatic run_phase(input int n, input bit is2d, input logic [23:0] t);
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    for (int i = 0; i < n; i++) begin
      int y, xp, vis;
      y = $urandom % 8; xp = $urandom % 8;
      in = '0;
      in.y = 8'(y); in.xp = 7'(xp); in.is2d = is2d;
      in.mask = ($urandom % 4 == 0) ? 2'(1 + $urandom % 2) : 2'b11;
      for (int k = 0; k < 2; k++) begin
        pixel_t p;
        p.z = 16'($urandom); p.r = 8'($urandom); p.g = 8'($urandom); p.b = 8'($urandom);
        p.w = 16'(256 + $urandom % 65000);
        p.u = 16'($urandom % (int'(p.w) + 1)); p.v = 16'($urandom % (int'(p.w) + 1));
        if (k == 0) in.p0 = p; else in.p1 = p;
      end
      vis = 0;
      for (int k = 0; k < 2; k++) begin
        int x;
        pixel_t p;
        p = k ? in.p1 : in.p0;
        x = 2 * xp + k;
        if (in.mask[k]) begin
          if (is2d || !st.depth_test || p.z > rz[y][x]) begin
            vis++;
            rz[y][x] = p.z;
            rc[y][x] = is2d ? {p.r, p.g, p.b} : shade({p.r, p.g, p.b}, rc[y][x], t);
          end else e_zfail++;
        end
      end
      if (vis == 0) e_dfcg++;
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1 in_valid = 0;
      if ($urandom % 4 == 0) @(negedge clk);
    end
    in_valid = 0;
    repeat (3) @(posedge clk);
    while (busy) @(posedge clk);
    repeat (2) @(posedge clk);
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 16; x++) begin
        logic [15:0] a;
        logic [15:0] gz;
        logic [23:0] gc;
        a = {1'b0, 8'(y), 7'(x >> 1)};
        gz = (x % 2) ? u_db1.mem[a[14:0]] : u_db0.mem[a[14:0]];
        gc = (x % 2) ? u_fb1.mem[a[14:0]] : u_fb0.mem[a[14:0]];
        check(gz == rz[y][x], $sformatf("depth (%0d,%0d) %h exp %h", x, y, gz, rz[y][x]));
        check(gc == rc[y][x], $sformatf("colour (%0d,%0d) %h exp %h", x, y, gc, rc[y][x]));
      end
    check(n_zfail == e_zfail, $sformatf("zfail %0d exp %0d", n_zfail, e_zfail));
    check(n_dfcg == e_dfcg, $sformatf("dfcg %0d exp %0d", n_dfcg, e_dfcg));
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] t;
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 16; x++) begin rz[y][x] = 0; rc[y][x] = 0; end
    for (int a = 0; a < 32768; a++) begin
      u_db0.mem[a] = 0; u_db1.mem[a] = 0; u_fb0.mem[a] = 0; u_fb1.mem[a] = 0;
    end
    for (int a = 0; a < 262144; a++) begin
      u_tm0.mem[a] = 0; u_tm1.mem[a] = 0; u_tm2.mem[a] = 0; u_tm3.mem[a] = 0;
    end
    st = '0; st.depth_test = 1; st.log2size = 4; st.tex_base = 18'd16;
    in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1: flat colour, depth test
    run_phase(600, 0, 24'd0);
    // 2: 2-D fill, always written
    run_phase(100, 1, 24'd0);
    // 3: bilinear texture, replace
    t = 24'h3c_a5_f0; fill_tex(t);
    st.tex_en = 1; st.tex_mode = 1; st.point_sample = 0;
    run_phase(600, 0, t);
    check(n_tm > 0, "texture macros read");
    // 4: point-sampled texture, modulate; 5: add
    t = 24'h80_ff_10; fill_tex(t);
    st.tex_mode = 2; st.point_sample = 1;
    run_phase(600, 0, t);
    st.tex_mode = 3; st.point_sample = 0;
    run_phase(600, 0, t);
    // 6: alpha blending, untextured
    st.tex_en = 0; st.tex_mode = 0; st.alpha_en = 1; st.alpha = 8'd200;
    run_phase(600, 0, t);
    st.alpha = 8'd77;
    run_phase(600, 0, t);
    // 7: depth test off
    st.alpha_en = 0; st.depth_test = 0;
    run_phase(300, 0, t);
    check(e_zfail > 100 && e_dfcg > 50, $sformatf("enough rejection exercised: zfail %0d dfcg %0d", e_zfail, e_dfcg));
    $display("zfail %0d dfcg %0d texture macro reads %0d", n_zfail, n_dfcg, n_tm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
