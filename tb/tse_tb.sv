// tse_tb: checks the triangle setup engine on random triangles against
// real-valued geometry: vertices sorted top to bottom, long-edge slopes
// dX/dY and dZ/dY, the triangle type (middle vertex left or right of the
// long edge) and the per-pixel gradients dR/dX and dZ/dX of the plane,
// plus the fixed four-clock latency of the step sequence.
module tse_tb;
  import g3d_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 1;
  vertex_t vtx [3];
  setup_t  out;
  int checks = 0, failures = 0;
  int n_left = 0, n_right = 0;

  tse dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  function automatic real absr(input real a); return a < 0 ? -a : a; endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      vertex_t s [3];
      int lat;
      real dy02, ex, ez, xm, area2, gz, gr, a, b;
      for (int i = 0; i < 3; i++) begin
        vtx[i].x = 8'($urandom); vtx[i].y = 8'($urandom); vtx[i].z = 16'($urandom);
        vtx[i].r = 8'($urandom); vtx[i].g = 8'($urandom); vtx[i].b = 8'($urandom);
        vtx[i].u = 16'($urandom); vtx[i].v = 16'($urandom); vtx[i].w = 16'($urandom);
      end
      // reference sort
      s = vtx;
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2 - i; j++)
          if (s[j].y > s[j+1].y) begin vertex_t tmp; tmp = s[j]; s[j] = s[j+1]; s[j+1] = tmp; end
      @(negedge clk);
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1 in_valid = 0;
      lat = 0;
      while (!out_valid) begin @(posedge clk); #1; lat++; end
      check(lat == 4, $sformatf("latency %0d", lat));
      check(out.v0.y <= out.v1.y && out.v1.y <= out.v2.y, "sorted");
      check(out.v0.y == s[0].y && out.v1.y == s[1].y && out.v2.y == s[2].y, "sorted values");
      dy02 = real'(int'(s[2].y) - int'(s[0].y));
      if (dy02 > 0) begin
        ex = (real'(int'(out.v2.x) - int'(out.v0.x))) * 256.0 / dy02;
        ez = (real'(int'(out.v2.z) - int'(out.v0.z))) * 256.0 / dy02;
        check(absr(real'($signed(out.s02[L_X])) - ex) <= 0.008 * absr(ex) + 1.0, $sformatf("dX/dY %0d vs %f", $signed(out.s02[L_X]), ex));
        check(absr(real'($signed(out.s02[L_Z])) - ez) <= 0.008 * absr(ez) + 1.0, $sformatf("dZ/dY %0d vs %f", $signed(out.s02[L_Z]), ez));
        xm = real'(out.v0.x) + real'(int'(out.v1.y) - int'(out.v0.y)) * real'(int'(out.v2.x) - int'(out.v0.x)) / dy02;
        if (absr(real'(out.v1.x) - xm) > 1.0) begin
          check(out.mid_right == (real'(out.v1.x) > xm), "triangle type");
          if (out.mid_right) n_right++; else n_left++;
        end
        // plane gradients d/dX from the three vertices
        area2 = real'(int'(out.v1.x) - int'(out.v0.x)) * real'(int'(out.v2.y) - int'(out.v0.y)) -
                real'(int'(out.v2.x) - int'(out.v0.x)) * real'(int'(out.v1.y) - int'(out.v0.y));
        if (absr(real'(out.v1.x) - xm) >= 32.0) begin
          a = real'(int'(out.v1.z) - int'(out.v0.z)); b = real'(int'(out.v2.z) - int'(out.v0.z));
          gz = (a * real'(int'(out.v2.y) - int'(out.v0.y)) - b * real'(int'(out.v1.y) - int'(out.v0.y))) / area2 * 256.0;
          a = real'(int'(out.v1.r) - int'(out.v0.r)); b = real'(int'(out.v2.r) - int'(out.v0.r));
          gr = (a * real'(int'(out.v2.y) - int'(out.v0.y)) - b * real'(int'(out.v1.y) - int'(out.v0.y))) / area2 * 256.0;
          check(absr(real'($signed(out.hg[L_Z])) - gz) <= 0.06 * absr(gz) + 512.0, $sformatf("dZ/dX %h vs %f v0=%p v1=%p v2=%p", out.hg[L_Z], gz, out.v0, out.v1, out.v2));
          check(absr(real'($signed(out.hg[L_R])) - gr) <= 0.06 * absr(gr) + 8.0, $sformatf("dR/dX %0d vs %f", $signed(out.hg[L_R]), gr));
        end
      end
      @(negedge clk);
    end
    check(n_left > 20 && n_right > 20, "both triangle types seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
