// span_gen_tb: checks the edge walker. Rectangles must give exactly rows
// y0..y1 with columns x0..x1. Random triangles (set up by the triangle setup
// engine) must give spans in rising row order inside the triangle's rows,
// one for every row more than 3 pixels wide, with ends within 1.5 pixels
// of the exact edges and starting depth and red on the triangle's plane
// (checked where the middle vertex is at least 8 pixels from the long edge,
// because the per-pixel gradient is divided by a whole number of pixels).
module span_gen_tb;
  import g3d_pkg::*;
  logic clk = 0, rst_n = 0;
  logic t_in_valid = 0, t_in_ready, t_out_valid;
  vertex_t vtx [3];
  setup_t  su;
  logic rect_valid = 0, in_ready, out_valid, out_ready = 0, busy;
  logic [7:0] rx0, ry0, rx1, ry1;
  logic [23:0] rcolor;
  logic [15:0] rz;
  span_t out;
  int checks = 0, failures = 0;

  tse u_tse (.clk, .rst_n, .in_valid(t_in_valid), .vtx, .in_ready(t_in_ready),
             .out_valid(t_out_valid), .out(su), .out_ready(in_ready));
  span_gen dut (.clk, .rst_n, .tri_valid(t_out_valid), .tri_in(su), .rect_valid,
                .rx0, .ry0, .rx1, .ry1, .rcolor, .rz, .in_ready, .out_valid, .out,
                .out_ready, .busy);
  always #5 clk = ~clk;
  always @(negedge clk) out_ready <= ($urandom % 4) != 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask
  function automatic real absr(input real a); return a < 0 ? -a : a; endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // rectangles
    for (int t = 0; t < 20; t++) begin
      int nrows;
      rx0 = 8'($urandom % 200); rx1 = rx0 + 8'($urandom % 50);
      ry0 = 8'($urandom % 200); ry1 = ry0 + 8'($urandom % 50);
      rcolor = 24'($urandom); rz = 16'($urandom);
      @(negedge clk); rect_valid = 1;
      @(posedge clk); #1 rect_valid = 0;
      nrows = 0;
      while (busy) begin
        @(posedge clk);
        if (out_valid && out_ready) begin
          check(out.y == ry0 + 8'(nrows) && out.xs == 9'(rx0) && out.xe == 9'(rx1) + 9'd1 && out.is2d, "rect span");
          check(out.a0[1][15:8] == rcolor[23:16] && out.a0[0][23:8] == rz, "rect colour/depth");
          nrows++;
        end
        #1;
      end
      check(nrows == int'(ry1) - int'(ry0) + 1, $sformatf("rect rows %0d", nrows));
    end
    // triangles
    for (int t = 0; t < 100; t++) begin
      real x0, y0, x1, y1, x2, y2, z0, z1, z2, r0, r1, r2, area2;
      bit wide;
      int nrow, nexty, ymin, ymax;
      bit seen [256];
      bit started;
      for (int i = 0; i < 3; i++) begin
        vtx[i] = '0;
        vtx[i].x = 8'($urandom); vtx[i].y = 8'($urandom);
        vtx[i].z = 16'($urandom); vtx[i].r = 8'($urandom);
      end
      ymin = int'(vtx[0].y); ymax = ymin;
      for (int i = 1; i < 3; i++) begin
        if (int'(vtx[i].y) < ymin) ymin = int'(vtx[i].y);
        if (int'(vtx[i].y) > ymax) ymax = int'(vtx[i].y);
      end
      x0 = vtx[0].x; y0 = vtx[0].y; x1 = vtx[1].x; y1 = vtx[1].y; x2 = vtx[2].x; y2 = vtx[2].y;
      z0 = vtx[0].z; z1 = vtx[1].z; z2 = vtx[2].z; r0 = vtx[0].r; r1 = vtx[1].r; r2 = vtx[2].r;
      area2 = (x1 - x0) * (y2 - y0) - (x2 - x0) * (y1 - y0);
      // gradients are only checked where the middle vertex is 8+ pixels
      // from the long edge (the x divisor is a whole number of pixels)
      begin
        real ya, yb, yc, xa_, xc_, xb_;
        ya = y0; yb = y1; yc = y2; xa_ = x0; xb_ = x1; xc_ = x2;
        if (ya > yb) begin real tt; tt = ya; ya = yb; yb = tt; tt = xa_; xa_ = xb_; xb_ = tt; end
        if (yb > yc) begin real tt; tt = yb; yb = yc; yc = tt; tt = xb_; xb_ = xc_; xc_ = tt; end
        if (ya > yb) begin real tt; tt = ya; ya = yb; yb = tt; tt = xa_; xa_ = xb_; xb_ = tt; end
        wide = (yc > ya) && absr(xb_ - (xa_ + (yb - ya) * (xc_ - xa_) / (yc - ya))) >= 8.0;
      end
      nrow = 0; nexty = 0;
      for (int i = 0; i < 256; i++) seen[i] = 1'b0;
      @(negedge clk); t_in_valid = 1;
      @(posedge clk); #1 t_in_valid = 0;
      started = 0;
      while (!started || busy) begin
        @(posedge clk);
        if (out_valid && out_ready) begin
          real y, xa, xb, xv [3];
          int n;
          y = real'(out.y);
          check(int'(out.y) >= ymin && int'(out.y) < ymax && int'(out.y) >= nexty,
                $sformatf("row %0d outside [%0d,%0d) or out of order", out.y, ymin, ymax));
          nexty = int'(out.y) + 1; nrow++;
          seen[out.y] = 1'b1;
          // exact crossings of the row with the triangle edges
          n = 0;
          for (int e = 0; e < 3; e++) begin
            real ax, ay, bx, by;
            ax = (e == 0) ? x0 : (e == 1) ? x1 : x2; ay = (e == 0) ? y0 : (e == 1) ? y1 : y2;
            bx = (e == 0) ? x1 : (e == 1) ? x2 : x0; by = (e == 0) ? y1 : (e == 1) ? y2 : y0;
            if (ay != by && ((y >= ay && y <= by) || (y >= by && y <= ay)) && n < 3) begin
              xv[n] = ax + (y - ay) * (bx - ax) / (by - ay); n++;
            end
          end
          if (n >= 2) begin
            xa = xv[0]; xb = xv[0];
            for (int i = 1; i < n; i++) begin if (xv[i] < xa) xa = xv[i]; if (xv[i] > xb) xb = xv[i]; end
            check(absr(real'(out.xs) - xa) <= 1.5 && absr(real'(out.xe) - xb) <= 1.5,
                  $sformatf("row %0d span [%0d,%0d) exact [%f,%f]", out.y, out.xs, out.xe, xa, xb));
            if (absr(area2) > 200.0 && wide) begin
              real px, pz, pr, dzx, dzy, drx, dry;
              px = real'(out.xs);
              dzx = ((z1 - z0) * (y2 - y0) - (z2 - z0) * (y1 - y0)) / area2;
              dzy = ((z2 - z0) * (x1 - x0) - (z1 - z0) * (x2 - x0)) / area2;
              drx = ((r1 - r0) * (y2 - y0) - (r2 - r0) * (y1 - y0)) / area2;
              dry = ((r2 - r0) * (x1 - x0) - (r1 - r0) * (x2 - x0)) / area2;
              pz = z0 + (px - x0) * dzx + (y - y0) * dzy;
              pr = r0 + (px - x0) * drx + (y - y0) * dry;
              check(absr(real'($signed(out.a0[0])) / 256.0 - pz) <= 0.06 * 65536.0, $sformatf("z %f vs %f", real'($signed(out.a0[0])) / 256.0, pz));
              check(absr(real'($signed(out.a0[1])) / 256.0 - pr) <= 0.06 * 256.0 + 2.0, $sformatf("r %f vs %f", real'($signed(out.a0[1])) / 256.0, pr));
            end
          end
        end
        #1;
        started = started || busy;
      end
      // every row of the triangle that is more than 3 pixels wide was produced
      for (int yy = ymin; yy < ymax; yy++) begin
        real xv [3], xa, xb;
        int n;
        n = 0;
        for (int e = 0; e < 3; e++) begin
          real ax, ay, bx, by;
          ax = (e == 0) ? x0 : (e == 1) ? x1 : x2; ay = (e == 0) ? y0 : (e == 1) ? y1 : y2;
          bx = (e == 0) ? x1 : (e == 1) ? x2 : x0; by = (e == 0) ? y1 : (e == 1) ? y2 : y0;
          if (ay != by && ((yy >= ay && yy <= by) || (yy >= by && yy <= ay)) && n < 3) begin
            xv[n] = ax + (real'(yy) - ay) * (bx - ax) / (by - ay); n++;
          end
        end
        if (n >= 2) begin
          xa = xv[0]; xb = xv[0];
          for (int i = 1; i < n; i++) begin if (xv[i] < xa) xa = xv[i]; if (xv[i] > xb) xb = xv[i]; end
          if (xb - xa > 3.0) check(seen[yy], $sformatf("row %0d (width %f) missing: (%0d,%0d) (%0d,%0d) (%0d,%0d)", yy, xb - xa, vtx[0].x, vtx[0].y, vtx[1].x, vtx[1].y, vtx[2].x, vtx[2].y));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
