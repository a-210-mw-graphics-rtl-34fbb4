// span_intpl_tb: feeds random spans and checks every pixel pair: pair
// index, mask bits for the span ends (odd and even starts and ends), one
// pair per clock when not stalled, and interpolated values A(xs) + (x-xs)*dA
// rounded and clamped, computed here in real arithmetic.
module span_intpl_tb;
  import g3d_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 1, busy;
  span_t in;
  pair_t out;
  int checks = 0, failures = 0;

  span_intpl dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  function automatic int expv(input span_t s, input int k, input int x, input int maxv);
    real v;
    int r;
    v = (real'($signed(s.a0[k])) + real'(x - int'(s.xs)) * real'($signed(s.grad[k]))) / 256.0;
    r = $floor(v + 0.5);
    if (r < 0) r = 0;
    if (r > maxv) r = maxv;
    return r;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      span_t s;
      int npairs, cyc;
      s = '0;
      s.y  = 8'($urandom);
      s.xs = 9'($urandom % 256);
      s.xe = s.xs + 9'(1 + $urandom % (256 - s.xs));
      if (s.xe <= s.xs) s.xe = s.xs + 9'd1;
      for (int k = 0; k < 7; k++) begin
        s.a0[k]   = 34'((k == 0 || k > 3) ? ($urandom % 65536) * 256 : ($urandom % 256) * 256);
        s.grad[k] = 25'($signed(($urandom % 4001) - 2000));
      end
      @(negedge clk);
      in = s; in_valid = 1;
      @(posedge clk); #1 in_valid = 0;
      npairs = 0; cyc = 0;
      out_ready = (t % 2 == 0);
      @(negedge clk);
      while (busy) begin
        if (out_valid && out_ready) begin
          int x0;
          x0 = 2 * int'(out.xp);
          check(out.xp == 7'(int'(s.xs) / 2 + npairs), "pair index");
          check(out.mask[0] == (x0 >= int'(s.xs) && x0 < int'(s.xe)), "mask0");
          check(out.mask[1] == (x0 + 1 >= int'(s.xs) && x0 + 1 < int'(s.xe)), "mask1");
          check(out.y == s.y, "row");
          check(int'(out.p0.z) == expv(s, 0, x0, 65535) && int'(out.p1.z) == expv(s, 0, x0 + 1, 65535), "z");
          check(int'(out.p0.r) == expv(s, 1, x0, 255) && int'(out.p1.b) == expv(s, 3, x0 + 1, 255), "colour");
          check(int'(out.p0.u) == expv(s, 4, x0, 65535) && int'(out.p1.w) == expv(s, 6, x0 + 1, 65535), "uvw");
          npairs++;
        end
        @(negedge clk);
        cyc++;
        if (t % 2 == 1) out_ready = $urandom % 2;
      end
      check(npairs == (int'(s.xe) - 1) / 2 - int'(s.xs) / 2 + 1, $sformatf("pairs %0d t=%0d xs=%0d xe=%0d", npairs, t, s.xs, s.xe));
      if (t % 2 == 0) check(cyc == npairs, $sformatf("rate: %0d pairs in %0d clocks", npairs, cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
