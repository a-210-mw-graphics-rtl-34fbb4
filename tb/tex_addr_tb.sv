// tex_addr_tb: checks the perspective division U = u/w, V = v/w of the
// 8-bit-mantissa table divider against exact division (within 0.8 % plus
// two LSBs of 12 bits), and the bilinear and point-sampled texel addresses,
// weights and wrap-around at several texture sizes and levels of detail.
module tex_addr_tb;
  logic [15:0] u, v, w;
  logic [3:0] log2size, lod;
  logic point_sample;
  logic [11:0] uu, vv;
  logic [15:0] req_addr [4];
  logic [3:0] req_mask, fs, ft;
  int checks = 0, failures = 0;

  tex_addr dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      real eu, ev;
      int sz, sl, s0, t0;
      w = 16'($urandom % 65535 + 1);
      if (i % 3 == 0) w = 16'($urandom % 256 + 1);
      u = 16'($urandom % (int'(w) + 1));
      v = 16'($urandom % (int'(w) + 1));
      log2size = 4'($urandom % 9);
      lod = 4'($urandom % (int'(log2size) + 1));
      point_sample = (i % 4 == 0);
      #1;
      eu = real'(u) / real'(w) * 4096.0; if (eu > 4095.0) eu = 4095.0;
      ev = real'(v) / real'(w) * 4096.0; if (ev > 4095.0) ev = 4095.0;
      check(real'(uu) <= eu * 1.008 + 2.0 && real'(uu) >= eu * 0.992 - 2.0, $sformatf("U %0d vs %f (u=%0d w=%0d)", uu, eu, u, w));
      check(real'(vv) <= ev * 1.008 + 2.0 && real'(vv) >= ev * 0.992 - 2.0, $sformatf("V %0d vs %f", vv, ev));
      sl = int'(log2size) - int'(lod);
      sz = 1 << sl;
      if (point_sample) begin
        s0 = (int'(uu) * sz) / 4096; t0 = (int'(vv) * sz) / 4096;
        check(req_mask == 4'b0001 && req_addr[0] == {8'(t0), 8'(s0)}, "point address");
      end else begin
        int sf, tf;
        sf = int'(uu) * sz - 2048; tf = int'(vv) * sz - 2048;
        s0 = (sf >= 0) ? sf / 4096 : -((-sf + 4095) / 4096);
        t0 = (tf >= 0) ? tf / 4096 : -((-tf + 4095) / 4096);
        check(fs == 4'((sf - s0 * 4096) / 256) && ft == 4'((tf - t0 * 4096) / 256), "weights");
        s0 = (s0 + sz) % sz; t0 = (t0 + sz) % sz;
        check(req_mask == 4'b1111, "four requests");
        check(req_addr[0] == {8'(t0), 8'(s0)} && req_addr[1] == {8'(t0), 8'((s0 + 1) % sz)} &&
              req_addr[2] == {8'((t0 + 1) % sz), 8'(s0)} && req_addr[3] == {8'((t0 + 1) % sz), 8'((s0 + 1) % sz)},
              $sformatf("bilinear addresses size %0d: %h exp s%0d t%0d", sz, req_addr[0], s0, t0));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
