// aal_tb: runs the address alignment logic against a model of the four
// texture macros (latency 1, each word holding a value derived from its
// macro and address). Pixel pairs walk across a texture with bilinear
// footprints that overlap between PP0 and PP1 and between consecutive
// pairs, at several levels of detail. Every delivered texel must equal the
// texel at its requested address; the spatial and temporal aligners and
// macro conflicts must all occur; the pair rate must be one per clock plus
// one clock per conflict; fewer macro accesses than requests must be made.
module aal_tb;
  import g3d_pkg::*;
  localparam int SW = 16;
  logic clk = 0, rst_n = 0, flush = 0, in_valid = 0, in_ready, out_valid, conflict;
  logic [15:0] in_addr [8];
  logic [7:0]  in_mask, spmask, tpmask;
  logic [3:0]  in_lod, log2size, tm_en;
  logic [SW-1:0] in_side, out_side;
  logic [17:0] tex_base, tm_addr [4];
  logic [23:0] tm_rdata [4], out_texel [8];
  int checks = 0, failures = 0;
  int n_sp = 0, n_tp = 0, n_conf = 0, n_req = 0, n_act = 0, n_pairs = 0, cycles = 0;
  logic [7:0][23:0] expq [$];
  logic [7:0]  maskq [$];

  aal #(.SW(SW)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [23:0] content(input int bank, input logic [17:0] a);
    return {bank[1:0], a, 4'ha} ^ 24'h5a5a5a;
  endfunction

  // texture macro model
  always @(posedge clk)
    for (int k = 0; k < 4; k++) if (tm_en[k]) tm_rdata[k] <= content(k, tm_addr[k]);

  function automatic logic [23:0] texel_at(input logic [15:0] a, input int lod);
    int sl, off, s, t, sz;
    logic [17:0] word;
    s = a[7:0]; t = a[15:8];
    off = 0;
    for (int l = 0; l < lod; l++) begin
      sz = (int'(log2size) - l >= 1) ? (1 << (int'(log2size) - l - 1)) : 1;
      off += sz * sz;
    end
    sl = int'(log2size) - lod;
    word = 18'(int'(tex_base) + off + ((sl >= 1) ? (t / 2) * (1 << (sl - 1)) + s / 2 : 0));
    return content((t % 2) * 2 + (s % 2), word);
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < 4; k++) n_act += int'(tm_en[k]);
      if (in_valid) cycles++;
      if (in_valid && in_ready) begin
        n_sp += $countones(spmask); n_tp += $countones(tpmask); n_conf += int'(conflict);
        n_req += $countones(in_mask);
      end
    end
    if (rst_n && out_valid) begin
      logic [7:0][23:0] e;
      logic [7:0] m;
      e = expq.pop_front();
      m = maskq.pop_front();
      for (int r = 0; r < 8; r++)
        if (m[r]) check(out_texel[r] == e[r], $sformatf("pair %0d texel %0d: %h exp %h", n_pairs, r, out_texel[r], e[r]));
      n_pairs++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent = 0;
    tex_base = 18'd1000;
    log2size = 4'd7;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 6; run++) begin
      int lod, s, t, sz;
      lod = run % 4;
      sz = 1 << (int'(log2size) - lod);
      s = $urandom % sz; t = $urandom % sz;
      @(negedge clk); flush = 1; @(negedge clk); flush = 0;
      for (int p = 0; p < 200; p++) begin
        int ds, dt;
        logic [7:0][23:0] e;
        ds = $urandom % 3; dt = $urandom % 2;
        for (int k = 0; k < 2; k++)
          for (int j = 0; j < 4; j++) begin
            int ss, tt;
            ss = (s + (k ? ds : 0) + (j % 2)) % sz;
            tt = (t + (k ? dt : 0) + (j / 2)) % sz;
            in_addr[4*k + j] = {8'(tt), 8'(ss)};
            e[4*k + j] = texel_at(in_addr[4*k + j], lod);
          end
        in_mask = (p % 17 == 5) ? 8'h0f : (p % 23 == 7) ? 8'h11 : 8'hff;
        in_lod = 4'(lod);
        in_side = 16'(sent);
        in_valid = 1;
        expq.push_back(e);
        maskq.push_back(in_mask);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        #1;
        sent++;
        if (p % 2 == 1) s = (s + 1) % sz;        // neighbouring pairs overlap in time
        if (p % 40 == 39) t = (t + 1) % sz;
      end
      in_valid = 0;
    end
    repeat (5) @(posedge clk);
    check(n_pairs == sent, $sformatf("pairs out %0d of %0d", n_pairs, sent));
    check(cycles == sent + n_conf, $sformatf("rate: %0d clocks for %0d pairs with %0d conflicts", cycles, sent, n_conf));
    check(n_sp > 0, "spatial aligner used");
    check(n_tp > 0, "temporal aligner used");
    check(n_conf > 0, "macro conflicts seen");
    check(n_act < n_req, "fewer macro accesses than requests");
    $display("requests %0d, macro accesses %0d (%0.2f per pair), spatial %0d, temporal %0d, conflict clocks %0d",
             n_req, n_act, real'(n_act) / real'(sent), n_sp, n_tp, n_conf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
