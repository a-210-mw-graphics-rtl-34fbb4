// mem_prog_tb: memory programmer with four frame and four depth macros.
// The macros are preloaded with random colours and depths. The testbench
// scans whole 256 x 256 frames with one LCD tick per clock and compares
// every displayed pixel with a reference model of the post-filter:
// pass-through, 2x1 anti-aliasing (FSAA) with several weight sets, fog by
// depth, and FSAA with write-back followed by a pass frame that must show
// the written-back image. It then renders into the back buffer through the
// pipeline-side ports (checking read-back), swaps the buffers and checks
// that the display now shows the former back buffer, and that the
// pipeline side now reaches the former front macros.
module mem_prog_tb;
  import g3d_pkg::*;
  logic clk = 0, rst_n = 0, swap = 0, cmd_we = 0, lcd_tick = 0, lcd_valid, lcd_frame_start;
  logic [15:0] cmd_in = 0, fog_bias_in = 0;
  logic [23:0] fog_color_in = 0, lcd_rgb;
  logic        ss_fb_en [2], ss_fb_we [2], ss_db_en [2], ss_db_we [2];
  logic [14:0] ss_fb_addr [2], ss_db_addr [2];
  logic [23:0] ss_fb_wdata [2], ss_fb_rdata [2];
  logic [15:0] ss_db_wdata [2], ss_db_rdata [2];
  logic        fbm_en [4], fbm_we [4], dbm_en [4], dbm_we [4];
  logic [14:0] fbm_addr [4], dbm_addr [4];
  logic [23:0] fbm_wdata [4], fbm_rdata [4];
  logic [15:0] dbm_wdata [4], dbm_rdata [4];
  int checks = 0, failures = 0;

  mem_prog dut (.*);
  always #5 clk = ~clk;

  for (genvar k = 0; k < 4; k++) begin : g_m
    fb_macro u_fb (.clk, .en(fbm_en[k]), .addr(fbm_addr[k]), .wmask(fbm_we[k]), .wdata(fbm_wdata[k]), .rdata(fbm_rdata[k]));
    db_macro u_db (.clk, .en(dbm_en[k]), .addr(dbm_addr[k]), .wmask(dbm_we[k]), .wdata(dbm_wdata[k]), .rdata(dbm_rdata[k]));
  end

  // reference copies of the two buffer pairs: buffer b = macros 2b, 2b+1
  logic [23:0] rc [2][256][256];
  logic [15:0] rzb [2][256][256];
  int front = 1;
  logic [15:0] cmd;
  logic [23:0] fcol;
  logic [15:0] fbias;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  function automatic logic [23:0] post(input int x, input int y);
    logic [23:0] p, q, o;
    int f;
    p = rc[front][y][x];
    q = (x == 255) ? p : rc[front][y][x + 1];
    f = (int'(rzb[front][y][x]) + int'(fbias)) >> (int'(cmd[2:0]) + 1);
    if (f > 255) f = 255;
    for (int c = 0; c < 3; c++) begin
      int pc, qc, fc, s, d;
      pc = int'(p[8*c +: 8]); qc = int'(q[8*c +: 8]); fc = int'(fcol[8*c +: 8]);
      s = (int'(cmd[12:10]) * pc + int'(cmd[9:7]) * qc) >> int'(cmd[6:4]);
      d = ((pc - fc) * f) >>> 8;
      case (cmd[15:13])
        3'd1: o[8*c +: 8] = (s > 255) ? 8'hff : 8'(s);
        3'd2: o[8*c +: 8] = 8'(fc + d);
        default: o[8*c +: 8] = 8'(pc);
      endcase
    end
    return o;
  endfunction

  task automatic set_cmd(input logic [15:0] c, input logic [23:0] fc, input logic [15:0] fb);
    @(negedge clk);
    cmd_in = c; fog_color_in = fc; fog_bias_in = fb; cmd_we = 1;
    @(negedge clk);
    cmd_we = 0;
    cmd = c; fcol = fc; fbias = fb;
  endtask

  task automatic frame();
    int n;
    logic [23:0] exp_q [$];
    n = 0;
    @(negedge clk);
    lcd_tick = 1;
    for (int i = 0; i < 65536 + 1; i++) begin
      @(posedge clk);
      if (i < 65536) exp_q.push_back(post(i % 256, i / 256));
      #1;
      if (i == 65535) lcd_tick = 0;
      if (lcd_valid) begin
        logic [23:0] e;
        e = exp_q.pop_front();
        check(lcd_rgb == e, $sformatf("cmd %h pixel %0d: %h exp %h", cmd, n, lcd_rgb, e));
        check(lcd_frame_start == (n == 0), "frame start flag");
        n++;
      end
    end
    // write-back updates the reference after the frame (reads run ahead of writes)
    if (cmd[3]) begin
      logic [23:0] nb [256][256];
      for (int y = 0; y < 256; y++) for (int x = 0; x < 256; x++) nb[y][x] = post(x, y);
      for (int y = 0; y < 256; y++) for (int x = 0; x < 256; x++) rc[front][y][x] = nb[y][x];
    end
    check(n == 65536, $sformatf("pixels shown %0d", n));
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2; k++) begin
      ss_fb_en[k] = 0; ss_fb_we[k] = 0; ss_fb_addr[k] = 0; ss_fb_wdata[k] = 0;
      ss_db_en[k] = 0; ss_db_we[k] = 0; ss_db_addr[k] = 0; ss_db_wdata[k] = 0;
    end
    for (int b = 0; b < 2; b++)
      for (int y = 0; y < 256; y++)
        for (int x = 0; x < 256; x++) begin
          logic [14:0] a;
          rc[b][y][x] = 24'($urandom);
          rzb[b][y][x] = 16'($urandom);
          a = {8'(y), 7'(x >> 1)};
          case (2 * b + x % 2)
            0: begin g_m[0].u_fb.mem[a] = rc[b][y][x]; g_m[0].u_db.mem[a] = rzb[b][y][x]; end
            1: begin g_m[1].u_fb.mem[a] = rc[b][y][x]; g_m[1].u_db.mem[a] = rzb[b][y][x]; end
            2: begin g_m[2].u_fb.mem[a] = rc[b][y][x]; g_m[2].u_db.mem[a] = rzb[b][y][x]; end
            default: begin g_m[3].u_fb.mem[a] = rc[b][y][x]; g_m[3].u_db.mem[a] = rzb[b][y][x]; end
          endcase
        end
    cmd = 0; fcol = 0; fbias = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    set_cmd(16'h0000, 0, 0);                         frame();   // pass
    set_cmd({3'd1, 3'd1, 3'd1, 3'd1, 1'b0, 3'd0}, 0, 0); frame(); // FSAA (P+Q)/2
    set_cmd({3'd1, 3'd3, 3'd1, 3'd2, 1'b0, 3'd0}, 0, 0); frame(); // FSAA (3P+Q)/4
    set_cmd({3'd1, 3'd7, 3'd7, 3'd2, 1'b0, 3'd0}, 0, 0); frame(); // saturating
    set_cmd({3'd2, 9'd0, 1'b0, 3'd6}, 24'h80_c0_ff, 16'd1200); frame(); // fog
    set_cmd({3'd2, 9'd0, 1'b0, 3'd2}, 24'h10_20_30, 16'd0);    frame(); // dense fog
    set_cmd({3'd1, 3'd1, 3'd1, 3'd1, 1'b1, 3'd0}, 0, 0); frame(); // FSAA with write-back
    set_cmd(16'h0000, 0, 0);                         frame();   // shows the written image
    // render into the back buffer through the pipeline ports
    for (int i = 0; i < 3000; i++) begin
      int x, y;
      logic [23:0] c;
      logic [15:0] zz;
      x = $urandom % 128; y = $urandom % 256; c = 24'($urandom); zz = 16'($urandom);
      @(negedge clk);
      for (int k = 0; k < 2; k++) begin
        ss_fb_en[k] = 1; ss_fb_we[k] = 1; ss_fb_addr[k] = {8'(y), 7'(x)}; ss_fb_wdata[k] = c ^ 24'(k);
        ss_db_en[k] = 1; ss_db_we[k] = 1; ss_db_addr[k] = {8'(y), 7'(x)}; ss_db_wdata[k] = zz ^ 16'(k);
        rc[0][y][2*x + k] = c ^ 24'(k);
        rzb[0][y][2*x + k] = zz ^ 16'(k);
      end
      @(negedge clk);
      for (int k = 0; k < 2; k++) begin
        ss_fb_we[k] = 0; ss_db_we[k] = 0;
        x = $urandom % 128; y = $urandom % 256;
        ss_fb_addr[k] = {8'(y), 7'(x)}; ss_db_addr[k] = {8'(y), 7'(x)};
        #1;
        check(ss_fb_rdata[k] == rc[0][y][2*x + k], "back frame read");
        check(ss_db_rdata[k] == rzb[0][y][2*x + k], "back depth read");
      end
      for (int k = 0; k < 2; k++) begin ss_fb_en[k] = 0; ss_db_en[k] = 0; end
    end
    @(negedge clk); swap = 1; front = 0;
    set_cmd(16'h0000, 0, 0); frame();                 // front is now macros 0, 1
    set_cmd({3'd2, 9'd0, 1'b0, 3'd5}, 24'hff_ff_ff, 16'd300); frame();
    // pipeline side now reaches macros 2, 3
    for (int i = 0; i < 200; i++) begin
      int x, y;
      x = $urandom % 128; y = $urandom % 256;
      @(negedge clk);
      for (int k = 0; k < 2; k++) begin
        ss_fb_en[k] = 1; ss_fb_addr[k] = {8'(y), 7'(x)}; ss_db_en[k] = 1; ss_db_addr[k] = {8'(y), 7'(x)};
      end
      #1;
      for (int k = 0; k < 2; k++) begin
        check(ss_fb_rdata[k] == rc[1][y][2*x + k], "swapped back frame read");
        check(ss_db_rdata[k] == rzb[1][y][2*x + k], "swapped back depth read");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
