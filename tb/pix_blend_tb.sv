// pix_blend_tb: checks the four texture modes and alpha blending per
// channel against reference arithmetic, including opaque (255) and
// transparent (0) alpha.
module pix_blend_tb;
  logic [23:0] color, texel, dst, out;
  logic [1:0] tex_mode;
  logic alpha_en;
  logic [7:0] alpha;
  int checks = 0, failures = 0;

  pix_blend dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      color = 24'($urandom); texel = 24'($urandom); dst = 24'($urandom);
      tex_mode = 2'(i % 4); alpha_en = (i / 4) % 2;
      alpha = (i % 11 == 0) ? 8'd255 : (i % 13 == 0) ? 8'd0 : 8'($urandom);
      #1;
      for (int c = 0; c < 3; c++) begin
        int cc, tt, dd, s, a, o;
        cc = color[8*c +: 8]; tt = texel[8*c +: 8]; dd = dst[8*c +: 8];
        case (tex_mode)
          0: s = cc;
          1: s = tt;
          2: s = (cc * (tt + 1)) / 256;
          default: s = (cc + tt > 255) ? 255 : cc + tt;
        endcase
        a = (alpha >= 128) ? alpha + 1 : alpha;   // 255 -> 256: fully opaque
        o = alpha_en ? (a * s + (256 - a) * dd) / 256 : s;
        checks++;
        if (int'(out[8*c +: 8]) != o) begin
          failures++;
          if (failures < 5) $display("mode %0d a %0d ch %0d: %0d vs %0d", tex_mode, alpha, c, out[8*c +: 8], o);
        end
        if (alpha_en && alpha == 255) begin checks++; if (int'(out[8*c +: 8]) != s) failures++; end
        if (alpha_en && alpha == 0)   begin checks++; if (int'(out[8*c +: 8]) != dd) failures++; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
