// tex_filter_tb: checks the bilinear filter against a real-valued blend of
// the four texels (within one step of truncation per lerp), exact corner
// cases (weights 0 give t00) and the point-sampling bypass.
module tex_filter_tb;
  logic [23:0] t00, t10, t01, t11, rgb;
  logic [3:0] fs, ft;
  logic point;
  int checks = 0, failures = 0;

  tex_filter dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      t00 = 24'($urandom); t10 = 24'($urandom); t01 = 24'($urandom); t11 = 24'($urandom);
      fs = 4'($urandom); ft = 4'($urandom); point = (i % 10 == 0);
      if (i % 7 == 0) begin fs = 0; ft = 0; end
      #1;
      for (int c = 0; c < 3; c++) begin
        real a, b, cc, d, e, w;
        a = t00[8*c +: 8]; b = t10[8*c +: 8]; cc = t01[8*c +: 8]; d = t11[8*c +: 8];
        e = (a * (16 - fs) + b * fs) / 16.0;
        w = (cc * (16 - fs) + d * fs) / 16.0;
        e = (e * (16 - ft) + w * ft) / 16.0;
        checks++;
        if (point || (fs == 0 && ft == 0)) begin
          if (rgb[8*c +: 8] !== t00[8*c +: 8]) failures++;
        end else if (real'(rgb[8*c +: 8]) > e + 0.001 || real'(rgb[8*c +: 8]) < e - 2.0) begin
          failures++;
          if (failures < 5) $display("ch %0d: %0d vs %f", c, rgb[8*c +: 8], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
