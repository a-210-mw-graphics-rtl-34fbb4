// simd_div_tb: checks every divisor 1..255 with random differences in all
// eight lanes against exact division (quotient scaled by 256); the table
// division must stay within 0.8 % plus one LSB, and narrow lanes must use
// only their 9-bit differences.
module simd_div_tb;
  logic [7:0]         dy;
  logic signed [16:0] d [8];
  logic signed [24:0] q [8];
  int checks = 0, failures = 0;

  simd_div dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4; t++)
      for (int y = 1; y < 256; y++) begin
        dy = 8'(y);
        for (int l = 0; l < 8; l++) begin
          if (l == 0 || l == 2 || l == 3 || l == 4) d[l] = 17'($signed(9'($urandom)));
          else d[l] = 17'($urandom);
          if (t == 0) d[l] = (l == 0 || l == 2 || l == 3 || l == 4) ? 17'sd255 : 17'sd65535;
          if (t == 1) d[l] = (l == 0 || l == 2 || l == 3 || l == 4) ? -17'sd255 : -17'sd65535;
        end
        #1;
        for (int l = 0; l < 8; l++) begin
          real exact, err;
          exact = real'(d[l]) * 256.0 / real'(y);
          err   = real'(q[l]) - exact;
          if (err < 0) err = -err;
          checks++;
          if (err > 0.008 * (exact < 0 ? -exact : exact) + 1.0) begin
            failures++;
            if (failures < 8) $display("dy=%0d lane=%0d d=%0d q=%0d exact=%f", y, l, d[l], q[l], exact);
          end
        end
      end
    // narrow lane ignores upper bits
    dy = 8'd2;
    for (int l = 0; l < 8; l++) d[l] = 17'h1_0004;
    #1;
    checks++;
    if (q[0] !== 25'sd512 || q[1] !== -25'sd8388096) begin
      failures++;
      $display("narrow lane: q0=%0d q1=%0d", q[0], q[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
