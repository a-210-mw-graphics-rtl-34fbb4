// mac32_tb: checks the multiply-accumulate unit against 64-bit reference
// arithmetic: random signed and unsigned products, accumulate chains, clear.
module mac32_tb;
  logic clk = 0, rst_n = 0, en = 0, acc_clr = 0, uns = 0;
  logic [31:0] a = 0, b = 0;
  logic [63:0] acc, ref_acc;
  int checks = 0, failures = 0;

  mac32 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_acc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      acc_clr = ($urandom % 8) == 0;
      uns = $urandom % 2;
      a = (i % 5 == 0) ? 32'h8000_0000 : $urandom;
      b = (i % 7 == 0) ? 32'hffff_ffff : $urandom;
      if (en) begin
        logic [63:0] p;
        p = uns ? {32'd0, a} * {32'd0, b} : 64'($signed(a) * $signed(b));
        if (uns) p = 64'(a) * 64'(b);
        else     p = 64'($signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b}));
        ref_acc = (acc_clr ? 64'd0 : ref_acc) + p;
      end
      @(posedge clk); #1;
      checks++;
      if (acc !== ref_acc) begin
        failures++;
        if (failures < 5) $display("mismatch %0d: acc=%h ref=%h", i, acc, ref_acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
