// tm_macro_tb: checks the texture macro: writes, then reads whose data
// appears only after the next clock edge (latency 1) and is held while no
// read is issued.
module tm_macro_tb;
  localparam int AW = 18, DW = 24;
  logic clk = 0, en = 0, we = 0;
  logic [AW-1:0] addr = 0;
  logic [DW-1:0] wdata = 0, rdata;
  logic [DW-1:0] refm [int];
  int checks = 0, failures = 0;

  tm_macro dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr = AW'(i * 1301); wdata = DW'($urandom);
      refm[i] = wdata;
    end
    for (int i = 0; i < 1000; i++) begin
      int k;
      logic [DW-1:0] prev_rd;
      k = $urandom % 200;
      @(negedge clk);
      en = 1; we = 0; addr = AW'(k * 1301);
      prev_rd = rdata;
      #1;
      checks++;
      if (rdata !== prev_rd) begin failures++; $display("latency 0 seen"); end
      @(negedge clk);
      en = 0;
      checks++;
      if (rdata !== refm[k]) begin
        failures++;
        if (failures < 5) $display("read %0d: %h exp %h", k, rdata, refm[k]);
      end
      @(negedge clk);
      checks++;
      if (rdata !== refm[k]) failures++;   // held while idle
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
