// db_macro_tb: checks the db macro's single-cycle read-modify-write:
// the read bus shows the addressed word in the same cycle, a cycle with the
// write mask high replaces it at the clock edge, a masked-off cycle does not,
// and random traffic matches a reference array.
module db_macro_tb;
  localparam int AW = 15, DW = 16;
  logic clk = 0, en = 0, wmask = 0;
  logic [AW-1:0] addr = 0;
  logic [DW-1:0] wdata = 0, rdata;
  logic [DW-1:0] refm [logic [AW-1:0]];
  int checks = 0, failures = 0;

  db_macro dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initialise a window of words
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      en = 1; wmask = 1; addr = AW'(i * 97); wdata = DW'($urandom);
      refm[addr] = wdata;
    end
    // random read-modify-write: read, modify (add 1) and write back in one cycle
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      addr  = AW'(($urandom % 64) * 97);
      en    = 1;
      wmask = $urandom % 2;
      #1;
      checks++;
      if (rdata !== refm[addr]) begin
        failures++;
        if (failures < 5) $display("read %h: %h exp %h", addr, rdata, refm[addr]);
      end
      wdata = rdata + DW'(1);
      if (wmask) refm[addr] = wdata;
    end
    @(negedge clk); en = 0; wmask = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
