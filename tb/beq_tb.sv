// beq_tb: checks the bandwidth equalizer with a 4:1 clock ratio: entries
// assembled from 32-bit words come out whole and in order; the queue
// reports full at 64 entries; only the banks holding entries (plus the one
// being written) are active; random reader stalls lose nothing; the
// scratch-pad mode stores and returns 256 words.
module beq_tb;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0, spad = 0;
  logic wr_valid = 0, wr_ready, sp_rd = 0, rd_valid, rd_ready = 0;
  logic [31:0] wr_data = 0, sp_rdata;
  logic [7:0]  sp_addr = 0;
  logic [127:0] rd_data;
  logic [3:0]  bank_act;
  logic [6:0]  level;
  int checks = 0, failures = 0;
  logic [127:0] q [$];
  int n_wr = 0, n_rd = 0;
  bit reader_on = 0;

  beq dut (.*);
  always #1 wclk = ~wclk;
  initial forever begin #3; rclk = 1; #4; rclk = 0; #1; end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic put_entry(input logic [127:0] e);
    // Inputs change only at falling edges; the word is taken at the rising
    // edge that follows a falling edge with wr_ready high.
    @(negedge wclk);
    for (int k = 0; k < 4; k++) begin
      wr_valid = 1; wr_data = e[32*k +: 32];
      while (!wr_ready) @(negedge wclk);
      @(negedge wclk);
    end
    wr_valid = 0;
    q.push_back(e);
  endtask

  // reader
  always @(posedge rclk) begin
    if (rrst_n && rd_valid && rd_ready) begin
      logic [127:0] e;
      e = q.pop_front();
      checks++;
      if (rd_data !== e) begin
        failures++;
        if (failures < 5) $display("entry %0d: %h exp %h", n_rd, rd_data, e);
      end
      n_rd++;
    end
  end
  always @(negedge rclk) rd_ready <= reader_on && ($urandom % 3 != 0);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10; wrst_n = 1; rrst_n = 1;
    @(negedge wclk);
    // one entry: only bank 0 active
    put_entry({$urandom, $urandom, $urandom, $urandom});
    repeat (4) @(posedge wclk);
    check(bank_act == 4'b0001, $sformatf("one entry: bank_act=%b", bank_act));
    // fill to 40 entries with the reader stopped
    for (int i = 1; i < 40; i++) put_entry({$urandom, $urandom, $urandom, $urandom});
    repeat (4) @(posedge wclk);
    check(level == 40, $sformatf("level=%0d", level));
    check(bank_act == 4'b0111, $sformatf("40 entries: bank_act=%b", bank_act));
    // fill to 64: full
    for (int i = 40; i < 64; i++) put_entry({$urandom, $urandom, $urandom, $urandom});
    repeat (4) @(posedge wclk);
    check(!wr_ready && level == 64, "full at 64 entries");
    check(bank_act == 4'b1111, "all banks active when full");
    // drain with random stalls while writing more
    reader_on = 1;
    for (int i = 0; i < 100; i++) put_entry({$urandom, $urandom, $urandom, $urandom});
    wait (q.size() == 0);
    reader_on = 0;
    repeat (20) @(posedge rclk);
    check(n_rd == 164, $sformatf("read %0d entries", n_rd));
    check(!rd_valid, "empty after drain");
    repeat (8) @(posedge wclk);
    check($countones(bank_act) == 1, $sformatf("drained: bank_act=%b", bank_act));
    // scratch-pad mode
    spad = 1;
    @(negedge wclk);
    for (int i = 0; i < 256; i++) begin
      sp_addr = 8'(i); wr_valid = 1; wr_data = 32'(i * 32'h01010101 + 7);
      @(negedge wclk);
    end
    wr_valid = 0;
    for (int i = 0; i < 256; i++) begin
      sp_addr = 8'(255 - i); sp_rd = 1;
      @(negedge wclk);
      sp_rd = 0;
      check(sp_rdata == 32'((255 - i) * 32'h01010101 + 7), $sformatf("spad word %0d = %h", 255 - i, sp_rdata));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
