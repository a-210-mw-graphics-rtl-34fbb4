// ppo_ccu_tb: checks the clock control unit: periods of the RISC and
// rendering clocks in FAST, NORMAL and SLOW modes (ratio 1:2:4 between modes,
// 4:1 between RISC and rendering clock), the /M and /N dividers, glitch-free
// mode switching (no high or low phase shorter than half a fast period) and
// per-domain clock gating.
`timescale 1ns/1ps
module ppo_ccu_tb;
  logic rst_n = 0, vco_clk = 0;
  logic [3:0] log2m_ctrl = 0;
  logic [1:0] log2n_ctrl = 0;
  logic fast = 1, normal = 0, slow = 0;
  logic [3:0] clk_gate = 4'hf;
  logic fb_clk, risc_clk, beq_clk, re_clk, mem_clk;
  int checks = 0, failures = 0;
  realtime last_r, last_f, min_phase = 1e9;
  int n_switch = 0;

  ppo_ccu dut (.*);
  always #1 vco_clk = ~vco_clk;   // 500 MHz VCO in simulation time units

  // narrowest phase of the RISC clock
  always @(risc_clk) begin
    if (risc_clk) begin
      if (last_f > 0 && $realtime - last_f < min_phase) min_phase = $realtime - last_f;
      last_r = $realtime;
    end else begin
      if (last_r > 0 && $realtime - last_r < min_phase) min_phase = $realtime - last_r;
      last_f = $realtime;
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic period(ref logic c, output realtime p);
    realtime t0;
    @(posedge c); t0 = $realtime;
    repeat (4) @(posedge c);
    p = ($realtime - t0) / 4;
  endtask

  task automatic set_mode(input int m);
    fast = (m == 0); normal = (m == 1); slow = (m == 2);
    n_switch++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime pr, pe, pf;
    #5 rst_n = 1;
    log2m_ctrl = 4'd1;       // M = 2: fast tap = VCO / 2
    for (int m = 0; m < 3; m++) begin
      set_mode(m);
      repeat (3) @(posedge re_clk);
      period(risc_clk, pr);
      period(re_clk, pe);
      check(pr == 4.0 * (1 << m), $sformatf("mode %0d RISC period %0t", m, pr));
      check(pe == 4.0 * pr, $sformatf("mode %0d RE period %0t vs %0t", m, pe, pr));
      period(mem_clk, pf);
      check(pf == pe, "MEM clock equals RE clock");
      period(beq_clk, pf);
      check(pf == pr, "BEQ clock equals RISC clock");
    end
    // feedback divider: slow tap / N
    log2n_ctrl = 2'd2;
    repeat (4) @(posedge fb_clk);
    period(fb_clk, pf);
    check(pf == 16.0 * 3, $sformatf("fb period %0t", pf));
    // repeated abrupt mode changes at random moments
    min_phase = 1e9;
    for (int i = 0; i < 40; i++) begin
      #($urandom % 37 + 0.5);
      set_mode($urandom % 3);
    end
    #200;
    check(min_phase >= 2.0, $sformatf("narrowest RISC clock phase %0t", min_phase));
    // slow -> fast switch takes effect within a few fast cycles
    set_mode(2); #300;
    set_mode(0); #20;
    period(risc_clk, pr);
    check(pr == 4.0, "fast immediately after slow");
    // gating the rendering clock
    clk_gate = 4'b1011;
    #100;
    begin
      int edges = 0;
      fork
        begin repeat (50) @(posedge vco_clk); end
        forever @(posedge re_clk) edges++;
      join_any
      disable fork;
      check(edges == 0, $sformatf("gated RE clock produced %0d edges", edges));
    end
    period(mem_clk, pf);
    check(pf == 16.0, "MEM clock keeps running while RE is gated");
    $display("mode switches: %0d", n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
