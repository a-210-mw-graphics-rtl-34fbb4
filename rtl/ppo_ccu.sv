// ppo_ccu: clock control unit of the programmable power optimizer. It turns
// the PLL's VCO clock into the chip's four clock domains and lets software
// change their speed and gate them at run time.
//   vco_clk -> /M -> fast tap -> /2 -> normal tap -> /2 -> slow tap -> /N -> fb_clk
// fb_clk goes back to the PLL's phase detector. One of the three taps is
// chosen by the one-hot FAST/NORMAL/SLOW controls; each tap has its own
// gated D flip-flop (gdff), which samples its select on the tap's falling
// edge, so a mode change never cuts a clock pulse short and takes effect at
// once (zero-latency scaling). The selected clock drives RISCclk and BEQclk
// directly and, divided by 4, REclk and MEMclk (132/33, 66/16.5 or
// 33/8.25 MHz from a 132 MHz fast tap). Each of the four outputs passes a
// further gdff driven by one software clock-gating bit (1 = running); the
// /4 clock is produced from rising edges of the selected clock, so the
// slow and fast domains stay edge-aligned.
// The chain of dividers, the GDFF selection and the four domains follow the
// chip. The figure labels the undivided path "/0"; it is read as /1, as the
// RISC runs at the full selected speed. M = log2m_ctrl + 1 (1..16) and
// N = log2n_ctrl + 1 (1..4) are this design's reading of the 4- and 2-bit
// controls. Clock gating of the four domains uses a gdff per output.
module ppo_ccu (
  input  logic       rst_n,
  input  logic       vco_clk,
  input  logic [3:0] log2m_ctrl,
  input  logic [1:0] log2n_ctrl,
  input  logic       fast,
  input  logic       normal,
  input  logic       slow,
  input  logic [3:0] clk_gate,   // [0] RISC, [1] BEQ, [2] 3DRE, [3] DRAM; 1 = clock on
  output logic       fb_clk,
  output logic       risc_clk,
  output logic       beq_clk,
  output logic       re_clk,
  output logic       mem_clk
);
  logic fast_clk, normal_clk, slow_clk;
  logic gf, gn, gs, sel_clk, quarter_clk;

  clk_div u_divm (.rst_n, .clk_in(vco_clk),    .div({1'b0, log2m_ctrl} + 5'd1), .clk_out(fast_clk));
  clk_div u_div2a(.rst_n, .clk_in(fast_clk),   .div(5'd2),                      .clk_out(normal_clk));
  clk_div u_div2b(.rst_n, .clk_in(normal_clk), .div(5'd2),                      .clk_out(slow_clk));
  clk_div u_divn (.rst_n, .clk_in(slow_clk),   .div({3'b0, log2n_ctrl} + 5'd1), .clk_out(fb_clk));

  gdff u_gf (.rst_n, .ck(fast_clk),   .d(fast),   .gq(gf));
  gdff u_gn (.rst_n, .ck(normal_clk), .d(normal), .gq(gn));
  gdff u_gs (.rst_n, .ck(slow_clk),   .d(slow),   .gq(gs));

  assign sel_clk = gf | gn | gs;

  clk_div u_div4 (.rst_n, .clk_in(sel_clk), .div(5'd4), .clk_out(quarter_clk));

  gdff u_g0 (.rst_n, .ck(sel_clk),     .d(clk_gate[0]), .gq(risc_clk));
  gdff u_g1 (.rst_n, .ck(sel_clk),     .d(clk_gate[1]), .gq(beq_clk));
  gdff u_g2 (.rst_n, .ck(quarter_clk), .d(clk_gate[2]), .gq(re_clk));
  gdff u_g3 (.rst_n, .ck(quarter_clk), .d(clk_gate[3]), .gq(mem_clk));
endmodule
