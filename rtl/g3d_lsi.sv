// g3d_lsi: top level of the mobile 3-D graphics chip. A geometry RISC
// (outside this RTL; its memory-interface signals are ports here) streams
// 128-bit rendering commands through the bandwidth equalizer (beq) into the
// 3-D rendering engine (re3d), which renders into embedded frame, depth and
// texture DRAM and sends the post-processed front buffer to the display.
// The programmable power optimizer's clock control unit (ppo_ccu) derives
// the four clock domains from the PLL's VCO clock (the PLL is outside this
// RTL; vco_clk is an input and fb_clk goes back to its phase detector):
//   risc_clk  RISC and its MAC (mac32), brought out for the processor
//   beq_clk   RISC side of the equalizer (same rate as risc_clk)
//   re_clk    rendering engine and read side of the equalizer (1/4 rate)
//   mem_clk   DRAM macros (1/4 rate, same edges as re_clk)
// Software selects FAST / NORMAL / SLOW and gates each domain. Reset
// (rst_n, active low, asynchronous assertion) clears every domain; it
// should be released while the clocks run slow or are gated.
// The partition, the widths (32-bit RISC side, 128-bit engine side) and the
// clocking follow the chip; the command encoding is described in re3d.
module g3d_lsi (
  input  logic         rst_n,
  // PLL interface
  input  logic         vco_clk,
  output logic         pll_fb_clk,
  // power optimizer software controls
  input  logic [3:0]   log2m_ctrl,
  input  logic [1:0]   log2n_ctrl,
  input  logic         mode_fast,
  input  logic         mode_normal,
  input  logic         mode_slow,
  input  logic [3:0]   clk_gate,
  output logic         risc_clk,
  output logic         re_clk_out,
  // RISC MAC unit
  input  logic         mac_en,
  input  logic         mac_clr,
  input  logic         mac_uns,
  input  logic [31:0]  mac_a,
  input  logic [31:0]  mac_b,
  output logic [63:0]  mac_acc,
  // RISC memory interface to the equalizer
  input  logic         beq_spad,
  input  logic         beq_wr_valid,
  input  logic [31:0]  beq_wr_data,
  output logic         beq_wr_ready,
  input  logic [7:0]   beq_sp_addr,
  input  logic         beq_sp_rd,
  output logic [31:0]  beq_sp_rdata,
  output logic [3:0]   beq_bank_act,
  output logic [6:0]   beq_level,
  // display
  input  logic         lcd_tick,
  output logic         lcd_valid,
  output logic [23:0]  lcd_rgb,
  output logic         lcd_frame_start,
  // status and statistics (re_clk domain)
  output logic         re_idle,
  output logic         front_sel,      // which macro pair is the front buffer
  output logic         ev_dfcg,
  output logic [1:0]   ev_zfail,
  output logic         ev_conflict,
  output logic [7:0]   ev_spmask,
  output logic [7:0]   ev_tpmask,
  output logic [3:0]   ev_tm_act
);
  logic beq_clk, re_clk, mem_clk;
  logic         cmd_valid, cmd_ready;
  logic [127:0] cmd;

  ppo_ccu u_ppo (.rst_n, .vco_clk, .log2m_ctrl, .log2n_ctrl, .fast(mode_fast),
                 .normal(mode_normal), .slow(mode_slow), .clk_gate, .fb_clk(pll_fb_clk),
                 .risc_clk, .beq_clk, .re_clk, .mem_clk);

  assign re_clk_out = re_clk;

  mac32 u_mac (.clk(risc_clk), .rst_n, .en(mac_en), .acc_clr(mac_clr), .uns(mac_uns),
               .a(mac_a), .b(mac_b), .acc(mac_acc));

  beq u_beq (.wclk(beq_clk), .wrst_n(rst_n), .rclk(re_clk), .rrst_n(rst_n), .spad(beq_spad),
             .wr_valid(beq_wr_valid), .wr_data(beq_wr_data), .wr_ready(beq_wr_ready),
             .sp_addr(beq_sp_addr), .sp_rd(beq_sp_rd), .sp_rdata(beq_sp_rdata),
             .rd_valid(cmd_valid), .rd_data(cmd), .rd_ready(cmd_ready),
             .bank_act(beq_bank_act), .level(beq_level));

  re3d u_re (.clk(re_clk), .mem_clk, .rst_n, .cmd_valid, .cmd, .cmd_ready,
             .lcd_tick, .lcd_valid, .lcd_rgb, .lcd_frame_start, .idle(re_idle), .swap(front_sel),
             .ev_dfcg, .ev_zfail, .ev_conflict, .ev_spmask, .ev_tpmask, .ev_tm_act);
endmodule
