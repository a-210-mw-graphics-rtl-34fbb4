// beq: bandwidth equalizer between the 32-bit geometry RISC (fast clock)
// and the 128-bit rendering engine (quarter-speed clock). It is a 1-kB
// dual-ported SRAM in four 256-byte banks holding 64 queue entries of one
// 128-bit command each.
//
// Queue mode (spad = 0): the RISC writes 32-bit words; four words (first
// word = bits [31:0]) make one entry, stored at the write entry pointer.
// The rendering engine sees the oldest entry on rd_data while rd_valid is
// high and removes it with rd_ready (valid/ready handshake, first-word
// fall-through). The two entry pointers cross clock domains as Gray codes
// through two-flop synchronisers. The flow controller activates only the
// banks that hold queued entries plus the bank the write pointer points
// into (bank_act); the others stay idle.
// Scratch-pad mode (spad = 1): the RISC reads and writes the 1 kB as 256
// words at sp_addr; a read returns its word on sp_rdata one RISC clock
// later. Only the addressed bank is active.
// The sizes, the four banks, the entry-pointer-driven bank activation and
// the scratch-pad mode follow the chip; the word order, the handshakes and
// the synchroniser-based clock crossing are this design's choices.
module beq (
  input  logic         wclk,       // RISC-side clock (BEQclk)
  input  logic         wrst_n,
  input  logic         rclk,       // rendering-engine clock (REclk)
  input  logic         rrst_n,
  input  logic         spad,       // 1: scratch-pad RAM mode (static)
  // RISC side
  input  logic         wr_valid,
  input  logic [31:0]  wr_data,
  output logic         wr_ready,
  input  logic [7:0]   sp_addr,
  input  logic         sp_rd,
  output logic [31:0]  sp_rdata,
  // rendering-engine side
  output logic         rd_valid,
  output logic [127:0] rd_data,
  input  logic         rd_ready,
  // flow-control status
  output logic [3:0]   bank_act,
  output logic [6:0]   level       // queued entries seen from the RISC side
);
  // ---------------- write (RISC) domain ----------------
  logic [6:0]  wptr, wptr_g, rptr_g_s1, rptr_g_s2, rptr_w;
  logic [6:0]  rptr;                // read entry pointer (read domain)
  logic [1:0]  wword;
  logic        full;
  logic        q_wr;                // a queue word is accepted
  logic [3:0]  we_word;
  logic [3:0]  a_addr;
  logic [1:0]  a_bank;
  logic [127:0] rdata_a [4];
  logic [1:0]  sp_word_q, sp_bank_q;

  function automatic logic [6:0] bin2gray(input logic [6:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [6:0] gray2bin(input logic [6:0] g);
    logic [6:0] b;
    b[6] = g[6];
    for (int i = 5; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  assign rptr_w   = gray2bin(rptr_g_s2);
  assign level    = wptr - rptr_w;
  assign full     = (level == 7'd64);
  assign wr_ready = spad || !full;
  assign q_wr     = !spad && wr_valid && !full;

  always_ff @(posedge wclk or negedge wrst_n)
    if (!wrst_n) begin
      wptr <= '0; wptr_g <= '0; wword <= '0;
      rptr_g_s1 <= '0; rptr_g_s2 <= '0;
    end else begin
      rptr_g_s1 <= bin2gray(rptr);     // two-flop synchroniser
      rptr_g_s2 <= rptr_g_s1;
      if (q_wr) begin
        wword <= wword + 2'd1;
        if (wword == 2'd3) begin
          wptr   <= wptr + 7'd1;
          wptr_g <= bin2gray(wptr + 7'd1);
        end
      end
    end

  // Port A addressing: queue writes use the entry pointer, scratch-pad
  // accesses use sp_addr = {bank, entry, word}.
  always_comb begin
    we_word = '0;
    if (spad) begin
      a_bank = sp_addr[7:6];
      a_addr = sp_addr[5:2];
      if (wr_valid) we_word[sp_addr[1:0]] = 1'b1;
    end else begin
      a_bank = wptr[5:4];
      a_addr = wptr[3:0];
      if (q_wr) we_word[wword] = 1'b1;
    end
  end

  // Bank activation decided by the entry pointers.
  always_comb begin
    logic [5:0] off;
    off      = '0;
    bank_act = '0;
    if (spad) begin
      bank_act[sp_addr[7:6]] = 1'b1;
    end else begin
      bank_act[wptr[5:4]] = 1'b1;
      for (int e = 0; e < 64; e++) begin
        off = 6'(e) - rptr_w[5:0];
        if ({1'b0, off} < level) bank_act[e / 16] = 1'b1;
      end
    end
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      sp_word_q <= '0;
      sp_bank_q <= '0;
    end else if (spad && sp_rd) begin
      sp_word_q <= sp_addr[1:0];
      sp_bank_q <= sp_addr[7:6];
    end
  end
  assign sp_rdata = rdata_a[sp_bank_q][32*sp_word_q +: 32];

  // ---------------- read (rendering-engine) domain ----------------
  logic [6:0] wptr_g_s1, wptr_g_s2, wptr_r;
  logic [127:0] rdata_b [4];

  assign wptr_r   = gray2bin(wptr_g_s2);
  assign rd_valid = !spad && (rptr != wptr_r);
  assign rd_data  = rdata_b[rptr[5:4]];

  always_ff @(posedge rclk or negedge rrst_n)
    if (!rrst_n) begin
      rptr <= '0; wptr_g_s1 <= '0; wptr_g_s2 <= '0;
    end else begin
      wptr_g_s1 <= wptr_g;
      wptr_g_s2 <= wptr_g_s1;
      if (rd_valid && rd_ready) rptr <= rptr + 7'd1;
    end

  for (genvar k = 0; k < 4; k++) begin : g_bank
    beq_bank u_bank (
      .clk_a  (wclk),
      .en_a   (bank_act[k] && (a_bank == 2'(k)) && ((|we_word) || (spad && sp_rd))),
      .we_a   (we_word),
      .addr_a (a_addr),
      .wdata_a({4{wr_data}}),
      .rdata_a(rdata_a[k]),
      .en_b   (rd_valid && rptr[5:4] == 2'(k)),
      .addr_b (rptr[3:0]),
      .rdata_b(rdata_b[k])
    );
  end

  // A queue write only ever goes to an active bank.
  a_write_active: assert property (@(posedge wclk) disable iff (!wrst_n)
    q_wr |-> bank_act[wptr[5:4]]);
endmodule
