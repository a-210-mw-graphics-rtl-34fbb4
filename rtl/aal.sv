// aal: address alignment logic shared by the two texture units. Every
// clock it can take the eight texel requests of a pixel pair (PP0_0..PP0_3,
// PP1_0..PP1_3, 16-bit texel addresses {t, s} at one mip level) and fetch
// them from the four texture macros with as few accesses as possible:
//   spatial aligner   16 comparators match each PP1 request with the PP0
//                     requests; a matching PP1 request reuses PP0's texel
//                     (spmask).
//   temporal aligner  64 comparators match each request with the eight
//                     requests of the previous pair, qualified by an equal
//                     LOD; a match reuses the texel held in the output
//                     pipeline latch (tpmask). `flush` empties this store.
//   TM request gen.   the remaining requests go to macro {t[0], s[0]}, so a
//                     2x2 footprint always spreads over all four macros. Equal
//                     addresses are merged; when two different addresses
//                     need one macro the pair takes a second access cycle
//                     (in_ready low for one clock).
//   pipeline latch    texels return one clock after their access (macro
//                     latency 1) and the eight texels of the pair are
//                     latched and offered on out_texel with out_valid for
//                     one clock, together with the pair's sideband `out_side`.
// The macro word of a texel is tex_base + level offset + (t/2) * (level
// width/2) + s/2. Latency is two clocks, three with a conflict.
// The aligner structure (16 + 64 comparators, LOD check, texels kept in
// pipeline latches, four macros with adjacent texels in different macros)
// follows the chip; the merge rule, the two-cycle conflict handling, the
// flush and the macro word layout are this design's.
module aal
  import g3d_pkg::*;
#(
  parameter int SW = 1   // sideband width carried with each pair
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          flush,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [15:0]   in_addr [8],
  input  logic [7:0]    in_mask,
  input  logic [3:0]    in_lod,
  input  logic [SW-1:0] in_side,
  input  logic [17:0]   tex_base,
  input  logic [3:0]    log2size,
  // texture macros
  output logic [3:0]    tm_en,
  output logic [17:0]   tm_addr [4],
  input  logic [23:0]   tm_rdata [4],
  // result
  output logic          out_valid,
  output logic [23:0]   out_texel [8],
  output logic [SW-1:0] out_side,
  // per-pair activity, valid with an accepted pair
  output logic [7:0]    spmask,
  output logic [7:0]    tpmask,
  output logic          conflict
);
  typedef enum logic [1:0] {K_NONE, K_FETCH, K_TEMP, K_SPAT} kind_e;

  // ---------------- stage 1: compare and issue ----------------
  logic [15:0] prev_addr [8];
  logic [7:0]  prev_mask;
  logic [3:0]  prev_lod;

  logic        ph2_pend;
  logic [17:0] ph2_addr [4];
  logic [3:0]  ph2_en;

  kind_e       c_kind  [8];
  logic [2:0]  c_idx   [8];
  logic        c_phase [8];   // 0: first access, 1: second access
  logic [17:0] a1 [4], a2 [4];
  logic [3:0]  e1, e2;
  logic        accept;

  function automatic logic [17:0] tm_word(input logic [15:0] a, input logic [3:0] l2s,
                                          input logic [3:0] lod, input logic [17:0] base);
    logic [3:0] sl;
    logic [7:0] s, t;
    sl = (lod > l2s) ? 4'd0 : l2s - lod;
    s  = a[7:0];
    t  = a[15:8];
    if (sl == 0) return base + level_offset(l2s, lod);
    return base + level_offset(l2s, lod) + ((18'(t >> 1)) << (sl - 4'd1)) + 18'(s >> 1);
  endfunction

  always_comb begin
    logic [1:0]  b;
    logic [17:0] wa;
    spmask = '0;
    tpmask = '0;
    e1 = '0; e2 = '0;
    for (int k = 0; k < 4; k++) begin a1[k] = '0; a2[k] = '0; end
    for (int r = 0; r < 8; r++) begin
      c_kind[r] = K_NONE; c_idx[r] = '0; c_phase[r] = 1'b0;
    end
    // spatial aligner: PP1 requests against PP0 requests
    for (int j = 4; j < 8; j++)
      for (int i = 3; i >= 0; i--)
        if (in_mask[i] && in_mask[j] && in_addr[i] == in_addr[j]) begin
          spmask[j] = 1'b1;
          c_idx[j]  = 3'(i);
        end
    // temporal aligner: all requests against the previous pair
    for (int r = 0; r < 8; r++)
      if (!spmask[r])
        for (int k = 7; k >= 0; k--)
          if (in_mask[r] && prev_mask[k] && prev_lod == in_lod && in_addr[r] == prev_addr[k]) begin
            tpmask[r] = 1'b1;
            c_idx[r]  = 3'(k);
          end
    // request generation
    for (int r = 0; r < 8; r++) begin
      b  = {in_addr[r][8], in_addr[r][0]};
      wa = tm_word(in_addr[r], log2size, in_lod, tex_base);
      if (!in_mask[r])      c_kind[r] = K_NONE;
      else if (spmask[r])   c_kind[r] = K_SPAT;
      else if (tpmask[r])   c_kind[r] = K_TEMP;
      else begin
        c_kind[r] = K_FETCH;
        c_idx[r]  = {1'b0, b};
        if (!e1[b] || a1[b] == wa) begin
          e1[b] = 1'b1; a1[b] = wa; c_phase[r] = 1'b0;
        end else begin
          e2[b] = 1'b1; a2[b] = wa; c_phase[r] = 1'b1;
        end
      end
    end
    conflict = |e2;
  end

  assign in_ready = !ph2_pend;
  assign accept   = in_valid && in_ready;

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      tm_en[k]   = ph2_pend ? ph2_en[k]   : (accept && e1[k]);
      tm_addr[k] = ph2_pend ? ph2_addr[k] : a1[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ph2_pend  <= 1'b0;
      prev_mask <= '0;
    end else begin
      if (ph2_pend) ph2_pend <= 1'b0;
      if (accept) begin
        ph2_pend  <= conflict;
        prev_mask <= in_mask;
      end
      if (flush) prev_mask <= '0;
    end

  always_ff @(posedge clk)
    if (accept) begin
      prev_addr <= in_addr;
      prev_lod  <= in_lod;
      ph2_addr  <= a2;
      ph2_en    <= e2;
    end

  // ---------------- stage 2: collect and latch ----------------
  logic          s2_valid, s2_two, s2_second;
  kind_e         s2_kind  [8];
  logic [2:0]    s2_idx   [8];
  logic          s2_phase [8];
  logic [SW-1:0] s2_side;
  logic [23:0]   hold [4];
  logic          assemble;
  logic [23:0]   tex [8];

  assign assemble = s2_valid && (!s2_two || s2_second);

  always_comb begin
    for (int r = 0; r < 8; r++) begin
      case (s2_kind[r])
        K_FETCH: tex[r] = (s2_two && !s2_phase[r]) ? hold[s2_idx[r][1:0]] : tm_rdata[s2_idx[r][1:0]];
        K_TEMP:  tex[r] = out_texel[s2_idx[r]];
        default: tex[r] = '0;
      endcase
    end
    for (int r = 4; r < 8; r++)
      if (s2_kind[r] == K_SPAT) tex[r] = tex[s2_idx[r]];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s2_valid  <= 1'b0;
      s2_second <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= assemble;
      if (s2_valid && s2_two && !s2_second) s2_second <= 1'b1;
      if (assemble) s2_valid <= 1'b0;
      if (accept) begin
        s2_valid  <= 1'b1;
        s2_second <= 1'b0;
      end
    end

  always_ff @(posedge clk) begin
    if (accept) begin
      s2_two   <= conflict;
      s2_kind  <= c_kind;
      s2_idx   <= c_idx;
      s2_phase <= c_phase;
      s2_side  <= in_side;
    end
    if (s2_valid && s2_two && !s2_second) hold <= tm_rdata;
    if (assemble) begin
      out_texel <= tex;
      out_side  <= s2_side;
    end
  end
endmodule
