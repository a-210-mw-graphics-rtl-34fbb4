// beq_bank: one 256-byte bank of the bandwidth equalizer's dual-ported
// SRAM, 16 entries of 128 bits. Port A (RISC clock) writes any of the four
// 32-bit words of an entry and reads a whole entry with one cycle of
// latency; port B (rendering-engine side) reads an entry combinationally.
// A port only accesses the array while its enable is high, which is how
// the flow controller keeps idle banks inactive.
module beq_bank (
  input  logic         clk_a,
  input  logic         en_a,
  input  logic [3:0]   we_a,     // word write enables, word k = bits [32k+31:32k]
  input  logic [3:0]   addr_a,
  input  logic [127:0] wdata_a,
  output logic [127:0] rdata_a,
  input  logic         en_b,
  input  logic [3:0]   addr_b,
  output logic [127:0] rdata_b
);
  logic [127:0] mem [16];

  always_ff @(posedge clk_a)
    if (en_a) begin
      for (int k = 0; k < 4; k++)
        if (we_a[k]) mem[addr_a][32*k +: 32] <= wdata_a[32*k +: 32];
      rdata_a <= mem[addr_a];
    end

  assign rdata_b = en_b ? mem[addr_b] : '0;
endmodule
