// fb_macro: one 768-kbit frame-buffer eDRAM macro (32768 words of 24-bit
// RGB). It has separate read and write buses so that a pixel can be read,
// modified by the pixel processor and written back within one clock cycle:
// the word at `addr` appears on `rdata` in the same cycle (latency 0), and
// when `en` and the write mask `wmask` are high the word is replaced by
// `wdata` at the clock edge that ends the cycle. With `wmask` low the cycle
// is a plain read. The organisation, the latency and the write mask follow
// the chip; the cell array is modelled as a register array and auto refresh
// is not modelled (nothing is lost in a model without leakage).
module fb_macro #(
  parameter int AW = 15,
  parameter int DW = 24
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] addr,
  input  logic          wmask,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  assign rdata = mem[addr];

  always_ff @(posedge clk)
    if (en && wmask) mem[addr] <= wdata;
endmodule
