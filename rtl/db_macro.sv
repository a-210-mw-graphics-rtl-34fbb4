// db_macro: one 512-kbit depth-buffer eDRAM macro (32768 words of 16-bit
// depth). Like the frame-buffer macro it has separate read and write buses
// and completes a read-modify-write in one cycle: `rdata` shows the word at
// `addr` in the same cycle, and with `en` and the write mask `wmask` high
// the word becomes `wdata` at the clock edge. The write mask is the result
// of the depth comparison. Organisation and latency follow the chip; the
// array is a register array and refresh is not modelled.
module db_macro #(
  parameter int AW = 15,
  parameter int DW = 16
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
