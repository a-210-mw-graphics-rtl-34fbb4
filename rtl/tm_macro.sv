// tm_macro: one 6-Mbit texture-memory eDRAM macro (262144 texels of 24-bit
// RGB) with a single 24-bit I/O path. A read issued in one cycle (`en`
// high, `we` low) returns its texel on `rdata` after the next clock edge
// (latency 1); a write (`en` and `we` high) stores `wdata` at the edge.
// `rdata` holds its value while no read is issued. Size, bus width and
// latency follow the chip; the array is a register array and refresh is not
// modelled.
module tm_macro #(
  parameter int AW = 18,
  parameter int DW = 24
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (en && we)  mem[addr] <= wdata;
    if (en && !we) rdata <= mem[addr];
  end
endmodule
