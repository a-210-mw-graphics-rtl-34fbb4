// mac32: single-cycle 32 x 32 multiply-accumulate unit of the geometry RISC.
// The processor uses it for fixed-point vertex transforms and for IDCT. One
// operation is accepted per clock when `en` is high: the signed (or unsigned,
// with `uns`) 64-bit product of a and b is either loaded into the
// accumulator (`acc_clr`) or added to it. The accumulator is visible on
// `acc` the cycle after the operation. The single-cycle 32x32 MAC is the
// chip's; the opcode bits, the 64-bit accumulator and the asynchronous reset
// are this design's choices.
module mac32 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,       // perform one operation this cycle
  input  logic        acc_clr,  // 1: acc = a*b, 0: acc = acc + a*b
  input  logic        uns,      // 1: unsigned operands
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [63:0] acc
);
  logic [63:0] prod;

  always_comb begin
    if (uns) prod = {32'd0, a} * {32'd0, b};
    else     prod = 64'($signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b}));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= (acc_clr ? 64'd0 : acc) + prod;
  end
endmodule
