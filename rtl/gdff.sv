// gdff: gated D flip-flop, the glitch-free clock gate of the power
// optimizer. The enable `d` is sampled by a flip-flop on the falling edge of
// `ck` and the output clock is `gq = q & ck`. Because the enable can only
// change while `ck` is low, `gq` is either a whole high phase of `ck` or
// nothing: switching the enable never produces a shortened pulse. The
// structure (flip-flop clocked by the inverted clock, output gate combining
// the stored enable with the clock) follows the chip's GDFF circuit; the
// reset that clears the stored enable is this design's.
module gdff (
  input  logic rst_n,
  input  logic ck,
  input  logic d,
  output logic gq
);
  logic q;

  always_ff @(negedge ck or negedge rst_n)
    if (!rst_n) q <= 1'b0;
    else        q <= d;

  assign gq = q & ck;
endmodule
