// sng: stochastic number generator.
//
// Compares an N-bit unsigned binary number x with an N-bit random number r
// (from an LFSR) and outputs 1 when x > r. When r runs over the LFSR's
// values 1 .. 2^N-1, the output is 1 for x-1 of them, so the bit-stream density
// is close to x / 2^N: the unipolar stochastic form of x. The comparator is the
// usual way to build an SNG; the design only names the block.
//
// Purely combinational: bit follows x and r in the same cycle.
module sng #(
  parameter int N = 18
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] r,
  output logic         bit_out
);

  assign bit_out = (x > r);

endmodule
