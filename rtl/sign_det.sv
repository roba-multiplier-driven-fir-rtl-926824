// sign_det: sign detector at the input of the RoBA multiplier.
//
// The rounding step only works on non-negative numbers, so the multiplier
// first splits each two's-complement operand into a sign bit and a
// magnitude. The magnitude of an N-bit operand fits in N unsigned bits
// (the most negative value -2^(N-1) gives 2^(N-1)). The multiplier's sign
// set stage uses sa and sb to restore the sign of the product.
//
// Interface: a, b signed N-bit inputs; abs_a, abs_b unsigned N-bit
// magnitudes; sa, sb the operands' sign bits. Purely combinational.
// The block and its place follow the published block diagram; the use of a
// plain two's-complement negation is this design's choice.
module sign_det #(
  parameter int unsigned N = roba_pkg::ROBA_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] abs_a,
  output logic [N-1:0] abs_b,
  output logic         sa,
  output logic         sb
);
  always_comb begin
    sa    = a[N-1];
    sb    = b[N-1];
    abs_a = sa ? (~a + 1'b1) : a;
    abs_b = sb ? (~b + 1'b1) : b;
  end
endmodule
