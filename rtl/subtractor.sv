// subtractor: diff = a - b on W bits, the last arithmetic step of the RoBA
// multiplier, which removes Ar*Br from Ar*B + Br*A.
//
// It is built on the Kogge-Stone adder as a + ~b + 1. In the multiplier the
// result is never negative (the approximation is at least half of Ar*Br),
// so no borrow is produced there; borrow is still brought out.
//
// Interface: a, b W bits; diff W bits; borrow = 1 when a < b (unsigned).
// Combinational. Building it from the prefix adder is this design's choice.
module subtractor #(
  parameter int unsigned W = 2 * roba_pkg::ROBA_N
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] diff,
  output logic         borrow
);
  logic cout;

  kogge_stone_adder #(.W(W)) u_add (
    .a   (a),
    .b   (~b),
    .cin (1'b1),
    .sum (diff),
    .cout(cout)
  );

  assign borrow = ~cout;
endmodule
