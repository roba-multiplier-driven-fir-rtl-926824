// barrel_shifter: multiplies an N-bit operand by a power of two.
//
// In the RoBA multiplier every product that involves a rounded operand is a
// shift: data * 2^k. The shift amount k = log2(pow2) is found by encoding
// the one-hot rounded value, and a logarithmic barrel shifter with
// $clog2(2N) stages shifts the operand, widened to 2N bits. A zero pow2
// (a zero operand) gives a zero product.
//
// Interface: data N bits, pow2 N-bit one-hot (or zero); prod 2N bits.
// Combinational. The three shifters, their N-bit inputs and 2N-bit outputs
// follow the published description; the encoder and the stage structure
// are this design's choice.
module barrel_shifter #(
  parameter int unsigned N = roba_pkg::ROBA_N
) (
  input  logic [N-1:0]   data,
  input  logic [N-1:0]   pow2,
  output logic [2*N-1:0] prod
);
  localparam int unsigned SW = $clog2(2 * N);

  logic [SW-1:0] shamt;
  logic          nonzero;

  // One-hot to binary: bit j of the amount is the OR of pow2[i] with i[j]=1.
  always_comb begin
    shamt   = '0;
    nonzero = |pow2;
    for (int i = 0; i < N; i++)
      if (pow2[i]) shamt = shamt | SW'(i);
  end

  // Logarithmic shifter: stage s shifts by 2^s when shamt[s] is set.
  always_comb begin
    logic [2*N-1:0] v;
    v = nonzero ? {{N{1'b0}}, data} : '0;
    for (int s = 0; s < SW; s++)
      if (shamt[s]) v = v << (1 << s);
    prod = v;
  end
endmodule
