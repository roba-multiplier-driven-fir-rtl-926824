// rounding: rounds two non-negative N-bit magnitudes to their nearest
// power of two (Ar, Br), the heart of the RoBA approximation.
//
// Each output bit follows the published logic equations:
//   Ar[i] = (~A[i] & A[i-1] & A[i-2] | A[i] & ~A[i-1]) & ~|A[N-1:i+1]  (i >= 3)
//   Ar[2] = A[2] & ~A[1] & ~|A[N-1:3]
//   Ar[1] = A[1] & ~|A[N-1:2]
//   Ar[0] = A[0] & ~|A[N-1:1]
// So a value whose leading one sits at bit p rounds up to 2^(p+1) when bit
// p-1 is also set (ties, 3*2^(p-1), go up) and down to 2^p otherwise; the
// exception is 3, which rounds down to 2. The result is one-hot, or zero
// for a zero input. The input's MSB is assumed zero (a magnitude of a
// signed number, at most 2^(N-1)), so Ar never needs an (N+1)th bit.
//
// Interface: a, b magnitudes in; ar, br one-hot N-bit out. Combinational.
module rounding #(
  parameter int unsigned N = roba_pkg::ROBA_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] ar,
  output logic [N-1:0] br
);
  // Nearest power of two of one operand, bit by bit as in the equations.
  function automatic logic [N-1:0] nearest_pow2(input logic [N-1:0] v);
    logic [N-1:0] r;
    logic         upper_zero;   // all bits above the current one are zero
    upper_zero = 1'b1;
    for (int i = N - 1; i >= 0; i--) begin
      if (i >= 3)
        r[i] = ((~v[i] & v[i-1] & v[i-2]) | (v[i] & ~v[i-1])) & upper_zero;
      else if (i == 2)
        r[i] = v[2] & ~v[1] & upper_zero;
      else
        r[i] = v[i] & upper_zero;
      upper_zero = upper_zero & ~v[i];
    end
    return r;
  endfunction

  always_comb begin
    ar = nearest_pow2(a);
    br = nearest_pow2(b);
  end
endmodule
