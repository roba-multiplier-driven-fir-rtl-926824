// kogge_stone_adder: W-bit parallel-prefix adder of the Kogge-Stone kind.
//
// Three phases: (1) bitwise generate g=a&b and propagate p=a^b, with the
// carry-in folded into bit 0's generate; (2) $clog2(W) prefix levels, level
// l combining each bit with the one 2^(l-1) places below it,
//   G[i] = G[i] | P[i] & G[i-d],  P[i] = P[i] & P[i-d];
// (3) sum[i] = p[i] ^ carry[i], carry[i] being the group generate of bits
// i-1..0. Carries thus settle in log2(W) levels.
//
// Interface: a, b W bits, cin; sum W bits, cout. Combinational.
// The algorithm follows the published parallel-prefix description; the
// width is a parameter (2N = 64 in the multiplier).
module kogge_stone_adder #(
  parameter int unsigned W = 2 * roba_pkg::ROBA_N
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned L = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0]      p0;
  logic [L:0][W-1:0] gl;   // group generate after each prefix level
  logic [L:0][W-1:0] pl;   // group propagate after each prefix level

  // Phase 1: bitwise generate and propagate; cin enters through bit 0.
  assign p0    = a ^ b;
  assign pl[0] = p0;
  assign gl[0] = {a[W-1:1] & b[W-1:1], (a[0] & b[0]) | (p0[0] & cin)};

  // Phase 2: prefix levels, distance 2^(l-1) at level l.
  for (genvar l = 1; l <= L; l++) begin : g_level
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i >= (1 << (l - 1))) begin : g_op
        assign gl[l][i] = gl[l-1][i] | (pl[l-1][i] & gl[l-1][i - (1 << (l - 1))]);
        assign pl[l][i] = pl[l-1][i] & pl[l-1][i - (1 << (l - 1))];
      end else begin : g_buf
        assign gl[l][i] = gl[l-1][i];
        assign pl[l][i] = pl[l-1][i];
      end
    end
  end

  // Phase 3: sum bits from the propagates and the carries into each bit.
  assign sum  = p0 ^ {gl[L][W-2:0], cin};
  assign cout = gl[L][W-1];
endmodule
