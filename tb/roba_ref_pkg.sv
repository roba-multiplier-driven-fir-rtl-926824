// roba_ref_pkg: reference arithmetic for the RoBA testbenches.
//
// Worked out from the definition of the method, not from the RTL's bit
// equations: the nearest power of two is found from the position p of the
// leading one and a comparison with the midpoint 3*2^(p-1) (ties round up,
// and 3 rounds down to 2); the approximate product is then evaluated with
// ordinary wide integer arithmetic as Ar*|B| + Br*|A| - Ar*Br, with the sign
// of the true product. Values are handled as 32-bit operands.
package roba_ref_pkg;
  typedef logic [127:0] wide_t;

  function automatic logic [63:0] ref_round(input logic [63:0] v);
    int p;
    logic [63:0] lo;
    if (v == 0) return 0;
    p = 63;
    while (v[p] == 1'b0) p--;
    lo = 64'(1) << p;
    if (p >= 2 && v >= 3 * (lo >> 1)) return lo << 1;
    return lo;
  endfunction

  function automatic logic [63:0] ref_abs32(input logic [31:0] v);
    longint s;
    s = longint'($signed(v));
    return (s < 0) ? 64'(-s) : 64'(s);
  endfunction

  // Signed approximate product of two 32-bit operands, as 64 bits.
  function automatic logic [63:0] ref_roba(input logic [31:0] a, input logic [31:0] b);
    wide_t ma, mb, ar, br, m;
    ma = wide_t'(ref_abs32(a));
    mb = wide_t'(ref_abs32(b));
    ar = wide_t'(ref_round(64'(ma)));
    br = wide_t'(ref_round(64'(mb)));
    m  = ar * mb + br * ma - ar * br;
    if (a[31] != b[31]) m = -m;
    return m[63:0];
  endfunction

  // 1 when the magnitude is rounded up, 0 when down or exact.
  function automatic bit rounds_up(input logic [31:0] v);
    return ref_round(ref_abs32(v)) > ref_abs32(v);
  endfunction
endpackage
