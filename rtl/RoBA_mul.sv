// RoBA_mul: signed rounding-based approximate multiplier.
//
// Main idea: round each operand to its nearest power of two (Ar, Br).
// Then A*B = Ar*B + Br*A - Ar*Br + (Ar-A)*(Br-B), and dropping the last,
// usually small, term leaves only products with a power of two, i.e.
// shifts:  A*B ~= Ar*B + Br*A - Ar*Br.
//
// Datapath (input register, then combinational up to the output register):
//   in regs       A, B captured on the clock edge
//   sign_det      |A|, |B| and the signs sa, sb
//   rounding      Ar, Br (one-hot nearest powers of two of |A|, |B|)
//   3 shifters    Br*|A|, Ar*|B|, Ar*Br (2N bits each)
//   KS adder      Ar*|B| + Br*|A|, 2N-bit Kogge-Stone
//   subtractor    minus Ar*Br
//   sign_set      negate when sa ^ sb, register -> Final_Out
// The product is exact whenever either operand is a power of two (or 0).
//
// Interface: clk, rst (synchronous, active high); A, B signed N bits;
// Final_Out signed 2N bits, valid two clock edges after A and B are applied
// (one new product per cycle). The port names, widths (N = 32), the
// sign_det/sign_set sub-blocks and the registers on the inputs and on the
// outcome follow the published design; the exact pipeline (one register
// stage each side of the combinational datapath) is this design's choice.
module RoBA_mul #(
  parameter int unsigned N = roba_pkg::ROBA_N
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [N-1:0]   A,
  input  logic [N-1:0]   B,
  output logic [2*N-1:0] Final_Out
);
  logic [N-1:0]   a_q, b_q;
  logic [N-1:0]   abs_a, abs_b, ar, br;
  logic           sa, sb;
  logic [2*N-1:0] br_x_a, ar_x_b, ar_x_br, sum_ab, mag;
  logic           sum_cout, sub_borrow;

  always_ff @(posedge clk) begin
    if (rst) begin
      a_q <= '0;
      b_q <= '0;
    end else begin
      a_q <= A;
      b_q <= B;
    end
  end

  sign_det #(.N(N)) sd (
    .a(a_q), .b(b_q), .abs_a(abs_a), .abs_b(abs_b), .sa(sa), .sb(sb)
  );

  rounding #(.N(N)) u_round (
    .a(abs_a), .b(abs_b), .ar(ar), .br(br)
  );

  barrel_shifter #(.N(N)) u_sh_bra  (.data(abs_a), .pow2(br), .prod(br_x_a));
  barrel_shifter #(.N(N)) u_sh_arb  (.data(abs_b), .pow2(ar), .prod(ar_x_b));
  barrel_shifter #(.N(N)) u_sh_arbr (.data(ar),    .pow2(br), .prod(ar_x_br));

  kogge_stone_adder #(.W(2 * N)) u_add (
    .a(ar_x_b), .b(br_x_a), .cin(1'b0), .sum(sum_ab), .cout(sum_cout)
  );

  subtractor #(.W(2 * N)) u_sub (
    .a(sum_ab), .b(ar_x_br), .diff(mag), .borrow(sub_borrow)
  );

  sign_set #(.N(N)) ss (
    .clk(clk), .rst(rst), .mag(mag), .sa(sa), .sb(sb), .y(Final_Out)
  );

  // Neither carry can occur: |A|,|B| <= 2^(N-1) keep every term below 2^(2N-1).
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (!sum_cout)   else $error("RoBA_mul: adder carry-out");
      assert (!sub_borrow) else $error("RoBA_mul: subtractor borrow");
    end
  end
endmodule
