// tb_RoBA_mul: end-to-end check of the 32-bit signed RoBA multiplier.
//
// A new operand pair is applied every cycle and Final_Out is compared
// two clock edges later with the reference approximate product (wide integer
// arithmetic, see roba_ref_pkg), which checks the two-cycle latency and the
// one-product-per-cycle rate. Stimulus: the 0x33333333 x 0x44444444 example
// (approximate product 999198636824854528 against the exact
// 983826350139712908), signs in all four combinations, zero, powers of two
// (for which the product must be exact), the most negative operand, the
// value 3, and random operands of random length. Each case class is
// counted, and a class that never occurs counts as a failure.
module tb_RoBA_mul;
  import roba_ref_pkg::*;
  logic clk = 0, rst;
  logic [31:0] A, B;
  logic [63:0] y, expect_q;
  bit          expect_valid;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_neg = 0, n_both_neg = 0, n_zero = 0, n_exact = 0, n_three = 0;

  RoBA_mul dut (.clk(clk), .rst(rst), .A(A), .B(B), .Final_Out(y));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one pair per clock. Its product leaves the input register and the
  // output register two edges later, so each call checks the pair applied
  // by the call before it (which also checks the one-product-per-cycle
  // rate). has_k/k_val give an independently worked-out product to compare.
  logic [31:0] pa = 0, pb = 0;
  bit          p_has_k = 0;
  logic [63:0] p_k = 0;

  task automatic apply(input logic [31:0] va, input logic [31:0] vb,
                       input bit has_k = 0, input logic [63:0] k_val = 0);
    A = va; B = vb;
    @(posedge clk); #1;
    checks++;
    if (y !== ref_roba(pa, pb)) begin
      failures++;
      if (failures < 10) $display("FAIL A=%0d B=%0d y=%0d expect=%0d", $signed(pa), $signed(pb), $signed(y), $signed(ref_roba(pa, pb)));
    end
    if (p_has_k) begin
      checks++;
      if (y !== p_k) begin failures++; $display("FAIL A=%0d B=%0d y=%0d known=%0d", $signed(pa), $signed(pb), $signed(y), $signed(p_k)); end
    end
    if ((ref_abs32(pa) & (ref_abs32(pa) - 1)) == 0) begin
      // a power-of-two (or zero) operand makes the approximation exact
      n_exact++;
      checks++;
      if (y !== 64'(longint'($signed(pa)) * longint'($signed(pb)))) begin
        failures++; $display("FAIL not exact for A=%0d B=%0d", $signed(pa), $signed(pb));
      end
    end
    if (rounds_up(va) || rounds_up(vb)) n_up++;
    if (ref_round(ref_abs32(va)) < ref_abs32(va)) n_down++;
    if (va[31] != vb[31] && va != 0 && vb != 0) n_neg++;
    if (va[31] && vb[31]) n_both_neg++;
    if (va == 0 || vb == 0) n_zero++;
    if (ref_abs32(va) == 3) n_three++;
    pa = va; pb = vb; p_has_k = has_k; p_k = k_val;
  endtask

  initial begin
    rst = 1; A = 32'd7; B = 32'd9;
    @(posedge clk); #1;
    @(posedge clk); #1;
    checks++; if (y !== 0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    // Ar = Br = 2^30: 2^30 * (858993459 + 1145324612 - 2^30)
    apply(32'd858993459, 32'd1145324612, 1, 64'd999198636824854528);
    apply(32'd3, 32'd3, 1, 64'd8);           // 3 rounds down to 2: 2*3+2*3-4
    apply(-32'sd6, 32'd7, 1, -64'sd40);      // 6->8, 7->8: -(8*7+8*6-64)
    apply(32'h8000_0000, 32'h8000_0000);
    apply(32'h8000_0000, 32'h7FFF_FFFF);
    apply(0, 32'h1234_5678);
    apply(32'd1024, -32'sd12345);
    apply(-32'sd1, -32'sd1);
    for (int i = 0; i < 4000; i++)
      apply($urandom >> ($urandom % 32), $urandom >> ($urandom % 32));
    for (int i = 0; i < 500; i++)
      apply(-($urandom >> ($urandom % 32)), $urandom >> ($urandom % 32));
    for (int i = 0; i < 300; i++)
      apply(-($urandom >> ($urandom % 32)), -($urandom >> ($urandom % 32)));
    apply(0, 0);                             // flush the last pair
    $display("cases: up=%0d down=%0d neg=%0d both_neg=%0d zero=%0d exact=%0d three=%0d",
             n_up, n_down, n_neg, n_both_neg, n_zero, n_exact, n_three);
    if (n_up == 0 || n_down == 0 || n_neg == 0 || n_both_neg == 0 || n_zero == 0 ||
        n_exact == 0 || n_three == 0) begin
      failures++; $display("FAIL a case class never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
