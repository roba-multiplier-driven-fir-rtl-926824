// tb_sign_det: checks the sign detector on corner values (0, -1, the most
// negative and most positive numbers) and on random operands against
// magnitudes computed with 64-bit signed arithmetic.
module tb_sign_det;
  import roba_ref_pkg::*;
  logic [31:0] a, b, abs_a, abs_b;
  logic sa, sb;
  int checks = 0, failures = 0;

  sign_det #(.N(32)) dut (.a(a), .b(b), .abs_a(abs_a), .abs_b(abs_b), .sa(sa), .sb(sb));

  task automatic check(input logic [31:0] va, input logic [31:0] vb);
    a = va; b = vb; #1;
    checks++;
    if (abs_a != ref_abs32(va)[31:0] || abs_b != ref_abs32(vb)[31:0] ||
        sa != ($signed(va) < 0) || sb != ($signed(vb) < 0)) begin
      failures++;
      $display("FAIL a=%0d b=%0d abs_a=%0d abs_b=%0d sa=%b sb=%b", $signed(va), $signed(vb), abs_a, abs_b, sa, sb);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 32'hFFFF_FFFF);
    check(32'h8000_0000, 32'h7FFF_FFFF);
    check(32'h7FFF_FFFF, 32'h8000_0001);
    for (int i = 0; i < 2000; i++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
