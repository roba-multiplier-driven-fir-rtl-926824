// tb_rounding: checks the nearest-power-of-two logic. Every value below
// 4096 is tried, then, for every bit position, the values around the
// rounding midpoint 3*2^(p-1) and the interval ends, then random values.
// The reference finds the leading one and compares with the midpoint.
module tb_rounding;
  import roba_ref_pkg::*;
  logic [31:0] a, b, ar, br;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0;

  rounding #(.N(32)) dut (.a(a), .b(b), .ar(ar), .br(br));

  task automatic check(input logic [31:0] va, input logic [31:0] vb);
    a = va; b = vb; #1;
    checks++;
    if (ar != ref_round(64'(va))[31:0] || br != ref_round(64'(vb))[31:0]) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d ar=%0d b=%0d br=%0d", va, ar, vb, br);
    end
    if (ar > va) n_up++; else if (ar < va) n_down++;
  endtask

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] lo;
    for (int v = 0; v < 4096; v++) check(v, 4095 - v);
    for (int p = 2; p < 31; p++) begin
      lo = 32'(1) << p;
      check(lo + (lo >> 1) - 1, lo + (lo >> 1));   // just below / at the midpoint
      check(lo + (lo >> 1) + 1, (lo << 1) - 1);
    end
    check(32'h8000_0000, 32'h6000_0000);           // largest magnitudes
    for (int i = 0; i < 2000; i++) check($urandom >> 1, $urandom >> ($urandom % 31 + 1));
    if (n_up == 0 || n_down == 0) begin
      failures++;
      $display("FAIL rounding up (%0d) or down (%0d) never seen", n_up, n_down);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
