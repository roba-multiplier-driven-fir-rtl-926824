// tb_kogge_stone_adder: checks a 64-bit and a 16-bit instance (the two
// widths the multiplier and the classic 16-bit illustration use) against
// plain wide addition, with long carry chains and random operands.
module tb_kogge_stone_adder;
  logic [63:0] a, b, s;
  logic        cin, cout;
  logic [15:0] a16, b16, s16;
  logic        cout16;
  logic [64:0] e;
  logic [16:0] e16;
  int checks = 0, failures = 0;

  kogge_stone_adder #(.W(64)) dut   (.a(a), .b(b), .cin(cin), .sum(s), .cout(cout));
  kogge_stone_adder #(.W(16)) dut16 (.a(a16), .b(b16), .cin(cin), .sum(s16), .cout(cout16));

  task automatic check(input logic [63:0] va, input logic [63:0] vb, input logic vc);
    a = va; b = vb; cin = vc; a16 = va[15:0]; b16 = vb[15:0]; #1;
    e   = 65'(va) + 65'(vb) + 65'(vc);
    e16 = 17'(va[15:0]) + 17'(vb[15:0]) + 17'(vc);
    checks++;
    if ({cout, s} !== e || {cout16, s16} !== e16) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h cin=%b sum=%h cout=%b", va, vb, vc, s, cout);
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('1, 64'd0, 1'b1);
    check('1, 64'd1, 1'b0);
    check(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 1'b0);
    for (int i = 0; i < 64; i++) check(~(64'(1) << i) , 64'(1) << i, 1'b1);
    for (int i = 0; i < 3000; i++) check({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
