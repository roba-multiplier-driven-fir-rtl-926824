// tb_subtractor: compares the 64-bit subtractor with plain wide
// subtraction, borrow included, for edge and random operands.
module tb_subtractor;
  logic [63:0] a, b, d;
  logic        borrow;
  int checks = 0, failures = 0;

  subtractor #(.W(64)) dut (.a(a), .b(b), .diff(d), .borrow(borrow));

  task automatic check(input logic [63:0] va, input logic [63:0] vb);
    a = va; b = vb; #1;
    checks++;
    if (d !== va - vb || borrow !== (va < vb)) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h d=%h borrow=%b", va, vb, d, borrow);
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0); check(0, 1); check('1, '1); check(64'h1_0000_0000, 1);
    for (int i = 0; i < 3000; i++) check({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
