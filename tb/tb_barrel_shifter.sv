// tb_barrel_shifter: drives every shift amount 0..31 with random data and
// a zero pow2, and compares with data * 2^k computed in 64 bits.
module tb_barrel_shifter;
  logic [31:0] data, pow2;
  logic [63:0] prod, expect_v;
  int checks = 0, failures = 0;

  barrel_shifter #(.N(32)) dut (.data(data), .pow2(pow2), .prod(prod));

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int k;
      k = i % 33;
      data = (i % 7 == 0) ? 32'hFFFF_FFFF : $urandom;
      pow2 = (k == 32) ? 32'h0 : 32'(1) << k;
      expect_v = (k == 32) ? 64'h0 : 64'(data) * (64'(1) << k);
      #1;
      checks++;
      if (prod !== expect_v) begin
        failures++;
        if (failures < 10) $display("FAIL data=%h k=%0d prod=%h expect=%h", data, k, prod, expect_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
