// tb_sign_set: checks that the registered output carries the magnitude
// with the sign sa ^ sb exactly one clock edge after the inputs, and that
// the synchronous reset clears it.
module tb_sign_set;
  logic clk = 0, rst;
  logic [63:0] mag, y, expect_v;
  logic sa, sb;
  int checks = 0, failures = 0;

  sign_set #(.N(32)) dut (.clk(clk), .rst(rst), .mag(mag), .sa(sa), .sb(sb), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; mag = 64'h1234; sa = 0; sb = 0;
    @(posedge clk); #1;
    checks++; if (y !== 0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    for (int i = 0; i < 1000; i++) begin
      mag = {1'b0, $urandom, 31'($urandom)}; sa = 1'($urandom); sb = 1'($urandom);
      expect_v = (sa != sb) ? 64'(-longint'(mag)) : mag;
      checks++;
      if (y === expect_v && i > 0 && mag != 0) begin
        failures++; $display("FAIL output changed before the clock edge");
      end
      @(posedge clk); #1;
      checks++;
      if (y !== expect_v) begin
        failures++;
        if (failures < 10) $display("FAIL mag=%h sa=%b sb=%b y=%h", mag, sa, sb, y);
      end
    end
    rst = 1; @(posedge clk); #1;
    checks++; if (y !== 0) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
