// tb_fir: end-to-end test of the 4-tap RoBA FIR filter at its default
// size (32-bit samples and coefficients, 64-bit output).
//
// One sample enters per clock. The expected output is built from the
// filter equation y[n] = sum h_k * x[n-k], with every product taken as the
// reference approximate product of roba_ref_pkg and a three-cycle latency
// (samples before a reset count as zero). Phases:
//   1. impulse and step with power-of-two coefficients: the output must
//      equal the exact convolution, with x = 1 giving h0..h3 in turn;
//   2. random signed coefficients and samples, coefficients changed
//      on the fly, zeros and the value 3 mixed in;
//   3. a reset in the middle of the stream, then more random data.
// Every output is checked; the cases the design handles differently
// (rounding up, rounding down, 3 -> 2, zero operand, negative product,
// two negative operands, reset, coefficient change) are counted, and one
// that never occurs counts as a failure.
module tb_fir;
  import roba_ref_pkg::*;
  logic        clk = 0, rst;
  logic [31:0] h [4];
  logic [31:0] x;
  logic [63:0] y;

  // model state: delayed samples, products, output
  logic [31:0] m_dly [4];
  logic [63:0] m_stage [4];     // product of the multipliers' input registers
  logic [63:0] m_prod [4];
  logic [63:0] m_y;
  bit          exact_phase;
  longint      exact_hist [8];   // exact convolution, delayed like the output
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_three = 0, n_zero = 0, n_neg = 0, n_both_neg = 0;
  int n_reset = 0, n_coef_change = 0;

  fir dut (.clk(clk), .rst(rst), .h0(h[0]), .h1(h[1]), .h2(h[2]), .h3(h[3]), .x(x), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock: update the model with the inputs now applied, then compare.
  task automatic step();
    logic [63:0] y_next;
    logic [31:0] tp;
    longint      ex;
    y_next = m_prod[0] + m_prod[1] + m_prod[2] + m_prod[3];
    ex = 0;
    for (int k = 0; k < 4; k++) begin
      tp = (k == 0) ? x : m_dly[k];
      ex += longint'($signed(h[k])) * longint'($signed(tp));
      m_prod[k]  = rst ? 64'h0 : m_stage[k];
      m_stage[k] = rst ? 64'h0 : ref_roba(h[k], tp);
      if (!rst) begin
        if (rounds_up(h[k]) || rounds_up(tp)) n_up++;
        if (ref_round(ref_abs32(tp)) < ref_abs32(tp)) n_down++;
        if (ref_abs32(h[k]) == 3 || ref_abs32(tp) == 3) n_three++;
        if (h[k] == 0 || tp == 0) n_zero++;
        if (h[k] != 0 && tp != 0 && h[k][31] != tp[31]) n_neg++;
        if (h[k][31] && tp[31]) n_both_neg++;
      end
    end
    for (int k = 7; k > 0; k--) exact_hist[k] = exact_hist[k-1];
    exact_hist[0] = rst ? 0 : ex;
    for (int k = 3; k > 1; k--) m_dly[k] = rst ? 32'h0 : m_dly[k-1];
    m_dly[1] = rst ? 32'h0 : x;
    m_y = rst ? 64'h0 : y_next;
    @(posedge clk); #1;
    checks++;
    if (y !== m_y) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t y=%0d expect=%0d", $time, $signed(y), $signed(m_y));
    end
    if (exact_phase) begin
      checks++;
      if (y !== 64'(exact_hist[2])) begin
        failures++;
        if (failures < 10) $display("FAIL exact t=%0t y=%0d expect=%0d", $time, $signed(y), exact_hist[2]);
      end
    end
  endtask

  function automatic logic [31:0] rnd_operand();
    logic [31:0] v;
    case ($urandom % 8)
      0: v = 0;
      1: v = 3;
      default: v = $urandom >> ($urandom % 32);
    endcase
    if ($urandom % 2) v = -v;
    return v;
  endfunction

  initial begin
    rst = 1; x = 0;
    h[0] = 32'd1; h[1] = 32'd2; h[2] = -32'sd4; h[3] = 32'd1024;
    for (int k = 0; k < 4; k++) begin m_dly[k] = 0; m_prod[k] = 0; m_stage[k] = 0; end
    for (int k = 0; k < 8; k++) exact_hist[k] = 0;
    m_y = 0; exact_phase = 0;
    step(); step();
    rst = 0; n_reset++;

    // Phase 1: power-of-two coefficients, impulse then steps and random x.
    exact_phase = 1;
    x = 1; step();
    x = 0; step(); step(); step(); step(); step();
    // after the impulse the outputs were h0, h1, h2, h3 (three cycles late)
    for (int i = 0; i < 200; i++) begin x = rnd_operand(); step(); end
    exact_phase = 0;

    // Phase 2: random coefficients, changed every 50 samples.
    for (int blk = 0; blk < 40; blk++) begin
      for (int k = 0; k < 4; k++) h[k] = rnd_operand();
      n_coef_change++;
      for (int i = 0; i < 50; i++) begin x = rnd_operand(); step(); end
    end

    // Phase 3: reset in the middle of the stream, then carry on.
    rst = 1; x = 32'h1234_5678; step(); rst = 0; n_reset++;
    for (int i = 0; i < 500; i++) begin x = rnd_operand(); step(); end

    $display("cases: up=%0d down=%0d three=%0d zero=%0d neg=%0d both_neg=%0d reset=%0d coef_change=%0d",
             n_up, n_down, n_three, n_zero, n_neg, n_both_neg, n_reset, n_coef_change);
    if (n_up == 0 || n_down == 0 || n_three == 0 || n_zero == 0 || n_neg == 0 ||
        n_both_neg == 0 || n_reset < 2 || n_coef_change == 0) begin
      failures++; $display("FAIL a case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
