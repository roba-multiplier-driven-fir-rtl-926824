// fir: 4-tap direct-form FIR filter whose multipliers are RoBA
// approximate multipliers, y[n] = sum_{k=0..3} h_k * x[n-k].
//
// A three-stage delay line holds x[n-1], x[n-2], x[n-3]; the live input is
// x[n]. Each tap feeds one RoBA_mul (coefficient on A, sample on B), whose
// input and output registers form the first two pipeline stages. Three 2N-bit Kogge-Stone
// adders sum the four products and the sum is registered into y.
//
// Interface: clk, rst (synchronous, active high, clears the delay line,
// the products and y); h0..h3 signed N-bit coefficients, applied as plain
// inputs (changing them takes effect on the next sample); x signed N-bit
// sample, one per clock; y signed 2N-bit output.
// Timing: the sample present before rising edge t first appears in y after
// edge t+2 (latency three cycles, throughput one sample per cycle).
// The sum wraps modulo 2^(2N): the adders' carry-outs are left open.
// Follows the published filter symbol (ports h0..h3, x, clk, rst, y; N=32)
// and its use of four RoBA multipliers; the output register, the
// three-stage pipeline it gives and the adder chain are this design's
// choice.
module fir #(
  parameter int unsigned N = roba_pkg::ROBA_N
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [N-1:0]   h0,
  input  logic [N-1:0]   h1,
  input  logic [N-1:0]   h2,
  input  logic [N-1:0]   h3,
  input  logic [N-1:0]   x,
  output logic [2*N-1:0] y
);
  localparam int unsigned TAPS = roba_pkg::FIR_TAPS;

  logic [TAPS-1:0][N-1:0]   h;
  logic [TAPS-1:0][N-1:0]   tap;      // tap[k] = x[n-k]
  logic [TAPS-1:1][N-1:0]   dly;      // delay line registers
  logic [TAPS-1:0][2*N-1:0] prod;
  logic [TAPS-1:0][2*N-1:0] acc;      // running sums of the products

  assign h = {h3, h2, h1, h0};

  always_ff @(posedge clk) begin
    if (rst) begin
      dly <= '0;
    end else begin
      dly[1] <= x;
      for (int k = 2; k < TAPS; k++) dly[k] <= dly[k-1];
    end
  end

  always_comb begin
    tap[0] = x;
    for (int k = 1; k < TAPS; k++) tap[k] = dly[k];
  end

  assign acc[0] = prod[0];

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    RoBA_mul #(.N(N)) u_mul (
      .clk(clk), .rst(rst), .A(h[k]), .B(tap[k]), .Final_Out(prod[k])
    );
    if (k > 0) begin : g_add
      kogge_stone_adder #(.W(2 * N)) u_add (
        .a(acc[k-1]), .b(prod[k]), .cin(1'b0), .sum(acc[k]), .cout()
      );
    end
  end

  always_ff @(posedge clk) begin
    if (rst) y <= '0;
    else     y <= acc[TAPS-1];
  end
endmodule
