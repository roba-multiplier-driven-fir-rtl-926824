// sign_set: gives the unsigned approximate product the sign of the true
// product and registers it as the multiplier's output.
//
// The product is negative when exactly one operand was negative
// (sa ^ sb); the magnitude is then negated in two's complement. The result
// is captured on the rising clock edge, so the multiplier has one cycle of
// latency. rst is synchronous and active high and clears the output.
//
// Interface: clk, rst; mag 2N-bit unsigned product; sa, sb operand signs;
// y 2N-bit signed product, registered. The sign-set stage follows the
// published block diagram; the output register and the reset style are
// this design's choice (the published symbol has clk and rst ports).
module sign_set #(
  parameter int unsigned N = roba_pkg::ROBA_N
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [2*N-1:0] mag,
  input  logic           sa,
  input  logic           sb,
  output logic [2*N-1:0] y
);
  logic [2*N-1:0] y_next;

  always_comb y_next = (sa ^ sb) ? (~mag + 1'b1) : mag;

  always_ff @(posedge clk) begin
    if (rst) y <= '0;
    else     y <= y_next;
  end
endmodule
