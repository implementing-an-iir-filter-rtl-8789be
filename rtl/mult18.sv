// mult18: registered 18x18 signed multiplier.
//
// This is the dedicated hardware multiplier the engine is built around; a
// 35x35 product is formed from four of its products (see mul_shifter).  The
// LSB halves of the operands are presented with a zero sign bit, so signed
// multiplication is correct for all four pairings.  Latency one clock.
module mult18
  import iir_pkg::*;
(
  input  logic              clk,
  input  logic [HALF_W-1:0] a,
  input  logic [HALF_W-1:0] b,
  output logic [PROD_W-1:0] p
);

  always_ff @(posedge clk) p <= PROD_W'($signed(a) * $signed(b));

endmodule
