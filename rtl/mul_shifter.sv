// mul_shifter: aligns one partial product to the accumulator format.
//
// The 36-bit product of two 18-bit operand halves is placed into a 73-bit
// word at its weight: LSB*LSB unshifted and not sign extended (both factors
// are positive 17-bit values), LSB*MSB and MSB*LSB shifted left 17, MSB*MSB
// shifted left 34, the latter two sign extended.  The top 48 bits (the low 25
// are dropped) form the accumulator addend.  The alignment and the dropped
// bits follow the document.  Registered, latency one clock.
module mul_shifter
  import iir_pkg::*;
(
  input  logic              clk,
  input  logic [PROD_W-1:0] a,    // partial product
  input  logic [1:0]        sel,  // MS_* alignment
  output logic [ACC_W-1:0]  b     // aligned, truncated addend
);

  localparam int unsigned FULL_W = 2 * VAL_W + 3;  // 73

  logic [FULL_W-1:0] s;

  always_comb begin
    unique case (sel)
      MS_LL:   s = {{(FULL_W - 34){1'b0}}, a[33:0]};
      MS_X:    s = {{(FULL_W - PROD_W - LSB_W){a[PROD_W-1]}}, a, {LSB_W{1'b0}}};
      default: s = {{(FULL_W - PROD_W - 2*LSB_W){a[PROD_W-1]}}, a, {(2*LSB_W){1'b0}}};
    endcase
  end

  always_ff @(posedge clk) b <= s[FULL_W-1:ACC_DROP];

endmodule
