// accumulator: the MAC's accumulator register.
//
// On each enabled clock the sum is cleared (R), loaded with P (L), or has A
// added to it, in that priority.  In the engine P is the sum itself shifted
// right by the section gain exponent, so a load applies c0 to the partial
// sum of the feed-forward terms.  Width per the document (48 bits); the
// addition wraps, overflow is caught downstream by overflow_detect.
module accumulator #(
  parameter int unsigned WIDTH = 48
) (
  input  logic             clk,
  input  logic             ce,
  input  logic             r,   // clear
  input  logic             l,   // load p
  input  logic [WIDTH-1:0] a,   // addend
  input  logic [WIDTH-1:0] p,   // load value
  output logic [WIDTH-1:0] b    // sum
);

  always_ff @(posedge clk) begin
    if (ce) begin
      if (r)      b <= '0;
      else if (l) b <= p;
      else        b <= b + a;
    end
  end

endmodule
