// barrel_shifter: arithmetic right shift by 0 to 7 bits.
//
// Implements the per-section gain c0 = 2^-SEL as a shift of the accumulator
// (document: c0 is kept a power of two so that it costs no multiplier pass).
// Combinational.
module barrel_shifter #(
  parameter int unsigned WIDTH = 48
) (
  input  logic [WIDTH-1:0] a,
  input  logic [2:0]       sel,
  output logic [WIDTH-1:0] b
);

  assign b = WIDTH'($signed(a) >>> sel);

endmodule
