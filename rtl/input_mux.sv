// input_mux: input sample register and multiplier operand selector.
//
// When RE is high (once per sample, from the program's load bit) the new
// 32-bit input value is latched and the previous one moves to OLD, which is
// the sample the filter output latched in the same cycle belongs to.
// Each cycle the registered output B takes one 18-bit multiplier operand:
//   SEL 00: LSB half of the input value as a 35-bit filter value, i.e.
//           {0, in[13:0], 000} (the 32-bit input is shifted left by 3),
//   SEL 01: MSB half, in[31:14],
//   SEL 1x: the history half-word H.
// Behaviour follows the document; the synchronous reset is an addition.
// Latency: one clock from SEL/H to B.
module input_mux
  import iir_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [IN_W-1:0]   a,    // input value
  output logic [IN_W-1:0]   old,  // previous input value
  input  logic [HALF_W-1:0] h,    // history half-word
  output logic [HALF_W-1:0] b,    // multiplier operand
  input  logic              re,   // register enable
  input  logic [1:0]        sel   // IS_* selection
);

  logic [IN_W-1:0]   in_q;
  logic [HALF_W-1:0] mux;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_q <= '0;
      old  <= '0;
    end else if (re) begin
      in_q <= a;
      old  <= in_q;
    end
  end

  always_comb begin
    unique case (sel)
      IS_IN_LSB: mux = {1'b0, in_q[13:0], 3'b000};
      IS_IN_MSB: mux = in_q[31:14];
      default:   mux = h;
    endcase
  end

  always_ff @(posedge clk) b <= mux;

endmodule
