// filter_engine: single multiplier-accumulator IIR engine.
//
// A cascade of up to seven biquads is evaluated once per 128-clock frame by
// one 18x18 multiplier, stepping through the program held in coeff_mem:
//
//   input_mux --> mult18 --> mul_shifter --> accumulator --+--> overflow_detect --> history_file
//   (x or hist)    ^            (align)          ^   |     |          |                 |
//   coeff reg -----+                              +---barrel_shifter   +--> output reg   |
//                                                                                        |
//   history_file -----------------------------------------------------------> input_mux -+
//
// Each 35x35 product takes four clocks (LL, LM, ML, MM partial products).
// The accumulator is cleared once per frame and never between sections: the
// finished output of section j, still in the accumulator at full precision,
// is the starting value of section j+1, which then adds b2*x[-2] + b1*x[-1],
// is shifted right by its c0 exponent, and adds a2*y[-2] + a1*y[-1].  The
// first "section input" is g*x, formed by the same four-pass multiply.
//
// Pipeline, relative to the clock in which coefficient word w is the output
// of coeff_mem (COEF):  w+1 coefficient register and operand register,
// w+2 product, w+3 aligned addend, w+4 in the accumulator.  The control
// word C acts in the clock it is presented.  The c0 shift exponent (bits 2:0
// of the section's shift word) is delayed three clocks after COEF so that it
// is at the barrel shifter when the program asserts acc_load.
//
// Outputs (FIL, IOLD, OVF) change once per frame, on the program's load_io
// word.  FIL is the final 35-bit value without its three lowest bits (32-bit
// output format); OVF is set when any value stored during the frame, or the
// output, overflowed.  IOVF is used as it arrives, for every value stored.
// While RST is high the program word is ignored and the accumulator is
// cleared, so a frame that starts part-way through the program after reset
// stores zeros.  The datapath, program and formats follow the document;
// it does not show the schematic of this sheet, so the delay of the shift
// exponent, the frame-wide overflow flag and the reset behaviour are this
// design's choices.
module filter_engine
  import iir_pkg::*;
#(
  parameter int unsigned N_SOS = 7
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [IN_W-1:0]   i,      // input value
  input  logic              iovf,   // input overflow
  input  logic [HALF_W-1:0] coef,   // coefficient half-word
  input  logic [HALF_W-1:0] c,      // control word (ctrl_t)
  input  logic              ht,     // history bank toggle
  output logic              ovf,
  output logic [IN_W-1:0]   iold,   // input value belonging to FIL
  output logic [IN_W-1:0]   fil     // filter output
);

  ctrl_t ctl;
  // while reset is asserted the program word is ignored (no stray writes
  // from a memory output register that has not been loaded yet) and the
  // accumulator is cleared: the counter restarts in the program's tail,
  // which stores the accumulator without clearing it first
  assign ctl = rst ? '0 : ctrl_t'(c);

  logic [HALF_W-1:0] coef_q, op_x, hist_b;
  logic [PROD_W-1:0] prod;
  logic [ACC_W-1:0]  addend, acc, acc_shifted;
  logic [VAL_W-1:0]  value;
  logic              value_ovf, ovf_seen;
  logic [2:0]        shift_d1, shift_d2;

  input_mux u_input_mux (
    .clk, .rst, .a(i), .old(iold), .h(hist_b), .b(op_x),
    .re(ctl.load_io), .sel(ctl.in_sel)
  );

  always_ff @(posedge clk) begin
    coef_q   <= coef;
    shift_d1 <= coef_q[2:0];
    shift_d2 <= shift_d1;
  end

  mult18 u_mult (.clk, .a(op_x), .b(coef_q), .p(prod));

  mul_shifter u_mul_shifter (.clk, .a(prod), .sel(ctl.mul_shift), .b(addend));

  accumulator #(.WIDTH(ACC_W)) u_acc (
    .clk, .ce(1'b1), .r(ctl.acc_reset || rst), .l(ctl.acc_load),
    .a(addend), .p(acc_shifted), .b(acc)
  );

  barrel_shifter #(.WIDTH(ACC_W)) u_c0_shift (.a(acc), .sel(shift_d2), .b(acc_shifted));

  overflow_detect u_ovf (.a(acc), .b(value), .iovf, .ovf(value_ovf));

  history_file u_hist (
    .clk, .d(value), .b(hist_b), .a(ctl.hist_addr), .ht, .w(ctl.hist_we)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      fil      <= '0;
      ovf      <= 1'b0;
      ovf_seen <= 1'b0;
    end else if (ctl.load_io) begin
      fil      <= value[VAL_W-1:VAL_W-IN_W];
      ovf      <= ovf_seen || value_ovf;
      ovf_seen <= 1'b0;
    end else if (ctl.hist_we && value_ovf) begin
      ovf_seen <= 1'b1;
    end
  end

  // N_SOS only documents the configuration; the program in coeff_mem decides
  // how many sections are evaluated.
  if (N_SOS < 1 || N_SOS > MAX_SOS) begin : g_bad_nsos
    $error("N_SOS must be 1..7");
  end

endmodule
