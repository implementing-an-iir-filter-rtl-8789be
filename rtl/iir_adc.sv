// iir_adc: ADC input register of the IIR filter.
//
// The 18-bit ADC word is captured when the converter's busy line L falls
// (end of conversion), as in the document.  The captured word is placed into
// the 32-bit input value format: five copies of the sign bit in front and nine
// zero bits at the end (integer ADC counts, 9 fraction bits).  OVF flags a
// sample within 64 counts of either end of the ADC range, i.e. when the top
// 12 ADC bits read 0x7FF or 0x800 (document's rule).
//
// Timing: O changes on the falling edge of L and is meant to be sampled by the
// filter clock well away from that edge; the ADC clock is an integer divisor of
// the filter clock in this design.  The register powers up at zero through a
// declaration initialiser (a register init value on an FPGA); lint tools note
// that it is also assigned in always_ff, which is intended.
module iir_adc
  import iir_pkg::*;
(
  input  logic [ADC_W-1:0] adc,  // ADC data word
  input  logic             l,    // ADC busy; sample taken on its falling edge
  output logic [IN_W-1:0]  o,    // sign extended, shifted input value
  output logic             ovf   // near full-scale
);

  logic [IN_W-1:0] sample_q = '0;

  always_ff @(negedge l) begin
    sample_q <= {{(IN_W - ADC_W - 9){adc[ADC_W-1]}}, adc, 9'b0};
  end

  assign o   = sample_q;
  assign ovf = (sample_q[26:15] == 12'h7FF) || (sample_q[26:15] == 12'h800);

endmodule
