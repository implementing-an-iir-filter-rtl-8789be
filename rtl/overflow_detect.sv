// overflow_detect: converts the accumulator to a 35-bit filter value.
//
// The filter value is accumulator bits 42:8 (12 fraction bits).  The value
// overflows when bits 47:42 are not all equal; the input overflow flag IOVF
// (ADC near full scale) is treated the same way.  On overflow the output is
// replaced by a marker at the edge of the 27-bit range that the filter output
// reports: +(2^29-1) or -2^29 in filter value units, chosen by accumulator
// bit 36, as in the document.  Combinational.
module overflow_detect
  import iir_pkg::*;
(
  input  logic [ACC_W-1:0] a,
  output logic [VAL_W-1:0] b,
  input  logic             iovf,
  output logic             ovf
);

  assign ovf = (a[47:42] != {6{a[47]}}) || iovf;

  always_comb begin
    if (!ovf)       b = a[42:8];
    else if (a[36]) b = {6'b111111, 29'b0};
    else            b = {6'b000000, {29{1'b1}}};
  end

endmodule
