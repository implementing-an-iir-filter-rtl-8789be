// iir_top: IIR decimation-filter front end for one ADC channel.
//
// Wiring follows the document's control sheet: the ADC register feeds the
// filter engine; the clock counter addresses the coefficient memory and
// toggles the engine's history banks; the host interface reads the raw input
// and filter output and reads/writes the coefficient memory; the engine's
// overflow flag is brought out as ADC0OVF.
//
// Clocking: everything runs on CLK (2^26 Hz in the document) except the ADC
// register, which captures on the falling edge of ADC0L.  One output sample is
// produced every 128 clocks (524288 Hz in the document); the ADC must finish
// a conversion in step with the program, which the 1 PPS resynchronisation of
// the counter provides.  The first program word after a 1 PPS edge is word 1.
// The engine takes the ADC register at program word 125 and uses the ADC
// overflow flag as it arrives, so ADC0L should fall between words 109 and
// 124 for a sample's flag to cover its own frame.
//
// Host bus: AD, D_IN/D_OUT/D_OE, WR, CS (see data_interface).  A coefficient
// memory read returns the half-word addressed one clock earlier.
// RST (synchronous, active high) is this design's addition; the document
// relies on power-up values.
module iir_top
  import iir_pkg::*;
#(
  parameter int unsigned N_SOS = 7
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [ADC_W-1:0] adc0,
  input  logic             adc0_l,
  output logic             adc0_ovf,
  input  logic [2:0]       sel,
  input  logic             clk_1pps,
  input  logic [11:0]      ad,
  input  logic [31:0]      d_in,
  output logic [31:0]      d_out,
  output logic             d_oe,
  input  logic             wr,
  input  logic             cs
);

  logic [IN_W-1:0]   adc_value, iold, fil;
  logic              adc_ovf, ht;
  logic [6:0]        pc;
  logic [HALF_W-1:0] coef, ctrl, mem_rd, mem_wr;
  logic [10:0]       mem_addr;
  logic              mem_we;

  iir_adc u_adc (.adc(adc0), .l(adc0_l), .o(adc_value), .ovf(adc_ovf));

  clock_counter u_counter (.clk, .rst, .onepps(clk_1pps), .a(pc), .odd(ht));

  coeff_mem #(.N_SOS(N_SOS)) u_coeff (
    .clk, .a(pc), .sel, .coef, .ctrl,
    .addr(mem_addr), .di(mem_wr), .do_(mem_rd), .mwe(mem_we)
  );

  filter_engine #(.N_SOS(N_SOS)) u_engine (
    .clk, .rst, .i(adc_value), .iovf(adc_ovf), .coef, .c(ctrl), .ht,
    .ovf(adc0_ovf), .iold, .fil
  );

  data_interface u_if (
    .ad, .d_in, .d_out, .d_oe, .wr, .en(cs),
    .mi(mem_rd), .mo(mem_wr), .ma(mem_addr), .mwe(mem_we),
    .da(iold), .db(fil)
  );

endmodule
