// data_interface: host access to the filter.
//
// Address map (AD[11:0], 32-bit data):
//   AD[11]=0, AD[0]=0 : read the raw input value (DA) belonging to the output,
//   AD[11]=0, AD[0]=1 : read the filter output (DB),
//   AD[11]=1          : read/write coefficient memory half-word AD[10:0]
//                       (18 bits, zero extended on read).
// A cycle is a read when EN=1 and WR=0 (D_OE then asks the board to drive the
// bus) and a memory write when EN=1, WR=1 and AD[11]=1.  Memory reads come from
// the memory's registered port, one clock after the address.  The decoding
// follows the document; the bidirectional data bus is split here into
// D_IN, D_OUT and D_OE so the pad tristate can live outside the core.
// Combinational.
module data_interface
  import iir_pkg::*;
(
  input  logic [11:0]       ad,
  input  logic [31:0]       d_in,
  output logic [31:0]       d_out,
  output logic              d_oe,
  input  logic              wr,
  input  logic              en,
  input  logic [HALF_W-1:0] mi,    // memory read data
  output logic [HALF_W-1:0] mo,    // memory write data
  output logic [10:0]       ma,    // memory address
  output logic              mwe,   // memory write enable
  input  logic [31:0]       da,    // raw input value
  input  logic [31:0]       db     // filter output
);

  assign ma    = ad[10:0];
  assign mo    = d_in[HALF_W-1:0];
  assign mwe   = en && wr && ad[11];
  assign d_oe  = en && !wr;
  assign d_out = ad[11] ? {{(32 - HALF_W){1'b0}}, mi} : (ad[0] ? db : da);

endmodule
