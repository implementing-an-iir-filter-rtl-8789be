// coeff_mem: coefficient and microcode memory of the filter engine.
//
// A dual-port memory of 512 words of 36 bits: four filter programs
// (banks) of 128 words.  Each word holds
//   bits 17:0   a coefficient half (LSB half as {0, c[16:0]}, MSB half c[34:17],
//               or a section's gain shift in bits 2:0),
//   bits 31:18  control word bits 13:0,  bits 35:32  control word bits 17:14.
// Port B (engine side) reads word {SEL[1:0], A} with a registered output, so
// COEF and CTRL show the word addressed in the previous clock.  SEL[2] is not
// used (four banks, as in the document).
// Port A (host side) sees the same storage as 1024 words of 18 bits: address
// 2n is {word n bits 33:32, bits 15:0}, address 2n+1 is {bits 35:34, bits 31:16}
// (the layout of the dual-width block RAM the document uses).  Port A reads
// are registered; a write shows the written data on DO (write-first).  ADDR[10]
// is not used.
// On power-up every bank holds the microcode program of iir_pkg with all
// coefficients zero; the host writes the coefficients.  The document instead
// ships its memory pre-loaded with four designed filters.
module coeff_mem
  import iir_pkg::*;
#(
  parameter int unsigned N_SOS = 7
) (
  input  logic              clk,
  input  logic [6:0]        a,      // program address
  input  logic [2:0]        sel,    // bank select
  output logic [HALF_W-1:0] coef,
  output logic [HALF_W-1:0] ctrl,
  input  logic [10:0]       addr,   // host address
  input  logic [HALF_W-1:0] di,
  output logic [HALF_W-1:0] do_,
  input  logic              mwe
);

  // Storage in host layout: even half-words (word bits 33:32, 15:0) and odd
  // half-words (word bits 35:34, 31:16), 512 x 18 each.  Both arrays have one
  // write port and two registered read ports, the shape of a dual-port block
  // RAM.
  logic [HALF_W-1:0] mem_e [512];
  logic [HALF_W-1:0] mem_o [512];

  initial begin
    for (int i = 0; i < 512; i++) begin
      automatic logic [17:0] c = microcode(i % FRAME, N_SOS);
      automatic logic [35:0] w = {c[17:14], c[13:0], 18'b0};
      mem_e[i] = {w[33:32], w[15:0]};
      mem_o[i] = {w[35:34], w[31:16]};
    end
  end

  // host port
  logic [8:0] wa;
  assign wa = addr[9:1];

  always @(posedge clk) begin
    if (mwe) begin
      if (addr[0]) mem_o[wa] <= di;
      else         mem_e[wa] <= di;
    end
  end

  always_ff @(posedge clk) begin
    if (mwe)          do_ <= di;
    else if (addr[0]) do_ <= mem_o[wa];
    else              do_ <= mem_e[wa];
  end

  // engine port
  logic [HALF_W-1:0] dob_e, dob_o;

  always_ff @(posedge clk) begin
    dob_e <= mem_e[{sel[1:0], a}];
    dob_o <= mem_o[{sel[1:0], a}];
  end

  // word bits 17:0 = {odd[1:0], even[15:0]};
  // control = word {35:32, 31:18} = {odd[17:16], even[17:16], odd[15:2]}
  assign coef = {dob_o[1:0], dob_e[15:0]};
  assign ctrl = {dob_o[17:16], dob_e[17:16], dob_o[15:2]};

endmodule
