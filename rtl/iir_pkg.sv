// iir_pkg: number formats, microcode word layout and microcode program of the
// single-MAC IIR filter engine.
//
// The engine evaluates a cascade of second order sections (biquads),
//   y = c0*(x + b1*x[-1] + b2*x[-2]) + a1*y[-1] + a2*y[-2],
// with one 18x18 multiplier.  Every 35-bit operand is split into a 17-bit
// unsigned LSB half and an 18-bit signed MSB half, so one 35x35 product takes
// four passes (LL, LM, ML, MM).  A 7-bit counter steps through a 128-word
// program once per input sample; each word of the coefficient memory holds an
// 18-bit coefficient half and an 18-bit control (microcode) word.
//
// Number formats (all two's complement):
//   input value       32 bits, 9 fraction bits (18-bit ADC word << 9)
//   history value     35 bits, 12 fraction bits (input value << 3)
//   coefficient/gain  35 bits, 33 fraction bits (range -2 .. +2)
//   accumulator       48 bits, 20 fraction bits (73-bit product sum >> 25)
//   filter output     32 bits, 9 fraction bits (history value >> 3)
// These follow the document's fixed point table.  The exact bit positions of
// the control fields and the program below were read from the document's
// microcode table and cross-checked against its memory initialisation words.
package iir_pkg;

  localparam int unsigned ADC_W   = 18;
  localparam int unsigned IN_W    = 32;
  localparam int unsigned VAL_W   = 35;  // history / filter value
  localparam int unsigned COEF_W  = 35;
  localparam int unsigned HALF_W  = 18;  // multiplier operand
  localparam int unsigned LSB_W   = 17;  // bits in the LSB half of a 35-bit word
  localparam int unsigned PROD_W  = 36;  // 18x18 product
  localparam int unsigned ACC_W   = 48;
  localparam int unsigned ACC_DROP = 25; // product bits dropped below the accumulator
  localparam int unsigned FRAME   = 128; // clock cycles per input sample
  localparam int unsigned MAX_SOS = 7;   // sections that fit in one frame

  // Multiplier operand alignment (partial product weight).
  localparam logic [1:0] MS_LL = 2'b00;  // LSB*LSB, no shift, no sign extension
  localparam logic [1:0] MS_X  = 2'b01;  // LSB*MSB or MSB*LSB, shift 17
  localparam logic [1:0] MS_MM = 2'b10;  // MSB*MSB, shift 34 (2'b11 likewise)

  // Multiplier input selection.
  localparam logic [1:0] IS_IN_LSB = 2'b00; // input value, LSB half
  localparam logic [1:0] IS_IN_MSB = 2'b01; // input value, MSB half
  localparam logic [1:0] IS_HIST   = 2'b10; // history file (2'b11 likewise)

  // 18-bit control word.  Bits 17:13 carry no function.
  typedef struct packed {
    logic [4:0] spare;
    logic [4:0] hist_addr;  // {old/new bank, section index[2:0], MSB half}
    logic       load_io;    // latch new input sample and filter output
    logic       hist_we;    // write accumulator value into the history file
    logic       acc_reset;  // clear accumulator
    logic       acc_load;   // load accumulator with itself shifted right by c0
    logic [1:0] mul_shift;  // MS_*
    logic [1:0] in_sel;     // IS_*
  } ctrl_t;

  // Layout of the coefficient words of one program (one filter bank).
  // Gain g: LSB half at words 127 and 1, MSB half at words 0 and 2.
  // Section j starts at SEC_BASE + SEC_WORDS*j; offsets inside a section:
  localparam int unsigned SEC_BASE  = 3;
  localparam int unsigned SEC_WORDS = 17;
  localparam int unsigned OFS_B2 = 0;   // l,m,l,m
  localparam int unsigned OFS_B1 = 4;   // l,m,l,m
  localparam int unsigned OFS_C0 = 8;   // right shift amount (-log2 c0) in bits 2:0
  localparam int unsigned OFS_A2 = 9;   // l,m,l,m
  localparam int unsigned OFS_A1 = 13;  // l,m,l,m

  function automatic logic [4:0] haddr(input logic old_bank, input int unsigned sec,
                                       input logic msb);
    return {old_bank, 3'(sec), msb};
  endfunction

  // Control word stored at program address k for an engine of n_sos sections.
  // Pipeline relations the program relies on (w = coefficient word address):
  //   history read address for word w is in word w-1,
  //   input selection for word w is in word w,
  //   partial product alignment for word w is in word w+2,
  //   a control bit in word k acts on the accumulator value of cycle k+1.
  function automatic ctrl_t microcode(input int unsigned k, input int unsigned n_sos);
    ctrl_t c;
    int unsigned tail, j, o;
    c = '0;
    tail = SEC_BASE + SEC_WORDS * n_sos;
    if (k == 1) begin
      c.acc_reset = 1'b1;
      c.in_sel    = IS_IN_MSB;
    end else if (k == 2) begin
      c.hist_addr = haddr(1'b1, 0, 1'b0);
      c.mul_shift = MS_X;
      c.in_sel    = IS_IN_MSB;
    end else if (k >= SEC_BASE && k < tail) begin
      j = (k - SEC_BASE) / SEC_WORDS;
      o = (k - SEC_BASE) % SEC_WORDS;
      c.in_sel = IS_HIST;
      unique case (o)
        0:  begin c.hist_addr = haddr(1'b1, j, 1'b0);     c.mul_shift = MS_X;  end
        1:  begin c.hist_addr = haddr(1'b1, j, 1'b1);     c.mul_shift = MS_MM; end
        2:  begin c.hist_addr = haddr(1'b1, j, 1'b1);     c.mul_shift = MS_LL; end
        3:  begin c.hist_addr = haddr(1'b0, j, 1'b0);     c.mul_shift = MS_X;
                  c.hist_we = 1'b1; end
        4:  begin c.hist_addr = haddr(1'b0, j, 1'b0);     c.mul_shift = MS_X;  end
        5:  begin c.hist_addr = haddr(1'b0, j, 1'b1);     c.mul_shift = MS_MM; end
        6:  begin c.hist_addr = haddr(1'b0, j, 1'b1);     c.mul_shift = MS_LL; end
        7:  begin c.hist_addr = haddr(1'b0, 0, 1'b0);     c.mul_shift = MS_X;  end
        8:  begin c.hist_addr = haddr(1'b1, j + 1, 1'b0); c.mul_shift = MS_X;  end
        9:  begin c.hist_addr = haddr(1'b1, j + 1, 1'b0); c.mul_shift = MS_MM; end
        10: begin c.hist_addr = haddr(1'b1, j + 1, 1'b1); c.mul_shift = MS_LL; end
        11: begin c.hist_addr = haddr(1'b1, j + 1, 1'b1); c.mul_shift = MS_LL;
                  c.acc_load = 1'b1; end
        12: begin c.hist_addr = haddr(1'b0, j + 1, 1'b0); c.mul_shift = MS_X;  end
        13: begin c.hist_addr = haddr(1'b0, j + 1, 1'b0); c.mul_shift = MS_X;  end
        14: begin c.hist_addr = haddr(1'b0, j + 1, 1'b1); c.mul_shift = MS_MM; end
        15: begin c.hist_addr = haddr(1'b0, j + 1, 1'b1); c.mul_shift = MS_LL; end
        default: begin c.hist_addr = haddr(1'b1, j + 1, 1'b0); c.mul_shift = MS_X; end
      endcase
    end else if (k == tail) begin
      c.hist_addr = haddr(1'b1, n_sos, 1'b0); c.mul_shift = MS_X;  c.in_sel = IS_HIST;
    end else if (k == tail + 1) begin
      c.hist_addr = haddr(1'b1, n_sos, 1'b1); c.mul_shift = MS_MM; c.in_sel = IS_HIST;
    end else if (k == tail + 2) begin
      c.hist_addr = haddr(1'b1, n_sos, 1'b1); c.mul_shift = MS_LL; c.in_sel = IS_HIST;
    end else if (k == tail + 3) begin
      // last section output: store as history and latch as filter output
      c.hist_addr = haddr(1'b0, n_sos, 1'b0);
      c.load_io   = 1'b1;
      c.hist_we   = 1'b1;
    end else if (k == tail + 4) begin
      c.hist_addr = haddr(1'b0, n_sos, 1'b0);
    end
    return c;
  endfunction

endpackage
