// history_file: storage of the past inputs and outputs of all sections.
//
// Because the output of section j is the input of section j+1, one history
// slot per section boundary serves both: slot j holds x of section j, which is
// y of section j-1; slot N_SOS holds y of the last section.  Each slot exists
// in two banks, "newest" (x[-1]) and "older" (x[-2]).  Instead of copying
// x[-1] to x[-2] every sample, the roles of the banks swap when HT toggles
// (once per sample): a read uses bank A[4] xor HT, a write goes to the other
// bank, overwriting the x[-2] value after it has been read.
//
// Address A = {bank, slot[2:0], msb}.  A read returns one 18-bit half of the
// 35-bit value: the MSB half (bits 34:17) or the LSB half as {0, bits 16:0};
// the read is registered (one clock).  A write stores all 35 bits at the end
// of the cycle.  Organisation and bank toggling follow the document; the
// memory powers up cleared.
module history_file
  import iir_pkg::*;
(
  input  logic              clk,
  input  logic [VAL_W-1:0]  d,    // value to store
  output logic [HALF_W-1:0] b,    // registered half-word
  input  logic [4:0]        a,    // {bank, slot, msb}
  input  logic              ht,   // bank toggle
  input  logic              w     // write enable
);

  logic [HALF_W-1:0] lsb_mem [16];
  logic [HALF_W-1:0] msb_mem [16];

  initial begin
    for (int i = 0; i < 16; i++) begin
      lsb_mem[i] = '0;
      msb_mem[i] = '0;
    end
  end

  logic       rd_bank;
  logic [3:0] rd_idx, wr_idx;

  assign rd_bank = a[4] ^ ht;
  assign rd_idx  = {rd_bank, a[3:1]};
  assign wr_idx  = {~rd_bank, a[3:1]};

  always @(posedge clk) begin
    if (w) begin
      lsb_mem[wr_idx] <= {1'b0, d[LSB_W-1:0]};
      msb_mem[wr_idx] <= d[VAL_W-1:LSB_W];
    end
  end

  always_ff @(posedge clk) b <= a[0] ? msb_mem[rd_idx] : lsb_mem[rd_idx];

endmodule
