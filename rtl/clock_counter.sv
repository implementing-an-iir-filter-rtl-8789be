// clock_counter: program counter of the filter engine.
//
// An 8-bit binary counter advances on every clock.  Its low seven bits A are
// the address into the 128-word filter program; bit 7 (ODD) toggles once per
// program pass and selects which of the two history banks holds the newest
// values.  A rising edge on the 1 PPS input reloads the counter with 1 on the
// next clock edge, so that all boards running from the same 1 PPS and clock
// process their samples in step (document's behaviour).  The power-up value
// 0xF6 is the document's; the synchronous reset restoring it is this design's
// addition.  The power-up value is written as a declaration initialiser (a
// register init value on an FPGA); lint tools note that this variable is also
// assigned in always_ff, which is intended.
//
// The 1 PPS input is sampled with the filter clock; a pulse must therefore be
// at least one clock period wide (the document's reference bench uses four).
module clock_counter (
  input  logic       clk,
  input  logic       rst,     // synchronous, active high
  input  logic       onepps,  // 1 pulse per second
  output logic [6:0] a,       // program address
  output logic       odd      // history bank toggle
);

  logic [7:0] count_q = 8'hF6;
  logic       pps_q   = 1'b0;

  always_ff @(posedge clk) begin
    if (rst) begin
      count_q <= 8'hF6;
      pps_q   <= 1'b0;
    end else begin
      pps_q <= onepps;
      if (onepps && !pps_q) count_q <= 8'd1;
      else                  count_q <= count_q + 8'd1;
    end
  end

  assign a   = count_q[6:0];
  assign odd = count_q[7];

endmodule
