// tb_history_file: checks the two-bank history storage.
//
// A model holds two banks of eight 35-bit values, cleared at power-up.
// Random addresses, toggle values, write enables and data are applied each
// clock.  A write must go to bank not(A[4] xor HT) and slot A[3:1]; a read
// returns, one clock later, the MSB half (A[0] = 1) or {0, LSB half} of the
// value in bank A[4] xor HT.  A read and a write in the same clock must
// return the old value.  A directed sequence also checks that a value
// written with A[4] = 0 is read back with A[4] = 0 ("newest") in the next
// frame and with A[4] = 1 ("older") in the frame after that, HT toggling in
// between.  The bank
// toggling follows the document; the test sequence is this testbench's.
module tb_history_file;
  import iir_pkg::*;
  logic        clk = 1'b0;
  logic [34:0] d = '0;
  logic [17:0] b;
  logic [4:0]  a = '0;
  logic        ht = 1'b0, w = 1'b0;
  int checks = 0, failures = 0;
  int n_wr = 0;

  history_file dut (.clk, .d, .b, .a, .ht, .w);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  logic [34:0] m [2][8];

  task automatic step(logic [4:0] aa, logic hh, logic ww, logic [34:0] dd);
    logic        rb;
    logic [17:0] e_b;
    a = aa; ht = hh; w = ww; d = dd;
    rb  = aa[4] ^ hh;
    e_b = aa[0] ? m[rb][aa[3:1]][34:17] : {1'b0, m[rb][aa[3:1]][16:0]};
    if (ww) begin
      m[!rb][aa[3:1]] = dd;
      n_wr++;
    end
    @(posedge clk); #1;
    check(b == e_b, $sformatf("read %h exp %h at a=%h ht=%b", b, e_b, aa, hh));
  endtask

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [34:0] v;
    foreach (m[i, j]) m[i][j] = '0;
    // power-up contents are zero
    for (int k = 0; k < 32; k++) step(5'(k), 1'b0, 1'b0, '0);
    // frame structure: write x to slot 3 as the newest value, then read it
    // as newest (A[4] = 1) one frame later and as older (A[4] = 0) after that
    v = 35'h5_1234_5678;
    step({1'b0, 3'd3, 1'b0}, 1'b0, 1'b1, v);
    step({1'b0, 3'd3, 1'b1}, 1'b1, 1'b0, '0);
    check(b == v[34:17], "newest value after one toggle");
    step({1'b1, 3'd3, 1'b1}, 1'b0, 1'b0, '0);
    check(b == v[34:17], "older value after two toggles");
    for (int n = 0; n < 4000; n++)
      step(5'($urandom), 1'($urandom), ($urandom_range(0, 2) == 0), 35'({$urandom, $urandom}));
    check(n_wr > 100, "writes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
