// tb_coeff_mem: checks the coefficient and microcode memory.
//
// 1. Power-up: every word of every bank must show the program's control word
//    for its address on CTRL and zero on COEF, one clock after the address.
// 2. Host writes: random 18-bit halves are written through port A and read
//    back (registered, write-first on DO, stored data one read later).
// 3. Engine view: after both halves of a word are written, port B must show
//    COEF = word bits 17:0 and CTRL = {word bits 35:32, 31:18}, where the
//    host halves map to {bits 33:32, 15:0} (even address) and
//    {bits 35:34, 31:16} (odd address).
// The memory layout follows the document; the power-up content (program
// with zero coefficients) is this design's choice.
module tb_coeff_mem;
  import iir_pkg::*;
  logic        clk = 1'b0;
  logic [6:0]  a = '0;
  logic [2:0]  sel = '0;
  logic [17:0] coef, ctrl, di = '0, do_;
  logic [10:0] addr = '0;
  logic        mwe = 1'b0;
  int checks = 0, failures = 0;
  int n_wr = 0;

  coeff_mem #(.N_SOS(7)) dut (.clk, .a, .sel, .coef, .ctrl, .addr, .di, .do_, .mwe);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  logic [35:0] m [512];

  initial begin
    #10000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_b(int wi);
    sel = 3'(wi / 128); a = 7'(wi % 128);
    @(posedge clk); #1;
    check(coef == m[wi][17:0], $sformatf("coef %h exp %h word %0d", coef, m[wi][17:0], wi));
    check(ctrl == {m[wi][35:32], m[wi][31:18]}, $sformatf("ctrl %h word %0d", ctrl, wi));
  endtask

  initial begin
    for (int k = 0; k < 512; k++) begin
      logic [17:0] c;
      c = microcode(k % 128, 7);
      m[k] = {c[17:14], c[13:0], 18'b0};
    end
    for (int k = 0; k < 512; k++) read_b(k);
    for (int n = 0; n < 1500; n++) begin
      int          wi;
      logic [17:0] h;
      wi = $urandom_range(0, 511);
      for (int half = 0; half < 2; half++) begin
        h = 18'($urandom);
        addr = 11'(2 * wi + half); di = h; mwe = 1'b1;
        if (half) {m[wi][35:34], m[wi][31:16]} = h;
        else      {m[wi][33:32], m[wi][15:0]}  = h;
        n_wr++;
        @(posedge clk); #1;
        check(do_ == h, "write-first data on DO");
        mwe = 1'b0; di = ~h;
        @(posedge clk); #1;
        check(do_ == h, $sformatf("readback %h exp %h addr %0d", do_, h, addr));
      end
      read_b(wi);
    end
    for (int k = 0; k < 512; k++) read_b(k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
