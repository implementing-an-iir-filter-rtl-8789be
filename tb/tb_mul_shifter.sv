// tb_mul_shifter: checks the alignment of the four partial products.
//
// A random 36-bit partial product and alignment select are applied every
// clock.  One clock later the output must be bits 72:25 of the product
// placed at bit 0 (LSB x LSB, unsigned), at bit 17 (cross products, signed)
// or at bit 34 (MSB x MSB, signed), computed here with integer arithmetic.
// The alignment and the kept bits follow the document's formats; the
// checking method is this testbench's.
module tb_mul_shifter;
  import iir_pkg::*;
  logic              clk = 1'b0;
  logic [PROD_W-1:0] a = '0;
  logic [1:0]        sel = '0;
  logic [ACC_W-1:0]  b;
  int checks = 0, failures = 0;
  int n_sel [3] = '{0, 0, 0};

  mul_shifter dut (.clk, .a, .sel, .b);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [80:0] v;
    logic [47:0]        exp;
    for (int n = 0; n < 3000; n++) begin
      sel = 2'($urandom_range(0, 3));
      if (sel == MS_LL) a = {2'b00, 34'({$urandom, $urandom})};
      else              a = 36'({$urandom, $urandom});
      if (sel == MS_LL)     v = 81'(a[33:0]);
      else if (sel == MS_X) v = 81'($signed(a)) * 81'sd131072;
      else                  v = 81'($signed(a)) * 81'sd17179869184;
      exp = v[72:25];
      n_sel[sel == MS_LL ? 0 : (sel == MS_X ? 1 : 2)]++;
      @(posedge clk); #1;
      check(b == exp, $sformatf("sel %0d a %h: %h exp %h", sel, a, b, exp));
    end
    check(n_sel[0] > 0 && n_sel[1] > 0 && n_sel[2] > 0, "all alignments used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
