// tb_mult18: checks the registered 18x18 signed multiplier.
//
// Random and extreme operands are applied every clock; one clock later the
// 36-bit product must equal the integer product of the two signed operands.
// The operand widths follow the document; the test values are this
// testbench's own.
module tb_mult18;
  import iir_pkg::*;
  logic              clk = 1'b0;
  logic [HALF_W-1:0] a = '0, b = '0;
  logic [PROD_W-1:0] p;
  int checks = 0, failures = 0;

  mult18 dut (.clk, .a, .b, .p);
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
    logic [17:0] edges [6] = '{18'h1FFFF, 18'h20000, 18'h00000, 18'h3FFFF, 18'h00001, 18'h1FFFE};
    longint exp;
    for (int n = 0; n < 2036; n++) begin
      if (n < 36) begin
        a = edges[n / 6];
        b = edges[n % 6];
      end else begin
        a = 18'($urandom);
        b = 18'($urandom);
      end
      exp = longint'($signed(a)) * longint'($signed(b));
      @(posedge clk); #1;
      check(p == PROD_W'(exp), $sformatf("%h * %h = %h exp %h", a, b, p, PROD_W'(exp)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
