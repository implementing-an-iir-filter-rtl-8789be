// tb_barrel_shifter: checks the c0 shift (arithmetic right shift by 0..7).
//
// Random signed 48-bit values and shift counts are applied; the output must
// equal the value divided by 2^sel rounded towards minus infinity, computed
// with 64-bit integers.  Combinational, checked after 1 ns.  Follows the
// document's c0 = 2^-n; the test values are this testbench's own.
module tb_barrel_shifter;
  logic [47:0] a = '0;
  logic [2:0]  sel = '0;
  logic [47:0] b;
  int checks = 0, failures = 0;

  barrel_shifter dut (.a, .sel, .b);

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
    longint v, q;
    for (int n = 0; n < 2000; n++) begin
      a   = 48'({$urandom, $urandom});
      sel = (n < 8) ? 3'(n) : 3'($urandom);
      v   = longint'($signed(a));
      q   = v / (longint'(1) << sel);
      if (q * (longint'(1) << sel) > v) q = q - 1;
      #1;
      check(b == 48'(q), $sformatf("%h >>> %0d = %h exp %h", a, sel, b, 48'(q)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
