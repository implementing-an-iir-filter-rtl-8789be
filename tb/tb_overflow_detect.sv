// tb_overflow_detect: checks the accumulator-to-value conversion.
//
// Accumulator values in range, just outside it, and random are applied with
// and without IOVF.  Without overflow the value must be accumulator bits
// 42:8.  Overflow must be flagged when bits 47:42 differ or IOVF is set, and
// the value must then be the marker picked by bit 36.  Combinational,
// checked after 1 ns.  The rules follow the document; the values are this
// testbench's own.
module tb_overflow_detect;
  logic [47:0] a = '0;
  logic        iovf = 1'b0;
  logic [34:0] b;
  logic        ovf;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_ok = 0;

  overflow_detect dut (.a, .b, .iovf, .ovf);

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
    logic        e_ovf;
    logic [34:0] e_b;
    longint      v;
    for (int n = 0; n < 3000; n++) begin
      case (n % 4)
        0: v = longint'($signed(43'({$urandom, $urandom})));          // in range
        1: v = (longint'(1) << 42) - longint'($urandom_range(0, 3));  // just above
        2: v = -(longint'(1) << 42) - longint'($urandom_range(0, 3)); // just below
        default: v = longint'($signed(48'({$urandom, $urandom})));
      endcase
      a    = 48'(v);
      iovf = ($urandom_range(0, 7) == 0);
      e_ovf = iovf || (v >= (longint'(1) << 42)) || (v < -(longint'(1) << 42));
      if (!e_ovf)    e_b = a[42:8];
      else if (a[36]) e_b = 35'h7_E000_0000;
      else            e_b = 35'h0_1FFF_FFFF;
      #1;
      check(ovf == e_ovf, $sformatf("ovf %b exp %b for %h", ovf, e_ovf, a));
      check(b == e_b, $sformatf("value %h exp %h for %h", b, e_b, a));
      if (e_ovf) n_ovf++; else n_ok++;
    end
    check(n_ovf > 0 && n_ok > 0, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
