// tb_accumulator: checks the 48-bit accumulator.
//
// Random addends, load values and controls are applied each clock and the
// sum register is compared with a model one clock later: with CE low it
// holds, otherwise reset (R) clears it, load (L) replaces it with P, and
// else it adds A, wrapping at 48 bits.  Priority R over L is this design's
// choice; the width follows the document.
module tb_accumulator;
  logic        clk = 1'b0;
  logic        ce = 1'b0, r = 1'b1, l = 1'b0;
  logic [47:0] a = '0, p = '0, b;
  int checks = 0, failures = 0;
  int n_r = 0, n_l = 0, n_add = 0, n_hold = 0;

  accumulator #(.WIDTH(48)) dut (.clk, .ce, .r, .l, .a, .p, .b);
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
    logic [47:0] m;
    ce = 1'b1;
    @(posedge clk); #1;
    m = '0;
    check(b == m, "reset clears");
    for (int n = 0; n < 3000; n++) begin
      ce = ($urandom_range(0, 9) != 0);
      r  = ($urandom_range(0, 19) == 0);
      l  = ($urandom_range(0, 9) == 0);
      a  = 48'({$urandom, $urandom});
      p  = 48'({$urandom, $urandom});
      if (!ce)    begin n_hold++; end
      else if (r) begin m = '0; n_r++; end
      else if (l) begin m = p; n_l++; end
      else        begin m = m + a; n_add++; end
      @(posedge clk); #1;
      check(b == m, $sformatf("acc %h exp %h", b, m));
    end
    check(n_r > 0 && n_l > 0 && n_add > 0 && n_hold > 0, "all operations used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
