// tb_clock_counter: checks the frame counter.
//
// After reset the counter must be at its power-up value 0xF6 (A = 0x76,
// ODD = 1).  It then counts one per clock: A must step by one modulo 128 and
// ODD must toggle every 128 clocks.  A rising edge of 1PPS must make the
// counter 1 on the next clock (a full 1PPS high period must not reload it
// again), so the address 0 of the next frame is 128 clocks after the pulse.
// Power-up value and 1PPS reload follow the document's counter; the number
// of pulses and their spacing are this testbench's choice.
module tb_clock_counter;
  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       onepps = 1'b0;
  logic [6:0] a;
  logic       odd;
  int checks = 0, failures = 0;
  int n_sync = 0;

  clock_counter dut (.clk, .rst, .onepps, .a, .odd);

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
    logic [7:0] exp;
    repeat (2) @(posedge clk);
    #1;
    check({odd, a} == 8'hF6, $sformatf("reset value %h", {odd, a}));
    rst = 1'b0;
    exp = 8'hF6;
    for (int p = 0; p < 6; p++) begin
      int run = 200 + 97 * p;
      for (int k = 0; k < run; k++) begin
        @(posedge clk); #1;
        exp = exp + 8'd1;
        check({odd, a} == exp, $sformatf("count %h exp %h", {odd, a}, exp));
      end
      // 1PPS pulse, held high for 20 clocks
      onepps = 1'b1;
      @(posedge clk); #1;
      exp = 8'd1;
      check({odd, a} == exp, $sformatf("1PPS reload %h", {odd, a}));
      if ({odd, a} == 8'd1) n_sync++;
      for (int k = 0; k < 19; k++) begin
        @(posedge clk); #1;
        exp = exp + 8'd1;
        check({odd, a} == exp, "no reload while 1PPS stays high");
      end
      onepps = 1'b0;
      // the frame start (A = 0) comes 127 clocks after the reload
      for (int k = 0; k < 127 - 19; k++) begin
        @(posedge clk); #1;
        exp = exp + 8'd1;
      end
      check(a == 7'd0 && odd == 1'b1, "frame restarts 128 clocks after the pulse");
    end
    check(n_sync == 6, "1PPS synchronisation seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
