// tb_iir_adc: checks the ADC input register.
//
// Random 18-bit ADC words are presented and L is pulsed.  After each falling
// edge of L the output must be the word sign extended to 32 bits and shifted
// left by 9, and OVF must be set exactly when ADC bits 17:6 are all ones but
// the sign or all zeros but the sign (within 64 counts of full scale).  The
// output must not follow ADC while L is high or rising.  Directed values at
// and next to both overflow thresholds are included.  Formats follow the
// document; the test sequence is this testbench's own.
module tb_iir_adc;
  import iir_pkg::*;

  logic [ADC_W-1:0] adc = '0;
  logic             l = 1'b1;
  logic [IN_W-1:0]  o;
  logic             ovf;
  int checks = 0, failures = 0;
  int n_ovf = 0;

  iir_adc dut (.adc, .l, .o, .ovf);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic sample(logic [17:0] v);
    logic [31:0] exp_o;
    logic        exp_ovf;
    adc = v;
    #5 l = 1'b0;
    #5;
    exp_o   = {{5{v[17]}}, v, 9'b0};
    exp_ovf = (v[17:6] == 12'h7FF) || (v[17:6] == 12'h800);
    check(o == exp_o, $sformatf("o %h exp %h for adc %h", o, exp_o, v));
    check(ovf == exp_ovf, $sformatf("ovf %b exp %b for adc %h", ovf, exp_ovf, v));
    if (ovf) n_ovf++;
    // the register holds while the ADC word changes and L rises
    adc = ~v;
    #5 l = 1'b1;
    #5;
    check(o == exp_o, "o held after L rises");
  endtask

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10;
    sample(18'h1FFFF);
    sample(18'h1FFC0);
    sample(18'h1FFBF);
    sample(18'h20000);
    sample(18'h2003F);
    sample(18'h20040);
    sample(18'h00000);
    sample(18'h3FFFF);
    for (int n = 0; n < 500; n++) sample(18'($urandom));
    check(n_ovf >= 4, "overflow seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
