// tb_input_mux: checks the input register and the operand select.
//
// Random input values, history half-words, selects and register enables are
// applied each clock.  A model of the input register (loaded on RE, cleared
// by reset) and of IOLD (the previous input register value) is kept; the
// registered operand must be, one clock after the select, the input LSB half
// {0, I[13:0], 000}, the input MSB half I[31:14], or the history half-word.
// The split of the 32-bit input into the 35-bit value halves follows the
// document's formats; the test sequence is this testbench's own.
module tb_input_mux;
  import iir_pkg::*;
  logic        clk = 1'b0, rst = 1'b1, re = 1'b0;
  logic [31:0] a = '0, old;
  logic [17:0] h = '0, b;
  logic [1:0]  sel = '0;
  int checks = 0, failures = 0;
  int n_re = 0;

  input_mux dut (.clk, .rst, .a, .old, .h, .b, .re, .sel);
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
    logic [31:0] m_in, m_old;
    logic [17:0] e_b;
    @(posedge clk); #1;
    rst = 1'b0;
    m_in = '0; m_old = '0;
    for (int n = 0; n < 3000; n++) begin
      a   = $urandom;
      h   = 18'($urandom);
      sel = 2'($urandom);
      re  = ($urandom_range(0, 7) == 0);
      // operand is formed from the register value before this edge
      case (sel)
        IS_IN_LSB: e_b = {1'b0, m_in[13:0], 3'b000};
        IS_IN_MSB: e_b = m_in[31:14];
        default:   e_b = h;
      endcase
      if (re) begin
        m_old = m_in;
        m_in  = a;
        n_re++;
      end
      @(posedge clk); #1;
      check(b == e_b, $sformatf("operand %h exp %h sel %0d", b, e_b, sel));
      check(old == m_old, "iold");
    end
    check(n_re > 0, "register loads seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
