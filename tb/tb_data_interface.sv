// tb_data_interface: checks the host bus decode.
//
// Random addresses, data and strobes are applied.  With AD[11] low a read
// must return the input register (AD[0] = 0) or the filter output
// (AD[0] = 1); with AD[11] high it must return the memory data, zero
// extended, and a write must reach the memory with address AD[10:0] and
// data D[17:0].  The bus is driven only for enabled reads.  Combinational,
// checked after 1 ns.  The address map follows the document; splitting the
// bidirectional bus into D_IN, D_OUT and D_OE is this design's choice.
module tb_data_interface;
  logic [11:0] ad = '0;
  logic [31:0] d_in = '0, d_out, da = '0, db = '0;
  logic        d_oe, wr = 1'b0, en = 1'b0, mwe;
  logic [17:0] mi = '0, mo;
  logic [10:0] ma;
  int checks = 0, failures = 0;
  int n_rd = 0, n_wr = 0;

  data_interface dut (.ad, .d_in, .d_out, .d_oe, .wr, .en, .mi, .mo, .ma, .mwe, .da, .db);

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
    for (int n = 0; n < 2000; n++) begin
      ad = 12'($urandom); d_in = $urandom; da = $urandom; db = $urandom;
      mi = 18'($urandom); wr = 1'($urandom); en = 1'($urandom);
      #1;
      check(d_oe == (en && !wr), "d_oe");
      check(mwe == (en && wr && ad[11]), "mwe");
      if (mwe) n_wr++;
      check(ma == ad[10:0] && mo == d_in[17:0], "memory address and data");
      if (en && !wr) begin
        n_rd++;
        if (ad[11])     check(d_out == {14'b0, mi}, "memory read");
        else if (ad[0]) check(d_out == db, "filter output read");
        else            check(d_out == da, "input read");
      end
    end
    check(n_rd > 0 && n_wr > 0, "reads and writes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
