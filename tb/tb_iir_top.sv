// tb_iir_top: end-to-end test of the IIR front end at its default size
// (seven sections, four banks of 128 program words).
//
// Sequence:
//  1. During reset the host loads bank 0 with a seven-section low-pass test
//     filter and bank 1 with a "hot" variant (no c0 shifts, so large inputs
//     overflow the accumulator), one 18-bit half-word per bus write, then
//     reads every half-word back (read data one clock after the address).
//  2. A 1PPS edge restarts the counter: the next program word must be word 1,
//     and the first output load must follow 125 clocks later; outputs then
//     come every 128 clocks and the history bank toggle changes each frame.
//  3. The ADC is clocked once per frame (ADC0L falls at program word 115) with
//     a sine, an impulse and noise, then a run of near-full-scale samples
//     (ADC overflow), more normal samples, a switch to bank 1 with a large
//     input (accumulator overflow) and back to bank 0, and a second 1PPS edge
//     that falls on a frame start and must not move the frames.
//  At every output load the host reads the filter output (AD = 1) and the
//  raw input (AD = 0); both and ADC0OVF are compared with the bit-exact
//  reference model of iir_tb_pkg.  Each mechanism is counted, and one that
//  never happens counts as a failure.  Program layout, formats, 128-clock
//  frame and 1PPS behaviour follow the document; the filters, the ADC
//  timing inside the frame and the sequence are this testbench's choices.
module tb_iir_top;
  import iir_pkg::*;
  import iir_tb_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [17:0] adc0 = '0;
  logic        adc0_l = 1'b1;
  logic        adc0_ovf;
  logic [2:0]  sel = 3'd0;
  logic        clk_1pps = 1'b0;
  logic [11:0] ad = '0;
  logic [31:0] d_in = '0, d_out;
  logic        d_oe;
  logic        wr = 1'b0, cs = 1'b0;

  always #5 clk = ~clk;

  iir_top dut (.clk, .rst, .adc0, .adc0_l, .adc0_ovf, .sel, .clk_1pps,
               .ad, .d_in, .d_out, .d_oe, .wr, .cs);

  int checks = 0, failures = 0;
  int n_mem = 0, n_pps = 0, n_out = 0, n_adc_ovf = 0, n_acc_ovf = 0;
  int n_bank = 0, n_toggle = 0, n_period = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  function automatic bit adc_flag(logic [17:0] v);
    return (v[17:6] == 12'h7FF) || (v[17:6] == 12'h800);
  endfunction

  function automatic logic [31:0] adc_value(logic [17:0] v);
    return {{5{v[17]}}, v, 9'b0};
  endfunction

  ref_iir models [2];
  int     cur = 0;

  task automatic host_write(logic [10:0] addr, logic [17:0] data);
    ad = {1'b1, addr}; d_in = {14'b0, data}; wr = 1'b1; cs = 1'b1;
    @(posedge clk); #1;
    cs = 1'b0; wr = 1'b0;
  endtask

  task automatic host_read_mem(logic [10:0] addr, output logic [17:0] data);
    ad = {1'b1, addr}; wr = 1'b0; cs = 1'b1;
    @(posedge clk); #1;
    check(d_oe, "bus driven on read");
    data = d_out[17:0];
    check(d_out[31:18] == '0, "memory read is zero extended");
    cs = 1'b0;
  endtask

  // the program word k of model m, split into host half-words
  function automatic logic [17:0] half(int m, int k, int h);
    logic [35:0] w = mem_word(models[m], k);
    return h ? {w[35:34], w[31:16]} : {w[33:32], w[15:0]};
  endfunction

  initial begin
    #5000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- frame monitor ----------------------------------------------------
  logic [17:0] adc_cur = '0;         // sample in the ADC register
  logic [17:0] latched = '0;         // sample the engine is filtering
  bit          run = 1'b0;           // comparisons enabled (after 1PPS)
  bit          switch_req = 1'b0;    // change bank at the next load
  int          next_bank = 0;
  longint      last_load = -1;
  logic        last_ht;

  always @(posedge clk) begin
    if (run && dut.u_engine.ctl.load_io) begin
      logic [31:0] exp_fil;
      logic        exp_ovf;
      #1;
      if (last_load >= 0) begin
        check(cycle - last_load == FRAME, $sformatf("output period %0d", cycle - last_load));
        n_period++;
        check(dut.ht != last_ht, "history bank toggles every frame");
        if (dut.ht != last_ht) n_toggle++;
      end
      last_load = cycle;
      last_ht   = dut.ht;
      exp_fil = models[cur].step(adc_value(latched), adc_flag(latched), exp_ovf,
                                 int'(adc_flag(adc_cur)));
      ad = 12'h001; wr = 1'b0; cs = 1'b1;
      #1;
      check(d_out == exp_fil, $sformatf("FIL %h exp %h", d_out, exp_fil));
      ad = 12'h000;
      #1;
      check(d_out == adc_value(latched), $sformatf("IOLD %h exp %h", d_out, adc_value(latched)));
      cs = 1'b0;
      check(adc0_ovf == exp_ovf, $sformatf("ADC0OVF %b exp %b", adc0_ovf, exp_ovf));
      if (exp_ovf && adc_flag(latched)) n_adc_ovf++;
      else if (exp_ovf) n_acc_ovf++;
      n_out++;
      latched = adc_cur;
      if (switch_req) begin
        models[next_bank].h1 = models[cur].h1;
        models[next_bank].h2 = models[cur].h2;
        cur = next_bank;
        sel = 3'(next_bank);
        switch_req = 1'b0;
        n_bank++;
      end
    end
  end

  // one ADC conversion per frame, ADC0L falling at program word 115
  task automatic adc_sample(logic [17:0] v);
    do @(posedge clk); while (dut.pc != 7'd114);
    #1;
    adc0   = v;
    #2;
    adc0_l = 1'b0;
    adc_cur = v;
    repeat (4) @(posedge clk);
    #1 adc0_l = 1'b1;
  endtask

  initial begin
    filt_t fa, fh;
    logic [17:0] rd;
    fa = make_filter(7, 1.25, 0.6, 0.3);
    fh = fa;
    for (int j = 0; j < MAX_SOS; j++) fh.sh[j] = 0;
    models[0] = new(fa, 7);
    models[1] = new(fh, 7);

    // 1. load and verify banks 0 and 1 while the engine is held in reset
    repeat (2) @(posedge clk);
    #1;
    for (int m = 0; m < 2; m++)
      for (int k = 0; k < FRAME; k++)
        for (int h = 0; h < 2; h++)
          host_write(11'(m * 256 + 2 * k + h), half(m, k, h));
    for (int m = 0; m < 2; m++)
      for (int k = 0; k < FRAME; k++)
        for (int h = 0; h < 2; h++) begin
          host_read_mem(11'(m * 256 + 2 * k + h), rd);
          check(rd == half(m, k, h), $sformatf("readback %h exp %h", rd, half(m, k, h)));
          if (rd == half(m, k, h)) n_mem++;
        end
    rst = 1'b0;

    // 2. 1PPS restart
    repeat (77) @(posedge clk);
    #1 clk_1pps = 1'b1;
    @(posedge clk); #1;
    check(dut.pc == 7'd1 && dut.ht == 1'b0, "program word 1 after 1PPS");
    if (dut.pc == 7'd1) n_pps++;
    run = 1'b1;
    repeat (20) @(posedge clk);
    #1 clk_1pps = 1'b0;
    begin
      longint t0;
      t0 = cycle;
      while (!dut.u_engine.ctl.load_io) @(posedge clk);
      check(cycle - t0 == 125 - 20, $sformatf("first output 125 clocks after the 1PPS restart (%0d)", cycle - t0 + 20));
    end

    // 3. samples
    for (int n = 0; n < 330; n++) begin
      int v;
      if (n == 5) v = 100000;
      else if (n >= 200 && n < 216) v = (n % 2) ? 131071 - (n % 7) : -131072 + (n % 5);
      else if (n >= 260 && n < 280) v = 120000;
      else v = int'(60000.0 * $sin(0.05 * n)) + int'($urandom_range(0, 400)) - 200;
      if (n == 259) begin next_bank = 1; switch_req = 1'b1; end
      if (n == 285) begin next_bank = 0; switch_req = 1'b1; end
      adc_sample(18'(v));
      if (n == 300) begin
        // second 1PPS edge, on the clock where the counter would reach 1 anyway
        do @(posedge clk); while (dut.pc != 7'd127);
        #1 clk_1pps = 1'b1;
        @(posedge clk); #1;
        check(dut.pc == 7'd1, "aligned 1PPS keeps the frame");
        if (dut.pc == 7'd1) n_pps++;
        repeat (5) @(posedge clk);
        #1 clk_1pps = 1'b0;
      end
    end
    repeat (2) begin
      do @(posedge clk); while (!dut.u_engine.ctl.load_io);
    end
    #5;
    check(n_mem == 2 * 2 * FRAME, "coefficient memory written and read back");
    check(n_pps == 2, "1PPS resynchronisation");
    check(n_out > 320, "filter outputs");
    check(n_period > 320, "frame period checks");
    check(n_toggle > 320, "history bank toggles");
    check(n_adc_ovf > 0, "ADC overflow reported");
    check(n_acc_ovf > 0, "accumulator overflow reported");
    check(n_bank == 2, "bank switches");
    $display("mem=%0d pps=%0d outputs=%0d adc_ovf=%0d acc_ovf=%0d banks=%0d toggles=%0d",
             n_mem, n_pps, n_out, n_adc_ovf, n_acc_ovf, n_bank, n_toggle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
