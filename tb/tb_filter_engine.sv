// tb_filter_engine: checks the IIR engine sample by sample against the
// bit-exact reference model, and loosely against a double precision cascade.
//
// The testbench plays the coefficient memory: a 128-word program (iir_pkg
// microcode plus the coefficients of a 7-section test filter) is read at an
// 8-bit counter with one clock of read latency, bit 7 being the history bank
// toggle.  Input values change mid-frame; at every program word with load_io
// the engine's output must equal the reference output for the sample latched
// at the previous load, IOLD must be that sample, and exactly 128 clocks must
// separate two outputs.  A second phase drives near-full-scale overflow (IOVF)
// and an input large enough to overflow the accumulator.  IOVF changes
// together with the latched input, so it holds for the whole frame that
// filters that input.  Reset is held for eight clocks; the checks hold for
// any power-up register contents.
module tb_filter_engine;
  import iir_pkg::*;
  import iir_tb_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [31:0] i_val = '0;
  logic        iovf = 1'b0;
  logic        iovf_pend = 1'b0;  // IOVF of i_val, applied when it is latched
  logic [17:0] coef, ctrl;
  logic        ht;
  logic        ovf;
  logic [31:0] iold, fil;

  always #5 clk = ~clk;

  filter_engine dut (.clk, .rst, .i(i_val), .iovf, .coef, .c(ctrl), .ht, .ovf, .iold, .fil);

  logic [35:0] prog [128];
  logic [7:0]  pc;
  ctrl_t       cw;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc   <= 8'd0;
      coef <= '0;
      ctrl <= '0;
    end else begin
      pc   <= pc + 8'd1;
      coef <= prog[pc[6:0]][17:0];
      ctrl <= prog[pc[6:0]][35:18];
    end
  end
  assign ht = pc[7];
  assign cw = ctrl_t'(ctrl);

  int checks = 0, failures = 0;
  int n_out = 0, n_iovf = 0, n_accovf = 0, n_max_err = 0;
  real max_err = 0.0;

  ref_iir      model;
  filt_t       f;
  logic [31:0] latched, prev_latched;
  logic        latched_iovf;
  logic        have_latched = 1'b0;
  logic        seen_ovf = 1'b0;
  longint      last_load_cycle = -1, cycle = 0;

  always @(posedge clk) cycle++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  function automatic logic [31:0] adc_value(int counts);
    logic [17:0] a = 18'(counts);
    return {{5{a[17]}}, a, 9'b0};
  endfunction

  // at the load word: compare, then the engine latches i_val
  always @(posedge clk) begin
    if (!rst && cw.load_io) begin
      logic        exp_ovf;
      logic [31:0] exp_fil;
      real         id, err;
      #1;
      if (last_load_cycle >= 0) check(cycle - last_load_cycle == FRAME, "output period 128 clocks");
      last_load_cycle = cycle;
      if (have_latched) begin
        exp_fil = model.step(latched, latched_iovf, exp_ovf);
        id      = model.ideal(real'($signed(latched)) / 512.0);
        check(fil == exp_fil, $sformatf("fil %h exp %h", fil, exp_fil));
        check(ovf == exp_ovf, $sformatf("ovf %b exp %b", ovf, exp_ovf));
        check(iold == latched, "iold is the sample of this output");
        if (exp_ovf && latched_iovf) n_iovf++;
        else if (exp_ovf) n_accovf++;
        if (exp_ovf) seen_ovf = 1'b1;
        if (!seen_ovf) begin
          err = id - real'($signed(fil)) / 512.0;
          if (err < 0) err = -err;
          if (err > max_err) max_err = err;
          check(err < 0.05, $sformatf("ideal %f rtl %f", id, real'($signed(fil)) / 512.0));
        end
        n_out++;
      end
      latched      = i_val;
      latched_iovf = iovf_pend;
      iovf         = iovf_pend;
      have_latched = 1'b1;
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    f     = make_filter(7, 1.5, 0.55, 0.35);
    model = new(f, 7);
    for (int k = 0; k < 128; k++) prog[k] = mem_word(model, k);
    // the engine starts from a zero input register and cleared history
    latched = '0; latched_iovf = 1'b0; have_latched = 1'b1;
    repeat (8) @(posedge clk);
    rst <= 1'b0;
    // phase 1: 300 samples of sine plus noise, an impulse and a step
    for (int n = 0; n < 300; n++) begin
      int v;
      do @(posedge clk); while (pc[6:0] != 7'd60);
      if (n == 5) v = 60000;
      else if (n >= 150 && n < 200) v = -40000;
      else v = int'(30000.0 * $sin(0.07 * n)) + int'($urandom_range(0, 200)) - 100;
      i_val = adc_value(v);
      @(posedge clk);
    end
    // phase 2: near full scale with the input overflow flag, then
    // a large gain input that overflows the accumulator
    for (int n = 0; n < 40; n++) begin
      do @(posedge clk); while (pc[6:0] != 7'd60);
      i_val = adc_value((n % 2) ? 131071 : -131072);
      iovf_pend = (n < 10);
      @(posedge clk);
    end
    iovf_pend = 1'b0;
    do @(posedge clk); while (pc[6:0] != 7'd60);
    i_val = 32'h7FFF_FFFF;
    @(posedge clk);
    do @(posedge clk); while (pc[6:0] != 7'd60);
    i_val = 32'h8000_0000;
    @(posedge clk);
    repeat (3) begin
      do @(posedge clk); while (pc[6:0] != 7'd60);
      @(posedge clk);
    end
    check(n_out > 300, "outputs observed");
    check(n_iovf > 0, "input overflow exercised");
    check(n_accovf > 0, "accumulator overflow exercised");
    $display("outputs=%0d input_overflows=%0d accumulator_overflows=%0d max_ideal_err=%g counts",
             n_out, n_iovf, n_accovf, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
