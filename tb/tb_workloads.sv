// tb_workloads: runs the document's evaluation filters through the full
// design (iir_top at its default size).
//
// The main filters are the low-pass filters used to evaluate the design at
// a 524288 Hz sample rate with a 7400 Hz corner: a 4th order Butterworth
// (BUTTER4, its low-pass half), elliptic filters of order 4 to 14 with 0.1 dB
// ripple and 10 dB of stop-band attenuation per order and a gain of 1.01158
// (ELP4 .. ELP14), and the cascades ELP4_6, ELP6_6 and ELP6_8.  The section
// coefficients below were obtained with a standard filter design routine
// (bilinear transform, poles paired with the nearest zeros, sections ordered
// by increasing pole radius); each section is (1 + b1 z^-1 + b2 z^-2) /
// (1 - a1 z^-1 - a2 z^-2), and K is the overall gain.
//
// For each filter the testbench picks the c0 shifts (0..7 per section) so that
// the gain from the input to each section output stays in [1, 2) where the
// 3-bit shift allows, and sets g = K * 2^(sum of shifts).  g then lies below
// 1 (0.5 .. 1, and about 0.06 for BUTTER4, whose sections each have a DC gain
// near 500 that seven bits of shift cannot absorb).  It loads the program
// into bank 0 or 1 over the host bus while the engine runs the all-zero
// bank 3 (which clears the history), switches to the new bank right after an output, and drives the ADC with the 1 kHz sine of
// amplitude 1 (half of the +-2 input range, 65536 counts) plus one count of
// noise, one conversion per frame.  Checks: every output and ADC0OVF equal
// the bit-exact reference model; the output stays within MAX_ERR counts of
// a double precision evaluation of the same cascade; no overflow occurs; and
// the settled sine amplitude is the pass-band gain (0.98 .. 1.03).
//
// Range runs repeat the document's range measurements: a square wave of
// amplitude 1.99 whose frequency sweeps linearly 1 kHz .. 10 kHz (ELP8,
// ELP10, ELP12, ELP14, ELP4_6) or 160 Hz .. 1.6 kHz (ELP8) over 8192 samples,
// and ELP8 with sines of amplitude 1.0 at 1 kHz and 10 kHz.  The largest
// magnitude written to the history file, as a fraction of the 35-bit range
// (2^34), must lie between 0.5 and 4 times the figure the document lists
// for that run (7.0, 5.8, 6.3, 7.5, 6.3, 6.9, 3.0 and 2.6 %).  The upper factor
// allows for this testbench's shift choice, which differs from the
// document's: ELP14's first sections need more than 7 bits of shift, which
// raises its later sections (about 21 % against 7.5 %).
//
// A second set has the elliptic filters with a 925 Hz corner, the first stage
// of a decimation towards 2048 Hz, driven with the 1 kHz sine of amplitude 1.
// Their poles sit much closer to z = 1, and the deviation from double
// precision grows to several counts; the limit for these runs is 40 counts
// instead of MAX_ERR, and the pass-band gain is not checked (1 kHz lies
// just above the corner).
// Filters, stimulus and error bounds follow the document's evaluation; the
// shift selection and the pass/fail limits are this testbench's choices.
module tb_workloads;
  import iir_pkg::*;
  import iir_tb_pkg::*;

  localparam int NF = 13;
  localparam string NAMES [NF] = '{"BUTTER4", "ELP4", "ELP6", "ELP8", "ELP10", "ELP12", "ELP14", "ELP4_925", "ELP6_925", "ELP8_925", "ELP10_925", "ELP12_925", "ELP14_925"};
  localparam real   K [NF] = '{3.4517918881415031e-06, 0.0098249114561968411, 0.0010004310061925935, 0.00010235746765960892, 1.051784454299466e-05, 1.0850903053700017e-06, 1.1235945305258544e-07, 0.010024854901278697, 0.0010031579152222851, 0.00010036536598999689, 1.0041592370708554e-05, 1.0047164593186828e-06, 1.0053383566811385e-07};
  localparam int    FIRST [NF] = '{0, 2, 4, 7, 11, 16, 22, 29, 31, 34, 38, 43, 49};
  localparam int    NSEC [NF] = '{2, 2, 3, 4, 5, 6, 7, 2, 3, 4, 5, 6, 7};
  localparam real   SEC [56][4] = '{
    '{2, 1, 1.8414622343276803, -0.84872733363738084},
    '{2, 1, 1.9268339621862529, -0.9344358775704682},
    '{-1.8315743900820141, 1, 1.8818894553457306, -0.88743219317856759},
    '{-1.9666597825706174, 0.99999999999999978, 1.953134753954419, -0.96308836417729282},
    '{-1.7902550616480877, 1.0000000000000002, 1.9152163619092148, -0.91786829485534693},
    '{-1.9669648655177414, 1.0000000000000002, 1.9454489360177905, -0.95148219221543695},
    '{-1.9801834876345319, 1, 1.9768494638985397, -0.98543499949725721},
    '{-1.725740657083245, 0.99999999999999978, 1.933346503230803, -0.93493776016265351},
    '{-1.9603784178789858, 1, 1.9492364528431567, -0.95329550289499798},
    '{-1.9797688086296708, 1, 1.9683310829650098, -0.97506190751542277},
    '{-1.9841326056110853, 0.99999999999999989, 1.9842548779800335, -0.99246796893234734},
    '{-1.6475551623412295, 1, 1.9449033574382435, -0.94597436398384926},
    '{-1.9509846648000564, 1, 1.9542148959586478, -0.95712629131186588},
    '{-1.9770724802418038, 0.99999999999999978, 1.9668562394561528, -0.9721514106420549},
    '{-1.9838149411242019, 0.99999999999999989, 1.9781322877865886, -0.98526123925956222},
    '{-1.9859207480001699, 0.99999999999999989, 1.9874099173846922, -0.99547486615941361},
    '{-1.5591728349816041, 0.99999999999999978, 1.9529684682419, -0.9537420565224517},
    '{-1.9395453541065797, 0.99999999999999989, 1.9588330605899373, -0.96101960512983697},
    '{-1.9732613883024466, 1.0000000000000004, 1.9675222171530282, -0.97174906472728795},
    '{-1.9823296915856974, 0.99999999999999978, 1.9759919591970212, -0.98207269775505746},
    '{-1.9856944812161788, 0.99999999999999967, 1.9830426100984233, -0.99040027806196107},
    '{-1.9869197389108917, 0.99999999999999978, 1.9890159258246842, -0.99700847607193122},
    '{-1.4628415568519486, 0.99999999999999978, 1.9589383009668828, -0.95952470575109805},
    '{-1.9263212058862091, 0.99999999999999989, 1.9628319119810849, -0.96453246006000493},
    '{-1.9686306869214241, 0.99999999999999978, 1.9689715336908054, -0.97240103084521134},
    '{-1.9802170573102305, 0.99999999999999978, 1.9754298559265968, -0.98060765519370097},
    '{-1.9847475657521469, 0.99999999999999989, 1.9810989769470271, -0.98767341422777066},
    '{-1.9867542109464265, 1.0000000000000002, 1.9858024266356518, -0.99329945475062198},
    '{-1.9875511076930492, 0.99999999999999978, 1.9899346872803882, -0.99788690208278874},
    '{-1.9972580947087755, 1, 1.985097278535527, -0.98518838355093941},
    '{-1.9994754270408621, 1.0000000000000002, 1.9951433652098829, -0.99530163350513812},
    '{-1.996548820347509, 0.99999999999999978, 1.9893075570443783, -0.98935051168962374},
    '{-1.9994802665421434, 0.99999999999999956, 1.9937019908391225, -0.99379832696115533},
    '{-1.9996892509769861, 1.0000000000000004, 1.9980298557716929, -0.99816497830779982},
    '{-1.9954104553012171, 1, 1.9916053762327597, -0.99163094544764785},
    '{-1.9993756232606987, 0.99999999999999989, 1.9939731850864286, -0.99403791331011093},
    '{-1.9996827157256536, 0.99999999999999978, 1.9967387291561154, -0.99684509946175492},
    '{-1.9997514211210841, 1.0000000000000002, 1.9989252252648495, -0.99905407432084337},
    '{-1.9939778117779747, 1, 1.9930687700479282, -0.99308589218935528},
    '{-1.999225784344824, 0.99999999999999989, 1.9944915325780481, -0.9945378668253636},
    '{-1.9996401894557418, 1.0000000000000002, 1.9963898483810441, -0.99647360845103883},
    '{-1.9997464246822261, 1.0000000000000002, 1.9980314490332118, -0.99814361532446794},
    '{-1.9997795315907245, 1.0000000000000002, 1.9993061199635453, -0.99943247317254036},
    '{-1.9922838604018791, 0.99999999999999978, 1.9940886468010177, -0.99410097029450295},
    '{-1.9990423672847384, 0.99999999999999989, 1.9950086582747657, -0.99504339001447761},
    '{-1.999579984327589, 0.99999999999999978, 1.9963561202351585, -0.99642297546282455},
    '{-1.9997230532767418, 1.0000000000000002, 1.9976436348439137, -0.99773941846736558},
    '{-1.9997759759386939, 0.99999999999999989, 1.9986780475515131, -0.99879355712747675},
    '{-1.9997952254078579, 1, 1.9994999401732874, -0.999625072579159},
    '{-1.9903408441981485, 0.99999999999999989, 1.9948426227969809, -0.9948519398977953},
    '{-1.9988290215274682, 1.0000000000000002, 1.9954706979766936, -0.9954976645272009},
    '{-1.9995066783892392, 0.99999999999999989, 1.9964530122403912, -0.99650722947167059},
    '{-1.9996897799691593, 0.99999999999999989, 1.9974720515478077, -0.9975536465912741},
    '{-1.9997610913958419, 1.0000000000000002, 1.9983459810404092, -0.99844929849299291},
    '{-1.9997926255533491, 1.0000000000000002, 1.9990414033431338, -0.99915895480281403},
    '{-1.9998051400109538, 1.0000000000000002, 1.9996108186701396, -0.99973527034979803}
  };

  localparam int    SAMPLES = 3000;   // per sine run
  localparam int    SWEEP   = 8192;   // per square wave sweep
  localparam int    SETTLE  = 1952;   // amplitude measured after this sample
  localparam real   AMPL    = 65536.0;
  localparam real   MAX_ERR = 1.0;    // counts
  localparam real   TWO_PI  = 6.283185307179586;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [17:0] adc0 = '0;
  logic        adc0_l = 1'b1;
  logic        adc0_ovf;
  logic [2:0]  sel = 3'd3;
  logic        clk_1pps = 1'b0;
  logic [11:0] ad = '0;
  logic [31:0] d_in = '0, d_out;
  logic        d_oe;
  logic        wr = 1'b0, cs = 1'b0;

  always #5 clk = ~clk;

  iir_top dut (.clk, .rst, .adc0, .adc0_l, .adc0_ovf, .sel, .clk_1pps,
               .ad, .d_in, .d_out, .d_oe, .wr, .cs);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  function automatic logic [31:0] adc_value(logic [17:0] v);
    return {{5{v[17]}}, v, 9'b0};
  endfunction

  // filter from a list of table entries (cascades are concatenations)
  function automatic filt_t build(int ids [], output real k_out, output int nsec);
    filt_t f;
    real   k, cum, d;
    int    s, tot;
    k = 1.0; s = 0;
    foreach (ids[i]) begin
      k = k * K[ids[i]];
      for (int j = 0; j < NSEC[ids[i]]; j++) begin
        f.b1[s] = SEC[FIRST[ids[i]] + j][0];
        f.b2[s] = SEC[FIRST[ids[i]] + j][1];
        f.a1[s] = SEC[FIRST[ids[i]] + j][2];
        f.a2[s] = SEC[FIRST[ids[i]] + j][3];
        s++;
      end
    end
    nsec = s;
    for (int j = s; j < MAX_SOS; j++) begin
      f.b1[j] = 0.0; f.b2[j] = 0.0; f.a1[j] = 0.0; f.a2[j] = 0.0;
    end
    // shifts: keep the gain from the input to each section output in [1, 2)
    // as far as 0..7 allows, starting from a unity input gain
    cum = 1.0; tot = 0;
    for (int j = 0; j < MAX_SOS; j++) begin
      f.sh[j] = 0;
      if (j < s) begin
        d = (1.0 + f.b1[j] + f.b2[j]) / (1.0 - f.a1[j] - f.a2[j]);
        cum = cum * d;
        while (cum >= 2.0 && f.sh[j] < 7) begin
          cum = cum / 2.0;
          f.sh[j]++;
        end
        tot += f.sh[j];
      end
    end
    f.g   = k * real'(longint'(1) << tot);
    k_out = k;
    return f;
  endfunction

  ref_iir model;
  int     n_out = 0;
  real    max_err = 0.0, peak = 0.0;
  int     n_ovf = 0;
  bit     active = 1'b0;
  bit     switch_req = 1'b0;
  int     next_bank = 0;
  logic [17:0] adc_cur = '0, latched = '0;
  int     sample_no = 0;

  initial begin
    #1500000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor: compare at every load word
  always @(posedge clk) begin
    if (!rst && dut.u_engine.ctl.load_io) begin
      logic [31:0] exp_fil;
      logic        exp_ovf;
      real         id, err, y;
      #1;
      if (active) begin
        exp_fil = model.step(adc_value(latched), 1'b0, exp_ovf);
        id      = model.ideal(real'($signed(latched)));
        ad = 12'h001; wr = 1'b0; cs = 1'b1;
        #1;
        check(d_out == exp_fil, $sformatf("FIL %h exp %h", d_out, exp_fil));
        cs = 1'b0;
        check(adc0_ovf == exp_ovf, "ADC0OVF matches the model");
        check(!adc0_ovf, "no overflow");
        if (adc0_ovf) n_ovf++;
        y   = real'($signed(d_out)) / 512.0;
        err = id - y;
        if (err < 0.0) err = -err;
        if (err > max_err) max_err = err;
        if (sample_no > SETTLE && (y > peak || -y > peak)) peak = (y > 0.0) ? y : -y;
        n_out++;
      end
      latched = adc_cur;
      if (switch_req) begin
        sel        = 3'(next_bank);
        active     = (next_bank != 3);
        switch_req = 1'b0;
      end
    end
  end

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

  task automatic host_write(logic [10:0] addr, logic [17:0] data);
    ad = {1'b1, addr}; d_in = {14'b0, data}; wr = 1'b1; cs = 1'b1;
    @(posedge clk); #1;
    cs = 1'b0; wr = 1'b0;
  endtask

  // largest stored history value of a run (range check)
  real max_val = 0.0;
  always @(posedge clk) begin
    if (active && dut.u_engine.ctl.hist_we) begin
      real a;
      a = real'($signed(dut.u_engine.value));
      if (a < 0.0) a = -a;
      if (a > max_val) max_val = a;
    end
  end

  // kind 0: sine at f0 with amplitude ampl (full scale 2.0);
  // kind 1: square wave sweeping linearly from f0 to f1.
  // table_pct >= 0: range used as listed by the document for this run.
  task automatic run(string name, int ids [], int kind, real f0, real f1, real ampl,
                     int samples, real table_pct, real err_lim = MAX_ERR,
                     bit pass_band = 1'b1);
    filt_t f;
    real   k, gain, pct, phase, a_counts;
    int    ns, bank;
    f    = build(ids, k, ns);
    bank = n_runs % 2;
    check(f.g >= 0.0 && f.g < 2.0, $sformatf("%s: gain g = %f in range", name, f.g));
    model = new(f, MAX_SOS);
    // load while the engine runs the zero bank
    for (int w = 0; w < FRAME; w++) begin
      logic [35:0] word = mem_word(model, w);
      host_write(11'(bank * 256 + 2 * w),     {word[33:32], word[15:0]});
      host_write(11'(bank * 256 + 2 * w + 1), {word[35:34], word[31:16]});
    end
    // two frames of zero input on the zero bank clear both history banks
    repeat (3) adc_sample('0);
    next_bank = bank; switch_req = 1'b1;
    do @(posedge clk); while (switch_req);
    max_err = 0.0; peak = 0.0; n_ovf = 0; max_val = 0.0;
    a_counts = ampl / 2.0 * 131072.0;
    phase = 0.0;
    for (int n = 0; n < samples; n++) begin
      real v;
      sample_no = n;
      v = a_counts * $sin(phase);
      if (kind == 1) v = (v >= 0.0) ? a_counts : -a_counts;
      phase += TWO_PI * (f0 + (f1 - f0) * real'(n) / real'(samples)) / 524288.0;
      adc_sample(18'(int'(v) + int'($urandom_range(0, 2)) - 1));
    end
    // back to the zero bank
    next_bank = 3; switch_req = 1'b1;
    do @(posedge clk); while (switch_req);
    gain = peak / a_counts;
    pct  = 100.0 * max_val / 17179869184.0;
    check(max_err < err_lim, $sformatf("%s: max deviation from double precision %f counts", name, max_err));
    if (kind == 0 && pass_band)
      check(gain > 0.98 && gain < 1.03, $sformatf("%s: pass-band gain %f", name, gain));
    check(n_ovf == 0 && pct < 100.0, $sformatf("%s: range used %f %%", name, pct));
    if (table_pct >= 0.0)
      check(pct > 0.5 * table_pct && pct < 4.0 * table_pct,
            $sformatf("%s: range used %.2f %% against %.1f %%", name, pct, table_pct));
    $display("%-8s %-22s sections=%0d g=%f shifts=%0d,%0d,%0d,%0d,%0d,%0d,%0d max_err=%.4f counts gain=%.5f range=%.2f%%%s",
             name, kind ? $sformatf("square %0.0f-%0.0f Hz", f0, f1) : $sformatf("sine %0.0f Hz", f0),
             ns, f.g, f.sh[0], f.sh[1], f.sh[2], f.sh[3], f.sh[4], f.sh[5], f.sh[6], max_err,
             kind ? 0.0 : gain, pct,
             table_pct >= 0.0 ? $sformatf(" (document %.1f%%)", table_pct) : "");
    n_runs++;
    n_samples += samples;
  endtask

  int n_runs = 0, n_samples = 0;

  initial begin
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    // the filters, 1 kHz sine of amplitude 1.0
    run("BUTTER4", '{0},    0, 1000.0, 0.0, 1.0, SAMPLES, -1.0);
    run("ELP4",    '{1},    0, 1000.0, 0.0, 1.0, SAMPLES, -1.0);
    run("ELP6",    '{2},    0, 1000.0, 0.0, 1.0, SAMPLES, -1.0);
    run("ELP8",    '{3},    0, 1000.0, 0.0, 1.0, SAMPLES, 3.0);
    run("ELP10",   '{4},    0, 1000.0, 0.0, 1.0, SAMPLES, -1.0);
    run("ELP12",   '{5},    0, 1000.0, 0.0, 1.0, SAMPLES, -1.0);
    run("ELP14",   '{6},    0, 1000.0, 0.0, 1.0, SAMPLES, -1.0);
    run("ELP4_6",  '{1, 2}, 0, 1000.0, 0.0, 1.0, SAMPLES, -1.0);
    run("ELP6_6",  '{2, 2}, 0, 1000.0, 0.0, 1.0, SAMPLES, -1.0);
    run("ELP6_8",  '{2, 3}, 0, 1000.0, 0.0, 1.0, SAMPLES, -1.0);
    // range: square wave sweeps of amplitude 1.99 and a 10 kHz sine
    run("ELP8",    '{3},    1, 1000.0, 10000.0, 1.99, SWEEP, 7.0);
    run("ELP10",   '{4},    1, 1000.0, 10000.0, 1.99, SWEEP, 5.8);
    run("ELP12",   '{5},    1, 1000.0, 10000.0, 1.99, SWEEP, 6.3);
    run("ELP14",   '{6},    1, 1000.0, 10000.0, 1.99, SWEEP, 7.5);
    run("ELP4_6",  '{1, 2}, 1, 1000.0, 10000.0, 1.99, SWEEP, 6.3);
    run("ELP8",    '{3},    1, 160.0,  1600.0,  1.99, SWEEP, 6.9);
    run("ELP8",    '{3},    0, 10000.0, 0.0,    1.0,  SAMPLES, 2.6);
    // 925 Hz corner, 1 kHz sine of amplitude 1.0 (just above the corner)
    run("ELP4_925",  '{7},  0, 1000.0, 0.0, 1.0, SAMPLES, -1.0, 40.0, 1'b0);
    run("ELP6_925",  '{8},  0, 1000.0, 0.0, 1.0, SAMPLES, -1.0, 40.0, 1'b0);
    run("ELP8_925",  '{9},  0, 1000.0, 0.0, 1.0, SAMPLES, -1.0, 40.0, 1'b0);
    run("ELP10_925", '{10}, 0, 1000.0, 0.0, 1.0, SAMPLES, -1.0, 40.0, 1'b0);
    run("ELP12_925", '{11}, 0, 1000.0, 0.0, 1.0, SAMPLES, -1.0, 40.0, 1'b0);
    run("ELP14_925", '{12}, 0, 1000.0, 0.0, 1.0, SAMPLES, -1.0, 40.0, 1'b0);
    check(n_runs == 23, "all runs done");
    check(n_out >= n_samples, "outputs compared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
