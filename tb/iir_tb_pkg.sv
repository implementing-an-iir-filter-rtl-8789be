// iir_tb_pkg: reference models and helpers shared by the IIR testbenches.
//
// ref_iir is a sample-by-sample model of the filter written from the number
// formats rather than from the pipeline: each 35x35 product is the sum of its
// four 18x18 partial products, each aligned and truncated by 25 bits on its
// own, as the hardware does; section outputs are stored as 35-bit history
// values (accumulator bits 42:8, or the overflow marker) and the accumulator
// carries on at full precision into the next section.  ideal_iir is the same
// cascade in double precision with the quantised coefficients, for a sanity
// check of the scaling.  mem_word builds a 36-bit program word as the host
// stores it.
package iir_tb_pkg;
  import iir_pkg::*;

  typedef struct {
    real g;
    real b1 [MAX_SOS];
    real b2 [MAX_SOS];
    real a1 [MAX_SOS];  // y = c0*(x + b1 x1 + b2 x2) + a1 y1 + a2 y2
    real a2 [MAX_SOS];
    int  sh [MAX_SOS];  // c0 = 2^-sh
  } filt_t;

  // Real coefficient to 35-bit fixed point with 33 fraction bits.
  function automatic logic [34:0] to_coef(real r);
    real s;
    longint v;
    s = r * 8589934592.0;  // 2^33
    v = (s >= 0.0) ? longint'(s + 0.5) : -longint'(-s + 0.5);
    if (v > 64'sd17179869183) v = 64'sd17179869183;
    if (v < -64'sd17179869184) v = -64'sd17179869184;
    return v[34:0];
  endfunction

  function automatic real coef_real(logic [34:0] c);
    longint v;
    v = longint'($signed(c));
    return real'(v) / 8589934592.0;
  endfunction

  // One 35x35 product as the hardware forms it, in accumulator units.
  function automatic logic [47:0] mac_product(logic [34:0] c, logic [34:0] v);
    logic signed [72:0] ll, lm, ml, mm;
    logic signed [17:0] cl, vl, cm, vm;
    cl = {1'b0, c[16:0]};
    vl = {1'b0, v[16:0]};
    cm = c[34:17];
    vm = v[34:17];
    ll = 73'(cl * vl);
    lm = 73'(cl * vm) <<< 17;
    ml = 73'(cm * vl) <<< 17;
    mm = 73'(cm * vm) <<< 34;
    return 48'(ll >>> 25) + 48'(lm >>> 25) + 48'(ml >>> 25) + 48'(mm >>> 25);
  endfunction

  function automatic logic [34:0] to_value(logic [47:0] acc, logic iovf, output logic ovf);
    ovf = iovf || (acc[47:42] != {6{acc[47]}});
    if (!ovf) return acc[42:8];
    return acc[36] ? {6'b111111, 29'b0} : {6'b000000, {29{1'b1}}};
  endfunction

  class ref_iir;
    logic [34:0] c_g;
    logic [34:0] c_b1 [MAX_SOS], c_b2 [MAX_SOS], c_a1 [MAX_SOS], c_a2 [MAX_SOS];
    int          sh [MAX_SOS];
    int          n_sos;
    logic [34:0] h1 [MAX_SOS+1], h2 [MAX_SOS+1];
    real         r1 [MAX_SOS+1], r2 [MAX_SOS+1];
    int          overflows;

    function new(filt_t f, int n);
      n_sos = n;
      c_g   = to_coef(f.g);
      for (int j = 0; j < MAX_SOS; j++) begin
        c_b1[j] = (j < n) ? to_coef(f.b1[j]) : '0;
        c_b2[j] = (j < n) ? to_coef(f.b2[j]) : '0;
        c_a1[j] = (j < n) ? to_coef(f.a1[j]) : '0;
        c_a2[j] = (j < n) ? to_coef(f.a2[j]) : '0;
        sh[j]   = (j < n) ? f.sh[j] : 0;
      end
      clear();
    endfunction

    function void clear();
      for (int s = 0; s <= MAX_SOS; s++) begin
        h1[s] = '0; h2[s] = '0; r1[s] = 0.0; r2[s] = 0.0;
      end
      overflows = 0;
    endfunction

    // Bit-exact step over all MAX_SOS program sections; sections beyond
    // n_sos have zero coefficients and pass their input through.
    // last_iovf (0/1) overrides the input overflow flag for the final value
    // only: in the full design the ADC register, and so its flag, changes
    // a few clocks before the end of the frame.
    function logic [31:0] step(logic [31:0] x, logic iovf, output logic ovf_any,
                               input int last_iovf = -1);
      logic [47:0] acc;
      logic [34:0] nv [MAX_SOS+1];
      logic        o;
      ovf_any = 1'b0;
      acc = mac_product(c_g, {x, 3'b000});
      for (int j = 0; j < MAX_SOS; j++) begin
        nv[j] = to_value(acc, iovf, o);
        ovf_any |= o;
        acc = acc + mac_product(c_b2[j], h2[j]) + mac_product(c_b1[j], h1[j]);
        acc = 48'($signed(acc) >>> sh[j]);
        acc = acc + mac_product(c_a2[j], h2[j+1]) + mac_product(c_a1[j], h1[j+1]);
      end
      nv[MAX_SOS] = to_value(acc, (last_iovf < 0) ? iovf : last_iovf[0], o);
      ovf_any |= o;
      if (ovf_any) overflows++;
      for (int s = 0; s <= MAX_SOS; s++) begin
        h2[s] = h1[s];
        h1[s] = nv[s];
      end
      return nv[MAX_SOS][34:3];
    endfunction

    // Double precision cascade with the same quantised coefficients; input and
    // output in ADC counts.
    function real ideal(real x);
      real v, y, nvr [MAX_SOS+1];
      v = coef_real(c_g) * x;
      for (int j = 0; j < MAX_SOS; j++) begin
        nvr[j] = v;
        y = (v + coef_real(c_b1[j]) * r1[j] + coef_real(c_b2[j]) * r2[j]) / real'(1 << sh[j])
            + coef_real(c_a1[j]) * r1[j+1] + coef_real(c_a2[j]) * r2[j+1];
        v = y;
      end
      nvr[MAX_SOS] = v;
      for (int s = 0; s <= MAX_SOS; s++) begin
        r2[s] = r1[s];
        r1[s] = nvr[s];
      end
      return v;
    endfunction
  endclass

  // 36-bit program word k of a bank: {ctrl[17:14], ctrl[13:0], coefficient half}.
  function automatic logic [35:0] mem_word(ref_iir f, int unsigned k);
    logic [17:0] ctl, cf;
    int unsigned j, o;
    ctl = microcode(k, MAX_SOS);
    cf  = '0;
    if (k == 127 || k == 1)      cf = {1'b0, f.c_g[16:0]};
    else if (k == 0 || k == 2)   cf = f.c_g[34:17];
    else if (k >= SEC_BASE && k < SEC_BASE + SEC_WORDS * MAX_SOS) begin
      j = (k - SEC_BASE) / SEC_WORDS;
      o = (k - SEC_BASE) % SEC_WORDS;
      case (o)
        0, 2:   cf = {1'b0, f.c_b2[j][16:0]};
        1, 3:   cf = f.c_b2[j][34:17];
        4, 6:   cf = {1'b0, f.c_b1[j][16:0]};
        5, 7:   cf = f.c_b1[j][34:17];
        8:      cf = 18'(f.sh[j]);
        9, 11:  cf = {1'b0, f.c_a2[j][16:0]};
        10, 12: cf = f.c_a2[j][34:17];
        13, 15: cf = {1'b0, f.c_a1[j][16:0]};
        default: cf = f.c_a1[j][34:17];
      endcase
    end
    return {ctl, cf};
  endfunction

  // A low-pass style test filter: n sections with poles at radius r and angle
  // th, zeros near z = -1, c0 chosen so that the DC gain from the input to
  // each section output stays in [1, 2) (gain g itself must be in [1, 2)).
  function automatic filt_t make_filter(int n, real g, real r0, real th0);
    filt_t f;
    real r, th, dc, cum;
    f.g = g;
    cum = g;
    for (int j = 0; j < MAX_SOS; j++) begin
      r  = r0 + 0.04 * j;
      th = th0 * (1.0 + 0.15 * j);
      f.a1[j] = 2.0 * r * $cos(th);
      f.a2[j] = -r * r;
      f.b1[j] = 1.6 - 0.05 * j;
      f.b2[j] = 0.9;
      dc = (1.0 + f.b1[j] + f.b2[j]) / (1.0 - f.a1[j] - f.a2[j]);
      cum = cum * dc;
      f.sh[j] = 0;
      while (cum >= 2.0 && f.sh[j] < 7) begin
        cum = cum / 2.0;
        f.sh[j]++;
      end
    end
    return f;
  endfunction

endpackage
