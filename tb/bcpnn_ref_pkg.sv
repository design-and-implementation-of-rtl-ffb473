// bcpnn_ref_pkg: floating-point reference model of the BCPNN learning rule and
// inference step, used by the testbenches to check the fixed-point hardware.
// It evaluates the closed-form lazy-update solutions with real arithmetic and
// the library exponential, independently of the lookup tables, truncating
// multipliers and conversions of the RTL.
package bcpnn_ref_pkg;
  import bcpnn_pkg::*;

  typedef struct {
    real z;
    real e;
    real p;
  } tr_t;

  // Z, E, P after dt steps of decay from state s (time constant tz for Z),
  // then a spike of amplitude sp added to Z.
  function automatic tr_t lazy(tr_t s, real dt, real tz, real sp);
    tr_t r;
    real ez, ee, ep, a, b, c;
    ez = $exp(-dt / tz);
    ee = $exp(-dt / TAU_E);
    ep = $exp(-dt / TAU_P);
    a  = tz / (tz - TAU_E);
    b  = tz / (tz - TAU_P);
    c  = TAU_E / (TAU_E - TAU_P);
    r.z = s.z * ez + sp;
    r.e = s.e * ee + a * s.z * (ez - ee);
    r.p = s.p * ep + a * b * (ez - ep) * s.z + (s.e - a * s.z) * c * (ee - ep);
    return r;
  endfunction

  function automatic real weight(real pi, real pj, real pij);
    return $ln((pij + EPS * EPS) / ((pi + EPS) * (pj + EPS)));
  endfunction

  function automatic real bias(real pj);
    return $ln(pj + EPS);
  endfunction

  // IEEE single bits to real and back (round to nearest), written out here
  // so that the checks do not depend on simulator shortreal support.
  function automatic real f2r(logic [31:0] f);
    real m;
    if (f[30:23] == 8'd0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    m = m * $pow(2.0, real'(int'(f[30:23]) - 127));
    return f[31] ? -m : m;
  endfunction

  function automatic logic [31:0] r2f(real x);
    logic [63:0] d;
    int          e;
    logic [23:0] m;
    if (x == 0.0) return '0;
    d = $realtobits(x);
    e = int'(d[62:52]) - 1023 + 127;
    m = 24'(d[51:29]) + 24'(d[28]);           // 23 bits, rounded
    if (m[23]) begin m = '0; e++; end
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic real absr(real x);
    return x < 0.0 ? -x : x;
  endfunction
  typedef struct {
    int  i;
    int  j;
    real v;
  } wr_t;

  // Training half: post vector every step, rows of spiking inputs, columns
  // of spiking MCUs; expected weight and bias writes in issue order.
  class train_model;
    int     n_in, n_mcu;
    tr_t    pre [], post [];
    longint t_pre [], t_post [];
    tr_t    syn [][];
    longint t_syn [][];
    wr_t    w_exp [$];
    wr_t    b_exp [$];
    int     rows, cols, skipped, saturated;

    function new(int ni, int nm);
      n_in = ni; n_mcu = nm;
      pre = new[ni]; t_pre = new[ni]; post = new[nm]; t_post = new[nm];
      syn = new[ni]; t_syn = new[ni];
      foreach (syn[i]) begin syn[i] = new[nm]; t_syn[i] = new[nm]; end
      foreach (pre[i]) begin pre[i] = '{0.0, 0.0, 0.0}; t_pre[i] = 0; end
      foreach (post[j]) begin post[j] = '{0.0, 0.0, 0.0}; t_post[j] = 0; end
      foreach (syn[i, j]) begin syn[i][j] = '{0.0, 0.0, 0.0}; t_syn[i][j] = 0; end
      rows = 0; cols = 0; skipped = 0; saturated = 0;
    endfunction

    static function real sat_dt(longint d);
      return real'(d > 1023 ? 1023 : d);
    endfunction

    function void syn_update(int i, int j, longint t);
      tr_t r;
      if (t - t_syn[i][j] > 1023) saturated++;
      r = lazy(syn[i][j], sat_dt(t - t_syn[i][j]), TAU_ZIJ, 0.0);
      r.z = pre[i].z * $exp(-sat_dt(t - t_pre[i]) / TAU_ZI) * post[j].z;
      syn[i][j] = r;
      t_syn[i][j] = t;
      w_exp.push_back('{i, j, weight(pre[i].p, post[j].p, r.p)});
    endfunction

    function void step(longint t, logic [63:0] si, logic [63:0] sj);
      for (int j = 0; j < n_mcu; j++) begin
        if (t - t_post[j] > 1023) saturated++;
        post[j] = lazy(post[j], sat_dt(t - t_post[j]), TAU_ZJ, sj[j] ? 1.0 : 0.0);
        t_post[j] = t;
        b_exp.push_back('{0, j, bias(post[j].p)});
      end
      for (int i = 0; i < n_in; i++) begin
        if (!si[i]) begin skipped++; continue; end
        rows++;
        if (t - t_pre[i] > 1023) saturated++;
        pre[i] = lazy(pre[i], sat_dt(t - t_pre[i]), TAU_ZI, 1.0);
        t_pre[i] = t;
        for (int j = 0; j < n_mcu; j++) syn_update(i, j, t);
      end
      for (int j = 0; j < n_mcu; j++) begin
        if (!sj[j]) continue;
        cols++;
        for (int i = 0; i < n_in; i++) syn_update(i, j, t);
      end
    endfunction
  endclass

  // Inference half: one Euler step of every MCU, then normalisation.
  class infer_model;
    int  n_in, n_mcu;
    real w [][];
    real b [], ext [];
    real ssyn [], m [], o [], r [];
    int  normalised, unnormalised;

    function new(int ni, int nm);
      n_in = ni; n_mcu = nm;
      w = new[ni];
      foreach (w[i]) begin w[i] = new[nm]; foreach (w[i][j]) w[i][j] = 0.0; end
      b = new[nm]; ext = new[nm]; ssyn = new[nm]; m = new[nm]; o = new[nm]; r = new[nm];
      foreach (b[j]) begin b[j] = 0.0; ext[j] = 0.0; ssyn[j] = 0.0; m[j] = 0.0; end
      normalised = 0; unnormalised = 0;
    endfunction

    function void step(logic [63:0] si);
      real sum, acc, s;
      real e [];
      e = new[n_mcu];
      sum = 0.0;
      for (int j = 0; j < n_mcu; j++) begin
        acc = 0.0;
        for (int i = 0; i < n_in; i++) if (si[i]) acc += w[i][j];
        ssyn[j] += (acc - ssyn[j]) / TAU_ZI;
        s = b[j] + ssyn[j] + ext[j];
        m[j] += (s - m[j]) / TAU_M;
        e[j] = $exp(GAMMA_M * m[j]);
        sum += e[j];
      end
      if (sum > 1.0) normalised++; else unnormalised++;
      for (int j = 0; j < n_mcu; j++) begin
        o[j] = (sum > 1.0) ? e[j] / sum : e[j];
        r[j] = o[j] * R_MAX;
      end
    endfunction
  endclass
endpackage
