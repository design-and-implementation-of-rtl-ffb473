// bcpnn_pkg: shared number formats, constants and conversion functions of the
// BCPNN accelerator.
//
// Every trace, weight and bias value moves through the datapath as a 33-bit
// signed fixed-point word with 1 sign bit, 4 integer bits and 28 fraction bits
// (written 1.4.28).  E and P traces and the stored exponential factors are held
// in 30 bits (1.1.28) and are sign-extended to 33 bits before arithmetic.  The
// logarithm, division and exponential units work on IEEE-754 single precision
// words.  These widths follow the original design's header of widths.
// epsilon = 1.0 matches the original training waveforms, where every P_log
// word is exactly 1.0 above its P.  The time constants, learning-rule
// coefficients and inference constants are this design's own choice (no
// numbers were published for them) and can be changed here.
package bcpnn_pkg;

  localparam int FX_W     = 33;   // 1.4.28 datapath word
  localparam int FRAC     = 28;   // fraction bits
  localparam int EP_W     = 30;   // 1.1.28 E/P trace and exp-table word
  localparam int FLT_W    = 32;   // IEEE single
  localparam int TIME_W   = 40;   // simulation time in time steps (1 ms)
  localparam int DT_W     = 10;   // address of the exponential table
  localparam int DT_MAX   = (1 << DT_W) - 1;

  typedef logic signed [FX_W-1:0] fx_t;
  typedef logic signed [EP_W-1:0] ep_t;
  typedef logic        [FLT_W-1:0] flt_t;
  typedef logic        [TIME_W-1:0] time_t;

  localparam fx_t FX_ONE  = fx_t'(1) <<< FRAC;

  // Time constants of the learning rule, in time steps (1 ms each).
  localparam real TAU_ZI  = 10.0;
  localparam real TAU_ZJ  = 10.0;
  localparam real TAU_ZIJ = 1.0 / (1.0 / TAU_ZI + 1.0 / TAU_ZJ);
  localparam real TAU_E   = 20.0;
  localparam real TAU_P   = 100.0;  // tau_p* = tau_p / kappa
  localparam real EPS     = 1.0;    // minimum activity epsilon (P_log = P + 1.0 in the training waveforms)

  // Inference constants: Euler step dt = 1 ms.
  localparam real TAU_M   = 10.0;
  localparam real GAMMA_M = 1.0;
  localparam real R_MAX   = 100.0 / 1000.0;  // r_max,HCU in spikes per time step

  function automatic fx_t real2fx(real r);
    real s;
    s = r * 268435456.0;
    return fx_t'(longint'(s >= 0.0 ? s + 0.5 : s - 0.5));
  endfunction

  function automatic real fx2real(fx_t v);
    return real'(longint'(v)) / 268435456.0;
  endfunction

  // Lazy-update coefficients: a = tz/(tz-te), b = tz/(tz-tp), c = te/(te-tp).
  localparam fx_t COEF_A_I   = real2fx(TAU_ZI  / (TAU_ZI  - TAU_E));
  localparam fx_t COEF_AB_I  = real2fx(TAU_ZI  / (TAU_ZI  - TAU_E) * TAU_ZI  / (TAU_ZI  - TAU_P));
  localparam fx_t COEF_A_J   = real2fx(TAU_ZJ  / (TAU_ZJ  - TAU_E));
  localparam fx_t COEF_AB_J  = real2fx(TAU_ZJ  / (TAU_ZJ  - TAU_E) * TAU_ZJ  / (TAU_ZJ  - TAU_P));
  localparam fx_t COEF_A_IJ  = real2fx(TAU_ZIJ / (TAU_ZIJ - TAU_E));
  localparam fx_t COEF_AB_IJ = real2fx(TAU_ZIJ / (TAU_ZIJ - TAU_E) * TAU_ZIJ / (TAU_ZIJ - TAU_P));
  localparam fx_t COEF_C     = real2fx(TAU_E   / (TAU_E   - TAU_P));
  localparam fx_t EPS_FX     = real2fx(EPS);
  localparam fx_t EPS2_FX    = real2fx(EPS * EPS);
  localparam fx_t K_ZI_FX    = real2fx(1.0 / TAU_ZI);
  localparam fx_t K_M_FX     = real2fx(1.0 / TAU_M);
  localparam fx_t GAMMA_FX   = real2fx(GAMMA_M);
  localparam fx_t RMAX_FX    = real2fx(R_MAX);

  // Columns of a row of the exponential table, most significant first.
  typedef enum logic [2:0] {COL_ZI = 3'd0, COL_ZJ = 3'd1, COL_ZIJ = 3'd2,
                            COL_E = 3'd3, COL_P = 3'd4} exp_col_e;

  // Saturate a 1.4.28 value into the 1.1.28 storage range [-2, 2).
  function automatic ep_t sat_ep(fx_t v);
    if (v > fx_t'({4'b0, 1'b0, {(EP_W-1){1'b1}}}))        return {1'b0, {(EP_W-1){1'b1}}};
    if (v < -fx_t'({4'b0, 1'b1, {(EP_W-1){1'b0}}}))       return {1'b1, {(EP_W-1){1'b0}}};
    return v[EP_W-1:0];
  endfunction

  function automatic fx_t ep2fx(ep_t v);
    return fx_t'(v);
  endfunction

  // Signed fixed point with 28 fraction bits, any value up to 63 bits, to
  // single precision, mantissa truncated.
  function automatic flt_t wide2flt(logic signed [63:0] v);
    logic        s;
    logic [63:0] mag;
    logic [63:0] norm;
    int          lead;
    s    = v[63];
    mag  = s ? 64'(-v) : 64'(v);
    lead = -1;
    for (int k = 0; k < 64; k++) if (mag[k]) lead = k;
    if (lead < 0) return '0;
    norm = mag << (63 - lead);                 // leading one at bit 63
    return {s, 8'(lead - FRAC + 127), norm[62 -: 23]};
  endfunction

  // 1.4.28 fixed point to single precision.
  function automatic flt_t fix2flt(fx_t v);
    return wide2flt(64'(v));
  endfunction

  // Single precision to 1.4.28 fixed point, truncated toward zero and
  // saturated to the 33-bit range.
  function automatic fx_t flt2fix(flt_t f);
    logic        s;
    int          e;
    logic [63:0] m;
    logic [63:0] mag;
    s = f[31];
    e = int'(f[30:23]) - 127;
    m = {40'd0, 1'b1, f[22:0]};               // 1.23
    if (f[30:23] == 8'd0) return '0;
    // value = m * 2^(e-23); fixed = value * 2^28 = m * 2^(e+5)
    if (e + 5 >= 0) begin
      if (e > 4) mag = 64'hFFFF_FFFF;
      else       mag = m << (e + 5);
    end else begin
      if (-(e + 5) > 40) mag = '0;
      else               mag = m >> (-(e + 5));
    end
    if (mag > 64'h0_FFFF_FFFF) mag = 64'h0_FFFF_FFFF;
    return s ? -fx_t'(mag[32:0]) : fx_t'(mag[32:0]);
  endfunction

endpackage
