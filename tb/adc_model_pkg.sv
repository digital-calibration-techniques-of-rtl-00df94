// Behavioural model of the analog part of a 1.5 bit/stage converter, for the
// testbenches only (real arithmetic, not synthesizable).
//
// Each stage decides its code D from its input v against +-Vref/4 and produces
// the residue alpha*v - beta*D*Vref (Vref = 1). A chain lists the physical
// stages in signal order; its first stage may have its code forced. The model
// returns the code of every physical stage. Stages not in the chain keep code 0.
// The stimulus values (mismatches, gains, ramps) are this testbench's own
// choice unless they are the design's example numbers named above.
package adc_model_pkg;
  localparam int MAXS = 16;

  typedef real    rvec_t [MAXS];
  typedef int     ivec_t [MAXS];

  function automatic int decide(real v);
    if (v > 0.25)  return 1;
    if (v < -0.25) return -1;
    return 0;
  endfunction

  // Convert v through the chain order[0..n-1]. force_first: -9 = none.
  function automatic ivec_t run_chain(real v, ivec_t order, int n, rvec_t a, rvec_t b, int force_first);
    ivec_t d;
    real x;
    int dd;
    for (int i = 0; i < MAXS; i++) d[i] = 0;
    x = v;
    for (int i = 0; i < n; i++) begin
      dd = (i == 0 && force_first != -9) ? force_first : decide(x);
      d[order[i]] = dd;
      x = a[order[i]] * x - b[order[i]] * dd;
    end
    return d;
  endfunction

  // Normal pipeline conversion of v through stages 0..n-1.
  function automatic ivec_t convert(real v, int n, rvec_t a, rvec_t b);
    ivec_t order;
    for (int i = 0; i < MAXS; i++) order[i] = i;
    return run_chain(v, order, n, a, b, -9);
  endfunction

  // Ideal stage coefficients with the first ncal stages set from lists.
  function automatic rvec_t ideal_alpha();
    rvec_t a;
    for (int i = 0; i < MAXS; i++) a[i] = 2.0;
    return a;
  endfunction
  function automatic rvec_t ideal_beta();
    rvec_t b;
    for (int i = 0; i < MAXS; i++) b[i] = 1.0;
    return b;
  endfunction

  // Stage coefficients from capacitor values, open-loop gain A and parasitic
  // Cp (flip-around MX2): alpha = (C1+C2)/(C1+(C1+C2+Cp)/A), beta = C2/(...).
  function automatic real mx2_alpha(real c1, real c2, real cp, real gain);
    return (c1 + c2) / (c1 + (c1 + c2 + cp) / gain);
  endfunction
  function automatic real mx2_beta(real c1, real c2, real cp, real gain);
    return c2 / (c1 + (c1 + c2 + cp) / gain);
  endfunction

  // Exact calibrated output of a code vector, given the true coefficients:
  // sum D_k*beta_k/(alpha_1..alpha_k) over all n stages.
  function automatic real ideal_dout(ivec_t d, int n, rvec_t a, rvec_t b);
    real p, s;
    p = 1.0;
    s = 0.0;
    for (int k = 0; k < n; k++) begin
      p = p * a[k];
      s = s + d[k] * b[k] / p;
    end
    return s;
  endfunction

  function automatic real fx2r(longint x, int frac);
    return real'(x) / real'(longint'(1) << frac);
  endfunction

  function automatic logic [1:0] enc(int v);
    if (v > 0) return 2'b10;
    if (v < 0) return 2'b00;
    return 2'b01;
  endfunction

  function automatic real absr(real x);
    return (x < 0.0) ? -x : x;
  endfunction
endpackage
