// esr_ref_pkg -- floating-point reference of the ESR physical and
// measurement models, used by the testbenches to check the fixed-point
// hardware.
//
// The models are written here directly from the rate and measurement
// equations, in double precision and with divisions, with their own copy of
// the process parameters; nothing is shared with the RTL except the packed
// vector types and the number format (Q20.28) used to convert values.
package esr_ref_pkg;
  import fx_pkg::*;

  localparam real R_AELECT = 1.213e-03;
  localparam real R_M0     = 1.4285714286e-02;
  localparam real R_M1     = 7.6923076923e-04;
  localparam real R_TSSTAR = 2200.0;
  localparam real R_ALPHAR = 1.8803962074e-01;
  localparam real R_TM     = 1783.0;
  localparam real R_RHOM   = 7.4;
  localparam real R_HM     = 8928.71293;
  localparam real R_CS0    = 1.47;
  localparam real R_RHOS   = 2.55;
  localparam real R_VS     = 22254.901961;
  localparam real R_TSS    = 1773.0;
  localparam real R_AE     = 324.29278662;
  localparam real R_CDD    = 10.746632253;
  localparam real R_CDP    = 5.1437804365;
  localparam real R_CSD0   = 2.0781252910;
  localparam real R_CSP    = 1.7681745250;
  localparam real R_A      = 0.36;
  localparam real R_HS0    = 43.920610764;
  localparam real R_HE     = 0.57675911885;
  localparam real R_HS     = 0.042642023223;
  localparam real R_RI     = 12.7;
  localparam real R_R1     = 6.0e-03;
  localparam real R_PI     = 3.14159265358979323846;
  localparam real R_DELTA0 = 14.584705609;
  localparam real R_TS0    = 2200.0;

  typedef struct {
    real delta, ts, d, xram, me;
  } rx_t;

  typedef struct {
    real d, xram, ir, lc, volt;
  } ry_t;

  function automatic fx_t r2fx(real r);
    return fx_t'(longint'(r * 268435456.0));
  endfunction

  function automatic real fx2r(fx_t v);
    return real'(v) / 268435456.0;
  endfunction

  function automatic real urand(real lo, real hi);
    return lo + (hi - lo) * (real'($urandom) / 4294967296.0);
  endfunction

  function automatic xstate_t rx2fx(rx_t x);
    xstate_t v;
    v.delta = r2fx(x.delta);
    v.ts    = r2fx(x.ts);
    v.d     = r2fx(x.d);
    v.xram  = r2fx(x.xram);
    v.me    = r2fx(x.me);
    return v;
  endfunction

  function automatic rx_t fx2rx(xstate_t v);
    rx_t x;
    x.delta = fx2r(v.delta);
    x.ts    = fx2r(v.ts);
    x.d     = fx2r(v.d);
    x.xram  = fx2r(v.xram);
    x.me    = fx2r(v.me);
    return x;
  endfunction

  // A plausible particle: values around the nominal operating point, with
  // d on both sides of the resistance breakpoint.
  function automatic rx_t rand_state();
    rx_t x;
    x.delta = urand(10.0, 20.0);
    x.ts    = urand(2150.0, 2250.0);
    x.d     = urand(-0.2, 2.0);
    x.xram  = urand(0.0, 50.0);
    x.me    = urand(90000.0, 100000.0);
    return x;
  endfunction

  // Rates of change f(x, u + m).
  function automatic rx_t ref_rates(rx_t x, real ic, real vramc, real n_ic, real n_vram);
    rx_t  r;
    real  i, vram, rd, res, volt, p, qm, qs, pm, sdot;
    i    = ic + n_ic;
    vram = vramc + n_vram;
    rd   = (x.d < 0.0) ? R_R1 - R_M0 * x.d : R_R1 - R_M1 * x.d;
    res  = rd * $exp(-R_AELECT * (x.ts - R_TSSTAR));
    volt = res * i;
    p    = volt * i;
    qm   = R_HE * R_AE * (x.ts - R_TM);
    qs   = R_HS * 2.0 * R_PI * R_RI * R_HS0 * (x.ts - R_TSS);
    pm   = qm / R_AE;
    sdot = -R_ALPHAR * R_CSD0 / x.delta + R_CSP * pm / R_HM;
    r.delta = R_ALPHAR * R_CDD / x.delta - R_CDP * pm / R_HM;
    r.ts    = (p - qm - qs) / (R_RHOS * R_VS * R_CS0);
    r.d     = R_ALPHAR * R_CSD0 / x.delta - R_CSP * pm / R_HM + vram / R_A;
    r.xram  = vram;
    r.me    = -R_RHOM * R_AE * sdot;
    return r;
  endfunction

  // One Euler step of the physical model.
  function automatic rx_t ref_f(rx_t x, real ic, real vramc, real n_ic, real n_vram, real ts);
    rx_t r, n;
    r = ref_rates(x, ic, vramc, n_ic, n_vram);
    n.delta = x.delta + r.delta * ts;
    n.ts    = x.ts    + r.ts    * ts;
    n.d     = x.d     + r.d     * ts;
    n.xram  = x.xram  + r.xram  * ts;
    n.me    = x.me    + r.me    * ts;
    return n;
  endfunction

  // Measurement model with additive noise.
  function automatic ry_t ref_h(rx_t x, real ic, ry_t n);
    ry_t y;
    real rd, res;
    rd     = (x.d > 0.0) ? R_R1 - R_M1 * x.d : R_R1 - R_M0 * x.d;
    res    = rd * $exp(-R_AELECT * (x.ts - R_TSSTAR));
    y.d    = x.d + n.d;
    y.xram = x.xram + n.xram;
    y.ir   = ic + n.ir;
    y.lc   = ((x.d > 0.0) ? x.me - R_RHOS * R_AE * x.d : x.me) + n.lc;
    y.volt = res * ic + n.volt;
    return y;
  endfunction

  function automatic ry_t rand_mnoise();
    ry_t n;
    n.d    = urand(-0.05, 0.05);
    n.xram = urand(-0.3, 0.3);
    n.ir   = urand(-180.0, 180.0);
    n.lc   = urand(-5.0, 5.0);
    n.volt = urand(-0.1, 0.1);
    return n;
  endfunction

  function automatic mnoise_t ry2mn(ry_t n);
    mnoise_t m;
    m.d    = r2fx(n.d);
    m.xram = r2fx(n.xram);
    m.ir   = r2fx(n.ir);
    m.lc   = r2fx(n.lc);
    m.volt = r2fx(n.volt);
    return m;
  endfunction

  // Allowed difference between the fixed-point result and the reference.
  function automatic bit close(real hw, real rf);
    real diff, tol;
    diff = hw - rf;
    if (diff < 0.0) diff = -diff;
    tol = 1.0e-6 * ((rf < 0.0) ? -rf : rf) + 1.0e-4;
    return diff <= tol;
  endfunction

endpackage
