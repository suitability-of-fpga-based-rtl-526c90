// fx_pkg -- fixed-point types and precomputed model constants of the ESR
// particle simulator.
//
// Every quantity in the simulator is a signed two's-complement fixed-point
// number with 20 integer bits and 28 fractional bits (48 bits in all), the
// width of the FPGA's DSP multipliers. A product of two such numbers is
// formed at 96 bits and the 28 surplus fractional bits are dropped by an
// arithmetic shift (truncation towards minus infinity), which is what a
// plain fixed-point multiply does.
//
// The model constants are the electroslag remelting (ESR) parameters of the
// process model. Products and quotients of parameters are folded here, at
// elaboration time, so that the datapath never divides by a constant and
// multiplies each operand by a single combined factor. The folding itself
// (which products are combined) is this design's choice; the parameter
// values are those of the model.
//
// The state, command, noise and observation vectors are packed structs so
// that a whole particle moves through queues and pipeline registers as one
// word.
package fx_pkg;

  localparam int FX_I = 20;              // integer bits, sign included
  localparam int FX_F = 28;              // fractional bits
  localparam int FX_W = FX_I + FX_F;     // 48

  typedef logic signed [FX_W-1:0] fx_t;

  // Real -> fixed point, rounded to nearest (elaboration time only).
  function automatic fx_t fx_from_real(real r);
    return fx_t'(longint'(r * 268435456.0));
  endfunction

  // Fixed-point multiply: full 96-bit product, truncated back to Q20.28.
  function automatic fx_t fx_mul(fx_t a, fx_t b);
    logic signed [2*FX_W-1:0] p;
    p = a * b;
    return fx_t'(p >>> FX_F);
  endfunction

  function automatic real factorial(int n);
    real f;
    f = 1.0;
    for (int k = 2; k <= n; k++) f = f * real'(k);
    return f;
  endfunction

  // ---------------------------------------------------------------- vectors
  typedef struct packed {
    fx_t delta;   // boundary layer thickness
    fx_t ts;      // slag temperature
    fx_t d;       // penetration length
    fx_t xram;    // ram position
    fx_t me;      // electrode mass
  } xstate_t;

  typedef struct packed {
    fx_t ic;      // current command
    fx_t vramc;   // ram speed command
  } ucmd_t;

  typedef struct packed {
    fx_t ic;
    fx_t vramc;
  } pnoise_t;

  typedef struct packed {
    fx_t d;
    fx_t xram;
    fx_t ir;      // current
    fx_t lc;      // load cell
    fx_t volt;    // voltage
  } yobs_t;

  typedef struct packed {
    fx_t d;
    fx_t xram;
    fx_t ir;
    fx_t lc;
    fx_t volt;
  } mnoise_t;

  // ------------------------------------------------------- model parameters
  localparam real P_AELECT   = 1.213e-03;
  localparam real P_M0       = 1.4285714286e-02;
  localparam real P_M1       = 7.6923076923e-04;
  localparam real P_TSSTAR   = 2.2e+03;
  localparam real P_ALPHAR   = 1.8803962074e-01;
  localparam real P_TM       = 1.783e+03;
  localparam real P_RHOM     = 7.4;
  localparam real P_HM       = 8.9287129300e+03;
  localparam real P_CS0      = 1.47;
  localparam real P_RHOS     = 2.55;
  localparam real P_VS       = 2.2254901961e+04;
  localparam real P_TSS      = 1.773e+03;
  localparam real P_AE       = 3.2429278662e+02;
  localparam real P_CDD      = 1.0746632253e+01;
  localparam real P_CDP      = 5.1437804365;
  localparam real P_CSD0     = 2.0781252910;
  localparam real P_CSP      = 1.7681745250;
  localparam real P_A        = 3.6e-01;
  localparam real P_HS0      = 4.3920610764e+01;
  localparam real P_HE       = 5.7675911885e-01;
  localparam real P_HS       = 4.2642023223e-02;
  localparam real P_RI       = 1.27e+01;
  localparam real P_R1       = 6.0e-03;
  localparam real P_DINFL    = 0.0;
  localparam real P_MUR      = 0.0;
  localparam real P_PI       = 3.14159265358979323846;
  // Bias terms of the current, ram speed and voltage; zero in the model.
  localparam real P_IB       = 0.0;
  localparam real P_VRAMB    = 0.0;
  localparam real P_VOLTB    = 0.0;

  // ------------------------------------------- folded fixed-point constants
  localparam fx_t K_AELECT_N  = fx_from_real(-P_AELECT);
  localparam fx_t K_M0        = fx_from_real(P_M0);
  localparam fx_t K_M1        = fx_from_real(P_M1);
  localparam fx_t K_R1        = fx_from_real(P_R1);
  localparam fx_t K_TSSTAR    = fx_from_real(P_TSSTAR);
  localparam fx_t K_TM        = fx_from_real(P_TM);
  localparam fx_t K_TSS       = fx_from_real(P_TSS);
  localparam fx_t K_DINFL     = fx_from_real(P_DINFL);
  localparam fx_t K_HE_AE     = fx_from_real(P_HE * P_AE);                     // Qm = K*(Ts-Tm)
  localparam fx_t K_QS        = fx_from_real(P_HS * 2.0 * P_PI * P_RI * P_HS0); // Qs = K*(Ts-Tss)
  localparam fx_t K_PM        = fx_from_real((1.0 + P_MUR) / P_AE);            // pm = K*Qm
  localparam fx_t K_CSP_HM    = fx_from_real(P_CSP / P_HM);
  localparam fx_t K_CDP_HM    = fx_from_real(P_CDP / P_HM);
  localparam fx_t K_AR_CSD0   = fx_from_real(P_ALPHAR * P_CSD0);
  localparam fx_t K_AR_CDD    = fx_from_real(P_ALPHAR * P_CDD);
  localparam fx_t K_RHOM_AE_N = fx_from_real(-P_RHOM * P_AE);
  localparam fx_t K_INV_A     = fx_from_real(1.0 / P_A);
  // 1/(rho_s V_s c_s) is about 1.2e-5, only ~3200 units in Q20.28; it is
  // stored scaled by 2^KS_TSDOT and the product shifted back.
  localparam int  KS_TSDOT    = 16;
  localparam fx_t K_TSDOT     = fx_from_real(65536.0 / (P_RHOS * P_VS * P_CS0));
  localparam fx_t K_RHOS_AE   = fx_from_real(P_RHOS * P_AE);
  localparam fx_t K_IB        = fx_from_real(P_IB);
  localparam fx_t K_VRAMB     = fx_from_real(P_VRAMB);
  localparam fx_t K_VOLTB     = fx_from_real(P_VOLTB);
  localparam fx_t K_ONE       = fx_from_real(1.0);

  // ------------------------------------------------------ pipeline latencies
  localparam int EXP_LAT = 5;    // exp_taylor: five register stages
  localparam int DYN_LAT = 11;   // esr_dynamics: rates valid 11 cycles after input
  localparam int H_LAT   = 11;   // esr_hmodel: observation 11 cycles after input

endpackage
