// esr_dynamics -- pipelined rates of change of the ESR state ("dynamics
// model": the physical model without the reciprocal of Delta).
//
// Computes, for one particle per cycle,
//   I      = Ic + Ib + n_Ic             Vram  = Vramc + Vramb + n_Vram
//   Rd     = R1 - m0*d  (d <  d_infl)   R1 - m1*d  (d >= d_infl)
//   R      = Rd * exp(-Aelect*(Ts - Ts*))
//   Volt   = R*I + Voltb                P     = Volt * I
//   Qm     = He*Ae*(Ts - Tm)            Qs    = Hs*2*pi*ri*hs0*(Ts - Tss)
//   pm     = (1+mur)/Ae * Qm
//   Sdot   = -alphar*Csd0/Delta + Csp/hm * pm
//   dDelta =  alphar*Cdd/Delta  - Cdp/hm * pm
//   dTs    = (P - Qm - Qs) / (rhos*Vs*Cs0)
//   dd     = Vram/a - Sdot
//   dXram  = Vram
//   dMe    = -rhom*Ae*Sdot
// 1/Delta arrives as an input (inv_delta) from the inversion farm. The
// noisy command is formed inside, as the process noise is added here.
//
// Structure: an 11-stage pipeline. Each stage register holds one record of
// every intermediate value (dyn_rec_t); stage k copies the record of stage
// k-1 and fills in the values it computes. The exponential (exp_taylor,
// five stages) is fed from stage 2 and its result is used in stage 8; the
// branches that do not need it (Delta, d, Me, Xram rates) finish early and
// wait in the stage records, which play the role of the delay queues
// between operators that are several stages apart.
//
// Interface and timing: in_valid and the operands are taken on each edge
// with en high; out_valid and the rates appear DYN_LAT = 11 enabled edges
// later. en low freezes the pipeline. u is sampled with the operands.
//
// Following the described design: the equations, the operator order of the
// flow chart (noise and differences first, exponential, then R, Volt, P and
// dTs last), and constants folded ahead of time. This design's own choices:
// the exact cut into 11 register stages, the sign convention of the
// inverse input (1/Delta, as in the rate equations), and the extra 16
// fractional bits of the small factor 1/(rhos*Vs*Cs0) in the dTs product.
module esr_dynamics
  import fx_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  logic    in_valid,
  input  fx_t     inv_delta,
  input  fx_t     ts,
  input  fx_t     d,
  input  ucmd_t   u,
  input  pnoise_t pn,
  output logic    out_valid,
  output xstate_t rates
);

  typedef struct packed {
    logic valid;
    fx_t  i_c, vram;
    fx_t  tsm_tm, tsm_tss, tsm_tstar;
    fx_t  m0d, m1d;
    logic below;
    fx_t  ai_s, ai_d;          // alphar*Csd0/Delta, alphar*Cdd/Delta
    fx_t  rd, earg, qm, qs;
    fx_t  pm, qmqs;
    fx_t  sdot, deltadot;
    fx_t  medot, ddot;
    fx_t  r, volt, p, tsdot;
  } dyn_rec_t;

  dyn_rec_t s [1:DYN_LAT];
  dyn_rec_t n [1:DYN_LAT];

  logic e_valid;
  fx_t  e_val;

  exp_taylor u_exp (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (en),
    .in_valid  (s[2].valid),
    .x         (s[2].earg),
    .out_valid (e_valid),
    .y         (e_val)
  );

  always_comb begin
    // stage 1: noisy command, temperature differences, depth products, 1/Delta terms
    n[1]           = '0;
    n[1].valid     = in_valid;
    n[1].i_c       = u.ic + pn.ic + K_IB;
    n[1].vram      = u.vramc + pn.vramc + K_VRAMB;
    n[1].tsm_tm    = ts - K_TM;
    n[1].tsm_tss   = ts - K_TSS;
    n[1].tsm_tstar = ts - K_TSSTAR;
    n[1].m0d       = fx_mul(d, K_M0);
    n[1].m1d       = fx_mul(d, K_M1);
    n[1].below     = (d < K_DINFL);
    n[1].ai_s      = fx_mul(inv_delta, K_AR_CSD0);
    n[1].ai_d      = fx_mul(inv_delta, K_AR_CDD);
    // stage 2: Rd, exponent argument, heat flows
    n[2]      = s[1];
    n[2].rd   = K_R1 - (s[1].below ? s[1].m0d : s[1].m1d);
    n[2].earg = fx_mul(s[1].tsm_tstar, K_AELECT_N);
    n[2].qm   = fx_mul(s[1].tsm_tm, K_HE_AE);
    n[2].qs   = fx_mul(s[1].tsm_tss, K_QS);
    // stage 3: melt rate term, Qm + Qs
    n[3]      = s[2];
    n[3].pm   = fx_mul(s[2].qm, K_PM);
    n[3].qmqs = s[2].qm + s[2].qs;
    // stage 4: Sdot and the Delta rate
    n[4]          = s[3];
    n[4].sdot     = fx_mul(s[3].pm, K_CSP_HM) - s[3].ai_s;
    n[4].deltadot = s[3].ai_d - fx_mul(s[3].pm, K_CDP_HM);
    // stage 5: electrode mass and depth rates
    n[5]       = s[4];
    n[5].medot = fx_mul(s[4].sdot, K_RHOM_AE_N);
    n[5].ddot  = fx_mul(s[4].vram, K_INV_A) - s[4].sdot;
    // stages 6, 7: wait for the exponential
    n[6] = s[5];
    n[7] = s[6];
    // stage 8: resistance
    n[8]   = s[7];
    n[8].r = fx_mul(s[7].rd, e_val);
    // stage 9: voltage
    n[9]      = s[8];
    n[9].volt = fx_mul(s[8].r, s[8].i_c) + K_VOLTB;
    // stage 10: power
    n[10]   = s[9];
    n[10].p = fx_mul(s[9].volt, s[9].i_c);
    // stage 11: slag temperature rate
    n[11]       = s[10];
    n[11].tsdot = fx_mul(s[10].p - s[10].qmqs, K_TSDOT) >>> KS_TSDOT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k <= DYN_LAT; k++) s[k] <= '0;
    end else if (en) begin
      for (int k = 1; k <= DYN_LAT; k++) s[k] <= n[k];
    end
  end

  assign out_valid      = s[DYN_LAT].valid;
  assign rates.delta    = s[DYN_LAT].deltadot;
  assign rates.ts       = s[DYN_LAT].tsdot;
  assign rates.d        = s[DYN_LAT].ddot;
  assign rates.xram     = s[DYN_LAT].vram;
  assign rates.me       = s[DYN_LAT].medot;

  a_exp_aligned: assert property (@(posedge clk) disable iff (!rst_n)
                                  en |-> (e_valid == s[7].valid));

endmodule
