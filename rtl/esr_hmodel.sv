// esr_hmodel -- measurement model H of the ESR process, y = h(x) + n.
//
// For one particle state per cycle it forms the simulated observation
//   y.d    = d + n_d
//   y.xram = Xram + n_xram
//   y.ir   = Ic + Ib + n_ir                        (command current)
//   y.lc   = Me - rhos*Ae*d  (d > 0)   Me  (d <= 0)   + n_lc   (load cell)
//   y.volt = R*Ir + Voltb + n_volt,
//            R = Rd*exp(-Aelect*(Ts - Ts*)),  Rd = R1 - m1*d (d > 0)
//                                                  R1 - m0*d (d <= 0)
// The only operator beyond add and multiply is the exponential of the
// resistance, computed by an exp_taylor instance fed from stage 2 and
// read in stage 8.
//
// Structure: an H_LAT = 11 stage pipeline of records (h_rec_t); stage k
// copies the previous record and fills in its own results, so the short
// outputs (d, Xram, Ir, LC) wait in the records for the voltage. The input
// state and the caller's side data travel with the record and leave with
// the observation.
//
// Flow control: valid/ready. The pipeline advances while its output is
// empty or accepted; in_ready equals that advance condition. Latency is
// H_LAT cycles without stalls; one particle per cycle.
//
// Following the described design: the equations, the operator order of
// the flow chart and noise added inside the model. This design's own
// choices: the cut into 11 register stages and the handshake.
module esr_hmodel
  import fx_pkg::*;
#(
  parameter int SIDE_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fx_t               u_ic,     // current command
  input  logic              in_valid,
  output logic              in_ready,
  input  xstate_t           in_x,
  input  mnoise_t           in_mn,
  input  logic [SIDE_W-1:0] in_side,
  output logic              out_valid,
  input  logic              out_ready,
  output yobs_t             out_y,
  output xstate_t           out_x,
  output logic [SIDE_W-1:0] out_side
);

  typedef struct packed {
    logic              valid;
    xstate_t           x;
    mnoise_t           mn;
    logic [SIDE_W-1:0] side;
    yobs_t             y;
    fx_t               m0d, m1d, tsm, ir, rad;
    fx_t               rneg, rpos, earg, lcpos;
    fx_t               rd, lc;
    fx_t               r, ub, volt;
  } h_rec_t;

  h_rec_t s [1:H_LAT];
  h_rec_t n [1:H_LAT];

  logic en;
  logic e_valid;
  fx_t  e_val;

  assign en       = !s[H_LAT].valid || out_ready;
  assign in_ready = en;

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
    // stage 1: noisy d and Xram, products with d, temperature difference
    n[1]        = '0;
    n[1].valid  = in_valid;
    n[1].x      = in_x;
    n[1].mn     = in_mn;
    n[1].side   = in_side;
    n[1].y.d    = in_x.d + in_mn.d;
    n[1].y.xram = in_x.xram + in_mn.xram;
    n[1].m0d    = fx_mul(in_x.d, K_M0);
    n[1].m1d    = fx_mul(in_x.d, K_M1);
    n[1].tsm    = in_x.ts - K_TSSTAR;
    n[1].ir     = u_ic + K_IB;
    n[1].rad    = fx_mul(in_x.d, K_RHOS_AE);
    // stage 2: both resistance branches, exponent argument, noisy current
    n[2]       = s[1];
    n[2].rneg  = K_R1 - s[1].m0d;
    n[2].rpos  = K_R1 - s[1].m1d;
    n[2].earg  = fx_mul(s[1].tsm, K_AELECT_N);
    n[2].y.ir  = s[1].ir + s[1].mn.ir;
    n[2].lcpos = s[1].x.me - s[1].rad;
    // stage 3: select on the sign of d
    n[3]    = s[2];
    n[3].rd = (s[2].x.d > 0) ? s[2].rpos  : s[2].rneg;
    n[3].lc = (s[2].x.d > 0) ? s[2].lcpos : s[2].x.me;
    // stage 4: noisy load cell
    n[4]      = s[3];
    n[4].y.lc = s[3].lc + s[3].mn.lc;
    // stages 5..7: wait for the exponential
    n[5] = s[4];
    n[6] = s[5];
    n[7] = s[6];
    // stage 8: resistance
    n[8]   = s[7];
    n[8].r = fx_mul(s[7].rd, e_val);
    // stage 9: unbiased voltage
    n[9]    = s[8];
    n[9].ub = fx_mul(s[8].r, s[8].ir);
    // stage 10: voltage bias
    n[10]      = s[9];
    n[10].volt = s[9].ub + K_VOLTB;
    // stage 11: noisy voltage
    n[11]        = s[10];
    n[11].y.volt = s[10].volt + s[10].mn.volt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k <= H_LAT; k++) s[k] <= '0;
    end else if (en) begin
      for (int k = 1; k <= H_LAT; k++) s[k] <= n[k];
    end
  end

  assign out_valid = s[H_LAT].valid;
  assign out_y     = s[H_LAT].y;
  assign out_x     = s[H_LAT].x;
  assign out_side  = s[H_LAT].side;

  a_exp_aligned: assert property (@(posedge clk) disable iff (!rst_n)
                                  en |-> (e_valid == s[7].valid));

endmodule
