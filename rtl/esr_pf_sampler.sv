// esr_pf_sampler -- the sampling stage of a particle filter for the
// electroslag remelting (ESR) process, as NC parallel particle simulators.
//
// The particles of a particle filter are drawn independently of one another,
// so the sampling stage can be replicated: each of the NC copies of
// esr_fh_sim holds NP particles with their noise and runs them through the
// physical and measurement models, one particle per cycle. All copies are
// started by the same command vector and sampling period and run in lock
// step, so one step computes NC*NP particles in about NP + 80 cycles.
//
// Interface:
//   init/init_x         set every particle of every copy to init_x and clear
//                       the noise stores;
//   wr, wr_copy, wr_idx load state, process noise and measurement noise of
//                       one particle of one copy (resampled particles and
//                       fresh noise from the host);
//   start, u_in, ts_in  start a step with command u_in applied for ts_in
//                       seconds; busy is high until every result has been
//                       accepted; loads and start are ignored while busy;
//   out_valid/out_ready the results of particle out_idx from all copies at
//                       once: new state out_x[c], simulated observation
//                       out_y[c], and out_err[c] when that particle's 1/Delta
//                       overflowed the number format.
// Weighting, normalisation and resampling are left to the host.
//
// Following the described design: parallel copies of the whole simulator
// sharing the command, results of all copies read together. The defaults,
// one copy of 150 particles, are the design's reported configuration. The
// load port and the busy protocol are this design's own.
module esr_pf_sampler
  import fx_pkg::*;
#(
  parameter int NC   = 1,
  parameter int NP   = 150,
  parameter int NINV = 2 * FX_F + 4,
  parameter int IW   = (NP > 1) ? $clog2(NP) : 1,
  parameter int CW   = (NC > 1) ? $clog2(NC) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 init,
  input  xstate_t              init_x,
  input  logic                 wr,
  input  logic [CW-1:0]        wr_copy,
  input  logic [IW-1:0]        wr_idx,
  input  xstate_t              wr_x,
  input  pnoise_t              wr_pn,
  input  mnoise_t              wr_mn,
  input  logic                 start,
  input  ucmd_t                u_in,
  input  fx_t                  ts_in,
  output logic                 busy,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic    [IW-1:0]     out_idx,
  output xstate_t [NC-1:0]     out_x,
  output yobs_t   [NC-1:0]     out_y,
  output logic    [NC-1:0]     out_err
);

  logic [NC-1:0] c_busy, c_valid;
  logic [IW-1:0] c_idx [NC];
  logic          go;

  // All copies start together, and only when all are idle.
  assign go = start && !busy;

  for (genvar c = 0; c < NC; c++) begin : g_copy
    esr_fh_sim #(.NP(NP), .NINV(NINV), .IW(IW)) u_sim (
      .clk       (clk),
      .rst_n     (rst_n),
      .init      (init && !busy),
      .init_x    (init_x),
      .wr        (wr && !busy && (int'(wr_copy) == c)),
      .wr_idx    (wr_idx),
      .wr_x      (wr_x),
      .wr_pn     (wr_pn),
      .wr_mn     (wr_mn),
      .start     (go),
      .u_in      (u_in),
      .ts_in     (ts_in),
      .busy      (c_busy[c]),
      .out_valid (c_valid[c]),
      .out_ready (out_ready && out_valid),
      .out_y     (out_y[c]),
      .out_x     (out_x[c]),
      .out_idx   (c_idx[c]),
      .out_err   (out_err[c])
    );
  end

  assign busy      = |c_busy;
  assign out_valid = &c_valid;
  assign out_idx   = c_idx[0];

  a_copies_in_step: assert property (@(posedge clk) disable iff (!rst_n)
                                     out_valid |-> (c_idx[NC-1] == c_idx[0]));

endmodule
