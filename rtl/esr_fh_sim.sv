// esr_fh_sim -- one particle simulator: the sampling step of the particle
// filter for the ESR process, physical model F followed by measurement
// model H, for NP particles.
//
// Each particle x_k is run through F with its own process noise to give a
// drawn state x_k+1, and x_k+1 is run through H with its own measurement
// noise to give the simulated observation y. Both are returned, so the host
// can weigh particles against the plant's measurement and resample.
//
// Operation:
//   1. Load. init sets every particle to init_x and clears the noise; wr
//      writes one particle's state and noise. Loads are accepted only while
//      busy is low.
//   2. Step. A start pulse (busy low) latches the command vector u_in and
//      the sampling period ts_in and raises busy. An issue counter then
//      offers particles 0..NP-1 to F, one per cycle while F accepts them.
//      F's output feeds H directly; F's side data carries the particle's
//      index and measurement noise, H's carries the index and F's
//      reciprocal-overflow flag.
//   3. Results. For every particle, out_valid presents out_x (x_k+1),
//      out_y, out_idx and out_err, in index order; out_ready accepts it.
//      busy falls after the last particle has been accepted.
//
// Timing without output stalls: the first result appears 2F + DYN_LAT + 1
// + H_LAT + 1 = 80 cycles after start, the last NP - 1 cycles later; the
// step takes NP + 80 cycles. A stalled output stalls H, F and issue.
//
// Following the described design: F feeding H, each particle carrying its
// own noise, one particle per cycle, u and ts held for a whole step. This
// design's own choices: the load and start/busy protocol and the per-
// particle index and error outputs.
module esr_fh_sim
  import fx_pkg::*;
#(
  parameter int NP   = 150,
  parameter int NINV = 2 * FX_F + 4,
  parameter int IW   = (NP > 1) ? $clog2(NP) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // particle and noise loading
  input  logic          init,
  input  xstate_t       init_x,
  input  logic          wr,
  input  logic [IW-1:0] wr_idx,
  input  xstate_t       wr_x,
  input  pnoise_t       wr_pn,
  input  mnoise_t       wr_mn,
  // step control
  input  logic          start,
  input  ucmd_t         u_in,
  input  fx_t           ts_in,
  output logic          busy,
  // results
  output logic          out_valid,
  input  logic          out_ready,
  output yobs_t         out_y,
  output xstate_t       out_x,
  output logic [IW-1:0] out_idx,
  output logic          out_err
);

  typedef struct packed {
    mnoise_t       mn;
    logic [IW-1:0] idx;
  } fside_t;

  typedef struct packed {
    logic [IW-1:0] idx;
    logic          err;
  } hside_t;

  ucmd_t       u_r;
  fx_t         ts_r;
  logic [IW:0] issue_cnt;
  logic [IW:0] done_cnt;

  logic [IW-1:0] rd_idx;
  xstate_t       rd_x;
  pnoise_t       rd_pn;
  mnoise_t       rd_mn;

  logic    f_in_valid, f_in_ready, f_out_valid, f_out_ready, f_err;
  fside_t  f_in_side, f_out_side;
  xstate_t f_out_x;
  hside_t  h_in_side, h_out_side;

  // ------------------------------------------------------------- particles
  assign rd_idx = (issue_cnt < (IW+1)'(NP)) ? issue_cnt[IW-1:0] : '0;

  particle_store #(.NP(NP), .IW(IW)) u_store (
    .clk    (clk),
    .init   (init && !busy),
    .init_x (init_x),
    .wr     (wr && !busy),
    .wr_idx (wr_idx),
    .wr_x   (wr_x),
    .wr_pn  (wr_pn),
    .wr_mn  (wr_mn),
    .rd_idx (rd_idx),
    .rd_x   (rd_x),
    .rd_pn  (rd_pn),
    .rd_mn  (rd_mn)
  );

  // --------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      issue_cnt <= '0;
      done_cnt  <= '0;
      u_r       <= '0;
      ts_r      <= '0;
    end else if (!busy) begin
      if (start) begin
        busy      <= 1'b1;
        issue_cnt <= '0;
        done_cnt  <= '0;
        u_r       <= u_in;
        ts_r      <= ts_in;
      end
    end else begin
      if (f_in_valid && f_in_ready) issue_cnt <= issue_cnt + 1'b1;
      if (out_valid && out_ready) begin
        done_cnt <= done_cnt + 1'b1;
        if (done_cnt == (IW+1)'(NP - 1)) busy <= 1'b0;
      end
    end
  end

  // ----------------------------------------------------------- F then H
  assign f_in_valid = busy && (issue_cnt < (IW+1)'(NP));
  assign f_in_side  = '{mn: rd_mn, idx: rd_idx};

  esr_fmodel #(.NINV(NINV), .SIDE_W($bits(fside_t))) u_f (
    .clk       (clk),
    .rst_n     (rst_n),
    .u         (u_r),
    .ts        (ts_r),
    .in_valid  (f_in_valid),
    .in_ready  (f_in_ready),
    .in_x      (rd_x),
    .in_pn     (rd_pn),
    .in_side   (f_in_side),
    .out_valid (f_out_valid),
    .out_ready (f_out_ready),
    .out_x     (f_out_x),
    .out_side  (f_out_side),
    .out_err   (f_err)
  );

  assign h_in_side = '{idx: f_out_side.idx, err: f_err};

  esr_hmodel #(.SIDE_W($bits(hside_t))) u_h (
    .clk       (clk),
    .rst_n     (rst_n),
    .u_ic      (u_r.ic),
    .in_valid  (f_out_valid),
    .in_ready  (f_out_ready),
    .in_x      (f_out_x),
    .in_mn     (f_out_side.mn),
    .in_side   (h_in_side),
    .out_valid (out_valid),
    .out_ready (out_ready),
    .out_y     (out_y),
    .out_x     (out_x),
    .out_side  (h_out_side)
  );

  assign out_idx = h_out_side.idx;
  assign out_err = h_out_side.err;

  a_results_in_order: assert property (@(posedge clk) disable iff (!rst_n)
                                       out_valid |-> (out_idx == done_cnt[IW-1:0]));

endmodule
