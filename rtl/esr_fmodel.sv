// esr_fmodel -- physical model F of the ESR process for a stream of
// particles: x_k+1 = x_k + f(x_k, u + m_k) * ts.
//
// The model splits into three parts. The reciprocal of the boundary layer
// thickness Delta is the only division; it takes 2F = 56 cycles and is done
// by the inversion farm (inv_farm), which accepts one Delta per cycle. While
// a particle's Delta is being inverted, the rest of the particle (state,
// process noise and the caller's side data) waits in a queue. When the farm
// delivers a reciprocal, it is joined with the head of the queue and both
// enter the dynamics pipeline (esr_dynamics), which computes the five
// rates. The integrator (esr_integrator) then adds rates * ts to the state.
// A delay line of DYN_LAT stages carries the old state, side data and the
// farm's out-of-range flag next to the dynamics pipeline.
//
// Flow control: in_valid/in_ready at the input; in_ready is low when the
// farm's next inverter is still busy or the queue is full. The dynamics
// pipeline, delay line and integrator advance together while the output
// is empty or accepted (en = !out_valid || out_ready); a stalled output
// freezes them and, through the farm's output, eventually the input.
//
// Timing: a particle accepted at cycle t leaves at t + 2F + DYN_LAT + 1 =
// t + 68 cycles when nothing stalls; one particle per cycle after that.
//
// out_err is raised for a particle whose 1/Delta did not fit in Q20.28;
// its x_next is then not meaningful. u and ts must stay constant while
// particles of one step are in flight.
//
// Following the described design: the split into inversion farm, dynamics
// and integration, queues between operators several stages apart, process
// noise added inside the model. This design's own choices: the valid/ready
// handshake, the queue depth (NINV + 2) and flagging, not dropping, a
// particle whose reciprocal overflowed.
module esr_fmodel
  import fx_pkg::*;
#(
  parameter int NINV   = 2 * FX_F + 4,
  parameter int SIDE_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ucmd_t             u,
  input  fx_t               ts,
  input  logic              in_valid,
  output logic              in_ready,
  input  xstate_t           in_x,
  input  pnoise_t           in_pn,
  input  logic [SIDE_W-1:0] in_side,
  output logic              out_valid,
  input  logic              out_ready,
  output xstate_t           out_x,
  output logic [SIDE_W-1:0] out_side,
  output logic              out_err
);

  typedef struct packed {
    xstate_t           x;
    pnoise_t           pn;
    logic [SIDE_W-1:0] side;
  } wait_t;

  typedef struct packed {
    xstate_t           x;
    logic [SIDE_W-1:0] side;
    logic              err;
  } carry_t;

  localparam int QDEPTH = NINV + 2;

  logic  en;
  logic  q_full, q_empty, q_pop, q_push;
  wait_t q_head, q_in;

  logic  farm_in_ready, farm_out_valid, farm_ovf;
  fx_t   farm_q;

  logic    dyn_valid;
  xstate_t rates;

  carry_t  dl [1:DYN_LAT];
  logic [SIDE_W-1:0] out_side_r;
  logic              out_err_r;

  // ---------------------------------------------------------------- intake
  assign in_ready = farm_in_ready && !q_full;
  assign q_push   = in_valid && in_ready;
  assign q_in     = '{x: in_x, pn: in_pn, side: in_side};

  inv_farm #(.NINV(NINV)) u_farm (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid && !q_full),
    .in_ready  (farm_in_ready),
    .in_data   (in_x.delta),
    .out_valid (farm_out_valid),
    .out_ready (en),
    .out_data  (farm_q),
    .out_ovf   (farm_ovf)
  );

  sync_fifo #(.WIDTH($bits(wait_t)), .DEPTH(QDEPTH)) u_wait (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (q_push),
    .wdata (q_in),
    .pop   (q_pop),
    .rdata (q_head),
    .full  (q_full),
    .empty (q_empty)
  );

  // ------------------------------------------------------------------ join
  assign en    = !out_valid || out_ready;
  assign q_pop = farm_out_valid && en;

  esr_dynamics u_dyn (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (en),
    .in_valid  (farm_out_valid),
    .inv_delta (farm_q),
    .ts        (q_head.x.ts),
    .d         (q_head.x.d),
    .u         (u),
    .pn        (q_head.pn),
    .out_valid (dyn_valid),
    .rates     (rates)
  );

  always_ff @(posedge clk) begin
    if (en) begin
      dl[1] <= '{x: q_head.x, side: q_head.side, err: farm_ovf};
      for (int k = 2; k <= DYN_LAT; k++) dl[k] <= dl[k-1];
      out_side_r <= dl[DYN_LAT].side;
      out_err_r  <= dl[DYN_LAT].err;
    end
  end

  esr_integrator u_int (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (en),
    .in_valid  (dyn_valid),
    .x         (dl[DYN_LAT].x),
    .rates     (rates),
    .ts        (ts),
    .out_valid (out_valid),
    .x_next    (out_x)
  );

  assign out_side = out_side_r;
  assign out_err  = out_err_r;

  a_join_in_step: assert property (@(posedge clk) disable iff (!rst_n)
                                   farm_out_valid |-> !q_empty);

endmodule
