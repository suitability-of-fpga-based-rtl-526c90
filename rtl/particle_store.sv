// particle_store -- the particles of one step and their noise samples.
//
// Three arrays of NP entries: the particle states x_k, the process noise
// (on the current and ram speed commands) and the measurement noise (on the
// five observations) that each particle will use in the next step.
//
// Write ports:
//   init   - every particle state is set to init_x and every noise entry
//            to zero in one cycle (the start of an estimation run, when
//            all particles share the initial state);
//   wr     - particle wr_idx gets wr_x, wr_pn and wr_mn (loading resampled
//            particles and fresh noise before a step). init has priority.
// Read port: rd_x, rd_pn and rd_mn show entry rd_idx combinationally.
//
// Following the described design: particle states held for the simulator
// with a broadcast initialisation, process and measurement noise supplied
// per particle from stores. This design's own choices: a per-particle write
// port for the host and clearing the noise on init.
module particle_store
  import fx_pkg::*;
#(
  parameter int NP = 150,
  parameter int IW = (NP > 1) ? $clog2(NP) : 1
) (
  input  logic          clk,
  input  logic          init,
  input  xstate_t       init_x,
  input  logic          wr,
  input  logic [IW-1:0] wr_idx,
  input  xstate_t       wr_x,
  input  pnoise_t       wr_pn,
  input  mnoise_t       wr_mn,
  input  logic [IW-1:0] rd_idx,
  output xstate_t       rd_x,
  output pnoise_t       rd_pn,
  output mnoise_t       rd_mn
);

  xstate_t x_mem  [NP];
  pnoise_t pn_mem [NP];
  mnoise_t mn_mem [NP];

  always_ff @(posedge clk) begin
    if (init) begin
      for (int k = 0; k < NP; k++) begin
        x_mem[k]  <= init_x;
        pn_mem[k] <= '0;
        mn_mem[k] <= '0;
      end
    end else if (wr) begin
      x_mem[wr_idx]  <= wr_x;
      pn_mem[wr_idx] <= wr_pn;
      mn_mem[wr_idx] <= wr_mn;
    end
  end

  assign rd_x  = x_mem[rd_idx];
  assign rd_pn = pn_mem[rd_idx];
  assign rd_mn = mn_mem[rd_idx];

  a_wr_in_range: assert property (@(posedge clk) wr |-> (int'(wr_idx) < NP));

endmodule
