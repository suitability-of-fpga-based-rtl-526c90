// esr_integrator -- explicit Euler step of the ESR state.
//
// x_next = x + rates * ts for each of the five state variables, where ts is
// the sampling period in seconds (for example 2/15 s). One register stage:
// the new state appears one enabled clock edge after x and rates. en low
// holds the stage, so it can sit at the end of a stallable pipeline.
//
// Following the described design: the discrete update x_k+1 = x_k + f*T.
// This design's own choice: one register stage, five parallel multipliers.
module esr_integrator
  import fx_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  logic    in_valid,
  input  xstate_t x,
  input  xstate_t rates,
  input  fx_t     ts,
  output logic    out_valid,
  output xstate_t x_next
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else if (en) begin
      out_valid <= in_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      x_next.delta <= x.delta + fx_mul(rates.delta, ts);
      x_next.ts    <= x.ts    + fx_mul(rates.ts,    ts);
      x_next.d     <= x.d     + fx_mul(rates.d,     ts);
      x_next.xram  <= x.xram  + fx_mul(rates.xram,  ts);
      x_next.me    <= x.me    + fx_mul(rates.me,    ts);
    end
  end

endmodule
