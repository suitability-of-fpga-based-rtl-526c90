// inv_farm -- a farm of fx_inverter units that accepts one reciprocal
// request per clock cycle.
//
// One inverter needs 2*F = 56 cycles per reciprocal, so a single unit would
// let a new particle into the physical model only every 56 cycles. The farm
// holds NINV inverters. A request is assigned to the next inverter in
// round-robin order; the inverter's own busy flag marks it as taken until
// its result has been read. Every inverter takes the same number of cycles,
// so results finish in request order and are read in the same round-robin
// order: no reordering logic or tags are needed.
//
// An inverter that is started in the cycle its previous result is read
// is occupied for exactly 2F cycles. With NINV >= 2F the next inverter is
// therefore free (or being freed) when its turn comes and the farm accepts
// a request every cycle; with fewer inverters in_ready drops while the
// next inverter is still busy, which is the bottleneck the farm exists to
// remove. in_ready depends combinationally on out_ready for this reason.
//
// Interface: valid/ready on both sides. in_data is the value to invert.
// out_data is the reciprocal and out_ovf marks a result that does not fit
// in Q20.28. Latency from an accepted request to out_valid is 2F cycles
// when the output is not stalled.
//
// Following the described design: the farm of identical inverters, the
// per-inverter busy flag, assignment to the next inverter and in-order
// results, and full throughput with 2F inverters. The default of 60
// inverters is the count the reference implementation instantiates
// (2F + 4); the valid/ready handshake is this design's own choice.
module inv_farm
  import fx_pkg::*;
#(
  parameter int NINV = 2 * FX_F + 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  fx_t  in_data,
  output logic out_valid,
  input  logic out_ready,
  output fx_t  out_data,
  output logic out_ovf
);

  localparam int IW = (NINV > 1) ? $clog2(NINV) : 1;

  logic [IW-1:0]   nxt_in, nxt_out;
  logic [NINV-1:0] start, ack, busy, done, ovf;
  fx_t             q [NINV];

  for (genvar g = 0; g < NINV; g++) begin : g_inv
    fx_inverter u_inv (
      .clk   (clk),
      .rst_n (rst_n),
      .start (start[g]),
      .din   (in_data),
      .ack   (ack[g]),
      .busy  (busy[g]),
      .done  (done[g]),
      .q     (q[g]),
      .ovf   (ovf[g])
    );
  end

  // The next inverter is free, or its result is being read this cycle.
  assign in_ready  = !busy[nxt_in] || ack[nxt_in];
  assign out_valid = done[nxt_out];
  assign out_data  = q[nxt_out];
  assign out_ovf   = ovf[nxt_out];

  always_comb begin
    ack          = '0;
    ack[nxt_out] = out_valid && out_ready;
  end

  always_comb begin
    start         = '0;
    start[nxt_in] = in_valid && in_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nxt_in  <= '0;
      nxt_out <= '0;
    end else begin
      if (in_valid && in_ready)
        nxt_in <= (nxt_in == IW'(NINV - 1)) ? '0 : nxt_in + 1'b1;
      if (out_valid && out_ready)
        nxt_out <= (nxt_out == IW'(NINV - 1)) ? '0 : nxt_out + 1'b1;
    end
  end

endmodule
