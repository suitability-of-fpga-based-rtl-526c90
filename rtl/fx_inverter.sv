// fx_inverter -- sequential reciprocal 1/D of a signed Q20.28 number.
//
// The reciprocal is a division whose numerator is fixed at one. In raw
// integers the result is q = floor(2^56 / |D|), with D the 48-bit raw value.
// The numerator is a single one bit followed by 56 zeros, so a radix-2
// restoring division needs no numerator register: the partial remainder
// starts at 1, and each step doubles it, compares it with |D|, subtracts
// |D| when it fits and shifts the comparison result into the quotient.
// Because only the fractional positions have to be covered, the division
// takes 2*F = 56 steps instead of 2*F + I, one per clock cycle. The sign of
// D is stored at start and applied to the quotient at the end.
//
// The result does not fit in Q20.28 when |D| <= 2^-19 (raw |D| <= 512,
// zero included); ovf is then raised together with done and the value is
// meaningless.
//
// Interface and timing: a start pulse while busy is low loads din and
// takes the first step; the remaining 2F-1 steps follow one per cycle, so
// done rises 2*F cycles after the start cycle and stays high, holding q and
// ovf, until ack. ack clears busy on its clock edge; a start in the same
// cycle as ack loads the next operand instead, so a unit can take a new
// operand every 2F cycles. start while busy without ack is ignored (and
// flagged by an assertion).
//
// Following the described design: the restoring recurrence, the 2F-step
// count and the out-of-range flag. This design's own choices: the handshake
// (start/done/ack) and computing the overflow test from the final quotient.
module fx_inverter
  import fx_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  din,
  input  logic ack,
  output logic busy,
  output logic done,
  output fx_t  q,
  output logic ovf
);

  localparam int STEPS = 2 * FX_F;                 // 56 quotient bits
  localparam int CW    = $clog2(STEPS + 1);

  logic [FX_W-1:0]  rem;      // partial remainder, < |D|
  logic [FX_W-1:0]  dvs;      // |D|
  logic [STEPS-1:0] quo;      // quotient bits 2F-1 .. 0
  logic [CW-1:0]    cnt;      // steps still to do
  logic             neg;
  logic             dsmall;   // |D| <= 1: quotient bit 2F (or division by 0)

  logic [FX_W:0]   rem2;
  logic [FX_W-1:0] mag;
  assign rem2 = {rem, 1'b0};
  assign mag  = din[FX_W-1] ? FX_W'(-din) : FX_W'(din);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      cnt    <= '0;
      rem    <= '0;
      dvs    <= '0;
      quo    <= '0;
      neg    <= 1'b0;
      dsmall <= 1'b0;
    end else if (start && (!busy || (done && ack))) begin
      busy   <= 1'b1;
      // The first step is taken while loading: partial remainder 1,
      // doubled to 2 and compared with |D|.
      cnt    <= CW'(STEPS - 1);
      rem    <= (mag <= FX_W'(2)) ? FX_W'(2) - mag : FX_W'(2);
      dvs    <= mag;
      quo    <= STEPS'(mag <= FX_W'(2));
      neg    <= din[FX_W-1];
      dsmall <= (din == 0) || (din == 1) || (din == -1);
    end else if (busy && cnt != 0) begin
      cnt <= cnt - 1'b1;
      if (rem2 >= {1'b0, dvs}) begin
        rem <= FX_W'(rem2 - {1'b0, dvs});
        quo <= {quo[STEPS-2:0], 1'b1};
      end else begin
        rem <= rem2[FX_W-1:0];
        quo <= {quo[STEPS-2:0], 1'b0};
      end
    end else if (done && ack) begin
      busy <= 1'b0;
    end
  end

  assign done = busy && (cnt == 0);

  // The magnitude must stay below 2^47 to be representable.
  assign ovf = dsmall || (quo[STEPS-1:FX_W-1] != '0);
  assign q   = neg ? -fx_t'(quo[FX_W-1:0]) : fx_t'(quo[FX_W-1:0]);

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                         !(start && busy && !(done && ack)));

endmodule
