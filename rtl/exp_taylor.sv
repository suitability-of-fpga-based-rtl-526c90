// exp_taylor -- pipelined exponential e^x by Taylor series, Q20.28.
//
// e^x = sum x^n / n!, summed here up to n = 16. The inverse factorials are
// constants computed at elaboration, so each term costs one multiply. The
// powers of x are built by repeated multiplication in a tree that doubles
// the highest power at every stage:
//   stage 1: x, x^2                       sum = 1 + x
//   stage 2: x^3, x^4                     sum += x^2/2!
//   stage 3: x^5, x^6, x^7, x^8           sum += x^3/3! + x^4/4!
//   stage 4: x^9 ... x^16                 sum += x^5/5! ... x^8/8!
//   stage 5: result                       sum += x^9/9! ... x^16/16!
// Each stage is a register stage, so a new argument can enter every cycle.
//
// Number formats: the argument and the result are Q20.28. The powers are
// held with 36 integer bits, because at the ends of the argument range
// (about [-2.67, 2.19]) x^14 .. x^16 exceed the 2^19 limit of Q20.28. The
// inverse factorials have 60 fractional bits, because 1/12! and smaller
// would round to one unit or to zero in Q20.28. With these, the result is
// within 1e-6 relative (plus the 5e-8 series remainder) of e^x.
//
// Interface and timing: in_valid/x are sampled on every clock edge where en
// is high; out_valid/y appear EXP_LAT = 5 enabled edges later. en low
// freezes the whole pipeline, so it can sit inside a stallable pipeline.
//
// Following the described design: the Taylor expansion, the staged power
// tree up to x^16 and the multiplication by stored inverse factorials. This
// design's own choices: where each partial sum is added, and the wider
// formats of the powers and inverse factorials described above.
module exp_taylor
  import fx_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic in_valid,
  input  fx_t  x,
  output logic out_valid,
  output fx_t  y
);

  // Inverse factorials 1/n! carry 60 fractional bits of their own: in
  // Q20.28, 1/12! and beyond would round to one unit or to zero.
  localparam int KF = 60;

  function automatic logic signed [63:0] inv_fact(int n);
    return 64'(longint'(1152921504606846976.0 / factorial(n)));   // 2^60 / n!
  endfunction

  // Powers are kept with 36 integer bits (PW = 64): at |x| = 2.67, x^14 to
  // x^16 exceed the 2^19 range of Q20.28.
  localparam int PW = 64;
  typedef logic signed [PW-1:0] pw_t;

  function automatic pw_t pmul(pw_t a, pw_t b);
    logic signed [2*PW-1:0] prod;
    prod = a * b;
    return pw_t'(prod >>> FX_F);
  endfunction

  // x^n * (1/n!), back to Q20.28.
  function automatic fx_t term(pw_t pw, logic signed [63:0] k);
    logic signed [PW+63:0] prod;
    prod = pw * k;
    return fx_t'(prod >>> KF);
  endfunction

  logic [EXP_LAT-1:0] v;
  pw_t p [1:16];            // powers x^n, written in the stage that forms them
  pw_t p2_s2;               // x^2 carried into stage 2
  pw_t p3_s3;               // x^3 carried into stage 3
  fx_t acc1, acc2, acc3, acc4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= '0;
    end else if (en) begin
      v <= {v[EXP_LAT-2:0], in_valid};
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      // stage 1
      p[1] <= PW'(x);
      p[2] <= pmul(PW'(x), PW'(x));
      acc1 <= K_ONE + x;
      // stage 2
      p2_s2 <= p[2];
      p[3]  <= pmul(p[2], p[1]);
      p[4]  <= pmul(p[2], p[2]);
      acc2  <= acc1 + term(p[2], inv_fact(2));
      // stage 3
      p3_s3 <= p[3];
      p[5]  <= pmul(p2_s2, p[3]);
      p[6]  <= pmul(p[3], p[3]);
      p[7]  <= pmul(p[3], p[4]);
      p[8]  <= pmul(p[4], p[4]);
      acc3  <= acc2 + term(p[3], inv_fact(3)) + term(p[4], inv_fact(4));
      // stage 4
      p[9]  <= pmul(p[6], p3_s3);
      p[10] <= pmul(p[5], p[5]);
      p[11] <= pmul(p[5], p[6]);
      p[12] <= pmul(p[6], p[6]);
      p[13] <= pmul(p[6], p[7]);
      p[14] <= pmul(p[7], p[7]);
      p[15] <= pmul(p[7], p[8]);
      p[16] <= pmul(p[8], p[8]);
      acc4  <= acc3 + term(p[5], inv_fact(5)) + term(p[6], inv_fact(6))
                    + term(p[7], inv_fact(7)) + term(p[8], inv_fact(8));
      // stage 5
      y <= acc4 + term(p[9],  inv_fact(9))   + term(p[10], inv_fact(10))
                + term(p[11], inv_fact(11)) + term(p[12], inv_fact(12))
                + term(p[13], inv_fact(13)) + term(p[14], inv_fact(14))
                + term(p[15], inv_fact(15)) + term(p[16], inv_fact(16));
    end
  end

  assign out_valid = v[EXP_LAT-1];

endmodule
