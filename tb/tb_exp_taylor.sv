// tb_exp_taylor -- self-checking test of the pipelined Taylor exponential.
//
// Phase 1 sends a single argument and checks that the result appears
// exactly 5 cycles later. Phase 2 streams 300 arguments drawn from the
// simulator's range [-2.67, 2.19] (ends included), one per cycle while a
// random enable stalls the pipeline now and then, and compares each result
// in order with $exp: error below 1e-6 relative plus 2e-7 absolute (the
// series is cut after x^16, whose next term is 5e-8 at the range ends).
module tb_exp_taylor;
  import fx_pkg::*;
  import esr_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en = 0, in_valid = 0, out_valid;
  fx_t  x = '0, y;
  int   checks = 0, failures = 0;
  real  q [$];
  int   stalls = 0;

  exp_taylor dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && en && out_valid) begin
      real xr, e, got;
      xr  = q.pop_front();
      e   = $exp(xr);
      got = fx2r(y);
      check((got - e < 1.0e-6 * e + 2.0e-7) && (e - got < 1.0e-6 * e + 2.0e-7),
            $sformatf("exp(%f) = %f, expected %f", xr, got, e));
    end
  end

  initial begin
    int lat;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // phase 1: latency
    en = 1; in_valid = 1; x = r2fx(1.0); q.push_back(fx2r(x));
    @(negedge clk);
    in_valid = 0;
    lat = 1;
    while (!out_valid) begin
      @(negedge clk);
      lat++;
    end
    check(lat == EXP_LAT, $sformatf("latency %0d", lat));
    @(negedge clk);
    // phase 2: stream with stalls
    for (int k = 0; k < 300; k++) begin
      real a;
      a = (k == 0) ? -2.6686 : (k == 1) ? 2.1834 : urand(-2.6686, 2.1834);
      en = ($urandom_range(0, 4) != 0);
      if (!en) stalls++;
      in_valid = 1;
      x = r2fx(a);
      @(negedge clk);
      while (!en) begin
        en = 1;
        @(negedge clk);
      end
      // the value was taken on the last enabled edge
      q.push_back(fx2r(x));
    end
    in_valid = 0;
    en = 1;
    repeat (10) @(negedge clk);
    check(q.size() == 0, $sformatf("%0d results missing", q.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
