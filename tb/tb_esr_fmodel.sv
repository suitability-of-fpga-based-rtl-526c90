// tb_esr_fmodel -- self-checking test of the physical model F.
//
// Streams random particles with random process noise through F, with
// random input gaps and random output backpressure, and compares each
// x_k+1 with one Euler step of the double-precision reference. A few
// particles have Delta = 0 or one unit, whose reciprocal cannot be
// represented; their out_err must be set. Also checks the side data order,
// the latency of 2F + DYN_LAT + 1 = 68 cycles for a lone particle, and that
// backpressure reached the input (in_ready low).
module tb_esr_fmodel;
  import fx_pkg::*;
  import esr_ref_pkg::*;

  localparam int SIDE_W = 10;
  localparam int LAT    = 2 * FX_F + DYN_LAT + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ucmd_t             u;
  fx_t               ts;
  logic              in_valid = 0, in_ready, out_valid, out_ready = 1, out_err;
  xstate_t           in_x, out_x;
  pnoise_t           in_pn;
  logic [SIDE_W-1:0] in_side, out_side;
  int                checks = 0, failures = 0;
  int                n_in_stall = 0, n_out_stall = 0, n_err = 0;

  typedef struct {
    rx_t               x;
    logic              err;
    logic [SIDE_W-1:0] side;
  } exp_t;
  exp_t expq [$];

  esr_fmodel #(.SIDE_W(SIDE_W)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic new_input();
    rx_t x;
    x = rand_state();
    in_x    = rx2fx(x);
    if ($urandom_range(0, 49) == 0) in_x.delta = fx_t'($urandom_range(0, 1));
    in_pn   = '{ic: r2fx(urand(-180.0, 180.0)), vramc: r2fx(urand(-0.01, 0.01))};
    in_side = SIDE_W'($urandom);
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && !in_ready) n_in_stall++;
      if (out_valid && !out_ready) n_out_stall++;
      if (in_valid && in_ready) begin
        exp_t e;
        e.err  = (in_x.delta == 0 || in_x.delta == 1);
        if (!e.err)
          e.x = ref_f(fx2rx(in_x), fx2r(u.ic), fx2r(u.vramc), fx2r(in_pn.ic),
                      fx2r(in_pn.vramc), fx2r(ts));
        e.side = in_side;
        expq.push_back(e);
      end
      if (out_valid && out_ready) begin
        exp_t e;
        rx_t  h;
        e = expq.pop_front();
        h = fx2rx(out_x);
        check(out_side == e.side, "side data order");
        check(out_err == e.err, "reciprocal overflow flag");
        if (e.err) n_err++;
        else begin
          check(close(h.delta, e.x.delta), $sformatf("delta %f vs %f", h.delta, e.x.delta));
          check(close(h.ts, e.x.ts),       $sformatf("ts %f vs %f", h.ts, e.x.ts));
          check(close(h.d, e.x.d),         $sformatf("d %f vs %f", h.d, e.x.d));
          check(close(h.xram, e.x.xram),   "xram");
          check(close(h.me, e.x.me),       $sformatf("me %f vs %f", h.me, e.x.me));
        end
      end
    end
  end

  initial begin
    int lat;
    u  = '{ic: r2fx(urand(4500.0, 5500.0)), vramc: r2fx(urand(0.005, 0.01))};
    ts = r2fx(0.5);
    new_input();
    repeat (3) @(negedge clk);
    rst_n = 1;
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    lat = 1;
    while (!out_valid) begin
      @(negedge clk);
      lat++;
    end
    check(lat == LAT, $sformatf("latency %0d, expected %0d", lat, LAT));
    @(negedge clk);
    for (int k = 0; k < 600; k++) begin
      new_input();
      in_valid  = ($urandom_range(0, 9) != 0);
      out_ready = (k / 150) % 2 ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 9) != 0);
      @(negedge clk);
      while (in_valid && !in_ready) begin
        out_ready = ($urandom_range(0, 1) != 0);
        @(negedge clk);
      end
    end
    in_valid = 0;
    out_ready = 1;
    repeat (LAT + 4) @(negedge clk);
    check(expq.size() == 0, $sformatf("%0d results missing", expq.size()));
    check(n_in_stall > 0, "input stall exercised");
    check(n_out_stall > 0, "output backpressure exercised");
    check(n_err > 0, "reciprocal overflow exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
