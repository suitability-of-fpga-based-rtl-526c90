// tb_esr_hmodel -- self-checking test of the measurement model pipeline.
//
// Feeds random particle states (d on both sides of zero) with random
// measurement noise, under random input gaps and random output
// backpressure, and compares the five simulated measurements with the
// double-precision reference; the state and side data must come out
// unchanged and in order. A lone first particle checks the latency of
// H_LAT = 11 cycles.
module tb_esr_hmodel;
  import fx_pkg::*;
  import esr_ref_pkg::*;

  localparam int SIDE_W = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fx_t               u_ic;
  logic              in_valid = 0, in_ready, out_valid, out_ready = 1;
  xstate_t           in_x, out_x;
  mnoise_t           in_mn;
  logic [SIDE_W-1:0] in_side, out_side;
  yobs_t             out_y;
  int                checks = 0, failures = 0;
  int                n_stall = 0, n_neg = 0, n_pos = 0;

  typedef struct {
    ry_t               y;
    xstate_t           x;
    logic [SIDE_W-1:0] side;
  } exp_t;
  exp_t expq [$];

  esr_hmodel #(.SIDE_W(SIDE_W)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  ry_t cur_n;
  task automatic new_input();
    rx_t x;
    x = rand_state();
    if ($urandom_range(0, 9) == 0) x.d = 0.0;
    in_x    = rx2fx(x);
    cur_n   = rand_mnoise();
    in_mn   = ry2mn(cur_n);
    in_side = SIDE_W'($urandom);
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid && !out_ready) n_stall++;
      if (in_valid && in_ready) begin
        exp_t e;
        e.y = ref_h(fx2rx(in_x), fx2r(u_ic), '{d: fx2r(in_mn.d), xram: fx2r(in_mn.xram),
                    ir: fx2r(in_mn.ir), lc: fx2r(in_mn.lc), volt: fx2r(in_mn.volt)});
        e.x = in_x;
        e.side = in_side;
        expq.push_back(e);
        if (in_x.d > 0) n_pos++; else n_neg++;
      end
      if (out_valid && out_ready) begin
        exp_t e;
        e = expq.pop_front();
        check(close(fx2r(out_y.d), e.y.d),       $sformatf("y.d %f vs %f", fx2r(out_y.d), e.y.d));
        check(close(fx2r(out_y.xram), e.y.xram), "y.xram");
        check(close(fx2r(out_y.ir), e.y.ir),     "y.ir");
        check(close(fx2r(out_y.lc), e.y.lc),     $sformatf("y.lc %f vs %f", fx2r(out_y.lc), e.y.lc));
        check(close(fx2r(out_y.volt), e.y.volt), $sformatf("y.volt %f vs %f", fx2r(out_y.volt), e.y.volt));
        check(out_x == e.x && out_side == e.side, "state and side data carried through");
      end
    end
  end

  initial begin
    int lat;
    u_ic = r2fx(urand(4500.0, 5500.0));
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
    check(lat == H_LAT, $sformatf("latency %0d", lat));
    @(negedge clk);
    for (int k = 0; k < 400; k++) begin
      new_input();
      in_valid  = ($urandom_range(0, 4) != 0);
      out_ready = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      while (in_valid && !in_ready) begin
        out_ready = ($urandom_range(0, 3) != 0);
        @(negedge clk);
      end
    end
    in_valid = 0;
    out_ready = 1;
    repeat (H_LAT + 2) @(negedge clk);
    check(expq.size() == 0, $sformatf("%0d results missing", expq.size()));
    check(n_stall > 0, "output backpressure exercised");
    check(n_neg > 0 && n_pos > 0, "both d branches exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
