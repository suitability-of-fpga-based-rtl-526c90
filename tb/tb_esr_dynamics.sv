// tb_esr_dynamics -- self-checking test of the rate pipeline.
//
// Streams 300 random particles (state near the operating point, d on both
// sides of the breakpoint, random command and process noise) with a random
// enable that stalls the pipeline, and compares the five rates of each with
// the double-precision reference model. A first lone particle checks the
// latency of DYN_LAT = 11 cycles.
module tb_esr_dynamics;
  import fx_pkg::*;
  import esr_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    en = 0, in_valid = 0, out_valid;
  fx_t     inv_delta, ts, d;
  ucmd_t   u;
  pnoise_t pn;
  xstate_t rates;
  int      checks = 0, failures = 0;
  rx_t     expq [$];
  int      n_neg_d = 0, n_pos_d = 0;

  esr_dynamics dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  rx_t cur;
  real cur_ic, cur_vr, cur_nic, cur_nvr;

  task automatic new_input();
    cur     = rand_state();
    cur_ic  = urand(4500.0, 5500.0);
    cur_vr  = urand(0.005, 0.01);
    cur_nic = urand(-180.0, 180.0);
    cur_nvr = urand(-0.01, 0.01);
    inv_delta = r2fx(1.0 / cur.delta);
    ts        = r2fx(cur.ts);
    d         = r2fx(cur.d);
    u.ic      = r2fx(cur_ic);
    u.vramc   = r2fx(cur_vr);
    pn.ic     = r2fx(cur_nic);
    pn.vramc  = r2fx(cur_nvr);
  endtask

  always @(posedge clk) begin
    if (rst_n && en) begin
      if (in_valid) begin
        rx_t xin;
        xin = cur;
        xin.ts = fx2r(ts); xin.d = fx2r(d); xin.delta = 1.0 / fx2r(inv_delta);
        expq.push_back(ref_rates(xin, fx2r(u.ic), fx2r(u.vramc), fx2r(pn.ic), fx2r(pn.vramc)));
        if (xin.d < 0.0) n_neg_d++; else n_pos_d++;
      end
      if (out_valid) begin
        rx_t e;
        e = expq.pop_front();
        check(close(fx2r(rates.delta), e.delta), $sformatf("dDelta %f vs %f", fx2r(rates.delta), e.delta));
        check(close(fx2r(rates.ts), e.ts),       $sformatf("dTs %f vs %f", fx2r(rates.ts), e.ts));
        check(close(fx2r(rates.d), e.d),         $sformatf("dd %f vs %f", fx2r(rates.d), e.d));
        check(close(fx2r(rates.xram), e.xram),   $sformatf("dXram %f vs %f", fx2r(rates.xram), e.xram));
        check(close(fx2r(rates.me), e.me),       $sformatf("dMe %f vs %f", fx2r(rates.me), e.me));
      end
    end
  end

  initial begin
    int lat;
    new_input();
    repeat (3) @(negedge clk);
    rst_n = 1;
    en = 1; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    lat = 1;
    while (!out_valid) begin
      @(negedge clk);
      lat++;
    end
    check(lat == DYN_LAT, $sformatf("latency %0d", lat));
    for (int k = 0; k < 300; k++) begin
      new_input();
      in_valid = 1;
      en = ($urandom_range(0, 4) != 0);
      @(negedge clk);
      while (!en) begin
        en = 1;
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (DYN_LAT + 2) @(negedge clk);
    check(expq.size() == 0, $sformatf("%0d results missing", expq.size()));
    check(n_neg_d > 0 && n_pos_d > 0, "both resistance branches exercised");
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
