// tb_esr_pf_200 -- the sampler sized for 200 particles per sampling period,
// the particle count at which the estimates stop improving for this
// process.
//
// One simulator copy with NP = 200 and the full 60-inverter farm. The
// testbench plays the host as in tb_esr_pf_sampler: broadcast and
// per-particle loads, resampling between steps, every x_k+1 and y checked
// against the double-precision models, loads during a step ignored.
// Without output stalls a step must
// take NP + 80 = 280 cycles (7 us at 40 MHz, far inside a 133 ms period)
// and the farm must never hold back the input.
module tb_esr_pf_200;
  import fx_pkg::*;
  import esr_ref_pkg::*;

  localparam int NC = 1, NP = 200;
  localparam int IW = $clog2(NP), CW = 1;
  localparam int STEP_LAT = 2 * FX_F + DYN_LAT + H_LAT + 2;
  localparam int EXTRA_STEPS = 2;
  localparam bit EXPECT_FARM_STALL = 0;
  localparam int WATCHDOG = 40000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                init = 0, wr = 0, start = 0, busy, out_valid, out_ready = 1;
  xstate_t             init_x, wr_x;
  logic [CW-1:0]       wr_copy = '0;
  logic [IW-1:0]       wr_idx = '0, out_idx;
  pnoise_t             wr_pn;
  mnoise_t             wr_mn;
  ucmd_t               u_in;
  fx_t                 ts_in;
  xstate_t [NC-1:0]    out_x;
  yobs_t   [NC-1:0]    out_y;
  logic    [NC-1:0]    out_err;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_init = 0, n_write = 0, n_steps = 0, n_farm_stall = 0, n_backpressure = 0;
  int n_ovf = 0, n_dpos = 0, n_dneg = 0, n_latency = 0;
  int n_farm_stall_free = 0;
  int n_load_busy = 0;        // loads offered while busy (must be ignored)   // farm stalls during steps without backpressure
  bit no_bp = 0;

  // host-side copy of what each simulator holds
  xstate_t hx  [NC][NP];
  pnoise_t hpn [NC][NP];
  mnoise_t hmn [NC][NP];
  xstate_t rx  [NC][NP];   // results of the last step
  logic    rerr[NC][NP];

  esr_pf_sampler #(.NC(NC), .NP(NP)) dut (
    .clk, .rst_n, .init, .init_x, .wr, .wr_copy, .wr_idx, .wr_x, .wr_pn, .wr_mn,
    .start, .u_in, .ts_in, .busy, .out_valid, .out_ready, .out_idx, .out_x, .out_y, .out_err
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid && !out_ready) n_backpressure++;
      if (dut.g_copy[0].u_sim.f_in_valid && !dut.g_copy[0].u_sim.f_in_ready) begin
        n_farm_stall++;
        if (no_bp) n_farm_stall_free++;
      end
    end
  end

  function automatic pnoise_t rand_pn();
    return '{ic: r2fx(urand(-180.0, 180.0)), vramc: r2fx(urand(-0.01, 0.01))};
  endfunction

  task automatic write_particle(int c, int i, xstate_t x, pnoise_t pn, mnoise_t mn);
    wr = 1; wr_copy = CW'(c); wr_idx = IW'(i); wr_x = x; wr_pn = pn; wr_mn = mn;
    @(negedge clk);
    wr = 0;
    hx[c][i] = x; hpn[c][i] = pn; hmn[c][i] = mn;
    n_write++;
  endtask

  // Run one step: start, collect and check every result.
  task automatic run_step(real bp_pct);
    int got, lat;
    ucmd_t us;
    fx_t   tss;
    rx_t ex;
    ry_t ey;
    u_in  = '{ic: r2fx(urand(4500.0, 5500.0)), vramc: r2fx(urand(0.005, 0.01))};
    ts_in = r2fx(urand(0.05, 0.5));
    check(!busy, "idle before start");
    no_bp = (bp_pct == 0.0);
    start = 1;
    @(negedge clk);
    start = 0;
    check(busy, "busy after start");
    // the command and period are latched at start: change the inputs
    us = u_in; tss = ts_in;
    u_in  = '{ic: r2fx(urand(4500.0, 5500.0)), vramc: r2fx(urand(0.005, 0.01))};
    ts_in = r2fx(urand(0.05, 0.5));
    got = 0;
    lat = 1;
    while (got < NP) begin
      out_ready = (urand(0.0, 100.0) >= bp_pct);
      // loads offered during a step must not reach the particle store
      wr     = ($urandom_range(0, 15) == 0);
      wr_idx = IW'($urandom_range(0, NP - 1));
      wr_x   = rx2fx(rand_state());
      wr_pn  = rand_pn();
      wr_mn  = ry2mn(rand_mnoise());
      init   = ($urandom_range(0, 63) == 0);
      init_x = rx2fx(rand_state());
      if (wr || init) n_load_busy++;
      @(posedge clk);
      if (out_valid && out_ready) begin
        int i;
        i = int'(out_idx);
        if (got == 0 && bp_pct == 0.0) begin
          check(lat == STEP_LAT, $sformatf("first result after %0d cycles, expected %0d", lat, STEP_LAT));
          n_latency++;
        end
        check(i == got, $sformatf("result order %0d vs %0d", i, got));
        for (int c = 0; c < NC; c++) begin
          logic e_err;
          e_err = (hx[c][i].delta == 0 || hx[c][i].delta == 1);
          check(out_err[c] == e_err, $sformatf("copy %0d particle %0d err flag", c, i));
          rx[c][i] = out_x[c];
          rerr[c][i] = out_err[c];
          if (e_err) n_ovf++;
          else begin
            rx_t hwx;
            ex  = ref_f(fx2rx(hx[c][i]), fx2r(us.ic), fx2r(us.vramc),
                        fx2r(hpn[c][i].ic), fx2r(hpn[c][i].vramc), fx2r(tss));
            hwx = fx2rx(out_x[c]);
            check(close(hwx.delta, ex.delta) && close(hwx.ts, ex.ts) && close(hwx.d, ex.d)
                  && close(hwx.xram, ex.xram) && close(hwx.me, ex.me),
                  $sformatf("copy %0d particle %0d state", c, i));
            ey = ref_h(hwx, fx2r(us.ic), '{d: fx2r(hmn[c][i].d), xram: fx2r(hmn[c][i].xram),
                       ir: fx2r(hmn[c][i].ir), lc: fx2r(hmn[c][i].lc), volt: fx2r(hmn[c][i].volt)});
            check(close(fx2r(out_y[c].d), ey.d) && close(fx2r(out_y[c].xram), ey.xram)
                  && close(fx2r(out_y[c].ir), ey.ir) && close(fx2r(out_y[c].lc), ey.lc)
                  && close(fx2r(out_y[c].volt), ey.volt),
                  $sformatf("copy %0d particle %0d measurement", c, i));
            if (out_x[c].d > 0) n_dpos++; else n_dneg++;
          end
        end
        if (got == NP - 1 && bp_pct == 0.0 && !EXPECT_FARM_STALL)
          check(lat == STEP_LAT + NP - 1, $sformatf("last result after %0d cycles", lat));
        got++;
      end
      @(negedge clk);
      lat++;
    end
    out_ready = 1;
    wr = 0;
    init = 0;
    no_bp = 0;
    @(negedge clk);
    check(!busy, "idle after the last result");
    n_steps++;
  endtask

  // Host resampling stand-in: every slot takes the result of a randomly
  // chosen particle that did not overflow, with fresh noise.
  task automatic resample_and_load(bit make_ovf);
    xstate_t nx [NC][NP];
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < NP; i++) begin
        int j;
        do j = $urandom_range(0, NP - 1); while (rerr[c][j]);
        nx[c][i] = rx[c][j];
      end
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < NP; i++) begin
        xstate_t x;
        x = nx[c][i];
        if (make_ovf && i == NP / 2) x.delta = '0;
        write_particle(c, i, x, rand_pn(), ry2mn(rand_mnoise()));
      end
  endtask

  initial begin
    rx_t x0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // step 1: all particles from one broadcast initial state, zero noise
    x0 = rand_state();
    x0.d = 0.5;
    init_x = rx2fx(x0);
    init = 1;
    @(negedge clk);
    init = 0;
    n_init++;
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < NP; i++) begin
        hx[c][i] = init_x; hpn[c][i] = '0; hmn[c][i] = '0;
      end
    run_step(0.0);
    for (int c = 0; c < NC; c++)
      for (int i = 1; i < NP; i++)
        check(rx[c][i] == rx[c][0], "broadcast particles give identical results");

    // step 2: per-particle states and noise, with one zero Delta per copy
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < NP; i++) begin
        xstate_t x;
        x = rx2fx(rand_state());
        if (i == NP / 3) x.delta = (c % 2 == 1) ? fx_t'(1) : fx_t'(0);
        write_particle(c, i, x, rand_pn(), ry2mn(rand_mnoise()));
      end
    run_step(0.0);

    // further steps: resample, reload, run with output backpressure
    for (int s = 0; s < EXTRA_STEPS; s++) begin
      resample_and_load(s == 0);
      run_step(s == 0 ? 0.0 : 40.0);
    end

    check(n_init > 0, "init broadcast happened");
    check(n_write > 0, "per-particle write happened");
    check(n_steps >= 3, "several steps ran");
    check(n_latency > 0, "first-result latency measured");
    check(n_ovf > 0, "reciprocal overflow happened");
    check(n_dpos > 0 && n_dneg > 0, "both resistance branches happened");
    check(n_backpressure > 0, "output backpressure happened");
    check(n_load_busy > 0, "loads offered while busy");
    if (EXPECT_FARM_STALL) check(n_farm_stall > 0, "inversion farm stall happened");
    else check(n_farm_stall_free == 0, "inversion farm never stalls at full size");
    $display("mechanisms: init=%0d writes=%0d steps=%0d latency=%0d ovf=%0d dpos=%0d dneg=%0d backpressure=%0d farm_stall=%0d loads_while_busy=%0d",
             n_init, n_write, n_steps, n_latency, n_ovf, n_dpos, n_dneg, n_backpressure, n_farm_stall, n_load_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
