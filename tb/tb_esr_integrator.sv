// tb_esr_integrator -- self-checking test of the Euler update stage.
//
// Applies random states, rates and sampling periods with a random enable
// and checks x_next = x + rates*ts against an exact integer model of the
// Q20.28 multiply, field by field, and the one-cycle latency.
module tb_esr_integrator;
  import fx_pkg::*;
  import esr_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    en = 0, in_valid = 0, out_valid;
  xstate_t x, rates, x_next;
  fx_t     ts;
  int      checks = 0, failures = 0;
  xstate_t expq [$];
  int      n_stall = 0;

  esr_integrator dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic fx_t ref_mac(fx_t a, fx_t r, fx_t t);
    logic signed [95:0] p;
    p = 96'(r) * 96'(t);
    return a + fx_t'(p >>> 28);
  endfunction

  always @(posedge clk) begin
    if (rst_n && !en) n_stall++;
    if (rst_n && en) begin
      if (in_valid)
        expq.push_back('{delta: ref_mac(x.delta, rates.delta, ts),
                         ts:    ref_mac(x.ts, rates.ts, ts),
                         d:     ref_mac(x.d, rates.d, ts),
                         xram:  ref_mac(x.xram, rates.xram, ts),
                         me:    ref_mac(x.me, rates.me, ts)});
      if (out_valid) begin
        xstate_t e;
        e = expq.pop_front();
        check(x_next == e, $sformatf("x_next %p vs %p", x_next, e));
      end
    end
  end

  task automatic randomize_inputs();
    x     = rx2fx(rand_state());
    rates = '{delta: r2fx(urand(-1.0, 1.0)), ts: r2fx(urand(-5.0, 5.0)),
              d: r2fx(urand(-0.1, 0.1)), xram: r2fx(urand(0.0, 0.01)),
              me: r2fx(urand(-500.0, 500.0))};
    ts    = r2fx(urand(0.1, 10.0));
  endtask

  initial begin
    randomize_inputs();
    repeat (3) @(negedge clk);
    rst_n = 1;
    en = 1; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    check(out_valid == 1'b1, "latency of one cycle");
    for (int k = 0; k < 300; k++) begin
      randomize_inputs();
      in_valid = ($urandom_range(0, 3) != 0);
      en       = ($urandom_range(0, 4) != 0);
      @(negedge clk);
      while (!en) begin
        en = 1;
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (3) @(negedge clk);
    check(expq.size() == 0, "all results delivered");
    check(n_stall > 0, "enable stalls exercised");
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
