// tb_fx_inverter -- self-checking test of the sequential reciprocal.
//
// Inverts a set of fixed and random Q20.28 values (both signs, magnitudes
// from 2^-18 to 2^19) and compares every quotient bit-exactly with
// floor(2^56/|D|) computed in 64-bit integers, with the sign applied. Also
// checks that done rises exactly 2F = 56 cycles after start, that the
// result is held until ack, and that tiny divisors (0, 1 ulp, 512 ulp)
// raise the out-of-range flag while 513 ulp does not.
module tb_fx_inverter;
  import fx_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start = 0, ack = 0;
  fx_t  din = '0;
  logic busy, done, ovf;
  fx_t  q;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  fx_inverter dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_one(longint raw);
    longint mag, expq;
    int     cycles;
    bit     exp_ovf;
    mag     = (raw < 0) ? -raw : raw;
    exp_ovf = (mag == 0) || ((64'sd1 <<< 56) / mag >= (64'sd1 <<< 47));
    expq    = (mag == 0) ? 0 : (64'sd1 <<< 56) / mag;
    if (raw < 0) expq = -expq;
    @(negedge clk);
    din   = fx_t'(raw);
    start = 1;
    @(negedge clk);
    start  = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == 2 * FX_F, $sformatf("latency %0d for D=%0d", cycles, raw));
    check(ovf == exp_ovf, $sformatf("ovf=%0d for D=%0d", ovf, raw));
    if (!exp_ovf)
      check(q == fx_t'(expq), $sformatf("q=%0d exp=%0d for D=%0d", q, expq, raw));
    // result must hold while not acknowledged
    repeat (3) @(negedge clk);
    check(done && busy, "result held until ack");
    ack = 1;
    @(negedge clk);
    ack = 0;
    check(!busy && !done, "released after ack");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_one(longint'(1) <<< 28);              // 1.0
    run_one(-(longint'(3) <<< 28));           // -3.0
    run_one(longint'(14.584705609 * 268435456.0));
    run_one(longint'(0.25 * 268435456.0));
    run_one(longint'(1) <<< 47 - 1);          // near the top of the range
    run_one(0);
    run_one(1);
    run_one(512);
    run_one(513);
    run_one(-513);
    for (int k = 0; k < 40; k++) begin
      longint r;
      r = longint'($urandom) * longint'($urandom_range(1, 1 << 15));
      r = r >>> $urandom_range(0, 20);
      if (r < 513) r = r + 513;
      if ($urandom_range(0, 1)) r = -r;
      run_one(r);
    end
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
