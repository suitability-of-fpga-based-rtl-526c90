// tb_inv_farm -- self-checking test of the inversion farm.
//
// Two farms are driven with the same stream of 150 random divisors offered
// back to back:
//  - the default farm (60 inverters) must accept one request per cycle
//    with no stall, deliver the first result 2F = 56 cycles after the first
//    request, and then one result per cycle, in request order;
//  - a farm of exactly 2F = 56 inverters must also run without a stall;
//  - a farm of 8 inverters must stall its input (the bottleneck the farm
//    removes), still return every result in order, and keep working while
//    its output is randomly held back.
// Every result is compared bit-exactly with floor(2^56/|D|), signed.
module tb_inv_farm;
  import fx_pkg::*;

  localparam int N = 150;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  fx_t  vals [N];
  fx_t  expv [N];

  // farm A: default size
  logic a_in_valid, a_in_ready, a_out_valid, a_out_ovf;
  fx_t  a_in, a_out;
  int   a_sent = 0, a_got = 0, a_stalls = 0;
  // farm B: 8 inverters, random output backpressure
  logic b_in_valid, b_in_ready, b_out_valid, b_out_ready, b_out_ovf;
  fx_t  b_in, b_out;
  int   b_sent = 0, b_got = 0, b_stalls = 0;

  // farm C: 2F inverters, output always ready
  logic c_in_valid, c_in_ready, c_out_valid, c_out_ovf;
  fx_t  c_in, c_out;
  int   c_sent = 0, c_got = 0, c_stalls = 0;

  int   cyc = 0, a_first_in = -1, a_first_out = -1, a_last_out = -1;

  inv_farm u_a (.clk, .rst_n, .in_valid(a_in_valid), .in_ready(a_in_ready), .in_data(a_in),
                .out_valid(a_out_valid), .out_ready(1'b1), .out_data(a_out), .out_ovf(a_out_ovf));
  inv_farm #(.NINV(8)) u_b (.clk, .rst_n, .in_valid(b_in_valid), .in_ready(b_in_ready), .in_data(b_in),
                .out_valid(b_out_valid), .out_ready(b_out_ready), .out_data(b_out), .out_ovf(b_out_ovf));

  inv_farm #(.NINV(2 * FX_F)) u_c (.clk, .rst_n, .in_valid(c_in_valid), .in_ready(c_in_ready), .in_data(c_in),
                .out_valid(c_out_valid), .out_ready(1'b1), .out_data(c_out), .out_ovf(c_out_ovf));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  assign a_in_valid = rst_n && (a_sent < N);
  assign a_in       = vals[(a_sent < N) ? a_sent : 0];
  assign c_in_valid = rst_n && (c_sent < N);
  assign c_in       = vals[(c_sent < N) ? c_sent : 0];
  assign b_in_valid = rst_n && (b_sent < N);
  assign b_in       = vals[(b_sent < N) ? b_sent : 0];

  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (a_in_valid && a_in_ready) begin
        a_sent <= a_sent + 1;
        if (a_first_in < 0) a_first_in <= cyc;
      end
      if (a_in_valid && !a_in_ready) a_stalls <= a_stalls + 1;
      if (a_out_valid) begin
        check(!a_out_ovf && a_out == expv[a_got], $sformatf("A result %0d", a_got));
        if (a_first_out < 0) a_first_out <= cyc;
        a_last_out <= cyc;
        a_got <= a_got + 1;
      end
      if (c_in_valid && c_in_ready) c_sent <= c_sent + 1;
      if (c_in_valid && !c_in_ready) c_stalls <= c_stalls + 1;
      if (c_out_valid) begin
        check(!c_out_ovf && c_out == expv[c_got], $sformatf("C result %0d", c_got));
        c_got <= c_got + 1;
      end
      if (b_in_valid && b_in_ready) b_sent <= b_sent + 1;
      if (b_in_valid && !b_in_ready) b_stalls <= b_stalls + 1;
      if (b_out_valid && b_out_ready) begin
        check(!b_out_ovf && b_out == expv[b_got], $sformatf("B result %0d", b_got));
        b_got <= b_got + 1;
      end
    end
  end

  always @(negedge clk) b_out_ready = ($urandom_range(0, 3) != 0);

  initial begin
    for (int k = 0; k < N; k++) begin
      longint r, m;
      r = longint'($urandom_range(1 << 20, 32'h7fff_ffff)) <<< $urandom_range(0, 14);
      if ($urandom_range(0, 1)) r = -r;
      m = (r < 0) ? -r : r;
      vals[k] = fx_t'(r);
      expv[k] = fx_t'((r < 0) ? -((64'sd1 <<< 56) / m) : ((64'sd1 <<< 56) / m));
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (a_got == N && b_got == N && c_got == N);
    @(negedge clk);
    check(a_stalls == 0, $sformatf("default farm stalled %0d times", a_stalls));
    check(a_first_out - a_first_in == 2 * FX_F,
          $sformatf("default farm latency %0d", a_first_out - a_first_in));
    check(a_last_out - a_first_out == N - 1,
          $sformatf("default farm output span %0d", a_last_out - a_first_out));
    check(c_stalls == 0, $sformatf("2F farm stalled %0d times", c_stalls));
    check(b_stalls > 0, "small farm never stalled");
    $display("small farm: %0d input stall cycles", b_stalls);
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
