// tb_sync_fifo -- self-checking test of the first-word-fall-through queue.
//
// Random pushes and pops (never pushing when full or popping when empty)
// against a SystemVerilog queue model; checks head data, full and empty,
// and that a pushed word is visible at the head one cycle after the push.
module tb_sync_fifo;
  localparam int WIDTH = 16, DEPTH = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             push = 0, pop = 0, full, empty;
  logic [WIDTH-1:0] wdata, rdata;
  int               checks = 0, failures = 0, n_full = 0;
  logic [WIDTH-1:0] model [$];

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full, "empty after reset");
    for (int k = 0; k < 2000; k++) begin
      push  = !full && ($urandom_range(0, 99) < ((k / 200) % 2 ? 70 : 35));
      pop   = !empty && ($urandom_range(0, 99) < ((k / 200) % 2 ? 35 : 70));
      wdata = WIDTH'($urandom);
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(wdata);
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      if (full) n_full++;
      if (model.size() > 0) check(rdata == model[0], "head data");
    end
    check(n_full > 0, "full reached");
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
