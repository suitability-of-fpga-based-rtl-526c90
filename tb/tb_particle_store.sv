// tb_particle_store -- self-checking test of the particle and noise store.
//
// Broadcasts an initial state, checks every slot holds it with zero noise,
// then performs random single-particle writes and reads every slot against
// a shadow copy. Reads are combinational, writes take effect at the edge.
module tb_particle_store;
  import fx_pkg::*;
  import esr_ref_pkg::*;

  localparam int NP = 37;
  localparam int IW = $clog2(NP);

  logic clk = 0;
  always #5 clk = ~clk;

  logic          init = 0, wr = 0;
  xstate_t       init_x, wr_x, rd_x;
  logic [IW-1:0] wr_idx, rd_idx;
  pnoise_t       wr_pn, rd_pn;
  mnoise_t       wr_mn, rd_mn;
  int            checks = 0, failures = 0;

  xstate_t sx [NP];
  pnoise_t spn [NP];
  mnoise_t smn [NP];

  particle_store #(.NP(NP)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic read_all(string tag);
    for (int i = 0; i < NP; i++) begin
      rd_idx = IW'(i);
      #1;
      check(rd_x == sx[i] && rd_pn == spn[i] && rd_mn == smn[i],
            $sformatf("%s slot %0d", tag, i));
    end
    @(negedge clk);
  endtask

  initial begin
    init_x = rx2fx(rand_state());
    rd_idx = '0;
    @(negedge clk);
    init = 1;
    @(negedge clk);
    init = 0;
    for (int i = 0; i < NP; i++) begin
      sx[i] = init_x; spn[i] = '0; smn[i] = '0;
    end
    read_all("init");
    for (int k = 0; k < 200; k++) begin
      int i;
      i = $urandom_range(0, NP - 1);
      wr = 1;
      wr_idx = IW'(i);
      wr_x   = rx2fx(rand_state());
      wr_pn  = '{ic: r2fx(urand(-180.0, 180.0)), vramc: r2fx(urand(-0.01, 0.01))};
      wr_mn  = ry2mn(rand_mnoise());
      rd_idx = IW'(i);
      #1;
      check(rd_x == sx[i], "write not visible before the edge");
      @(negedge clk);
      sx[i] = wr_x; spn[i] = wr_pn; smn[i] = wr_mn;
      wr = 0;
      #1;
      check(rd_x == wr_x && rd_pn == wr_pn && rd_mn == wr_mn, "read after write");
    end
    read_all("final");
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
