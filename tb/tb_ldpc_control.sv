// tb_ldpc_control -- self-checking test of the decode controller, for the
// parallel (SER_BITS = 0) and bit-serial (SER_BITS = 4) configurations.
// A stand-in datapath reports all parity checks satisfied once a chosen
// number of variable node phases has run.  For each decode the testbench
// checks: the clock count from start to stop (2 + SB + (k-1)(3 + 2 SB)),
// the number of each phase strobe, zero/capture in the accepting clock,
// finish one clock before stop, the parity and iteration outputs, the
// max_iteration limit (parity = 0), and that start is ignored while busy.
module tb_ldpc_control;
  import ldpc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic  start [2];
  iter_t max_iteration [2];
  logic  parity_ok [2];
  logic  stop [2], busy [2], parity [2], capture [2], zero [2];
  logic  vn_load [2], v2c_shift [2], cn_load [2], c2v_shift [2];
  logic  end_o_vn [2], end_o_cn [2], finish [2];
  iter_t iterations [2];
  int checks = 0, failures = 0;
  int target [2];
  int n_vn [2], n_cn [2], n_v2c [2], n_c2v [2];
  int limit_hits = 0, converge_hits = 0, busy_starts = 0;

  for (genvar g = 0; g < 2; g++) begin : g_dut
    ldpc_control #(.SER_BITS(g * 4)) dut (
      .clk, .rst_n, .start(start[g]), .max_iteration(max_iteration[g]),
      .parity_ok(parity_ok[g]), .stop(stop[g]), .busy(busy[g]), .parity(parity[g]),
      .iterations(iterations[g]), .capture(capture[g]), .zero(zero[g]),
      .vn_load(vn_load[g]), .v2c_shift(v2c_shift[g]), .cn_load(cn_load[g]),
      .c2v_shift(c2v_shift[g]), .end_o_vn(end_o_vn[g]), .end_o_cn(end_o_cn[g]),
      .finish(finish[g])
    );
  end

  always #5 clk = ~clk;

  // stand-in datapath: checks satisfied after target[g] variable node phases
  always_ff @(posedge clk) begin
    for (int g = 0; g < 2; g++) begin
      if (zero[g]) begin
        n_vn[g] <= 0; n_cn[g] <= 0; n_v2c[g] <= 0; n_c2v[g] <= 0;
      end else begin
        if (vn_load[g])   n_vn[g]  <= n_vn[g] + 1;
        if (cn_load[g])   n_cn[g]  <= n_cn[g] + 1;
        if (v2c_shift[g]) n_v2c[g] <= n_v2c[g] + 1;
        if (c2v_shift[g]) n_c2v[g] <= n_c2v[g] + 1;
      end
    end
  end
  always_comb
    for (int g = 0; g < 2; g++) parity_ok[g] = (n_vn[g] >= target[g]) && (target[g] > 0);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // one decode on instance g that converges after k iterations (k = 0: never)
  task automatic decode(int g, int k, int maxit);
    int sb, cyc, expk, exp_cyc;
    bit seen_finish;
    sb = g * 4;
    target[g] = k;
    max_iteration[g] = iter_t'(maxit);
    expk = (k > 0 && k <= ((maxit < 1) ? 1 : maxit)) ? k : ((maxit < 1) ? 1 : maxit);
    exp_cyc = 2 + sb + (expk - 1) * (3 + 2 * sb);
    start[g] = 1;
    #1;
    chk(zero[g] && capture[g], "zero/capture with start");
    @(posedge clk); #1;
    start[g] = 0;
    cyc = 0;
    seen_finish = 0;
    while (!stop[g] && cyc < 1000) begin
      if (cyc == 2) begin
        // a start while busy must be ignored
        start[g] = 1; #1;
        chk(!zero[g] && !capture[g], "start ignored while busy");
        busy_starts++;
      end
      seen_finish = finish[g];
      @(posedge clk); #1;
      start[g] = 0;
      cyc++;
    end
    chk(cyc == exp_cyc, $sformatf("g%0d k%0d cycles %0d exp %0d", g, k, cyc, exp_cyc));
    chk(seen_finish, "finish one clock before stop");
    chk(int'(iterations[g]) == expk, $sformatf("g%0d iterations %0d exp %0d", g, iterations[g], expk));
    chk(parity[g] == (k > 0 && k <= expk), "parity result");
    chk(n_vn[g] == expk && n_cn[g] == expk - 1, "phase strobe counts");
    chk(n_v2c[g] == expk * sb && n_c2v[g] == (expk - 1) * sb, "shift clock counts");
    if (parity[g]) converge_hits++; else limit_hits++;
    repeat (3) @(posedge clk); #1;
    chk(stop[g] && !busy[g], "stop held in done");
  endtask

  initial begin
    for (int g = 0; g < 2; g++) begin
      start[g] = 0; max_iteration[g] = '0; target[g] = 0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    chk(!stop[0] && !busy[0] && !stop[1] && !busy[1], "idle after reset");
    for (int g = 0; g < 2; g++) begin
      decode(g, 3, 6);
      decode(g, 1, 6);
      decode(g, 6, 6);
      decode(g, 0, 5);     // never converges: stops at the limit
      decode(g, 9, 4);     // would converge too late
      decode(g, 0, 0);     // limit 0 acts as 1
      decode(g, 15, 15);
      for (int n = 0; n < 30; n++) decode(g, $urandom_range(15), $urandom_range(15));
    end
    chk(limit_hits > 0 && converge_hits > 0 && busy_starts > 0, "all mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
