// tb_ldpc_top -- end-to-end test of both decoders through their host
// interface, at the design's default (and only) size.
//
// Each decode: set llr_in and max_iteration, pulse start, wait for stop,
// then compare parity, iterations and the ten corrected LLRs with the
// reference min-sum model, and the start-to-stop clock count with
// 3k - 1 (parallel) and 11k - 5 (bit-serial) for k iterations.
// Vectors: the worked example (6,6,2,4,7,4,-2,6,4,7), which must satisfy
// all checks in its third iteration, then random LLR vectors with random
// iteration limits, and noisy copies of the all-zero codeword.  Both
// decoders get the same vector and must agree.  Mechanisms counted (each
// must occur): decode stopped by satisfied parity, decode stopped by the
// iteration limit, restart from stop without reset, start ignored while
// busy, first-pass success (no check node phase), check node phases and
// serial shift phases.
module tb_ldpc_top;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  start [2];
  msg_t  llr_in [2][N_VN];
  iter_t max_iteration [2];
  logic  stop [2], parity [2], end_o_vn [2], end_o_cn [2];
  msg_t  llr_out [2][N_VN];
  iter_t iterations [2];
  int    checks = 0, failures = 0;
  int    n_parity_stop = 0, n_limit_stop = 0, n_restart = 0, n_busy_start = 0;
  int    n_first_pass = 0, n_cn_phase = 0, n_vn_phase = 0;

  ldpc_top dut (
    .clk, .rst_n,
    .d1_start(start[0]), .d1_llr_in(llr_in[0]), .d1_max_iteration(max_iteration[0]),
    .d1_stop(stop[0]), .d1_parity(parity[0]), .d1_llr_out(llr_out[0]),
    .d1_iterations(iterations[0]), .d1_end_o_vn(end_o_vn[0]), .d1_end_o_cn(end_o_cn[0]),
    .d2_start(start[1]), .d2_llr_in(llr_in[1]), .d2_max_iteration(max_iteration[1]),
    .d2_stop(stop[1]), .d2_parity(parity[1]), .d2_llr_out(llr_out[1]),
    .d2_iterations(iterations[1]), .d2_end_o_vn(end_o_vn[1]), .d2_end_o_cn(end_o_cn[1])
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (end_o_vn[0] || end_o_vn[1]) n_vn_phase++;
    if (end_o_cn[0] || end_o_cn[1]) n_cn_phase++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Run one decode of vector v on decoder g (0: parallel, 1: serial).
  task automatic run_decode(int g, vvec_t v, int maxit, output vvec_t got, output int k);
    vvec_t ref_out;
    int    ref_it, cyc, exp_cyc;
    bit    ref_ok;
    ldpc_ref_pkg::decode(v, maxit, ref_out, ref_it, ref_ok);
    if (stop[g]) n_restart++;
    for (int i = 0; i < N_VN; i++) llr_in[g][i] = msg_t'(v[i]);
    max_iteration[g] = iter_t'(maxit);
    start[g] = 1;
    @(posedge clk); #1;
    start[g] = 0;
    // scramble the inputs: the decoder must use the latched copy
    for (int i = 0; i < N_VN; i++) llr_in[g][i] = msg_t'($urandom);
    cyc = 0;
    while (!stop[g] && cyc < 2000) begin
      if (cyc == 1) begin
        start[g] = 1;          // ignored: decoder is busy
        n_busy_start++;
      end
      @(posedge clk); #1;
      start[g] = 0;
      cyc++;
    end
    k = int'(iterations[g]);
    exp_cyc = (g == 0) ? 3 * ref_it - 1 : 11 * ref_it - 5;
    chk(cyc == exp_cyc, $sformatf("d%0d clocks %0d exp %0d", g + 1, cyc, exp_cyc));
    chk(k == ref_it, $sformatf("d%0d iterations %0d exp %0d", g + 1, k, ref_it));
    chk(parity[g] == ref_ok, $sformatf("d%0d parity %0b exp %0b", g + 1, parity[g], ref_ok));
    for (int i = 0; i < N_VN; i++) begin
      got[i] = int'(llr_out[g][i]);
      chk(got[i] == ref_out[i],
          $sformatf("d%0d llr_out[%0d] %0d exp %0d", g + 1, i, got[i], ref_out[i]));
    end
    if (ref_ok) n_parity_stop++; else n_limit_stop++;
    if (ref_ok && ref_it == 1) n_first_pass++;
  endtask

  task automatic both(vvec_t v, int maxit);
    vvec_t o1, o2;
    int k1, k2;
    bit same;
    run_decode(0, v, maxit, o1, k1);
    run_decode(1, v, maxit, o2, k2);
    same = (k1 == k2) && (parity[0] == parity[1]);
    for (int i = 0; i < NV; i++) if (o1[i] != o2[i]) same = 0;
    chk(same, "designs 1 and 2 agree");
  endtask

  // Noisy all-zero codeword: LLR = 4 + noise, noise a sum of uniforms.
  task automatic noisy_zero(int spread, output vvec_t v);
    for (int i = 0; i < NV; i++) begin
      int n = 0;
      for (int t = 0; t < 4; t++) n += int'($urandom_range(2 * spread)) - spread;
      v[i] = clamp(4 + n / 2);
    end
  endtask

  initial begin
    vvec_t v, o;
    int k;
    for (int g = 0; g < 2; g++) begin
      start[g] = 0; max_iteration[g] = '0;
      for (int i = 0; i < N_VN; i++) llr_in[g][i] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    chk(!stop[0] && !stop[1], "idle after reset");

    // worked example: all checks satisfied in the third iteration
    v = '{6, 6, 2, 4, 7, 4, -2, 6, 4, 7};
    for (int g = 0; g < 2; g++) begin
      run_decode(g, v, 15, o, k);
      chk(k == 3 && parity[g], $sformatf("d%0d example converges in 3 iterations", g + 1));
      chk(o[6] > 0, "example: bit 7 corrected to 0");
    end
    // the same vector with a limit of 2 iterations stops without parity
    both(v, 2);
    chk(!parity[0] && !parity[1], "example stopped by the limit of 2");

    for (int n = 0; n < 150; n++) begin
      for (int i = 0; i < NV; i++) v[i] = int'($urandom_range(15)) - 8;
      both(v, $urandom_range(15));
    end
    for (int n = 0; n < 150; n++) begin
      noisy_zero(1 + n % 6, v);
      both(v, 6);
    end

    chk(n_parity_stop > 0, "mechanism: stop on satisfied parity");
    chk(n_limit_stop > 0, "mechanism: stop on iteration limit");
    chk(n_restart > 0, "mechanism: restart from stop");
    chk(n_busy_start > 0, "mechanism: start ignored while busy");
    chk(n_first_pass > 0, "mechanism: success on the first pass");
    chk(n_cn_phase > 0 && n_vn_phase > 0, "mechanism: variable and check node phases");
    $display("mechanisms: parity_stop=%0d limit_stop=%0d restart=%0d busy_start=%0d first_pass=%0d vn_phases=%0d cn_phases=%0d",
             n_parity_stop, n_limit_stop, n_restart, n_busy_start, n_first_pass,
             n_vn_phase, n_cn_phase);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
