// tb_ldpc_awgn -- channel workload for both decoders: random codewords of
// the 10x5 code, BPSK over an AWGN channel at Eb/N0 = 1..7 dB, decoded
// through the host interface of ldpc_top with max_iteration = 15.
//
// The 32 codewords are found by testing all 1024 10-bit words against H.
// Bit b is sent as +1 (b = 0) or -1 (b = 1); the received value y gets
// Gaussian noise of variance 1 / (2 R Eb/N0) with R = 1/2 (Box-Muller), and
// the 4-bit channel LLR is round(2y / sigma^2) clamped to [-8, 7].
// For every frame both decoders must agree with the reference model on
// parity, iteration count and all ten corrected LLRs.  Per Eb/N0 the test
// prints the mean and spread of the iteration count and the bit error
// rates before and after decoding, and it checks that decoding removes
// errors overall (decoded errors below raw hard-decision errors).
module tb_ldpc_awgn;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int FRAMES = 300;

  logic  clk = 0, rst_n = 0;
  logic  start [2];
  msg_t  llr_in [2][N_VN];
  iter_t max_iteration [2];
  logic  stop [2], parity [2], end_o_vn [2], end_o_cn [2];
  msg_t  llr_out [2][N_VN];
  iter_t iterations [2];
  int    checks = 0, failures = 0;
  int    codewords [32];
  int    n_cw = 0;

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

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
  endfunction

  task automatic run(int g, vvec_t v, output vvec_t got, output int k, output bit ok);
    for (int i = 0; i < N_VN; i++) llr_in[g][i] = msg_t'(v[i]);
    max_iteration[g] = iter_t'(15);
    start[g] = 1;
    @(posedge clk); #1;
    start[g] = 0;
    while (!stop[g]) begin @(posedge clk); #1; end
    for (int i = 0; i < N_VN; i++) got[i] = int'(llr_out[g][i]);
    k = int'(iterations[g]);
    ok = parity[g];
  endtask

  initial begin
    int raw_total, dec_total;
    raw_total = 0;
    dec_total = 0;
    for (int g = 0; g < 2; g++) begin
      start[g] = 0; max_iteration[g] = '0;
      for (int i = 0; i < N_VN; i++) llr_in[g][i] = '0;
    end
    // all codewords: words w with H w = 0 over GF(2)
    for (int w = 0; w < 1024; w++) begin
      bit good;
      good = 1;
      for (int c = 0; c < NC; c++) begin
        bit p;
        p = 0;
        for (int i = 0; i < NV; i++) if (HM[c][i] && w[i]) p ^= 1;
        if (p) good = 0;
      end
      if (good) begin codewords[n_cw] = w; n_cw++; end
    end
    chk(n_cw == 32, $sformatf("code has 32 codewords (found %0d)", n_cw));
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    for (int snr = 1; snr <= 7; snr++) begin
      real ebn0, sigma2, isum, isq, mean, sd;
      int raw_err, dec_err;
      raw_err = 0;
      dec_err = 0;
      ebn0 = 10.0 ** (real'(snr) / 10.0);
      sigma2 = 1.0 / (2.0 * 0.5 * ebn0);
      isum = 0.0; isq = 0.0;
      for (int f = 0; f < FRAMES; f++) begin
        int cw;
        vvec_t v, o1, o2, ro;
        int k1, k2, rk;
        bit ok1, ok2, rok, same;
        cw = codewords[$urandom_range(n_cw - 1)];
        for (int i = 0; i < NV; i++) begin
          real y;
          y = (cw[i] ? -1.0 : 1.0) + $sqrt(sigma2) * gauss();
          v[i] = clamp(int'($floor(2.0 * y / sigma2 + 0.5)));
          if ((v[i] < 0) != cw[i]) raw_err++;
        end
        run(0, v, o1, k1, ok1);
        run(1, v, o2, k2, ok2);
        ldpc_ref_pkg::decode(v, 15, ro, rk, rok);
        same = (k1 == rk) && (k2 == rk) && (ok1 == rok) && (ok2 == rok);
        for (int i = 0; i < NV; i++) begin
          if (o1[i] != ro[i] || o2[i] != ro[i]) same = 0;
          if ((o2[i] < 0) != cw[i]) dec_err++;
        end
        chk(same, $sformatf("snr %0d frame %0d matches the reference", snr, f));
        isum += real'(k2);
        isq  += real'(k2 * k2);
      end
      mean = isum / FRAMES;
      sd = $sqrt(isq / FRAMES - mean * mean);
      $display("Eb/N0 %0d dB: iterations mean %0.2f sd %0.2f, raw BER %0.4f, decoded BER %0.4f",
               snr, mean, sd, real'(raw_err) / (FRAMES * NV), real'(dec_err) / (FRAMES * NV));
      raw_total += raw_err;
      dec_total += dec_err;
    end
    chk(dec_total < raw_total, $sformatf("decoding removes errors (%0d raw, %0d decoded)",
                                         raw_total, dec_total));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
