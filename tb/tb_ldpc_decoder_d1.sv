// tb_ldpc_decoder_d1 -- self-checking test of the decoder network of
// Design 1, with the testbench acting as the controller.  For the LLR
// vector of the worked example and 300 random vectors it clears the
// messages and runs 8 iterations, checking after each variable node pass
// the ten corrected LLRs, the five per-check parities and their AND
// against the reference min-sum model, iteration by iteration.
module tb_ldpc_decoder_d1;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam bit SERIAL = 0;

  logic clk = 0, rst_n = 0;
  logic zero = 0, vn_load = 0, v2c_shift = 0, cn_load = 0, c2v_shift = 0;
  msg_t llr [N_VN];
  msg_t llr_out [N_VN];
  logic [N_CN-1:0] cn_ok;
  logic parity_ok;
  int checks = 0, failures = 0, converged = 0;

  ldpc_decoder_d1 dut (.clk, .rst_n, .zero, .cn_load, .llr, .llr_out, .cn_ok, .parity_ok);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(ref logic s, input int n);
    s = 1;
    repeat (n) @(posedge clk);
    #1;
    s = 0;
  endtask

  task automatic run(input vvec_t v);
    rmat_t r, l, rn;
    vvec_t tot;
    bit cok [NC];
    bit ok;
    for (int i = 0; i < N_VN; i++) llr[i] = msg_t'(v[i]);
    for (int c = 0; c < NC; c++) for (int i = 0; i < NV; i++) r[c][i] = 0;
    pulse(zero, 1);
    for (int it = 1; it <= 8; it++) begin
      vn_pass(v, r, l, tot);
      ok = cn_pass(l, rn, cok);
      if (SERIAL) begin
        pulse(vn_load, 1);
        pulse(v2c_shift, MSG_W);
      end
      for (int i = 0; i < N_VN; i++) begin
        checks++;
        if (int'(llr_out[i]) != tot[i]) begin
          failures++;
          $display("FAIL it %0d llr_out[%0d] got %0d exp %0d", it, i, llr_out[i], tot[i]);
        end
      end
      for (int c = 0; c < N_CN; c++) begin
        checks++;
        if (cn_ok[c] !== cok[c]) begin
          failures++; $display("FAIL it %0d cn_ok[%0d] got %0b", it, c, cn_ok[c]);
        end
      end
      checks++;
      if (parity_ok !== ok) begin
        failures++; $display("FAIL it %0d parity_ok got %0b", it, parity_ok);
      end
      if (ok) converged++;
      pulse(cn_load, 1);
      if (SERIAL) pulse(c2v_shift, MSG_W);
      r = rn;
    end
  endtask

  initial begin
    vvec_t v;
    for (int i = 0; i < N_VN; i++) llr[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run('{6, 6, 2, 4, 7, 4, -2, 6, 4, 7});
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < NV; i++) v[i] = int'($urandom_range(15)) - 8;
      run(v);
    end
    checks++;
    if (converged == 0) begin failures++; $display("FAIL no iteration satisfied all checks"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
