// tb_variable_node -- self-checking test of the combinational variable node.
// Applies the extreme corner values and 3000 random input sets and compares
// every extrinsic output and the total with the clamped integer sums of the
// reference model.
module tb_variable_node;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  msg_t r_in [DV];
  msg_t llr;
  msg_t l_out [DV];
  msg_t llr_sum;
  int checks = 0, failures = 0;

  variable_node dut (.r_in(r_in), .llr(llr), .l_out(l_out), .llr_sum(llr_sum));

  task automatic apply(int a, int b, int c, int i);
    int r [3];
    int s;
    r = '{a, b, c};
    for (int j = 0; j < 3; j++) r_in[j] = msg_t'(r[j]);
    llr = msg_t'(i);
    #1;
    s = a + b + c + i;
    checks++;
    if (int'(llr_sum) != clamp(s)) begin
      failures++;
      $display("FAIL sum %0d %0d %0d %0d: got %0d exp %0d", a, b, c, i, llr_sum, clamp(s));
    end
    for (int j = 0; j < 3; j++) begin
      checks++;
      if (int'(l_out[j]) != clamp(s - r[j])) begin
        failures++;
        $display("FAIL l_out[%0d] %0d %0d %0d %0d: got %0d exp %0d", j, a, b, c, i,
                 l_out[j], clamp(s - r[j]));
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(0, 0, 0, 0);
    apply(7, 7, 7, 7);
    apply(-8, -8, -8, -8);
    apply(6, 6, 2, 4);
    apply(-2, 2, 2, 4);
    apply(7, -8, 7, -8);
    for (int n = 0; n < 3000; n++)
      apply(int'($urandom_range(15)) - 8, int'($urandom_range(15)) - 8,
            int'($urandom_range(15)) - 8, int'($urandom_range(15)) - 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
