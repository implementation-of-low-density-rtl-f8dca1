// tb_check_node -- self-checking test of the Design 1 check node.
// Drives random sets of six L messages, loads them with end_cn and compares
// the six registered R outputs with a brute-force sign-product / minimum
// over the other five inputs, and parity_ok with the XOR of the signs.
// Also checks that the outputs hold while end_cn = 0, that zero_cn clears
// them and that zero_cn wins over end_cn.
module tb_check_node;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  logic clk = 0, rst_n = 0, end_cn = 0, zero_cn = 0;
  msg_t l_in [DC];
  msg_t r_out [DC];
  logic parity_ok;
  int checks = 0, failures = 0;
  int exp_r [DC];

  check_node dut (.clk, .rst_n, .end_cn, .zero_cn, .l_in, .r_out, .parity_ok);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void expect_r(input int l [DC], output int e [DC], output bit ok);
    int neg = 0;
    for (int i = 0; i < DC; i++) if (l[i] < 0) neg++;
    ok = (neg % 2 == 0);
    for (int i = 0; i < DC; i++) begin
      int m = 7, sn = 0;
      for (int k = 0; k < DC; k++)
        if (k != i) begin
          if (mag(l[k]) < m) m = mag(l[k]);
          if (l[k] < 0) sn ^= 1;
        end
      e[i] = sn ? -m : m;
    end
  endfunction

  task automatic check_out(string what, input int e [DC]);
    for (int i = 0; i < DC; i++) begin
      checks++;
      if (int'(r_out[i]) != e[i]) begin
        failures++;
        $display("FAIL %s r_out[%0d]: got %0d exp %0d", what, i, r_out[i], e[i]);
      end
    end
  endtask

  task automatic one(input int l [DC]);
    bit ok;
    for (int i = 0; i < DC; i++) l_in[i] = msg_t'(l[i]);
    expect_r(l, exp_r, ok);
    #1;
    checks++;
    if (parity_ok !== ok) begin
      failures++;
      $display("FAIL parity_ok: got %0b exp %0b", parity_ok, ok);
    end
    end_cn = 1;
    @(posedge clk); #1;
    end_cn = 0;
    check_out("load", exp_r);
    // change the inputs: the outputs must hold without end_cn
    for (int i = 0; i < DC; i++) l_in[i] = msg_t'(int'($urandom_range(15)) - 8);
    @(posedge clk); #1;
    check_out("hold", exp_r);
  endtask

  initial begin
    int l [DC];
    int zeros [DC];
    for (int i = 0; i < DC; i++) begin l_in[i] = '0; zeros[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check_out("reset", zeros);
    one('{6, 6, 2, 4, 4, -2});
    one('{-8, 7, 7, 7, 7, 7});
    one('{3, 3, 5, 5, 6, 7});
    one('{-1, -1, -1, -1, -1, -1});
    one('{0, 5, -5, 2, -3, 7});
    for (int n = 0; n < 1500; n++) begin
      for (int i = 0; i < DC; i++) l[i] = int'($urandom_range(15)) - 8;
      one(l);
    end
    // zero_cn clears, and wins over end_cn
    zero_cn = 1; end_cn = 1;
    @(posedge clk); #1;
    zero_cn = 0; end_cn = 0;
    check_out("zero", zeros);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
