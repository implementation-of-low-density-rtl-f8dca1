// tb_check_node_serial -- self-checking test of the bit-serial check node.
// For random sets of six L messages: shifts them in over 4 clocks (LSB
// first), checks parity_ok against the XOR of the signs, loads the outputs
// and collects the six R messages over 4 shift clocks, comparing them with
// a brute-force sign product and minimum over the other five inputs.
module tb_check_node_serial;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, shift_in = 0, load_out = 0, shift_out = 0;
  logic sin [DC];
  logic sout [DC];
  logic parity_ok;
  int checks = 0, failures = 0;

  check_node_serial dut (.clk, .rst_n, .clr, .shift_in, .load_out, .shift_out,
                         .sin, .sout, .parity_ok);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int l [DC]);
    logic [3:0] got [DC];
    int neg = 0;
    for (int b = 0; b < 4; b++) begin
      for (int i = 0; i < DC; i++) sin[i] = 1'((l[i] >>> b) & 1);
      shift_in = 1; @(posedge clk); #1; shift_in = 0;
    end
    for (int i = 0; i < DC; i++) if (l[i] < 0) neg++;
    checks++;
    if (parity_ok !== (neg % 2 == 0)) begin
      failures++; $display("FAIL parity_ok got %0b", parity_ok);
    end
    load_out = 1; @(posedge clk); #1; load_out = 0;
    for (int b = 0; b < 4; b++) begin
      for (int i = 0; i < DC; i++) got[i][b] = sout[i];
      shift_out = 1; @(posedge clk); #1; shift_out = 0;
    end
    for (int i = 0; i < DC; i++) begin
      int m = 7, sn = 0, e;
      for (int k = 0; k < DC; k++)
        if (k != i) begin
          if (mag(l[k]) < m) m = mag(l[k]);
          if (l[k] < 0) sn ^= 1;
        end
      e = sn ? -m : m;
      checks++;
      if (int'(signed'(got[i])) != e) begin
        failures++; $display("FAIL R[%0d] got %0d exp %0d", i, signed'(got[i]), e);
      end
    end
  endtask

  initial begin
    int l [DC];
    for (int i = 0; i < DC; i++) sin[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run('{6, 6, 2, 4, 4, -2});
    run('{-8, 7, 7, 7, 7, 7});
    run('{-1, -1, -1, -1, -1, -1});
    for (int n = 0; n < 800; n++) begin
      for (int i = 0; i < DC; i++) l[i] = int'($urandom_range(15)) - 8;
      run(l);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
