// tb_variable_node_serial -- self-checking test of the bit-serial variable
// node.  For random message sets: shifts three R messages in over 4 clocks
// (LSB first), checks llr_sum, loads the outputs and collects the three L
// messages over 4 more shift clocks, comparing all with the clamped sums
// of the reference model.  Also checks that clr presents R = 0.
module tb_variable_node_serial;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, shift_in = 0, load_out = 0, shift_out = 0;
  logic sin [DV];
  logic sout [DV];
  msg_t llr, llr_sum;
  int checks = 0, failures = 0;

  variable_node_serial dut (.clk, .rst_n, .clr, .shift_in, .load_out, .shift_out,
                            .sin, .llr, .sout, .llr_sum);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int r [DV], input int i, input bit use_clr);
    logic [3:0] rb [DV];
    logic [3:0] got [DV];
    int s;
    llr = msg_t'(i);
    if (use_clr) begin
      clr = 1; @(posedge clk); #1; clr = 0;
      for (int j = 0; j < DV; j++) r[j] = 0;
    end else begin
      for (int j = 0; j < DV; j++) rb[j] = 4'(r[j]);
      for (int b = 0; b < 4; b++) begin
        for (int j = 0; j < DV; j++) sin[j] = rb[j][b];
        shift_in = 1; @(posedge clk); #1; shift_in = 0;
      end
    end
    s = i;
    for (int j = 0; j < DV; j++) s += r[j];
    checks++;
    if (int'(llr_sum) != clamp(s)) begin
      failures++; $display("FAIL llr_sum got %0d exp %0d", llr_sum, clamp(s));
    end
    load_out = 1; @(posedge clk); #1; load_out = 0;
    for (int b = 0; b < 4; b++) begin
      for (int j = 0; j < DV; j++) got[j][b] = sout[j];
      shift_out = 1; @(posedge clk); #1; shift_out = 0;
    end
    for (int j = 0; j < DV; j++) begin
      checks++;
      if (int'(signed'(got[j])) != clamp(s - r[j])) begin
        failures++;
        $display("FAIL L[%0d] got %0d exp %0d", j, signed'(got[j]), clamp(s - r[j]));
      end
    end
  endtask

  initial begin
    int r [DV];
    for (int j = 0; j < DV; j++) sin[j] = 0;
    llr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run('{2, 2, 4}, -2, 0);
    run('{0, 0, 0}, 6, 1);
    run('{7, 7, 7}, 7, 0);
    run('{-8, -8, -8}, -8, 0);
    for (int n = 0; n < 800; n++) begin
      for (int j = 0; j < DV; j++) r[j] = int'($urandom_range(15)) - 8;
      run(r, int'($urandom_range(15)) - 8, (n % 37) == 5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
