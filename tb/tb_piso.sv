// tb_piso -- self-checking test of the parallel-in serial-out register.
// Loads random 4-bit words and collects 4 shifted bits, least significant
// bit first, checking each bit as it appears, with random idle clocks
// between shifts (the output must hold).
module tb_piso;
  logic clk = 0, rst_n = 0, load = 0, shift = 0;
  logic [3:0] d;
  logic dout;
  int checks = 0, failures = 0;

  piso #(.W(4)) dut (.clk, .rst_n, .load, .shift, .d, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] w;
    d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      w = 4'($urandom);
      d = w; load = 1;
      @(posedge clk); #1;
      load = 0; d = ~w;
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (dout !== w[b]) begin failures++; $display("FAIL word %h bit %0d", w, b); end
        if ($urandom_range(1)) begin
          @(posedge clk); #1;
          checks++;
          if (dout !== w[b]) begin failures++; $display("FAIL hold word %h bit %0d", w, b); end
        end
        shift = 1; @(posedge clk); #1; shift = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
