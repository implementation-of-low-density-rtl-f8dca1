// tb_sipo -- self-checking test of the serial-in parallel-out register.
// Shifts random 4-bit words in, least significant bit first, with idle
// clocks between bits, and checks the parallel word after 4 shifts, that it
// holds without shift and that clr empties it.
module tb_sipo;
  logic clk = 0, rst_n = 0, clr = 0, shift = 0, din = 0;
  logic [3:0] q;
  int checks = 0, failures = 0;

  sipo #(.W(4)) dut (.clk, .rst_n, .clr, .shift, .din, .q);

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
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      w = 4'($urandom);
      for (int b = 0; b < 4; b++) begin
        din = w[b]; shift = 1;
        @(posedge clk); #1;
        shift = 0; din = ~din;
        if ($urandom_range(1) != 0) begin @(posedge clk); #1; end
      end
      #1;
      checks++;
      if (q !== w) begin failures++; $display("FAIL word %h got %h", w, q); end
      repeat (2) @(posedge clk);
      #1;
      checks++;
      if (q !== w) begin failures++; $display("FAIL hold %h got %h", w, q); end
      if (n % 50 == 0) begin
        clr = 1; @(posedge clk); #1; clr = 0;
        checks++;
        if (q !== 4'h0) begin failures++; $display("FAIL clr got %h", q); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
