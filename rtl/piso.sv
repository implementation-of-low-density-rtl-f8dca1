// piso -- parallel-in serial-out register at a node output (Design 2).
//
// load = 1 captures the W-bit message d; each following clock with
// shift = 1 moves the register one place right, so dout (bit 0) presents
// the message least significant bit first over W shifts.  load has
// priority over shift.  rst_n is asynchronous, active low.  Bit order is
// this design's choice and matches sipo.
module piso #(
  parameter int W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [W-1:0] d,
  output logic         dout
);

  logic [W-1:0] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= d;
    else if (shift) q <= {1'b0, q[W-1:1]};
  end

  assign dout = q[0];

endmodule
