// sipo -- serial-in parallel-out register at a node input (Design 2).
//
// A W-bit message arrives one bit per clock, least significant bit first,
// while shift = 1: each shift moves the register right and puts din in the
// top bit, so after W shifts q holds the whole message.  clr = 1 clears q
// (used to present R = 0 to the variable nodes at the start of a codeword).
// q is held while shift = 0.  rst_n is asynchronous, active low.  Bit order
// and the clear input are this design's choices.
module sipo #(
  parameter int W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         shift,
  input  logic         din,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (clr)   q <= '0;
    else if (shift) q <= {din, q[W-1:1]};
  end

endmodule
