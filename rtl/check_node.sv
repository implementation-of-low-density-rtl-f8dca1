// check_node -- min-sum check node of the parallel decoder (Design 1).
//
// The combinational datapath (cn_core: sign/abs, find-min, compare, parity)
// is followed by the node's control block, a bank of six 4-bit output
// registers.  These registers hold the check-to-variable messages R between
// iterations and are the only state of the parallel decoder (5 nodes x 6
// messages x 4 bits = 120 flip-flops).
//
// Interface and timing: on a rising clk edge with zero_cn = 1 the outputs
// are cleared (start of a new codeword, so the first variable node pass sees
// R = 0); otherwise with end_cn = 1 they load the new messages computed from
// l_in.  parity_ok is combinational from l_in.  rst_n is an asynchronous,
// active-low reset that also clears the outputs.  The clear/load behaviour
// of the control block is this design's reading of its zero and end inputs.
module check_node
  import ldpc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic end_cn,     // load new check-to-variable messages
  input  logic zero_cn,    // clear the messages to 0
  input  msg_t l_in  [DC],
  output msg_t r_out [DC],
  output logic parity_ok
);

  msg_t r_next [DC];

  cn_core u_core (.l_in(l_in), .r_out(r_next), .parity_ok(parity_ok));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DC; i++) r_out[i] <= '0;
    end else if (zero_cn) begin
      for (int i = 0; i < DC; i++) r_out[i] <= '0;
    end else if (end_cn) begin
      for (int i = 0; i < DC; i++) r_out[i] <= r_next[i];
    end
  end

endmodule
