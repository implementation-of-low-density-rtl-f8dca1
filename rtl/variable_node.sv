// variable_node -- min-sum variable node of the 10x5 LDPC decoder.
//
// Implements equation (1) of min-sum decoding: the message to each connected
// check node c is the channel LLR plus the messages from the other two check
// nodes, L_cv = I_v + sum_{m != c} R_mv.  The fourth output is the total
// I_v + sum_m R_mv, the corrected LLR whose sign is the hard decision
// (negative means bit 1).  Each sum is formed at full precision (7 bits) and
// then saturated to the 4-bit message range [-8, +7].
//
// Interface: r_in[0..2] messages from the three check nodes, llr the raw
// channel LLR, l_out[j] the message back to the check node of r_in[j],
// llr_sum the corrected LLR.  Purely combinational; the phase control and
// the registers that hold the messages sit in the decoder around it.
// Equation (1), the three check inputs plus the channel LLR and the
// corrected LLR output follow the published node; saturation and the port
// order are this design's choices.
module variable_node
  import ldpc_pkg::*;
(
  input  msg_t r_in  [DV],
  input  msg_t llr,
  output msg_t l_out [DV],
  output msg_t llr_sum
);

  logic signed [7:0] total;

  always_comb begin
    total = 8'(llr);
    for (int j = 0; j < DV; j++) total += 8'(r_in[j]);
    llr_sum = sat_msg(total);
    for (int j = 0; j < DV; j++) l_out[j] = sat_msg(total - 8'(r_in[j]));
  end

endmodule
