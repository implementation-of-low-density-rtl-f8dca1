// ldpc_decoder_d1 -- fully parallel 10x5 min-sum LDPC decoder (Design 1).
//
// Ten variable nodes and five check nodes are wired to each other along the
// 30 edges of the Tanner graph of H (ldpc_pkg), with separate 4-bit buses
// for the variable-to-check messages L and the check-to-variable messages R.
// The variable nodes are combinational; the check nodes' output registers
// hold R, so one decoding iteration is a single register update
// R <= CN(VN(llr, R)).
//
// Interface and timing (driven by ldpc_control):
//   llr       the ten channel LLRs, held stable for the whole decode;
//   zero      clears all R registers at the next clock (new codeword);
//   cn_load   loads the new R computed from the current L at the next clock;
//   llr_out   corrected LLRs I_v + sum R_mv, combinational from llr and R;
//   cn_ok     per-check parity of the signs of the L messages each check
//             node currently receives; parity_ok is their AND (all five
//             checks satisfied).
// The matrix, the node counts and the 120-register budget follow the
// published design; the edge order at each node is this design's choice.
module ldpc_decoder_d1
  import ldpc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic zero,
  input  logic cn_load,
  input  msg_t llr     [N_VN],
  output msg_t llr_out [N_VN],
  output logic [N_CN-1:0] cn_ok,
  output logic parity_ok
);

  msg_t l_vn [N_VN][DV];   // L messages, indexed at the variable node
  msg_t r_vn [N_VN][DV];   // R messages, indexed at the variable node
  msg_t l_cn [N_CN][DC];   // L messages, indexed at the check node
  msg_t r_cn [N_CN][DC];   // R messages, indexed at the check node

  for (genvar v = 0; v < N_VN; v++) begin : g_vn
    for (genvar j = 0; j < DV; j++) begin : g_edge
      assign r_vn[v][j] = r_cn[VN_CHK[v][j]][VN_POS[v][j]];
      assign l_cn[VN_CHK[v][j]][VN_POS[v][j]] = l_vn[v][j];
    end
    variable_node u_vn (
      .r_in(r_vn[v]), .llr(llr[v]), .l_out(l_vn[v]), .llr_sum(llr_out[v])
    );
  end

  for (genvar c = 0; c < N_CN; c++) begin : g_cn
    check_node u_cn (
      .clk, .rst_n, .end_cn(cn_load), .zero_cn(zero),
      .l_in(l_cn[c]), .r_out(r_cn[c]), .parity_ok(cn_ok[c])
    );
  end

  assign parity_ok = &cn_ok;

endmodule
