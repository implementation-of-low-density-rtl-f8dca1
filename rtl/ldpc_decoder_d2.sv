// ldpc_decoder_d2 -- bit-serial 10x5 min-sum LDPC decoder (Design 2).
//
// The same network of ten variable and five check nodes as the parallel
// decoder, but every message travels over a single wire: each node port has
// a shift register (sipo at inputs, piso at outputs), which cuts the number
// of wires between the nodes by four at the cost of 480 flip-flops
// (60 directed edges x (4 + 4) bits).  The R messages are held in the
// variable nodes' input sipos, the L messages in the check nodes' input
// sipos.
//
// One iteration, sequenced by ldpc_control with 4-cycle shift phases:
//   vn_load          variable nodes load L into their output pisos;
//   v2c_shift x 4    L moves bit-serially into the check node sipos;
//   (parity check)   cn_ok / parity_ok are valid from the received L;
//   cn_load          check nodes load the new R into their output pisos;
//   c2v_shift x 4    R moves bit-serially into the variable node sipos.
// zero clears all sipos (R = 0 for the first pass of a codeword).
// llr_out (I_v + sum R) is combinational from llr and the variable node
// sipos.  llr must be held stable for the whole decode.
// The serial links and the 480-register budget follow the published design;
// the phase sequence and bit order are this design's choices.
module ldpc_decoder_d2
  import ldpc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic zero,
  input  logic vn_load,
  input  logic v2c_shift,
  input  logic cn_load,
  input  logic c2v_shift,
  input  msg_t llr     [N_VN],
  output msg_t llr_out [N_VN],
  output logic [N_CN-1:0] cn_ok,
  output logic parity_ok
);

  logic l_vn [N_VN][DV];   // serial L wires, at the variable node
  logic r_vn [N_VN][DV];   // serial R wires, at the variable node
  logic l_cn [N_CN][DC];   // serial L wires, at the check node
  logic r_cn [N_CN][DC];   // serial R wires, at the check node

  for (genvar v = 0; v < N_VN; v++) begin : g_vn
    for (genvar j = 0; j < DV; j++) begin : g_edge
      assign r_vn[v][j] = r_cn[VN_CHK[v][j]][VN_POS[v][j]];
      assign l_cn[VN_CHK[v][j]][VN_POS[v][j]] = l_vn[v][j];
    end
    variable_node_serial u_vn (
      .clk, .rst_n, .clr(zero), .shift_in(c2v_shift),
      .load_out(vn_load), .shift_out(v2c_shift),
      .sin(r_vn[v]), .llr(llr[v]), .sout(l_vn[v]), .llr_sum(llr_out[v])
    );
  end

  for (genvar c = 0; c < N_CN; c++) begin : g_cn
    check_node_serial u_cn (
      .clk, .rst_n, .clr(zero), .shift_in(v2c_shift),
      .load_out(cn_load), .shift_out(c2v_shift),
      .sin(l_cn[c]), .sout(r_cn[c]), .parity_ok(cn_ok[c])
    );
  end

  assign parity_ok = &cn_ok;

endmodule
