// variable_node_serial -- variable node with serial ports (Design 2).
//
// The variable node of the parallel decoder wrapped, port by port, in shift
// registers: one sipo on each of its three check node inputs and one piso on
// each of its three outputs, so that every message travels over a single
// wire, 4 bits in 4 clocks, least significant bit first.
//
// Timing, driven by the decoder's controller:
//   clr       clears the input sipos, so the node sees R = 0 (new codeword);
//   shift_in  shifts one bit of each incoming message into the input sipos;
//   load_out  loads the three outgoing messages, computed combinationally
//             from the sipo contents and llr, into the output pisos;
//   shift_out shifts one bit of each outgoing message onto sout.
// llr_sum (the corrected LLR) is combinational from the sipo contents and
// llr.  State: 3 x 4 + 3 x 4 = 24 flip-flops.
module variable_node_serial
  import ldpc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic shift_in,
  input  logic load_out,
  input  logic shift_out,
  input  logic sin  [DV],
  input  msg_t llr,
  output logic sout [DV],
  output msg_t llr_sum
);

  logic [MSG_W-1:0] rin_bits [DV];
  msg_t             r_in     [DV];
  msg_t             l_out    [DV];

  for (genvar j = 0; j < DV; j++) begin : g_port
    sipo #(.W(MSG_W)) u_sipo (
      .clk, .rst_n, .clr, .shift(shift_in), .din(sin[j]), .q(rin_bits[j])
    );
    assign r_in[j] = msg_t'(rin_bits[j]);
    piso #(.W(MSG_W)) u_piso (
      .clk, .rst_n, .load(load_out), .shift(shift_out),
      .d(l_out[j]), .dout(sout[j])
    );
  end

  variable_node u_vn (.r_in(r_in), .llr(llr), .l_out(l_out), .llr_sum(llr_sum));

endmodule
