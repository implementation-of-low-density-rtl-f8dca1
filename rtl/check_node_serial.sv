// check_node_serial -- check node with serial ports (Design 2).
//
// The check node datapath (cn_core) with a sipo on each of its six inputs
// and a piso on each of its six outputs, so that every message travels over
// a single wire, 4 bits in 4 clocks, least significant bit first.  The pisos
// take over the role of the parallel check node's output registers.
//
// Timing, driven by the decoder's controller:
//   clr       clears the input sipos;
//   shift_in  shifts one bit of each incoming variable-node message in;
//   load_out  loads the six new check-to-variable messages, computed
//             combinationally from the sipo contents, into the pisos;
//   shift_out shifts one bit of each outgoing message onto sout.
// parity_ok is combinational from the sipo contents: 1 when the signs of
// the six received messages satisfy this parity check.
// State: 6 x 4 + 6 x 4 = 48 flip-flops.
module check_node_serial
  import ldpc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic shift_in,
  input  logic load_out,
  input  logic shift_out,
  input  logic sin  [DC],
  output logic sout [DC],
  output logic parity_ok
);

  logic [MSG_W-1:0] lin_bits [DC];
  msg_t             l_in     [DC];
  msg_t             r_out    [DC];

  for (genvar i = 0; i < DC; i++) begin : g_port
    sipo #(.W(MSG_W)) u_sipo (
      .clk, .rst_n, .clr, .shift(shift_in), .din(sin[i]), .q(lin_bits[i])
    );
    assign l_in[i] = msg_t'(lin_bits[i]);
    piso #(.W(MSG_W)) u_piso (
      .clk, .rst_n, .load(load_out), .shift(shift_out),
      .d(r_out[i]), .dout(sout[i])
    );
  end

  cn_core u_core (.l_in(l_in), .r_out(r_out), .parity_ok(parity_ok));

endmodule
