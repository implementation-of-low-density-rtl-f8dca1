// cn_core -- combinational datapath of a min-sum check node.
//
// Implements equation (2): the message to variable node v is the product of
// the signs of the other five incoming messages times the smallest of their
// magnitudes.  It is organised as the three stages of the check node:
//   sign/abs   - sign bit and magnitude of each input; the XOR of all six
//                sign bits is the parity of the check, and the outgoing sign
//                to input i is that XOR with input i's own sign removed;
//   find-min   - the smallest magnitude (min1) and the second smallest
//                (min2) of the six;
//   compare    - input i receives min2 if its own magnitude is min1, else
//                min1 (so that its own value is excluded).
// parity_ok is 1 when the XOR of the six incoming sign bits is 0, i.e. when
// this parity check is satisfied by the signs of the incoming messages.
// A magnitude of 8 (input -8) is treated as 7 so every result fits 4 bits.
// The three stages and the parity-from-signs rule follow the published
// node; the |-8| = 7 rule and the port order are this design's choices.
module cn_core
  import ldpc_pkg::*;
(
  input  msg_t l_in  [DC],
  output msg_t r_out [DC],
  output logic parity_ok
);

  logic        sgn [DC];
  mag_t        mag [DC];
  logic        sxor;
  mag_t        min1, min2;

  always_comb begin
    // sign/abs
    sxor = 1'b0;
    for (int i = 0; i < DC; i++) begin
      sgn[i] = l_in[i][MSG_W-1];
      mag[i] = abs_msg(l_in[i]);
      sxor  ^= sgn[i];
    end
    parity_ok = ~sxor;

    // find-min: smallest and second smallest magnitude
    min1 = mag_t'(MSG_MAX);
    min2 = mag_t'(MSG_MAX);
    for (int i = 0; i < DC; i++) begin
      if (mag[i] < min1) begin
        min2 = min1;
        min1 = mag[i];
      end else if (mag[i] < min2) begin
        min2 = mag[i];
      end
    end

    // compare: exclude each input's own magnitude, apply the extrinsic sign
    for (int i = 0; i < DC; i++) begin
      mag_t m;
      m = (mag[i] == min1) ? min2 : min1;
      r_out[i] = (sxor ^ sgn[i]) ? -msg_t'(m) : msg_t'(m);
    end
  end

endmodule
