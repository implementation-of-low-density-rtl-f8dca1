// ldpc_pkg -- constants, types and helper functions shared by the 10x5 LDPC
// min-sum decoders.
//
// The code is the regular (3,6) code of a 5x10 parity check matrix H: every
// variable node (column) is joined to 3 check nodes, every check node (row)
// to 6 variable nodes, 30 edges in all.  Messages are 4-bit two's complement
// numbers, as in the decoders this package serves.  The tables CN_VAR,
// VN_CHK and VN_POS are read off H so that the
// decoders can wire the Tanner graph with generate loops:
//   CN_VAR[c][k]  index of the k-th variable node of check node c (ascending)
//   VN_CHK[v][j]  index of the j-th check node of variable node v (ascending)
//   VN_POS[v][j]  the port number k at which variable v appears on check
//                 node VN_CHK[v][j], i.e. CN_VAR[VN_CHK[v][j]][VN_POS[v][j]] == v
// The ordering of node ports (ascending node index) is this design's choice.
package ldpc_pkg;

  localparam int N_VN   = 10;  // variable nodes (code length)
  localparam int N_CN   = 5;   // check nodes (parity checks)
  localparam int DV     = 3;   // check nodes per variable node
  localparam int DC     = 6;   // variable nodes per check node
  localparam int MSG_W  = 4;   // message and LLR width in bits
  localparam int ITER_W = 4;   // width of max_iteration and the iteration count

  typedef logic signed [MSG_W-1:0] msg_t;
  typedef logic        [MSG_W-1:0] mag_t;
  typedef logic        [ITER_W-1:0] iter_t;

  localparam msg_t MSG_MAX = msg_t'((1 <<< (MSG_W-1)) - 1);   // +7
  localparam msg_t MSG_MIN = msg_t'(-(1 <<< (MSG_W-1)));      // -8

  // Parity check matrix, H[row = check node][column = variable node].
  typedef bit h_t [N_CN][N_VN];
  localparam h_t H = '{
    '{1'b1,1'b1,1'b1,1'b1,1'b0,1'b1,1'b1,1'b0,1'b0,1'b0},
    '{1'b0,1'b0,1'b1,1'b1,1'b1,1'b1,1'b1,1'b1,1'b0,1'b0},
    '{1'b0,1'b1,1'b0,1'b1,1'b0,1'b1,1'b0,1'b1,1'b1,1'b1},
    '{1'b1,1'b0,1'b1,1'b0,1'b1,1'b0,1'b0,1'b1,1'b1,1'b1},
    '{1'b1,1'b1,1'b0,1'b0,1'b1,1'b0,1'b1,1'b0,1'b1,1'b1}
  };

  typedef int cn_tab_t [N_CN][DC];
  typedef int vn_tab_t [N_VN][DV];

  // Edge tables read off H (rows of H for CN_VAR, columns for VN_CHK).
  localparam cn_tab_t CN_VAR = '{'{0, 1, 2, 3, 5, 6}, '{2, 3, 4, 5, 6, 7},
                                 '{1, 3, 5, 7, 8, 9}, '{0, 2, 4, 7, 8, 9},
                                 '{0, 1, 4, 6, 8, 9}};
  localparam vn_tab_t VN_CHK = '{'{0, 3, 4}, '{0, 2, 4}, '{0, 1, 3}, '{0, 1, 2},
                                 '{1, 3, 4}, '{0, 1, 2}, '{0, 1, 4}, '{1, 2, 3},
                                 '{2, 3, 4}, '{2, 3, 4}};
  localparam vn_tab_t VN_POS = '{'{0, 0, 0}, '{1, 0, 1}, '{2, 0, 1}, '{3, 1, 1},
                                 '{2, 2, 2}, '{4, 3, 2}, '{5, 4, 3}, '{5, 3, 3},
                                 '{4, 4, 4}, '{5, 5, 5}};

  // Clamp a wide signed sum into the message range [MSG_MIN, MSG_MAX].
  function automatic msg_t sat_msg(input logic signed [7:0] x);
    if (x > 8'(signed'(MSG_MAX)))      return MSG_MAX;
    else if (x < 8'(signed'(MSG_MIN))) return MSG_MIN;
    else                               return msg_t'(x);
  endfunction

  // Magnitude of a message, limited to MSG_MAX so that it can be sent back
  // with either sign (|-8| is taken as 7).
  function automatic mag_t abs_msg(input msg_t x);
    if (x == MSG_MIN)  return mag_t'(MSG_MAX);
    else if (x < 0)    return mag_t'(-x);
    else               return mag_t'(x);
  endfunction

endpackage
