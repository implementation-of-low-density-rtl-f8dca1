// ldpc_top -- the two 10x5 min-sum LDPC decoders, each as implemented on
// the FPGA board: decoder network, decode controller and host interface.
//
// d1_*: Design 1, the fully parallel decoder (4-bit buses between nodes,
//       one iteration in 3 clocks).
// d2_*: Design 2, the bit-serial decoder (1-bit links between nodes through
//       sipo/piso registers, one iteration in 11 clocks).
// Both use the same variable and check node arithmetic and produce the same
// results for the same input; they stand side by side with separate ports.
//
// Host interface of each decoder:
//   start          pulse (or level) to begin decoding; sampled when not busy
//   llr_in[10]     channel LLRs, latched in the clock that accepts start
//   max_iteration  iteration limit, must be stable during a decode
//   stop           1 when decoding has finished, until the next start
//   parity         1 if all five parity checks were satisfied at the end
//   llr_out[10]    corrected LLRs (negative = bit 1), latched at the end
//   iterations     number of iterations run (for the board's display)
//   end_o_vn/cn    phase strobes, one clock at each variable / check phase
// rst_n is asynchronous, active low.  The USB link and the display board of
// the original test set-up are outside this module.
module ldpc_top
  import ldpc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,

  input  logic  d1_start,
  input  msg_t  d1_llr_in [N_VN],
  input  iter_t d1_max_iteration,
  output logic  d1_stop,
  output logic  d1_parity,
  output msg_t  d1_llr_out [N_VN],
  output iter_t d1_iterations,
  output logic  d1_end_o_vn,
  output logic  d1_end_o_cn,

  input  logic  d2_start,
  input  msg_t  d2_llr_in [N_VN],
  input  iter_t d2_max_iteration,
  output logic  d2_stop,
  output logic  d2_parity,
  output msg_t  d2_llr_out [N_VN],
  output iter_t d2_iterations,
  output logic  d2_end_o_vn,
  output logic  d2_end_o_cn
);

  // ---------------- Design 1: parallel decoder ----------------
  msg_t d1_llr_q [N_VN];
  msg_t d1_sum   [N_VN];
  logic d1_capture, d1_zero, d1_cn_load, d1_finish, d1_pok, d1_busy;
  logic d1_vn_load_unused, d1_v2c_unused, d1_c2v_unused;
  logic [N_CN-1:0] d1_cn_ok;

  ldpc_control #(.SER_BITS(0)) u_ctrl1 (
    .clk, .rst_n, .start(d1_start), .max_iteration(d1_max_iteration),
    .parity_ok(d1_pok), .stop(d1_stop), .busy(d1_busy), .parity(d1_parity),
    .iterations(d1_iterations), .capture(d1_capture), .zero(d1_zero),
    .vn_load(d1_vn_load_unused), .v2c_shift(d1_v2c_unused),
    .cn_load(d1_cn_load), .c2v_shift(d1_c2v_unused),
    .end_o_vn(d1_end_o_vn), .end_o_cn(d1_end_o_cn), .finish(d1_finish)
  );

  ldpc_decoder_d1 u_dec1 (
    .clk, .rst_n, .zero(d1_zero), .cn_load(d1_cn_load),
    .llr(d1_llr_q), .llr_out(d1_sum), .cn_ok(d1_cn_ok), .parity_ok(d1_pok)
  );

  // ---------------- Design 2: bit-serial decoder ----------------
  msg_t d2_llr_q [N_VN];
  msg_t d2_sum   [N_VN];
  logic d2_capture, d2_zero, d2_vn_load, d2_v2c, d2_cn_load, d2_c2v;
  logic d2_finish, d2_pok, d2_busy;
  logic [N_CN-1:0] d2_cn_ok;

  ldpc_control #(.SER_BITS(MSG_W)) u_ctrl2 (
    .clk, .rst_n, .start(d2_start), .max_iteration(d2_max_iteration),
    .parity_ok(d2_pok), .stop(d2_stop), .busy(d2_busy), .parity(d2_parity),
    .iterations(d2_iterations), .capture(d2_capture), .zero(d2_zero),
    .vn_load(d2_vn_load), .v2c_shift(d2_v2c),
    .cn_load(d2_cn_load), .c2v_shift(d2_c2v),
    .end_o_vn(d2_end_o_vn), .end_o_cn(d2_end_o_cn), .finish(d2_finish)
  );

  ldpc_decoder_d2 u_dec2 (
    .clk, .rst_n, .zero(d2_zero), .vn_load(d2_vn_load), .v2c_shift(d2_v2c),
    .cn_load(d2_cn_load), .c2v_shift(d2_c2v),
    .llr(d2_llr_q), .llr_out(d2_sum), .cn_ok(d2_cn_ok), .parity_ok(d2_pok)
  );

  // ---------------- input and output registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < N_VN; v++) begin
        d1_llr_q[v]   <= '0;
        d1_llr_out[v] <= '0;
        d2_llr_q[v]   <= '0;
        d2_llr_out[v] <= '0;
      end
    end else begin
      for (int v = 0; v < N_VN; v++) begin
        if (d1_capture) d1_llr_q[v]   <= d1_llr_in[v];
        if (d1_finish)  d1_llr_out[v] <= d1_sum[v];
        if (d2_capture) d2_llr_q[v]   <= d2_llr_in[v];
        if (d2_finish)  d2_llr_out[v] <= d2_sum[v];
      end
    end
  end

endmodule
