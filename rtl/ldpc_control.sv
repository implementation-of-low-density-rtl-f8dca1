// ldpc_control -- decode controller and host handshake of an LDPC decoder.
//
// Accepts a codeword on start, runs variable node / check node phases until
// every parity check is satisfied or max_iteration iterations have been
// run, then raises stop and reports the parity result and the number of
// iterations.  One controller type serves both decoders: SER_BITS = 0 for
// the parallel decoder (no shift phases), SER_BITS = 4 for the bit-serial
// one (4-cycle shift phases in each direction).
//
// State sequence of one iteration (each state one clock unless noted):
//   VN     vn_load = 1, end_o_vn = 1, iteration count + 1
//   V2C    v2c_shift = 1 for SER_BITS clocks (skipped if SER_BITS = 0)
//   CHECK  parity_ok sampled: all satisfied -> DONE with parity = 1;
//          count >= max_iteration           -> DONE with parity = 0;
//          otherwise go on
//   CN     cn_load = 1, end_o_cn = 1
//   C2V    c2v_shift = 1 for SER_BITS clocks (skipped if SER_BITS = 0)
// A full iteration takes 3 + 2*SER_BITS clocks; the last one stops after
// CHECK, so a decode of k iterations raises stop 2 + SER_BITS +
// (k-1)*(3 + 2*SER_BITS) clocks after the edge that accepted start
// (parallel: 3k - 1; bit-serial: 11k - 5).
//
// Handshake: start is sampled in IDLE or DONE; in that cycle zero = 1 and
// capture = 1 (the datapath clears its R messages and latches LLR_In).
// While decoding start is ignored.  stop stays 1 in DONE until the next
// start; finish pulses for one clock in the CHECK state that ends the
// decode (the moment to latch the corrected LLRs).  parity and iterations
// are held from then on.  A max_iteration of 0 acts as 1.  rst_n is
// asynchronous, active low.  The encoding of the states and the cycle
// budget of each phase are this design's choices.
module ldpc_control
  import ldpc_pkg::*;
#(
  parameter int SER_BITS = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  iter_t max_iteration,
  input  logic  parity_ok,
  output logic  stop,
  output logic  busy,
  output logic  parity,
  output iter_t iterations,
  output logic  capture,
  output logic  zero,
  output logic  vn_load,
  output logic  v2c_shift,
  output logic  cn_load,
  output logic  c2v_shift,
  output logic  end_o_vn,
  output logic  end_o_cn,
  output logic  finish
);

  typedef enum logic [2:0] {
    S_IDLE, S_VN, S_V2C, S_CHECK, S_CN, S_C2V, S_DONE
  } state_t;

  localparam int CNT_W = (SER_BITS > 1) ? $clog2(SER_BITS) : 1;

  state_t           state;
  logic [CNT_W-1:0] cnt;
  logic             accept;
  logic             limit;

  assign accept = start && (state == S_IDLE || state == S_DONE);
  assign limit  = (iterations >= max_iteration);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cnt        <= '0;
      iterations <= '0;
      parity     <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: if (accept) begin
          state      <= S_VN;
          iterations <= '0;
          parity     <= 1'b0;
        end
        S_VN: begin
          iterations <= iterations + 1'b1;
          cnt        <= '0;
          state      <= (SER_BITS > 0) ? S_V2C : S_CHECK;
        end
        S_V2C: begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) == SER_BITS - 1) state <= S_CHECK;
        end
        S_CHECK: begin
          if (parity_ok) begin
            parity <= 1'b1;
            state  <= S_DONE;
          end else if (limit) begin
            state  <= S_DONE;
          end else begin
            state  <= S_CN;
          end
        end
        S_CN: begin
          cnt   <= '0;
          state <= (SER_BITS > 0) ? S_C2V : S_VN;
        end
        S_C2V: begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) == SER_BITS - 1) state <= S_VN;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    capture   = accept;
    zero      = accept;
    vn_load   = (state == S_VN);
    end_o_vn  = (state == S_VN);
    v2c_shift = (state == S_V2C);
    cn_load   = (state == S_CN);
    end_o_cn  = (state == S_CN);
    c2v_shift = (state == S_C2V);
    finish    = (state == S_CHECK) && (parity_ok || limit);
    stop      = (state == S_DONE);
    busy      = (state != S_IDLE) && (state != S_DONE);
  end

  // At most one datapath phase is active in any clock.
  a_one_phase: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({vn_load, v2c_shift, cn_load, c2v_shift}));

  // The decode never runs past max_iteration (0 counts as 1).
  a_iter_limit: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (iterations <= max_iteration || iterations == iter_t'(1)));

  // stop and busy are never both high.
  a_stop_busy: assert property (@(posedge clk) disable iff (!rst_n)
    !(stop && busy));

endmodule
