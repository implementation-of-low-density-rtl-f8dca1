# 10x5 min-sum LDPC decoder: parallel and bit-serial versions

This is a small low-density parity-check (LDPC) decoder, written out in full
in SystemVerilog. The code has 10 bits and 5 parity checks, and every message
is 4 bits wide. It corrects a 10-bit received word by passing messages back
and forth between 10 *variable nodes* (one per code bit) and 5 *check nodes*
(one per parity equation), using the min-sum algorithm. It stops when every
parity check is satisfied or an iteration limit is reached.

Two versions of the network are provided. Both use the same node arithmetic
and give identical results:

* **Design 1, parallel.** Nodes are joined by 4-bit buses in both
  directions. One iteration takes 3 clocks. The decoder holds 120 flip-flops.
* **Design 2, bit-serial.** Every node port has a shift register, so each
  message travels over a single wire, 4 bits in 4 clocks. This cuts the
  node-to-node wiring by four but costs 480 flip-flops, and one iteration
  takes 11 clocks.

`ldpc_top` puts both side by side. Each has its own controller and host
interface: start, stop, max_iteration, LLRs in, corrected LLRs out, parity
and iteration count.

## The code

The parity check matrix H (rows = check nodes C1..C5, columns = variable
nodes V1..V10) is

```
      V1 V2 V3 V4 V5 V6 V7 V8 V9 V10
C1     1  1  1  1  0  1  1  0  0  0
C2     0  0  1  1  1  1  1  1  0  0
C3     0  1  0  1  0  1  0  1  1  1
C4     1  0  1  0  1  0  0  1  1  1
C5     1  1  0  0  1  0  1  0  1  1
```

Every column has three ones and every row six, so the code is regular (3,6):
each variable node talks to 3 check nodes and each check node to 6 variable
nodes, over 30 edges. H has full rank 5, so the code has rate 1/2 and 32
codewords.

`ldpc_pkg` holds H and three edge tables read off it. The decoders use these
tables to wire the Tanner graph in generate loops:

* `CN_VAR[c][k]`: the k-th variable node of check c, in ascending order.
* `VN_CHK[v][j]`: the j-th check node of variable v, in ascending order.
* `VN_POS[v][j]`: the port at which v appears on check `VN_CHK[v][j]`.

To use another (3,6) code, change H and re-derive the three tables from it.
The tables are the ones of H, listed row by row and column by column. Node
degrees other than 3 and 6 need `DV`/`DC` changed too.

## Min-sum arithmetic in 4 bits

All messages and LLRs are 4-bit two's complement numbers, -8..+7. A
positive LLR means bit 0; a negative one means bit 1.

**Variable node** (`variable_node`). This is purely combinational. With
channel LLR `I` and incoming check messages `R1..R3`, it forms the full sum
`S = I + R1 + R2 + R3` at 8 bits and outputs:

* `L_j = sat(S - R_j)` to check node j. This is the extrinsic message: the
  one check node j's own contribution is left out.
* `llr_sum = sat(S)`, the corrected LLR. Its sign is the decoded bit.

`sat` clamps to [-8, +7]. The clamping is this design's choice. With
wrap-around arithmetic, a large positive sum turns negative and flips the
decision; the worked example below then needs five iterations instead of
three.

**Check node** (`cn_core`, wrapped by `check_node` / `check_node_serial`).
It runs in three stages:

1. **sign/abs.** Take the sign bit and the magnitude of each of the six
   inputs. The magnitude of -8 is taken as 7, so that any result fits 4
   bits with either sign. XOR all six sign bits together.
2. **find-min.** Find the smallest magnitude `min1` and the second smallest
   `min2`.
3. **compare.** Output i gets magnitude `min2` if its own input holds
   `min1`, and `min1` otherwise. Its sign is the XOR of all signs with its
   own sign removed.

This equals "product of the other five signs times the minimum of the other
five magnitudes" without forming six separate minima.

**Parity.** A check is satisfied when the XOR of the signs of the six
messages it *receives* is 0 (`parity_ok`). The decoder stops when all five
checks are satisfied. The check is on the extrinsic variable-to-check
messages, not on the signs of the corrected LLRs. So the returned word can
fail to be a codeword even though `parity = 1`. This is not rare: for
uniformly random LLR vectors it happens in about a third of the decodes that
end with `parity = 1` (a count from the reference model). The AWGN testbench
counts decoded bit errors separately for this reason.

## Design 1: the parallel network (`ldpc_decoder_d1`)

The variable nodes are combinational. The only state is the check node
output registers, 5 x 6 x 4 = 120 flip-flops, which hold the messages R.
`zero` clears them at the start of a codeword, so the first pass sees R = 0
and `L = I`. `cn_load` replaces them with `CN(VN(I, R))`. The corrected LLRs
and the parity flags are combinational from I and R.

## Design 2: the bit-serial network (`ldpc_decoder_d2`)

`variable_node_serial` and `check_node_serial` put a `sipo` on every input
port and a `piso` on every output port of the same node logic. Messages are
sent least significant bit first. The serial nodes have no separate output
registers: the check node pisos take that role. That gives 60 directed
edges x (4 + 4) bits = 480 flip-flops in total.

The R messages live in the variable nodes' sipos and the L messages in the
check nodes' sipos. One iteration is:

| clocks | control     | effect                                                 |
|-------:|-------------|--------------------------------------------------------|
| 1      | `vn_load`   | variable nodes compute L from LLR and R, load pisos    |
| 4      | `v2c_shift` | L moves bit by bit into the check node sipos           |
| 1      | (check)     | `parity_ok` is sampled from the received L             |
| 1      | `cn_load`   | check nodes compute new R from L, load their pisos     |
| 4      | `c2v_shift` | R moves bit by bit into the variable node sipos        |

`zero` clears every sipo at the start of a codeword.

## Controller and host interface (`ldpc_control`, `ldpc_top`)

One controller serves both networks. Set `SER_BITS = 0` for the parallel
network, which drops the shift phases, or `SER_BITS = 4` for the serial one.

The controller moves through these states:

* **IDLE / DONE.** `start` is accepted here. In the accepting clock, `zero`
  clears the messages and `capture` latches `llr_in` into the top's input
  register.
* **VN.** `vn_load` and the `end_o_vn` strobe; the iteration count goes up
  by one.
* **V2C.** `SER_BITS` shift clocks, serial network only.
* **CHECK.** If all checks are satisfied, go to DONE with `parity = 1`. If
  the count has reached `max_iteration`, go to DONE with `parity = 0`.
  Otherwise go on to CN. When it goes to DONE, `finish` latches the
  corrected LLRs into `llr_out`.
* **CN.** `cn_load` and the `end_o_cn` strobe.
* **C2V.** `SER_BITS` shift clocks, then back to VN.

Latency for a decode of k iterations, counted from the clock edge that
accepts `start` to `stop` going high:

| network  | per iteration | start to stop |
|----------|---------------|---------------|
| parallel | 3 clocks      | 3k - 1        |
| serial   | 11 clocks     | 11k - 5       |

The handshake:

* `stop` stays high until the next `start`.
* `start` is ignored while a decode runs.
* `parity`, `iterations` and `llr_out` hold from the end of a decode to the
  next one.
* `max_iteration` is 4 bits (limit 1..15). A limit of 0 acts as 1.
* `rst_n` is an asynchronous, active-low reset.

The controller carries assertions for three rules:

* At most one datapath phase is active in any clock.
* The iteration count never exceeds the limit.
* `stop` and `busy` are never both high.

The top brings out the iteration count, which on a board would drive a
display. It does not contain a host link such as a USB bridge. `llr_in` and
`llr_out` are plain parallel buses, 10 x 4 bits.

## Worked example

The input LLRs are (6, 6, 2, 4, 7, 4, -2, 6, 4, 7). Only bit 7 is received
as a 1, and it violates checks C1, C2 and C5.

Both networks satisfy all checks in the **third** iteration, as the
published description of this decoder states. They return the corrected
LLRs (7, 7, 7, 7, 7, 7, 7, 7, 4, 7), which decode to the all-zero codeword:
bit 7 is corrected.

The published description gives (7, 7, 7, 7, 7, 7, -8, 4, 5, 7) for this
vector, which is not a codeword. This implementation does not reproduce that
result, and no reading of the 4-bit arithmetic tried here does:

* clamping versus wrap-around,
* parity on the extrinsic messages versus on the corrected LLRs.

The iteration count, the stopping rule and the values after the second
iteration, (4, 6, 2, 4, 5, 4, 6, 7, 7, 7), follow from the min-sum
equations. The testbenches check them against an independent model.

## Behaviour on a noisy channel

`tb_ldpc_awgn` sends random codewords as BPSK through additive white
Gaussian noise, with variance 1/(2 R Eb/N0) and R = 1/2. It quantises the
channel LLR to `round(2y/sigma^2)`, clamped to 4 bits, and decodes each
frame with `max_iteration = 15`. The table shows one run, 300 frames per
point:

| Eb/N0 | mean iterations | raw BER | decoded BER |
|------:|----------------:|--------:|------------:|
| 1 dB  | 7.1             | 0.145   | 0.127       |
| 3 dB  | 3.6             | 0.071   | 0.034       |
| 5 dB  | 2.2             | 0.037   | 0.018       |
| 7 dB  | 1.2             | 0.012   | 0.0007      |

The mean iteration count at low SNR includes frames that never satisfy the
checks and stop at the limit of 15. With so few frames the BER figures are
only indicative below about 1e-3.

## Files

```
rtl/ldpc_pkg.sv              sizes, message type, H, edge tables, sat/abs helpers
rtl/variable_node.sv         combinational variable node
rtl/cn_core.sv               combinational check node datapath + parity
rtl/check_node.sv            cn_core + output registers (parallel network)
rtl/sipo.sv, rtl/piso.sv     4-bit shift registers for the serial links
rtl/variable_node_serial.sv  variable node with 3 sipo + 3 piso
rtl/check_node_serial.sv     cn_core with 6 sipo + 6 piso
rtl/ldpc_decoder_d1.sv       parallel network (10 + 5 nodes)
rtl/ldpc_decoder_d2.sv       bit-serial network (10 + 5 nodes)
rtl/ldpc_control.sv          decode controller / handshake
rtl/ldpc_top.sv              both decoders with input/output registers

tb/ldpc_ref_pkg.sv           independent integer model of the decoder
tb/tb_<module>.sv            one self-checking testbench per module
tb/tb_ldpc_top.sv            end-to-end test of both decoders (default size)
tb/tb_ldpc_awgn.sv           noisy-channel workload, both decoders
```

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
What they check:

* The unit tests compare each module with the reference model on corner
  cases and thousands of random inputs.
* The network tests compare every iteration's corrected LLRs and per-check
  parities.
* The controller test checks exact clock counts, strobe counts and the
  handshake rules.
* The top-level test runs the worked example, random vectors with random
  iteration limits, and noisy codewords through both decoders. It checks
  parity, iteration count, all ten outputs and the latency. It also checks
  that each mechanism occurs at least once: stop on parity, stop on the
  limit, restart, start while busy, and success on the first pass.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ldpc_top \
    -y rtl -y tb +libext+.sv rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv tb/tb_ldpc_top.sv
./obj_dir/Vtb_ldpc_top
```

For any other testbench, replace `tb_ldpc_top` with its name. Each takes
well under a second.

Lint output that remains:

* Unused package parameters, from the wildcard package imports.
* Four unused top-level nets (`busy`, per-check parity, the parallel
  controller's unused shift strobes).
* A note that `rst_n` is used both as an asynchronous reset and in the
  assertions' `disable iff`.

## Choices made here, and limits

Several details are this design's own; the published description does not
give them:

* port order of the nodes (ascending index)
* clamping of sums and the |-8| = 7 rule
* bit order of the serial links (LSB first)
* clear inputs on the sipos
* the clock budget of each phase
* the width of `max_iteration` and of the iteration count
* the start/stop handshake rules
* parallel LLR buses at the top

The parity rule and the stopping rule follow the published description. So
do the register counts: 120 flip-flops for the parallel network and 480 for
the serial one.

The node blocks drawn in the original design have `end` and `zero` control
inputs. Here, that control is done by the register load enables and clears
in the networks; the variable node itself is combinational.

The host-side test equipment of the original set-up is not part of this
RTL. That means the USB link, the display board and the PC software that
generated and analysed test data. The testbenches take its place.
