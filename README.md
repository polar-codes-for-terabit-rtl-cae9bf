# SC-MJL polar decoder for terabit-per-second links

This is a polar-code decoder built to reach 1 Tb/s. The decoder does
successive-cancellation (SC) decoding, but it never walks the tree one step
at a time. The whole decoding tree is unrolled into a pipeline, and many
subtrees are cut off early. Each cut-off subtree is a short *constituent
code*, and a dedicated decoder handles it in a single stage. So a new
codeword of N channel LLRs can enter on every clock, and K decoded bits leave
on every clock. The throughput is therefore `K * f_clk` for each decoder
lane.

The default configuration is the (1024, 854) code. It uses length-8 MJL
leaves (`N_MJL = 8`), Wagner and MAP leaves of up to 32 bits (`N_LIM = 32`),
and LLR widths that shrink from 5 bits at the channel to 1 bit at the deepest
nodes. The core holds two identical decoder lanes. One lane gives
854 bits/clock, which is 427 Gb/s at 500 MHz. Two lanes at 585.5 MHz give
1 Tb/s.

## The decoding tree

The code follows the usual convention: `x = u * G_N`, where
`G_N = F^{(x)n}`, `F = [[1,0],[1,1]]` and `u_0` is decoded first. A frozen
mask has bit *i* set when `u_i` is frozen. Each node of the tree owns a block
`u[OFF +: SIZE]`, and the frozen bits of that block decide what the node
becomes:

| block pattern (within its own bits) | node | decoder | length limit |
|---|---|---|---|
| all frozen | rate-0 leaf | outputs zeros | `N_LIM` |
| none frozen | rate-1 leaf | hard decisions | `N_LIM` |
| all frozen but the last bit | repetition leaf | MAP: sign of the LLR sum | `N_LIM` |
| only the first bit frozen | single-parity-check leaf | Wagner: hard decisions, flip the least reliable bit if parity is odd | `N_LIM` |
| anything else, length `N_MJL` | MJL leaf | one-stage ML decoder of that pattern | exactly `N_MJL` |
| anything else, longer | split | f stage, left child, g stage, right child | — |

A split node does the textbook SC step:

```
alpha_L = f(alpha[0:H-1], alpha[H:2H-1])          min-sum
(xl, ul) = left child(alpha_L)
alpha_R = alpha[H+i] + (-1)^xl[i] * alpha[i]       g
(xr, ur) = right child(alpha_R)
x = {xr, xl ^ xr},  u = {ur, ul}
```

Every leaf takes one stage and every split node adds two (f and g). So
`T_N = T_left + T_right + 2`. With `N_MJL`-long leaves everywhere this gives
`T_N = 3N/N_MJL - 2`. Pruned trees are shorter than that. The default
(1024, 854) code has 160 stages: 24 rate-1, 3 rate-0, 6 repetition, 9 SPC
and 12 MJL leaves.

`rtl/sc_node.sv` builds this tree by instantiating itself recursively. It
classifies its block with `polar_pkg::node_kind()` at elaboration time. The
frozen mask is an ordinary parameter, so each code gives a different tree of
hardware.

## Pipelining, delay lines and register balancing

Frames follow each other through the tree one clock apart, so every node
must hold data for all the frames in flight:

* The node's input LLRs wait in a delay line (`pipe_delay`) while the left
  subtree works, because the g stage needs them.
* The left child's codeword and u bits wait while the right subtree works.

These delay lines are the bulk of the design. They grow roughly with N^2.

The stages are numbered in decoding order (f, left subtree, g, right
subtree). A stage ends in a register only when `index mod MERGE == MERGE-1`.
`MERGE` consecutive stages therefore share one clock cycle. This trades
clock rate for latency and for fewer pipeline registers. `MERGE = 1`
registers every stage. Each node works out its delay lines from the number
of registered stages in its subtrees (`polar_pkg::nreg()`), so any `MERGE`
gives a consistent pipeline. The decoder adds one input register and one
output register, so:

```
LATENCY = 2 + floor(T / MERGE)     (42 clocks for the default code, MERGE = 4)
```

## LLR format and progressive quantisation

An LLR is a Q-bit sign-magnitude word with the sign in bit 0:
`word = {mag, sign}`, and its value is `(sign ? -1 : +1) * (mag + 1/2)`.
The half-step offset (a mid-rise quantiser) means a word never encodes 0.
So a 1-bit word is just a hard decision, and the repetition MAP rule turns
into a majority vote at that width.

The width depends on the node's depth. It is `Q_CH` (5) at the root and
`Q_MIN` (1) at the length-`N_MJL` nodes. In between it falls linearly and is
rounded up. For N = 1024 the widths, from the root (length 1024) down to the
length-8 nodes, are 5, 5, 4, 4, 3, 3, 2, 1 bits. The f and g stages compute
at their input width and saturate the result to the child's width.

* **f**: the sign is the XOR of the signs and the magnitude is the minimum.
  This is exact.
* **g**: the sum is taken on the exact half-step values. A zero sum takes the
  sign of `alpha_R`. The magnitude is rounded half away from zero.

Channel words must be supplied in this format. The testbenches show one
possible mapping: `mag = floor(|2y/sigma^2|)`, saturated.

## Blocks

| file | what it is |
|---|---|
| `rtl/polar_pkg.sv` | types, LLR arithmetic, node classification, stage counting, polarisation-weight construction |
| `rtl/polar_tbps_top.sv` | top: `NUM_DEC` independent decoder lanes |
| `rtl/sc_mjl_decoder.sv` | one lane: input/output registers, valid pipeline, the tree, info-bit extraction |
| `rtl/sc_node.sv` | recursive tree node (leaf or split) |
| `rtl/f_stage.sv`, `rtl/g_stage.sv` | f and g updates of a node, optionally registered |
| `rtl/rep_map_decoder.sv` | repetition-code MAP leaf |
| `rtl/spc_wagner_decoder.sv` | single-parity-check Wagner leaf |
| `rtl/mjl_decoder.sv` | length-`N_MJL` leaf for any frozen pattern |
| `rtl/polar_transform.sv` | `u * G_N` butterfly; a leaf uses it to get u back from its codeword |
| `rtl/pipe_delay.sv` | delay line |

### The MJL leaf

The MJL decoder handles every length-8 block that is not one of the simpler
codes. One example is the pattern `v = {1,0,0,0,1,0,0,0}` (u0 and u4
frozen). `mjl_decoder` is an exhaustive maximum-likelihood decoder. The
`2^k` codewords of the pattern (k information bits, at most 64 when
`N_MJL = 8`) are constants. The decoder scores each one by correlation with
the LLRs and outputs the best, with ties going to the lowest candidate. This
is the simplest decoder that works for any length-8 pattern in one stage. A
version tuned to each pattern could be much smaller. For instance, the
`{1,0,0,0,1,0,0,0}` code is two independent length-4 parity-check codes on
the halves of the codeword.

## Interface and timing (`polar_tbps_top`)

| port | width | meaning |
|---|---|---|
| `clk`, `rst_n` | 1 | clock; synchronous active-low reset (clears only the valid flags) |
| `in_valid[d]` | NUM_DEC | lane *d* takes a frame this clock |
| `in_llr[d][i]` | NUM_DEC x N x 5 | channel word for code bit *i* |
| `out_valid[d]` | NUM_DEC | lane *d* delivers a frame |
| `out_info[d]` | NUM_DEC x K | information bits, in increasing u index |
| `out_u[d]` | NUM_DEC x N | all decoded u bits, frozen bits zero |

There is no back-pressure and no stall. A frame that enters on one clock
comes out exactly `LATENCY` clocks later, and a frame may enter on every
clock. The lanes share only clock and reset.

Parameters: `NUM_DEC` (2), `N` (1024, a power of two up to `NMAX` = 1024),
`K` (854), `FROZEN` (default `pw_frozen(log2 N, K)`), `N_MJL` (8), `N_LIM`
(32), `Q_CH` (5), `Q_MIN` (1), `MERGE` (4). Any frozen mask can be passed.
The decoder reports an elaboration error if the mask does not leave exactly
K information bits.

## What follows the source design and what is this design's own

Taken from the source design:
* The SC-MJL structure: rate-0, rate-1, MAP (repetition) and Wagner (SPC)
  leaves up to `N_LIM`, and MJL leaves of length `N_MJL`.
* The unrolled, fully pipelined organisation, with one frame per clock.
* The stage count `T_N = 2T_{N/2} + 2`.
* The (1024, 854) code with `N_MJL = 8` and `N_LIM = 32`.
* 5-to-1 bit progressive quantisation.
* Merging pipeline stages for register balancing.
* Two parallel decoders for 1 Tb/s.
* The N = 16, K = 9 example with an MJL leaf on `{1,0,0,0,1,0,0,0}`. This
  is the default of `sc_node`.

Chosen here, because the source gives no detail:
* The frozen set. It uses a polarisation-weight construction, `beta = 2^(1/4)`.
  The source's own frozen set is unknown, so its tree (127 stages unbalanced,
  40 cycles balanced) differs from this one (160 stages, 42 cycles).
* The insides of the MJL decoder (exhaustive ML).
* The LLR word format and the exact quantisation schedule, including
  saturation as the way to narrow words.
* The register-balancing rule (every `MERGE`-th stage) and `MERGE = 4`.
* The tie rules, the valid/reset handshake, and the input and output
  registers.
* The assumption that the lanes are fully independent.

Not verified:
* Clock rate, area and power. The 500 MHz, 2.4 mm^2 and 1 W figures belong
  to the source's 45 nm implementation.
* Error-correction performance has been measured only roughly. The
  testbenches check bit-exact agreement with a reference model, and that
  model was also run over AWGN. For the (256, 200) code at noise deviation
  0.5 (Eb/N0 about 4.1 dB), the fraction of frames decoded without error in
  300 frames was:

  | widths | frames correct |
  |---|---|
  | 5-to-1 (default) | 181 / 300 |
  | 5-to-2 | 262 / 300 |
  | 5-to-3 | 280 / 300 |
  | 8 bits everywhere | 297 / 300 |

  So the 1-bit deepest nodes cost a lot of coding gain with the saturating
  schedule chosen here. `Q_MIN` is a parameter, and `polar_pkg::qbits` holds
  the schedule: revisit both before relying on coding gain.

## Simulation

Every testbench checks itself and ends with
`TB_RESULT checks=N failures=M`. `tb/polar_ref_pkg.sv` is a recursive
software model of the same algorithm on plain integers. The testbenches use
it to predict every output bit for bit. It also counts events, such as
Wagner flips, MJL corrections and saturations, so each test can show which
mechanisms it exercised.

| testbench | covers |
|---|---|
| `tb_f_stage`, `tb_g_stage` | random vectors, registered and combinational, with saturation |
| `tb_rep_map_decoder`, `tb_spc_wagner_decoder`, `tb_mjl_decoder` | leaves against brute-force rules and ML search |
| `tb_polar_transform`, `tb_pipe_delay` | butterfly and delay lines |
| `tb_sc_node` | the N = 16, K = 9 example tree, with `MERGE` 1 and 2 |
| `tb_sc_mjl_decoder` | a (64, 32) decoder over AWGN, latency and one frame per clock |
| `tb_polar_tbps_top` | both lanes on a (256, 200) code; every leaf type, Wagner flips, MJL corrections, saturation, merged stages, idle and back-to-back frames |
| `tb_polar_tbps_top_full` | the top at its default parameters, (1024, 854), 60 frame slots in both lanes |

To run one with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/polar_pkg.sv tb/polar_ref_pkg.sv tb/tb_polar_tbps_top.sv --top-module tb_polar_tbps_top
./obj_dir/Vtb_polar_tbps_top
```

The full-size testbench takes about three minutes, most of it C++
compilation. The shared body of both top-level tests is in
`tb/tb_top_body.svh`.
