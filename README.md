# Grouped-parallel LDPC decoder for 10GBASE-T, with error-floor post-processing

This is SystemVerilog RTL for a high-throughput decoder of the (2048,1723)
Reed–Solomon-based LDPC code used for forward error correction in 10GBASE-T
Ethernet. The design makes two main choices:

* **Offset min-sum decoding with 4-bit messages, plus a post-processor.**
  Short messages cut wiring and area. On their own they raise the error
  floor, because small "absorbing sets" of wrong bits reinforce each other.
  When regular decoding fails, a post-processing step tags the bits near
  unsatisfied checks. It then weakens what those bits tell the satisfied
  checks, so the decoder can escape the trap. All of this sits inside each
  variable node and adds no wires between nodes.
* **A 32VNG-1CNG architecture.** There are 2048 variable nodes (VNs) in 32
  variable node groups (VNGs), one group per 64-column group of H. There are
  64 check nodes (CNs) in a single check node group (CNG). One of the code's
  six row groups is processed per cycle. All irregular wiring of the code
  stays inside a VNG (its router and return wiring), so the wiring between
  blocks is regular.

The test-chip environment is also included:

* frame input and output buffers;
* an on-chip Box–Muller AWGN channel emulator;
* error counters for automated bit-error-rate runs.

## The code and how it is wired

H has 384 rows and 2048 columns. It is made of 6 × 32 permutation submatrices
of size 64 × 64. Each bit is in 6 checks and each check covers 32 bits. In
this RTL the submatrix of row group `k` and column group `c` connects check
`r` to bit `r XOR s(k,c)`, where

    s(k,c) = alpha^((k + c) mod 63)   in GF(2^6), alpha a root of x^6 + x + 1

(`ldpc_pkg::perm_off`). This is the Reed–Solomon location-vector
construction. Each row group is a coset of a one-dimensional RS subcode, and
each column group is one of 32 evaluation points. The specific coset leaders
and evaluation points are this design's own choice. They are **not** taken
from the IEEE 802.3an parity-check matrix, which is not reproduced here. The
resulting code has the properties the decoder relies on:

* every submatrix is a permutation;
* checks in different row groups share at most one bit, so there are no
  4-cycles;
* every check has even weight, so the all-zeros and all-ones words are
  codewords.

To use the exact standard matrix, replace `perm_off`. Nothing else depends on
the offsets being of this form, provided each submatrix stays an XOR-shift
permutation. For a general permutation, change the index expressions in
`vng_router` and `vng`.

Bit `b = 64*c + v` is VN `v` of VNG `c`. A priori LLRs are 4-bit two's
complement in −7..+7, with positive meaning bit 0.

## Message formats

| Signal | Format | Notes |
|---|---|---|
| prior LLR, check-to-variable message | 4-bit two's complement, −7..+7 | |
| variable-to-check message (`v2c_t`) | sign + 3-bit magnitude, plus the sender's hard decision | |
| posterior LLR | 6-bit two's complement, saturating at ±31 | width is this design's choice |
| CN result (`cn_out_t`) | min1, min2, prd (XOR of signs), syn (XOR of hard decisions) | |

The check update is split between the CN and the VN:

* The CN finds min1, min2 and prd over its 32 inputs.
* Each VN then rebuilds its own message:
  * it takes min2 if its own magnitude equals min1, otherwise min1;
  * it subtracts the offset β (floored at 0);
  * it applies the sign prd XOR its own sign.

β = 1 LSB (`BETA`).

## The 7-stage pipeline and the stall

    VC   VN: q = posterior(prev. iteration) - c2v(prev. iteration, k)
    R    VNG router: 64 6:1 multiplexers (registered)
    CS1  CN: sort 32 inputs in pairs + first 4-to-2 compare-select
    CS2  CN: two more 4-to-2 levels
    CS3  CN: final 4-to-2 level; result broadcast to all VNGs
    CV   VN: 6:1 return multiplexer, min1/min2 choice, offset, sign
    PS   VN: accumulate into the posterior

Row groups 0..5 enter VC in six consecutive cycles. The last row group
finishes PS six cycles after the first one began. The next iteration reads
the posterior, so the controller inserts a 6-cycle stall: **an iteration is 12
cycles**. The posterior is therefore read only in cycles 0–5 of an iteration
and written only in cycles 6–11. This lets a single register per VN implement
the reordered schedule exactly:

* In cycles 0–5 it holds the previous iteration's posterior.
* In cycles 6–11 it accumulates prior + the six new messages.

This is exact flooding (all VNs, then all CNs), just pipelined. The extrinsic
memory is a 6-entry shift register per VN. It holds last iteration's six
check-to-variable messages and is read by row group.

Timing of one frame:

* Load is 1 cycle: the frame is copied from the input buffer into the VNs'
  prior memories.
* Each iteration is 12 cycles.
* The result is ready in the cycle after the last iteration and is handed
  over in the same cycle as the next frame loads.
* Frame period = 12 × iterations + 1 cycles, plus any cycles the output
  buffer holds the decoder.

Examples:

* 8 iterations: 97 cycles, 139 ns at 700 MHz.
* 8 + 4 post-processing iterations: 145 cycles, 207 ns.
* At 400 MHz with 8 fixed iterations: 2048 bits / (96 × 2.5 ns) ≈ 8.5 Gb/s.

## Early termination

Each VN sends its current hard decision along with its message. Each CN XORs
these decisions, giving one syndrome bit per check. During iteration *i* the
controller ORs these bits over the six row groups, which checks the hard
decisions left by iteration *i−1*. Each VN stores that hard decision at the
start of the iteration (`hd_snap`). If no check fails and `et_en` is set, the
frame ends at the end of iteration *i*:

* the output is the stored decisions;
* `converged = 1`;
* `iters = i − 1`.

Confirming convergence therefore costs one extra iteration. If the iteration
limit is reached first, the output is the current hard decisions with
`converged = 0`.

## Post-processing

With `pp_en` set and a regular limit `max_iter`:

| Iteration | Phase | What happens |
|---|---|---|
| `max_iter` | pre-biasing | Every check whose incoming signs have odd parity (`prd = 1`) tags the edge it arrived on, and the VN. Regular decoding otherwise. |
| `max_iter + 1` | biasing | A tagged VN sending to a check on an untagged edge (a satisfied check) limits the message magnitude to `WEAK_MAG` (1). |
| up to `max_iter + PP_ITER` | follow-up | Regular iterations. `PP_ITER` = 4 in total with biasing. |

Early termination stays active throughout, so a frame the post-processor
repairs ends as soon as its syndrome is clean. Tags clear when a frame loads.
How strongly messages are weakened, and that biasing lasts one iteration, are
this design's choices. The published description gives neither.

## Blocks

| File | Block |
|---|---|
| `ldpc_pkg.sv` | constants, message types, GF(2^6) offset function |
| `vn.sv` | variable node: prior/posterior/extrinsic memories, VC, CV and PS stages, tag/bias logic |
| `vng_router.sv` | 64 6:1 multiplexers per VNG (R stage) |
| `vng.sv` | 64 VNs + router + return wiring of one column group |
| `cn.sv` | 3-stage compare-select tree: min1, min2, prd, syn |
| `cng.sv` | 64 CNs and the OR of their syndrome bits |
| `decoder_ctrl.sv` | 12-cycle iteration schedule, stage control words, limits, phases, early termination, frame handshake |
| `ldpc_decoder.sv` | decoder core: 32 VNGs + CNG + controller |
| `input_buffer.sv` | one-frame input buffer, 64 LLRs per beat, valid/ready |
| `output_buffer.sv` | one-frame output buffer, 64 bits per beat, valid/ready, `out_last` |
| `awgn_gen.sv` | 64-lane Box–Muller noise source, scaled to LLRs by programmable multipliers |
| `error_counter.sv` | frame, bit-error, frame-error and undetected-error counters |
| `ldpc_chip_top.sv` | everything above in the test-chip arrangement |

`ldpc_chip_top` has two modes.

* **External (`auto_mode = 0`).** Frames stream in through `in_*` and out
  through `out_*`. While the output buffer is still sending a frame, the
  decoder holds its next result.
* **Automated (`auto_mode = 1`).** After `auto_start`, the noise source makes
  `auto_frames` frames of the all-zeros or all-ones codeword (`cfg_send_one`).
  The noise deviation is `cfg_sigma` and the LLR gain is `cfg_llr_scale`, both
  Q4.8. The error counters accumulate the results, and `auto_busy` falls when
  the run is done.

Configuration inputs are `max_iter`, `pp_en` and `et_en`. The clock comes from
outside.

Parameters: `NCG` (column groups, 32) can be reduced for fast simulation. A
smaller `NCG` keeps the first `NCG` column groups, which gives a code of the
same construction with check degree `NCG` (a power of two, at least 4). Other
parameters: `PP_ITER` (4), `BETA` (1), `WEAK_MAG` (1), and `CNT_W` (48,
counter width).

## Not included

* The I/O compensation circuitry, pads and clock generation. The clock is a
  plain input.
* The FPGA test board and its register interface; its registers appear as
  top-level ports.
* Scan chains: the frame buffers take their place as the way to load and
  unload frames.
* The 6-bit sum-product and 6-bit offset min-sum baselines, and the other
  architectures (8/16VNG-1CNG, 64VNG-2CNG). These were only points of
  comparison.

## Departures from and additions to the published design

* The H matrix offsets are a construction of the same family, not the
  standard's matrix (see above).
* A hard-decision bit travels with each message, and the CN XORs it for the
  early-termination syndrome. The published design describes only
  min1/min2/prd. The check could be built in other ways.
* The frame hand-over costs one load cycle per frame. With early termination
  at 2.47 iterations per frame on average (1.47 to converge plus one to
  confirm), this gives 30.6 cycles per frame, about 2 % below the reported
  47.7 Gb/s at 700 MHz (30.05 cycles). At 400 MHz it gives 26.7 Gb/s
  against a reported 27.7 Gb/s.
* The posterior width, β, the weakening rule, the buffer organisation,
  handshakes, noise-generator internals and reset behaviour are this design's
  own.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The decoder and the chip are checked against
`tb/ldpc_ref_pkg.sv`, a behavioural model of the same fixed-point algorithm.
The model runs whole iterations at a time, with no pipeline. The comparison
is bit-exact: decoded bits, converged flag, iteration count, and frame
latency (12 × iterations + 1 cycles).

* `tb_ldpc_decoder` decodes 8 frames. These include:
  * converging frames and frames hitting the limit;
  * post-processing with tagging and biasing;
  * early termination on and off;
  * output back-pressure.
* `tb_ldpc_chip_top` runs six external frames end to end, with a slow reader
  that makes the decoder wait. It then runs six automated frames from the
  on-chip noise source and compares the error counters with the model.
* Both run with `NCG = 8` (a 512-bit code) to keep build time short. The
  decoder has also been built with all parameters at their defaults (2048
  bits). All eight frames then matched the reference bit for bit. That
  build takes about 14 minutes with 8 compiler threads. The frames' noise
  levels are chosen for the 512-bit code, so at full size not every
  mechanism the testbench counts is guaranteed to occur. The largest size
  simulated end to end through the whole chip top is `NCG = 8`.

To run a testbench with Verilator:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv tb/tb_ldpc_chip_top.sv \
        --top-module tb_ldpc_chip_top -j 8
    ./obj_dir/Vtb_ldpc_chip_top

For a block testbench, list `rtl/ldpc_pkg.sv` and the testbench. Verilator
finds the other modules in `rtl/` through `-Irtl`. To simulate the
full-size decoder, set `NCG = N_CG` (32) in `tb/tb_ldpc_decoder.sv`.

Not verified: error-rate performance at low BER, for example whether the
post-processor lowers the error floor as published. That needs many more
frames than RTL simulation can run, and the real 802.3an matrix.
