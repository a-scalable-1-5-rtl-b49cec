# A flooding LDPC decoder for IEEE 802.11ad (60 GHz WLAN)

This is synthesizable SystemVerilog for a low-power LDPC decoder for the
four IEEE 802.11ad codes. All four codes have 672-bit frames and rates 1/2,
5/8, 3/4 and 13/16. The decoder reaches its throughput by being wide rather
than fast:

* all **672 variable nodes (VNs)** exist in hardware: 16 groups of 42, one
  group per block column of the quasi-cyclic code;
* **42 check nodes (CNs)** process one *layer* per cycle. A layer is one row
  of 42×42 submatrices;
* a **five-stage pipeline** is kept full by decoding **two frames at once**,
  in alternating 4-cycle windows;
* the iteration schedule is **flooding**. Each iteration forms all of its
  messages from the posteriors of the iteration before;
* all messages are **5-bit**. All storage is flip-flops, with no SRAM.

Two ideas keep the energy per bit low, and they are what is hardest to
follow in the code:

1. **Reduced marginalization.** Each VN must remember its last V2C and C2V
   messages so it can remove its own contribution ("marginalize"). This
   decoder stores only 3 of the 5 bits of each (see *The variable node*).
2. **Cheap reconfiguration.** Every code rate takes the same 4 cycles per
   iteration. Each CN works either as one 16-input node for a full-weight
   layer, or as two 8-input nodes for two half-weight layers that share no
   columns (see *The reconfigurable check node*).

The RTL also includes the test periphery of a chip that contains the
decoder. Four AWGN generators produce noisy frames, and an error collector
counts bit errors, frame errors and iterations.

## Message formats

| quantity | width | format |
|---|---|---|
| channel LLR (prior), V2C, C2V | 5 | sign-magnitude: bit 4 = sign (1 = negative LLR = bit value 1), bits 3:0 = magnitude 0..15 |
| compressed C2V from a CN | 9 | `{sign, min1[3:0], min2[3:0]}` (`cmin_t`) |
| posterior accumulator | 7 | two's complement, saturating at ±63 |

The CN does not send each VN its own message. It sends the same compressed
`{sign, min1, min2}` to every VN of the check, and each VN works out its own
message from that (offset min-sum, with offset `BETA` = 1 LSB).

## The pipeline and the two-frame interleave

| stage | name | hardware | register at end |
|---|---|---|---|
| 1 | V2C calculation | `vn`: V2C = posterior − stored C2V | `vn.v2c` |
| 2 | V2C routing | `v2c_shifter` (one per block column) | shifter output |
| 3 | C2V calculation | `cng`: shuffle, `cn16`, output muxes | `cng.c2v` |
| 4 | C2V routing | `c2v_shifter` (one per block column) | shifter output |
| 5 | V2C accumulation | `vn`: marginalize, offset, accumulate | `vn.acc[frame]` |

`dec_ctrl` has a free-running 3-bit phase counter. In phase `p`, frame slot
`p[2]` sends layer slot `p[1:0]` into stage 1:

```
cycle      0   1   2   3   4   5   6   7   8   9  ...
stage 1   A0  A1  A2  A3  B0  B1  B2  B3  A0' A1'      (A, B = the two frames)
stage 5                   A0  A1  A2  A3  B0  B1  ...
```

A layer reaches stage 5 four cycles after stage 1. That is the same cycle in
which the *other* frame sends the same layer into stage 1, so no stage ever
idles. Frame A finishes accumulating layer 3 in cycle 7, and its next
iteration begins in cycle 8 from those finished posteriors. Flooding
therefore needs no extra buffering: one accumulator per frame is enough.
Stage 1 of iteration *i* reads it in cycles 8–11, and stage 5 of iteration
*i* rebuilds it from the prior in cycles 12–15.

This alternation also explains why the VN's two history shift registers are
only **4 deep** but serve two frames:

* The V2C pushed in stage 1 (cycle *t*) is read back in stage 5 (cycle
  *t*+4).
* The C2V pushed in stage 5 (cycle *t*+4) is read back by stage 1 of the
  same frame and layer in cycle *t*+8. In between, the other frame's window
  has pushed and popped its own four entries.

Both registers shift in every cycle.

**Rates and slots.** Each iteration always uses four layer slots:

| rate | base rows | slots |
|---|---|---|
| 1/2 | 8 | (0,2) (1,3) (4,6) (5,7): four paired slots |
| 5/8 | 6 | 0, 1 full; (2,4) (3,5) paired |
| 3/4 | 4 | 0, 1, 2, 3 full |
| 13/16 | 3 | 0, 1, 2 full; slot 3 empty |

**Frame interface and timing** (`ldpc_decoder`, through `dec_ctrl`):

* A frame of 672 LLRs is accepted when `in_valid && in_ready`. The LLR for
  bit *i* of block column *c* is at index `c*42 + i`.
* The frame's rate and an 8-bit tag travel with it.
* A frame can be accepted in two cases:
  * into an empty slot, at any time. It then starts at the next window of
    that slot;
  * into the slot of a frame that retires in that same cycle. It then starts
    in the very next cycle. A busy decoder therefore has no gaps.
* One iteration takes 8 cycles. A frame leaves `8·iters + 1` to
  `8·iters + 8` cycles after it is accepted, with `out_valid`, `out_tag`,
  `out_iters`, `out_et` and all 672 `out_bits`.
* Frames can finish out of order, because early termination stops them
  after different numbers of iterations.
* Throughput is 2 frames per `8·iters` cycles, which is 168/iters coded bits
  per cycle.

## The variable node (`vn`): reduced marginalization

Stage 1:

```
C2V_old = first_iteration ? 0 : {c2v_sr[3], 2'b00}     // sign, mag[3:2], zeros inserted
V2C     = sat5(acc[frame] − C2V_old)                    // registered output
v2c_sr  <= {V2C[4], V2C[2:1]}                           // sign and magnitude bits 2:1
```

Stage 5, with the compressed C2V `{s, min1, min2}` from the CN:

```
st   = v2c_sr[3]                                        // this VN's V2C, 4 cycles old
sign = s ^ st.sign
mag  = (st.mag[2:1] == min1[2:1]) ? min2 : min1         // "am I the minimum?"
mag  = max(mag − BETA, 0)
acc[frame] <= sat7((first_layer ? prior[frame] : acc[frame]) + C2V)
c2v_sr <= {sign, mag[3:2]}
```

The VN decides whether it supplied the minimum by comparing only the two
stored magnitude bits. A VN whose V2C merely shares those bits with the
minimum receives min2 when it should receive min1. Each VN also removes its
own C2V from the posterior with the two LSBs cut off. These are the two
deliberate approximations of the design. In exchange, the VN keeps 3+3
history bits per stage instead of 5+5. With 672 VNs this is the largest
saving of flip-flops in the design. The approximation costs a small
error-rate loss, which a few extra iterations win back. For that reason the
iteration limit used in the tests is 15.

A VN whose block column is unused in a slot (`s5_conn = 0`) adds nothing
in that slot.

## The reconfigurable check node

`cn16` holds two `cn8` cores: **top**, inputs 0–7, and **bottom**, inputs
8–15. Each core finds the XOR of its input signs and the two smallest
magnitudes. `cn_compare_select` merges the two results into the result for
all 16 inputs. Per block column, an output multiplexer then picks one
result:

* full-weight slot: the merged result;
* paired slot, column in the lower row: the bottom result;
* paired slot, column in the upper row: the top result.

**The shuffle** (`cn_shuffle`, one per CN) puts the upper row's messages on
the top inputs and the lower row's messages on the bottom inputs. Input
order within a group does not matter to a min-sum node.

* By default, input *k* < 8 is wired to block column 2*k*, and input *k* ≥ 8
  to column 2(*k*−8)+1. The paired rows of these codes mostly alternate
  between even and odd columns, so most inputs stay on these fixed wires.
* The selects come from a constant table, built at elaboration time by
  `ldpc_pkg::make_cfg`. It keeps each column on its default input where the
  pairing allows, and moves only the columns that break the alternating
  pattern.
* For example, in rate 1/2, slot (1,3), columns 8 and 9 both belong to the
  upper row. Column 9 therefore moves to a free top input.

A synthesis tool folds the constant table, so only the multiplexers that are
really needed remain. Unused inputs carry a neutral message: sign 0,
magnitude 15.

## Code tables (`ldpc_pkg`)

* `BASE[rate][row][col]` holds the shift values of the base matrices. A
  value of −1 means the submatrix is empty.
* `SLOT_ROWS` gives the pairing of rows into slots.
* `CFG_TABLE` is derived from both. It holds the per-slot configuration
  (`layer_cfg_t`): the full/paired mode, and for each column whether it is
  used, whether it is in the lower row, its shift, and the shuffle selects.

The V2C shifter sends bit `(k+s) mod 42` of a column to CN *k*. The C2V
shifter does the inverse.

The rate-1/2 matrix and its pairing are the published 802.11ad matrix. The
rate-5/8, 3/4 and 13/16 matrices were entered from the IEEE 802.11ad
standard. **Check them against the standard before relying on them.**
Everything else is derived from the tables, so a correction is a change of
table entries only.

## Early termination

`early_term` evaluates all 336 (or fewer) parity checks of the frame's
code at once. Its input is the signs of the accumulators as they are
written in the last slot of each iteration. If `et_en` is set and every
check holds, the frame retires at the end of that iteration. Otherwise it
retires when it reaches `max_iter` iterations.

## Test periphery (`ldpc_chip`)

* **AWGN generators.** There are four `awgn_gen` instances with 42 lanes
  each. Each lane models the all-zero codeword over an AWGN channel:
  `llr = sat15(mean + (noise·scale) >>> 10)`. The noise is the centred sum
  of the four bytes of a per-lane xorshift32 word, which is approximately
  Gaussian with σ ≈ 148. With `scale` = 28, σ is about 4 LSB.
* **Frame assembly.** The generators fill a 672-LLR frame buffer in 4
  cycles, then stall until the decoder takes the frame.
* **External frames.** With `src_awgn = 0`, frames come from `ext_llr`
  through `ext_valid`/`ext_ready` instead.
* **Error collector.** `error_collector` compares the information bits with
  zeros and counts frames, frame errors, bit errors and iterations.
  Information bits are the first K = 336/420/504/546 columns. From these
  counts: BER = bit_errs/(frames·K), FER = frame_errs/frames, and the
  average number of iterations = iter_sum/frames.

Neither generator nor collector has a published internal structure. Both
are plain, simple choices.

## Performance arithmetic

At 3.75 average iterations (rate 1/2 at Eb/N0 = 5 dB), the design moves
168/3.75 = 44.8 coded bits per cycle:

| clock | coded throughput |
|---|---|
| 32 MHz | 1.43 Gb/s |
| 65 MHz | 2.9 Gb/s |
| 130 MHz | 5.8 Gb/s |
| 260 MHz | 11.6 Gb/s |

These match the 1.5/3/6/12 Gb/s operating points the architecture was built
for. Power, supply voltage and back-bias numbers are properties of the
silicon and are not modelled.

## Error rate in simulation

`tb_ldpc_ber` uses the chip's own BER tester at full size. Settings: early
termination on, iteration limit 15, LLRs scaled so that a noiseless symbol
is 8 LSB. The `awgn_scale` value for each point comes from σ² = 1/(2·R·Eb/N0).

| rate | Eb/N0 | frames | bit errors | average iterations |
|---|---|---|---|---|
| 1/2 | 5.0 dB | 120 | 0 | 3.44 |
| 5/8 | 5.0 dB | 120 | 0 | 2.83 |
| 3/4 | 5.0 dB | 120 | 0 | 2.14 |
| 13/16 | 5.0 dB | 120 | 0 | 2.13 |
| 1/2 | 1.0 dB | 40 | BER 0.13 | 15.0 |

Expected behaviour for a 5-bit decoder of this kind:

* At 5 dB, rate 1/2 needs about 3.75 iterations on average, and all rates
  are far below a BER of 10⁻⁶.
* At 1 dB, rate 1/2 has a BER of about 5·10⁻² and runs to the limit.

The simulated decoder follows this shape. At 1 dB its BER is about twice
as high, which can come from the simple generator with its short noise
tails, or from the LLR scaling. A few hundred frames cannot resolve the
waterfall itself. For that, run the chip's counters for millions of frames.

## How far to trust it, and where it departs

* **Cycle-exact against a bit-exact reference.** `tb/ldpc_ref_pkg.sv` is an
  independent model written row by row, without shifters or pipelines. The
  decoder and chip testbenches compare every decoded frame with it: all 672
  decisions, the iteration count and the early-termination flag.
* **Not a full-code check of the higher rates.** The higher-rate matrices
  come from the standard, as noted above. The tests use all-zero codewords,
  random nonzero codewords and random LLRs. The nonzero codewords come from
  a GF(2) elimination of the same tables (`random_codeword` in the
  reference package). So the tests show that the hardware decodes the code
  in the tables, but they cannot reveal a mistyped shift value in the
  tables themselves.
* **Design choices not fixed by the architecture:** `BETA` = 1, the
  saturation points, zeroing the stored C2V in a frame's first iteration,
  the handshake and tags, the empty fourth slot for rate 13/16, the
  shuffle's select table, the early-termination timing, and everything in
  the test periphery.
* **One bit-field reading.** The compare that decides "min1 or min2" uses
  min1 bits 2:1, because those have the same weight as the V2C bits stored
  (magnitude bits 2:1). This was the reading that is consistent with the
  stored fields.
* **Not modelled:** the flip-well FDSOI back-bias (it has no logic
  function), supplies and pads.

## Files

| file | content |
|---|---|
| `rtl/ldpc_pkg.sv` | types, base matrices, slot configuration table, arithmetic helpers |
| `rtl/vn.sv`, `rtl/vng.sv` | variable node, group of 42 |
| `rtl/v2c_shifter.sv`, `rtl/c2v_shifter.sv` | cyclic shifters (stages 2 and 4) |
| `rtl/cn_shuffle.sv`, `rtl/cn8.sv`, `rtl/cn_compare_select.sv`, `rtl/cn16.sv`, `rtl/cng.sv` | check node group (stage 3) |
| `rtl/dec_ctrl.sv` | pipeline schedule, frame slots, retirement |
| `rtl/early_term.sv` | parity check of the hard decisions |
| `rtl/ldpc_decoder.sv` | decoder core |
| `rtl/awgn_gen.sv`, `rtl/error_collector.sv`, `rtl/ldpc_chip.sv` | test periphery and chip top |
| `tb/ldpc_ref_pkg.sv` | behavioural reference decoder |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_ldpc_ber.sv` | error-rate points measured with the chip's BER tester |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the end-to-end test of the whole chip at full size:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv rtl/*.sv tb/tb_ldpc_chip.sv \
  --top-module tb_ldpc_chip -o sim -j 8
./obj_dir/sim
```

* Building the full 672-VN design takes one to two minutes. The simulation
  runs in well under a second.
* `tb_ldpc_decoder` drives the core directly with 28 frames of all four
  rates. It includes a fixed-iteration stream that checks the
  2-frames-per-8·iters-cycles throughput.
* The unit testbenches (`tb_vn`, `tb_cng`, `tb_dec_ctrl`, ...) are built the
  same way, with their own `--top-module`.
