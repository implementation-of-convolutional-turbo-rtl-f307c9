# Mobile WiMAX baseband: double-binary turbo codec and pilot-based tracking

This RTL implements two parts of an IEEE 802.16e (Mobile WiMAX) baseband:

* **The convolutional turbo code (CTC).** The encoder takes a block of N couples of data bits (A, B) and produces the rate-1/3 mother code. It then interleaves that code into sub-blocks and cuts one sub-packet out of it. The matching decoder is an iterative sliding-window max-log-MAP decoder.
* **Timing and frequency tracking** for one 1024-point OFDM symbol in the FUSC permutation. The tracking measures the phase of the 82 pilot subcarriers and fits a straight line phi(k) = a·k + b through them. It then rotates every subcarrier back by its phase on that line. From the slope it decides whether the next cyclic-prefix removal should take one sample more or one less.

Each datapath is reduced to adders, shifts and small tables. The turbo code gets three such reductions:

* The interleaver addresses come from an accumulator, not a multiplier.
* The branch metrics are normalised to the all-zero branch.
* The state metrics are normalised to state 0.

In the tracking, a CORDIC does all angle work, and the least-squares line fit becomes one shift and a truncated multiply-accumulate.

The top level, `wimax_phy_top`, places three independent datapaths side by side, each with its own ports:

| path | chain of modules | ports |
|---|---|---|
| transmit | `ctc_encoder` → `subblock_interleaver` → `symbol_select` | `tx_*`, `sp_*` |
| decode | `turbo_decoder` (with `siso_decoder` inside) | `dec_*` |
| tracking | `tracking_top` | `trk_*` |

The cyclic-prefix removal and the FFT are not part of the RTL. The tracking's add/drop decision for them comes out on `trk_rob` / `trk_stuff`.

## Number formats

| quantity | format |
|---|---|
| received soft bit (decoder input) | 4-bit two's complement; positive means bit 1 |
| branch metric | 4, 5 or 7 bits depending on the label (see below) |
| state metric | 8 bits, normalised to state 0, saturating |
| extrinsic value Le(0,1), Le(1,0), Le(1,1) | 6 bits, saturating, relative to couple (0,0) |
| symbol metric T(a,b) | 10 bits |
| subcarrier sample | 8-bit real + 8-bit imaginary |
| angle | 10-bit binary angle: value z means z·π/512, wraps around the circle |
| phase slope a | 5 bits with 2 fraction bits (units of π/512 per subcarrier) |
| subcarrier index | 10-bit signed, −512 .. 511 |

Encoder states are numbered 4·S1 + 2·S2 + S3, where S1 is the first delay element. This is the numbering of the circulation-state table. The shared trellis functions are in `ctc_pkg` (`enc_next`, `enc_par`):

* next state: S1' = A⊕B⊕S1⊕S3, S2' = B⊕S1, S3' = B⊕S2
* parity: Y = A⊕B⊕S1⊕S2, W = A⊕B⊕S1

## Transmit side

### Constituent encoder and the circular (tail-biting) code

`ctc_constituent_enc` is the 8-state double-binary recursive encoder. Its `init`/`init_stat` pins load a start state.

A tail-biting code must start and end in the same state, the circulation state Sc, and that state depends on the whole block. `ctc_encoder` therefore encodes every block twice:

1. Two pre-encoders start from state 0 and run over the natural stream and the interleaved stream. Each pass ends in some state S0.
2. `sc_rom` maps {S0, N mod 7} to Sc. The 64-entry table is computed at elaboration from the circulation-state table.
3. Two re-encoders start from Sc1 and Sc2 and produce the parity bits Y1, W1, Y2, W2.

While the pre-encoders run, both streams wait in FIFOs. Blocks stream back to back. The first output couple of a block leaves about 2N + 8 cycles after its first input couple.

### CTC interleaver

`ctc_interleaver` works in two steps.

1. **Swap.** In every odd couple, A and B are exchanged.
2. **Permute.** The block is written to one of two RAM banks in natural order and read back at addresses P(j), so output couple j is input couple P(j). P(j) = (P0·j + 1 + offset(j mod 4)) mod N.

`ctc_intlv_addr_gen` produces P(j) without a multiplier:

* P(0..3) come from a 12-entry start-value ROM.
* Every later address is P(j) = P(j−4) + 4·P0 mod N.
* Four registers hold the last address of each class j mod 4. Only one class advances per cycle, so they share one adder.
* The sum is below 3N, so X, X−N and X−2N are formed in parallel and the modulo needs no divider.

A start may coincide with the last step of the previous block. A short block that follows a long one waits, with `ready` low, until the bank it needs has been read.

### Sub-packet generation

`subblock_interleaver` takes one encoder word {A, B, Y1, Y2, W1, W2} per cycle. All six sub-blocks use the same address sequence, so they live in one 6-bit-wide, two-bank RAM.

`subblk_addr_gen` generates the addresses. It forms T_k = 2^m·(k mod J) + BRO_m(⌊k/J⌋) from a mod-J counter and a bit-reversed m-bit counter, and skips values ≥ N. The skip is decided one step ahead, and two discards never follow each other, so the generator delivers one valid address every cycle.

`symbol_select` arranges the 6N symbols in the standard's grouped order: A, then B, then Y1/Y2 interlaced, then W1/W2 interlaced. It then sends L of them, S_i = (F + i) mod 6N with F = (SPID·L) mod 6N. The sub-packet length L (`num_sym`) and SPID are inputs.

In the top, the transmit chain holds one block at a time: `tx_ready` drops after the last couple of a block and returns after the last sub-packet symbol. Because of this, a downstream stage never receives data it cannot take. Assertions in the top check this.

## Decoder

### One component decoder, time-shared

`turbo_decoder` loads one block of soft values into its memories. It then runs `num_iter` iterations of two half-iterations each, using a single `siso_decoder`:

* **Odd half-iteration:** decodes the first constituent code in natural order.
* **Even half-iteration:** decodes the second constituent code, reading the systematic values and the extrinsic values through the interleaver.

The extrinsic values are stored once, in natural order. In the interleaved half-iteration, two instances of `ctc_intlv_lut` (a table computed at elaboration, one bank per block size) give the read address and the write-back address. Le(0,1) and Le(1,0) are exchanged where P(j) is odd, which undoes the couple swap of the encoder. After the last iteration the hard decisions are sent out in natural order.

### Sliding-window schedule (`siso_decoder`)

The block is cut into windows of W = 32 couples, and time into slots of W cycles. In slot t:

* **Forward unit, window t, natural order.** It requests the received and a-priori values of each couple and forms the 15 branch metrics. It stores the branch metrics and the forward metrics into one bank of two ping-pong memories, then advances the forward recursion.
* **Backward unit, window t−1, reverse order.** It reads the other bank and runs the backward recursion. It feeds the two-stage `llr_unit` and then the `extrinsic_unit`.

The backward recursion of each window starts from equiprobable states. There is no guard window: there is no extra training of the backward recursion beyond the window end.

Results leave in reverse order inside each window, tagged with their couple index. One pass takes (⌈N/32⌉ + 1)·32 cycles plus a drain of about a dozen cycles for the pipeline. A full decode takes N cycles to load plus 2·num_iter·((⌈N/32⌉ + 1)·32 + 12) cycles; for N = 240 with 4 iterations that is about 2640 cycles.

The memories are a branch-metric RAM of 2W × 97 bits and a forward-metric RAM of 2W × 56 bits.

### Normalisations that shrink the datapath

* **Branch metrics** (`branch_metric_unit`) are relative to the all-zero branch. gamma(0000) is always 0 and is never computed or stored. The three labels with only parity bits set (0001, 0010, 0011) need 4, 4 and 5 bits. The other twelve, which include systematic and a-priori terms, need 7 bits. That gives 97 bits per couple instead of 16 full-width metrics.
* **State metrics** (`state_metric_unit`) are relative to state 0. The subtraction of the old state-0 metric is folded into the add of the add-compare-select step, so no separate normalisation stage sits in the recursion loop. The new state-0 metric is 0 by construction and is not stored. Results saturate at 8 bits, which guards against the rare case where a metric relative to state 0 would leave that range.
* **Extrinsic values** (`extrinsic_unit`) are Le(u) = T(u) − T(00) − (systematic + a-priori part of u), saturated to 6 bits. Hard decisions compare max(T10, T11) with max(T00, T01) for A, and max(T01, T11) with max(T00, T10) for B.

### Circulation state in the decoder

A tail-biting block starts and ends in the unknown state Sc.

1. **First pass.** The forward recursion starts equiprobable. Every pass reports, on `sc_out`, the state with the largest forward metric at the end of the block.
2. **Next pass of the same constituent code.** That state is fed back: the other states start 64 below it. The same bias is applied to the start of the backward recursion in the last window.

## Tracking

### Pilots and their phases

`tracking_top` takes the 1024 subcarriers of a symbol in index order −512 .. 511 and writes them into a 1024 × 16-bit buffer. In parallel, `trk_pkg::is_pilot` marks the FUSC pilots. There are two constant sets (every 144th subcarrier from −415 and from −343) and two variable sets (every 24th subcarrier from −424 and from −412). In odd symbols (`in_odd`) the variable sets move up by 6.

The pilot value (±1) arrives with each sample (`in_pilot_neg`). `pilot_phase_est` multiplies it out and measures the angle of the result with a CORDIC in vectoring mode.

### CORDIC

`cordic` is an eight-stage pipelined radix-2 CORDIC built from `cordic_stage`. It has 8 iterations for 8-bit samples and a 10-cycle latency.

* **Vectoring mode.** The rotation direction is the XOR of the signs of x and y, and the angle accumulates in z.
* **Rotation mode.** The direction is the sign of the remaining angle.

The micro-rotations cover only about ±99°. A first stage therefore rotates by π when the vector lies in the left half-plane (vectoring) or when the target angle lies beyond ±π/2 (rotation). The datapath has 2 extra fraction bits. The gain 1.6468 is removed at the end with shift-and-add: 1/K ≈ 2⁻¹ + 2⁻³ − 2⁻⁶ − 2⁻⁹.

Accuracy is within 3 LSB for samples and 4 angle units for vectors of magnitude ≥ 24. Small vectors lose angle accuracy.

### Fitting the phase line with one shift

The least-squares line through the pilot phases needs Σk, Σk², Σφ and Σk·φ over the pilots. For this pilot pattern the index sum is almost zero (−889 or −463) and Σk² is almost 2²² (4.90·10⁶). `phase_coef` therefore uses:

* a ≈ Σk·φ / 2²²
* b ≈ Σφ · (2⁻⁷ + 2⁻⁸), i.e. about Σφ/85 in place of Σφ/82

Σk·φ comes from a 10 × 10 signed multiply-accumulate whose multiplier is a Baugh-Wooley partial-product array truncated below column 10. Only columns 10..19 are built. A constant (2¹⁰ plus ones in columns 19..24) turns the array sum into a sign-extended product in the 25-bit accumulator, and the slope a is the accumulator's top five bits.

Every dropped partial product is non-negative and the dropped part totals less than 2²⁰ over the 82 pilots. So a is the exact floor or one less. Two consequences of the approximation should be kept in mind:

* The slope reads about 17 % high before quantisation (4.90·10⁶ / 2²²).
* It is quantised to a quarter of π/512 per subcarrier, which at the band edge is up to ±64 angle units.

### Derotation and add/drop

After the last pilot has left the CORDIC, `data_phase_est` counts k from −512 to 511 and forms phi = ((a·k) >>> 2) + b. `subcarrier_derot`, a CORDIC in rotation mode, turns the buffered samples back by phi.

`add_drop_ctrl` compares the phase span a·1023 between the outermost subcarriers with ±π:

* `rob` (remove one cyclic-prefix sample less) when the span is ≥ +π
* `stuff` (one more) when it is ≤ −π

A symbol takes 1024 input cycles, about 27 cycles to the first corrected output, and 1024 output cycles. `in_ready` is low from the last input until the last phase value has been formed. The next symbol can then start while the last ten corrected samples are still in the derotation pipeline.

## Departures from the reference design

* **Interleaver permutation.** The reference text describes writing at interleaved addresses and reading linearly. This RTL writes linearly and reads at P(j), which is the standard's definition u2(j) = u1(P(j)).
* **Couple swap.** The reference text's implementation chapter swaps the even couples. This RTL swaps the odd couples, as the standard does.
* **State-0 normalisation.** It uses two's-complement arithmetic with saturation, not the proposed carry-save representation with its redundant-digit comparator.
* **No guard window.** The reference simulations use a guard window of 4 couples. With equiprobable window starts, this design decodes correctly and the testbenches pass.
* **Pilot sign.** It is removed before the CORDIC by negating the sample, not by dividing the angle afterwards. The angle is accumulated in z, not looked up from the sequence of rotation directions.
* **Bias constant.** The constant for b is 2⁻⁷ + 2⁻⁸, one addition. The number of fraction bits of a (2) and all buffer organisations are choices of this design.
* **Scheduling.** The transmit chain processes one block at a time. The tracking uses a single symbol buffer and stalls its input during correction.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints `TB_RESULT checks=N failures=M`, has a watchdog, and checks cycle counts where a latency is defined. `tb/ctc_ref_pkg.sv` is an independent reference for the testbenches. It contains:

* the encoder trellis in the other state numbering
* the standard's interleaver formula
* a search for the circulation state by trying all 8 start states
* a Gaussian noise source for soft values

The main tests:

* **`tb_wimax_phy_top`** runs all three paths at once at full size. Blocks of N = 24 .. 240 go through encoding and sub-packet generation with every SPID value. Each sub-packet is compared bit by bit with a reference built from the standard's formulas. The same blocks, as noisy soft values, are decoded and compared with the data, and the decode time is checked. Tracking symbols with known phase ramps are corrected and checked. The test counts each mechanism and fails if one never happened: transmit and decoder back-pressure, a wrapping selection window, puncturing, CORDIC pre-rotation, both pilot patterns, rob, stuff and the interleaver swap.
* **`tb_turbo_decoder`** decodes noiseless blocks of every size, and N = 240 blocks at σ = 1.5 with 4 iterations. It checks the decoded bits and the cycle count.
* **`tb_tracking_top`** checks the slope and bias of five symbols against the approximation's expected values, every corrected sample, and the rob/stuff decisions.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/ctc_pkg.sv rtl/trk_pkg.sv tb/ctc_ref_pkg.sv tb/tb_wimax_phy_top.sv \
  --top-module tb_wimax_phy_top -o sim && obj_dir/sim
```

Modules are found by file name in `rtl/`. Replace the testbench name to run another one. Leave out `tb/ctc_ref_pkg.sv` for testbenches that do not import it.

## Parameters and sizes

* All block memories are sized for the largest 802.16e block, N = 240 couples (`ctc_pkg::NMAX`).
* The window length is `siso_decoder`'s parameter `W` (32).
* Word widths are package constants: `ctc_pkg` for the codec, `trk_pkg` for the tracking.
* The tracking is fixed to FFT size 1024 with the FUSC pilot pattern.
