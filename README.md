# Reconfigurable rate-1/2 convolutional codec with an adaptive Viterbi decoder

Convolutional coding with Viterbi decoding corrects the bit errors a noisy
channel introduces. The cost is redundancy: every data bit becomes a 2-bit
code symbol. This design covers both ends of such a link, written for a small
FPGA board:

* An 8-bit word set on DIP switches is shifted into a rate-1/2 convolutional
  encoder.
* The encoder's two output bits are multiplexed onto one serial line.
* A hard-decision Viterbi decoder recovers the word and shows it on LEDs.
  It also reports how many channel bit errors it corrected.

The main idea is that one piece of hardware handles many codes. The
constraint length K (2 to 8) and the generator taps are run-time inputs, not
synthesis parameters. Feed-forward and recursive codes are both supported.
An adaptive controller uses the decoder's error count as a measure of channel
quality and picks K from it: a stronger code when the channel is noisy, a
cheaper one when it is clean.

The default code (K = 3) is the one defined by the state table of the
original design, reproduced below.

## The K = 3 code and how codes are described

The source design defines its code by a state table over the state (S1,S0):

| u | state | next | v1 v2 |
|---|-------|------|-------|
| 0 | 00 | 00 | 00 |
| 1 | 00 | 01 | 10 |
| 0 | 01 | 10 | 01 |
| 1 | 01 | 11 | 11 |
| 0 | 10 | 11 | 11 |
| 1 | 10 | 10 | 01 |
| 0 | 11 | 01 | 10 |
| 1 | 11 | 00 | 00 |

This code is **recursive**: after a single 1, an input of zeros never brings
it back to state 00. Its output repeats 10 01 11 for ever. A plain
shift-register encoder with two XOR taps cannot produce this. The source also
sketches such a feed-forward encoder (v1 = k⊕s0, v2 = s0⊕s1) and lists
polynomials (101, 111, 011). Those do not agree with the table. The table is
the version this design follows, because every worked example in the source
agrees with it:

* the trellis;
* a decoding example;
* the encoding of 10010110 into 10 01 11 00 …

Every code is written in *controller form* over a register
`r = {s[K-1] … s[1], w}`. Here `w` is the bit that enters the shift register
and `s[i]` is that bit delayed by i clocks:

```
w  = u ^ parity(fb & {s, 0})       // fb = 0: feed-forward code
v1 = parity(g1 & r)
v2 = parity(g2 & r)
```

Bit i of each 8-bit tap mask (`g1`, `g2`, `fb`) is the tap on delay i, so
bit 0 is the tap on `w`. Note that this is the reverse of the usual octal
notation. The state table becomes `fb = 8'h06, g1 = 8'h03, g2 = 8'h02`. This form
gives exactly the table's output sequences for every input sequence. Only
the names of the states differ. The feed-forward sketch (v1 = k⊕s0, v2 = s0⊕s1) is also
available: set `k = 3, g1 = 8'h03, g2 = 8'h06, fb = 0`.

Controller form has one advantage that the decoder relies on: the trellis
wiring does not depend on the code. The next state is always
`((state << 1) | w)` limited to K-1 bits, for recursive codes too.

`cc_pkg::code_for_k(k)` holds the built-in code for each K, which the
adaptive mode uses:

| K | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|
| code (octal, usual notation) | (3,1) | state table above | (15,17) | (23,35) | (53,75) | (171,133) | (371,247) |

The source names no codes for K ≠ 3. The other entries are common
maximum-free-distance codes, chosen for this design.

## Signal path and frame format

```
dip_sw -> piso_shift_reg -> conv_encoder -> sym_mux ==ch_tx==> (channel) ==ch_rx==> sym_demux -> viterbi_decoder -> led
              ^ tx_ctrl sequences these                                          adaptive_k_ctrl <- err_count
```

* **Frame.** A frame holds FRAME_LEN = 8 data bits, sent MSB first. With
  `term` set, K-1 tail steps follow. In a tail step the encoder uses the
  feedback value as its input, so `w = 0`. The tail therefore returns any
  code, recursive or not, to state 0, and the decoder can start its
  traceback from state 0.
* **Rates.** The encoder takes one step every second clock. The 2:1
  multiplexer sends v1 and then v2, one bit per clock, so the line carries
  one bit on every clock of a frame. `ch_tx_sof` marks the first bit of a
  frame, and the receiver pairs bits starting from that mark.
* **Channel.** The channel is not part of the design. `codec_system` brings
  the line out (`ch_tx_*`) and takes it back in (`ch_rx_*`), so a testbench
  or a physical link can sit in between.
* **Configuration.** The configuration (`code_cfg_t {k, g1, g2, fb}`) and
  `term` are latched when a frame starts. Both ends sit in one module, so the
  decoder uses the values the transmitter latched. With `adapt_en = 0` the
  configuration is `manual_cfg`. With `adapt_en = 1` it is
  `code_for_k(k)` of the adaptive controller.

## Inside the Viterbi decoder

The decoder handles one frame at a time. It takes one received symbol per
clock.

1. **Branch metrics** (`branch_metric`). The received 2-bit symbol is
   compared with each of the four possible symbols: XOR the two, then count
   the ones. Decisions are hard.
2. **Path metrics** (`path_metric_unit`, `acs_unit`). There are 2^(KMAX-1) =
   128 add-compare-select elements, and all of them update in one clock.
   * State n has two predecessors:
     `p0 = n >> 1` and `p1 = p0 | 2^(K-2)`.
     Both reach n with register bit `w = n[0]`. The expected symbol on each
     branch is computed from the taps (`cc_pkg::branch_sym`). The run-time K
     therefore only moves where the predecessor's top bit sits.
   * States at or above 2^(K-1) are unused at the current K.
   * Metrics are 8-bit unsigned values and are never normalised. Every frame
     starts in state 0: state 0 starts at metric 0 and every other state
     starts at a penalty of 128. That penalty is larger than any metric a
     frame can build (2 per step, at most 15 steps), so a path from a wrong
     start state never wins.
   * An elaboration-time assertion checks that the metric width is enough
     for FRAME_LEN.
   * On a tie, predecessor 0 is kept.
3. **Survivor memory** (`survivor_memory`). For each trellis step it stores
   one row of 128 decision bits, for up to FRAME_LEN + 7 = 15 steps. That is
   1,920 bits in total. The decoder keeps the whole frame rather than using a
   sliding traceback window.
4. **Start of traceback** (`min_state_finder`). A terminated frame starts
   from state 0. Otherwise the traceback starts from the state with the
   smallest metric; on a tie, the lowest index wins. This takes one clock.
5. **Traceback** (`traceback_unit`). It walks backwards one step per clock.
   * At state n with decision d, the predecessor is
     `p = (n >> 1) | d·2^(K-2)`.
   * The decoded bit is `u = n[0] ^ feedback(p)`: the register bit with the
     code's feedback removed. This is what lets the same traceback decode
     recursive codes.
6. **Error detection** (`error_detector`). The metric at the start state is
   the Hamming distance between the received frame and the code sequence the
   decoder chose. This is the number of channel bit errors it corrected. It
   is output as `err_count`, and `err_flag` is set when the count is not zero.

**Timing.** For a frame of L trellis steps, `data_valid` rises L + 2 clocks
after the clock that takes the last symbol: one clock to pick the start
state, L clocks of traceback, and one clock to register the word. The first
decoded bit is placed in the MSB of `data`. Symbols that arrive during the
start-state search or the traceback are ignored. A start-of-frame that arrives
while a frame's symbols are still coming in restarts the frame.

## Adaptive constraint length

`adaptive_k_ctrl` receives the error count at the end of each decoded frame.

* A frame with HI_TH = 2 or more corrected errors raises K by one.
* CLEAN_FRAMES = 4 error-free frames in a row lower K by one.
* K stays between 2 and 8 and starts at 3.
* `k_up` and `k_down` pulse when K changes.

The source says only that the constraint length follows the SNR of the
received signal. The estimate (the error count) and both thresholds are this
design's own choices.

## What is not in the RTL

* **Choosing the application at boot (MultiBoot).** The source loads either
  the encoder or the decoder into the FPGA, from two bitstreams in a parallel
  NOR flash. This uses the FPGA's MultiBoot configuration feature and slide
  switches. That is device configuration, not logic, so it is not modelled.
  `codec_system` holds both applications side by side instead.
* **Board parts.** The DIP switches, LEDs and crystal oscillator are plain
  ports (`dip_sw`, `led`, `clk`).
* **Look-ahead.** The source mentions a look-ahead technique for higher
  throughput but gives no structure for it. This decoder takes one symbol per
  clock.
* **Resets.** All resets are synchronous and active high, matching the
  synchronous-reset style of the original synthesis setup.

## Size

Coarse synthesis of `codec_system` gives:

* about 7,700 word-level cells;
* about 1,190 flip-flops;
* 1,920 memory bits (the survivor memory).

Nearly all of it is the 128-state path-metric array, which is sized for
K = 8 whatever K is in use. Reducing `cc_pkg::KMAX` shrinks everything
together, but the adaptive code table then needs matching entries.

## Verification

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv` that
prints `TB_RESULT checks=N failures=M`. The reference models in
`tb/tb_ref_pkg.sv` are written independently of the RTL:

* the state table above as a literal lookup;
* an encoder that updates its register bit by bit;
* an exhaustive maximum-likelihood decoder that tries every data word of a
  frame.

The decoder and end-to-end tests compare the decoded word and the error
count with this exhaustive search. They cover:

* every K from 2 to 8;
* the built-in codes, random feed-forward codes and random recursive codes;
* terminated and unterminated frames.

Specific cases checked:

* **Encoding of 10010110.** It gives `10 01 11 00 00 10 11 10`.
* **The received sequence `00 01 11 00 10 11 10 01`.** It decodes to
  `10011100` with one corrected error. That word is the unique closest one.
  The source's illustration of this example marks `10011101`, which is at
  distance 2.
* **`tb_codec_system`.** It runs the whole link at default parameters with
  bit errors injected. It checks that noisy frames raise K to 8, clean frames
  lower it to 2, the line has no gaps, and every K and both frame types are
  used.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/cc_pkg.sv tb/tb_ref_pkg.sv tb/tb_codec_system.sv --top-module tb_codec_system
./obj_dir/Vtb_codec_system
```

Replace `tb_codec_system` with any other testbench name. All of them finish
in seconds.
