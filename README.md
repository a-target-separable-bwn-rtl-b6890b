# Target-separable BWN speech recognition processor

This is synthesizable SystemVerilog for a low-power always-on speech processor. It does two jobs
with a single neural-network pass per window of speech: **keyword spotting (KWS)**, which tells which
of four keywords was said, and **speaker verification (SV)**, which tells whether the enrolled
speaker said it.

Earlier designs ran a DNN for keywords and a separate Gaussian-mixture model for the speaker, in two
pieces of hardware. Here both jobs share one binary-weight network (BWN), whose weights are +1 or -1.
The two convolution layers, which do about 93% of the work, are computed once. Only the two small
fully connected heads are specific to a target: 5 outputs for KWS and 2 for SV. That is what
"target-separable" means. Three further ideas cut energy:

* **Frequency-domain result reuse.** When a 3x3 kernel's first and third columns carry the same
  weights, the partial sum computed for column 3 at one position equals the partial sum column 1
  will need a stride or two later. It is kept in a small buffer instead of being recomputed.
* **Precision-adaptive approximate adders.** Every adder in the processing elements (PEs) and in the
  addition trees can replace its low 4, 8 or 12 bits with OR gates, which have no carry chain. An
  SNR estimator decides how many: more approximation in clean audio, none at 5 dB.
* **Continuity-based SV.** A speaker decision is smoothed over the previous decisions, because a
  speaker does not change from one window to the next.

## Block diagram

```
 speech x[9:0] ──┬──► vad ──► vad_active ──────────────┐
                 │                                     ▼
                 └──► snr (gated clk) ──► snr_class ─► main_ctrl ──► clock-gate enables,
                                              │         │  ▲          ORA setting, acc_start
 MFCC features (external) ─► feat_* ─┐        │         │  │ acc_done
                                     ▼        │         ▼  │
                     ┌─────────── bwn_accel (gated clk) ───────────────────┐
                     │ mem_ctrl ─► data_sram (10189 x 8b, 3 read ports)    │
                     │          ─► weight_sram (4088 B, 60-bit window read)│
                     │ layer_ctrl ─► 20 groups x 3 pe ─► reuse_buffer      │
                     │                     │                 │             │
                     │                     └──► add_tree ◄───┘ (x20)       │
                     │                            │                        │
                     │            bn_relu ◄───────┤ conv layers: write back│
                     │                            └─► fc_out[7] (FC layer) │
                     └─────────────────────────────────┬───────────────────┘
                                                        ▼
                       mode_ctrl (mode, SNR-dependent thresholds, head enables)
                          │ fc_out[0..4]                    │ fc_out[5..6]
                          ▼                                 ▼
                    kws_classifier ─► keyword        sv_classifier ─► speaker
```

## The network and how it runs on the PE array

The network, with its default sizes:

| layer | input | operation | output | one-bit weights |
|---|---|---|---|---|
| conv 1 | 49 frames x 26 MFCC | 3x3, stride 2, 10 kernels | 24 x 12 x 10 | 90 |
| conv 2 | 24 x 12 x 10 | 3x3x10, stride 1, 20 kernels | 22 x 10 x 20 | 1800 |
| FC KWS | 4400 | fully connected | 5 (4 keywords + other) | 22000 |
| FC SV | 4400 | fully connected | 2 (speaker / not) | 8800 |

The strides follow from the sizes (49→24, 26→12 needs stride 2 without padding; 24→22 needs stride
1). The table is the `NET_LAYERS` constant in `speech_pkg`. It is the reset value of a layer-table
register bank in `bwn_accel`, and `layer_ctrl` reads the bank as an input. A different network of
the same kind can be set at run time: 1 to 3 layers, 3x3 convolutions and then one FC stage, any
input size, channel count, stride and memory base that fit the memories.

The bank is written while the accelerator is idle through `lt_we`/`lt_addr`/`lt_wdata`. At the top
level these are configuration addresses 32..44. Word `j` (0..3) of layer `l` is at address
`32 + 4*l + j` and holds bits `32*j +: 32` of the packed `layer_t`. Address 44 holds the layer
count, which must be 1..3. BN entries follow the layer index. The FC biases stay at entries 40..46
whatever the layer count. `tb_bwn_accel` checks this by switching to conv 1 followed directly by the
FC heads on its 2880 outputs.

**Convolution mapping.** There are 60 PEs in 20 groups of 3. For a 3x3xNxM kernel set, group `m`
computes output channel `m`, and PE `k` in the group handles kernel column `k`. The layer controller
visits the output positions in row order, with the frequency index `ox` innermost. For each
position it steps through the kernel row `ky` and the input channel `n`, one pair per cycle, which
makes 3N cycles. In each cycle it reads the three activations `x[oy*s+ky][ox*s+k][n]` (k = 0, 1, 2)
from the three read ports of the data memory and broadcasts them to all groups. It also reads 3M
weight bits. Every PE adds or subtracts its activation, because a binary weight is +1 or -1 and no
multiplier is needed. After the last element there is one drain cycle. Then come M write-back
cycles: each writes one channel's addition-tree result through BN-ReLU into the data memory.

**Fully connected mapping.** The 4400 stored outputs of conv 2 are read as one stream. In cycle `c`,
PE `k` of group `o` takes input `3c+k`. Seven groups are used, five for the KWS head and two for the
SV head. The last cycle masks the missing third input. Each group's three partial sums go through
its addition tree to `fc_out[o]`. The FC bias is loaded into PE 0 with the first term. Setting
`fc_grp_en` switches off the groups of a disabled target. The cycle count stays the same, but those
PEs do no work.

**Timing.** One full window takes 288·(3+1+10) + 220·(30+1+20) + 1467 + 3 = **16,722 cycles**
(conv 1, conv 2, FC). The testbenches check this count. At a 250 kHz clock that is 67 ms per
decision.

### Memory layouts

*Data memory* (`data_sram`): 10,189 eight-bit words, which is 9.95 KB. Feature maps are stored
channel-innermost: `addr = base + (row*W + col)*C + ch`. The MFCC map starts at 0, the conv 1
output at 1274, and the conv 2 output at 4154. That is 8554 words in use. Activations are stored as
signed 8-bit values. After ReLU they lie in 0..127.

*Weight memory* (`weight_sram`): 4088 bytes (3.99 KB) of one-bit weights, packed with no gaps in
the order they are consumed. Bit `i` of the stream is bit `i%8` of byte `i/8`. A weight of 1 means
+1. A read returns the 60 bits that start at any bit address. Each layer consumes `3*M` bits per
cycle:

```
conv layer, base B:  bit B + (ky*N + n)*3M + m*3 + k      (w[m][ky][k][n])
conv 1: B = 0 (90 bits)       conv 2: B = 90 (1800 bits)
FC layer,  base 1890: bit 1890 + (i/3)*21 + o*3 + (i%3)    (weight of input i to output o,
                                                            o = 0..4 KWS, 5..6 SV)
```

Weights are written one byte per cycle through `wt_*`. Features are written through `feat_*` while
the accelerator is idle. `mem_ctrl` refuses these writes while the accelerator runs and raises
`load_blocked`.

## Frequency-domain result reuse

Take one output channel, kernel row `ky` and input channel `n`. Suppose `w[ky][0][n] == w[ky][2][n]`.
At output position `ox`, PE 2 multiplies that weight by the input at frequency `ox*s + 2`. That is
exactly the product PE 0 needs at the position whose first column is `ox*s + 2`. With stride 1 that
position is `ox + 2`; with stride 2 it is `ox + 1`. So:

1. Per kernel element, the accelerator compares the weight bits of columns 1 and 3 as they come
   out of the weight memory. This equality mask needs no preprocessing of the model.
2. PE 2 adds the masked terms into its second accumulator `Rb`, besides its normal accumulator `R`.
3. At the end of each position, the last write-back cycle pushes `Rb` into the channel's
   `reuse_buffer`. Buffer1 then holds the last position's value and Buffer2 the one before.
4. At a later position, if the buffer entry for this row is valid (Buffer2 for stride 1, Buffer1
   for stride 2), PE 0 gets `skip` (Multiplex Rb_n) for the masked elements and adds zero. The
   addition tree adds the buffer entry as its fourth operand.
5. A new output row clears the buffer valid flags. The first one or two positions of each row
   compute everything.

With exact adders, reuse gives bit-identical results. The testbenches check this by running with
reuse on and off. Reuse saves additions, not cycles: PE 0 still steps in lockstep but does no
work. `ops_total` and `ops_skipped` count the PE additions done and the ones avoided. With random
weights where half of the kernel rows repeat their first column in the third, 18.8% are skipped. The
saving on a real trained model depends on its weights. It can be raised offline, before the
weights are loaded, by retraining or editing kernels so that more of them have equal first and third
columns. The hardware needs no change for that.

## Precision-adaptive arithmetic

`approx_adder` is a 16-bit adder made of four 4-bit segments. The lowest `ora_segs` segments
compute `a | b` and give no carry. The rest are exact full adders, and the lowest exact segment gets
a carry-in of 0. The PE holds both a plain exact adder and the approximate one, and `approx_sel`
picks between them. `add_tree` sums its operands pairwise and takes a separate 2-bit setting for
each stage. The main controller maps the SNR class to the PE setting:

| SNR class (`snr_class`) | 0: ~5 dB | 1: ~10 dB | 2: ~15 dB | 3: clean |
|---|---|---|---|---|
| ORA bits (`pe_ora`) | 0 | 4 | 8 | 12 |

The 10 dB entry is an interpolation. Each tree stage takes the PE setting minus its own reduction
field in register 0, floored at 0. This lets the wider, later sums be kept more exact. With the
reset value of 0, all stages match the PEs. In silicon the OR-gate
segments would sit on a lower supply rail (about 0.39 V against 0.6 V), so that their slower
switching still matches the full-adder critical path. That is a physical-design measure and has no
counterpart in RTL.

## Front end: VAD and SNR

`vad` removes the mean with a running average (gain 1/64) and sums the squares of the zero-mean
samples over a 320-sample frame, which is 20 ms at 16 kHz. At the end of the frame it sets `active`
if that energy exceeds the threshold register.

`snr` measures each frame's energy and zero-crossing count. A frame with more crossings than
`zcr_th` (160 by default) counts as noise-like. Its energy is averaged into a noise estimate; the
energy of any other frame goes into a speech estimate. Each average is `(old + new)/2`. The
speech-to-noise ratio is then compared with 2^7, 2^5 and 2^3 (about 21, 15 and 9 dB) to give the
class. Until a noise frame has been seen the class is "clean".

The way energy and zero-crossing rate are combined, the mean estimator and the frame length are
choices made in this RTL.

## Classifiers

**KWS** (`kws_classifier`). The head ends in a softmax. Softmax is monotonic, so the decision is the
argmax of the five logits, with the lowest index winning a tie. `detected` is set when the winner is
one of the four keywords (index 0..3) and its logit is at least the threshold for the current SNR
class.

**SV** (`sv_classifier`) decides in two stages.

* *Initial label.* Each of the two SV neurons is compared with its own threshold for the current
  SNR class. A vote is cast against the speaker when `fc0 < th1` or when `fc1 > th2`. The initial
  label `x_t` is +1 when fewer than two votes are cast.
* *Secondary label.* With the last N = 3 initial labels and confidence weights `a1..aN`, the
  classifier computes

  `X_t = (x_{t-1}·a1 + ... + x_{t-N}·aN) / N + x_t`

  and outputs speaker = 1 when `X_t > beta`. The defaults are N = 3 and beta = 0.4.

Values are fixed point with 8 fraction bits. The weights run from 0 to 256 (1.0), and beta is 102.
One product is accumulated per cycle, so a decision is ready N+2 cycles after the FC results. With
weights no larger than 1, the secondary stage can only turn an isolated +1 into -1. It lowers false
accepts at the cost of false rejects. Before N windows have been seen, the missing history entries
count as 0.

## Control

`main_ctrl` holds the registers and the working state:

| state | meaning | clocks running |
|---|---|---|
| 0 IDLE | no voice | VAD only |
| 1 LISTEN | voice present; `mfcc_en` high; wait for `feat_ready` | + SNR |
| 2 COMPUTE | network runs (`acc_start` pulse on entry) | + accelerator |
| 3 CLASSIFY | wait for the enabled classifiers, then back to LISTEN or IDLE | SNR |

The KWS answer can arrive while the state is still COMPUTE, and the controller remembers it.
`clock_gate` is a latch-plus-AND gate, and its latch is intended. The gates of the SNR unit and the
accelerator are held open during reset. A load write also opens the accelerator gate for one cycle.

`mode_ctrl` routes `fc_valid` to the classifier of each enabled target (mode 1 = SV, 2 = KWS,
3 = both). It selects the thresholds of the current SNR class and drives `fc_grp_en`.

Register map (`cfg_we`, `cfg_addr`, `cfg_wdata`; reset value in brackets):

| addr | content |
|---|---|
| 0 | [1:0] mode [3], [4] reuse enable [1], [5] approximate adders enable [1], [9:8] / [11:10] ORA segments removed in tree stage 0 / 1 [0] |
| 1 | VAD energy threshold [65536] |
| 2 | zero-crossing threshold [160] |
| 3..6 | KWS threshold for SNR class 0..3 [0] |
| 7..10 | SV threshold 1 for SNR class 0..3 [0] |
| 11..14 | SV threshold 2 for SNR class 0..3 [0] |
| 15 | beta, Q8 [102] |
| 16..18 | SV confidence weights a1..a3, Q8 [256] |
| 32..43 | layer table words (see above) [the network of the table] |
| 44 | number of layers [3] |

BN parameters (`bn_we`, `bn_addr`, `bn_bias`, `bn_shift`) sit at entry `20*layer + channel`:
0..9 for conv 1 and 20..39 for conv 2. Entries 40..46 hold the FC biases, and their shift is unused.
Batch normalisation is folded into `y = clamp((acc + bias) >>> shift, 0, 127)`.

## Using the top level

To use `speech_proc_top`:

1. Reset it.
2. Write the configuration registers, the 4088 weight bytes and the BN table.
3. Stream 10-bit signed samples with `x_valid`.
4. When `mfcc_en` is high (the VAD has heard voice), an MFCC unit writes the 49x26 window of
   signed 8-bit coefficients into data addresses 0..1273, row by row, and pulses `feat_ready`.
5. After 16,722 cycles `kw_valid` / `keyword` / `kw_detected` appear, and a few cycles later
   `sv_valid` / `speaker` / `sv_init_label`. `fc_out` keeps the raw head outputs. `sv_score` is the
secondary-classification score, and `vad_energy` is the last frame energy. `acc_busy` is high
while the network runs.

The 16-bit accumulators wrap. The BN shifts of a real model must keep the FC sums inside ±32767.

## What this RTL leaves out or changes

* **MFCC extraction is not included.** Its FFT size, filter bank, log and DCT formats are not
  specified, so the top takes the features as memory writes.
* **Latency.** The original processor reports 16 ms per decision at 250 kHz. This RTL recomputes
  the whole 49-frame window per decision, which takes 67 ms at 250 kHz. An incremental scheme that
  computes only the newest rows per frame would be needed to reach 16 ms, and is not specified in
  enough detail to build. Write-back is serial (one channel per cycle) and is not overlapped with
  the next position.
* **Dual supply, pads and the SRAM macros.** The memories are plain arrays, one with three read
  ports and one with a bit-addressed window read. No foundry macros are modelled, and neither are
  supply rails or I/O pads.
* **Own choices** wherever the original gives no detail: 8-bit activations, weight packing, the
  state machine and its register map, the SNR estimator, the VAD mean estimator, SV fixed point and
  vote directions, and 4 ORA bits at 10 dB.

## Simulation

Every block has a self-checking testbench in `tb/`. It prints `TB_RESULT checks=N failures=M`. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/speech_pkg.sv tb/tb_ref_pkg.sv \
    tb/tb_speech_proc_top.sv -y rtl -y tb --top-module tb_speech_proc_top -Mdir obj -o sim
./obj/sim
```

Replace `tb_speech_proc_top` with any other `tb_<block>` to test one block. The two large
testbenches run at full default size and compare bit-exactly with a reference forward pass written
in the testbench:

* `tb_bwn_accel`: all stored activations, the FC outputs, reuse on and off, approximate mode, a
  disabled head, the cycle count, and a two-layer network loaded into the layer table.
* `tb_speech_proc_top`: silence, then voice with noise of rising level, and four windows in the
  three modes and with approximate adders. It counts that every mechanism happened: VAD turn-on,
  clock gating, reuse, approximate adders with a per-stage tree setting, SNR change, refused load,
  a layer-table write, and both classifiers.

Each takes well under a second.

## Files

`rtl/speech_pkg.sv` holds the types, sizes and network table. The modules are:

* Datapath: `approx_adder`, `pe`, `add_tree`, `reuse_buffer`, `bn_relu`.
* Memories: `weight_sram`, `data_sram`, `mem_ctrl`.
* Accelerator: `layer_ctrl`, `bwn_accel`.
* Front end: `vad`, `snr`.
* Classifiers: `kws_classifier`, `sv_classifier`.
* Control: `mode_ctrl`, `main_ctrl`, `clock_gate`.
* Top: `speech_proc_top`.

`tb/tb_ref_pkg.sv` holds the reference adder model used by the testbenches.
