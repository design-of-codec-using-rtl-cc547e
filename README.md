# Fully reused FM0 / Manchester codec

Short-range vehicular links (DSRC) send their bits as FM0 or Manchester
line code. Both codes put at least one level change in every bit so that
the receiver can recover the clock and the line carries no DC. A
straightforward codec builds four separate circuits: an FM0 encoder, an FM0
decoder, a Manchester encoder and a Manchester decoder. At any time only
one of them is in use.

This design does all four jobs with one small datapath in which every gate
and storage element is used in every mode. It contains four 2-to-1
multiplexers, one XNOR, one inverter, one latch and one D flip-flop. The
trick is **half-cycle partitioning**. One bit takes one clock period. While
CLK is high the circuit computes the first half of the code word. While CLK
is low it computes the second half. A multiplexer selected by CLK itself
switches between the two halves. The logic for each half is then rewritten
so that the same gates serve all four modes. Four static control bits
choose the mode.

## The two codes

One bit occupies one CLK period, and CLK is high during the first half of
the period.

**Manchester.** The line level is `bit XOR CLK`. So a 0 is sent as high then
low, and a 1 as low then high. Decoding is the same XOR. During the low
half of CLK the line level equals the bit.

**FM0 (bi-phase space).** Call the two halves of bit *t* `Y_FP(t)`
(positive half, CLK high) and `Y_FN(t)` (negative half, CLK low). The rules
are:

    Y_FP(t) = not Y_FN(t-1)          -- the level always changes at a bit boundary
    Y_FN(t) = Y_FP(t) xor not X(t)   -- a 0 changes the level again mid-bit; a 1 does not
            = X(t) xor Y_FN(t-1)

The decoder only has to compare the two halves of each received bit. If
they are equal the bit is 1. If they differ the bit is 0.

Example, starting from a low line: the bits 0 0 1 0 1 become the halves
`10 10 11 01 00`.

## Datapath

```
            din ──┬──────────────► MUX_B ─────┬──────────────► MUX_A(1) ─┐
                  │   dff_q ─────►(S_P)       │ sel                      │
                  │                           ▼                          ├─► INV_A ─► y_enc
                  │              I1,I0 ─► MUX_D ─► latch(EN=CLK) ─ n ─┐  │      │
                  └─► MUX_C ─ m ───────────────────────────────────► XNOR ─► MUX_A(0)
          dff_q ─────►(S_N)                                              │ (select = CLK)
                                                                   reused DFF ◄─┘ (D)
                                                                       │ (rising edge, clear)
                                                                       └─► dff_q = x_dec
```

* **MUX_A / INV_A** (`hcpm_codec`). CLK selects the source of the line
  output. While CLK is high the source is the positive-cycle logic. While
  CLK is low it is the negative-cycle logic. Both sources reach the output
  through the one shared inverter INV_A.
* **Positive-cycle logic, MUX_B** (`hcpm_pos_cycle_logic`). `S_P = 1` passes
  the flip-flop output, which for FM0 encoding is `Y_FN(t-1)`. INV_A then
  produces `Y_FP(t) = not Y_FN(t-1)`. `S_P = 0` passes the input, so
  Manchester encoding emits `not X`.
* **Negative-cycle logic** (`hcpm_neg_cycle_logic`). All four modes compute
  one function here, `m XNOR n`, which becomes `m XOR n` after INV_A:
  * `m` comes from MUX_C (select `S_N`). It is either the codec input or
    the flip-flop output. In Manchester encoding the flip-flop is held
    cleared, so `m = 0`.
  * `n` comes from MUX_D through a latch. MUX_D's select is MUX_B's output,
    and its data inputs are the constants I1 and I0. Depending on I1/I0,
    MUX_D therefore produces MUX_B's output, its inverse, or a constant.
    The latch is transparent while CLK is high and holds while CLK is low.
    In FM0 decoding it holds the first code half `Y_FP(t)`, so that this
    value is still available while the second half arrives.
* **Reused DFF** (`hcpm_reused_dff`). This is the only flip-flop. It samples
  on the rising edge of CLK, which is the end of the negative half. In FM0
  encoding it stores `Y_FN(t)` for the next bit. In both decoding modes its
  output is the decoded bit. Its asynchronous, active-low clear provides
  the constant 0 that Manchester encoding needs.

What each mode computes:

| mode | S_P | S_N | I1 | I0 | CLK high: y_enc | CLK low: y_enc = m xor n | DFF after the rising edge |
|---|---|---|---|---|---|---|---|
| FM0 encode       | 1 | 0 | 1 | 0 | not Y_FN(t-1) | X xor Y_FN(t-1) | Y_FN(t) |
| FM0 decode       | 0 | 0 | 0 | 1 | (unused) | Y_FN xor not Y_FP | decoded bit |
| Manchester encode| 0 | 1 | 1 | 0 | not X | 0 xor X | held at 0 |
| Manchester decode| 1 | 0 | 0 | 0 | (unused) | Y_MD xor 0 | decoded bit |

`hcpm_mode_ctrl` turns a 2-bit `codec_mode_e` into these settings. It also
holds the flip-flop clear in Manchester encoding and forwards the reset.

## Interface and timing (`fm_codec_top`)

| port | dir | meaning |
|---|---|---|
| `clk` | in | bit clock. One bit per period; the first code half is sent while `clk` is high. |
| `rst_n` | in | asynchronous active-low reset. It clears the flip-flop, so FM0 starts from a low line. |
| `mode` | in | `MODE_FM0_ENC`, `MODE_FM0_DEC`, `MODE_MAN_ENC`, `MODE_MAN_DEC` (package `fm_codec_pkg`) |
| `din` | in | Encoding: the bit, held for the whole period. Decoding: the received line, first half while `clk` is high, second half while it is low. |
| `y_enc` | out | encoded line level, valid in each half period |
| `x_dec` | out | decoded bit, valid for the whole period after the bit |

* **Encoder latency.** `y_enc` is combinational from `din`, `clk` and the
  flip-flop. It carries the code in the same period as the bit.
* **Decoder latency.** One period. The bit received during period *t* is on
  `x_dec` from the rising edge that ends period *t* until the next one.
* **Input timing.** `din` must be stable at the falling edge, where the
  latch closes, and at the rising edge, where the flip-flop samples. A
  receiver that shares the transmitter's clock therefore needs the line
  delayed by part of a half period. The end-to-end testbench uses a quarter
  period.
* **Mode changes.** Change the mode at a rising edge. The next bit is then
  coded in the new mode. When the codec leaves Manchester encoding, the
  flip-flop is still cleared, so FM0 encoding restarts from a low line.

## Where this RTL departs from or fills in the architecture

* **The latch is modelled as a register plus a bypass.** The architecture
  uses a level-sensitive latch enabled by CLK. The flip-flop samples on the
  rising edge, which is the same edge that reopens the latch. In silicon,
  the latch's propagation delay makes the flip-flop see the old value. A
  zero-delay RTL simulation has no such delay. The RTL therefore stores the
  latch value at the falling edge (when the latch closes) and passes MUX_D
  through while CLK is high. The behaviour at the latch output is
  identical. Synthesis, however, produces a falling-edge flip-flop and a
  multiplexer instead of a latch.
* **Where the flip-flop's D comes from.** In the architecture, D is INV_A's
  output. Just before the rising edge, that output equals the inverse of
  the XNOR formed with the held latch value. The RTL takes D from that
  term. Taking it from INV_A would race, in simulation, with CLK switching
  MUX_A on the same edge.
* **Latch polarity and the FM0-decode setting.** Descriptions of this
  architecture disagree on two points. The first is whether `n` is the
  latch output or its inverse. The second is the I1/I0 setting for FM0
  decoding, which is published as `I1 = I0 = 1`. That setting makes `n`
  constant, so the codec could not decode FM0. This RTL uses a
  non-inverting latch. That choice agrees with the published settings of
  the other three modes. For FM0 decoding it uses `I1 = 0, I0 = 1`. The
  testbenches confirm all four modes against independent reference models.
* **Clear polarity and type, reset, mode encoding.** These are this design's
  own choices:
  * The clear is active low, consistent with published simulation traces,
    which keep `clr = 1` during normal operation.
  * The clear is asynchronous.
  * `rst_n` and the 2-bit mode code are added.
* **Decoded output is one period late.** Manchester decoding is
  `line XOR CLK`, which could be taken straight from MUX_A. As in the
  architecture, the decoded bit instead goes through the shared flip-flop.
  It therefore appears one period after the bit.
* **Not built.**
  * A proposed extension to Miller coding adds a fifth multiplexer after
    INV_A. No equations or control settings exist for it, and Miller
    decoding is described as unsolved. It is left out.
  * The non-shared four-circuit baseline codec is not included either.

## Testbenches

All testbenches are self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_fm_codec_top` | End to end. Two codecs: an encoder whose line output, delayed by a quarter period, feeds a decoder. The run is 512 random bits in 8 segments, switching FM0 ↔ Manchester at bit boundaries, with a reset in the middle. The test checks the line level in every half period, and every decoded bit one period late. It also counts that each mechanism occurs: FM0 zeros and ones, Manchester bits, decodes of each code, switches both ways, reset, and the held clear. |
| `tb_codec_examples` | Short hand-worked streams: FM0 `0 0 1 0 1` → `10 10 11 01 00`, Manchester `0 0 1 1 0` → `10 10 01 01 10`. Each stream is encoded and then decoded. |
| `tb_hcpm_codec` | The datapath with raw controls. 200 random bits per mode. |
| `tb_hcpm_neg_cycle_logic` | Latch transparency while CLK is high; the latch holds while CLK is low even when MUX_D's inputs change; MUX_C. |
| `tb_hcpm_pos_cycle_logic` | MUX_B, exhaustively. |
| `tb_hcpm_reused_dff` | Capture only on the rising edge; asynchronous clear between edges. |
| `tb_hcpm_mode_ctrl` | The mode table for all modes, with reset asserted and released. |

The codec has no parameters. Every testbench runs the design as built.

## Simulating

With Verilator 5, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/fm_codec_pkg.sv tb/tb_fm_codec_top.sv \
          --top-module tb_fm_codec_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any of the others. The package must be
given first; the modules are then found through `-Irtl`.

## Files

* `rtl/fm_codec_pkg.sv` — mode enum and control struct
* `rtl/fm_codec_top.sv` — mode controller plus datapath
* `rtl/hcpm_mode_ctrl.sv` — mode → S_P, S_N, I1, I0, clear
* `rtl/hcpm_codec.sv` — MUX_A, INV_A and the wiring of the datapath
* `rtl/hcpm_pos_cycle_logic.sv` — MUX_B
* `rtl/hcpm_neg_cycle_logic.sv` — MUX_C, MUX_D, latch, XNOR
* `rtl/hcpm_reused_dff.sv` — the shared flip-flop
* `tb/` — the testbenches listed above
