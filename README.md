# Pipelined phase accumulator with sequential pre-skewing

A direct digital frequency synthesizer (DDFS) produces a sine wave whose
frequency is set by a digital word. Its first stage is a phase accumulator: every
clock it adds the frequency control word (FCW) to a phase register and outputs
the upper bits of the phase. With an N-bit accumulator clocked at `f_clk`, the
output frequency is `f_clk * FCW / 2^N`. With the defaults here (N = 24,
f_clk = 5 GHz) the resolution is 5 GHz / 2^24 ≈ 298 Hz.

A 24-bit add cannot finish in one cycle at several GHz. The accumulator is
therefore cut into six 4-bit stages, and each stage passes its carry to the
next stage through a register. Stage *i* then works one cycle behind stage
*i-1*. Two skewing blocks make up for this:

* **pre-skewing** delivers each 4-bit slice of the FCW to its stage one cycle
  later than to the stage below it;
* **post-skewing** delays the lower output stages so that all output bits
  come from the same accumulator sample.

The usual pre-skewing is a triangle of delay flip-flops: 84 bits for this size,
all clocked every cycle. This design uses a cheaper scheme instead. A new FCW
is announced by a one-cycle `load` pulse and stored once in a column of
ordinary CMOS registers. A small register chain then produces one `LD(i)`
pulse per stage, one cycle apart. Each pulse loads the slice of stage *i* into
a hybrid flip-flop in front of that stage. Between FCW updates the
pre-skewing block does nothing. At circuit level this is what saves power: the
hybrid flip-flops switch on their current sources only around their own load
pulse.

## Structure

```
            load ──┬──────────────────────────────┐
                   │                              ▼
                   │                  load_signal_generator
                   │                  (6 x lsg_register chain)
                   │                        │ LD(1..6), HD(1..6)
                   ▼                        ▼
 fcw[23:0] ──► cmos_dff4 x6 ──► hybrid_ff4 x6 ──► acc4 x6 ──► post_skewing ──► phase[11:0]
             (whole word,      (slice i loaded    (carry      (0/1/2 cycles of
              on load)          on LD(i))          registered  delay on the top
             └──────── pre_skewing ────────┘       upward)     three stages)
                                                  └ acc_core ┘
```

| Module | Role |
|---|---|
| `pacc_top` | Top level: wires the four parts below together. |
| `pacc_pkg` | Default sizes N = 24, K = 12, M = 4 and the stage-count helpers. |
| `load_signal_generator` | Chain of `lsg_register` cells. It turns `load` into LD(1..6) and HD(1..6). |
| `lsg_register` | Two latches in series plus an OR gate. Output D drives LD and output H drives HD. |
| `pre_skewing` | Six `cmos_dff4` (loaded by `load`) feeding six `hybrid_ff4` (loaded by LD(i)). |
| `cmos_dff4` | 4-bit register with load enable. |
| `hybrid_ff4` | 4-bit register that loads when LD and HD are both high. Logic model of the CMOS-CML hybrid flip-flop. |
| `acc_core` | Six `acc4` stages with a registered carry between them. |
| `acc4` | 4-bit ripple adder (four `full_adder`s), a 4-bit sum register and a 1-bit carry register. |
| `full_adder` | One-bit full adder. |
| `post_skewing` | `cml_dff4` delay lines that align the top three stages. |
| `cml_dff4` | Plain 4-bit register. |

The storage matches the reference structure. There are 24 static CMOS bits and
24 hybrid bits for pre-skewing, 6 × 5 bits inside the accumulator stages and 12
post-skewing bits: 90 flip-flop bits in all. The generator adds six registers
and six OR gates. There are 24 full adders.

## Timing of one FCW update

This is the part that needs care. The table below follows a `load` pulse in
cycle *t*. "Edge *t+k*" is the rising clock edge that starts cycle *t+k*.
Stage 1 is the least significant stage.

| When | What happens |
|---|---|
| cycle *t* | `load` = 1 and `fcw` is valid. |
| middle of cycle *t* (clock falls) | HD(1) rises. The first latch of the first generator cell opens. |
| edge *t+1* | The CMOS column holds the whole FCW. LD(1) is high for cycle *t+1*. HD(2) rises half a cycle later. |
| edge *t+2* | Hybrid flip-flop 1 takes bits 3..0. LD(1) and HD(1) fall. LD(2) is high. |
| edge *t+3* | Stage 1 adds the new slice for the first time. Hybrid flip-flop 2 takes bits 7..4. |
| edge *t+1+i* | Hybrid flip-flop *i* takes bits 4i-1..4i-4. Stage *i* first adds it at edge *t+2+i*, exactly when the carry of the first new sum arrives from below. |
| edge *t+7* | Hybrid flip-flop 6 is loaded. From here on the CMOS column may change again. |
| edge *t+8* | The first output sample that contains the new FCW appears on `phase`. |

In closed form: let `P(e) = P(e-1) + W(e)`, where `W(e)` is the FCW of the
last `load` in a cycle ≤ *e*-3. Then `phase` after edge *e* equals bits 23..12
of `P(e-5)`. The 5 is the N/M − 1 cycles of skew. The output changes to the
new frequency with no glitch: every stage switches to the new slice in the same
accumulator sample.

HD(i) is high for 1.5 cycles, from the middle of the cycle before LD(i) to the
end of LD(i). In the transistor circuit this early start lets the tracking
current source settle before the load. In the logic model `hybrid_ff4` simply
requires LD and HD together, and an assertion checks that LD never comes
without HD.

### Rule for `load`

The CMOS column must hold a word until hybrid flip-flop 6 has taken it. So
`load` must not be raised again within N/M = 6 cycles of the previous pulse.
An update every 6 cycles or more is fine, and so is a longer interval such as
one every 8 cycles. An assertion in `pacc_top` flags a violation. Between
`load` pulses the `fcw` input is ignored and may change freely.

## The load signal generator cell

`lsg_register` is drawn as two latches in series, with D taken from the second
latch and H = (first latch) OR D. The first latch is transparent while the
clock is low, the second while it is high. Together they form a rising-edge
flip-flop, and D is the input delayed by one cycle. The first latch already
follows the input during the low half of the preceding cycle. That gives H its
half-cycle lead and its 1.5-cycle length. The choice of which clock phase
opens each latch is this design's own. It is the only choice that gives that
lead and that length.

The first latch is an intended level-sensitive latch (`always_latch`), so
synthesis reports one latch bit per cell. The second latch is written as an
`always_ff` register. That is equivalent and keeps the LD signals free of
races with the flip-flops they enable.

## What is modelled and what is not

The published design is a mixed CMOS / current-mode-logic (CML) circuit in a
55 nm process. This RTL keeps its logic function, its register structure and
its cycle timing. It does not keep these circuit-level properties:

* **Power and speed.** The power savings (the point of the scheme), the 5 GHz
  clock and the speed comparison are properties of the circuit. The RTL
  keeps at most four full adders between registers, as the circuit does, but
  it does not model any of these.
* **Hybrid flip-flop internals.** The real cell is a static CMOS master latch
  opened by LD, followed by a CML level-converting slave latch. The slave has
  a large tracking current source and a small latching current source, both
  switched by HD. Here it is a register with a load enable: it loads when LD
  and HD are both high.
* **Differential signals.** CML nets such as FCW_P/N, D_P/N, V_OP/ON and the
  A/B/C pairs of the DCVSL full adders are single-ended bits.
* **Clocks.** The circuit converts the CMOS clock to CML levels for the
  hybrid flip-flops, the accumulator and post-skewing. That converter is a
  level shifter with no logic function, so one clock `clk` drives everything.
* **Reset.** The circuit shows none. Here an asynchronous active-low `rst_n`
  clears all state to 0, so the phase starts at 0.
* **Carry out of the top stage.** The top stage's carry register exists, as
  in the circuit, but nothing reads it; it is the phase wrap-around. Lint
  reports it as unused, and synthesis removes it.
* **Outside this design.** The phase-to-amplitude mapper and DAC of a full
  DDFS are not part of it.

## Parameters

`pacc_top #(N, K, M)` defaults to 24 / 12 / 4. N and K must be multiples of M,
with K ≤ N and N/M ≥ 2. An elaboration-time assertion checks this. The number of
stages, of LD/HD pairs and of post-skew delays all follow from N/M and K/M.
The `ld` and `hd` outputs are N/M bits wide and are there for observation.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the
outputs with values computed independently in the testbench. Each ends by
printing `TB_RESULT checks=<n> failures=<n>` and has a cycle-count watchdog.

| Testbench | What it checks |
|---|---|
| `tb_full_adder` | All 8 input combinations. |
| `tb_acc4` | 1000 random FCW slices and carry-ins against a 5-bit reference sum. |
| `tb_acc_core` | Skewed random FCWs. Every stage of every cycle against an ideal 24-bit accumulator. |
| `tb_post_skewing` | 0/1/2-cycle alignment of the top three stages. |
| `tb_cml_dff4`, `tb_cmos_dff4`, `tb_hybrid_ff4` | Register, load-enable and LD-and-HD loading. |
| `tb_lsg_register` | D and H in both clock halves. H is 3 half-cycles wide and leads D. |
| `tb_load_signal_generator` | LD/HD of all six stages in both clock halves, for a random `load` stream. |
| `tb_pre_skewing` | Each slice changes exactly at edge *t+2+i* and holds otherwise. |
| `tb_pacc_top` | End to end at the default sizes, against the closed-form reference above. |

`tb_pacc_top` runs:

* the latency check from rest, where the phase must first change at edge *t+8*;
* the three frequency steps FCW = 010000h, 050000h and 710000h, each held 500
  cycles (100 ns at 5 GHz). The output wraps 1, 10 and 217 times, as expected
  for about 19.5 MHz, 97.7 MHz and 2.21 GHz;
* 300 random updates at one every 8 cycles;
* 300 random updates at the minimum spacing of 6 cycles.

It counts each mechanism: `load` events, LD pulses of every stage, HD
half-cycle leads, carries across every stage boundary, phase wrap-arounds and
idle pre-skewing cycles. It fails if any count is zero. It finishes in a few
seconds.

To run a testbench with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/pacc_pkg.sv tb/tb_pacc_top.sv --top-module tb_pacc_top -o sim
./obj_dir/sim
```

Replace `tb_pacc_top` with the name of any other testbench.
