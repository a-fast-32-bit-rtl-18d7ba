# CVP — a 32-bit complex vector processing engine

Sonar and radar signal processing spends most of its time on long vectors of
complex numbers: FFT butterflies, FIR filters, correlations, windowing,
modulus extraction. A general-purpose DSP works through these one real
operation at a time. The Complex Vector Processor (CVP) instead does one full
32 x 32-bit **complex** multiply every clock. Its four 40-bit complex
accumulators each take their own operation every clock, and it has separate
busses for data, coefficients and results, so it never waits for memory.

This repository holds synthesizable SystemVerilog for three things:

* the **CVP device** (`cvp`), the multiply-accumulate engine itself;
* a **single-CVP node board** (`cvp_node`), a self-scheduling processor
  for a signal-flow network, with input/output queues, scratch memory, a
  64K x 144-bit micro-code store, a process hash table and a scheduler;
* a **four-CVP systolic board** (`cvp_systolic`), a pipeline of four CVPs
  joined by double-banked memories, for streaming transforms such as a
  pipelined radix-4 FFT.

`cvp_system` places the two boards side by side. They share no signals.

The structure follows the published description of the CVP and its boards.
That description covers the block structure, the bus and accumulator
widths, the four-stage product pipeline, the accumulator operation set, the
64K x 144 control store and the scheduling rule. Everything it leaves open
was chosen here and is listed in [Design choices](#design-choices-and-departures).
This includes control encodings, rounding, the modulus algorithm, memory
sizes, micro-instruction layout and header format.

---

## 1. The CVP device

```
 A,B (data)  ──┐
 C,D (coeff) ──┼─► pin registers ─► complex multiplier ─► P1 ─► P2 ─► P3 ─► P4
 controls    ──┘                    (3 stages, 33 bits)   │     │     │     │
                                                          ▼     ▼     ▼     ▼
                                                          W     X     Y     Z   40-bit complex
                                                          └─────┴──┬──┴─────┘   accumulators
                                                                   ▼
                          selection & gain (40 → 32 bits) ─► modulus ─► ZR, ZI
                                                                │
                                                                └─► exponent ─► gain monitor ─► MAX
```

| unit | module | what it does |
|---|---|---|
| complex multiplier | `cvp_cmul` | `(A + jB)(C + jD)`, or two real products `A*C`, `B*D`. Fractional (Q1.31) or integer. 33-bit result, 3 pipeline stages |
| product pipeline | `cvp_tap_pipe` | 4 registers. Stage k's output feeds accumulator k |
| accumulators W, X, Y, Z | `cvp_cacc` | 40-bit complex register updated by one of 18 operations per clock |
| selection & gain | `cvp_select_gain` | picks one accumulator, shifts right by 0–15, saturates to 32 bits |
| modulus extraction | `cvp_modulus` | passes the value, or its modulus, or the absolute values of both channels. Also reports a 4-bit exponent |
| gain monitor | `cvp_gain_monitor` | largest exponent since the last clear (MAX), for block floating point |

### 1.1 Accumulator operations

`t` is the value arriving from the pipeline, `s` the accumulator's previous
value, and `S` its new value.

| group | operations |
|---|---|
| clear / hold | `S = 0`, `S = s` |
| load | `S = t`, `j t`, `conj t`, `j conj t` |
| negated load | `S = -t`, `-j t`, `-conj t`, `-j conj t` |
| add | `S = s + t`, `s + j t`, `s + conj t`, `s + j conj t` |
| subtract | `S = s - t`, `s - j t`, `s - conj t`, `s - j conj t` |

Multiplying by ±j only swaps the real and imaginary parts and negates one
of them, so all 18 operations cost one adder per component. Their encoding
is `cvp_pkg::acc_op_e`. The 33-bit input is sign-extended, and sums wrap
modulo 2^40.

### 1.2 Why the pipeline has taps: four accumulators, one product stream

This is the key to the CVP and the least obvious part of it.

The multiplier makes **one** product per clock. Accumulator W sees each
product one clock after it leaves the multiplier, X two clocks after, Y
three, and Z four. Each accumulator takes its own operation code, so the
four accumulators build four **different** linear combinations of the
**same** product sequence, each delayed by one clock from the one before.

A radix-4 decimation-in-time butterfly shows this well. With products
`t_q = x_q * w_q` (q = 0..3, `w_q` the twiddles), its four outputs are

```
y_k = sum over q of (-j)^(q*k) * t_q
```

The factors (-j)^(q k) are exactly what the accumulator operations provide:

| q \ k | W (y0) | X (y1) | Y (y2) | Z (y3) |
|---|---|---|---|---|
| 0 | load | load | load | load |
| 1 | add | subj | sub | addj |
| 2 | add | sub | add | sub |
| 3 | add | addj | sub | subj |

`subj` is `S = s - j t` and `addj` is `S = s + j t`. The generator
`bfly_op` in `tb/cvp_prog_pkg.sv` builds this table.

Because the accumulators are staggered by one clock, W completes
y0 in one clock, X completes y1 in the next, then Y and Z. In each of those
clocks the selection stage reads the accumulator that has just completed.
The next butterfly's `load` then overwrites it. The result is a sustained
rate of **one complex product in and one butterfly output out per clock**.
A 1024-point radix-4 FFT takes 5 passes x 256 butterflies x 4 clocks =
5120 clocks. `tb/tb_cvp.sv` streams 16 butterflies back to back and checks
the one-output-per-clock rate and the latency. A radix-2 butterfly works the
same way with two products. `a` enters with coefficient 1 and `w*b` enters
one clock later. X does `load`, then `add`, to form `a + w*b`. Z does `load`,
then `sub`, to form `a - w*b`. The testbench checks one of these as well.

### 1.3 Timing

All inputs are registered at the pins, controls included. Controls are
*horizontal*: each group acts on its unit in the clock after it is
registered. Software (micro-code) must schedule each control against the
pipeline. For data and coefficients presented in cycle *n*:

| event | cycle |
|---|---|
| product on tap k (k = 0 W … 3 Z) | n + 5 + k |
| accumulator k's operation must be presented | n + 4 + k |
| accumulator k holds the result | from n + 6 + k |
| selection presented in cycle m reads the accumulators of | m + 1 |
| that value is on ZR/ZI | m + 3 |
| MAX includes it | m + 4 |

So a single product reaches ZR/ZI 11 clocks after its operands. ZR and ZI
are tri-state on a real device, with active-low enables ENRB/ENIB. Here
the data and an active-high enable (`zr_oe`, `zi_oe`) are separate
outputs.

### 1.4 Arithmetic

* Fractional mode: operands are Q1.31. The exact 65-bit sum of products is
  shifted right by 31 (truncation) to a Q2.31 product. Integer mode keeps
  the exact value. Both saturate to 33 bits.
* The accumulators line Q2.31 up with their low bits, which leaves 7 guard
  bits.
* Selection and gain shifts right arithmetically by `shift` and saturates to
  32 bits. A shift of k divides by 2^k, which is the scaling step of block
  floating point.
* The modulus is `15/16·max(|re|,|im|) + 15/32·min(|re|,|im|)`, which is
  within about 6 % of the true modulus.
* The exponent sent to the gain monitor is `min(15, max(0, L − 16))`, with
  L the bit length of the larger output component. Software reads MAX after
  an FFT pass and picks the next pass's shift from it.

---

## 2. Single-CVP node board (`cvp_node`)

```
 in_wr ─► input queue ─┬─► A/B ─► CVP ─► ZR/ZI ─┬─► output queue ─► out_rd
              │ head    └── scratch RAM ◄────────┘         ▲
              ▼ tag                                        │ header (tag replaced)
        hash table & tag modify ─► start address ─► control store ─► micro-word
              ▲                                           (64K x 144)
     scheduler: data available? space available? ─────────┘
```

**Blocks and headers.** Every data block in the input queue starts with a
header word. Its low 8 bits (`re[7:0]`) are the channel tag. The hash
table (`cvp_hash_table`) maps the tag to four values:

* the start address of the process's micro-code;
* the number of input words the process consumes;
* the number of output words it produces;
* a new tag for the output header.

**Scheduling** (`cvp_scheduler`). The scheduler looks at the header at the
head of the input queue without consuming it. It starts the process only
when two conditions hold:

* the whole block is in the input queue (`wait_data` shows it is not);
* the output queue has room for the whole result (`wait_space` shows it
  has not).

In that clock it pops the header, writes the modified header to the output
queue and presents the start address to the control store. Then it issues
one micro-word per clock until a word with `last` set. A process that has
started never stalls. The host can rewrite the hash table and the control
store at any time.

**Micro-instruction** (`cvp_node_pkg::uword_t`, 134 of 144 bits used):

| field | bits | meaning |
|---|---|---|
| `coef_re`, `coef_im` | 64 | coefficient for the C/D busses |
| `mul` | 2 | integer mode, dual real |
| `acc_op[3:0]` | 20 | operation for W, X, Y, Z |
| `modc` | 10 | accumulator select, shift, modulus mode, gain monitor enable/clear |
| `src` | 2 | A/B source: zero, input queue head, scratch read port |
| `iq_pop` | 1 | consume the input queue head |
| `scr_raddr`, `scr_waddr`, `scr_we` | 33 | scratch read address, write address and write enable. Written data is ZR/ZI |
| `oq_push` | 1 | write ZR/ZI to the output queue |
| `last` | 1 | end of process |

Micro-code must allow for the CVP's latency: a result is written 11 clocks
after its operands are read. `tb/cvp_prog_pkg.sv` has two generators:

* `prog_weight`: complex weighting with an optional modulus;
* `prog_bfly`: stages a block in scratch memory, then runs radix-4
  butterflies from it.

Use them as worked examples.

## 3. Four-node systolic board (`cvp_systolic`)

The board is a chain: input memory → CVP 0 → memory → CVP 1 → memory →
CVP 2 → memory → CVP 3 → output memory. Every memory is double banked
(`cvp_dbank`): the upstream CVP writes one bank while the downstream CVP
reads the other.

One control store holds a *frame program*. Each word has four node fields,
each with its own coefficient, CVP controls, read address and
write-address/enable. The program repeats. At its `last` word, every
memory swaps banks and `frame_tick` pulses. A frame therefore moves one
node further along each frame period, and all four CVPs work at once on
different frames. A frame written into the input memory in period p can be
read from the output memory in period p + 5.

Rule for frame programs: end with at least 11 words that start no new
writes, so that results still in a CVP's pipeline land in the bank they
belong to.

## 4. Performance against the original figures

| workload | original figure | this RTL (clock counts) |
|---|---|---|
| 1024-point FFT, window and modulus, one CVP | 205 µs at 25 MHz (≈5125 clocks) | 6213 clocks measured (249 µs at 25 MHz): a 1033-clock window pass plus 5 radix-4 passes of 1036 clocks |
| 1024-point correlation, one CVP | 41 µs | 1024 + 11 clocks |
| 256-point FFT, systolic board | ≈ 8 µs per frame | 268 clocks per frame (10.7 µs at 25 MHz, 8 µs at ≈33 MHz) |
| 4K-point FFT, two cascaded systolic boards | 128 µs | 4108 clocks per frame (128 µs needs ≈32 MHz) |

`tb_cvp_node_fft` runs the full 1024-point transform on a node with default
sizes. It checks every output bin against a double-precision DFT, both as
complex values and as moduli. The design takes 20 % longer than the original
figure because of one extra pass. The input queue delivers words in arrival
order, so a separate first pass applies the window and stores the samples in
digit-reversed order. The original probably folded the window into the first
butterfly pass. `tb_cvp_systolic_fft` streams windowed 256-point FFT frames
through the systolic board at its default sizes, one radix-4 stage per CVP,
and checks every bin. It measures 268 clocks per frame.
`tb_cvp_systolic_fft4k` chains two boards into the eight-stage 4K pipeline:
an input node, six radix-4 nodes and a modulus output node. The testbench
itself copies one board's output memory into the next board's input memory,
which stands in for the link between the boards. It checks every modulus.
The correlation row is worked out from clock counts, not simulated.

## 5. Design choices and departures

Taken from the original description: the bus widths (32-bit inputs and
outputs, 33-bit products, 40-bit accumulators, 4-bit MAX); the three-stage
multiplier; the four-stage tapped pipeline feeding W/X/Y/Z; the 18
accumulator operations; the registered pins; the block structure of both
boards; the 64K x 144 control store; and the rule that a process starts
only when input data and output space are both available.

This design's own choices:

* control encodings and the control timing of §1.3;
* truncation and saturation rules; wrap-around in the accumulators;
* the modulus estimate, the exponent definition, and the gain monitor's
  clear and enable inputs;
* queue, scratch and bank depths (4096 words); hash table size (256);
  frame program depth (8192);
* the micro-instruction and frame-word layouts, and coefficients carried in
  the micro-word;
* the header format (tag in the low 8 bits) and the tag replacement rule;
* straight-line sequencing (no branches).

Not modelled:

* the device's test logic, whose function is not known;
* the tri-state pads;
* the asynchronous clocking of the queues (one clock is used throughout);
* video-DRAM timing of the control store;
* the host processor (an 80286, outside the boards), which appears here as
  write ports;
* the logic that links two systolic boards, which the 4K testbench models
  as a word-by-word copy between memories.

## 6. Files and simulation

`rtl/` holds one module or package per file:

* packages: `cvp_pkg` (device types), `cvp_node_pkg` (board types);
* device: `cvp` and its units;
* node board: `cvp_node`, `cvp_queue`, `cvp_scratch`, `cvp_wcs`,
  `cvp_hash_table`, `cvp_scheduler`;
* systolic board: `cvp_systolic`, `cvp_dbank`;
* `cvp_system`, which holds both boards.

`tb/` has a self-checking testbench per module (`tb_<module>.sv`) and
the helper package `cvp_prog_pkg.sv`. Each testbench prints
`TB_RESULT checks=N failures=M`. `tb_cvp_system` runs both boards at full
default size and counts every mechanism: waiting for data, waiting for
space, dispatch, scratch traffic, modulus, butterflies and frame swaps.
`tb_cvp_node_fft` generates a windowed 1024-point radix-4 FFT program.
It runs the program on a default-size node and checks every bin.
`tb_cvp_systolic_fft` does the same for a streaming 256-point FFT on the
systolic board. `tb_cvp_systolic_fft4k` does it for a 4096-point FFT on two
cascaded boards.

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/cvp_pkg.sv rtl/cvp_node_pkg.sv tb/cvp_prog_pkg.sv tb/tb_cvp_system.sv \
  --top-module tb_cvp_system -o sim
./obj_dir/sim
```

Use the same command with another `tb_*.sv` and `--top-module`.
`verilator --lint-only -Wall` accepts every file; the remaining warnings
are for unused bits, such as the top bits of wide saturation
intermediates, the spare micro-word bits and the disabled output enables on
the boards.
