# 64-point radix-4 FFT processor

This is a small, memory-based FFT engine. It computes the 64-point discrete
Fourier transform

    X(k) = sum_{n=0..63} x(n) W64^(kn),   W64 = exp(-j 2 pi / 64)

of 64 real 10-bit samples. A 64-point transform factors as three radix-4
stages of 16 butterflies each. So the engine has a single 4-point DFT unit
and runs it 48 times over one 64-word RAM, with all results written back in
place. It has three phase-factor multipliers, which are serial
shift-and-add units. The 4-point DFT itself needs no multiplier at all: it is
a network of adders, negators and part-swaps. A radix-4 butterfly needs three
complex multiplications and twelve complex additions. A radix-2 design does
the same work in twice as many stages.

The architecture follows a published 0.35 µm CMOS processor, a 100 MHz design
that takes 18.87 µs per transform. That design is a full-custom chip. This
RTL keeps its block structure, its word widths and its latch pipeline, and
fills in the parts the original leaves open. Those are listed under
[Departures and open points](#departures-and-open-points).

## Blocks

```
            in_data ──► IB ──┐                   ┌──► OB ──► out_data
                             ▼                   │
                   ┌──── RAM 64 x 54 ────────────┤  (RAM output bus)
  OL bus ─────────►│  (din mux: IB or OL bus)    │
     ▲             └─────────────────────────────┤
     │                                           ▼
     │   ┌──────────────── dft4_proc ─────────────────────────────┐
     │   │ IL0 ─► ML0 (latch) ───────────────► NL0 ─┐             │
     │   │ IL1 ─► ML1 ─ × W-ROM 1 (W^2q) ──────► NL1 ─┤  COU ─► OL0..OL3 ──┘
     │   │ IL2 ─► ML2 ─ × W-ROM 2 (W^q)  ──────► NL2 ─┤             │
     │   │ IL3 ─► ML3 ─ × W-ROM 3 (W^3q) ──────► NL3 ─┘             │
     │   └────────────────────────────────────────────────────────┘
     └── fft_ctrl: RAM address and W/R, IL loads, xfer, OL output enables,
                   W-ROM address, IB/OB loads
```

| module | role |
|---|---|
| `fft64_top` | the processor: controller, RAM, 4-point DFT processor, IB input latch, OB output buffer |
| `fft_ctrl` | sequencing: loading, the 48-butterfly schedule, readout |
| `sram` | 64 x 54-bit single-port RAM, synchronous write, asynchronous read |
| `dft4_proc` | IL / ML / NL / OL latch pipeline around three complex multipliers and the COU |
| `w_rom` | 16 x 22-bit phase-factor ROM (three instances) |
| `complex_mult` | complex data x phase factor with four serial multipliers |
| `serial_mult` | 26 x 10-bit shift-and-add multiplier |
| `cou` | combinational 4-point DFT (the "combinational operating unit") |
| `mul_j` | multiply by -j or +j |
| `cplx_add`, `cplx_neg` | complex add / negate, pairs of the two below |
| `ripple_adder` | 27-bit ripple-carry adder of `full_adder` cells |
| `twos_comp` | negation: invert, then add 1 |
| `latch_reg`, `ol_latch` | data latches; the OL latch adds an output enable for the shared bus |
| `fft_pkg` | widths, `cplx_t` (complex word) and `tw_t` (phase factor) types |

## Number formats

* **Input** `in_data`: a 10-bit two's complement integer, -512..511, real.
  IB holds the sample. It enters the RAM as re = sample·1024 and im = 0.
* **Data word** (`cplx_t`, 54 bits = one RAM row): `{re, im}`, each 27-bit
  two's complement with 10 fraction bits, so 17 integer bits including the
  sign. The width comes from the worst case X(0) = sum of 64 full-scale
  samples, which needs 16 bits plus a sign. The fraction bits keep the
  products of the phase-factor multiplications. No scaling happens anywhere,
  so `out_data` is the unscaled DFT. The largest intermediate part is
  64·512·√2 ≈ 46 341, which is below 2^16. Nothing overflows for any input.
* **Phase factor** (`tw_t`, 22 bits = one ROM word): `{re_s, re_m, im_s,
  im_m}`. Each part is a sign bit plus a 10-bit magnitude, with 1.0 = 512.
  This sign-magnitude form matches the serial multipliers, which multiply
  magnitudes and take the product's sign as the xor of the operand signs. It
  also makes W = 1 and W = -j exact.

## How a transform runs

1. **Load.** Each accepted sample is latched in IB. One cycle later it is
   written to the RAM at the *base-4 digit-reversed* address of its index. For
   n = (d2 d1 d0) in base 4 the address is (d0 d1 d2). This reordering is what
   lets the in-place decimation-in-time stages leave X(k) at address k.
2. **48 butterflies.** Stage s = 0, 1, 2 has span S = 1, 4, 16. Butterfly j of
   a stage uses the four words at `b + q + l·S`, l = 0..3, where q = j mod S and
   b = (j div S)·4S. With F(l) the word at offset l·S, it computes

       X(p) = sum_l  W64^(l·q·16/S) F(l) (-j)^(lp),   p = 0..3

   and writes X(p) back to the address of F(p).
3. **Readout.** Addresses 0..63 are read in order into OB. `out_valid` and
   `out_index` = k follow one cycle after each read.

### Lane order and phase factors

The four lanes of the 4-point unit carry F(0), F(2), F(1), F(3), from lane 0
to lane 3. This order feeds the COU's first rank of adders directly:
(F0, F2) and (F1, F3) are the pairs it combines. So the W-ROM on lane 1
multiplies F(2) and holds W64^(2a). Lane 2's ROM holds W64^(a) and lane 3's
holds W64^(3a). Lane 0 needs no multiplier (W^0 = 1). The ROM address a is
q·16/S:

* stage 0 uses address 0 (all factors 1);
* stage 1 uses addresses 0, 4, 8, 12, the 16-point factors;
* stage 2 uses all sixteen words.

Each ROM computes its words from a 17-entry quarter-wave table
C(k) = round(512·cos(πk/32)), k = 0..16, plus quadrant logic.

### The COU

The 4-point DFT uses only additions, negations and a swap:

    a = x0 + x2     b = x0 - x2     c = x1 + x3     d = x1 - x3
    X0 = a + c      X2 = a - c      X1 = b + (-j)d  X3 = b - (-j)d

Multiplying by -j swaps the parts and negates one: (A + jB)(-j) = B - jA.
Every subtraction is a two's complement negation (invert, add 1) followed
by an addition. In total the COU has eight complex adders, which are sixteen
27-bit ripple adders, and eight 27-bit negators.

## The pipeline and its schedule

This is the part that takes the most care. The 4-point unit is a four-deep
latch pipeline:

| latch group | holds | loaded |
|---|---|---|
| IL0..IL3 | the four RAM words of a butterfly | one per cycle from the RAM output bus |
| ML0..ML3 | the same words, now being multiplied (ML1..3 are the multipliers' shift registers) | on `xfer` |
| NL0..NL3 | the twiddled words, inputs of the COU | on `xfer` |
| OL0..OL3 | the COU outputs X(0..3) | on `xfer` |

A single strobe, `xfer`, advances all of them at once. At that edge ML takes
IL and the multipliers start. NL takes the finished products, and OL takes
the COU outputs computed from the old NL. The multipliers need 26 cycles, so
`xfer` comes once per **slot** of `SLOT_CYCLES` = 28 cycles. Within slot t:

| cycle of slot | RAM | pipeline |
|---|---|---|
| 0..3 | read the four words of butterfly t into IL0..IL3 | multipliers working on butterfly t-1 |
| 4..7 | write OL0..OL3 (butterfly t-3) back, one OL driving the bus per cycle | NL holds t-2 |
| 8..26 | idle | multipliers finish |
| 27 | idle | `xfer` |

The RAM has a single port, so a butterfly costs 8 RAM cycles. The other 20
cycles of a slot are there for the serial multipliers. A butterfly is read in
slot t and written back in slot t+3, so 51 slots cover all 48 butterflies.
The pipeline does not stall or flush between stages. This is safe because no
butterfly needs a word that is still in the pipeline: the closest dependency
is four butterflies back. For example, stage 2's butterfly 2 reads word 50,
and stage 1's butterfly 14 writes it. Changing the address order or making
the pipeline deeper would break this; `tb_fft64_top` would catch it.

**Cycle count per transform** (default parameters):
65 (load) + 51·28 (compute) + 64 (readout) = **1557 cycles**, from the first
accepted sample to the last result. That is 15.57 µs at 100 MHz, compared
with the original's 18.87 µs. The general formula is
65 + 51·SLOT_CYCLES + 64. `SLOT_CYCLES` must be at least 28, which is the
multipliers' 26 cycles plus margin. An elaboration-time assertion checks
this.

**Timing paths.** The COU and the sign/sum stage of the complex multipliers
feed latches that load only on `xfer`. Their inputs are stable for a whole
slot, so these are 28-cycle multicycle paths. Each holds several 27-bit
ripple carries in series. The single-cycle paths are the serial multipliers'
11-bit adders, the controller, and the RAM read into IL.

## Interface (`fft64_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous reset, active low |
| `in_valid` | in | 1 | `in_data` holds a sample; the first one starts a transform |
| `in_data` | in | 10 | signed sample x(n), n counted from the start |
| `busy` | out | 1 | high from the first sample until the last result |
| `out_valid` | out | 1 | `out_data` holds X(`out_index`) |
| `out_index` | out | 6 | k, 0..63 in order |
| `out_data` | out | 54 | {re, im} of X(k), 27-bit two's complement each, 10 fraction bits |

Samples may arrive with gaps. The engine takes 64 and ignores any `in_valid`
after that until the transform is done. Results come out on 64 consecutive
cycles. A new transform can start once `busy` is low.

## Precision

Errors come from two sources: the 10-bit phase factors (rounded to 1/512)
and the truncation of each product toward zero, which is done on
magnitudes. An impulse input gives exact results. The end-to-end test sees
a worst error of about 5 units for a full-scale cosine, and about 3 units for
random full-range input, against values up to 32 768.

## Departures and open points

Taken from the original: the three-block structure (memory, 4-point DFT
processor, controller); the 64 x 54-bit RAM with one W/R line; the 10-bit
input and 54-bit output words; the 27-bit data parts with 10 fraction bits;
three 16 x 22-bit W-ROMs with the lane order F0, F2, F1, F3; the COU built
from sixteen 27-bit adders and eight two's complement circuits; the -j
multiplier as a swap plus a negation; the shift-and-add multiplier with N, M
and Q registers and 26-bit data shift registers; the IB, IL, ML, NL, OL and OB
latches with IL→ML→NL→OL overlap; tri-state-style OL latches sharing the bus
back to the RAM; 48 butterfly passes.

Chosen here, because the original does not say:

* **Phase-factor format.** Sign-magnitude with 1.0 = 512. Products are
  truncated toward zero.
* **Complex multiplier.** Four real serial multipliers working in parallel,
  26 cycles per complex product.
* **Schedule.** The slot schedule and `SLOT_CYCLES` = 28. The original gives
  only the 18.87 µs total, and this design is faster at 15.57 µs.
* **Data order.** The base-4 digit-reversed write at load time.
* **Input.** Real input only: the imaginary part is set to 0.
* **I/O ports.** The external bus is split into separate input and output
  ports with valid strobes.
* **Latches.** These are edge-triggered registers with load enables. The
  original builds level-sensitive latches from clocked inverters.
* **Tri-state bus.** The tri-state OL outputs become AND-gated outputs that
  are OR-ed onto the bus. An assertion checks that at most one OL drives it.
* **RAM.** Asynchronous read and synchronous write.

Not described as RTL: the transistor-level cells of the original, namely the
complementary pass-transistor full adder (its logic function is
`full_adder`) and the clocked inverter that its latches are built from.
Clock rate, area and power figures belong to the original's silicon and are
not claimed here.

## Verification

Every module in the table has a self-checking testbench in `tb/`, named
`tb_<module>`. Each prints `TB_RESULT checks=N failures=M` and has a
watchdog.

* `tb_fft64_top` runs four transforms back to back at default parameters:
  an impulse, a full-scale negative constant, a cosine at bin 5 and random
  samples. It compares all 64 results of each with a double-precision DFT,
  with a tolerance of 0.1 % of sum|x| plus 2 units. The impulse must be
  exact. Every result must also equal, bit for bit, a fixed-point model of
  the algorithm (rounded phase factors, truncated products) written in the
  testbench. It also checks the 1557-cycle transform time and the output order.
  It counts that reads and write-backs overlap running multiplications, that
  `xfer` fires 51 times per transform, that input writes are digit-reversed,
  and that negative words travel on the OL bus.
* `tb_fft_ctrl` checks the controller cycle by cycle against an
  independently written schedule.
* `tb_dft4_proc` drives the pipeline as the controller does. It compares
  each butterfly with a floating-point radix-4 butterfly that uses rounded
  phase factors.
* The arithmetic blocks are checked against integer arithmetic, and the
  W-ROMs against `$cos`/`$sin`.

## Simulating

All files are plain SystemVerilog-2017. `fft_pkg.sv` must come first. For
example, with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/fft_pkg.sv tb/tb_fft64_top.sv \
        --top-module tb_fft64_top
    ./obj_dir/Vtb_fft64_top

Any other testbench works the same way. `-Irtl` lets Verilator find each
module in `rtl/<module>.sv`. To change the slot length, override
`SLOT_CYCLES` on `fft64_top` (at least 28) and adjust `T` in the testbench.
The transform length, word widths and ROM contents are fixed by `fft_pkg` and
the 64-point schedule in `fft_ctrl`.
