# SOC test decompression with retained free variables

The on-chip side of an SOC test compression scheme: compressed test data travels over the
test access mechanism (TAM) in compressed form and is expanded next to each core, and the
free variables a test cube leaves unused are kept for the next one instead of being thrown
away. The architecture follows S. S. Muthyala and N. A. Touba, *SOC Test Compression Scheme
Using Sequential Linear Decompressors with Retained Free Variables*. Sizes, encodings and
everything else that scheme leaves open are choices made here. They are listed below.

## The idea

Test cubes have only a few specified ("care") bits. The tester stores compressed data, and a
*sequential linear decompressor* next to each core expands it. The decompressor is an LFSR
into which the c tester channels are XORed every cycle, followed by an XOR phase shifter into
the scan chains. Every scan cell then holds a GF(2) linear combination of the tester bits.
Those bits are called *free variables*. To encode a test cube, an offline tool solves one linear
equation per care bit.

A solvable system needs more free variables than care bits. Conventional schemes reset the
decompressor for every test cube, so the unused (non-pivot) free variables are thrown away.
This design keeps them, and it needs no extra buffer to do so:

* One tester slice is **broadcast** to the decompressors of all cores. The decompressors of
  several cores (a *core set*) can load the same slices and decompress their test cubes
  together.
* While core set k is being loaded, the decompressors of the next core set k+1 **also load
  the last q slices**, but their cores do not shift. Those decompressors keep their state
  until their own shift phase starts. The free variables of those q slices are therefore
  shared by two test cube sets.
* The offline solver treats the sets of one decompression as one linear system. It creates
  pivots in early free variables first, so that most of the unused ones fall in the last q
  slices.

A *decompression mode* is a list of m = 1, 2 or 3 core sets. Consecutive sets must not share a
core. Set 3 may reuse cores of set 1.

## Block structure

```
 tester slice (C bits) ──┬──────────────┬──────────────┬─────── ... (TAM broadcast)
                         │              │              │
                   ┌─────▼─────┐  ┌─────▼─────┐  ┌─────▼─────┐
                   │seq_lin_   │  │seq_lin_   │  │seq_lin_   │   one per core
         load/clr ─► decomp 0  │  │ decomp 1  │  │ decomp N-1│
                   └─────┬─────┘  └─────┬─────┘  └─────┬─────┘
                         ▼ NCHAINS      ▼              ▼
                     core 0 scan    core 1 scan    core N-1 scan   (outside; ports)
                         ▲ scan_en / capture
                   ┌─────┴──────────────────────────────────────┐
 tester slice ────►│ mode_ctrl: reads the mode, sequences sets  │
                   └────────────────────────────────────────────┘
```

| File | Role |
|---|---|
| `rtl/soc_decomp_pkg.sv` | default sizes, controller state enum, scan-length table function |
| `rtl/seq_lin_decomp.sv` | per-core decompressor: LFSR with channel injection, phase shifter |
| `rtl/mode_ctrl.sv` | generic mode controller: control slices in, per-core strobes out |
| `rtl/soc_decomp_top.sv` | top: controller plus one decompressor per core, slice broadcast |

The cores are not part of the RTL: their wrappers, their scan chains and the compaction of their
responses. The top brings out, per core, the scan-in bits, the shift enable and the capture
strobe.

## One decompression, cycle by cycle

Let L_k be the longest scan length of any core in set k (from the `SCAN_LEN` table). W is
ceil(NCORES / C).

1. **Mode.** This takes 1 + m·W cycles. The first slice carries m in bits [1:0]. Each set then
   follows as W slices with one bit per core: core i is bit i, least significant slice first.
   A slice with m = 0 ends the test (`test_done`).
2. **Set 1 shift.** This takes L_1 cycles. The set-1 decompressors load every slice and the
   set-1 cores shift. The set-1 decompressors are cleared on the first cycle, so the new
   test cube starts from nothing.
3. **Pre-load** (only when m > 1). In the last q of those L_1 cycles, the set-2 decompressors
   load the same slices with shifting disabled. They are cleared on the first of these cycles.
   If q ≥ L_1, pre-loading covers the whole phase.
4. **Capture of set 1.** This takes one cycle. The slice of this cycle is not used.
5. **Set 2 shift.** This takes L_2 cycles and is not cleared: the set-2 decompressors continue
   from the retained state. When m = 3, the set-3 decompressors are pre-loaded in the last q
   cycles, as in step 3. Then set 2 captures.
6. **Set 3** repeats the same pattern. After the last capture, the next mode is read.

A decompression therefore takes `1 + m·W + Σ_k (L_k + 1)` cycles. Every cycle consumes one
slice, including the capture cycles. When `run` is low, everything stalls and no strobe is
issued.

### Cheaper control: the table styles

Sending whole core vectors costs m·W extra slices per decompression, but it works with any
schedule. If a schedule uses only a few distinct modes, they can be stored on chip in
`MODE_TABLE`, which has `NMODES` entries of m plus three core vectors. The `CTRL_STYLE`
parameter selects how a decompression picks its mode:

| `CTRL_STYLE` | control slice | end of test |
|---|---|---|
| `CTRL_GENERIC` (default) | m, then m·W core-vector slices | m = 0 |
| `CTRL_INDEX` | table index in the low ⌈log2 NMODES⌉ bits | the bit above the index set |
| `CTRL_INCREMENT` | bit 0: stay on the current entry (entry 0 after reset) or step to the next | a step past the last entry |

In both table styles the control phase is a single cycle, so a decompression takes
`1 + Σ_k (L_k + 1)` cycles. The increment style expects the schedule to be sorted by mode.
The packaged example table (entry j has m = 1 + j mod 3, and set k holds the cores with
(i + j + 7k) mod 5 = 0) only exists for testing. A real table comes from the test schedule.

Decompressor output timing: a chain's scan-in bit comes from the *next* LFSR state, so it
already depends on the slice of that cycle. The core samples it at the same clock edge that
updates the LFSR. This costs no warm-up cycles, but it makes a combinational path from the
tester pins to the scan inputs.

## The decompressor

`seq_lin_decomp` is a Galois LFSR of `LFSR_LEN` = 64 bits with the primitive polynomial
x^64 + x^4 + x^3 + x + 1. Channel k is XORed into stage ⌊k·64/C⌋ (every 4th stage for 16
channels). Chain j is the XOR of stages 2j mod 64, (5j+17) mod 64 and (11j+40) mod 64. The
third stage is moved up by one until it differs from the first two. `load` low holds the
state, and `clear` (with `load`) replaces the state by the current slice alone. None of this
structure comes from the scheme, which only requires a sequential linear decompressor. Any
other linear one can be put in its place, but then the offline encoder's equations change.

How much a decompressor can retain is bounded by its state. A 64-bit LFSR holds at most 64
independent combinations of free variables. That is why the default q is 4: q·c = 4·16 = 64.

## Sizes

| Parameter | Default | Origin |
|---|---|---|
| `C` tester channels | 16 | the reference experiments |
| `NCORES` | 20 | the 20-core example SOC ("design B") of the reference |
| `NCHAINS` per core | 32 | own choice (uniform across cores) |
| `LFSR_LEN` | 64 | own choice |
| `Q` retained slices | 4 | own choice, q·c = LFSR_LEN |
| `SCAN_LEN[i]` | 60 + (37·i mod 61) | own choice. It gives 56,448 scan cells for 20 × 32 chains; the reference 20-core SOC has 57,923 |
| `MAX_CORES` | 64 | bound on `NCORES` and length of the `SCAN_LEN` table |

The reference experiments also use SOCs with 16, 23, 28 and 34 cores. With `NCORES` = 20, the
16-core one fits and the others need `NCORES` raised, up to 64, together with a matching
`SCAN_LEN` table. The 34-core case is simulated. A full top at default size has about 1,400
flip-flops: 20 × 64 LFSR bits plus the controller.

## Choices made here, and departures

* **Chains per core.** The reference evaluates cores whose chain count was tuned for
  compression and hard cores whose scan structure is fixed. Here every core has `NCHAINS`
  chains of one length, `SCAN_LEN[i]`. Cores that differ need a wrapper or a per-core chain
  parameter, which this RTL does not have.
* **Overlap size.** With q·c = 64, the shared free variables are about 4% of a 90-cycle phase.
  Analyses of the scheme assume an overlap near 10%. Raise `Q` together with `LFSR_LEN` to get
  closer to that.
* **End of test** is an m = 0 slice in the generic style. **Stall** is the `run` input. The scheme assumes the
  tester runs in lockstep.
* **Scan lengths** are a build-time table in the controller. Cores with shorter chains shift
  for the whole phase of their set, so their first bits fall out of the chain.
* **Empty core set**: it gets a one-cycle phase, so the controller never hangs.
* **Overlapping consecutive sets** are illegal (an assertion fires). If they do overlap, the
  set that is shifting takes precedence.
* **Clearing.** A decompressor is cleared on the first cycle it loads in a decompression,
  rather than by a separate reset cycle.
* Encoding (Gauss–Jordan elimination) and test scheduling run offline, not in this RTL.

## Verification

Each testbench checks its results itself and prints `TB_RESULT checks=N failures=M`.

* `tb/tb_seq_lin_decomp.sv` compares the outputs every cycle with a bit-level reference model.
  It checks superposition (out(A) ⊕ out(B) = out(A ⊕ B)), state hold while `load` is low, and
  loss of history on `clear`.
* `tb/tb_mode_ctrl.sv` plays the tester through fixed and random modes with m = 1..3 and random
  stalls. It compares every per-core strobe in every cycle with a schedule derived from the mode
  alone. A second instance with q = 70 covers pre-loading from the first cycle of a phase. It
  also checks the cycle count of every decompression.
* `tb/tb_mode_ctrl_tables.sv` runs the index and increment styles through random and
  repeated table entries. It checks every strobe against the table formula, the cycle counts,
  and both end-of-test rules.
* `tb/tb_soc_decomp_top.sv` runs the top at its default parameters. It models the cores' scan
  chains and keeps a reference decompressor per core. At every capture it compares all chain
  contents of the capturing cores, which checks retention across core sets end to end. It
  counts each mechanism (m = 1/2/3, multi-core sets, pre-load, retained state used, core reuse in
  set 3, stalls, end of test) and fails if any of them never occurs.
* `tb/tb_soc_decomp_34cores.sv` is the same end-to-end test with `NCORES` = 34, the largest
  SOC of the reference experiments. It uses three slices per core vector.

Running one of them with plain Verilator:

```
verilator --binary --timing --assert -Irtl \
  rtl/soc_decomp_pkg.sv rtl/seq_lin_decomp.sv rtl/mode_ctrl.sv rtl/soc_decomp_top.sv \
  tb/tb_soc_decomp_top.sv --top-module tb_soc_decomp_top
./obj_dir/Vtb_soc_decomp_top
```

All five finish in well under a second. The testbenches contain their own copies of the
scan-length formula, LFSR polynomial, injection points and phase-shifter taps. If you change
any of these in the RTL, change the reference models to match.

## Trust and limits

The sequencing (mode format, set order, q-cycle pre-load, clear points, capture cycles, cycle
count) is checked cycle by cycle against independent models. The decompressor is checked
against a reference model and for linearity. Whether the chosen LFSR and phase shifter encode
test cubes well was not evaluated, because that needs the offline encoder and real test cubes.
Compression ratios and test times are therefore not reproduced here.
