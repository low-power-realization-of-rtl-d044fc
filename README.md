# Low-power FIR filter in a residue number system

This is an N-tap FIR filter,

    y[n] = sum_{i=0}^{N-1} A[i] * x[n-i],

computed in a **residue number system (RNS)**. Each sample and each
coefficient becomes a set of small residues, one for each of K pairwise
prime moduli. The filter then runs as K independent narrow filters, one
per modulus. Every modulus channel has modulo multiply-accumulate (MAC)
units, and their multiplier and adder are small look-up tables. A
Chinese-remainder converter joins the K channel results into a binary
output.

On top of this base structure the design has six low-power measures.
All of them are in the RTL:

| Measure | What it saves | Where |
|---|---|---|
| Circular data pointer | samples are never shifted through the memory | `data_addr_gen` |
| Parallel processing, P MAC units per modulus | N/P cycles per output, so clock and supply can be lowered at the same throughput | `mod_fir`, `P` |
| Gray-coded coefficient address | about half the address-bus toggles | `coef_addr_gen` |
| Gray-coded data memory address | fewer data-address-bus toggles | `DATA_GRAY`, `data_addr_gen`, `switching_matrix` |
| Coefficient encoding | the code word of each residue is freely chosen to cut coefficient-bus toggles | `CODES`, `mod_mult`, `mod_fir` |
| Coefficient ordering | taps stored in any order, data follows them | `coef_tap`, `switching_matrix` |

The default configuration is a 16-tap filter with moduli {5, 7} and two
MAC units per modulus.

## What the output means

The filter computes exactly, but **modulo the dynamic range**
MR = m1 · m2 · … · mK. `y` is the unsigned representative in [0, MR).
If the true result fits in the signed range [−MR/2, MR/2), read values of
MR/2 and above as `y − MR`.

With the default moduli {5, 7}, MR = 35. That is enough to study the
channel hardware, which is where the power-saving measures act. It is far
too small for a real filter with 8-bit samples and coefficients. For one of
those, choose moduli whose product covers the output range.

For example, 16 taps of 8-bit signed values can reach ±16 × 128 × 128 =
±262 144, so MR must be at least 524 288. The set {11, 13, 15, 16, 17}
gives MR = 583 440, with `RW = 5` and `OW = 20`; `tb_rns_fir_wide` runs
exactly this configuration. In general, set:

- `RW` so that 2^RW ≥ the largest modulus;
- `OW` so that 2^OW ≥ MR;
- moduli up to 32 (`rns_pkg::MAX_M`).

The moduli must be pairwise prime. Elaboration stops with an error if
`RW` or `OW` is too small.

## Structure

```
             coef_val ──► bin2rns ──┐ (residues, encoded per channel)
                                    ▼
 coef_step ─► gray ─► ┌─ mod_fir (mod m1) ─────────────────────────┐
                      │  coef_mem  [rows × P code words]           │
 coef_addr_gen ──────►│     │ P code words                         │
 (Gray counter)       │     ▼                                      │
                      │  mod_mac × P ──► mod_add chain ──► y_res[0]├─┐
 switching_matrix ───►│     ▲                                      │ │
 (tap table,          │     │ P sample residues                    │ │
  head − tap)         │  data_mem  [N residues, circular]          │ │
                      └────────────────────────────────────────────┘ │
 x ─► bin2rns ─► (one residue per channel)   ... mod_fir (mod mK) ───┤
                                                                     ▼
 data_addr_gen (head pointer)    fir_ctrl (sequencer)        rns2bin (CRT) ─► y
```

All K channels share the address generators, the switching matrix and the
controller. Each channel holds only its own memories, its MAC units and
its merge adder.

### The modulo MAC (`mod_mac`, `mod_mult`, `mod_add`)

A MAC is made of three parts:

- a multiplier table that gives Z = A·X mod M;
- an adder table that gives Z + ACC mod M;
- the ACC register, whose output feeds back to the adder.

On the first step of an output the adder adds 0 instead of ACC. This
starts a new sum without a separate clear cycle.

Both tables are built at elaboration by constant functions. The
multiplier table is indexed by {coefficient code word, data residue}. For
M = 3 with binary codes, it is the classic nine-row modulo-3 table:
(1,2)→2, (2,2)→1, and so on.

### Coefficient encoding

Coefficient residues only ever feed the multiplier tables, so they do not
have to be stored in binary. `CODES[k][r]` is the code word stored for
residue r in channel k. Only its low `RW` bits are used. The multiplier
table of the channel is built for that code, so any one-to-one code works.
Elaboration checks that the code is one-to-one.

Each channel can use a different code. For example, residue 0 could be
`010` for modulus 5 and `100` for modulus 7. The useful code is the one
that minimises the sum, over consecutive stored coefficients, of
Hamming distance × frequency. Finding it is an offline optimisation, like
FSM state assignment, and the default is plain binary.

Coefficients are loaded in binary. The load path converts them to
residues and encodes them, so the memory and the buses only ever hold
code words.

### Coefficient ordering and the switching matrix

Modulo addition is commutative and associative, so the taps can be fed to
the MACs in any order. Storing them in an order where consecutive code
words are close cuts toggling on the coefficient bus.

The data must then be read in the same order. `switching_matrix` holds,
for every coefficient slot, the tap index i stored there. It turns that
index into the data address of x[n−i]: (head − i) mod N. The table is
loaded with the coefficients (`coef_tap`) and read with the same row
address as the coefficient memory.

The testbench orders the taps with a greedy nearest-neighbour search on
the code words. For its 16-tap windowed-sinc low-pass filter, this cut the
coefficient-bus toggles per output as follows:

| Configuration | Natural order | Greedy order |
|---|---|---|
| Default | 36.2 | 13.9 |
| 12 taps, moduli {3, 5, 7}, encoded | 44.1 | 15.9 |
| 16 taps, moduli {11, 13, 15, 16, 17} | 148.8 | 61.7 |

The toggles are counted over all channels and lanes.

### Measured bus activity

`tb_rns_fir_workload` runs four filters side by side on one input stream.
All four use 16 taps, moduli {5, 7} and one MAC per modulus. The filter is
a windowed-sinc low-pass, A = −1 −1 2 5 −10 −18 35 113 113 35 −18 −10 5 2
−1 −1.

- **Code tables.** The encoded filter's code tables are found at
  elaboration by a pairwise-exchange search that minimises the bit changes
  between successive stored coefficients.
- **Tap order.** The reordered filter uses a greedy chain over the code
  words of both moduli.

Toggles per output:

| Bus | Conventional | Encoded codes | Reordered taps |
|---|---|---|---|
| coefficient data, modulus 5 | 14 | 10 | 6 |
| coefficient data, modulus 7 | 22 | 14 | 10 |

| Bus | Binary | Gray |
|---|---|---|
| data address | 28.1 | 15.0 |
| coefficient address | 30 (binary 0…15 and wrap) | 16 |

The search yields these codes:

- modulus 5: 0→010, 1→001, 2→000, 3→011, 4→100;
- modulus 7: 0→001, 1→011, 2→110, 3→000, 4→100, 5→101, 6→010.

A stronger search, or an order chosen per modulus, can go further.

### Addresses

**Coefficient memory.** The coefficient memory has N/P rows of P words.
MAC step s reads row gray(s), where gray(s) = s ^ (s >> 1). The Gray
counter `coef_addr_gen` produces that address.

The load port takes the binary step number, `coef_step`, and converts it
to the same Gray address. A user only has to think in steps. When N/P is
not a power of two, the rows span the whole 2^⌈log2(N/P)⌉ address space,
and some addresses go unused.

**Data memory.** The data memory is a circular buffer. `head` marks the
newest sample. On each new sample, `head` steps forward and wraps from
N−1 to 0, and the sample is written there over the oldest one.

With `DATA_GRAY` set (the default), logical location j is kept at
physical address gray(j). The pointer and the switching matrix work on
logical locations and convert to Gray only on the way to the memory. Taps
read in natural order then change one data address bit per step, instead
of two or more on average. The data memory spans 2^⌈log2 N⌉ words, so
this also works when N is not a power of two.

Each data memory has P read ports, one per MAC unit. The parallel layout
sometimes drawn for two MAC units stores even and odd samples in two
columns. That layout does not survive a pointer that moves by one place
per sample, so this design uses P read ports instead.

## Timing and interface

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous active-low reset of the controller, pointers and accumulators (not of the memories) |
| `x_valid`, `x_ready`, `x[XW]` | in/out/in | signed input sample; taken on a cycle where both valid and ready are high |
| `y_valid`, `y[OW]` | out | one-cycle strobe; `y` = filter output mod MR |
| `coef_we`, `coef_step`, `coef_lane`, `coef_tap`, `coef_val[CW]` | in | load signed coefficient A[`coef_tap`] into MAC step `coef_step`, lane `coef_lane` |

One output goes through this sequence (`fir_ctrl`):

1. **Accept cycle.** The sample's residues are written at the next
   circular location, and the coefficient address goes to step 0.
2. **N/P MAC cycles.** During these, `x_ready` is low and an offered
   sample waits.
3. **The `y_valid` cycle.** `x_ready` is high again, so a waiting sample is
   accepted in this same cycle.

`y_valid` comes N/P + 1 cycles after the accept cycle. A continuous stream
gets one output every N/P + 1 cycles. With the defaults that is 9 cycles,
8 of them MAC cycles.

Loading coefficients has these rules:

- Load them while no output is being computed. An assertion checks this.
- Write each of the N slots (step, lane) once, with every tap appearing
  exactly once.
- Outputs are meaningful once N samples have entered, because the data
  memory is not reset. To start clean, send N zeros first.

## Parameters (`rns_fir`)

| Name | Default | Meaning |
|---|---|---|
| `N` | 16 | taps |
| `P` | 2 | MAC units per modulus; must divide N (P = 1 is the plain one-MAC structure) |
| `K`, `MODULI` | 2, '{5, 7} | moduli set |
| `RW` | 3 | residue / code word width |
| `OW` | 6 | output width |
| `XW`, `CW` | 8, 8 | signed sample and coefficient widths |
| `CODES` | binary for every channel | coefficient code tables, type `rns_pkg::code_row_t [K]` |
| `DATA_GRAY` | 1 | Gray-coded physical data memory addresses |

## Files

`rtl/`:

- `rns_pkg`: shared types and constant functions.
- `rns_fir`: top level.
- `mod_fir`: one modulus channel.
- `mod_mac`, `mod_mult`, `mod_add`: the modulo MAC and its tables.
- `coef_mem`, `data_mem`: the memories.
- `coef_addr_gen`, `data_addr_gen`: the address generators.
- `switching_matrix`: tap order to data address.
- `fir_ctrl`: the sequencer.
- `bin2rns`, `rns2bin`: the converters.

`tb/` has one self-checking testbench per module, `tb_<module>.sv`, plus
four end-to-end tests:

- **`tb_rns_fir_full`** runs the defaults.
- **`tb_rns_fir`** runs N = 12, P = 1, moduli {3, 5, 7}, rotated code
  tables in every channel and binary data addresses.
- **`tb_rns_fir_wide`** runs a dynamic range wide enough for the true
  output, and also checks every output, read as signed, against the exact
  convolution.
- **`tb_rns_fir_workload`** is the bus-activity comparison above. It also
  checks all four filters' outputs.

The first three compare every output with a 64-bit reference
convolution taken modulo MR. They also check that each output arrives
exactly N/P + 1 cycles after its accept. Each one counts how often the
following happened and fails if any count is zero:

- the pointer wrapped;
- the Gray address wrapped;
- the input stalled;
- a sample was accepted in the `y_valid` cycle;
- a coefficient sat in a reordered slot;
- an input sample was negative.

Every testbench prints `TB_RESULT checks=<n> failures=<n>`. To run one
with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/rns_pkg.sv tb/tb_rns_fir_full.sv --top-module tb_rns_fir_full
./obj_dir/Vtb_rns_fir_full
```

Each test runs in well under a second.

## Limits and departures

- **Dynamic range.** The default moduli {5, 7} have a range of only 35
  (see above).
- **Offline parts.** Choosing the code tables, the coefficient order, a
  coefficient scale factor or optimised coefficient values is offline
  work. The hardware accepts any result of that work. The greedy ordering
  in the testbench is only an example.
- **Gray data addresses.** Gray-coding the data addresses only helps when
  taps are read in natural order. After reordering, the data addresses
  follow the tap order, and the Gray layout gives no guarantee.
- **Tables.** The multiplier and adder tables, and the memories, are
  written as arrays. Technology mapping to PLAs or ROMs is left to
  synthesis. The coefficient memory is writable rather than a fixed ROM.
- **Extra cycle.** Writing the sample takes one cycle on top of the N/P
  MAC cycles.
- **Voltage and frequency.** Lowering the supply voltage and the clock,
  which parallel processing makes possible, is outside the RTL.
