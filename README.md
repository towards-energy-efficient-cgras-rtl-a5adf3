# SC-CGRA: a coarse-grained reconfigurable array with stochastic multipliers

A coarse-grained reconfigurable array (CGRA) is a grid of small processing
elements (PEs). Each cycle, every PE runs an operation chosen by a context word.
In this design the exact multiplier of every PE is replaced by a **stochastic-computing
(SC) multiplier**. The operands become parallel bit-streams. A wide AND multiplies the
streams and a parallel counter turns the result back into a number. This is much smaller
and lower-power than an array multiplier, and its accuracy can be raised **without
any mode switch**: two or four neighbouring PEs multiply the same operands against
different parts of one long low-discrepancy sequence, and an adder-shifter averages
their products. Other approximate CGRAs use power gating to switch accuracy, and a
power-gating switch stalls the modulo-scheduled pipeline. Here a higher-accuracy
multiply is only a few extra operations in the data-flow graph.

This RTL implements the architecture from *Towards Energy-Efficient CGRAs via
Stochastic Computing*:

- a 4x4 array of SC-PEs on a mesh-plus interconnect;
- the improved SC multiplier (ISC-MUL) with leading-zero shifting;
- a configuration memory, a data memory and a kernel sequencer.

Where that description is silent, this implementation makes its own choices. They are
marked as such below and in each file's header comment. The compile-time part of the
original work is not hardware and is not included here: the integer-linear-programming
mapper that chooses an accuracy level per multiply.

## The stochastic multiplier (ISC-MUL)

This is the heart of the design and the part that needs the most explanation.
`isc_mul` instantiates `zsas` and `nsc_mul`. `nsc_mul` instantiates two `sng`s and an `apc`.

### Operands as bit-streams

Take an `N = 16`-bit unsigned operand `x` as the fraction `x / 2^16`. A stochastic number
generator (`sng`) compares `x` with `2^M = 32` constant cells `c_0..c_31` at once and
outputs bit `i = (c_i < x)`. The cells are fractions in [0,1). Because they are spread
evenly, the 32-bit stream holds about `32 * x / 2^16` ones. The second operand uses its
own set of cells. AND-ing the two streams gives about `32 * (a/2^16) * (b/2^16)` ones.
The parallel counter (`apc`) counts them. The count is `N_1s`, 0..32.

So `a * b ~= N_1s * 2^(2N - M) = N_1s << 27` (with `L = 2N - M = 27`).

The cells are **fixed**. They are the first 128 points of a Sobol low-discrepancy
sequence, built in as constants, so no storage and no sequence generator is needed.

- Operand `a` uses Sobol dimension 1. Its direction numbers are 1/2, 1/4, 1/8 and so on.
- Operand `b` uses dimension 2. Its polynomial is x+1, with direction integers
  m = 1, 3, 5, 15, 17, 51, 85.
- Points are taken in Gray-code order.

`sc_cgra_pkg::sobol_cell(dim, idx)` computes cell `idx` as a 16-bit fraction, and
elaboration evaluates it into constants. For dimension 1 the cells begin
0, 1/2, 3/4, 1/4, 3/8, …. A comparator whose cell equals the operand outputs 0.

The cells are Sobol points rather than pseudo-random numbers. Any aligned block of 32
points puts exactly one cell in every 1/32 interval, so the ones count of a single
stream is off by at most one.

### Leading-zero shifting (ZSAS)

A small operand is below almost every cell and would lose all its ones. The ZSAS module
("Zeros, Shifter, Adder, Subtractor") prevents this:

1. It counts the leading zeros `S_a` and `S_b` (0..15) of the two magnitudes.
2. It shifts each operand left by its own count, so the top one sits in bit 15.
3. It computes the final shift `S_f = L - (S_a + S_b)`.

The core then outputs `N_1s << S_f`. With N = 16 and M = 5, `S_f` ranges from -3 to 27.
A negative `S_f` means a right shift, and the core supports it. This is an extension:
the original 4-bit example never needs it.

Example with 16-bit operands:

| | a | b |
|---|---|---|
| input | `0x8000` | `0x6000` |
| leading zeros | `S_a = 0` | `S_b = 1` |
| normalised | `0x8000` | `0xC000` |

Here `S_f = 27 - 1 = 26`.

### Signs

The multiplier works on sign and magnitude: `product sign = sign(a) XOR sign(b)`.
Inside the ALU, a 32-bit two's-complement operand gives its sign bit and its magnitude.
The magnitude saturates at `0xFFFF`. The signed product is saturated to 32 bits.

### Accuracy

The testbenches drive random 16-bit operand pairs (1500 to 3000 of them) and measure
the mean relative error. The stream length of a single multiplier is the parameter `M`
of `isc_mul` and `nsc_mul` (2^M cells). The array uses M = 5.
`tb_isc_mul_len` builds the other lengths:

| configuration | this RTL | published figure |
|---|---|---|
| one multiplier, 8 cells (M = 3) | 25.3 % | 24 % |
| one multiplier, 16 cells (M = 4) | 12.7 % | 12 % |
| one PE, 32 cells | 5.3 to 5.4 % | about 5 % |
| one multiplier, 64 cells (M = 6) | 2.7 % | 3.3 % |
| 4 PEs averaged, 128 cells | 1.4 % | 2 % |

The naive multiplier without ZSAS (`nsc_mul` with `S_f = 27`) is far worse for random
operands. The Sobol sequence starts with the cell 0, which is below every nonzero
operand. A tiny product therefore still yields one count, which is worth `2^27`.

## Quality scaling by combining neighbouring PEs

Each PE holds one 32-cell **segment** of the 128-point sequences, for both operands.
PE (r,c) holds segment `2*(r mod 2) + (c mod 2)`. Every 2x2 block of neighbours
therefore holds segments 0..3, which together are the full 128-point sequence.

To make a multiply more accurate, the mapper adds a second multiply of the same
operands on a neighbour and an adder-shifter operation. The adder-shifter is
`OP_ADD` with context bit `shr1`, and it computes `(p1 + p2) >>> 1` on a 33-bit sum,
so the sum cannot overflow. The result is what a 64-cell stream would give. Two levels
of adder-shifters combine four PEs into a 128-cell stream.

The published example: 47 from PE_1 and 49 from PE_2 combine to 48. `tb_sc_alu` checks
this case.

The mesh-plus links bring the shared operands to several PEs (see below). A 96-cell
stream (three PEs) is not supported, because a right shift by one cannot divide by three.

## The processing element (`sc_pe`)

```
 config memory --> context register --+--> operand mux A --+
                                      |                    +--> SC-ALU --> output register --> neighbours
 N S E W N2 S2 E2 W2, register file,  +--> operand mux B --+            \-> register file
 immediate, own output, zero                                            row memory port (LD/ST)
```

Each cycle the **context register** takes this PE's context for the current slot. When
the array is idle it takes a NOP. The PE executes the context in the following cycle.

The context word is `ctx_t` in `sc_cgra_pkg`, 36 bits:

| field | bits | meaning |
|---|---|---|
| `op` | 4 | operation (see below) |
| `shr1` | 1 | adder-shifter: shift the sum right by one |
| `src_a`, `src_b` | 4 each | N, S, E, W, N2, S2, E2, W2, RF, IMM, SELF, ZERO |
| `rf_ra`, `rf_rb` | 2 each | register read address for a source `RF` |
| `rf_we`, `rf_wa` | 1 + 2 | also write the result to the register file |
| `imm` | 16 | immediate operand, sign-extended; also the LD/ST address offset |

Operations:

| operation | result |
|---|---|
| `OP_NOP` | output register held |
| `OP_PASS` | `a` (routing) |
| `OP_ADD` | adder-shifter, `(a+b) >>> shr1` |
| `OP_SUB` | `a - b` |
| `OP_MUL` | ISC-MUL |
| `OP_SHL`, `OP_SHR` | shift `a` by `b[4:0]` (`OP_SHR` is arithmetic) |
| `OP_AND`, `OP_OR`, `OP_XOR` | bitwise logic |
| `OP_LD` | `mem[a + imm]` |
| `OP_ST` | writes `mem[a + imm] = b`; output register held |

- From the original description: SUB, a shifter, the adder-shifter and the ISC-MUL.
  The register file and the context register are also named there.
- This design's own choices: the remaining operations, the source list, the 4-entry
  register file and the LD/ST addressing.

All operations take one cycle. The result is visible to neighbours, and to the PE
itself through `SELF`, in the next cycle.

## Array, interconnect and memories

- **`sc_pe_array`**: a 4x4 array.
  - Each PE reads its four nearest neighbours, plus the four PEs two hops away in the
    same row or column (the "plus" links of a mesh-plus network). A link that leaves
    the array reads 0, and nothing wraps around. The two-hop reach is this design's
    reading of "mesh plus".
  - Each **row shares one memory port**. If two PEs of a row access memory in the same
    cycle, the lowest column wins and `mem_conflict` rises. This is a mapping error,
    and avoiding it is the mapper's job.
- **`config_mem`**: 16 slots × 16 PE contexts, cleared to NOP by reset. The host writes
  one context at a time, and the array reads a whole slot asynchronously.
- **`data_mem`**: 1024 × 32-bit words, with one port per row plus a host port.
  - Reads are asynchronous, so a load completes in its execute cycle.
  - If several ports write one word in the same cycle, the highest row wins and the
    host beats all rows.
  - It is a plain register array. A real implementation would bank it into SRAM
    macros; the original names the memory but gives no organisation.
- **`host_ctrl`**: the kernel sequencer. On `start` it issues context slots
  `0, 1, …, ii-1, 0, 1, …` for `n_cycles` cycles, with `ctx_valid` high. After one
  drain cycle it pulses `done`. The original only names a host controller, so the
  handshake is this design's own.

## Using the top level (`sc_cgra`)

1. Hold `rst_n` low, then release it.
2. Load contexts: for each, drive `cfg_we`, `cfg_slot`, `cfg_pe` (PE index `r*4 + c`) and
   `cfg_wdata` for one cycle.
3. Load data through `dm_we`, `dm_addr` and `dm_wdata`. The host port reads
   asynchronously through `dm_rdata`.
4. Pulse `start` with `ii` (number of slots, 1..16) and `n_cycles`.
5. `busy` is high for `n_cycles + 1` cycles. `done` pulses `n_cycles + 2` cycles after
   the cycle in which `start` was sampled.
6. Read the results.

The host must not write either memory while `busy` is high; an assertion checks this.
`pe_out` exposes the 16 output registers for observation.

Timing inside a run: the slot issued in cycle t is latched at the end of t and executed
in t+1. Its results are visible from t+2. Because every slot is delayed by the same
cycle, a schedule can be written as if slot s executed in cycle s.

### Example kernel

`tb/tb_sc_cgra.sv` runs `y[k] = a[k]*b[k]` over 64 elements. Each product is made
more accurate by combining two PEs, and the loop is modulo-scheduled with II = 4:

| slot | PE(0,1) | PE(1,0) | PE(0,0) | PE(1,1) | PE(2,0) | PE(3,1) |
|---|---|---|---|---|---|---|
| 0 | rf0 += 1 | rf0 += 1 | | | store y[k-1] (from N) | rf0 += 1 |
| 1 | load a[k] | load b[k] | | | rf0 += 1 | |
| 2 | | | MUL E×S (seg 0) | MUL N×W (seg 3) | | |
| 3 | | (N + E) >>> 1 | | | | store z[k] from N2 |

It needs `n_cycles = 4*64 + 1`. The first slot-0 store writes a scratch word.

### Larger kernels: accumulating passes

Bigger workloads are split into passes. Each pass is one modulo-scheduled run of the
array that adds its partial result into memory, in place. Between passes the host
rewrites the data or the immediates. Two PEs in column 3 do the accumulation:

- PE(0,3) loads the old value of the output word.
- PE(1,3) adds that value (its N input) to the new partial sum, which it reaches over
  a two-hop link (W2).
- PE(1,3) then stores the result back to the same word.

Row 0 has spare memory-port slots, so the extra load never collides with the
operand loads.

**Matrix multiplication** (`tb/tb_sc_cgra_mmm.sv`; 2x2, 4x4, 10x10 and 12x12). One
element of C comes out per iteration, with II = 4. The inner dimension is split
into chunks of four, one k per row:

- **Operand layout.** For output `t = i*n + j` and chunk q, the host writes
  `AS[4t+r] = A[i][4q+r]` and `BS[4t+r] = B[4q+r][j]`. Lanes past n are zero.
- **Lane r = row r.**
  - PE(r,0) loads the A element in slot 1.
  - PE(r,2) loads the B element in slot 2.
  - PE(r,1) multiplies them in slot 3.
- **Reduction.** The next iteration adds the four products up the column:
  - slot 0: PE(1,1) = N + SELF and PE(2,1) = SELF + S;
  - slot 1: PE(1,1) = SELF + S.
- **Accumulate.** In slot 2, PE(1,3) adds the old C value. It stores the result in
  slot 3.

A pass covers up to 72 elements of C, so that the two streams fit in memory. Sizes
and measured results:

| size | passes | array cycles | RMS deviation |
|---|---|---|---|
| 2x2 | 1 | 22 | about 2 % |
| 4x4 | 1 | 70 | about 3 % |
| 10x10 | 6 | 1236 | about 4 % |
| 12x12 | 6 | 1764 | about 4 % |

The deviation is from the exact product, with one 32-cell PE per product. The host
has to rewrite the streams and reset the counters before each pass.

**FIR filters** (`tb/tb_sc_cgra_fir.sv`; 8 and 64 taps, 64 samples). Each pass
applies eight taps:

- The taps sit in the MUL immediates. Lane r holds taps r and r+4 of the pass.
- PE(r,0) and PE(r,2) load `x[n-r]` and `x[n-r-4]` and multiply them by their taps.
- PE(r,1) adds its lane's two products.
- The column reduction and the accumulation work as above.

The 64-tap filter takes eight passes of 266 cycles. Between passes the host changes
only the immediates. The address counters keep running, and each pass offsets its
immediates by the count of the passes before it. Measured deviation from the exact
filter is about 1.5 % (8 taps) and 2.7 % (64 taps).

**Polynomial evaluation** (`tb/tb_sc_cgra_poe.sv`; order 64, 32 points, Q15).
Horner's rule needs one step per coefficient: `acc = ((acc*x) >>> 15) + c[k]`. Each
pass performs one such step for every point, in place, with c[k] as an immediate.
Row r handles points 4i+r:

- PE(r,0) loads acc.
- PE(r,1) loads x and multiplies.
- PE(r,2) shifts the product, then adds the coefficient.
- PE(r,3) stores the result.

64 passes of 38 cycles evaluate the polynomial. The deviation from the exact value is
about 7 %, because the error of 64 chained stochastic products builds up.

## Parameters

| item | value | from |
|---|---|---|
| array | 4x4 | original design |
| multiplier operand width N | 16 | original design |
| cells per PE (2^M) | 32 | original design (its preferred configuration) |
| longest combined stream | 128 (4 PEs) | original design |
| data word | 32 bits | this design |
| register file | 4 words | this design |
| context slots | 16 | this design |
| data memory | 1024 words | this design |

The array size and memory depths are module parameters (`ROWS`, `COLS`, `CTX_DEPTH`,
`DM_DEPTH` on `sc_cgra`). The SC widths are package constants. Changing `SEQ_LEN` or
`SEQ_M` also needs matching `SF_W` and `CNT_W`, and the segment scheme assumes 4
segments.

## Where this implementation departs from, or adds to, the original

- **Exact counter.** The parallel counter is exact, an adder tree. One drawing in the
  original shows an approximate parallel counter (OR gates in its first level), but the
  worked example there needs an exact count.
- **Negative final shift.** `S_f` may be negative (right shift), because N = 16 and
  M = 5 make `S_a + S_b` larger than `L`. The original example uses 4-bit operands,
  where this cannot happen, and describes a 4-bit adder and subtractor.
- **Sobol direction numbers.** The sequence in the original drawing matches these cells
  for its first four points and then differs. It comes from different direction
  numbers, and the original reports that the choice barely changes accuracy.
- **Segment placement.** The placement of segments over the array is this design's own.
  The original only says that each PE has different cells and that neighbouring PEs
  concatenate into a longer sequence.
- **One-cycle multiplier.** The multiplier is combinational, with no pipeline register,
  so the PE's cycle time includes the full ISC-MUL.
- **Initiation interval of the large kernels.** The original maps the 10x10 and 12x12
  products with II = 2. Here every kernel uses II = 4, and products with an inner
  dimension above 4 run as several accumulating passes driven by the host.
- **Not built:**
  - the mapping algorithm (software);
  - 96-cell scaling;
  - an array whose PEs hold other than 32 cells (the multiplier alone takes `M`, but
    the PE, the segment placement and the data widths assume 32);
  - the energy and area results, which are properties of a 45 nm implementation.

## Files

`rtl/` (one module per file):

| file | contents |
|---|---|
| `sc_cgra_pkg.sv` | constants, opcodes, `ctx_t`, `mem_req_t`, `sobol_cell()` |
| `sng.sv` | parallel Sobol SNG |
| `apc.sv` | parallel counter |
| `zsas.sv` | leading-zero shifting |
| `nsc_mul.sv` | naive SC multiplier core |
| `isc_mul.sv` | improved SC multiplier with signs |
| `sc_alu.sv` | SC-ALU |
| `regfile.sv` | PE register file |
| `sc_pe.sv` | processing element |
| `sc_pe_array.sv` | 4x4 mesh-plus array |
| `config_mem.sv` | configuration memory |
| `data_mem.sv` | data memory |
| `host_ctrl.sv` | kernel sequencer |
| `sc_cgra.sv` | top level |

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`, and
`tb_sc_ref_pkg.sv`. That package is an independent reference model: it computes the
Sobol cells by recurrence, the leading zeros and the ISC-MUL product.

- Every testbench prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.
- `tb_isc_mul_len` checks the multiplier at 8, 16, 32 and 64 cells.
- `tb_sc_cgra_mmm`, `tb_sc_cgra_fir` and `tb_sc_cgra_poe` run the matrix
  multiplication, FIR and polynomial workloads on the full array, checking each result
  bit-exactly against the reference model.
- `tb_sc_cgra` is the end-to-end test at default parameters. It checks every stored
  result bit-exactly and the run length in cycles. It also counts each mechanism and
  requires every one to occur: slot switching, loads, stores, ISC-MULs, ZSAS shifts,
  accuracy-scaling adds, two-hop links, negative products and a memory conflict.

To run a testbench with Verilator (here the top level):

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_sc_cgra \
  rtl/sc_cgra_pkg.sv tb/tb_sc_ref_pkg.sv rtl/*.sv tb/tb_sc_cgra.sv -o sim
./obj_dir/sim
```

Each testbench finishes in well under a second.

To lint the top level:

```
verilator --lint-only -Wall -Irtl rtl/sc_cgra_pkg.sv rtl/sc_cgra.sv
```

The remaining lint warnings are harmless:

- unused package constants;
- the leading-zero counts in `isc_mul`, which are left visible for testbenches;
- the unconnected ones-count output of the ALU;
- `rst_n` used both by flip-flops and by the top-level assertion's `disable iff`.
