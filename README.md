# Geometric-algebra co-processor for colour edge detection

In geometric algebra (GA), an RGB colour is one vector. A rotation of colour space is a *rotor* R applied as R C R̃. An edge detector can therefore convolve the image with rotor masks. Where the colours under a mask agree, the rotated parts cancel and the result lies on the grey axis. Where they differ, the result moves off it.

Every step of such a filter is one of three operations on 3-D multivectors: a geometric product, a sum or a difference. This RTL is a co-processor that computes those operations in hardware. It uses IEEE 754 binary64 or binary32 coefficients and IEEE floating-point units. A host processor loads operands into on-chip memory, starts a batch of operations and reads the results back.

The architecture follows the GA co-processor ASIC of Mishra, Wilson and Wilcock ("A Geometric Algebra Co-Processor for Color Edge Detection"). That design is made of:

- a conversion (I/O) logic;
- a memory with its port controller;
- a GA core built from multipliers, adders and blade logic;
- a result register file;
- a memory write sequencer;
- a six-state controller.

The publication describes most of these blocks only by name and function. Most of what sits inside them is this implementation's own design. The section "Departures and open points" says where.

## A 3-D multivector in hardware

A multivector of an N-dimensional algebra has 2^N coefficients, one for each basis blade. Coefficient `k` belongs to the blade whose *bitmap* is `k`: bit i is set when e_(i+1) is a factor. For N = 3:

| index | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| blade | 1 | e1 | e2 | e12 | e3 | e13 | e23 | e123 |

A memory word holds one whole multivector, 2^N × 64 = 512 bits.

With bitmaps, the product of two basis blades is cheap to compute:

- **Result blade.** e_a e_b = ± e_(a XOR b), because repeated factors square to +1 in a Euclidean metric.
- **Sign.** The sign is the parity of the number of swaps needed to sort the factors. Each factor e_j of b must pass every factor of a with a larger index. So the sign is

  XOR over j of ( b[j] AND (XOR of a[i] for i > j) ).

  This is a chain of XOR gates with one AND gate per bit (`blade_logic`).
- **Metric.** A parameter mask can give some basis vectors a negative square. The default is Euclidean.

## Using the co-processor (`gacp_top`)

All traffic goes through one coefficient-wide port, one 64-bit coefficient per clock.

1. **Load.** In IDLE, the host writes each operand coefficient with `load_en`, `load_address = {word, blade}` and `load_data`. It closes the load with a `load_end` pulse. A `start` that arrives between the first `load_en` and `load_end` is ignored.
2. **Configure.** The host sets the following inputs:
   - `cfg_bits[2:0]` selects the operation:
     - 0: geometric product;
     - 1: outer product;
     - 2: inner product (left contraction);
     - 3: A + B;
     - 4: A − B.
   - `cfg_bits[4:3]` selects the rounding mode: nearest-even, toward zero, toward +∞ or toward −∞.
   - `cfg_bits[5]` selects the precision. When it is set, every coefficient is a binary32 number held in the low 32 bits of its 64-bit slot, and results come back in the same form.
   - `a1` and `a2` are the word addresses of the first A and B operands.
   - `c1` and `c2` are the address steps between successive operations.
   - `a3` is the address of the first result.
   - `c3` is the number of operations in the batch.

   Operation i reads A from word `a1 + i*c1` and B from word `a2 + i*c2`, and writes its result to word `a3 + i`. A step of 0 keeps one operand, such as a rotor or a filter mask, fixed for the whole batch.
3. **Start.** A one-clock `start` runs the batch. Each operation passes through CLEAR (1 clock), LOAD (3 clocks), PROCESS (until the core reports the end) and WRITE (1 clock).
4. **Dump.** After the last operation, the controller enters DUMP.
   - The results are streamed out as `dump_data`, together with `dump_address = {word, blade}` and `dump_valid`.
   - Each word takes 10 clocks: a read, a wait for the data, then 8 coefficients.
   - `dump_last` marks the last coefficient and `dump_done` follows it.
   - The host then pulses `dump_end`, and the controller returns to IDLE.

Status outputs:

- `result_count` is the number of results stored.
- `fflags` holds the IEEE flags (invalid, overflow, underflow, inexact). They are sticky over the batch.
- `stall` and `core_active` show what the core is doing.
- `error` is sticky. It is set by a memory request outside the state that owns the port, or by a result stored before all of its coefficients were written.

Measured at the default parameters, a batch of full 3-D geometric products costs 66 clocks per product from CLEAR to WRITE. The original hardware quotes 84 processing cycles per 3-D product.

## The GA core (`ga_core`)

The core is the part that takes the most explaining. It computes one operation on two multivectors and writes the result coefficient by coefficient into the result register. By default it has **two multiply-accumulate lanes and one merge adder**: two multipliers and three adders, matching the "2M, 3A" configuration of the original. `NLANES = 1` gives the single-core variant, with one multiplier and one adder.

### Operand fetch

The core fetches its operands while the controller holds `load` for three clocks:

1. clock 1 reads word A;
2. clock 2 captures A and reads word B;
3. clock 3 captures B.

The memory has one cycle of read latency.

### Work split

A geometric product needs the pairs (i, k) for all A blades i and result blades k. Each pair uses B blade j = i XOR k and the sign of e_i e_j.

- With H = 2^N / NLANES, lane l owns A rows i in [l·H, (l+1)·H).
- Each lane walks its rows in order. Within a row it walks the result blades k.
- Each lane keeps a private bank of 2^N partial sums.

### Issue and skipping

A pair is *useful* unless A[i] or B[j] is zero, or the selected product discards it. The outer product keeps i AND j = 0. The inner product keeps only pairs where i's blades are contained in j's.

Each cycle, a lane looks ahead along its current row. A priority encoder picks the next useful result blade k.

- **Skip.** Pairs that are not useful cost no cycles. A row with no useful pair left costs one cycle to advance to the next row.
- **Issue.** The lane sends A[i] and B[j] into its multiplier, with the sign applied. The tag k travels alongside. Five clocks later the product enters the lane's adder together with the current partial sum for k. Six clocks later the new sum is written back.

Skipping is why sparse operands run faster. A colour has only three bivector coefficients and a rotor has four, so most pairs are skipped. A rotor × colour product takes 38–41 core cycles against 61 for two full multivectors.

### Accumulator hazard and stall

A partial sum must not be read while an earlier update to it is still inside the adder pipeline.

- Each lane has a countdown per result blade. An issue to blade k loads that countdown with the adder depth (6).
- A lane whose next pair targets a blade with a nonzero countdown waits. It asserts `stall` and issues nothing that cycle.
- In a full product, each row touches all 2^N blades, so row-to-row reuse is 8 cycles apart. That is more than 6, so stalls are rare. They appear when skipping packs updates to the same blade closer together.

### Drain and merge

- An outstanding-operation counter tracks the products and sums in flight.
- When both lanes have walked all their pairs and the counter is zero, the merge phase starts.
- The third adder computes `acc0[k] + acc1[k]` for each blade k. It writes each sum to the result register as it leaves the adder.
- With one lane, the partial sums are written directly.
- `process_end` pulses the clock after the last coefficient is written.

### Sums and differences

A + B and A − B bypass the lanes. Each blade pair goes straight into the merge adder; for a difference the sign of B is flipped.

### Single precision

The core stores and computes at its built format, binary64. In binary32 mode:

- each binary32 operand is widened exactly when it is captured (subnormals included);
- the operation runs at full width;
- each result coefficient is rounded once to binary32 on its way to the result register. A second `fp_round` does this, in the selected mode, and its flags join the others.

A result can therefore be more accurate than a pipeline that rounds every intermediate to binary32. It can then differ from such a pipeline in the last bit.

### Summation order and IEEE semantics

The summation order is fixed: first by lane, then by row order, then the merge. So results are reproducible bit for bit, and the testbenches compare them exactly against a reference that adds in the same order.

One consequence of skipping departs from plain IEEE evaluation. A term where one factor is zero is never formed, so 0 × ∞ or 0 × NaN inside a product does not produce NaN.

## Floating-point units (`fp_mul`, `fp_add`, `fp_round`)

Both units are fully pipelined and accept one operation per clock.

- **`fp_mul`** has 5 stages:
  1. unpack the operands and normalise subnormal inputs;
  2. form the significand product;
  3. normalise and collect the guard, round and sticky bits;
  4. round;
  5. handle special cases.
- **`fp_add`** has 6 stages:
  1. order the operands by magnitude;
  2. align the smaller one, keeping a sticky bit;
  3. add or subtract;
  4. normalise;
  5. round;
  6. handle special cases.

  An exact zero sum is +0, or −0 when rounding toward −∞.
- **`fp_round`** is shared by both units. It handles:
  - all four IEEE rounding modes;
  - gradual underflow, by shifting into the subnormal range before rounding;
  - overflow, to ∞ or to the largest finite number depending on the mode;
  - the flags. Underflow means tiny before rounding and inexact.

  NaN results are the canonical quiet NaN.

The units' own format is set by parameters: `EXP_W = 11, FRAC_W = 52` (binary64, the default) or `8, 23` for binary32. Run-time single precision in the co-processor uses the binary64 units, as described in the GA core section.

## Memory and data movement

| Block | What it does |
|---|---|
| `ga_mem` | `DEPTH` (default 256) words of one multivector each. One synchronous read port; one write port with a per-coefficient mask. |
| `mem_logic` | Routes the ports by controller state. Reads: the core in LOAD, the dump logic in DUMP. Writes: the write sequencer in WRITE, host loads in IDLE. A request outside its state raises `conflict`. |
| `conv_logic` | Load side: turns each host coefficient into a masked write of its lane, one clock later. Dump side: reads the result words and shifts them out. |
| `reg_file` | The result register. 2^N coefficient registers written by the core; `count` counts the writes since the last clear. |
| `mem_write_seq` | In WRITE, stores the result register at word `a3 + count` and advances `count` (which is `result_count`). Flags a result with fewer than 2^N written coefficients. |
| `ctrl_fsm` | IDLE → CLEAR → LOAD → PROCESS → WRITE, repeated `c3` times, then DUMP → IDLE. Also handles the start interlock and batch counting. |

Shared types (control-word layout, flags, state encoding, pipeline depths) are in `ga_pkg`.

## Departures and open points

- **Control word and batch registers.** The layout of the 16-bit control word is this design's own. So is the meaning of A1–A3 and C1–C3 as bases, strides and batch length; the original names these signals without defining them.
- **Internals.** The original gives only the function, and sometimes only the name, of these parts:
  - the lane organisation, skip rule, stall rule and merge adder;
  - the memory depth;
  - the coefficient-serial host port;
  - the dump handshake.
- **Datapath width.** The original mentions a 320-bit datapath word. Here a word is one full multivector (512 bits at binary64).
- **Precision.** Single and double precision are both available at run time. Single-precision operations are computed at double width and rounded once at the end. How the original switches precision is not described.
- **Speed.** The original's tables imply about 39 clocks per rotor × colour product with two cores. This implementation takes 45, mostly pipeline fill and the final merge, because operations do not overlap.
- **Unused paths.** The original's register-file read-select path and its path from the register file back into the core have no use here and are left out.
- **Larger algebras.** `N` is a parameter. `blade_logic` is verified at N = 5. The full design is simulated only at N = 3, so 4-D and 5-D operation (16 and 32 coefficients) is untested.
- **Whole images.** An image does not fit in 256 words, so the host streams it in batches. For example, a rotor at step 0 plus 127 colours and 127 results fills one batch.
- **Host side.** The host processor, the test board and the image conversion are outside the chip and are not part of this RTL.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints `TB_RESULT checks=… failures=…` and has a watchdog. The reference models (`tb/ga_ref_pkg.sv`) are independent of the RTL:

- blade signs come from sorting factor lists;
- products and sums use `real` arithmetic in the hardware's summation order;
- directed rounding modes use wide-integer arithmetic.

| Testbench | What it covers |
|---|---|
| `tb_blade_logic` | All 3-D blade pairs, a negative metric and N = 5. |
| `tb_fp_mul`, `tb_fp_add` | About 12,000 random and corner cases each (subnormals, overflow, infinities, NaN, signed zeros), all rounding modes, flags. Latency of 5 and 6 clocks; one result per clock. |
| `tb_ga_core` | Two-lane and one-lane cores side by side; all operations; full, colour, rotor, vector and sparse operands; binary64 and binary32 modes. Checks the 84-cycle budget, that sparse operands are faster, and that stalls occur. |
| `tb_reg_file`, `tb_ga_mem`, `tb_mem_logic`, `tb_conv_logic`, `tb_mem_write_seq`, `tb_ctrl_fsm` | Each against a behavioural expectation. Includes the dump rate of 10 clocks per word and the state sequence with LOAD = 3 clocks. |
| `tb_fp_single` | Both units built for binary32. 5,000 operand pairs each against a rounded double-precision reference, with their latencies. |
| `tb_gacp_top` | End to end, at the default parameters. See below. |
| `tb_rotor_conv` | The colour-difference edge detector (4 products and 5 additions per pixel) on a 6×6 two-colour image, as the host would run it. Every intermediate is checked bit for bit. Uniform rows must come out on the grey axis and rows across the colour boundary off it. Reports clocks per rotor product (45). |

`tb_gacp_top` acts as the host and runs at the default parameters. It covers:

- batches of full and sparse products;
- stride-0 reuse of an operand;
- every operation;
- the load interlock;
- directed rounding;
- overflow;
- the binary32 mode: random batches, directed rounding, a subnormal operand and overflow on narrowing.

It counts each of these mechanisms, plus lane stalls, and fails if any never happened.

To run a testbench with Verilator, name the two packages and the testbench. Verilator finds the rest by module name in `rtl/` and `tb/`. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/ga_pkg.sv tb/ga_ref_pkg.sv tb/tb_gacp_top.sv --top-module tb_gacp_top -o sim
./obj_dir/sim
```

Lint warnings are not fatal here. They concern unused bits of the control word and of internal pipeline words.

The end-to-end test finishes in seconds.

With two lanes at binary64, the top synthesises (coarse, generic cells) to about 8,700 cells and 5,500 flip-flop bits. The memory adds 131 kbit.
