# A dynamic arithmetic processor for compound arithmetic functions

Many numeric kernels are not a single operation applied to a vector. They
are small expression graphs applied to every element:
- a complex divide `(a+jb)/(c+jd)`;
- an interval multiply `[a,b]·[c,d]`;
- an FFT butterfly;
- a loop body with an `IF` in it.

This processor evaluates such *compound* functions at one result per clock
cycle. It does not give each one a fixed pipeline. Instead, it uses a pool
of identical, programmable, pipelined processing elements (PEs). Before
each job it wires them together through a crossbar into an **arithmetic
network**, a custom pipeline shaped like the function's dataflow graph.
Operand vectors then stream from local memories through that network and
back, one operand block per cycle. The next job may wire the same PEs into
a completely different network.

The default configuration has:
- 10 PEs, each with 3 operand ports and 3 result ports and a 7-stage pipeline;
- a 30×30 crossbar routing network with a 5-stage pipeline and a
  programmable delay on every output;
- 8 local memories of 4096 words and a register file of 8 scalars, joined to
  the PEs by an allocation network;
- a local controller that swaps in a new network configuration in 18
  cycles and then runs the job.

```
              host: tables, vectors, start/n
                         │
                 ┌───────▼────────┐
                 │local_controller│ shadow tables ──► active tables
                 └──┬──────────┬──┘
        lm_go, n    │          │ pe/route/alloc configuration
   ┌────────────────▼┐   ┌─────▼──────────────┐        ┌─────────────────┐
   │ local_memory ×K │◄─►│ allocation_network │◄──────►│     pe × M      │
   │ register_file   │──►│  (crossbar, BETA)  │ A B C  │ 7-stage pipeline│
   └─────────────────┘   └────────────────────┘        │  D E F results  │
                                                       └──┬───────────▲──┘
                                                          │  A' B' C' │
                                                   ┌──────▼───────────┴───┐
                                                   │   routing_network    │
                                                   │ crossbar, BETA stages│
                                                   │ + delay per output   │
                                                   └──────────────────────┘
```

## How a job runs

A *job* is one arithmetic network applied to `n` operand blocks. The host
sets it up and runs it in four steps:

1. Load the operand vectors into local memories (host port `h_*`), and
   constants into the register file (`rf_*`).
2. Write the configuration into the controller's shadow tables:
   - one `pe_cfg_t` per PE;
   - one `route_cfg_t` per PE network input;
   - one `alloc_cfg_t` per PE memory input and one per memory write port;
   - one `lm_cfg_t` stream descriptor per memory.

   The shadow tables can be written while the previous job is still running.
3. Pulse `start` with `n`. The controller copies the shadow tables into the
   active ones: first one PE per cycle, then one memory per cycle
   (α = M + K = 18 cycles). It then starts every memory stream in the same
   cycle.
4. `done` pulses when every memory that is being written holds `n`
   results. At that point `cycles` holds the job time and `cfg_cycles`
   holds α.

There is no central schedule. Every word travels with a valid bit (a *flit*).
Invalid flits move through the pipelines like bubbles, and each memory simply
stores the valid flits that reach it. The pipeline timing must still line up
wherever two operands meet: a PE combines whatever arrives at its ports in
the same cycle. The routing delays described below make that happen.

The job time for a network whose longest path passes through c+1 PEs (c
routing hops) is

```
T_d = α + (c+1)·k + (c+2)·β + n − 1 + 5
    = 18 + 7(c+1) + 5(c+2) + n + 4     (defaults: k = 7, β = 5)
```

The (c+2) counts the allocation hop out of memory, the c routing hops and
the allocation hop back. The final 5 are fixed overheads:
- the controller's go cycle;
- the memory address and data cycles;
- the memory write;
- the done test.

The end-to-end testbench checks this figure exactly for c = 0, 1, 2 and 4,
and for n = 64 and n = 4096. For long vectors, n dominates: the network
delivers one result per cycle once it is full.

## The processing element (`pe`)

Each PE is a linear 7-stage pipeline. It accepts one operand set per cycle
and produces one result set per cycle, whatever it has been programmed to do:

| stage | module | work |
|---|---|---|
| 1 Receive | `pe_receive` | choose each operand lane X, Y, Z from its memory port (A/B/C), its network port (A'/B'/C'), its own results (feedback) or zero; lane Z may be held back 0–63 cycles |
| 2 Exp/Logic I | `exp_logic` | exponent difference and mantissa alignment, exponent sum for products, logic ops; optionally replace X with the reciprocal ROM's guess for 1/Y |
| 3 Mul/Add I | `ma_stage` → `muladd` | first operation, result R1 |
| 4 Exp/Logic II | `exp_logic` | the same, for the second operation, which may use R1 as an operand |
| 5 Mul/Add II | `ma_stage` → `muladd` | second operation, result R2 |
| 6 Normalize | `normalize` | normalize R1 and R2 (float ops only) |
| 7 Transmit | `pe_transmit` | drive result ports D/E/F from X, Y, Z, R1, R2, chosen by a branch condition |

So one PE does two chained operations per cycle, for example `A+B+C`, or
`X·Y` and `X·Z` side by side. The operands X, Y, Z travel down the
pipeline next to the results. Stage II and Transmit can therefore use any
of the original operands as well as the results.

Each unit (I and II) is programmed with a `unit_cfg_t` that holds an
operation and operand lanes `a`, `b` and `s`:
- floating point: `FADD`, `FSUB`, `FMUL`;
- fixed-point fractions: `IADD`, `ISUB`, `IMUL`;
- bitwise on whole words: `AND`, `OR`, `XOR`, `NOT`;
- `PASS`;
- the three Newton–Raphson operations described below.

**Branch merging.** An `IF` would normally force a different network for each
side. Here both sides are computed, and the Transmit stage picks which of two
output selections to use:
- `out_t` is used when the condition holds;
- `out_f` is used when it does not.

The condition (`<0, ≤0, =0, ≥0, >0, ≠0` or always) is evaluated on one
lane by `branch_control`. It looks only at the sign bit and the leading
mantissa bit of a normalized number, which is enough to tell negative, zero
and positive apart. With the same mechanism a PE works as a
compare-exchange: it computes `x − y` and sends `(max, min)` or `(min, max)`.
The interval multiply uses four of them.

**Feedback.** A Receive port may take one of the PE's own result ports. This
makes a running sum possible, as in an inner product. The loop is seven
cycles long, so the sum splits into seven interleaved partial sums, and a
later step adds the seven together. A feedback port reads zero while the
fed-back result is invalid. Each new operand stream therefore starts its
sums from zero without a reset, and an idle loop drains to zero.

## Number format and the Multiply/Add stage

A word (`word_t`, 32 bits) has two fields:
- an 8-bit two's complement exponent `e`;
- a 24-bit two's complement fraction `m` in [−1, 1).

Its value is `m·2^e`. A word is normalized when its first two mantissa bits
differ. So normalized positive fractions lie in [½, 1), and normalized
negative ones lie in [−1, −½).

Fixed-point operations use `m` as a plain fraction and leave `e` at 0.

`muladd` is the arithmetic core. It is shaped like the stage the
architecture calls for:
- an array adds the partial products of x·y in carry-save form;
- a shift/complement/bypass step prepares a third term: ±y, or the
  constant 2 with the whole product complemented;
- a 4-input carry-save adder merges the terms;
- one carry-propagate adder finishes the result.

It delivers, exactly and with four integer bits:

```
x + y,  x − y,  x·y,  x·y ± y,  2 − (x·y ± y)
```

`ma_stage` converts that exact result back into a word:
- A floating result of magnitude ≥ 1 is shifted right and its exponent
  raised. Full normalization is left to stage 6.
- Alignment and all conversions truncate; nothing is rounded.

## The reciprocal: Newton–Raphson on two PEs

Division is `a · (1/b)`. The reciprocal takes two cascaded PEs, and a divide
therefore takes three. The iteration is

```
A_{i+1}' = A_i' · (2 − A_i'·B)
```

The design relies on a property of normalized fractions: for ½ < |B| ≤ 1,
the reciprocal satisfies 1 ≤ |1/B| < 2. So every estimate A' can be written
as ±1 plus a fraction A, and A_i'·B becomes A_i·B ± B. The `muladd` forms
`x·y ± y` and `2 − (x·y ± y)` exist for exactly this. The sign of the ±
comes from the reference lane `s`.

```
PE 1:  X := ROM(Y)                  guess A0 (fraction part), exponent −e(B)
       R1 := 2 − (A0·B ± B)          NR_TWOMINUS   = 2 − A0'·B
       R2 := A0·R1 ± R1              NR_STEP       = A1' with the ±1 removed
       out: D = R2 (A1), E = B
PE 2:  R1 := 2 − (A1·B ± B)          NR_TWOMINUS
       R2 := A1·R1 ± R1              NR_LAST       = 1/B as a floating word
```

`recip_rom` holds 512 guesses, addressed by the sign of B and 8 mantissa
bits. They are computed at elaboration as the reciprocal of the near end of
each interval, rounded away from zero. So |A0'| > |1/B| holds, with a
relative error below 2⁻⁹. The one exception is the entry next to |B| = ½,
where the guess is capped just below 2. Two steps reach the full 24-bit
fraction.

Exact Newton steps leave `2 − A'·B` slightly above 1, since A₁'·B = 1 − ε².
The signed fraction format cannot hold that. This design therefore keeps that
intermediate as an **unsigned** fraction in [0, 2), and the step that
consumes it reads it as unsigned (`b_uns` in `muladd`). This is the most
delicate part of the datapath.

## Routing network and noncompute delays

`routing_network` is a non-blocking crossbar. Each of the 30 PE network
inputs (`3·pe + port`) selects any of the 30 PE result ports, using the same
numbering. Several inputs may select the same source. A transfer takes β = 5
cycles. On top of that, each output has a programmable noncompute delay of
0–63 cycles (`delay_line`).

The delays are what make an arbitrary dataflow graph pipelinable. When two
operands meet at a PE, both must have come the same number of cycles from
memory. Each PE adds k = 7 cycles and each hop adds β, so a path through p
PEs and h hops is `7p + 5h` cycles long. The shorter path gets the
difference as delay. Examples from the testbench:

- `(A+B+C)/D`:
  - `A+B+C` comes from one PE.
  - `1/D` comes from two chained PEs.
  - The sum therefore waits `7 + 5 = 12` cycles on its way to the
    multiplier.
- Complex divide, which has c = 4:
  - `1/(c²+d²)` passes through four PEs.
  - The four cross products pass through one.
  - The products therefore wait `3·(7 + 5) = 36` cycles.
- When the early operand comes straight from memory, there is no routing hop
  to put a delay on. Such an operand enters on port C and waits in the PE's
  own lane-C delay (`cdly`, 0–63 cycles). The FFT butterfly, the `c²+d²`
  PE and the interval divide use this. The interval divide's multipliers
  wait `2·(7 + 5) = 24` cycles for the reciprocals.

## Allocation network, local memories and register file

`allocation_network` is a crossbar in both directions, pipelined in β stages
each way:
- Each PE memory port (A/B/C of every PE) selects a local memory (index
  0–7) or a register (index 8–15).
- Each memory write port selects a PE result port.

`local_memory` is a single array with two streams, started by `lm_go`:
- a read stream that sends one word per cycle from `rd_base` with
  `rd_stride` for `n` words;
- a write stream that stores every valid incoming flit at
  `wr_base + i·wr_stride`.

It counts stored results in `wr_count`. A host port reads and writes it
between jobs. Stream writes take priority over host writes.

`register_file` holds scalars that every operand block reuses, such as the
twiddle factors of an FFT stage. Its outputs are always valid, so a register
operand pairs with every element of a vector stream.

## Local controller

`local_controller` keeps two copies of every configuration table:
- a shadow copy, written through the `*_we/*_idx/*_data` ports;
- the active copy, which drives the PEs and networks.

Its states are:
- IDLE;
- RECONF, which copies one PE per cycle (its program, its three routing
  outputs and its three allocation read ports), then one memory per cycle
  (its write port and its streams), so α = M + K cycles;
- GO, which starts all memory streams;
- RUN, which waits until every written memory holds `n` results;
- DONE.

`cycles` counts from `start` to `done`, and `cfg_cycles` counts the RECONF
cycles.

## Programming example: `E = (A + B + C) / D`

Four PEs. Port indices are `3·pe + port`, memories are 0–3 (A–D), and the
result goes to memory 4.

| PE | program | operands |
|---|---|---|
| 0 | R1 = X + Y, R2 = R1 + Z; D = R2 | A, B, C from memories 0–2 |
| 1 | ROM guess, NR_TWOMINUS, NR_STEP; D = R2, E = Y | B port ← memory 3 |
| 2 | NR_TWOMINUS, NR_LAST; D = R2 | A' ← 3 (PE1.D), B' ← 4 (PE1.E) |
| 3 | R1 = X · Y; D = R1 | A' ← 0 with delay 12, B' ← 6 (PE2.D) |

Memory 4's write port selects source 9 (PE3.D). All four read streams and
one write stream are enabled. With n = 64, the job takes
`18 + 21 + 20 + 63 + 5 = 127` cycles.

`tb/arith_processor_tb.sv` contains this network and seven others:
- the merged `IF`;
- the FFT butterfly, with twiddle factors from the register file;
- the interval multiply;
- the complex divide (8 PEs, c = 4);
- a cubic polynomial by Horner's rule (3 chained PEs, coefficients in
  registers);
- an inner product through the feedback path (1 PE, c = 0);
- an interval divide that uses all ten PEs: two reciprocals of two PEs
  each, two multipliers and four compare-exchanges (c = 4).

Last, the divide network runs once more on n = 4096 operand blocks, a full
memory. There it takes 4159 cycles.

They are ready-made templates.

## Verification

Every block has a self-checking testbench. Each ends by printing
`TB_RESULT checks=… failures=…` and has a watchdog. The reference values are
computed in `real` arithmetic, or with an independent bit-level model.

| testbench | covers |
|---|---|
| `muladd_tb` | all five forms on random and corner fractions against exact integer arithmetic |
| `recip_rom_tb` | random B of both signs over all table regions: the guess has B's sign, bounds 1/B from outside, and is within 2⁻⁸ of it |
| `pe_tb` | 7-cycle latency and one result per cycle; float add/mul chains, logic, fixed point, compare-exchange both ways, port-C delay, feedback inner product, reciprocal over two PEs (latency 14) |
| `routing_network_tb` | random crossbar settings, fan-out and every delay 0–63 against a history model |
| `allocation_network_tb` | both directions, memory and register sources |
| `local_memory_tb` | strides, stream/host priority, write counting |
| `register_file_tb` | writes and always-valid reads |
| `local_controller_tb` | shadow/active separation, α, state sequence, done condition |
| `arith_processor_tb` | the full default-size processor, nine jobs, N = 64 and N = 4096 |

`arith_processor_tb` checks every result against `real` arithmetic, with
α = 18 and `T_d` exact for every job. It also counts each mechanism and
fails if one never happens:
- reconfiguration;
- port-C and routing delays;
- reciprocal;
- register operands;
- both sides of the branch;
- both outcomes of a compare;
- the complex divide, the polynomial chain, the feedback accumulation and
  the ten-PE interval divide.

To run a testbench with Verilator 5 (replace `pe_tb` with any other):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/arith_pkg.sv tb/tb_pkg.sv tb/pe_tb.sv --top-module pe_tb -Mdir obj_pe
./obj_pe/Vpe_tb
```

The remaining `rtl/` files are found through `-Irtl`, because every module
file is named after its module. `tb/tb_pkg.sv` holds the conversions between
`real` and `word_t` used by the testbenches.

## Where this design departs from the architecture it follows

- **Widths and encodings are this design's own.** These include:
  - the word format, 8-bit exponent and 24-bit fraction;
  - the table formats;
  - the ROM size;
  - the memory depth;
  - the delay ranges;
  - the host interface.
- **Reconfiguration overhead.** The performance model assumes α = 50
  cycles. This controller needs only M + K = 18. The model's
  `66 + 12c + N` therefore becomes `35 + 12c + N` here: 151 cycles for the
  complex divide at N = 64.
- **Reciprocal intermediate.** The reasoning behind the Newton scheme has
  A'·B staying above 1. Exact steps do not keep that property. The
  intermediate `2 − A'·B` is therefore carried as an unsigned fraction (see
  above), and the results are correct to a few ulp.
- **Branch sense.** For the loop `X = AC − BD; IF X ≤ 0 THEN Y = AB + CD
  ELSE Y = AB − CD`, the condition is programmable. The test uses `≤ 0`
  for the `AB + CD` side, as the loop is written.
- **Where the branch is tested.** In the reference organization the branch
  test sits in the Receive stage and watches operand B. Its decision is
  carried down to the Transmit multiplexer. Here the test is made in
  Transmit on a selectable lane. Lane Y reaches Transmit unchanged, so
  choosing it gives the same behaviour. Choosing a result lane lets one PE
  act as a compare-exchange.
- **Rounding.** Alignment and result packing truncate. There is no overflow
  or underflow signalling on exponents.
- **ROM constants.** The ROM holds only reciprocal guesses. Constants for
  transcendental functions and FFT twiddle factors would also belong there.
  Here twiddles come from the register file, and no transcendental
  evaluation is provided.
- **Outside this block.** The multiprocessor around the processor is not
  modelled:
  - the global network and global controller;
  - the shared memories;
  - the interprocessor network;
  - the address mapping / local I/O.

  The host ports stand in for them.
- **Not run end to end.** Full FFTs (one job per stage) and L-U
  decomposition on a 9-PE hexagonal network fit the hardware, but are not
  run end to end here.
- **Cyclic networks.** Recurrences such as a back-substitution ring would
  close a loop through the routing network. Such a loop carries only valid
  flits, and a PE waits for valid operands, so the loop would never start
  unless it were primed with a first value. Nothing primes it here. Only
  the PE-local feedback path, which reads zero until it carries a result,
  supports accumulation.

## Files

- `rtl/arith_pkg.sv`: word format, operation codes, configuration records.
- `rtl/arith_processor.sv`: top level.
- `rtl/pe.sv`: the PE, built from `pe_receive`, `exp_logic`, `ma_stage`
  (with `muladd`), `normalize`, `pe_transmit`, `branch_control`, `recip_rom`
  and `delay_line`.
- `rtl/routing_network.sv`, `rtl/allocation_network.sv`,
  `rtl/local_memory.sv`, `rtl/register_file.sv`, `rtl/local_controller.sv`.
- `tb/*_tb.sv`: one testbench per block, and `tb/tb_pkg.sv`.
