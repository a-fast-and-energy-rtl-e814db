# CiM-PN: computing-in-memory prototypical-network inference

Prototypical networks classify a query in few-shot learning in two steps.
First they average the K embedded examples of each class into a class
prototype. Then they find the prototype nearest to the embedded query. Both
steps are simple arithmetic over long vectors, so on a processor their cost
is moving the vectors between memory and the compute units. CiM-PN does the
arithmetic inside the SRAM arrays that hold the vectors. Each array can put
two stored words on its bitlines at once. Its sense amplifiers turn them
into bitwise results, and a carry-look-ahead adder built into the column
periphery adds them. A logarithmic shifter shifts the result as it is read
out, and copy buffers write the result back into a row of the same array.

Two choices make the algorithm fit this hardware:

* **Manhattan distance instead of Euclidean distance.** The distance needs
  only subtraction, absolute value and addition, and no multiplier.
* **Means over power-of-two shot counts.** With K = 2^k, dividing by K is a
  subtraction of k from a floating-point exponent, or a right shift for
  fixed-point data.

This RTL models the datapath of one array bit-exactly at the logic level. It
adds sequencers that run floating-point add and subtract, iM-Mean (the
in-memory mean that gives a prototype) and iM-NearestNeighbor (the in-memory
Manhattan distance and minimum search) as sequences of array operations. The
top level holds several arrays, each with its own sequencer.

## Files

| file | module | role |
|---|---|---|
| `rtl/cim_pkg.sv` | package | opcodes, micro-operation struct, shift-mask encoding |
| `rtl/row_decoder.sv` | `row_decoder` | address to one-hot wordlines (two per array, A and B) |
| `rtl/sram_array.sv` | `sram_array` | M x N cell array; a two-row read gives AND on BL and NOR on BLB |
| `rtl/sense_amp.sv` | `sense_amp` | AND, NOR, OR, NAND, XOR from the bitlines |
| `rtl/im_cla_block.sv`, `rtl/im_cla.sv` | `im_cla` | 4-bit Manchester carry blocks with carry skip, cascaded |
| `rtl/op_select.sv` | `op_select` | per-column multiplexer picking the result of the opcode |
| `rtl/log_shifter.sv` | `log_shifter` | 5-level left/right shifter, 15-bit shift mask |
| `rtl/copy_buffers.sv` | `copy_buffers` | write path: result feedback or external data onto the bitlines |
| `rtl/cim_array.sv` | `cim_array` | one complete array, one micro-operation per clock |
| `rtl/flp_seq.sv` | `flp_seq` | floating-point add / subtract / add-absolute sequencer |
| `rtl/pn_ctrl.sv` | `pn_ctrl` | iM-Mean and iM-NearestNeighbor sequencer |
| `rtl/cim_pn_top.sv` | `cim_pn_top` | NUM_ARRAYS arrays with sequencers behind a host port |

Each module has a self-checking testbench `tb/tb_<module>.sv`.
`tb/tb_cim_pn_top.sv` runs complete few-shot episodes on the top level at
its default size.

## One array

```
 row decoder A ─┐                       ┌── shift mask S (15 bits)
 row decoder B ─┤                       v
            SRAM M x N ─BL/BLB─> sense amps ─> CLA ─> op select ─> log shifter ─> OUT
                 ^                                                               │
                 └──────────── copy buffers / bitline drivers <── Data in ───────┘
```

The default size is 64 rows by 64 columns. One row is one 64-bit word.

**Reading two words at once.** Decoders A and B can raise two wordlines in
the same cycle. A precharged bitline BL stays high only if every activated
cell stores 1, so BL carries the AND of the two words. BLB stays high only
if every activated cell stores 0, so BLB carries their NOR. With only one
wordline raised, the same two bitlines carry the word and its complement.

**Sense amplifiers.** The sense amplifiers pass AND and NOR through and
invert them to get NAND and OR. They combine OR and NAND with an AND gate to
get XOR. READ is the OR output of a single row, and NOT is the NOR output of
a single row.

**Adder.** The adder uses the sense-amplifier outputs directly as
generate (G = AND) and propagate (P = XOR) signals. The adder is split into
4-bit blocks. Inside a block the carry ripples through a Manchester chain,
`c[i+1] = G[i] | P[i]&c[i]`. When all four P bits of a block are 1, a skip
path passes the block's carry-in straight to its carry-out. Each sum bit is
`P ^ c`. There is a carry-in input. Subtraction A − B is done in three
steps: NOT B, write it to a scratch row, then ADD A, NOT B with carry-in 1.

**Shifter.** The shifter has 5 levels, which shift by 1, 2, 4, 8 and 16
columns. Each level is steered by 3 bits of the 15-bit mask S. Within level
k (k = 0..4):

| mask bit | S(3k+1) | S(3k+2) | S(3k+3) |
|---|---|---|---|
| action | shift left 2^k | pass | shift right 2^k |

The mask is written with S15 first. So `010010010010010` passes the word
through unchanged, and `010010010100010` shifts it right by 2.
`cim_pkg::shift_mask(left, amount)` builds the mask for any shift from 0 to
31. Longer shifts take several passes, with a write in between. Bits shifted
in from outside the word are 0.

**Writing.** A write puts OUT (the copy buffers) or `data_in` (the bitline
drivers) on the bitlines and stores it in the row selected through decoder
A.

### Micro-operation interface

`cim_array` takes one `cim_uop_t` per clock:

| field | meaning |
|---|---|
| `rd` | read `row_a` (and `row_b` if `en_b`), apply `op` with `cin`, shift by `mask`; the result is in `out` after the clock edge |
| `op` | `OP_ADD`, `OP_XOR`, `OP_OR` (READ), `OP_NOR` (NOT), `OP_AND`, `OP_NAND` |
| `wr` | write row `row_a` at the clock edge, with `out` (`wr_ext=0`) or `data_in` (`wr_ext=1`) |

`rd` and `wr` in the same cycle is illegal, because they share the bitlines.
An assertion checks this. Assertions also check the row ranges and that each
mask level is one-hot. `out` and `cout` hold their values until the next
`rd`. An in-memory accumulate therefore takes two cycles: `ADD x, acc`, then
`wr acc`.

The published circuit numbers are analogue latencies in nanoseconds, not
clock cycles: READ/NOT 0.465 ns, WRITE 0.153 ns, ADD 1.36 ns, SUB 1.83 ns,
SHIFT 0.465 ns. In this model every micro-operation takes one cycle.

## Floating point in memory

A number is stored in two rows, which form a slot:

* an N-bit two's-complement mantissa `m` in row 2s;
* an N-bit two's-complement exponent `e` in row 2s+1.

The value is `m * 2^e`. A normalised number has its leading magnitude bit
(the highest bit that differs from the sign bit) at position `MANT_W-2`,
where `MANT_W` is 32 by default. The `N - MANT_W` bits above it are headroom
for the left shifts of alignment.

`flp_seq` adds two such numbers using only array operations:

1. **Exponent difference.** It forms `ea − eb` in memory (NOT, write, ADD
   with carry-in 1) and reads the sign from OUT. If the difference is
   negative, it forms `eb − ea` the same way. The magnitude d is the
   alignment distance.
2. **Alignment.** It shifts the mantissa of the number with the larger
   exponent **left** by d. A shift longer than 31 takes several passes,
   with a write after each. The common exponent is the smaller one, and no
   bits are lost. If d is larger than the headroom, a left shift by d would
   overflow. In that case the larger mantissa is shifted left by the
   headroom only. The smaller mantissa is shifted right by the rest, as an
   arithmetic shift. The shifter fills with zeros, so a negative mantissa
   goes through NOT, logical right shift, NOT. The common exponent is then
   `e_large − headroom`. It is formed by writing the headroom into a scratch
   row through the bitline drivers and subtracting it in memory.
3. **Combine.** The modes are `A + B`, `A − B` (NOT, write, ADD with
   carry-in 1) and `A + |B|`. For `A + |B|` the sequencer reads B first and
   takes the NOT / carry-in path only if B is negative.
4. **Normalise.** The sequencer reads the result mantissa and finds its
   leading magnitude bit. It then shifts the mantissa in place so that this
   bit lands at `MANT_W-2`. A left shift is exact. A right shift is
   arithmetic and truncates towards minus infinity. The exponent is
   corrected by the shift amount with an in-memory add or subtract of a
   constant. A zero mantissa is left as it is.

The result may overwrite A, which is how accumulation works. One operation
takes roughly 30 to 60 cycles, depending on how many shift passes it needs.
Results are exact unless the normalising right shift or the large-gap right
shift drops set bits. The error is then below one unit in the last place of
the 31-bit normalised mantissa for each such shift.

## iM-Mean and iM-NearestNeighbor

`pn_ctrl` runs these two commands on the vectors held in its array. A vector
element is a slot. A vector of length D takes D consecutive slots.

* **MEAN**. Input: K = 2^k support vectors, stored one after another from
  `src_slot`. For each element, the sequencer copies the element of support
  0 to `dst_slot + j`. It then adds the element of each other support into
  it. Finally it subtracts k from the exponent: k is written into a scratch
  row through the bitline drivers, and the exponent becomes
  `e + NOT(k) + 1`. No division takes place. The only rounding is the
  truncation that normalisation may apply after each add.
* **NN**. Inputs: C prototypes stored one after another from `src_slot`,
  and a query at `dst_slot`. For each prototype and each element, the
  sequencer computes `q − p` (floating-point subtraction) and adds its
  absolute value to an accumulator. After the last element of a prototype,
  it subtracts the best distance so far from the new distance. If the
  mantissa of that difference is negative, the new distance becomes the
  best. At the end, `class_idx` names the nearest prototype (a tie goes to
  the lower index), and the best distance is in scratch slot `(M−12)/2`.

### Fixed-point mode

With `fix_pt` set (`cmd_fix_pt` at the top level), both commands work on
plain N-bit two's-complement integers. Each element is one row, and the
slot fields count rows.

* **MEAN** accumulates the K supports with add-and-write, then divides by K
  with a right shift of k bits while reading. The shifter fills with zeros,
  so a negative sum is shifted as NOT, shift right, NOT. The result is
  `floor(sum / K)`.
* **NN** forms `q − p` as NOT p, write, ADD with carry-in 1. A negative
  difference is inverted and added to the accumulator with carry-in 1; a
  positive one is added as it is. Distances are compared with the best by
  the same subtraction. The best distance is left in row M−12.

Nothing detects overflow: sums and distances must fit in N bits. With a
64-bit word this leaves plenty of room for embeddings of 20 to 30 bits.

### Scratch rows

The top 14 rows of each array are scratch space for the sequencers. Rows
0 .. M−15 are free for data: 25 slots in a 64-row array, or 50 fixed-point
elements.

### Handshake

`start` is accepted while `busy` is low. `done` pulses for one
cycle at the end. `err` is set if the command is unknown or a count is 0.
A rejected command does not run.

## Top level (`cim_pn_top`)

`NUM_ARRAYS` (default 4) arrays, each with its own `pn_ctrl`. The host port
works on the array chosen by `host_sel`:

* `host_wr` writes `host_wdata` into `host_row`.
* `host_rd` reads `host_row`. The data appears on `host_rdata` in the next
  cycle.
* `cmd_start` starts a command. With `cmd_bcast` set, the command starts on
  every array at once.

The host reaches an array only while that array's sequencer is idle. An
assertion checks this.

A typical episode:

1. Store the supports of class a in array a.
2. Broadcast MEAN, so all prototypes are computed in parallel.
3. Read the prototypes back and write them, together with the query, into
   one array.
4. Run NN on that array.

`tb/tb_cim_pn_top.sv` runs seven such episodes on floating-point data and
three on fixed-point data. Each is 4-way 4-shot with 4-element embeddings,
at the default parameters.

`tb/tb_pn_5way.sv` runs 5-way classification with 1, 2, 4 and 8 shots, the
settings prototypical networks are usually benchmarked with. The 8-shot
mean is built from five samples, three of them used twice, which is one way
to serve a 5-shot task with a power-of-two mean. It uses five arrays, one
per class. Its embeddings are cut to 5 elements in fixed point and 2 in
floating point, because a query and five prototypes must fit in one 64-row
array. The largest that fit are 8 and 4 elements. Real embeddings (64
elements for handwritten characters, 3200 for natural images) need bigger
arrays, or vectors split across arrays, which this design does not do.

## Simulating

All testbenches print `TB_RESULT checks=<n> failures=<n>` and stop on their
own. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cim_pkg.sv tb/tb_cim_pn_top.sv --top-module tb_cim_pn_top -o sim
./obj_dir/sim
```

Replace `tb_cim_pn_top` with `tb_<module>` to test a single block, or with
`tb_pn_5way` for the 5-way tasks. Each test runs in well under a second
once built.

## Where this departs from, or goes beyond, the published architecture

* **Logic-level model only.** The 6T cells, the precharged bitlines, the
  dynamic Manchester carry and the pass-transistor shifter are modelled by
  their logic function. Energy and the nanosecond latencies are not
  modelled.
* **Normalisation.** The published architecture normalises each result
  with in-memory adds and shifts but gives no target format. Here the
  target is the leading bit at `MANT_W-2`. The large-gap rule of alignment
  step 2 is also this design's own, as is the leading-bit search done in
  the sequencer.
* **The floating-point format is this design's own**, as described above.
* **Data layout.** How vectors are laid out over rows, columns and arrays is
  not published. Here one element is one slot (one row in fixed point),
  elements are processed one after another, and a whole vector sits in one
  array. A 64-row array therefore holds only 25 slots, or 50 fixed-point
  elements. Realistic workloads do not fit at the
  default size: 5-way classification of 64-element embeddings needs 384
  slots for NN alone. Moving data between arrays goes through the host.
* **Own choices.** These are all this design's own: the number of arrays,
  the opcode encoding, the micro-operation format, the scratch rows, the
  host port, the command set, the error flag and the tie rule. The same
  holds for the fixed-point format: one two's-complement row per element,
  with a mean that rounds towards minus infinity.
* **Extra opcodes.** AND and NAND are exposed as opcodes in addition to
  ADD, XOR, OR/READ and NOR/NOT, because the sense amplifiers produce them
  anyway.
* **Negative exponent difference.** When `ea − eb` comes out negative,
  the published method negates it (a two's-complement step). This design
  instead runs the subtraction again with the operands swapped. It costs the
  same micro-operations and needs no separate increment.
* **Subtraction takes a write cycle.** Subtraction is NOT, write, ADD with
  carry-in 1, so it takes three cycles. The published subtract latency is
  close to NOT plus ADD alone, which suggests the write is hidden in the
  circuit.
* **Outside the design.** The neural network that computes the embeddings
  and the host that moves data are not part of it.
