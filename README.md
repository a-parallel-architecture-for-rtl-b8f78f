# Parallel radix-2 Fast Hartley Transform / real-valued FFT processor

This is a fixed-point processor for the N-point discrete Hartley transform (DHT)
of a block of real samples,

    H[k] = sum_n x[n] * (cos(2*pi*n*k/N) + sin(2*pi*n*k/N)),

and, in a second mode, for the real-valued FFT of the same block,

    F(k) = sum_n x[n] * exp(-2*pi*i*n*k/N).

The two transforms are treated as one algorithm with two versions. They share
the data flow, the addressing and the twiddle factors. They differ only in the
butterflies that need no multiplication and in where the results end up.

The default build does 1024 points on 8 processor blocks with 16-bit data and
16-bit coefficients. One transform takes 390 cycles of computation, plus 1024
cycles to load the samples and 1024 cycles to read out the results.

The main idea is to run every stage of the radix-2 transform on the same
physical stage of processor blocks. The blocks are wired as an *indirect binary
hypercube*, so results always flow from a block to the same two neighbours.
All addresses and coefficients needed per stage can then be made by one
control unit and broadcast to all blocks in SIMD fashion.

## The butterfly on PN pairs

A radix-2 FHT butterfly at stage `s` (block length `L = 2^s`) combines the two
half-length transforms `X0` and `X1` at four indices: `k`, `L/2-k`, `L/2+k` and
`L-k`. The terms `X1(k)` and `X1(L/2-k)` both feed every output through the
same `cos` and `sin` of `2*pi*k/L`. The basic operation is therefore a *double
butterfly* on two pairs of values, each pair holding a "positive" and a
"negative" index (a *PN pair*).

- At the input, a pair holds index `k` (P) and `L/2-k` (N).
- At the output, a pair holds `k` and `L-k`.

Each processor element handles one double butterfly per cycle. It reads two PN
pairs `a` and `b` and writes two PN pairs.

There are three kinds of double butterfly:

| kind | where | operation |
|---|---|---|
| preliminary | stage 1 | two independent 2-point butterflies, `(aP+aN, aP-aN)` and `(bP+bN, bP-bN)` |
| type A | `k = 0` (and all of stage 2) | no multiplication: `out0 = (aP+bP, aP-bP)`, `out1 = (aN+bN, aN-bN)` |
| type B | `k != 0` | `t1 = c*bP + s*bN`, `t2 = c*bN - s*bP`; `out0 = (aP+t1, aN+t2)`, `out1 = (aN-t2, aP-t1)` |

In the RFFT version, type A becomes `out0 = (aP+bP, aP-bP)`, `out1 = (aN, -bN)`.
Type B stays the same. Nothing else changes.

### Pair identifiers

Every pair carries an implicit identifier of `m = log2(N) - 1` bits. It is
never stored; it is the pair's place in the array and the address it sits at.

- Of the two indices `{k, L-k}` of a pair, exactly one has the form `0` or
  `(4p+3)*2^q`. Call it the *D member*; the other, `(4p+1)*2^q`, is the *C
  member*.
- Remove the lowest `1` bit from the D member (`d_reduce`). Then bit-reverse
  what remains. This gives the *K field*, which names the twiddle.
- The bits above the K field (the *S field*) say which sub-transform the pair
  belongs to.

With this naming, the butterfly between stages is a **perfect shuffle** of
the identifiers: butterfly `j` reads the pairs with identifiers `{0,j}` and
`{1,j}`, and writes `{j,0}` and `{j,1}`.

The helper functions are in `fht_pkg`:

- `d_reduce`, `d_expand` and `bit_reverse` convert between indices and
  identifiers.
- `twiddle_k` gives the twiddle index `k` of butterfly `j` at stage `s`:
  - `d = d_expand(bit_reverse(j mod 2^(s-2), s-2))`;
  - `k = d` if `d < L/4`, otherwise `L/2 - d`;
  - the angle is `2*pi*k/2^s`.
- A butterfly is type A exactly when the low `s-2` bits of `j` are zero.
- From stage 3 on, the two outputs of the butterfly swap places when the
  block's number is odd (bit 0 of the identifier). This keeps every pair
  at the position the perfect shuffle expects.

For example, after the last stage of a 16-point transform (3-bit
identifiers) on 4 blocks, the eight result pairs sit as follows. Block and
address are taken from the identifier as described in the next section.

| pair `{k, N-k}` | D member | D member, lowest 1 removed | identifier | block | address |
|---|---|---|---|---|---|
| {0, 8} | 0 | 000 | 000 | 0 | 0 |
| {1, 15} | 15 | 111 | 111 | 3 | 1 |
| {2, 14} | 14 | 110 | 011 | 3 | 0 |
| {3, 13} | 3 | 001 | 100 | 0 | 1 |
| {4, 12} | 12 | 100 | 001 | 1 | 0 |
| {5, 11} | 11 | 101 | 101 | 1 | 1 |
| {6, 10} | 6 | 010 | 010 | 2 | 0 |
| {7, 9} | 7 | 011 | 110 | 2 | 1 |

## Mapping onto the processor array

Let `M = log2 N`, `N1 = log2 N_PB` and `N2 = M - 1 - N1`. Then:

- each block keeps `2^N2` pairs;
- each block runs `B = 2^(N2-1)` butterflies per stage.

The pair with identifier `i` lives in block `i mod N_PB` at local address
`i >> N1`.

Working the shuffle through this split gives a fixed wiring:

- Block `p` reads its local pairs `{0,r}` and `{1,r}` (`r = 0..B-1`).
- It sends output `c` (0 or 1) to block `(2p+c) mod N_PB`, at local address
  `{r, p[N1-1]}`.
- Seen from the receiving side, block `q` takes
  - output `q mod 2` of block `q/2` on link 0;
  - the same output of block `q/2 + N_PB/2` on link 1.

This is the indirect binary hypercube (`fht_processor`, generate loop
`g_pb`). There is no switch to configure. Because every block uses the same
local addresses in the same cycle, one address stream serves the whole array.

### Processor block (`fht_pb`)

Each block holds:

- one processor element (`fht_pe`);
- two dual-port data memories (`fht_dual_port_ram`) of `2^N2` PN pairs each;
- one coefficient table (`fht_clut`).

The two memories work as a ping-pong pair. In odd stages memory 0 is read and
memory 1 is written; in even stages the roles swap.

- The source memory reads two pairs per cycle, one on each port.
- The destination memory writes the pair arriving on link 0 through port A
  and the pair on link 1 through port B.

Loading and unloading use port A only.

### Processor element (`fht_pe`)

The processor element is a 5-register pipeline:

1. block-floating-point pre-shift, with round-to-nearest;
2. the four products;
3. sum of the products and rounding to `DATA_W` bits (`t1`, `t2`);
4. add and subtract;
5. output order, including the swap.

Add the memory read in front and the memory write after, and a butterfly
takes the 7 cycles of the pipeline length `PIPE_LEN` in `fht_pkg`. The PE
accepts a new double butterfly every cycle.

### Coefficient table (`fht_clut`)

Each block has its own table. The table gives, per butterfly:

- the cos/sin pair, with `COEF_W-1` fraction bits and rounded to nearest;
- the butterfly kind;
- the swap bit.

Stages are split by how many distinct twiddles a block sees in them:

- **Stages 1 and 2** need no coefficients.
- **Low stages** (3 to `N1+2`): the K field lies entirely in the block
  number. A block then needs one coefficient pair per stage, addressed by
  the stage number.
- **High stages** (`N1+2+h`, `h = 1..N2-1`): the K field reaches into the
  local address, and high stage `h` needs `2^h` pairs. The table stores only
  the `2^(N2-1)` pairs of the last stage. High stage `h` reads entry
  `r mod 2^h`. This works because the angle `2*pi*k/L` of butterfly `r` in
  high stage `h` equals the angle of butterfly `r` in the last stage for
  every `r < 2^h`. Going one stage up doubles both `L` and `k`, and adds new
  angles only at the higher addresses.

The contents are computed at elaboration time from `$cos`/`$sin`. No table
file is read.

## Control unit and timing (`fht_control`)

One control unit drives all blocks. It moves through three phases.

**Load.** Sample `n` arrives in natural order, one per cycle. It goes to the
pair whose identifier is the one-bit right rotation of `n mod N/2`. The half
of the pair (P or N) is set by the top bit of `n`. The `in_rfft` bit sampled
with the first sample selects the transform version for the whole block.

**Compute.** There are `M` stages. Each stage issues `B` butterflies, one per
cycle, then waits for the pipeline to drain:

- the read address is issued at cycle `t`;
- the result is written at cycle `t+6`;
- one spare cycle separates the stages.

A stage therefore lasts `B + 7` cycles, and the transform lasts

    M * (2^(N2-1) + 7) cycles   (= 10 * (32 + 7) = 390 at the defaults).

The waiting cost is 7 cycles per stage. In return there are no read-after-write
hazards between stages.

**Unload.** Index `k` is read in natural order, one per cycle. The control unit
maps `k` back to the block, the address, the half of the pair and a possible
negation (`out_pair_id` in `fht_pkg`).

- **FHT:** each pair holds `H[k']` and `H[N-k']`. The N half is used when
  `k > N/2`.
- **RFFT:** index `k <= N/2` carries `Re F(k)` and index `N-k` carries
  `Im F(k)`. For `0 < k < N/2` the pair of `{k, N-k}` holds, in its
  (P, N) halves, `(Re F(k), Im F(k))` when `k` is a C member and
  `(-Im F(k), Re F(k))` when `k` is a D member. The unload path undoes both
  the order and the sign.

### Block floating point

After every butterfly, each PE raises two flags:

- `big1`: some output has `|y| >= 2^(DATA_W-3)`;
- `big2`: some output has `|y| >= 2^(DATA_W-2)`.

The control unit ORs the flags over all blocks and the whole stage. It then
shifts the next stage's inputs right by 2 (if any `big2`), by 1 (if any
`big1`), or not at all, and adds the shift to a common exponent.

The samples being loaded set the first stage's shift in the same way. The
gain of one double butterfly is at most `1 + sqrt(2) < 4`, so a value shifted
this way cannot overflow. The PE checks that with an assertion.

Every result comes out as `out_data * 2^out_exp`.

## Interface of `fht_processor`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `in_valid`, `in_ready` | in/out | 1 | sample handshake; `in_ready` is high only during load |
| `in_data` | in | `DATA_W` | real sample, two's complement |
| `in_rfft` | in | 1 | 0 = DHT, 1 = real FFT; sampled with the first sample |
| `out_valid` | out | 1 | one result per cycle, no back-pressure |
| `out_index` | out | `M` | index `k` of the result (natural order) |
| `out_data` | out | `DATA_W` | mantissa of the result |
| `out_exp` | out | `clog2(2M+1)` | common exponent of the block |
| `busy` | out | 1 | a transform is in progress |
| `done` | out | 1 | pulses after the last result; the next block may be loaded |

| parameter | default | meaning |
|---|---|---|
| `N_POINTS` | 1024 | transform length, a power of two |
| `N_PB` | 8 | number of processor blocks, a power of two, `2 <= N_PB <= N_POINTS/4` |
| `DATA_W` | 16 | data width |
| `COEF_W` | 16 | coefficient width (`COEF_W-1` fraction bits) |

`N_PB = N_POINTS/4` is the maximally parallel case, with one butterfly per
block and stage and no high stages; `tb_fht_processor_16pt` runs it at 16
points on 4 blocks.

## Where this design departs from the original architecture, or fills gaps

The following follow the original description:

- the structure: SIMD processor blocks with one PE and two dual-port memories
  each, a per-block coefficient table split into low and high stages, the
  indirect hypercube, and one control unit;
- the 7-cycle pipeline;
- the stage timing `M(2^(N2-1)+7)`;
- the PN-pair butterflies;
- the identifier arithmetic;
- the two transform versions.

The following are this design's own choices:

- **Sizes.** The source fixes no data width, coefficient width, transform
  length or array size for the main configuration. 1024 points, 8 blocks and
  16/16 bits are chosen here.
- **Low-stage numbering.** The first two stages need no coefficients, so the
  "low stages" are stages 3 to `N1+2` rather than the first `N1`.
- **Pipeline split.** The split of the 7 pipeline cycles into memory read,
  five PE registers and memory write is chosen here; only the count is given.
- **Arithmetic.** Block floating point is part of the original, but its rule
  is not given. The scaling rule, the rounding of products and coefficients,
  and the flag thresholds are chosen here.
- **RFFT placement.** The output packing, with `Re F(k)` at index `k` and
  `Im F(k)` at index `N-k`, follows the original. Where each value sits
  inside the pairs after the last stage (the D/C rule above) was derived
  here and checked against a direct DFT. The sign convention is the usual
  forward kernel `exp(-i*2*pi*n*k/N)`, which is what the original's
  `k = 0` butterfly equations imply.
- **Host interface.** The load/unload protocol, the natural-order input and
  output, and the load address rotation are chosen here.
- **Throughput.** The original rates the array at `N / L` samples per cycle,
  which assumes samples enter and results leave without stopping it. Here
  the host interface loads and unloads one sample per cycle while the array
  waits, so a 1024-point transform takes 2439 cycles from the first sample
  to the last result. A faster host interface would need wider load/unload
  ports; the array itself would not change.
- **Stage overlap.** There is none: a stage waits for the previous one to
  drain, exactly as the cycle formula implies.

## Accuracy

The testbenches compare against a double-precision DHT or DFT of the same
input, scaled by `2^-out_exp`. They accept an error of `4 + sqrt(N)` output
LSBs per value.

The inputs tested are a single impulse, random noise at three amplitudes
(small, a quarter of full scale, full scale), a constant and a full-scale
alternating-sign sequence. The largest errors seen are about 7 LSBs at 64
points and about 20 LSBs at 1024 points, both on random noise. The error
grows with the number of stages, since each stage rounds once in the
pre-shift and once after the multiplication.

Besides the three sizes in the testbenches, the end-to-end testbench has
also passed at:

- 32 and 128 points on 2 blocks;
- 128 points on 4 blocks;
- 64 points on 16 blocks (maximally parallel);
- 256 points on 16 blocks and 512 points on 32 blocks;
- 12-bit data.

With 24-bit data and 16-bit coefficients the errors grow to about 36 LSBs.
At that point the twiddle precision limits the accuracy. With 24-bit
coefficients the same test stays within a few LSBs. Keep `COEF_W >= DATA_W`
for full accuracy.

## Files

| file | contents |
|---|---|
| `rtl/fht_pkg.sv` | types (`pe_op_t`), pipeline length, identifier and twiddle functions |
| `rtl/fht_processor.sv` | top: array of blocks, hypercube wiring, output multiplexer |
| `rtl/fht_pb.sv` | processor block: PE, two memories, CLUT, memory port steering |
| `rtl/fht_pe.sv` | 5-register double butterfly with block-floating-point pre-shift |
| `rtl/fht_dual_port_ram.sv` | true dual-port pair memory with half-word write enables |
| `rtl/fht_clut.sv` | per-block coefficient/op table, computed at elaboration |
| `rtl/fht_control.sv` | load / compute / unload sequencer, addresses, exponent |
| `tb/tb_fht_common.svh` | reference DHT and DFT, test input generator |
| `tb/tb_fht_processor.sv` | 64 points on 4 blocks, both versions, six input kinds, latency and mechanism counts |
| `tb/tb_fht_processor_full.sv` | default build (1024 points, 8 blocks), both versions |
| `tb/tb_fht_processor_16pt.sv` | 16 points on 4 blocks |
| `tb/tb_fht_pe.sv` | PE against a bit-exact integer model, all four modes, latency 5 |
| `tb/tb_fht_dual_port_ram.sv` | memory against a behavioural model |
| `tb/tb_fht_clut.sv` | every table entry against a brute-force twiddle search |
| `tb/tb_fht_pb.sv` | one block through several stages, link writes and read-back |
| `tb/tb_fht_control.sv` | all address, CLUT and unload sequences against an independent model |

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

The end-to-end testbench also counts how often each mechanism occurs. It
fails if any of these never happens:

- preliminary, type A, RFFT type A and type B butterflies;
- swapped outputs;
- cross-block transfers;
- each of the three pre-shift amounts.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl \
        rtl/fht_pkg.sv tb/tb_fht_processor.sv --top-module tb_fht_processor \
        -Mdir obj_tb -o sim
    ./obj_tb/sim

Run the command from the directory that holds `rtl/` and `tb/`. Replace
`tb_fht_processor` with any other testbench name. Every testbench builds
without warnings and finishes in well under a second of simulation, the
full-size one included. Compiling takes longer than running.

To try another configuration, change the localparams `N`, `NPB` and `DW` at
the top of `tb_fht_processor.sv`. They map to the processor's `N_POINTS`,
`N_PB` and `DATA_W`, which are free within the limits given above; add
`.COEF_W(...)` to the instance to change the coefficient width.
