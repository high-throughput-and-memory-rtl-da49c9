# Scaled-parallel min-sum decoder for shift LDPC codes

This is a decoder for regular (c,t) LDPC codes of a special form, called
*shift LDPC* codes. It decodes a whole iteration in t clock cycles. Each
check row needs only a few bits of message storage. The main configuration
decodes an (8192, 7168) code of column weight 4 and row weight 32 with 20
iterations. It has 256 variable node processors and 1024 check node
processors, and stores 57 344 bits of check messages, which is less than
half of what a per-edge message memory would need.

Three ideas carry the design:

1. **The code structure makes the interconnect fixed.** The same fixed wires
   carry every message between variable and check processors. No switch or
   address is needed.
2. **Check processors pass their work along a ring.** A check processor always
   talks to the same variable processor. The partial results of the check
   rows travel from one check processor to its neighbour, one step per cycle.
3. **Min-sum compression.** A check row keeps only its minimum, its second
   minimum, the position of the minimum and the XOR of its signs. It also
   keeps a t-bit FIFO of the signs it received. It stores no per-edge
   messages.

## The code

The parity-check matrix H is made of c × t square sub-matrices (cells) of
size P × P. So N = t·P columns and M = c·P rows. Every cell is a permutation
matrix, with one 1 in each row and each column. Within a block row, the
leftmost cell is a free permutation. Each cell to its right is the cell
before it, moved up by one row with wrap-around. So if column x of block row
r has its 1 in row π_r(x) of the leftmost cell, then in block column j it has
its 1 in row

    row = (π_r(x) − j) mod P

Quasi-cyclic codes can be rewritten in this form.

This RTL fixes π_r to an affine permutation (`ldpc_pkg::perm`):

    π_r(x) = ((58·r + 7)·x + 53·r + 11) mod P

The multiplier 58·r + 7 is always odd, so π_r is a permutation whenever P is
a power of two. To use another code, replace `perm` with another permutation
(a lookup function of r and x). The ring and schedule logic do not depend on
it.

Default parameters of the top module `ldpc_decoder`:

| parameter | default | meaning |
|---|---|---|
| `P` | 256 | cell size = number of VPUs = CPUs per ring |
| `C` | 4 | column weight = block rows = number of CPU rings |
| `T` | 32 | row weight = block columns = cycles per iteration (at most 32) |
| `ITER` | 20 | iterations per codeword |

## Schedule: one block column per cycle

In step j (0 … t−1) of an iteration, all P variable node processors (VPUs)
work on block column j. VPU x handles column j·P + x. In that step it:

- reads the column's channel value from its own small memory;
- receives the column's c check-to-variable messages, one per block row;
- sends the column's c variable-to-check messages, one to one check node
  processor (CPU) in each block row.

After t steps every edge of H has been visited once, so one iteration takes
t cycles. Variable and check updates overlap:

- in iteration n, the VPUs use the check messages that iteration n−1
  produced;
- in the same cycles, the CPUs build the records for iteration n.

## Why the wiring is fixed: the CPU rings

Each block row has a ring of P CPUs (`cpu_ring`). VPU x is wired for good to
CPU k = π_r(x) of ring r. In step j its edge in that block row belongs to
row k − j. The row changes every step, but the CPU does not.

The rows move instead of the messages:

- CPU k works on row k − j in step j.
- It takes that row's running record from CPU k−1 and folds in the message
  from its VPU.
- It writes the result to its `Reg_new`. CPU k+1 reads it in the next cycle,
  when CPU k+1 works on row (k+1) − (j+1), the same row.

After the t steps of an iteration, CPU k's `Reg_new` holds the complete
record of row k − (t−1). Every link between CPUs joins neighbours.

### Records and the transfer

The record is 12 bits (`ldpc_pkg::crec_t`):

| field | bits |
|---|---|
| minimum magnitude | 3 |
| second minimum | 3 |
| index of the minimum (block column) | 5 |
| XOR of all signs | 1 |

In the last step of an iteration, the record written into `Reg_new` is
written into `Reg_old` in the same clock edge. This is the transfer after
each iteration. During the next iteration the `Reg_old` registers shift
around the ring in the same way as the `Reg_new` registers.

### Where a VPU's check message comes from

This is the least obvious part of the design. Part 2 of CPU k reads the old
record of CPU k−1. In step j that register holds row k − t − j. So CPU k
produces the check-to-variable message for the VPU that is wired *forward*
to CPU k − t. The return path is therefore also a fixed permutation:

- VPU x receives its message of block row r from CPU π_r(x) + t (mod P).
- The sign of VPU x's outgoing message is also wired to the sign FIFO of
  CPU π_r(x) + t, next to the old record it will be combined with.

`shuffle_network` holds both directions: C·P message bundles of 4 bits
forward, the same number back, and C·P sign wires.

If the CPUs are laid out 31 per row, CPU k and CPU k+t = k+32 are
diagonal neighbours, so these wires also stay short.

### The sign FIFO

The message magnitude for an edge comes from the row's old record. It is the
second minimum if the edge's block column equals the stored index, and the
minimum otherwise. The sign also needs the sign that edge carried in the
previous iteration. Each CPU therefore has a t-deep, 1-bit shift register
(`sign_fifo`). It pushes a sign in every step and pops the sign pushed t
steps earlier, which is the same edge one iteration back. The message sign
is the record's sign XOR that popped bit.

Storage per check row is 12 (`Reg_new`) + 12 (`Reg_old`) + 32 (FIFO) = 56
bits. For 1024 rows that is 57 344 bits. A memory that keeps every 4-bit
message per edge would need 8192·4·4 = 131 072 bits.

## Number formats and the VPU

Messages are 4-bit sign-magnitude words (sign + 3-bit magnitude). The
channel values use the same format.

The VPU (`vpu`) works as follows:

1. Converts its c inputs and the channel value to two's complement (StoT).
2. Adds them into an exact 9-bit total.
3. For each block row r, forms the extrinsic value `total − R_r`, saturated
   to ±31 (6 bits).
4. Converts it to sign-magnitude (TtoS).
5. Scales the magnitude by α = 3/4, truncating and saturating at 7 (Scale).

The hard decision is the sign of the total (1 = negative).

The check update uses the modified min-sum rule, which multiplies the
minimum by α. Because the CPU only takes minima, scaling the
variable-to-check messages before the minimum gives the same result. So
the CPUs need no multiplier.

With c ≤ 4 an extrinsic value is at most 1 + 3 terms of magnitude 7 = 28, so
the 6-bit saturation never acts. It is there for larger c.

α and its rounding are set in `ldpc_pkg` (`ALPHA_NUM`, `ALPHA_SHIFT`).

## Interface and timing of `ldpc_decoder`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (controller only) |
| `in_valid` / `in_ready` | in / out | 1 | handshake for loading one block column |
| `in_llr` | in | P × `msg_t` | channel values of the block column being loaded; entry x is column j·P + x |
| `out_valid` | out | 1 | hard decisions valid (last iteration) |
| `out_col` | out | 5 | block column of `out_bits` |
| `out_bits` | out | P | hard decisions, bit x = column `out_col`·P + x |
| `done` | out | 1 | pulses with the last decision column |

A codeword goes through these phases:

- **Load:** t accepted beats, block columns 0 … t−1 in order. `in_valid` may
  have gaps. While loading, all `Reg_old` records are zero, so the first
  iteration sees zero check messages.
- **Decode:** exactly ITER·t cycles. Step 0 is in the cycle after the last
  load beat.
- **Output:** in step j of the last iteration, `out_valid` is high and
  `out_bits` holds the decisions for block column j.
- **Next codeword:** the decoder accepts one in the cycle after `done`.

One codeword therefore takes (ITER+1)·t cycles. At the default sizes that is
672 cycles for 8192 bits, or 12.2 bits per cycle. At 200 MHz this is
2.44 Gbit/s. Overlapping the load with decoding would give t·ITER cycles per
codeword instead. That would need a second bank in each channel memory,
which this RTL does not have.

Each step is one combinational path followed by `Reg_new`:

    channel memory → VPU adders → Scale → shuffle wires → CPU compare → Reg_new

The return path (old record → Part 2 → VPU) is in series ahead of it, in the
same cycle. No pipeline registers are inserted.

Only `decode_ctrl` is reset. The CPU registers need no reset: `Reg_new` is
ignored in step 0, `Reg_old` is cleared while loading, and the FIFO contents
only matter after one full iteration. The channel memory is written before
it is read.

## Module map (`rtl/`)

| module | role |
|---|---|
| `ldpc_pkg` | message and record types, StoT / TtoS / Scale functions, α, the code permutation |
| `ldpc_decoder` | top: controller, P VPUs, shuffle network, C CPU rings |
| `decode_ctrl` | load / run sequencing, step counter, first / last / clear / decision-valid strobes |
| `vpu` | variable node processor with its `channel_memory` |
| `channel_memory` | t × 4-bit register file, synchronous write, asynchronous read |
| `shuffle_network` | fixed forward and return wiring |
| `cpu_ring` | P CPUs of one block row, `Reg_new` and `Reg_old` rings |
| `cpu` | one check node processor: part 1, part 2, part 3, `Reg_new`, `Reg_old` |
| `cpu_check_update` | part 1: compare with min / 2nd min, index set, sign XOR |
| `cpu_msg_out` | part 2: min / 2nd min select by index, sign XOR with popped sign |
| `sign_fifo` | part 3: t-bit sign shift register |

## Choices made in this RTL

The structure follows the published architecture: the schedule, the rings,
the register map, the three CPU parts and the VPU data path. The following
points are this design's own choices:

- **The code permutation π_r.** It is affine rather than random.
- **Start of a check row.** In step 0 a CPU ignores its neighbour and starts
  from minima of 7, index 0, sign 0.
- **Ties.** Ties in the minimum keep the earlier index.
- **Return wiring.** The offset of +t was derived above. It places each
  VPU's return message and FIFO sign at CPU π_r(x)+t, not at the CPU its
  message goes to.
- **VPU arithmetic.** The adders are exact. The extrinsic value saturates at
  ±31. α = 3/4, with truncation.
- **Channel values.** They are 4-bit sign-magnitude.
- **Control and interface.** The load interface and decision output, the
  non-overlapped load, the fixed iteration count (no early stop) and the
  reset scheme are all choices of this RTL.

Not covered by the RTL: the physical implementation (0.18 µm, 4 mm × 4 mm,
31 CPUs per placement row) and the 200 MHz clock target.

## Verification (`tb/`)

Every module has a self-checking testbench that prints
`TB_RESULT checks=… failures=…` and has a watchdog.

- **Unit tests.** Each unit is checked against an integer model written
  separately: random vectors for parts 1 and 2 and the VPU; queue models
  for the FIFO and memory; a cycle model for one CPU.
- **Ring and wiring.** `tb_cpu_ring` runs a ring of 8 CPUs for four
  iterations. It checks the records after each iteration and every returned
  message against records computed from the row contents. `tb_shuffle_network`
  checks both permutations.
- **End to end.** `ldpc_ref_pkg` is an edge-level flooding min-sum decoder
  working directly on H with the same number formats. It shares no code with
  the RTL. The end-to-end tests compare every hard decision with it
  bit-exactly, and check the cycle counts of loading, decoding and output.
  They also count how often each mechanism fired: transfers,
  second-minimum selections, scale saturation, negative messages, load
  stalls and corrected errors.

| testbench | configuration |
|---|---|
| `tb_ldpc_decoder` | P=16, c=3, t=6, 3 iterations, 6 codewords with load stalls |
| `tb_ldpc_decoder_small_code` | a (12,8) (2,3) code (P=4, c=2, t=3, from the permutation above), 5 iterations, 12 codewords |
| `tb_ldpc_decoder_full` | all defaults: (8192,7168) code, 20 iterations, 3 codewords at a 1 % channel error rate; all channel errors are corrected and every decision matches the reference |

To run a testbench with Verilator, from the directory that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv tb/tb_ldpc_decoder_full.sv \
        --top-module tb_ldpc_decoder_full -o sim
    ./obj_dir/sim

For the unit testbenches, leave out `tb/ldpc_ref_pkg.sv` and change the top
module name. The full-size decoder builds in about a minute and simulates in
under a second. Synthesised, it has about 57 k flip-flops (the message
storage above plus 11 controller bits) and 32 768 bits of channel memory.
