# Pass-pipelined JPEG2000 context modeler

JPEG2000 tier-1 coding (EBCOT) spends most of its time in *context
modeling*: every magnitude bit-plane of a code block is scanned three times,
by the significance propagation pass (SPP), the magnitude refinement pass
(MRP) and the cleanup pass (CUP). Each scan turns some of the samples into
context-data (CX-D) pairs for the MQ arithmetic coder. A straightforward
hardware coder handles one stripe column (four samples) per cycle, but runs
the three passes one after the other. It therefore needs three sweeps per
bit-plane.

This design runs all three passes **at the same time, on the same stripe, a
few columns apart**. One bit-plane then costs one sweep: one cycle per stripe
column, `CB_W * CB_H / 4` cycles for a 64 x 64 code block. In the worst
case 22 pairs come out in one cycle: 8 from SPP, 4 from MRP and 10 from CUP.

The RTL is SystemVerilog (IEEE 1800-2017). It has been checked pair by pair
against a sequential reference coder. That reference also serves as the
executable definition of what the hardware produces (see *Verification*).

## Block diagram

```
 coefficients ──► input_interface ──► dual_memory ──────────────► context_gen ──► prim_gen ──► SPP / MRP / CUP
 (valid/ready)    FIFO, sign/mag,     memories A/B +    rd data   7-column window  ZC SC MR RL   lane groups
                  write address,      data multiplexer     ▲      pass flags,      operators,    (out_ready)
                  bit-plane count           ▲              │      state memory,    lane packing
                                            └── cg_control ┘      line buffer
                                                addresses, tags
```

| module | role |
|---|---|
| `cm_top` | top level; wires the blocks together |
| `input_interface` | input FIFO (`input_fifo`) and sign/magnitude split (`sign_mag_gen`); writes the block into the free memory; counts its non-zero bit-planes |
| `dual_memory` | two code-block memories (A/B) with the data multiplexer; one is loaded while the other is coded |
| `cg_control` | context generator control unit; walks bit-plane, stripe and column, and issues one tagged stripe column per cycle |
| `context_gen` | process window, pass flags and state updates for the three passes; state memory and line buffer |
| `prim_gen` | primitive operators `zc_op`, `sc_op`, `mr_op` and `rlc_op`; packs the pairs of each pass into lanes |
| `sdp_ram` | generic synchronous RAM used for all memories |
| `cm_pkg` | shared types (`cxd_t`, `nbr_t`, `pass_info_t`, `col_tag_t`, `grp_tag_t`) and constants |

## How three passes can share one sweep

This is the part that needs the most care. In sequential coding, the passes
of bit-plane *p* happen in a strict order: all of SPP, then all of MRP, then
all of CUP. A sample's context depends on which of its neighbours are
significant *at the moment it is coded*. The pipelined design must reproduce
those moments exactly.

### The process window

Stripe columns enter a seven-column shift register, the window, at position
`j = 0`, and move one position per cycle. Each pass works on a fixed
position:

| position | holds column | done in this bit-plane when the pass looks at it |
|---|---|---|
| j = 0 | c+1 | nothing |
| **j = 1: SPP** | c | – |
| j = 2 | c−1 | SPP |
| **j = 3: MRP** | c−2 | SPP |
| j = 4 | c−3 | SPP, MRP |
| **j = 5: CUP** | c−4 | SPP, MRP |
| j = 6 | c−5 | SPP, MRP, CUP → written back |

Look at the column to the right of each pass (one column later in scan
order):

- SPP's right neighbour has not been touched yet in this bit-plane.
- MRP's right neighbour has already been through SPP.
- CUP's right neighbour has already been through SPP and MRP.

The column to the left (one column earlier) has always been through the
pass's own update. So every pass sees its horizontal neighbours exactly as
sequential coding would. Each pass updates its column in place as the column
moves on:

- **SPP** codes a sample that is still insignificant and has at least one
  significant neighbour. If the bit is 1, the sample becomes significant
  *immediately*. Rows further down the same column see this, so the four
  rows are evaluated as a ripple from top to bottom.
- **MRP** codes a sample that is significant and was not coded by SPP in
  this bit-plane. It then sets the refinement state σ′.
- **CUP** codes every sample that no earlier pass coded. A 1 makes the
  sample significant immediately, again as a ripple.

Per sample, the window holds the magnitude bit, the sign, σ, σ′, the
coding state η, and a "became significant in this CUP" bit.

### The stripe above

Row 0 is the bottom row of the previous stripe. It comes from a line buffer
with `CB_W` entries, written as each column leaves the window. Sequential
coding runs SPP and MRP of stripe *s* **before** CUP of stripe *s−1*, so
those two passes must not see significance that stripe *s−1* gained in its
cleanup pass. Each line-buffer entry therefore also stores a "became
significant in this bit-plane's CUP" bit. SPP and MRP mask row 0 with that
bit; CUP does not.

### The stripe below: vertically causal contexts

The row below the stripe is treated as insignificant. This is the
JPEG2000 *vertically causal context formation* code-block style. Without it,
MRP and CUP of stripe *s* would need SPP results of stripe *s+1*, which do
not exist yet when all passes are on stripe *s*. The output matches a
standard coder running with this style switched on. A decoder must be told
the style through the code-block style bits.

### State memory

The state memory keeps one word per stripe column with σ and σ′ for its four
samples. A word is read when its column is issued and written when the
column leaves the window. The coding state η lives only in the window,
because it is cleared for every bit-plane. The first coded bit-plane of a
block reads the state as zero, so nothing has to be cleared between blocks.
The same word is needed again one full bit-plane later, so read-after-write
is safe when `CB_W >= 16` (checked by an assertion).

## Pipeline and timing

Four stages: address issue (`cg_control`) → memory read (`dual_memory`,
state memory, line buffer) → context generation (window, registered pass
information) → primitive operators (registered lane groups). Suppose a
stripe column is issued in cycle *t*. Its SPP pairs appear in *t+4*, its MRP
pairs in *t+6* and its CUP pairs in *t+8*.

| quantity | value |
|---|---|
| coding rate | one stripe column per cycle, all three passes |
| one code block | `nbp * CB_W * CB_H / 4` cycles (`nbp` = non-zero bit-planes) |
| gap between blocks | 2 idle issue cycles |
| loading a block | `CB_W * CB_H` cycles, overlapped with coding the previous block |
| all-zero block | released without any coding cycles |

Coding starts at the most significant bit-plane that holds a 1. The input
interface finds it while the block is loading, by ORing all magnitudes
together.

## Interfaces

**Input.** `in_valid` / `in_ready` carry one coefficient per transfer.
`in_data` is `DATA_W`-bit two's complement. `in_band` gives the subband
(`0` LL, `1` HL, `2` LH, `3` HH) and is taken from the first sample of each
block. Samples arrive in raster order within a `CB_W x CB_H` code block,
block after block. The magnitude keeps the full `DATA_W` bits, so the most
negative value is coded exactly and there can be up to `DATA_W` bit-planes.

**Output.** There are three lane groups: `spp_*` (8 lanes), `mrp_*` (4
lanes) and `cup_*` (10 lanes). Each group has:

- a tag (`grp_tag_t`): `valid`, bit-plane `bp`, `pass_end` (last column of
  this pass in the bit-plane) and `cb_end` (also the block's last
  bit-plane);
- a count `*_n`;
- the pairs `*_cxd`. Each pair is `cxd_t`, a 5-bit context and 1 decision
  bit. The pairs are packed into lanes `0 .. n-1` in coding order.

A group is taken in every cycle where `out_ready` is high and its tag is
valid. When `out_ready` is low, the whole coding pipeline holds, including
the control unit and the memory reads. The input side keeps loading.

The three groups of one column leave at different times, and near a
bit-plane boundary SPP is already in bit-plane *p−1* while CUP is still in
*p*. An MQ coder that needs the sequential order (all SPP pairs, then all
MRP pairs, then all CUP pairs, per bit-plane) must therefore buffer per pass,
using the tags. Coders with one MQ state per pass can take the groups as
they come.

**Context labels.** The usual 19 labels are used:

| labels | used for |
|---|---|
| 0–8 | zero coding, by subband orientation |
| 9–13 | sign coding, with the XOR bit folded into the decision |
| 14 / 15 / 16 | refinement: first with no significant neighbour / first with a significant neighbour / later |
| 17 | run-length |
| 18 | uniform |

In the cleanup pass, a column goes into run mode when all four samples are
uncoded and have no significant neighbour. Run mode gives one RL pair. If
any of the four bits is 1, two UNI pairs follow with the row index, MSB
first. Then come the sign of that sample and normal coding of the rows below
it. That is where the 10-pair worst case comes from:

- interrupt on row 0: RL + 2 × UNI + SC = 4 pairs;
- the three rows below, each ZC + SC = 6 pairs.

## Parameters

| parameter | default | notes |
|---|---|---|
| `DATA_W` | 16 | coefficient width; also the magnitude width and the largest number of bit-planes |
| `CB_W`, `CB_H` | 64, 64 | code-block size, powers of two, `CB_W >= 16`, `CB_H` a multiple of 4 |
| `FIFO_DEPTH` | 16 | input FIFO, power of two |
| lanes | 8 / 4 / 10 | fixed by the algorithm (`cm_pkg`) |

Memory at the defaults:

- 2 × 4 banks × 1,024 × 17 bits for the code blocks;
- 1,024 × 8 bits for the state memory;
- 64 × 3 bits for the line buffer.

## Where this RTL departs from the published architecture, and its limits

- **Causal contexts.** The published neighbourhood sets include the row
  below the stripe. Here that row is always insignificant (see above). This
  is the main behavioural choice of this implementation.
- **Fixed block size.** Only full `CB_W x CB_H` blocks are coded. Smaller
  code blocks, such as small DWT subbands or image borders, and partial
  stripes are not supported. Padding them with zeros gives a valid
  bit-stream for the padded block, not for the small block.
- **Output format.** Three tagged lane groups with counts, and global
  back-pressure, are this implementation's choices. The original leaves the
  hand-off to the arithmetic coder open.
- **Own choices.** Also chosen here, where the original gives only the
  function:
  - the FIFO depth;
  - the four-bank memory organisation;
  - the A/B handshake;
  - the line buffer with its CUP mask;
  - the bit-plane count computed while loading;
  - the subband input;
  - the stage boundaries of the four-stage pipeline.
- **Not reproduced.** The FPGA figures reported for the original (slice
  counts, about 100 MHz on a Spartan-3, cycle counts for test images) have
  not been reproduced. No FPGA synthesis or timing was run. The longest
  logic path is the four-row ripple of a pass followed by the context
  tables.
- **Throughput.** At 100 MHz, a 640 x 480 grey frame (80 blocks) needs at
  most 80 × 16,387 ≈ 1.31 M cycles, about 76 frames/s, in the worst case of
  16 bit-planes in every block. The simulated synthetic frame of
  `cm_frame_tb` takes 432,298 cycles.

## Verification

`tb/cm_ref_pkg.sv` is a plain sequential model of tier-1 context modeling,
with vertically causal contexts. It codes a block bit-plane by bit-plane,
pass after pass, sample by sample. It takes its zero-coding and sign-coding
tables from explicit lookup code, written separately from the RTL operators.

| testbench | what it checks |
|---|---|
| `cm_top_tb` | six 64 x 64 blocks at the default parameters: sparse, all-zero, dense full-range (including −32768), mid-range and structured data, and one block built so that SPP, MRP and CUP emit 8 + 4 + 10 = 22 pairs in the same cycle, with random input gaps and random `out_ready`. Every pair of every pass is compared with the reference, as are the end-of-pass marks and the coding cycle count (`nbp * 1024` per block). It also counts that run mode, run interrupts, SPP/CUP significance, first and later refinement, output stalls, loading during coding, input back-pressure, an all-zero block and the 22-pair peak all occurred |
| `cm_frame_tb` | frame-rate workload: a synthetic 640 x 480 grey image, one-level Haar transform in the testbench, 80 code blocks of 64 x 64 (the bottom block row zero-padded), full input rate, no back-pressure. All 1.74 M pairs are compared with the reference. The frame takes 432,298 cycles (231 frames/s at 100 MHz, against 30 needed). Its blocks have 4 to 8 bit-planes |
| `context_gen_tb` | pass flags, run mode and per-sample neighbour counts of each pass against the reference, with stalls |
| `prim_gen_tb` | random pass information against table-built expected lanes, plus a directed 22-pair cycle |
| `zc_op_tb`, `sc_op_tb`, `mr_op_tb`, `rlc_op_tb` | exhaustive over their inputs |
| `input_fifo_tb`, `sign_mag_gen_tb`, `input_interface_tb`, `dual_memory_tb`, `cg_control_tb` | handshakes, addressing, ping-pong, sequencing and the one-column-per-cycle rate |

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Wno-lint -Wno-style -y rtl -y tb +libext+.sv \
    rtl/cm_pkg.sv tb/cm_ref_pkg.sv tb/cm_top_tb.sv --top-module cm_top_tb
./obj_dir/Vcm_top_tb
```

Testbenches that do not use the reference model (`input_fifo_tb`,
`sign_mag_gen_tb`, `input_interface_tb`, `dual_memory_tb`, `cg_control_tb`,
`mr_op_tb`, `rlc_op_tb`) do not need `tb/cm_ref_pkg.sv`. The end-to-end test
takes well under a minute.
