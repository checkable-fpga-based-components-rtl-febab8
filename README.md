# Checkable LUT-based array multiplier

A safety-related controller spends years in a *normal* mode in which its
inputs barely move, and then must work perfectly the moment an *emergency*
begins. In an SRAM-based FPGA this is a trap. Each 4-input LUT unit is a
16-bit memory read through a tree of 2:1 multiplexers. A memory bit, or the
multiplexer path to it, that only emergency-range inputs ever address can be
faulty for years without producing a single wrong result. The configuration
checksum does not help: the stored code is intact, and only the read path or
one cell is broken. Such *hidden faults* pile up and then all show at once
when the emergency starts.

This design is an unsigned N x N iterative array multiplier built from
explicit 4-LUT units that can run on a sequence of **program-code
versions**. A version stores the same logic function at other memory
positions. Normal-mode inputs then read cells and multiplexer paths they never
reach in the original layout, so a fault there shows as a wrong product while
the plant is still in normal mode. The multiplier is the example circuit.
The mechanism itself, a version register, modulo-two adders on the inputs and
versioned LUT codes, fits any LUT netlist.

## Versions of a LUT program code

A 4-LUT unit with inputs D C B A outputs bit `x = {d,c,b,a}` of its 16-bit
code. Suppose some of its inputs arrive inverted, marked by a 4-bit mask `v`.
Then the unit still computes the same function if its code is stored
*relocated*:

    code_v[x] = orig[x ^ v]

The original bit at address `y` now sits at physical position `y ^ v`. To
move a bit from position `y` to position `y'`, use version `v = y ^ y'`. For
example, version `E` moves the original bit 3 to position D.

An input can only arrive inverted if the unit that drives it is inverted. A
LUT unit that stores its whole code complemented outputs the inverse of its
function. Every unit it feeds takes the matching version bit for that input.
Such a driver is called the *first unit of a pair* and the unit it feeds the
*second unit*. In general:

    code[x] = inv ^ orig[x ^ v]

Here `inv` says whether the unit itself is inverted. Bit k of `v` says whether
the unit or circuit input that drives input k is inverted.

Two rules bound what versions can do:

* A unit whose output is a product bit cannot be inverted, because nothing
  after it compensates. The controller drops such units from the inversion
  mask.
* An input wired straight to a circuit input cannot be inverted, so it halves
  the versions available to the unit. In an array multiplier every element
  reads one operand bit from each factor, so this would lock the A and B
  inputs of all units.

The second rule is why the design puts **2N modulo-two adders** in front of
the array. Each operand bit is XORed with one bit of a **2N-bit version
shift register** before it enters the array. With the register at zero the
circuit is exactly the original multiplier. A one in register bit `j` inverts
`a_j` (bit `N+i` inverts `b_i`). Every unit reading that operand bit then
takes a version for it, so all four inputs of every array unit can be
versioned.

A *version of the project* is therefore a pair:

* `reg_code` (2N bits): which operand bits are inverted at the adders.
* `inv_mask` (2N² bits): which LUT units are stored inverted.

The choice of versions is made offline. For each unit you find the memory
positions that normal-mode inputs address and those addressed only in
emergency. You then pick versions that move each emergency-only bit onto a
normal-mode position. The design applies whatever pairs it is given and does
not choose them.

## The array

Element (i, j) sits in row i (multiplier bit `b_i`) and column j
(multiplicand bit `a_j`). It adds the partial product `a_j & b_i` to a sum bit
and a carry bit. Each element is two LUT units with the same four inputs:

| LUT input | signal                                                        |
|-----------|---------------------------------------------------------------|
| A         | `a_j` (after its modulo-two adder)                            |
| B         | `b_i` (after its modulo-two adder)                            |
| C         | sum of element (i-1, j+1); carry of element (i-1, N-1) when j = N-1; 0 in row 0 |
| D         | carry of element (i, j-1); 0 when j = 0                       |

The sum unit stores `(a&b) ^ c ^ d` and the carry unit stores
`maj(a&b, c, d)`. Row i delivers product bit `p_i` from element (i, 0). The
last row delivers `p[2N-1:N]` from its sums in columns 1..N-1 and its final
carry. LUT unit `2*(i*N+j)` is the sum unit of element (i, j), and the next
index is its carry unit. That gives 2N² units, 128 at N = 8. Each row is a
ripple of N elements, so the longest path runs through 3N-2 elements.

The units that drive product outputs, and so are never inverted, are:

* the sum units of column 0;
* the sum units of row N-1;
* the carry unit of element (N-1, N-1).

## Running on a sequence of versions

`version_sequencer` holds a table of K = 16 versions, written by a host
through `tbl_we`, `tbl_addr`, `tbl_reg_code` and `tbl_inv_mask`. The first
`seq_len` entries form a repeating sequence. The sequencer moves to the next
entry in two ways:

* on a one-cycle `seq_step` pulse;
* on its own, once the current version has been in use for `seq_dwell`
  cycles, when `seq_dwell` is not zero.

After the last entry it wraps to entry 0. A step that arrives while a change
is in progress is dropped. `seq_entry` shows the entry in use.

This is how the component spends its normal mode cycling through versions,
instead of waiting for the plant's inputs to wander.

## Changing a version

`version_controller` applies a version when the sequencer sends it a
one-cycle request:

1. It latches `reg_code` and `inv_mask`, and clears the output units from the
   mask.
2. For 2N cycles it shifts `reg_code` into the version register, most
   significant bit first.
3. For 2N² cycles it writes one LUT unit per cycle, in index order, with
   `inv ^ orig[x ^ v]`. It derives `v` for each unit from the register code
   and from the mask bits of the units that drive the unit's C and D inputs.

Count from the clock edge that samples `seq_step`. `p_valid` goes low at
the next edge. It rises again 2N + 2N² + 2 edges after that sampling edge,
which is 146 cycles at N = 8. In between, the
register and the LUT memories disagree and the product must be ignored. After
reset the controller loads the original version (both codes zero) on its
own. `p_valid` first rises 2N + 2N² edges after reset is released. A request
made while busy is ignored.

Each stage adds one cycle. The sequencer registers the request, so the
controller sees it one edge after the step. The controller then needs one
more edge to latch the codes before shifting.

The product is combinational from `a` and `b`. Its delay is one LUT level for
the adders plus the array.

## Top-level interface (`checkable_multiplier`, parameters `N` = 8, `K` = 16)

| port           | dir | width | meaning                                          |
|----------------|-----|-------|--------------------------------------------------|
| `clk`          | in  | 1     | register shifts and LUT configuration writes     |
| `rst_n`        | in  | 1     | asynchronous, active low                         |
| `a`, `b`       | in  | N     | unsigned factors                                 |
| `p`            | out | 2N    | `a * b`                                          |
| `p_valid`      | out | 1     | a complete, consistent version is loaded         |
| `tbl_we`       | in  | 1     | write one version table entry                    |
| `tbl_addr`     | in  | log2 K | entry to write                                  |
| `tbl_reg_code` | in  | 2N    | register code: bit j → `a_j`, bit N+i → `b_i`    |
| `tbl_inv_mask` | in  | 2N²   | inverted LUT units; output units are ignored     |
| `seq_len`      | in  | log2(K+1) | entries in the sequence (0: stay on the original version) |
| `seq_step`     | in  | 1     | go to the next entry                             |
| `seq_dwell`    | in  | 32    | automatic step after this many valid cycles; 0 = off |
| `seq_entry`    | out | log2 K | entry in use                                    |
| `seq_active`   | out | 1     | some entry has been applied since reset          |
| `ver_busy`     | out | 1     | change in progress                               |
| `reg_code`     | out | 2N    | contents of the version register                 |

## A hidden fault, found in normal mode

The end-to-end testbench stages the following scenario. Take normal mode to
mean factors 0 and 1, so threshold S = 2. Cell F of the sum unit of element
(3, 3) is stuck at 0.

* **Original version.** Normal-mode factors only ever address cell 0 of that
  unit, so every normal-mode product is right and the fault is hidden.
  Emergency-range factors do read cell F and give wrong products.
* **Version F on that unit.** This version sets register bits `a_3` and
  `b_3`, inverts the units driving its C and D inputs, and inverts the unit
  itself. Normal-mode address 0 now reads physical cell F, which should hold a
  one. The stuck cell gives a wrong product in normal mode.

A second scenario uses the fault the method is mainly about: a broken 2:1
multiplexer. The last multiplexer of the same unit is stuck on its D = 0
side.

* **Original version.** Normal-mode factors only ever address D = 0, so the
  fault is hidden. Emergency-range factors do expose it.
* **Version with register code zero.** This version only inverts the carry
  unit that drives the unit's D input. Normal-mode reads now go through the
  D = 1 side, where the two halves of the memory differ, and the fault shows
  in normal mode.

Over ten random versions, the normal-mode factors in that testbench reach
several hundred LUT memory positions that the original version never
touches.

`tb_workloads` builds the multiplier at n = 4 and n = 6. It multiplies every
factor pair under the original version and eight random versions. It then
sweeps the normal/emergency threshold S.

The testbench measures which memory positions are *addressed*. That is where
a stuck cell or a broken multiplexer path can sit. It does not check whether
a wrong bit at that position would reach an output. The three counts are:

* **Normal:** positions that normal-mode pairs read under the original
  version.
* **Emergency-only:** positions that only emergency-mode pairs read under the
  original version.
* **Still emergency-only:** emergency-only positions that normal-mode pairs
  read under none of the nine versions.

Counts for n = 4 from one run, out of 512 positions. The third column
depends on which random versions were drawn:

| S | normal | emergency-only | still emergency-only |
|---|--------|----------------|----------------------|
| 2 | 50     | 218            | 108                  |
| 5 | 128    | 140            | 20                   |
| 9 | 210    | 58             | 0                    |

Random versions remove half of the emergency-only positions or more. Versions
chosen for the purpose, one per remaining position, reach the rest. The
hidden-fault scenario above shows such a chosen version.

## Size

| n | array LUT units (2n²) | adder LUT units | total | reported for a vendor-mapped library multiplier with the added circuit |
|---|-----|----|-----|-----|
| 4 | 32  | 8  | 40  | 38  |
| 6 | 72  | 12 | 84  | 70  |
| 8 | 128 | 16 | 144 | 116 |

The last column comes from a synthesis tool's own technology mapping, which
packs partial products into LUTs more tightly. This array keeps one uniform
two-unit element so that every unit's function and wiring are known
exactly.

The adders matter most for the number of LUT inputs wired straight to
circuit inputs, each of which removes a version bit. Without the adders,
every array unit would have its A and B inputs on operand pins: 4n²
inputs, 256 at n = 8. With them, no array unit touches an operand pin, and
only the 2n adders do.

The version controller adds about 150 flip-flops at N = 8. All
sizes are set by `N`; use N = 4 or 6 for the smaller multipliers.

## Where this RTL departs from, or adds to, the method

* **Array arrangement.** The method only fixes an iterative array of n²
  elements. The row-ripple arrangement, the two-LUT element and the wiring
  table above are choices made here. A carry-save array would shorten the
  path to about 2n elements.
* **Loading versions.** In the FPGA setting, the register is loaded through
  two extra device pins (serial data and shift), and LUT codes are rewritten
  by reconfiguring the device. Here `version_controller` does both from
  inside the design. It stands in for that external loading. Its sequencing,
  its latency and its handshake are this design's own. So are the version
  table, its depth K = 16 and the step/dwell pacing of `version_sequencer`.
* **Adders.** The modulo-two adders are written as XOR gates. They are not
  configurable LUT units and take no versions.
* **Configuration.** LUT memories have no reset and no read-back. The
  configuration checksum of a real device is not modelled.
* **Not included.** The offline analysis that finds potentially hazardous
  bits and chooses versions is software and is not part of the RTL.

## Files

`rtl/`

* `cm_pkg.sv`: LUT code type, original sum and carry codes, `version_code`,
  `lut_index`.
* `lut4.sv`: 16-bit memory and a 2:1 multiplexer tree.
* `lut_array_multiplier.sv`: the N x N element array with its configuration
  port.
* `version_shift_register.sv`: 2N-bit serial-in shift register.
* `mod2_adder_stage.sv`: operand XOR with the register code.
* `version_controller.sv`: shifts the register code and rewrites the LUTs.
* `version_sequencer.sv`: table of versions and stepping through them.
* `checkable_multiplier.sv`: the top.

`tb/`

Each module has a self-checking testbench `tb_<module>.sv`. `tb_workloads`
and its helper `workload_runner` run the n = 4 and n = 6 sizes. Each one prints
`TB_RESULT checks=<n> failures=<n>`. `tb_checkable_multiplier` runs the whole
design at N = 8. It covers:

* the original version and ten other versions applied by steps;
* an automatic sequence of four table entries with wrap-around;
* the register-only, mask-only and combined version types;
* an output unit named in the mask;
* a step made while busy;
* the hidden-fault scenario.

Every mechanism must occur at least once for it to pass.

## Simulating

With Verilator 5:

    verilator --binary --timing -Irtl -y rtl -y tb rtl/cm_pkg.sv \
        tb/tb_checkable_multiplier.sv --top-module tb_checkable_multiplier
    ./obj_dir/Vtb_checkable_multiplier

Replace the testbench name to run another one. The package must come first
on the command line. The full-size end-to-end run takes under a second.
