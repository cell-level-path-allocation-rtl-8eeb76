# Parallel request counter for a three-stage ATM switch

A three-stage ATM switch with intermediate channel grouping has L1 input
modules, m intermediate modules and L2 output modules. Paths through the
middle stage can be allocated afresh in every cell time slot. The allocator
works on an L1 x L2 array of small processors, and processor X_ij must first
learn **K_ij**: how many of the cells arriving at input module i in this slot
want output module j.

Counting these one output module at a time takes n1 + L2 clocks, where n1 is
the number of ports per input module. That is 128 clocks for a switch with
n1 = 96 and L2 = 32. This RTL counts all L2 values of one input module at
once. It needs **2·⌈log2(n1+L2)⌉ + 1 = 15 clocks** from the moment the
packets enter its concentrator until the first bits of every K_ij are out.
It implements the parallel request-counting hardware published by
M. Collier and T. Curran in "Cell-Level Path Allocation in a Three-Stage
ATM Switch". The top module is `request_counter`.

## The counting trick

Take the n1 cell headers of input module i and add L2 *control packets*, one
per output module. Sort all of them by the key

    { idle, output module, is-control }

In ascending order, the cells for module 0 come first, then control packet 0,
then the cells for module 1, then control packet 1, and so on. Idle ports
(inactive inputs) go to the top. If control packet j leaves the sorter at
output D_j, everything below it is either a cell for modules 0..j or one of
the control packets 0..j-1, so

    D_j = K_i0 + K_i1 + ... + K_ij + j
    K_i0 = D_0,      K_ij = D_j - D_(j-1) - 1   (j > 0)

The subtraction costs almost nothing in two's complement. Because
`not(x) = -x - 1`, it is enough to compute `K_ij = D_j + not(D_(j-1))`: a
plain serial adder with one input inverted.

Example (n1 = 8, L2 = 3): three cells want module 0 and two want module 1.
The control packets land at D = 3, 6 and 7. This gives K = 3, 6-3-1 = 2 and
7-6-1 = 0. The concentrator test and the end-to-end test both run this case.

## Data path

    cell headers (N1) ─┐
                       ├─► batcher_sorter ─► address_generator ×P ─► reverse_banyan ─► serial_adder ×(L2-1) ─► k_register ×L2
    control pkts (L2) ─┘     (P = 2^LP)          (one per output)       (LP stages)        (line 0 passes through)

| Block | What it does |
|---|---|
| `batcher_sorter` | Bitonic Batcher network of P = 2^⌈log2(N1+L2)⌉ entries (128 by default). It has one register per compare-exchange column, so its latency is LP·(LP+1)/2 = 28 clocks and it accepts a new set every clock. |
| `address_generator` | Sits at sorter output D. If control packet j arrives there, it sends an active serial packet addressed to line j that carries D. Anything else produces an inactive (all-zero) packet. |
| `reverse_banyan` | An LP-stage indirect binary n-cube. It moves the L2 active packets from lines D_j onto lines 0..L2-1. |
| `rb_switch` | The bit-serial 2x2 element of the concentrator. |
| `serial_adder` | A full adder with a carry flip-flop, with the upper input (line j-1) inverted. |
| `k_register` | The K register of a path-allocation processor. It is serial in and holds the count. |
| `rc_pkg` | Default sizes (96, 32), size helpers and the entry-kind enum. |

The control packets enter the sorter on inputs N1..N1+L2-1. Sorter inputs
beyond N1+L2 carry idle entries.

## The concentrator, bit by bit

This is the part that needs the most care.

**Packet format.** Each address generator sends one bit per clock:

| clock after load | bit |
|---|---|
| 1 | active flag |
| 2 .. LP+1 | destination line, least significant bit first |
| LP+2 .. 2·LP+1 | data field D, least significant bit first |

The frame is 2·LP+1 = 15 clocks long.

**Stage wiring.** Stage s (s = 0 .. LP-1) pairs lines p and p + 2^s, where
bit s of p is 0. It routes on destination bit s. After stage s, the low s+1
bits of a packet's line number equal those of its destination. After the
last stage, the packet is on its destination line.

**Element timing (`rb_switch`).**

- Clock T (`sync`): the element stores both active flags.
- Clock T+1: it reads the routing bits. An active upper packet sets the
  element straight or crossed. If the upper packet is inactive, an active
  lower packet decides. Otherwise the element stays straight.
- Clock T+2: the stored flags go out on the chosen outputs. They take the
  place of the routing bit, which is dropped.
- From T+3 on: each further bit leaves one clock after it arrived.

So every stage costs exactly two clocks, and the next stage again finds its
own routing bit right behind the active flag. After LP stages, the flags
leave 2·LP clocks after entry. The LSBs of D follow one clock later. The
serial adders produce a combinational sum bit, so the LSB of every K_ij
appears **2·LP + 1 clocks** after the packets entered.

**Why it never blocks.** Two packets meet in a stage-s element only if their
source lines differ by less than 2^(s+1). They compete for one output only if
their destinations agree in bits 0..s, which means the destinations differ by
at least 2^(s+1). A conflict would therefore need |O2 - O1| > |I2 - I1|. Here
I = D_j and O = j, and D_k - D_j = (K's between them) + (k - j) ≥ k - j, so
no conflict can occur. The element still reports a conflict (`conflict`,
and `blocked` at the top), and `request_counter` asserts that it never
happens. The concentrator testbench shows that a pair which breaks the
condition is caught.

## `request_counter` interface and timing

Parameters: `N1` (ports per input module, default 96) and `L2` (output
modules, default 32). Derived values: LP = ⌈log2(N1+L2)⌉ = 7, and the
D and K width W = LP.

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `start` | in | the headers are valid in this clock |
| `cell_valid[N1]` | in | the port carries a cell |
| `cell_dest[N1]` | in | output module requested (clog2(L2) bits) |
| `k_first` | out | the LSBs of all counts are on `k_ser` |
| `k_ser[L2]` | out | bit-serial K_ij, LSB first, to processors X_i0..X_i(L2-1) |
| `k_value[L2]` | out | the counts, held (W bits each) |
| `k_valid` | out | pulses when `k_value` has just been updated |
| `blocked` | out | concentrator conflict; it never occurs in correct use |

All timings below are in clocks after the `start` clock, for the defaults:

| Event | Clock |
|---|---|
| sorted set reaches the address generators | 28 |
| active flags enter the concentrator | 29 |
| `k_first`: LSBs of all K on `k_ser` | 44 (= 29 + 15) |
| `k_valid`: `k_value` holds all counts | 51 |

`start` pulses must be at least 2·LP+1 = 15 clocks apart, because that is
the length of a concentrator frame. An assertion checks this. The sorter
itself could take a new set every clock.

## What follows the scheme and what is this design's own

The following come straight from the hardware scheme:

- the sort order, with each control packet just above the cells for its
  module and idle cells at the top;
- address generators that forward only control packets and append D_j;
- the reverse banyan concentrator, with two clocks per stage (one to see
  whether a packet is active, one to route it);
- serial adders whose upper input is inverted, and K_i0 taken directly;
- the 2·⌈log2(n1+L2)⌉+1 count and the sizes n1 = 96, L2 = 32.

The following are this design's own choices:

- the key encoding and where the control packets enter the sorter;
- the bitonic form of the sorter and its register after every column;
- the serial packet format, including LSB-first addressing. LSB-first is
  the order that makes the concentrator non-blocking with this wiring.
- dropping the routing bit at each stage;
- which packet sets an element when only one is active;
- the carry handling of the serial adder;
- the serial-in K register;
- the asynchronous reset and the minimum start spacing;
- reducing the cell header to valid + destination, because counting needs
  nothing else.

The 15-clock figure covers only the concentrator and the adders. The
sorter's pipeline (28 clocks here) comes on top. Whether that sorter is
shared with the cell path is left open.

## Not included

- **Path-allocation processors.** Only their K register is built. The
  counts leave on `k_ser` / `k_value` for whatever allocator is attached.
- **The switch fabric.** This covers the n1 x mS1 input modules, the
  S1L1 x S2L2 intermediate modules and the S2m x n2 output modules.
- **Routing-tag assignment.**

The fabric and the routing-tag assignment are sized or named by the scheme
but not specified. A full switch would use one `request_counter` per input
module, L1 in all.

## Sizes and performance studies

The default build matches the 96-port x 32-module switch. It also handles
any module with fewer ports (the spare ports stay idle) or fewer output
modules. The published cell-loss studies sweep n1 up to about 140 ports per
module. For those, set `N1` higher: the sorter then grows to 256 entries and
the latency to 2·8+1 = 17 clocks. Cell-loss figures depend on the allocator,
which is not part of this RTL.

## Verification

Each block has a self-checking testbench in `tb/`. Each testbench ends by
printing `TB_RESULT checks=N failures=M`.

| Testbench | Checks |
|---|---|
| `tb_serial_adder` | 500 random pairs and the edge cases, against D_j − D_(j−1) − 1 mod 2^W |
| `tb_k_register` | shift-in, `k_valid` exactly W clocks after the LSB, hold |
| `tb_address_generator` | packet bits for control, data and idle entries at output 77 |
| `tb_rb_switch` | all 16 flag/route combinations plus random ones; conflict detection |
| `tb_batcher_sorter` | 128-entry random sets every clock; result and 28-clock latency |
| `tb_reverse_banyan` | the 3/6/7 example, identity, 60 random order-keeping concentrations, one blocking pair |
| `tb_request_counter` | the full-size design end to end |
| `tb_request_counter_sizes` | other switch sizes, each checked for every count and its latency: 60 x 32 (a padded 128-entry sorter), 130 x 30 (a 256-entry sorter, 17 clocks through the concentrator) and 8 x 3. The per-size driver is `rc_size_point`. |

`tb_request_counter` runs 59 frames at the default size. The traffic
includes:

- uniform full load;
- 75 % of cells to 16 contiguous modules;
- demand groups of k = 3, 6, 12 and 16 modules, contiguous and interspersed,
  at r = 0.55..0.75;
- partial loads and an empty slot;
- every cell to one module;
- the small example above.

Frames are sent at the minimum spacing. The testbench checks every K value,
both bit-serial and held, and the 44- and 51-clock timing. It fails if idle
ports, empty modules, a full module or back-to-back frames never occurred.

To run a testbench with Verilator 5, name the package first and let
Verilator find the other modules in `rtl/` and `tb/`. The lint warnings it
prints (unused bits of wide buses) do not stop the build with `-Wno-fatal`:

    verilator --binary --timing --assert -Wno-fatal -j 0 --top-module tb_request_counter \
        -y rtl -y tb +libext+.sv rtl/rc_pkg.sv tb/tb_request_counter.sv
    ./obj_dir/Vtb_request_counter

Replace `tb_request_counter` with any other testbench name. The
simulations themselves take well under a second. Most of the time goes into
compiling the generated C++, which takes up to a few minutes for the
full-size design.
