# R-BiSu: region-based bit-shuffling for a fault-tolerant mesh NoC

Permanent faults on the data path of a Network-on-Chip (a stuck wire on a link, a bad bit in a
router buffer or crossbar) corrupt the same bit positions of every flit that crosses them.
Correcting several such faults with error-correcting codes or replication is expensive. For
applications that tolerate small numeric errors (image processing, machine learning), it is enough
to make sure that the faulty wires carry the *least significant* bits of the data. The error on
every word is then small.

Bit-shuffling does this. A flit is cut into subflits. Before a flit reaches a faulty section, a
**shuffler** (S) permutes the subflits so that the least significant ones travel on the faulty
positions. After the section, a **de-shuffler** (D) restores the order. Doing this around every
link and every router costs a lot of multiplexers. The region-based variant (R-BiSu) implemented
here groups the routers into square **regions**. Flits are shuffled once when they enter a
region and de-shuffled when they leave it. Inside the region, one permutation is chosen to cover
the union of all the region's faults. Larger regions need fewer S/D blocks but protect less
precisely. The reported sweet spot is 2x2 regions, which is the default here.

This RTL follows the published R-BiSu method (Mercier, Killian, Kritikakou, Helen, Chillet,
"Tolerating Errors in NoC: A Lightweight Region-Based Fault-Mitigation Method", SELSE 2022) where
the method defines the hardware. It fills in the rest with its own choices, which are listed
below.

## Configuration

| parameter    | default | meaning                                         |
|--------------|---------|-------------------------------------------------|
| `MESH_W`, `MESH_H` | 8, 8 | routers per row and per column           |
| `FLIT_W`     | 64      | flit data width S_F                             |
| `SUBFLIT_W`  | 4       | subflit width S_SF, so N_SF = 16 subflits       |
| `REGION`     | 2       | region edge in routers (1, 2, 4, 8 evaluated)   |
| `FIFO_DEPTH` | 4       | input buffer depth per router port (own choice) |

Packets in the tests are 16 flits long, the length used in the method's evaluation.

## Subflit permutations: the S and D blocks (`sd_block`)

An S block and a D block are the same circuit: N_SF multiplexers, each choosing one of the N_SF
input subflits, with the choices held in N_SF registers of log2(N_SF) bits. Output subflit `j`
is input subflit `sel[j]`. A shuffler is loaded with a permutation `ssel` and the matching
de-shuffler with its inverse `dsel`. After reset every block holds the identity, so an
unconfigured network behaves like a plain NoC. A one-cycle `cfg_load` pulse copies new
selections in. The data path is combinational.

## Which faults a region sees: the region error mask

Fault diagnosis (for example a built-in self-test) is outside this design. It supplies one
**error mask** per router and per link, with bit *i* set when data bit *i* is faulty there.

* `rem1_unit`: the size-1 mask of a router is the OR of four masks: the router's own mask and
  those of its local, north and east links. So each router "owns" the links to its north and
  east neighbours. The links to the south and west belong to the neighbours.
* `rem_merge` / `region_rem`: the mask of a 2s x 2s region is the OR of the masks of its four
  s x s quarters. A 2x2 region takes one level, 4x4 two, 8x8 three. Sizes that are not a power
  of two fall back to a flat OR, which gives the same result.

Example (8-bit flits, 2-bit subflits): router R0 has a faulty bit 4. Its local link has a faulty
bit 2. The north link of R5 has a faulty bit 7. The size-1 mask of R0 is then bits {2, 4}, and
the mask of the 2x2 region {R0, R1, R4, R5} is bits {2, 4, 7}.

## Choosing the permutation (`reg_compute`)

This is the core of the scheme. It is implemented as a small sequential block, one per region.
The method only asks for an algorithm that minimises the impact of the faults. The algorithm
below is this design's own.

The region mask is cut into N_SF slots. The **key** of a slot is the mask slice that falls in
it, read as an unsigned number. A fault on bit 3 of a slot (key ≥ 8) therefore always counts as
worse than any combination of faults on its bits 0-2. The block places the logical subflits from
the least significant upwards. Each one goes to the worst slot still free:

```
perm = identity                    // perm[slot] = logical subflit in that slot
for r = 0 .. N_SF-1:
    best = slot currently holding r
    for each slot s whose content is >= r:       // not yet final
        if key[s] > key[best]: best = s          // strict: a tie keeps r in place
    swap contents of best and of the slot holding r
ssel = perm,  dsel = inverse(perm)
```

Keys fall as significance rises. By the rearrangement inequality, this placement minimises the
sum of key × 2^(S_SF·rank) over the slots. That sum bounds the error value that the region's
faults can cause. With no fault the identity is kept. With faults
only in the top slot, subflits 0 and N_SF-1 are swapped and the others stay put. In the 8-bit
illustration with faults on bits 7 and 6, the flit is sent as SF0 SF2 SF1 SF3 and arrives back
as SF3 SF2 SF1 SF0.

Timing: a `start` pulse latches the mask. Each rank takes one set-up cycle, N_SF scan cycles
and one swap cycle. `load` pulses N_SF·(N_SF+2)+1 cycles after the start cycle, and every S and
D block of the region copies the result on that pulse. That is 289 cycles for 16 subflits, 81
for 8 and 25 for 4. At 1 GHz this is below the 370 / 120 / 44 ns reported for the published
hardware block. `busy` is high for the same 289 cycles.

## Where flits are shuffled (`rbisu_noc`, `region_border`)

Every flit travels in the order of the region that owns the element it is crossing:

* **Local links.** An S block shuffles each flit an IP injects. A D block restores each flit
  delivered to an IP. Both use the router's region.
* **Links inside a region** need nothing.
* **Links between two regions.** The link belongs to the region of its south or west router,
  following the rule for size-1 masks. A `region_border` is placed at the north or east end of
  the link, one per direction. It is a D block with the selections of the region being left,
  followed by an S block with those of the region being entered. So the link carries its owner's
  order in both directions.
* **Routing.** A router sees shuffled head flits. Its routing controller passes each buffered
  head flit through a D block (one per input port, loaded with the region's `dsel`) to read the
  destination.

All regions update together on `cfg_start`. **Update the registers only while no packet is in
flight.** Updating while traffic is in flight would let one flit be shuffled with the old
permutation and de-shuffled with the new one. Nothing in the hardware prevents this.

## Router and packet format (`xy_router`, `flit_fifo`)

The method takes its router from an existing NoC. `xy_router` is a simple stand-in with the same
parts:

* five ports (local, north, east, south, west, see `rbisu_pkg::port_e`);
* a 4-flit first-word-fall-through FIFO per input;
* wormhole switching with `head`/`tail` side-band bits;
* XY routing (x first, then y) on the de-shuffled header;
* a round-robin arbiter per output, locked to one input from head to tail;
* valid/ready flow control.

A free output forwards a granted head flit in the same cycle, so a flit leaves a router one cycle
after entering an empty buffer. Destinations beyond the mesh edge are clamped, so a corrupted
header cannot leave the mesh.

Head flit layout, in logical (unshuffled) bits: the destination row sits in the top
CW = clog2(8) = 3 bits, and the destination column in the next 3. These are the most
significant subflits, which `reg_compute` places in the cleanest slots. The routing bits stay
correct as long as a region has at most N_SF-2 faulty slots. The side-band bits (`valid`,
`ready`, `head`, `tail`) are assumed fault-free. Only data bits are covered by the fault model.

## Top-level interface (`rbisu_noc`)

Router `r = y*MESH_W + x`. Row 0 is the south row and column 0 the west column. Regions are
numbered the same way.

| port | dir | width | |
|---|---|---|---|
| `inj_valid/ready/data/head/tail` | in/out | NR, NR, NR×FLIT_W, NR, NR | IP → NoC, valid/ready |
| `ej_valid/ready/data/head/tail` | out/in | same | NoC → IP |
| `em_router/local/north/east` | in | NR×FLIT_W | diagnosed error masks |
| `fi_router/local/north/east` | in | NR×FLIT_W | fault emulation: bits flipped on the data path |
| `cfg_start` / `cfg_busy` | in / out | 1 / 1 | recompute all S/D registers |

The `fi_*` inputs reproduce the evaluation's fault model. Each set bit is a bit flip on every
flit crossing that router (at its crossbar output) or that link (both directions). Tie them to
zero in a real design. In the testbenches `em_*` equals `fi_*`, which models a perfect
diagnosis.

## Not built

* **Header duplication.** When a head flit has too few unused bits, the method splits the header
  over two flits. The split is not specified. With 64-bit flits and 6 routing bits it is not
  needed here. Without it, a region with more than N_SF-2 faulty slots can misroute packets.
* **Merger / de-merger in the network interfaces.** These sort application data into flits at
  subflit granularity. They are not specified. The local ports here take whole flits.
* **Fault diagnosis.** The BIST, test pattern generators and response analysers are outside the
  design.
* **Sharing one `reg_compute` between several regions.** Each region has its own block.
* **The region-size-0 baseline** (plain BiSu around every link and router).

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_sd_block`: identity after reset; random permutations take effect exactly at the load edge;
  S followed by D with the inverse gives back the flit.
* `tb_rem1_unit`, `tb_region_rem`: single and random faults, regions of 2x2, 4x4 (three-level
  tree) and 3x3 (flat), plus the 8-bit example above.
* `tb_reg_compute`: four configurations (16, 8 and 4 subflits of a 64-bit flit, and the 8-bit
  example). It checks the placement against a separately written reference model, that `dsel`
  is the inverse of `ssel`, that keys fall as significance rises, and the exact update latency
  and its bound.
* `tb_xy_router`: all five inputs under random back-pressure. It checks XY output choice,
  non-interleaved packets and order, routing through a loaded CTRL permutation, and the router
  fault mask.
* `tb_rbisu_noc`: the full 8x8 default configuration. Three phases run: no fault, then two random
  fault sets (32 and 64 faults). Each IP sends a tornado packet and a random packet. Each flit's
  arriving value is predicted exactly from its XY path: the fault mask of every router and link
  crossed is mapped through the permutation of the region that owns that element. The test also
  checks that the error stays in the subflits that the regions on the path gave to faulty slots.
  It requires register updates, region-border crossings, non-identity shuffles, errors moved to
  lower bits, and injection and ejection stalls each to have happened.
* `tb_rbisu_efficiency`: the same checks over 12 fault sets at 0.25, 0.5 and 1 fault per router.
  For each density it prints the mean square error and bit error rate of the 64-bit flit values,
  with shuffling and without it. It checks that shuffling never raises the MSE. A typical run
  with 4096 flits per density gives these results:

  | faults per router | MSE, shuffled | MSE, not shuffled | BER, shuffled | BER, not shuffled |
  |---|---|---|---|---|
  | 0.25 | 6.6e6  | 2.1e35 | 1.8 % | 2.0 % |
  | 0.5  | 7.9e8  | 4.8e35 | 3.6 % | 4.0 % |
  | 1    | 8.0e12 | 7.7e36 | 5.9 % | 7.2 % |

  The number of flipped bits hardly changes. Shuffling moves those bits from the top of the
  word to the bottom.
* `tb_rbisu_region_sizes`: three 4x4 meshes with 1x1, 2x2 and 4x4 regions receive the same 16
  fault sets (4 and 8 faults) and the same tornado traffic. Every flit is checked exactly against
  the path model, as above. The test then checks that the MSE does not fall as the regions grow.
  Measured MSE: 5.5e3 (1x1), 1.3e9 (2x2), 6.1e14 (4x4). A larger region ORs more faults into one
  mask, so fewer clean slots are left for the high subflits.

Run a testbench with plain Verilator from the repository root, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rbisu_pkg.sv tb/rbisu_ref_pkg.sv \
          tb/tb_rbisu_noc.sv --top-module tb_rbisu_noc
./obj_dir/Vtb_rbisu_noc
```

The full-size mesh takes a few minutes to compile and well under a second to simulate. The
testbenches run at the default parameters. To study other sizes, override `REGION`,
`SUBFLIT_W` or the mesh size on `rbisu_noc`. `rtl/rbisu_pkg.sv` holds the defaults the
testbenches read.

## Files

`rtl/`: `rbisu_pkg` (constants, port enum), `sd_block`, `rem1_unit`, `rem_merge`,
`region_rem`, `reg_compute`, `flit_fifo`, `xy_router`, `region_border`, `rbisu_noc` (top).
`tb/`: one testbench per block, the two workload testbenches `tb_rbisu_efficiency` and
`tb_rbisu_region_sizes`, and `rbisu_ref_pkg` (reference placement and gather functions).
