# Energy- and area-efficient coarse-grained reconfigurable fabrics

A stripe-based coarse-grained fabric maps a data-flow graph (DFG) by placing
one operation on each ALU. Rows of ALUs ("computational stripes") are joined
by rows of multiplexers ("interconnection stripes"), and data only flows
downward. Such a fabric has two costs. First, many ALUs do no arithmetic:
they only pass a value down to the stripe where it is needed. Second, DFGs of
signal- and image-processing kernels are narrow at the top and the bottom and
wide in the middle, so a rectangular fabric leaves many ALUs idle.

This RTL implements the fabric organisations of the thesis *Exploration of
Energy and Area Efficient Techniques for Coarse-Grained Reconfigurable Fabrics*
(A. Yadav, 2011), each of which attacks one of those costs:

| fabric | module | default size | what it changes |
|---|---|---|---|
| ICS-split, 33% DPs | `cgra_split` | 8x9 + 4x9 | two smaller fabrics in series instead of one big one |
| ICS-fold, 50% DPs | `cgra_fold` | 9x9, 2 cycles | the lower half of a mapping runs in the upper half's idle ALUs |
| multi-level vertical | `cgra_mlv` | 8x18 | operands can skip one or two stripes |
| horizontal | `cgra_hi` | 11x9 | operands from the left/right neighbour in the same stripe |
| fully connected | `cgra_fc` | 8x8 | any ALU feeds any other; no stripes |
| fully connected heterogeneous | `cgra_fc #(.HETERO(1))` | 8x8 | same, with 2 operations per ALU |
| three-dimensional | `cgra_3d` | 4x4x4 | four stacked layers with links along every line of four |

The fabrics are alternatives to one another, not parts of one chip.
`cgra_top` places all seven side by side, each with its own ports, and shares
only the fabric inputs. Sizes are W x H (ALUs per stripe x stripes). Each
default is the smallest size on which the thesis could map all seven
benchmark kernels for that organisation.

## The processing element

Every fabric uses the same element, `pe`. It holds one `alu` and three operand
multiplexers. The operands are left (`a`), right (`b`) and the selector (`s`)
of the multiplexer operation. Each operand independently picks one of these
sources:

| source | meaning |
|---|---|
| `SRC_WIN`, `idx` | entry `idx` of the element's interconnect window (the stripe above, or all other ALUs, or the 3D candidate list) |
| `SRC_SIDE`, `side` | fabric input `in_i[side]`: an *input coming from the side* (ICS) |
| `SRC_CONST` | the constant `k` held in the ALU's own configuration |
| `SRC_X1` / `SRC_X2` | grandparent / great-grandparent (`cgra_mlv`), or left / right neighbour (`cgra_hi`) |

Inputs coming from the side and in-ALU constants are the basis of every
fabric here. A constant or primary input is delivered straight to the ALU that
uses it. It is not routed down from the top edge through a column of pass
ALUs.

The ALU has 15 operations, NOP included: NOP, PASS, ADD, SUB, MUL (low 16
bits), AND, OR, XOR, NOT, SHL, SHR, SRA, LT (signed, 0/1), EQ (0/1) and MUX
(`s != 0 ? a : b`). Shift amounts are `b[3:0]`. A NOP ALU drives zero, so an
idle ALU does not toggle what it feeds. The parameter `OP_MASK` removes
operations. An operation that is masked out behaves like NOP, and synthesis
drops its hardware.

One configuration word per element is `cgra_pkg::cell_cfg_t` (63 bits):
`op`, three `opnd_cfg_t {src, idx, side}`, `phase` (used only by the fold
fabric) and the 16-bit constant `k`. The helper functions in
`tb/tb_ref_pkg.sv` (`mkc`, `win`, `side`, `kon`, `x1`, `x2`, `oc`, `widx`)
show how to write a mapping by hand.

All fabrics except the fold fabric are purely combinational: one evaluation is
one pass of the DFG. Configuration is an input port of every fabric. How
configuration words are stored or shifted in is left to the user.

## Stripe fabrics: interconnect, dedicated pass gates, early exits

`stripe_fabric` is the building block of the split and fold fabrics.

* **Interconnect window.** In the ALU of column `c`, window entry `k` reads
  parent column `(c + k - WIN/2) mod WP`, where `WP` is the width of the
  stripe above. With the default 8:1 window an ALU sees columns `c-4 .. c+3`.
  The function `widx(c, p, WIN, WP)` in the testbench package gives the entry
  that reaches parent column `p`. The first stripe's parents are the `top_i`
  vector.
* **Dedicated pass gates (DPs).** With `DP_N = 4, 3, 2` (25%, 33%, 50% DPs),
  the last column of every group of `DP_N` holds a `dp_gate` instead of an
  ALU. A DP has a single input: one result of the stripe above, picked
  through the same 8:1 window by the `a.idx` field of its configuration.
  Entry 4 is the element straight above. A value that skips a stripe, often
  an ALU result, therefore costs a DP instead of a pass ALU. A DP is active
  when its configured `op` is not NOP and outputs zero when idle. `DP_N = 0`
  means no DPs.
* **Early exit rows.** Each of the 8 output ports reads the ALU at
  `(row, col)` of its `out_cfg_t`. Only exit rows can be read. The last row is
  always an exit row. `EXIT_STRIDE = 1` makes every row except the first an
  exit row; `EXIT_STRIDE = 2` gives rows 2, 4, 6 … (1-based). A port that
  points elsewhere reads zero. So a result that is ready early needs no pass
  ALUs to reach the bottom.

## Split fabric (`cgra_split`)

The left fabric (8x9) takes the fabric inputs. The right fabric (4x9) is
narrower. The right fabric's first stripe reads the left fabric's last stripe
through an ordinary 8:1 interconnection stripe. Both evaluate in the same
pass. Output port `n` takes its exit value from the left fabric when
`ocfg[n].sel = 1` and from the right fabric otherwise. Results can therefore
leave from the middle of the graph. Both fabrics have 1-in-3 DPs.

## Fold fabric (`cgra_fold`): the only sequential design

A mapping that is up to about 2H stripes deep runs in two clock cycles on an
H-stripe fabric:

```
cycle 0  phase-0 elements active, first stripe fed from in_i
         last stripe -> fold register fb_q          outputs with sel=0 captured
cycle 1  phase-1 elements active, first stripe column c fed from
         fb_q[c] where fold_sel_i[c]=1, else from in_i[c]
                                                    outputs with sel=1 captured
```

Each element's `phase` bit says in which cycle it works. In the other cycle
it is forced to NOP. Between runs every element is idle.

Handshake: `start_i` is accepted on a rising edge while `busy_o` is low.
`done_o` pulses, and `out_o` holds the registered outputs, on the second
rising edge after that. `start_i` is ignored while busy. Reset is
asynchronous and active low. The defaults are 9x9 with 1-in-2 DPs.

## Multi-level vertical interconnect (`cgra_mlv`)

Each operand has a 4:1 choice among:

* the stripe above, through a 5:1 window (`c-2 .. c+2`);
* the side input (or the ALU constant);
* the ALU two stripes up in the same column (`SRC_X1`);
* the ALU three stripes up in the same column (`SRC_X2`).

One operand therefore reaches 7 ALUs and one fabric input. A value used two
or three stripes lower needs no pass ALUs. Links that would point above the
first stripe read zero. The size is 8x18, with no DPs and exits on every
second row.

## Horizontal interconnect (`cgra_hi`)

Each operand has a 4:1 choice among:

* the stripe above, through an 8:1 window;
* the side input (or the ALU constant);
* the left neighbour (`SRC_X1`);
* the right neighbour (`SRC_X2`).

A chain of dependent operations can then sit inside one stripe, and the
fabric gets shorter: 11x9. The end ALUs read zero from the missing neighbour.

## Fully connected fabrics (`cgra_fc`)

The 64 ALUs (ALU `i = row*8 + col`) are placed as an 8x8 square but have no
stripes. Each operand has a 64:1 multiplexer over the other 63 ALUs plus the
side input. With `SRC_WIN`, `idx` is the producing ALU's index. An ALU cannot
read itself: its own index reads zero. Data may zig-zag in any direction, so
no ALU is ever a pass gate. The price is a very large interconnect.

The early exits here are a row *and* a column. Exit-row entry `c` takes the
ALU of column `c` at row `xrow_sel_i[c]`. Exit-column entry `r` takes the ALU
of row `r` at column `xcol_sel_i[r]`. Final port `n` reads exit-row entry
`osel_i[n]` when that is below 8, and otherwise exit-column entry
`osel_i[n]-8`. Two results in the same column can leave by different routes.

With `HETERO = 1`, every row has reduced ALUs that hold NOP plus two
operations (`cgra_pkg::hetero_mask`):

| row | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| ops | ADD SUB | ADD MUL | AND OR | SHL SRA | SHR XOR | LT EQ | MUX PASS | NOT SUB |

A mapping must place each operation in a row that supports it. An operation
the row does not support yields zero.

## Three-dimensional fabric (`cgra_3d`)

This is the least obvious of the seven. The 64 ALUs form four 4x4 layers.
Layer `z = 0` is on top. ALU `(x, y, z)` has index `z*16 + y*4 + x`. Its
operand window is a list of 32 candidates:

* **entries 0-3: the inter-layer 4:1 interconnect.** Entry `j` is ALU
  `(j, y, z-1)`, the same row of the layer above. In layer 0 it is fabric
  input `in_i[j]`. This carries the main layer-to-layer data flow.
* **entries 4 and up: hopping links.** These reach every other ALU that lies
  on a straight line of four cells through `(x, y, z)`. The lines are the
  rows, columns, depth lines, both diagonals of every plane, and the four
  cube diagonals. Lines are visited in the order of their direction vector
  `(dx, dy, dz)`: `dz`, then `dy`, then `dx`, each from -1 to +1, keeping
  only directions whose first non-zero component, taken in x, y, z order,
  is +1. The cells of each
  line are visited by position along it. A corner cell lies on 7 lines (21
  hopping partners); a face-centre cell lies on 4.
* unused entries read zero.

The constant function `cand(i, k)` in `cgra_3d.sv` is the exact list. Tools
that configure the fabric should evaluate it instead of copying the rule
above. The end-to-end testbench shows how to find an entry by probing.

Exits: three adjacent faces (+x, +y and the bottom +z face) each carry 16
exit ports, 48 in all. The port at face `f`, position `(a, b)` reads the ALU
that `xsel_i[f][a][b]` picks on the line of four behind it. The positions
are `(y, z)` for +x, `(x, z)` for +y and `(x, y)` for +z. Final port `n`
reads exit port `osel_i[n] = f*16 + a*4 + b`.

## Combinational loops and valid configurations

`cgra_hi`, `cgra_fc` and `cgra_3d` contain structural combinational loops.
Neighbour links run both ways, every ALU can feed every other, and hopping
links are bidirectional. These loops are part of the architectures. A valid
configuration is the mapping of an acyclic DFG, and it never closes a loop.
Lint and synthesis tools report the loops. A simulator handles them as long
as the configuration is acyclic. A cyclic configuration gives an oscillating
or undefined result. The stripe fabrics (`stripe_fabric`, `cgra_split`,
`cgra_fold`, `cgra_mlv`) are loop-free.

## Benchmarks and capacity

The thesis evaluates seven kernels:

* ADPCM encoder and decoder;
* GSM channel encoder;
* MPEG-2 IDCT row and column passes;
* Sobel and Laplace edge detection.

They have 24-61 operations, 5-32 constants and 3-25 inputs. The default
sizes are the thesis's smallest sizes on which every kernel maps, so each
kernel fits every fabric at its default size, given the thesis's placements.
The 32 side inputs cover the largest input count (25, Laplace). The number of
outputs per kernel is not given; each fabric has 8 output ports.

Sobel edge detection is small and standard enough to write down from its
definition, `min(|gx| + |gy|, 255)` over a 3x3 window: 23 operations and 8
pixel inputs, since the centre pixel has weight zero. Four testbenches run it
over a random 10x10 image and compare every pixel with the operator computed
directly. Each mapping shows what its fabric's links buy:

| testbench | fabric | mapping |
|---|---|---|
| `tb_sobel_split` | split, left fabric only | 23 operations in the ALU columns of 9 stripes, and 3 DPs for the values that skip a stripe; no pass ALU; the right fabric stays idle |
| `tb_sobel_mlv` | multi-level vertical | 4 columns x 9 stripes, no pass ALU: values that skip a stripe use the grandparent link |
| `tb_sobel_hi` | horizontal interconnect | 5 stripes, no pass ALU: the weighted column sums run along a stripe over neighbour links |
| `tb_sobel_fc` | both fully connected fabrics | any placement on the homogeneous one; each operation in a row whose pair contains it on the heterogeneous one |
| `tb_sobel_3d` | 3D | placed by a greedy placer in the testbench; it needs 2 of the 4 layers |

The other six kernels' data-flow graphs are not written down anywhere in a
form that could be reproduced exactly. The remaining testbenches therefore run
hand-mapped graphs that use each mechanism.

## How far to trust it, and where it departs from the thesis

Taken from the thesis:

* stripe organisation;
* ICS and in-ALU constants;
* the 1-in-N dedicated pass gates;
* early exit rows (alternate rows at height 18, every row but the first at
  height 9);
* the split and fold organisations with the two-cycle fold and its top
  multiplexers;
* the 4:1 operand multiplexers and their inputs for the multi-level vertical
  and horizontal fabrics;
* 64:1 full connectivity with a side input and no self-connection;
* exit rows plus exit columns;
* 2-operation-plus-NOP heterogeneous ALUs with one type per row;
* the 4x4x4 cube with 4:1 inter-layer interconnect, hopping links along lines
  of four, and 48 exit ports on three faces;
* all default sizes.

Choices made here because the thesis does not fix them:

* 16-bit data;
* the list and exact semantics of the 15 operations;
* the configuration word and its encoding;
* one constant per ALU;
* the alignment and modulo wrap of the 8:1 and 5:1 windows;
* a DP in the last column of each group, fed through the 8:1 window;
* zero from idle ALUs and DPs;
* the split link from the left fabric's last stripe;
* the fold register, phase bit and start/done handshake;
* exit rows every second row in `cgra_mlv` and every row but the first in
  `cgra_hi`;
* non-wrapping neighbour links;
* the operation pairs of the heterogeneous rows;
* which 3D faces carry exits, and the candidate order;
* 32 inputs and 8 outputs per fabric.

Not built: the thesis's baseline fabrics (standard top-fed fabrics and the
ICS fabric without the new techniques) and its other DP percentages. The
stripe fabric can produce those DP variants through `DP_N`. Also not built:
the mapper that places a DFG on a fabric, and any configuration-loading
logic. The thesis's results are area and energy from a 90 nm library, which
this RTL does not reproduce.

## Simulating

Every file under `rtl/` and `tb/` holds one module or package named after the
file. `cgra_pkg.sv` must come first, and testbenches also need
`tb/tb_ref_pkg.sv`. Example with Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_cgra_top -y rtl \
    rtl/cgra_pkg.sv tb/tb_ref_pkg.sv tb/tb_cgra_top.sv
./obj_dir/Vtb_cgra_top
```

Each testbench prints `TB_RESULT checks=<n> failures=<m>`.

| testbench | checks |
|---|---|
| `tb_alu`, `tb_dp_gate`, `tb_pe`, `tb_early_exit` | element tests against a reference operation table |
| `tb_stripe_fabric` | a hand mapping, then 300 random configurations against a stripe-by-stripe behavioural model |
| `tb_cgra_split`, `tb_cgra_fold`, `tb_cgra_mlv`, `tb_cgra_hi`, `tb_cgra_fc` | one mapped graph per fabric, including the fold fabric's two-cycle latency and busy behaviour |
| `tb_cgra_3d` | for all 64 cells: every candidate entry reaches exactly the cells that are collinear with it (collinearity computed independently), plus a three-layer graph read through each exit face |
| `tb_sobel_split`, `tb_sobel_mlv`, `tb_sobel_hi`, `tb_sobel_fc`, `tb_sobel_3d` | Sobel over a random 10x10 image on five fabrics, checked pixel by pixel (see above) |
| `tb_cgra_top` | all seven fabrics at default size through the top, counting each mechanism (ICS, constants, early exits, DPs, split link, fold, grandparent/great-grandparent links, left/right links, zig-zag, exit row/column, unsupported heterogeneous operation, layer link, hopping link, exit faces) |

`tb_cgra_top` runs in well under a second once built. Building it with
Verilator takes a few minutes, because of the all-to-all multiplexers.
