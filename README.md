# 2DR-tree search on an FPGA

A 2DR-tree is a spatial index whose nodes are two-dimensional. Where an
R-tree node is a list of minimum bounding rectangles (MBRs), a 2DR-tree node
is a small grid of *node locations*, X wide and Y high, and each MBR sits in
the location that matches where it lies in space. At the leaves an MBR is an
object; above them it is the bounding box of a child node. A region search
walks down from the root and follows only locations whose MBR overlaps the
query.

In software the hard part of that walk is choosing where to split each
node. In hardware every location can compare itself with the query at the
same moment, so no split point is needed. This RTL builds the two ways of
doing that proposed in *Exploring Different Methods for 2DR-tree Binary
Search on a FPGA*:

- **Complete tree (method 1).** The whole tree sits in logic. Every node of
  a level is tested in parallel. A host loads the tree, starts a search and
  reads back the leaf-level results.
- **Overlap queue (method 2).** The hardware is a single node. Host software
  keeps a queue of nodes to visit and feeds them in one per clock. It
  follows the child pointer of every passing non-leaf location and collects
  every passing leaf location. The tree size is limited only by the software.

`rtree2d_fpga_top` holds both side by side. They share clock and reset and
nothing else.

## The node location and the node

`node_location_unit` is one grid cell. It holds:

- a valid bit;
- an MBR: `xlo, ylo, xhi, yhi`, unsigned, `COORD_W` = 16 bits each;
- a pointer, `PTR_W` = 16 bits.

`hit` is combinational. It is high when the location is occupied and its MBR
overlaps the query on both axes. Intervals are closed, so rectangles that
only touch do overlap.

`node_unit` puts `FANOUT = ORDER_X * ORDER_Y` (2*2 by default) location units
together with one extra register, the leaf flag. All results leave the node
together. Location `k` is at column `k % ORDER_X`, row `k / ORDER_X`.

Shared types (`mbr_t`, `loc_entry_t`, `node_entry_t`), the order and the
widths are in `rtree_pkg`. The package also has `tree_nodes(h)` and
`leaf_nodes(h)`:

    tree_nodes(h) = sum over l = 0..h-1 of FANOUT^l
    leaf_nodes(h) = FANOUT^(h-1)

At order 2*2 a tree of height 3 has 21 nodes and 16 leaf nodes. Height 4 has
85 nodes and 64 leaf nodes.

## Complete-tree method: how a search moves down the tree

`complete_tree` instantiates `tree_nodes(HEIGHT)` node units (`HEIGHT` = 4
by default). They are numbered breadth-first, so location `k` of node `n`
leads to node `FANOUT*n + 1 + k`. The wiring encodes the tree shape, which
means the non-leaf pointers are stored but not used in this method.

Every node compares its locations with the latched query at once, which
gives the raw overlap bits. A per-location *pass* register then combines
them with the tree structure:

    pass[n][k] <= overlap[n][k] & pass[parent(n)][slot(n)]    (root: overlap only)

These registers update on each of the `HEIGHT` cycles after `search_start`
and then hold. The level-0 pass bits are right after the first update, and
each further update adds one level. A leaf location therefore passes only
when its own MBR and every ancestor MBR overlap the query. This is the
pruning of a tree search, carried out for all branches at once. A
leaf-level location also needs its node's leaf flag set.

`search_done` pulses `HEIGHT+1` cycles after `search_start`. The pass bits
then hold until the next search, so loading new nodes does not disturb a
result that has not been read yet.

### Controllers and cycle counts

`input_controller` writes nodes in breadth-first order at one per cycle.
The host must drive a valid/ready handshake. `output_controller` walks the
leaf nodes and gives one leaf node per cycle: its index, `FANOUT` hit bits
and `FANOUT` pointers. `complete_tree_engine` wires the two controllers to
the tree. Assertions check that the host starts only one operation at a
time.

Each latency below runs from the start pulse to the done pulse:

| operation    | cycles         | height 3 | height 4 | at 12 ns, height 3 / 4 |
|--------------|----------------|----------|----------|------------------------|
| load         | nodes + 1      | 22       | 86       | 264 / 1032 ns          |
| search       | HEIGHT + 1     | 4        | 5        | 48 / 60 ns             |
| query output | leaf nodes + 2 | 18       | 66       | 216 / 792 ns           |

These are the times the paper reports for its implementations. The
controllers were sized to match them (see below). A "further search" on a
tree that is already loaded is a search plus a query output: 22 or 71
cycles.

## Overlap-queue method

`overlap_node_tester` is one `node_unit` plus a register for the query and
a tag. In any cycle with `test_valid` high, it captures a node, a query and
a caller tag. In the next cycle `res_valid` is high and the outputs give:

- the node's leaf flag;
- the per-location hit bits;
- the pointers;
- the tag.

The host reads a result and offers the next node in the same cycle. A full
traversal therefore costs one cycle per visited node. A query that meets
only one object visits `HEIGHT` nodes. A query that covers everything visits
every node: 85 at height 4. The queue itself is software, and no RTL is
given for it. The testbenches contain a model of it.

## What follows the paper and what does not

Taken from the paper:

- the node location that stores an MBR and a pointer and tests overlap;
- a node made of `X*Y` locations with only a leaf flag of its own;
- the complete tree that tests a whole level at once;
- separate input and output controllers;
- the single-node tester driven by a software queue;
- order 2*2, height 4, 16-bit coordinates;
- the operation times above.

Choices made here, because the paper gives the function but not the
circuit:

- the valid bit for empty locations;
- the 16-bit pointer;
- unsigned coordinates and closed-interval overlap;
- the breadth-first node numbering;
- the level-per-cycle pass registers;
- both controllers, which the paper only names; they were designed to
  reproduce its cycle counts;
- the handshakes, the result tag and the asynchronous active-low reset.

The paper's "initialize" step (6 ns) is taken to be reset.

Departures and limits:

- The paper's height-3 build used 31-bit coordinates. Here the width is the
  package constant `COORD_W`, so it applies to every height. Change it in
  `rtree_pkg` to rebuild at another width.
- The paper gives the number of output nodes of the height-4 tree as 21.
  The leaf level of a 2*2 tree of height 4 has 64 nodes, and the paper's
  query-output time fits 64, so the design uses 64.
- The serial host link and the host or embedded-processor software are not
  included. The engines' load, search and result ports are the top's ports.
- The greedy "least enlargement" search for insertion is only suggested as
  future work. It is not built.
- Only timing in clock cycles is modelled. The 12 ns clock is the paper's
  figure; no timing closure has been done here.

## Size

At the defaults (height 4), the complete tree holds 85 × 4 locations of
81 bits each: about 27 k flip-flops and 340 four-comparator overlap testers.
Storage grows by a factor of `FANOUT` per level, which is why the paper's
FPGA stopped at height 4. The single-node tester is about 400 flip-flops
whatever the tree size.

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/rtree_pkg.sv tb/rtree_ref_pkg.sv tb/tb_rtree2d_fpga_top.sv \
        --top-module tb_rtree2d_fpga_top -o sim && ./obj_dir/sim

`tb/rtree_ref_pkg.sv` is the reference model. It generates random trees of
any height that are spatially consistent, as a quadtree-like partition of a
4096 × 4096 square with some empty locations. It searches them with plain
integer arithmetic.

| testbench                 | what it runs                                                                                 |
|---------------------------|----------------------------------------------------------------------------------------------|
| `tb_node_location_unit`   | edge, touch and empty cases, 2000 random pairs                                               |
| `tb_node_unit`            | 3000 random nodes, leaf flag, hold                                                           |
| `tb_input_controller`     | 85-node loads, back to back and with gaps; load = 86 cycles                                  |
| `tb_output_controller`    | 64-leaf read-outs; 66 cycles                                                                 |
| `tb_complete_tree`        | height 4, 400 searches, ancestor pruning; search = 5 cycles                                  |
| `tb_complete_tree_engine` | height 3 end to end: 22 / 4 / 18 cycles                                                      |
| `tb_overlap_node_tester`  | back-to-back tests, queue traversals; best and worst case: 3 and 21 tests at height 3, 4 and 85 at height 4 |
| `tb_rtree2d_fpga_top`     | whole design at default size, both methods against the reference; counts every mechanism    |
| `tb_figure_example`       | the six-object example (m1, p9, p8, m4, m3, p2) in a sparse height-3 tree, both methods      |

The full-size run (`tb_rtree2d_fpga_top`) takes well under a minute.
