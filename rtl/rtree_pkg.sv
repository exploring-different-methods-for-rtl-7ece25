// rtree_pkg: types and constants shared by the 2DR-tree search hardware.
//
// A node location holds a minimum bounding rectangle (MBR), given by its low
// (x,y) and high (x,y) corners, a pointer to the data it stands for, and a
// valid bit that marks the location as occupied. A node is a two-dimensional
// array of ORDER_X * ORDER_Y locations plus one flag saying whether it is a
// leaf. Order 2*2 and 16-bit coordinates are the configuration in which the
// height-4 complete tree was built; the 16-bit pointer width and the valid bit
// are choices of this design.
//
// Coordinates are unsigned. Two MBRs overlap when their closed intervals
// intersect on both axes, so touching edges count as an overlap.
package rtree_pkg;

  // Number of node locations along x and along y (the node order X * Y).
  localparam int unsigned ORDER_X = 2;
  localparam int unsigned ORDER_Y = 2;
  localparam int unsigned FANOUT  = ORDER_X * ORDER_Y;

  // Width of one MBR coordinate.
  localparam int unsigned COORD_W = 16;
  // Width of the pointer each location carries.
  localparam int unsigned PTR_W   = 16;

  typedef logic [COORD_W-1:0] coord_t;
  typedef logic [PTR_W-1:0]   ptr_t;

  typedef struct packed {
    coord_t xlo;
    coord_t ylo;
    coord_t xhi;
    coord_t yhi;
  } mbr_t;

  typedef struct packed {
    logic valid;
    mbr_t mbr;
    ptr_t ptr;
  } loc_entry_t;

  // Location k sits at column k % ORDER_X, row k / ORDER_X of the node.
  typedef struct packed {
    logic                    leaf;
    loc_entry_t [FANOUT-1:0] loc;
  } node_entry_t;

  // Closed-interval overlap test on both axes.
  function automatic logic mbr_overlap(mbr_t a, mbr_t b);
    return (a.xlo <= b.xhi) && (b.xlo <= a.xhi) &&
           (a.ylo <= b.yhi) && (b.ylo <= a.yhi);
  endfunction

  // Nodes in a complete tree of the given height (levels): sum of FANOUT^l.
  function automatic int unsigned tree_nodes(int unsigned height);
    int unsigned n = 0;
    int unsigned w = 1;
    for (int unsigned l = 0; l < height; l++) begin
      n += w;
      w *= FANOUT;
    end
    return n;
  endfunction

  // Nodes on the last (leaf) level of a complete tree of the given height.
  function automatic int unsigned leaf_nodes(int unsigned height);
    int unsigned w = 1;
    for (int unsigned l = 1; l < height; l++) w *= FANOUT;
    return w;
  endfunction

endpackage
