// rtree2d_fpga_top: both 2DR-tree search methods side by side.
//
// m1_*: the complete-tree method. The whole tree (HEIGHT levels, order
// 2*2 by default) is loaded through an input controller, all nodes of a level
// are tested against the query at once, and an output controller reads the
// leaf-level results out one leaf node per cycle.
// m2_*: the overlap-queue method. A single node tester checks one node per
// cycle; the queue that feeds it and collects results is host software, so
// its ports come straight out of the top.
// The host link (a serial cable in the paper) and the host software are
// not part of this RTL; their signals are the top's ports. Both halves share
// clock and reset and are otherwise independent.
module rtree2d_fpga_top
  import rtree_pkg::*;
#(
  parameter int unsigned HEIGHT = 4,
  localparam int unsigned NUM_LEAF = leaf_nodes(HEIGHT),
  localparam int unsigned LW = (NUM_LEAF > 1) ? $clog2(NUM_LEAF) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // complete-tree method
  input  logic              m1_load_start,
  input  logic              m1_node_valid,
  input  node_entry_t       m1_node_in,
  output logic              m1_node_ready,
  output logic              m1_load_done,
  input  logic              m1_search_start,
  input  mbr_t              m1_query,
  output logic              m1_search_done,
  input  logic              m1_out_start,
  output logic              m1_out_valid,
  output logic [LW-1:0]     m1_out_leaf,
  output logic [FANOUT-1:0] m1_out_hit,
  output ptr_t [FANOUT-1:0] m1_out_ptr,
  output logic              m1_out_done,
  output logic              m1_busy,
  // overlap-queue method
  input  logic              m2_test_valid,
  input  node_entry_t       m2_test_node,
  input  mbr_t              m2_test_query,
  input  ptr_t              m2_test_tag,
  output logic              m2_res_valid,
  output logic              m2_res_leaf,
  output logic [FANOUT-1:0] m2_res_hit,
  output ptr_t [FANOUT-1:0] m2_res_ptr,
  output ptr_t              m2_res_tag
);

  complete_tree_engine #(.HEIGHT(HEIGHT)) u_m1 (
    .clk         (clk),
    .rst_n       (rst_n),
    .load_start  (m1_load_start),
    .node_valid  (m1_node_valid),
    .node_in     (m1_node_in),
    .node_ready  (m1_node_ready),
    .load_done   (m1_load_done),
    .search_start(m1_search_start),
    .query       (m1_query),
    .search_done (m1_search_done),
    .out_start   (m1_out_start),
    .out_valid   (m1_out_valid),
    .out_leaf    (m1_out_leaf),
    .out_hit     (m1_out_hit),
    .out_ptr     (m1_out_ptr),
    .out_done    (m1_out_done),
    .busy        (m1_busy)
  );

  overlap_node_tester u_m2 (
    .clk       (clk),
    .rst_n     (rst_n),
    .test_valid(m2_test_valid),
    .test_node (m2_test_node),
    .test_query(m2_test_query),
    .test_tag  (m2_test_tag),
    .res_valid (m2_res_valid),
    .res_leaf  (m2_res_leaf),
    .res_hit   (m2_res_hit),
    .res_ptr   (m2_res_ptr),
    .res_tag   (m2_res_tag)
  );

endmodule
