// complete_tree_engine: the complete-tree search method, end to end.
//
// The input controller streams the tree into the on-chip complete tree, the
// tree tests all nodes of each level at once, and the output controller reads
// the leaf-level results back out, one leaf node per cycle. The three
// operations are started separately by the host: load once, then any number
// of search + query-output pairs ("further searches" need no reload).
//
// Timing at the default height 4 (85 nodes, 64 leaf nodes), measured from the
// start pulse to the done pulse: load 86 cycles, search 5, query output 66;
// height 3 gives 22, 4 and 18. At a 12 ns clock these are the paper's
// load, search and query-output times. The host must start one operation
// only when the others are idle; assertions check this. The assertions are
// disabled during reset through a clocked `disable iff`, so lint sees the
// asynchronous reset also used synchronously; this affects no logic.
module complete_tree_engine
  import rtree_pkg::*;
#(
  parameter int unsigned HEIGHT = 4,
  localparam int unsigned NUM_NODES = tree_nodes(HEIGHT),
  localparam int unsigned NUM_LEAF  = leaf_nodes(HEIGHT),
  localparam int unsigned AW = (NUM_NODES > 1) ? $clog2(NUM_NODES) : 1,
  localparam int unsigned LW = (NUM_LEAF > 1) ? $clog2(NUM_LEAF) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // load
  input  logic              load_start,
  input  logic              node_valid,
  input  node_entry_t       node_in,
  output logic              node_ready,
  output logic              load_done,
  // search
  input  logic              search_start,
  input  mbr_t              query,
  output logic              search_done,
  // query output
  input  logic              out_start,
  output logic              out_valid,
  output logic [LW-1:0]     out_leaf,
  output logic [FANOUT-1:0] out_hit,
  output ptr_t [FANOUT-1:0] out_ptr,
  output logic              out_done,
  output logic              busy
);

  logic                            wr_en;
  logic [AW-1:0]                   wr_addr;
  node_entry_t                     wr_node;
  logic                            load_busy, search_busy, out_busy;
  logic [NUM_LEAF-1:0][FANOUT-1:0] leaf_hit;
  ptr_t [NUM_LEAF-1:0][FANOUT-1:0] leaf_ptr;

  input_controller #(.NUM_NODES(NUM_NODES)) u_in (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (load_start),
    .in_valid(node_valid),
    .in_node (node_in),
    .in_ready(node_ready),
    .wr_en   (wr_en),
    .wr_addr (wr_addr),
    .wr_node (wr_node),
    .busy    (load_busy),
    .done    (load_done)
  );

  complete_tree #(.HEIGHT(HEIGHT)) u_tree (
    .clk         (clk),
    .rst_n       (rst_n),
    .wr_en       (wr_en),
    .wr_addr     (wr_addr),
    .wr_node     (wr_node),
    .search_start(search_start),
    .query       (query),
    .search_busy (search_busy),
    .search_done (search_done),
    .leaf_hit    (leaf_hit),
    .leaf_ptr    (leaf_ptr)
  );

  output_controller #(.NUM_LEAF(NUM_LEAF)) u_out (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (out_start),
    .leaf_hit (leaf_hit),
    .leaf_ptr (leaf_ptr),
    .out_valid(out_valid),
    .out_leaf (out_leaf),
    .out_hit  (out_hit),
    .out_ptr  (out_ptr),
    .busy     (out_busy),
    .done     (out_done)
  );

  assign busy = load_busy || search_busy || out_busy;

  // One operation at a time.
  a_no_search_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    search_start |-> !(load_busy || out_busy));
  a_no_output_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    out_start |-> !(load_busy || search_busy));
  a_no_load_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    load_start |-> !(search_busy || out_busy));

endmodule
