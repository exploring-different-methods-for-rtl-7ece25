// complete_tree: the whole 2DR-tree held on chip (the complete-tree method).
//
// The tree is complete and of order ORDER_X * ORDER_Y: HEIGHT levels with
// FANOUT^l nodes on level l, numbered breadth-first, so node n's location k
// points to node FANOUT*n+1+k. No split point is computed: every node of a
// level is tested against the query at once, and a location passes only if
// its own MBR overlaps the query and the parent location that points to its
// node passed too. Pruning therefore travels down the tree one level per
// clock. The leaf-level results are passed out for the output controller;
// a leaf-level location reports a hit only if its node was loaded as a leaf.
//
// Interface: `wr_en`/`wr_addr`/`wr_node` write one node. `search_start`
// latches `query`; the pass flags are then updated for HEIGHT cycles and
// frozen, and `search_done` pulses HEIGHT+1 cycles after `search_start`
// (4 cycles for height 3, 5 for height 4, the search times the paper
// reports at a 12 ns clock). The level-by-level registered propagation and
// the frozen results are choices of this design that match those times.
module complete_tree
  import rtree_pkg::*;
#(
  parameter int unsigned HEIGHT = 4,
  localparam int unsigned NUM_NODES  = tree_nodes(HEIGHT),
  localparam int unsigned NUM_LEAF   = leaf_nodes(HEIGHT),
  localparam int unsigned FIRST_LEAF = NUM_NODES - NUM_LEAF,
  localparam int unsigned AW = (NUM_NODES > 1) ? $clog2(NUM_NODES) : 1,
  localparam int unsigned CW = $clog2(HEIGHT + 1)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // node write port
  input  logic                            wr_en,
  input  logic [AW-1:0]                   wr_addr,
  input  node_entry_t                     wr_node,
  // search
  input  logic                            search_start,
  input  mbr_t                            query,
  output logic                            search_busy,
  output logic                            search_done,
  // results of the leaf level
  output logic [NUM_LEAF-1:0][FANOUT-1:0] leaf_hit,
  output ptr_t [NUM_LEAF-1:0][FANOUT-1:0] leaf_ptr
);

  mbr_t          query_q;
  logic          busy_q;
  logic          done_q;
  logic [CW-1:0] cnt_q;

  logic [NUM_NODES-1:0][FANOUT-1:0] ov;       // location overlaps the query
  logic [NUM_NODES-1:0][FANOUT-1:0] pass_q;   // location and all ancestors passed
  ptr_t [NUM_NODES-1:0][FANOUT-1:0] ptr;
  logic [NUM_NODES-1:0]             is_leaf;

  // search sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      query_q <= '0;
      busy_q  <= 1'b0;
      done_q  <= 1'b0;
      cnt_q   <= '0;
    end else begin
      done_q <= 1'b0;
      if (!busy_q) begin
        if (search_start) begin
          query_q <= query;
          busy_q  <= 1'b1;
          cnt_q   <= '0;
        end
      end else if (cnt_q == CW'(HEIGHT - 1)) begin
        busy_q <= 1'b0;
        done_q <= 1'b1;
      end else begin
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end

  assign search_busy = busy_q;
  assign search_done = done_q;

  for (genvar n = 0; n < NUM_NODES; n++) begin : g_node
    logic parent_pass;

    node_unit u_node (
      .clk      (clk),
      .rst_n    (rst_n),
      .load     (wr_en && (wr_addr == AW'(n))),
      .load_node(wr_node),
      .query    (query_q),
      .leaf     (is_leaf[n]),
      .hit      (ov[n]),
      .ptr      (ptr[n])
    );

    if (n == 0) begin : g_root
      assign parent_pass = 1'b1;
    end else begin : g_child
      assign parent_pass = pass_q[(n - 1) / FANOUT][(n - 1) % FANOUT];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        pass_q[n] <= '0;
      end else if (busy_q) begin
        pass_q[n] <= ov[n] & {FANOUT{parent_pass}};
      end
    end
  end

  for (genvar j = 0; j < NUM_LEAF; j++) begin : g_leaf_out
    assign leaf_hit[j] = pass_q[FIRST_LEAF + j] & {FANOUT{is_leaf[FIRST_LEAF + j]}};
    assign leaf_ptr[j] = ptr[FIRST_LEAF + j];
  end

endmodule
