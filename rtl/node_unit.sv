// node_unit: one 2DR-tree node of order ORDER_X * ORDER_Y.
//
// The node is built from FANOUT node location units. The only state kept at
// node level is whether the node is a leaf, as the paper describes; the
// results of all locations leave the node together as one group.
//
// Interface: `load` writes a whole node (`load_node`: leaf flag and all
// locations) at the clock edge. `hit[k]` and `ptr[k]` are the result and the
// pointer of location k, combinational from the stored node and `query`.
module node_unit
  import rtree_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  node_entry_t      load_node,
  input  mbr_t             query,
  output logic             leaf,
  output logic [FANOUT-1:0] hit,
  output ptr_t [FANOUT-1:0] ptr
);

  logic leaf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      leaf_q <= 1'b0;
    end else if (load) begin
      leaf_q <= load_node.leaf;
    end
  end

  assign leaf = leaf_q;

  for (genvar k = 0; k < FANOUT; k++) begin : g_loc
    node_location_unit u_loc (
      .clk       (clk),
      .rst_n     (rst_n),
      .load      (load),
      .load_entry(load_node.loc[k]),
      .query     (query),
      .hit       (hit[k]),
      .ptr       (ptr[k])
    );
  end

endmodule
