// overlap_node_tester: the FPGA part of the overlap-queue search method.
//
// A single node unit tests one node at a time. Software keeps the queue: it
// starts with the root, sends each queued node here, and for every location
// that passes either queues the child node the pointer names (non-leaf node)
// or records the MBR as found (leaf node). Only one node of hardware is
// needed, so the tree may be of any size.
//
// Interface: in a cycle with `test_valid` high, `test_node` (leaf flag and
// all locations, pointers included), `test_query` and a caller-chosen
// `test_tag` are captured. In the next cycle `res_valid` is high and
// `res_hit`, `res_ptr`, `res_leaf` and `res_tag` give that node's results.
// A new node may be offered every cycle, so one test costs one clock (12 ns
// in the paper's estimate). The paper gives the method; the tag and
// the one-cycle capture-then-test timing are choices of this design.
module overlap_node_tester
  import rtree_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              test_valid,
  input  node_entry_t       test_node,
  input  mbr_t              test_query,
  input  ptr_t              test_tag,
  output logic              res_valid,
  output logic              res_leaf,
  output logic [FANOUT-1:0] res_hit,
  output ptr_t [FANOUT-1:0] res_ptr,
  output ptr_t              res_tag
);

  mbr_t query_q;
  ptr_t tag_q;
  logic valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      query_q <= '0;
      tag_q   <= '0;
      valid_q <= 1'b0;
    end else begin
      valid_q <= test_valid;
      if (test_valid) begin
        query_q <= test_query;
        tag_q   <= test_tag;
      end
    end
  end

  node_unit u_node (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (test_valid),
    .load_node(test_node),
    .query    (query_q),
    .leaf     (res_leaf),
    .hit      (res_hit),
    .ptr      (res_ptr)
  );

  assign res_valid = valid_q;
  assign res_tag   = tag_q;

endmodule
