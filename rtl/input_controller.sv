// input_controller: loads a complete 2DR-tree into the node units.
//
// A load starts with a pulse on `start`. The controller then accepts one node
// per cycle on `in_valid`/`in_node`, in breadth-first order (root first, then
// each level left to right, the children of node n being nodes
// FANOUT*n+1 .. FANOUT*n+FANOUT), and writes it to the node at `wr_addr`.
// After the last node it pulses `done`. With a node offered every cycle, the
// `done` pulse comes NUM_NODES+1 cycles after `start` (22 cycles for the
// 21-node height-3 tree and 86 for the 85-node height-4 tree, the load times
// the paper reports at a 12 ns clock). The paper names the input
// controller without describing it; the breadth-first order, the handshake
// (`in_ready` high while loading, no back-pressure from the tree) and this
// cycle accounting are choices of this design.
module input_controller
  import rtree_pkg::*;
#(
  parameter int unsigned NUM_NODES = 85,
  localparam int unsigned AW = (NUM_NODES > 1) ? $clog2(NUM_NODES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          in_valid,
  input  node_entry_t   in_node,
  output logic          in_ready,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output node_entry_t   wr_node,
  output logic          busy,
  output logic          done
);

  logic [AW-1:0] addr_q;
  logic          busy_q;
  logic          done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q <= '0;
      busy_q <= 1'b0;
      done_q <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (!busy_q) begin
        if (start) begin
          addr_q <= '0;
          busy_q <= 1'b1;
        end
      end else if (in_valid) begin
        if (addr_q == AW'(NUM_NODES - 1)) begin
          busy_q <= 1'b0;
          done_q <= 1'b1;
          addr_q <= '0;
        end else begin
          addr_q <= addr_q + 1'b1;
        end
      end
    end
  end

  always_comb begin
    in_ready = busy_q;
    wr_en    = busy_q && in_valid;
    wr_addr  = addr_q;
    wr_node  = in_node;
    busy     = busy_q;
    done     = done_q;
  end

endmodule
