// output_controller: reads the search results out of the leaf level.
//
// After a pulse on `start` the controller steps an address through the
// NUM_LEAF leaf nodes, one per cycle, and presents each node's results on
// registered outputs: `out_leaf` (leaf index, 0 = leftmost), `out_hit` (one
// bit per location) and `out_ptr` (the locations' pointers), qualified by
// `out_valid`. The address is issued in cycles 1..NUM_LEAF after `start`, the
// registered data appear one cycle later, and `done` pulses NUM_LEAF+2 cycles
// after `start` (18 cycles for the 16 leaf nodes of a height-3 tree, 66 for
// the 64 of a height-4 tree, the query-output times the paper reports at
// a 12 ns clock). The paper names the output controller without
// describing it; reading one leaf node per cycle through a registered
// multiplexer is the choice of this design that matches those times.
module output_controller
  import rtree_pkg::*;
#(
  parameter int unsigned NUM_LEAF = 64,
  localparam int unsigned LW = (NUM_LEAF > 1) ? $clog2(NUM_LEAF) : 1
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               start,
  input  logic [NUM_LEAF-1:0][FANOUT-1:0]    leaf_hit,
  input  ptr_t [NUM_LEAF-1:0][FANOUT-1:0]    leaf_ptr,
  output logic                               out_valid,
  output logic [LW-1:0]                      out_leaf,
  output logic [FANOUT-1:0]                  out_hit,
  output ptr_t [FANOUT-1:0]                  out_ptr,
  output logic                               busy,
  output logic                               done
);

  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_LAST} state_t;

  state_t        state_q;
  logic [LW-1:0] addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      addr_q    <= '0;
      out_valid <= 1'b0;
      out_leaf  <= '0;
      out_hit   <= '0;
      out_ptr   <= '0;
      done      <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          addr_q  <= '0;
          state_q <= S_SCAN;
        end
        S_SCAN: begin
          out_valid <= 1'b1;
          out_leaf  <= addr_q;
          out_hit   <= leaf_hit[addr_q];
          out_ptr   <= leaf_ptr[addr_q];
          if (addr_q == LW'(NUM_LEAF - 1)) begin
            state_q <= S_LAST;
          end else begin
            addr_q <= addr_q + 1'b1;
          end
        end
        S_LAST: begin
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);

endmodule
