// node_location_unit: one location of a 2DR-tree node.
//
// It stores an MBR, the pointer that goes with it and a valid bit, and tests
// the stored MBR for overlap against the query MBR presented at its input.
// Storing the pointer and doing the overlap test inside the location follows
// the paper; the valid bit (an unoccupied location never passes) is a
// choice of this design, as is clearing it at reset.
//
// Interface: `load` writes `load_entry` into the unit at the clock edge.
// Timing: `hit` is combinational from the stored entry and `query`, so a
// result is available in the cycle after the entry is written.
module node_location_unit
  import rtree_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  loc_entry_t load_entry,
  input  mbr_t       query,
  output logic       hit,
  output ptr_t       ptr
);

  loc_entry_t entry_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      entry_q <= '0;
    end else if (load) begin
      entry_q <= load_entry;
    end
  end

  always_comb begin
    hit = entry_q.valid && mbr_overlap(entry_q.mbr, query);
    ptr = entry_q.ptr;
  end

endmodule
