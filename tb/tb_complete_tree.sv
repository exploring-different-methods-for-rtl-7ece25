// tb_complete_tree: self-checking test of the on-chip complete tree.
//
// Writes a random spatially coherent tree of the default height 4 (85 nodes)
// through the node write port, runs many searches with queries of all sizes
// and compares the leaf-level pass bits and pointers with the reference
// model, which prunes a location whenever any ancestor location fails. The
// done pulse must come HEIGHT+1 = 5 cycles after the start pulse. Counts
// that pruning, empty locations and a leaf-level hit all occurred.
module tb_complete_tree;
  import rtree_pkg::*;
  import rtree_ref_pkg::*;

  localparam int H  = 4;
  localparam int NN = 85;
  localparam int NL = 64;
  localparam int AW = $clog2(NN);

  logic                      clk = 1'b0;
  logic                      rst_n = 1'b0;
  logic                      wr_en = 1'b0;
  logic [AW-1:0]             wr_addr = '0;
  node_entry_t               wr_node = '0;
  logic                      search_start = 1'b0;
  mbr_t                      query = '0;
  logic                      search_busy;
  logic                      search_done;
  logic [NL-1:0][FANOUT-1:0] leaf_hit;
  ptr_t [NL-1:0][FANOUT-1:0] leaf_ptr;

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  int n_pruned = 0, n_hits = 0, n_empty = 0;
  tree_t tree;
  bit exp[];

  complete_tree #(.HEIGHT(H)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_tree();
    for (int n = 0; n < NN; n++) begin
      wr_en   = 1'b1;
      wr_addr = AW'(n);
      wr_node = tree[n];
      @(posedge clk);
      #1;
    end
    wr_en = 1'b0;
  endtask

  task automatic search_and_check(mbr_t q);
    int t0;
    query = q;
    search_start = 1'b1;
    t0 = cyc;
    @(posedge clk);
    #1 search_start = 1'b0;
    query = rand_query(4095);  // must have been latched
    while (!search_done) begin
      @(posedge clk);
      #1;
    end
    checks++;
    if (cyc - t0 != H + 1) begin
      failures++;
      $display("FAIL search took %0d cycles, expected %0d", cyc - t0, H + 1);
    end
    ref_search(tree, H, q, exp);
    for (int j = 0; j < NL; j++)
      for (int k = 0; k < FANOUT; k++) begin
        bit direct = tree[NN - NL + j].loc[k].valid && ref_overlap(tree[NN - NL + j].loc[k].mbr, q);
        checks++;
        if (exp[j * FANOUT + k]) n_hits++;
        if (direct && !exp[j * FANOUT + k]) n_pruned++;
        if (leaf_hit[j][k] !== exp[j * FANOUT + k] || leaf_ptr[j][k] !== tree[NN - NL + j].loc[k].ptr) begin
          failures++;
          $display("FAIL leaf %0d loc %0d hit=%0b exp=%0b", j, k, leaf_hit[j][k], exp[j * FANOUT + k]);
        end
      end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 4; t++) begin
      gen_tree(tree, H, 25);
      foreach (tree[n]) for (int k = 0; k < FANOUT; k++) if (!tree[n].loc[k].valid) n_empty++;
      write_tree();
      for (int s = 0; s < 100; s++) search_and_check(rand_query((s % 4 == 0) ? 4095 : 400));
    end
    // a location that overlaps the query but whose parent was not loaded
    // with an overlapping MBR must be pruned: overwrite the root with MBRs far away
    tree[0].loc[0].mbr = '{xlo: 0, ylo: 0, xhi: 0, yhi: 0};
    wr_en = 1'b1; wr_addr = '0; wr_node = tree[0];
    @(posedge clk);
    #1 wr_en = 1'b0;
    search_and_check('{xlo: 1, ylo: 1, xhi: 2047, yhi: 2047});
    $display("pruned=%0d hits=%0d empty=%0d", n_pruned, n_hits, n_empty);
    checks++;
    if (n_pruned == 0 || n_hits == 0 || n_empty == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
