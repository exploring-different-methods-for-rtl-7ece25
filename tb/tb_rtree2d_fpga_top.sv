// tb_rtree2d_fpga_top: end-to-end test of the whole design at its default
// size (height 4: 85 nodes, 64 leaf nodes, order 2*2, 16-bit coordinates).
//
// Complete-tree method: loads random trees through the input controller,
// searches, reads all leaf results out and compares the objects found with
// the reference search (a brute-force scan whenever the tree's MBRs are
// consistent); then repeats searches without reloading. Checks the
// cycle counts load 86, search 5, query output 66 (1032, 60 and 792 ns at
// 12 ns per cycle). Overlap-queue method: plays the host queue software on
// the same trees and checks that it finds the same objects, one node test
// per cycle, with HEIGHT tests in the one-path best case and all 85 in the
// worst case. Counts how often each mechanism happened and fails if one
// never did: tree load, search, query output, further search without
// reload, a location pruned by its ancestors, an empty location, a branch
// pruned by the queue search, best case and worst case.
module tb_rtree2d_fpga_top;
  import rtree_pkg::*;
  import rtree_ref_pkg::*;

  localparam int H  = 4;
  localparam int NN = 85;
  localparam int NL = 64;
  localparam int LW = $clog2(NL);

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              m1_load_start = 1'b0;
  logic              m1_node_valid = 1'b0;
  node_entry_t       m1_node_in = '0;
  logic              m1_node_ready;
  logic              m1_load_done;
  logic              m1_search_start = 1'b0;
  mbr_t              m1_query = '0;
  logic              m1_search_done;
  logic              m1_out_start = 1'b0;
  logic              m1_out_valid;
  logic [LW-1:0]     m1_out_leaf;
  logic [FANOUT-1:0] m1_out_hit;
  ptr_t [FANOUT-1:0] m1_out_ptr;
  logic              m1_out_done;
  logic              m1_busy;
  logic              m2_test_valid = 1'b0;
  node_entry_t       m2_test_node = '0;
  mbr_t              m2_test_query = '0;
  ptr_t              m2_test_tag = '0;
  logic              m2_res_valid;
  logic              m2_res_leaf;
  logic [FANOUT-1:0] m2_res_hit;
  ptr_t [FANOUT-1:0] m2_res_ptr;
  ptr_t              m2_res_tag;

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  tree_t tree;
  int found1[$];
  int n_leaf_rows = 0;
  bit consistent = 1'b1;

  // mechanism counters
  int n_load = 0, n_search = 0, n_output = 0, n_further = 0;
  int n_anc_pruned = 0, n_empty = 0, n_queue_pruned = 0, n_best = 0, n_worst = 0;

  rtree2d_fpga_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (rst_n && m1_out_valid) begin
      n_leaf_rows++;
      for (int k = 0; k < FANOUT; k++)
        if (m1_out_hit[k]) found1.push_back(int'(m1_out_ptr[k]));
    end
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d, expected %0d", what, got, exp);
    end
  endtask

  task automatic m1_load();
    int t0 = cyc;
    m1_load_start = 1'b1;
    @(posedge clk);
    #1 m1_load_start = 1'b0;
    for (int n = 0; n < NN; n++) begin
      m1_node_valid = 1'b1;
      m1_node_in    = tree[n];
      @(posedge clk);
      #1;
    end
    m1_node_valid = 1'b0;
    while (!m1_load_done) begin
      @(posedge clk);
      #1;
    end
    check_eq("load cycles", cyc - t0, NN + 1);
    n_load++;
  endtask

  task automatic m1_search(mbr_t q);
    int t0 = cyc;
    m1_query = q;
    m1_search_start = 1'b1;
    @(posedge clk);
    #1 m1_search_start = 1'b0;
    while (!m1_search_done) begin
      @(posedge clk);
      #1;
    end
    check_eq("search cycles", cyc - t0, H + 1);
    n_search++;
    found1.delete();
    n_leaf_rows = 0;
    t0 = cyc;
    m1_out_start = 1'b1;
    @(posedge clk);
    #1 m1_out_start = 1'b0;
    while (!m1_out_done) begin
      @(posedge clk);
      #1;
    end
    check_eq("query output cycles", cyc - t0, NL + 2);
    check_eq("leaf nodes read", n_leaf_rows, NL);
    n_output++;
    found1.sort();
  endtask

  task automatic m2_search(mbr_t q, ref int found[$], output int tests, output int span);
    int queue[$];
    int t0;
    found.delete();
    tests = 0;
    queue.push_back(0);
    t0 = cyc;
    while (queue.size() > 0 || m2_test_valid) begin
      if (queue.size() > 0) begin
        int n = queue.pop_front();
        m2_test_valid = 1'b1;
        m2_test_node  = tree[n];
        m2_test_query = q;
        m2_test_tag   = ptr_t'(n);
        tests++;
      end else begin
        m2_test_valid = 1'b0;
      end
      @(posedge clk);
      #1;
      if (m2_res_valid)
        for (int k = 0; k < FANOUT; k++)
          if (m2_res_hit[k]) begin
            if (m2_res_leaf) found.push_back(int'(m2_res_ptr[k]));
            else queue.push_back(int'(m2_res_ptr[k]));
          end
    end
    span = cyc - t0 - 1;
    found.sort();
  endtask

  task automatic both_searches(mbr_t q, output int tests);
    int exp_found[$];
    int found2[$];
    int span;
    bit exp_leaf[];
    // expected: the leaf locations that pass together with all their ancestors
    ref_search(tree, H, q, exp_leaf);
    for (int j = 0; j < NL; j++)
      for (int k = 0; k < FANOUT; k++)
        if (exp_leaf[j * FANOUT + k]) exp_found.push_back(int'(tree[NN - NL + j].loc[k].ptr));
    exp_found.sort();
    if (consistent) begin
      int brute[$];
      ref_brute(tree, q, brute);
      checks++;
      if (brute != exp_found) begin
        failures++;
        $display("FAIL reference search differs from brute-force scan");
      end
    end
    m1_search(q);
    m1_query = rand_query(4095);  // the tree latched its query; the other method has its own
    checks++;
    if (found1 != exp_found) begin
      failures++;
      $display("FAIL complete tree found %0d objects, expected %0d", found1.size(), exp_found.size());
    end
    m2_search(q, found2, tests, span);
    checks++;
    if (found2 != exp_found) begin
      failures++;
      $display("FAIL overlap queue found %0d objects, expected %0d", found2.size(), exp_found.size());
    end
    check_eq("queue search cycles", span, tests);
    if (tests < NN) n_queue_pruned++;
    // leaf locations whose own MBR overlaps but that an ancestor pruned
    for (int j = 0; j < NL; j++)
      for (int k = 0; k < FANOUT; k++)
        if (tree[NN - NL + j].loc[k].valid && ref_overlap(tree[NN - NL + j].loc[k].mbr, q)
            && !exp_leaf[j * FANOUT + k])
          n_anc_pruned++;
  endtask

  initial begin
    int tests;
    mbr_t q;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int t = 0; t < 3; t++) begin
      gen_tree(tree, H, 25);
      foreach (tree[n]) for (int k = 0; k < FANOUT; k++) if (!tree[n].loc[k].valid) n_empty++;
      m1_load();
      for (int s = 0; s < 12; s++) begin
        if (s > 0) n_further++;
        both_searches(rand_query((s % 4 == 0) ? 4095 : 400), tests);
      end
    end
    // a tree whose parent MBRs are shrunk so that some objects lie outside
    // them: the search must not find those (ancestor pruning)
    gen_tree(tree, H, 0);
    for (int k = 0; k < FANOUT; k++) begin
      tree[0].loc[k].mbr.xhi = tree[0].loc[k].mbr.xlo + 16'd200;
      tree[0].loc[k].mbr.yhi = tree[0].loc[k].mbr.ylo + 16'd200;
    end
    consistent = 1'b0;
    m1_load();
    both_searches('{xlo: 1536, ylo: 1536, xhi: 2047, yhi: 2047}, tests);

    // best case on a full tree: a point inside one object follows one path
    consistent = 1'b1;
    gen_tree(tree, H, 0);
    m1_load();
    q.xlo = tree[NN - 1].loc[FANOUT - 1].mbr.xlo;
    q.ylo = tree[NN - 1].loc[FANOUT - 1].mbr.ylo;
    q.xhi = q.xlo;
    q.yhi = q.ylo;
    both_searches(q, tests);
    check_eq("best-case node tests", tests, H);
    if (tests == H) n_best++;
    // worst case: a query covering everything tests every node
    both_searches('{xlo: 0, ylo: 0, xhi: 4095, yhi: 4095}, tests);
    check_eq("worst-case node tests", tests, NN);
    check_eq("worst-case objects found", found1.size(), NL * FANOUT);
    if (tests == NN) n_worst++;

    $display("mechanisms: load=%0d search=%0d output=%0d further=%0d anc_pruned=%0d empty=%0d queue_pruned=%0d best=%0d worst=%0d",
             n_load, n_search, n_output, n_further, n_anc_pruned, n_empty, n_queue_pruned, n_best, n_worst);
    checks++;
    if (n_load == 0 || n_search == 0 || n_output == 0 || n_further == 0 || n_anc_pruned == 0 ||
        n_empty == 0 || n_queue_pruned == 0 || n_best == 0 || n_worst == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
