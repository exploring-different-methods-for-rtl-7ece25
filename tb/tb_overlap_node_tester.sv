// tb_overlap_node_tester: self-checking test of the overlap-queue method.
//
// Part 1 streams random nodes back to back and checks each node's results,
// one cycle after it was offered. Part 2 plays the host software: a queue
// that starts with the root, sends one queued node per cycle, queues the
// child of every passing non-leaf location and collects every passing leaf
// location. On random height-4 trees the collected objects must equal a
// brute-force scan. The number of tests must be HEIGHT for a query that
// meets a single object (best case, one path) and every node of a full tree
// for a query covering everything (worst case), at one test per cycle, on
// trees of height 3 (3 and 21 tests) and 4 (4 and 85 tests).
module tb_overlap_node_tester;
  import rtree_pkg::*;
  import rtree_ref_pkg::*;

  localparam int H  = 4;
  localparam int NN = 85;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              test_valid = 1'b0;
  node_entry_t       test_node = '0;
  mbr_t              test_query = '0;
  ptr_t              test_tag = '0;
  logic              res_valid;
  logic              res_leaf;
  logic [FANOUT-1:0] res_hit;
  ptr_t [FANOUT-1:0] res_ptr;
  ptr_t              res_tag;

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  int n_pruned_runs = 0;
  tree_t tree;

  overlap_node_tester dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Host-software queue search. Returns the number of node tests and the
  // cycles from the first test to the last result.
  task automatic queue_search(mbr_t q, ref int found[$], output int tests, output int span);
    int queue[$];
    int t0;
    found.delete();
    tests = 0;
    queue.push_back(0);
    t0 = cyc;
    while (queue.size() > 0 || test_valid) begin
      int n;
      // offer the next queued node in this cycle
      if (queue.size() > 0) begin
        n = queue.pop_front();
        test_valid = 1'b1;
        test_node  = tree[n];
        test_query = q;
        test_tag   = ptr_t'(n);
        tests++;
      end else begin
        test_valid = 1'b0;
      end
      @(posedge clk);
      #1;
      if (res_valid) begin
        checks++;
        if (res_leaf !== tree[res_tag].leaf) begin
          failures++;
          $display("FAIL leaf flag of node %0d", res_tag);
        end
        for (int k = 0; k < FANOUT; k++) begin
          bit e = tree[res_tag].loc[k].valid && ref_overlap(tree[res_tag].loc[k].mbr, q);
          checks++;
          if (res_hit[k] !== e || res_ptr[k] !== tree[res_tag].loc[k].ptr) begin
            failures++;
            $display("FAIL node %0d loc %0d hit=%0b exp=%0b", res_tag, k, res_hit[k], e);
          end
          if (res_hit[k]) begin
            if (res_leaf) found.push_back(int'(res_ptr[k]));
            else queue.push_back(int'(res_ptr[k]));
          end
        end
      end
    end
    span = cyc - t0 - 1;
    test_valid = 1'b0;
    found.sort();
  endtask

  task automatic compare_found(mbr_t q, ref int found[$]);
    int exp_found[$];
    ref_brute(tree, q, exp_found);
    checks++;
    if (found != exp_found) begin
      failures++;
      $display("FAIL found %0d objects, expected %0d", found.size(), exp_found.size());
    end
  endtask

  initial begin
    int found[$];
    int tests, span;
    node_entry_t prev;
    mbr_t q, pq;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // Part 1: random nodes back to back
    for (int i = 0; i < 2000; i++) begin
      for (int k = 0; k < FANOUT; k++) begin
        test_node.loc[k].valid = ($urandom_range(0, 3) != 0);
        test_node.loc[k].mbr   = rand_query(1500);
        test_node.loc[k].ptr   = ptr_t'($urandom);
      end
      test_node.leaf = 1'($urandom);
      test_query = rand_query(1500);
      test_tag   = ptr_t'(i);
      test_valid = 1'b1;
      prev = test_node;
      pq = test_query;
      @(posedge clk);
      #1;
      checks++;
      if (!res_valid || res_tag !== ptr_t'(i) || res_leaf !== prev.leaf) begin
        failures++;
        $display("FAIL result %0d not valid next cycle", i);
      end
      for (int k = 0; k < FANOUT; k++) begin
        automatic bit e = prev.loc[k].valid && ref_overlap(prev.loc[k].mbr, pq);
        checks++;
        if (res_hit[k] !== e || res_ptr[k] !== prev.loc[k].ptr) begin
          failures++;
          $display("FAIL random node %0d loc %0d hit=%0b exp=%0b ptr=%h exp=%h", i, k, res_hit[k], e, res_ptr[k], prev.loc[k].ptr);
        end
      end
    end
    // a single node: result valid in exactly the next cycle
    test_valid = 1'b1;
    @(posedge clk);
    #1 test_valid = 1'b0;
    #1;
    checks++;
    if (!res_valid) begin
      failures++;
      $display("FAIL res_valid missing one cycle after a single test");
    end
    @(posedge clk);
    #1;
    checks++;
    if (res_valid) begin
      failures++;
      $display("FAIL res_valid without a test");
    end

    // Part 2: queue search on random trees
    for (int t = 0; t < 5; t++) begin
      gen_tree(tree, H, 25);
      for (int s = 0; s < 40; s++) begin
        q = rand_query((s % 5 == 0) ? 4095 : 300);
        queue_search(q, found, tests, span);
        compare_found(q, found);
        checks++;
        if (span != tests) begin
          failures++;
          $display("FAIL %0d tests took %0d cycles", tests, span);
        end
        if (tests < NN) n_pruned_runs++;
      end
    end

    // best case (a point inside one object of a full tree follows one path)
    // and worst case (a query covering everything tests every node), for
    // both tree heights evaluated: 3 / 21 tests at height 3, 4 / 85 at 4
    for (int h = 3; h <= H; h++) begin
      gen_tree(tree, h, 0);
      q.xlo = tree[ref_nodes(h) - 1].loc[FANOUT - 1].mbr.xlo;
      q.ylo = tree[ref_nodes(h) - 1].loc[FANOUT - 1].mbr.ylo;
      q.xhi = q.xlo;
      q.yhi = q.ylo;
      queue_search(q, found, tests, span);
      compare_found(q, found);
      checks++;
      if (tests != h || span != h) begin
        failures++;
        $display("FAIL height %0d best case %0d tests in %0d cycles, expected %0d", h, tests, span, h);
      end
      q = '{xlo: 0, ylo: 0, xhi: 4095, yhi: 4095};
      queue_search(q, found, tests, span);
      compare_found(q, found);
      checks++;
      if (tests != ref_nodes(h) || span != ref_nodes(h) || found.size() != ref_leaves(h) * FANOUT) begin
        failures++;
        $display("FAIL height %0d worst case %0d tests in %0d cycles, %0d found", h, tests, span, found.size());
      end
    end
    checks++;
    if (n_pruned_runs == 0) begin
      failures++;
      $display("FAIL no search pruned any branch");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
