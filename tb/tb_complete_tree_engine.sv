// tb_complete_tree_engine: end-to-end test of the complete-tree method.
//
// Runs the engine at height 3 (21 nodes, 16 leaf nodes), the first tree
// size the paper evaluates: load a random tree through the input
// controller, search, read every leaf node out through the output
// controller, and compare the objects found with a brute-force scan. Then
// runs further searches on the same tree without reloading. Checks the
// cycle counts of the three operations: load 22, search 4, query output 18
// (264, 48 and 216 ns at a 12 ns clock).
module tb_complete_tree_engine;
  import rtree_pkg::*;
  import rtree_ref_pkg::*;

  localparam int H  = 3;
  localparam int NN = 21;
  localparam int NL = 16;
  localparam int LW = $clog2(NL);

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              load_start = 1'b0;
  logic              node_valid = 1'b0;
  node_entry_t       node_in = '0;
  logic              node_ready;
  logic              load_done;
  logic              search_start = 1'b0;
  mbr_t              query = '0;
  logic              search_done;
  logic              out_start = 1'b0;
  logic              out_valid;
  logic [LW-1:0]     out_leaf;
  logic [FANOUT-1:0] out_hit;
  ptr_t [FANOUT-1:0] out_ptr;
  logic              out_done;
  logic              busy;

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  tree_t tree;
  int found[$];
  int n_found_total = 0;

  complete_tree_engine #(.HEIGHT(H)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (rst_n && out_valid)
      for (int k = 0; k < FANOUT; k++)
        if (out_hit[k]) found.push_back(int'(out_ptr[k]));
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_latency(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s took %0d cycles, expected %0d", what, got, exp);
    end
  endtask

  task automatic do_load(output int lat);
    int t0 = cyc;
    load_start = 1'b1;
    @(posedge clk);
    #1 load_start = 1'b0;
    for (int n = 0; n < NN; n++) begin
      node_valid = 1'b1;
      node_in    = tree[n];
      @(posedge clk);
      #1;
    end
    node_valid = 1'b0;
    while (!load_done) begin
      @(posedge clk);
      #1;
    end
    lat = cyc - t0;
  endtask

  task automatic do_search(mbr_t q, output int lat_s, output int lat_o);
    int t0 = cyc;
    query = q;
    search_start = 1'b1;
    @(posedge clk);
    #1 search_start = 1'b0;
    while (!search_done) begin
      @(posedge clk);
      #1;
    end
    lat_s = cyc - t0;
    found.delete();
    t0 = cyc;
    out_start = 1'b1;
    @(posedge clk);
    #1 out_start = 1'b0;
    while (!out_done) begin
      @(posedge clk);
      #1;
    end
    lat_o = cyc - t0;
    found.sort();
  endtask

  task automatic compare(mbr_t q);
    int exp_found[$];
    ref_brute(tree, q, exp_found);
    checks++;
    n_found_total += exp_found.size();
    if (found != exp_found) begin
      failures++;
      $display("FAIL found %0d objects, expected %0d", found.size(), exp_found.size());
    end
  endtask

  initial begin
    int ll, ls, lo;
    mbr_t q;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 5; t++) begin
      gen_tree(tree, H, 25);
      do_load(ll);
      check_latency("load", ll, NN + 1);
      for (int s = 0; s < 30; s++) begin
        q = rand_query((s % 3 == 0) ? 4095 : 500);
        do_search(q, ls, lo);
        check_latency("search", ls, H + 1);
        check_latency("query output", lo, NL + 2);
        compare(q);
      end
    end
    checks++;
    if (n_found_total == 0) begin
      failures++;
      $display("FAIL no object was ever found");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
