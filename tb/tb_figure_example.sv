// tb_figure_example: the six-object example layout in a height-3 tree.
//
// Objects m1, p9, p8 (upper region) and m4, m3, p2 (lower region) are stored
// in a sparse 2*2 tree of height 3: the root uses two locations, each of
// their nodes two locations, and the four leaf nodes hold one or two objects.
// Only 7 of the 21 nodes are occupied; the rest stay empty. The coordinates
// are this testbench's own (they are chosen to reproduce the arrangement of the example, not measured from it); points
// are zero-size rectangles. Both search methods run the same queries and
// must return the listed objects; the complete tree must take 22, 4 and 18
// cycles for load, search and query output.
module tb_figure_example;
  import rtree_pkg::*;

  localparam int H  = 3;
  localparam int NN = 21;
  localparam int NL = 16;
  localparam int LW = $clog2(NL);

  // object pointers
  localparam ptr_t M1 = 16'd1, P9 = 16'd2, P8 = 16'd3, M4 = 16'd4, M3 = 16'd5, P2 = 16'd6;

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
  node_entry_t tree[NN];
  int found1[$];

  rtree2d_fpga_top #(.HEIGHT(H)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk)
    if (rst_n && m1_out_valid)
      for (int k = 0; k < FANOUT; k++)
        if (m1_out_hit[k]) found1.push_back(int'(m1_out_ptr[k]));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic mbr_t rect(int xl, int yl, int xh, int yh);
    return '{xlo: coord_t'(xl), ylo: coord_t'(yl), xhi: coord_t'(xh), yhi: coord_t'(yh)};
  endfunction

  function automatic void put(int n, int k, mbr_t m, ptr_t p);
    tree[n].loc[k].valid = 1'b1;
    tree[n].loc[k].mbr   = m;
    tree[n].loc[k].ptr   = p;
  endfunction

  // bounding box of node c, stored in location k of node n
  function automatic void put_parent(int n, int k, int c);
    mbr_t bb;
    bit first = 1'b1;
    for (int j = 0; j < FANOUT; j++)
      if (tree[c].loc[j].valid) begin
        if (first) bb = tree[c].loc[j].mbr;
        if (tree[c].loc[j].mbr.xlo < bb.xlo) bb.xlo = tree[c].loc[j].mbr.xlo;
        if (tree[c].loc[j].mbr.ylo < bb.ylo) bb.ylo = tree[c].loc[j].mbr.ylo;
        if (tree[c].loc[j].mbr.xhi > bb.xhi) bb.xhi = tree[c].loc[j].mbr.xhi;
        if (tree[c].loc[j].mbr.yhi > bb.yhi) bb.yhi = tree[c].loc[j].mbr.yhi;
        first = 1'b0;
      end
    put(n, k, bb, ptr_t'(c));
  endfunction

  task automatic build();
    foreach (tree[n]) tree[n] = '0;
    for (int n = 5; n < NN; n++) tree[n].leaf = 1'b1;
    put(15, 2, rect(32, 125, 52, 170), M1);
    put(16, 2, rect(128, 137, 128, 137), P9);
    put(16, 3, rect(178, 126, 178, 126), P8);
    put(19, 2, rect(82, 12, 94, 103), M4);
    put(20, 2, rect(126, 12, 148, 78), M3);
    put(20, 3, rect(230, 45, 230, 45), P2);
    put_parent(3, 2, 15);
    put_parent(3, 3, 16);
    put_parent(4, 2, 19);
    put_parent(4, 3, 20);
    put_parent(0, 2, 3);
    put_parent(0, 3, 4);
  endtask

  task automatic check_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d, expected %0d", what, got, exp);
    end
  endtask

  task automatic wait_for(ref logic sig);
    while (!sig) begin
      @(posedge clk);
      #1;
    end
  endtask

  task automatic run_query(string name, mbr_t q, int expect_ptrs[$], int expect_tests);
    int t0, tests;
    int found2[$];
    int queue[$];
    expect_ptrs.sort();
    // complete tree
    m1_query = q;
    m1_search_start = 1'b1;
    t0 = cyc;
    @(posedge clk);
    #1 m1_search_start = 1'b0;
    wait_for(m1_search_done);
    check_eq("search cycles", cyc - t0, H + 1);
    found1.delete();
    m1_out_start = 1'b1;
    t0 = cyc;
    @(posedge clk);
    #1 m1_out_start = 1'b0;
    wait_for(m1_out_done);
    check_eq("query output cycles", cyc - t0, NL + 2);
    found1.sort();
    checks++;
    if (found1 != expect_ptrs) begin
      failures++;
      $display("FAIL %s: complete tree found %p, expected %p", name, found1, expect_ptrs);
    end
    // overlap queue
    tests = 0;
    queue.push_back(0);
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
            if (m2_res_leaf) found2.push_back(int'(m2_res_ptr[k]));
            else queue.push_back(int'(m2_res_ptr[k]));
          end
    end
    found2.sort();
    checks++;
    if (found2 != expect_ptrs) begin
      failures++;
      $display("FAIL %s: overlap queue found %p, expected %p", name, found2, expect_ptrs);
    end
    check_eq({name, " node tests"}, tests, expect_tests);
  endtask

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    build();
    m1_load_start = 1'b1;
    t0 = cyc;
    @(posedge clk);
    #1 m1_load_start = 1'b0;
    for (int n = 0; n < NN; n++) begin
      m1_node_valid = 1'b1;
      m1_node_in    = tree[n];
      @(posedge clk);
      #1;
    end
    m1_node_valid = 1'b0;
    wait_for(m1_load_done);
    check_eq("load cycles", cyc - t0, NN + 1);

    run_query("whole space", rect(0, 0, 299, 199), '{1, 2, 3, 4, 5, 6}, 7);
    run_query("between p9 and p8", rect(120, 120, 180, 140), '{2, 3}, 3);
    run_query("inside m4", rect(85, 50, 90, 60), '{4}, 3);
    run_query("m3 and p2", rect(140, 40, 240, 50), '{5, 6}, 3);
    run_query("empty corner", rect(250, 150, 290, 190), '{}, 1);
    run_query("left edge of m1", rect(0, 140, 32, 141), '{1}, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
