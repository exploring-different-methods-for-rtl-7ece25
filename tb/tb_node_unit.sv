// tb_node_unit: self-checking test of one 2DR-tree node.
//
// Loads random nodes (random leaf flag, occupied and empty locations) and
// checks every location's hit bit and pointer, and the node's leaf flag,
// against an integer overlap test. Also checks that the node holds its
// contents while `load` is low.
module tb_node_unit;
  import rtree_pkg::*;
  import rtree_ref_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              load = 1'b0;
  node_entry_t       load_node = '0;
  mbr_t              query = '0;
  logic              leaf;
  logic [FANOUT-1:0] hit;
  ptr_t [FANOUT-1:0] ptr;

  int checks = 0;
  int failures = 0;
  node_entry_t nd;
  int hits_seen = 0;

  node_unit dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic node_entry_t rand_node();
    node_entry_t n;
    n.leaf = 1'($urandom);
    for (int k = 0; k < FANOUT; k++) begin
      n.loc[k].valid = ($urandom_range(0, 3) != 0);
      n.loc[k].mbr   = rand_query(600);
      n.loc[k].ptr   = ptr_t'($urandom);
    end
    return n;
  endfunction

  task automatic check_node(node_entry_t n, mbr_t q);
    #1;
    checks++;
    if (leaf !== n.leaf) begin
      failures++;
      $display("FAIL leaf flag %0b exp %0b", leaf, n.leaf);
    end
    for (int k = 0; k < FANOUT; k++) begin
      bit e = n.loc[k].valid && ref_overlap(n.loc[k].mbr, q);
      checks++;
      if (e) hits_seen++;
      if (hit[k] !== e || ptr[k] !== n.loc[k].ptr) begin
        failures++;
        $display("FAIL loc %0d hit=%0b exp=%0b ptr=%h exp=%h", k, hit[k], e, ptr[k], n.loc[k].ptr);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    query = rand_query(4095);
    #1;
    checks++;
    if (hit !== '0 || leaf !== 1'b0) begin
      failures++;
      $display("FAIL node not empty after reset");
    end
    for (int i = 0; i < 3000; i++) begin
      nd = rand_node();
      load_node = nd;
      load = 1'b1;
      @(posedge clk);
      #1 load = 1'b0;
      load_node = rand_node();
      query = rand_query(1500);
      check_node(nd, query);
      query = rand_query(1500);
      @(posedge clk);
      check_node(nd, query);
    end
    checks++;
    if (hits_seen < 500) begin
      failures++;
      $display("FAIL too few hits exercised: %0d", hits_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
