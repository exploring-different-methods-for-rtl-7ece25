// tb_node_location_unit: self-checking test of one node location unit.
//
// Loads random and hand-picked MBRs (including rectangles that only touch
// and unoccupied locations), presents queries and compares `hit` and `ptr`
// with an overlap test computed here on plain integers. A watchdog ends the
// run with a failure if it hangs.
module tb_node_location_unit;
  import rtree_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       load = 1'b0;
  loc_entry_t load_entry = '0;
  mbr_t       query = '0;
  logic       hit;
  ptr_t       ptr;

  int checks = 0;
  int failures = 0;

  node_location_unit dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ref_overlap(int axl, int ayl, int axh, int ayh,
                                     int bxl, int byl, int bxh, int byh);
    return !(axh < bxl || bxh < axl || ayh < byl || byh < ayl);
  endfunction

  function automatic mbr_t rand_mbr(int unsigned span);
    int unsigned x0 = $urandom_range(0, 1000);
    int unsigned y0 = $urandom_range(0, 1000);
    mbr_t m;
    m.xlo = coord_t'(x0);
    m.ylo = coord_t'(y0);
    m.xhi = coord_t'(x0 + $urandom_range(0, span));
    m.yhi = coord_t'(y0 + $urandom_range(0, span));
    return m;
  endfunction

  task automatic write_entry(bit v, mbr_t m, ptr_t p);
    load_entry.valid = v;
    load_entry.mbr   = m;
    load_entry.ptr   = p;
    load = 1'b1;
    @(posedge clk);
    #1 load = 1'b0;
  endtask

  task automatic check(bit exp_hit, ptr_t exp_ptr, string what);
    #1;
    checks++;
    if (hit !== exp_hit || ptr !== exp_ptr) begin
      failures++;
      $display("FAIL %s: hit=%0b exp=%0b ptr=%h exp=%h", what, hit, exp_hit, ptr, exp_ptr);
    end
  endtask

  initial begin
    mbr_t s, q;
    ptr_t p;
    automatic int unsigned nhit = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // after reset the location is empty
    query = '{xlo: 0, ylo: 0, xhi: 16'hffff, yhi: 16'hffff};
    check(1'b0, '0, "empty after reset");

    // touching edges count as overlap, one past does not
    write_entry(1'b1, '{xlo: 10, ylo: 10, xhi: 20, yhi: 20}, 16'h1234);
    query = '{xlo: 20, ylo: 20, xhi: 30, yhi: 30};
    check(1'b1, 16'h1234, "corner touch");
    query = '{xlo: 21, ylo: 5, xhi: 30, yhi: 30};
    check(1'b0, 16'h1234, "right of");
    query = '{xlo: 0, ylo: 0, xhi: 9, yhi: 30};
    check(1'b0, 16'h1234, "left of");
    query = '{xlo: 0, ylo: 21, xhi: 30, yhi: 30};
    check(1'b0, 16'h1234, "above");
    query = '{xlo: 0, ylo: 0, xhi: 30, yhi: 9};
    check(1'b0, 16'h1234, "below");
    query = '{xlo: 12, ylo: 12, xhi: 13, yhi: 13};
    check(1'b1, 16'h1234, "inside");
    query = '{xlo: 0, ylo: 0, xhi: 100, yhi: 100};
    check(1'b1, 16'h1234, "covering");
    query = '{xlo: 15, ylo: 0, xhi: 15, yhi: 100};
    check(1'b1, 16'h1234, "crossing");

    // an unoccupied location never passes
    write_entry(1'b0, '{xlo: 10, ylo: 10, xhi: 20, yhi: 20}, 16'h0042);
    query = '{xlo: 12, ylo: 12, xhi: 13, yhi: 13};
    check(1'b0, 16'h0042, "invalid location");

    // random
    for (int i = 0; i < 2000; i++) begin
      s = rand_mbr(300);
      p = ptr_t'($urandom);
      write_entry(1'b1, s, p);
      q = rand_mbr(300);
      query = q;
      if (ref_overlap(int'(s.xlo), int'(s.ylo), int'(s.xhi), int'(s.yhi), int'(q.xlo), int'(q.ylo), int'(q.xhi), int'(q.yhi))) nhit++;
      check(ref_overlap(int'(s.xlo), int'(s.ylo), int'(s.xhi), int'(s.yhi), int'(q.xlo), int'(q.ylo), int'(q.xhi), int'(q.yhi)), p, "random");
    end
    if (nhit < 100 || nhit > 1900) begin
      failures++;
      $display("FAIL random mix poor: %0d hits", nhit);
    end

    // hold: without load the entry stays
    load_entry = '0;
    @(posedge clk);
    query = '{xlo: 0, ylo: 0, xhi: 16'hffff, yhi: 16'hffff};
    check(1'b1, p, "hold without load");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
