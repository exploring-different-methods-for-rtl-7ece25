// tb_output_controller: self-checking test of the query-output controller.
//
// Presents random leaf results and pointers, runs two scans and checks that
// every leaf node comes out once, in order, with its hit bits and pointers,
// and that the done pulse comes NUM_LEAF+2 cycles after the start pulse
// (66 cycles for the 64 leaf nodes of a height-4 tree).
module tb_output_controller;
  import rtree_pkg::*;

  localparam int unsigned NL = 64;
  localparam int unsigned LW = $clog2(NL);

  logic                         clk = 1'b0;
  logic                         rst_n = 1'b0;
  logic                         start = 1'b0;
  logic [NL-1:0][FANOUT-1:0]    leaf_hit = '0;
  ptr_t [NL-1:0][FANOUT-1:0]    leaf_ptr = '0;
  logic                         out_valid;
  logic [LW-1:0]                out_leaf;
  logic [FANOUT-1:0]            out_hit;
  ptr_t [FANOUT-1:0]            out_ptr;
  logic                         busy;
  logic                         done;

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  int nout;

  output_controller #(.NUM_LEAF(NL)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (int'(out_leaf) != nout || out_hit !== leaf_hit[nout] || out_ptr !== leaf_ptr[nout]) begin
        failures++;
        $display("FAIL output %0d: leaf=%0d hit=%b exp=%b", nout, out_leaf, out_hit, leaf_hit[nout]);
      end
      nout++;
    end
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int r = 0; r < 3; r++) begin
      for (int j = 0; j < NL; j++) begin
        leaf_hit[j] = FANOUT'($urandom);
        for (int k = 0; k < FANOUT; k++) leaf_ptr[j][k] = ptr_t'($urandom);
      end
      nout = 0;
      start = 1'b1;
      t0 = cyc;
      @(posedge clk);
      #1 start = 1'b0;
      checks++;
      if (!busy) begin
        failures++;
        $display("FAIL not busy after start");
      end
      while (!done) begin
        @(posedge clk);
        #1;
      end
      checks++;
      if (cyc - t0 != NL + 2) begin
        failures++;
        $display("FAIL query output took %0d cycles, expected %0d", cyc - t0, NL + 2);
      end
      checks++;
      if (nout != NL) begin
        failures++;
        $display("FAIL %0d leaf nodes read, expected %0d", nout, NL);
      end
      @(posedge clk);
      #1;
      checks++;
      if (busy || out_valid) begin
        failures++;
        $display("FAIL not idle after done");
      end
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
