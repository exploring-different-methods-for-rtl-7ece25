// tb_input_controller: self-checking test of the tree input controller.
//
// Streams NUM_NODES random nodes, once back to back and once with gaps in
// `in_valid`, records every write the controller makes and checks the
// addresses (0, 1, 2, ... in order), the data, `in_ready` and the done
// pulse. With no gaps the done pulse must come NUM_NODES+1 cycles after the
// start pulse (86 cycles for the 85-node tree).
module tb_input_controller;
  import rtree_pkg::*;

  localparam int unsigned N  = 85;
  localparam int unsigned AW = $clog2(N);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          start = 1'b0;
  logic          in_valid = 1'b0;
  node_entry_t   in_node = '0;
  logic          in_ready;
  logic          wr_en;
  logic [AW-1:0] wr_addr;
  node_entry_t   wr_node;
  logic          busy;
  logic          done;

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  node_entry_t sent[N];
  node_entry_t got[N];
  int nwr;
  int t_start, t_done;

  input_controller #(.NUM_NODES(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // record writes
  always @(negedge clk) begin
    if (rst_n && wr_en) begin
      if (int'(wr_addr) != nwr) begin
        failures++;
        $display("FAIL write %0d went to address %0d", nwr, wr_addr);
      end
      if (nwr < N) got[nwr] = wr_node;
      nwr++;
    end
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_load(bit gaps, output int lat);
    int i = 0;
    nwr = 0;
    foreach (sent[n]) sent[n] = node_entry_t'({$urandom, $urandom, $urandom, $urandom, $urandom,
                                              $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
    start = 1'b1;
    t_start = cyc;
    @(posedge clk);
    #1 start = 1'b0;
    while (i < N) begin
      if (gaps && $urandom_range(0, 2) == 0) begin
        in_valid = 1'b0;
      end else begin
        in_valid = 1'b1;
        in_node  = sent[i];
        checks++;
        if (!in_ready) begin
          failures++;
          $display("FAIL in_ready low while loading");
        end
        i++;
      end
      @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    while (!done) begin
      @(posedge clk);
      #1;
    end
    t_done = cyc;
    lat = t_done - t_start;
    checks++;
    if (nwr != N) begin
      failures++;
      $display("FAIL %0d writes, expected %0d", nwr, N);
    end
    foreach (sent[n]) begin
      checks++;
      if (got[n] !== sent[n]) begin
        failures++;
        $display("FAIL node %0d data differs", n);
      end
    end
    @(posedge clk);
    #1;
    checks++;
    if (busy || in_ready || done) begin
      failures++;
      $display("FAIL controller not idle after load");
    end
  endtask

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (in_ready || busy) begin
      failures++;
      $display("FAIL ready before start");
    end
    // nodes offered while idle are ignored
    in_valid = 1'b1;
    @(posedge clk);
    #1 in_valid = 1'b0;
    checks++;
    if (nwr != 0) begin
      failures++;
      $display("FAIL write while idle");
    end
    run_load(1'b0, lat);
    checks++;
    if (lat != N + 1) begin
      failures++;
      $display("FAIL load latency %0d cycles, expected %0d", lat, N + 1);
    end
    run_load(1'b1, lat);
    checks++;
    if (lat <= N + 1) begin
      failures++;
      $display("FAIL gapped load latency %0d not above %0d", lat, N + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
