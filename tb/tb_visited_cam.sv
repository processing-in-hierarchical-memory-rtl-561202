// Testbench of the CAM-based visited list.
//
// Looks up a random stream of node indices drawn from a small range, so that
// many repeat, and compares every hit/miss answer with a behavioural set.
// Then fills the CAM past its depth and checks the overflow flag and that keys
// beyond the depth are not remembered, and that flush forgets everything.
module tb_visited_cam;
  import pyr_pkg::*;

  localparam int DEPTH = 32;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic flush, lookup, insert, hit, full, overflow;
  logic [ID_W-1:0] key;

  visited_cam #(.DEPTH(DEPTH)) dut (.*);

  bit seen [int unsigned];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    flush = 0; lookup = 0; insert = 1; key = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // random stream with repeats, never more than DEPTH distinct keys
    for (int i = 0; i < 200; i++) begin
      int unsigned k;
      k = 32'h1000_0000 + ($urandom % 24);
      lookup = 1; key = k; #1;
      check(hit == seen.exists(k), $sformatf("key %h hit=%0d", k, hit));
      seen[k] = 1;
      @(negedge clk);
      lookup = 0;
      if ($urandom % 4 == 0) @(negedge clk);
    end
    check(!overflow, "no overflow below depth");
    // flush
    flush = 1; @(negedge clk); flush = 0;
    lookup = 1; key = 32'h1000_0001; #1;
    check(!hit, "flush forgets");
    @(negedge clk);
    // fill beyond the depth
    for (int i = 2; i < DEPTH + 6; i++) begin
      key = 32'h1000_0000 + 32'(i); @(negedge clk);
    end
    check(full && overflow, "full and overflow raised");
    key = 32'h1000_0000 + 32'(DEPTH); #1;   // was the 32nd key: still stored
    check(hit, "last stored key hits");
    key = 32'h1000_0000 + 32'(DEPTH + 3); #1;
    check(!hit, "key beyond depth not stored");
    lookup = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
