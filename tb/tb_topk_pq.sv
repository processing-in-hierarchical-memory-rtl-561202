// Testbench of the Top-K priority queue.
//
// Streams random (id, distance) pairs in, one per cycle with random gaps, and
// compares the settled queue with the K smallest distances of a behavioural
// sort (distance order exactly; ids compared as sets among equal distances).
// Checks that the queue settles within K+1 cycles of the last insertion, that
// the head pointer follows the nearest unexpanded entry as entries are marked,
// and that flush empties the queue.
module tb_topk_pq;
  import pyr_pkg::*;
  import tb_ann_pkg::*;

  localparam int K = 16;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic flush, in_valid, mark_valid, head_valid, busy;
  logic [ID_W-1:0] in_id;
  logic [DIST_W-1:0] in_dist;
  logic [$clog2(K)-1:0] mark_idx, rd_idx, head_idx;
  pq_entry_t rd_entry;
  logic [$clog2(K+1)-1:0] count;

  topk_pq #(.K(K)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run_round(int n, int range);
    cand_t ref_list[$];
    int settle;
    ref_list.delete();
    @(negedge clk) flush = 1;
    @(negedge clk) flush = 0;
    for (int i = 0; i < n; i++) begin
      int unsigned d;
      d = $urandom % range;
      in_valid = 1; in_id = 32'(i + 100); in_dist = d;
      cand_insert(ref_list, i + 100, d, K);
      @(negedge clk);
      in_valid = 0;
      if ($urandom % 3 == 0) @(negedge clk);
    end
    settle = 0;
    while (busy) begin @(negedge clk); settle++; end
    check(settle <= K + 1, $sformatf("settle time %0d > K+1", settle));
    check(int'(count) == ref_list.size(), $sformatf("count %0d vs %0d", count, ref_list.size()));
    for (int i = 0; i < ref_list.size(); i++) begin
      bit id_ok;
      rd_idx = ($clog2(K))'(i); #1;
      check(rd_entry.vld && rd_entry.d2 == ref_list[i].d,
            $sformatf("entry %0d dist %0d vs %0d", i, rd_entry.d2, ref_list[i].d));
      id_ok = 0;
      foreach (ref_list[j]) if (ref_list[j].d == ref_list[i].d && ref_list[j].id == rd_entry.id) id_ok = 1;
      check(id_ok, $sformatf("entry %0d id %0d unexpected", i, rd_entry.id));
    end
  endtask

  initial begin
    flush = 0; in_valid = 0; mark_valid = 0; in_id = 0; in_dist = 0; mark_idx = 0; rd_idx = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_round(5, 1000);       // fewer than K
    run_round(60, 100000);    // overflow past K
    run_round(40, 20);        // many ties
    // head pointer and marking
    for (int m = 0; m < 4; m++) begin
      @(negedge clk);
      check(head_valid && head_idx == ($clog2(K))'(m), $sformatf("head %0d expected %0d", head_idx, m));
      mark_idx = head_idx; mark_valid = 1;
      @(negedge clk) mark_valid = 0;
    end
    // a new smaller pair becomes the head, marked entries keep their flag
    @(negedge clk) begin in_valid = 1; in_id = 7; in_dist = 0; end
    @(negedge clk) in_valid = 0;
    while (busy) @(negedge clk);
    check(head_valid && head_idx == 0, "new minimum is the head");
    rd_idx = 1; #1;
    check(rd_entry.expd, "expanded flag moved with its entry");
    @(negedge clk) flush = 1;
    @(negedge clk) flush = 0;
    check(count == 0 && !head_valid, "flush empties the queue");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
