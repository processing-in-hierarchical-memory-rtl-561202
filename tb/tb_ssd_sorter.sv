// Testbench of the SSD-level sorting (8 queues of 8 entries, 4 inputs).
//
// Four sources offer random records for random query slots at the same time
// and with random pauses; after the traffic has settled the testbench reads
// every queue and compares it with a behavioural Top-K per slot (distances in
// order, ids as sets among equal distances), and checks the fill counts and
// that a flush empties all queues. The arbiter must take one record per cycle:
// the total cycle count is checked against the record count.
module tb_ssd_sorter;
  import pyr_pkg::*;
  import tb_ann_pkg::*;

  localparam int NQ = 8, K = 8, NI = 4, PER_SRC = 40;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic flush, busy;
  logic [NI-1:0] in_valid, in_ready;
  dist_rec_t in_rec [NI];
  logic [$clog2(NQ)-1:0] rd_q;
  logic [$clog2(K)-1:0] rd_idx;
  pq_entry_t rd_entry;
  logic [$clog2(K+1)-1:0] rd_count;

  ssd_sorter #(.N_Q(NQ), .K(K), .N_IN(NI)) dut (.*);

  cand_t ref_q [NQ][$];
  int sent [NI];
  int accepted = 0;
  longint cyc = 0, busy_cycles = 0;

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

  // sources: all valid at once most of the time
  always @(posedge clk) if (rst_n && !flush) begin
    cyc++;
    for (int i = 0; i < NI; i++) begin
      if (in_valid[i] && in_ready[i]) begin
        cand_insert(ref_q[in_rec[i].qid], in_rec[i].nid, in_rec[i].d2, K);
        accepted++;
        sent[i]++;
        in_valid[i] <= 1'b0;
      end
      if ((!in_valid[i] || in_ready[i]) && sent[i] + int'(in_valid[i] && in_ready[i]) < PER_SRC) begin
        in_valid[i]    <= 1'b1;
        in_rec[i].qid  <= 8'($urandom % NQ);
        in_rec[i].nid  <= 32'(i * 1000 + sent[i] + 1);
        in_rec[i].d2   <= $urandom % 500;
      end
    end
    if (in_valid != '0) busy_cycles++;
  end

  initial begin
    flush = 0; in_valid = '0; rd_q = 0; rd_idx = 0;
    for (int i = 0; i < NI; i++) begin sent[i] = 0; in_rec[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (accepted < NI * PER_SRC) @(negedge clk);
    check(busy_cycles <= NI * PER_SRC + 2,
          $sformatf("%0d records took %0d cycles", NI * PER_SRC, busy_cycles));
    @(negedge clk);
    while (busy) @(negedge clk);
    for (int q = 0; q < NQ; q++) begin
      rd_q = ($clog2(NQ))'(q); #1;
      check(int'(rd_count) == ref_q[q].size(), $sformatf("queue %0d count %0d", q, rd_count));
      for (int e = 0; e < ref_q[q].size(); e++) begin
        bit id_ok;
        rd_idx = ($clog2(K))'(e); #1;
        check(rd_entry.vld && rd_entry.d2 == ref_q[q][e].d,
              $sformatf("queue %0d entry %0d: %0d vs %0d", q, e, rd_entry.d2, ref_q[q][e].d));
        id_ok = 0;
        foreach (ref_q[q][j]) if (ref_q[q][j].d == rd_entry.d2 && ref_q[q][j].id == rd_entry.id) id_ok = 1;
        check(id_ok, $sformatf("queue %0d entry %0d id %0d", q, e, rd_entry.id));
      end
    end
    @(negedge clk) flush = 1;
    @(negedge clk) flush = 0;
    rd_q = 3; #1;
    check(rd_count == 0, "flush empties the queues");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
