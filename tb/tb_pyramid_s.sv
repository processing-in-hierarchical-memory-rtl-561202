// Testbench of the storage level at reduced size (4 channels, batches of 4
// queries, 3 clusters per query, queues of 8).
//
// Six queries with their cluster lists are loaded back to back; the sixth
// closes a short second batch. Behavioural flash channels return the cluster
// pages. Each answer list is compared with a behavioural scan of the same
// clusters (distances in order, ids as sets among equal distances), and every
// query must be answered exactly once. Counts the batches run, the queries
// loaded while a batch was being searched (the two-bank pipelining) and the
// jobs that waited for a busy channel; each must happen.
module tb_pyramid_s;
  import pyr_pkg::*;
  import tb_ann_pkg::*;

  localparam int NCH = 4, BATCH = 4, NPROBE = 3, K = 8, PAGE = 1024, MAX_REC = 7, NQ = 6;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ld_valid, ld_ready, ld_last, ld_close, res_valid, res_ready, res_last;
  logic ev_batch, ev_overlap, ev_job_stall;
  logic [QID_W-1:0] ld_qid, res_qid;
  logic [DIM-1:0][7:0] ld_vec;
  logic [ID_W-1:0] ld_cid, res_id;
  logic [DIST_W-1:0] res_dist;
  logic [NCH-1:0] fl_req_valid, fl_req_ready, fl_valid, fl_ready, fl_last;
  logic [NCH-1:0][31:0] fl_req_lba;
  logic [NCH-1:0][7:0] fl_data;

  pyramid_s #(.N_CH(NCH), .BATCH(BATCH), .NPROBE(NPROBE), .K(K)) dut (.*);
  for (genvar c = 0; c < NCH; c++) begin : g_fl
    flash_model #(.PAGE_BYTES(PAGE), .MAX_REC(MAX_REC)) u_fl (
      .clk, .rst_n, .req_valid(fl_req_valid[c]), .req_ready(fl_req_ready[c]), .req_lba(fl_req_lba[c]),
      .valid(fl_valid[c]), .ready(fl_ready[c]), .data(fl_data[c]), .last(fl_last[c]));
  end

  function automatic int unsigned cid_of(int q, int i);
    return 32'(q * 2 + i * 4 + 1);
  endfunction

  cand_t ref_l [NQ][$];
  int got [NQ];
  bit answered [NQ];
  int n_batch = 0, n_overlap = 0, n_stall = 0, n_done = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    n_batch   += int'(ev_batch);
    n_overlap += int'(ev_overlap);
    n_stall   += int'(ev_job_stall);
    if (res_valid && res_ready) begin
      int q, e;
      q = int'(res_qid) - 50;
      e = got[q];
      check(q >= 0 && q < NQ && !answered[q] && e < ref_l[q].size() && res_dist == ref_l[q][e].d &&
            res_last == (e == ref_l[q].size() - 1),
            $sformatf("query %0d entry %0d: dist %0d", q, e, res_dist));
      begin
        bit id_ok;
        id_ok = 0;
        foreach (ref_l[q][j]) if (ref_l[q][j].d == res_dist && ref_l[q][j].id == res_id) id_ok = 1;
        check(id_ok, $sformatf("query %0d entry %0d: id %0d", q, e, res_id));
      end
      got[q]++;
      if (res_last) begin answered[q] = 1; n_done++; end
    end
    res_ready <= ($urandom % 4 != 0);
  end

  initial begin
    ld_valid = 0; ld_qid = 0; ld_vec = '0; ld_cid = 0; ld_last = 0; ld_close = 0; res_ready = 1;
    for (int q = 0; q < NQ; q++) begin
      int unsigned cids[$];
      cids.delete();
      got[q] = 0; answered[q] = 0;
      for (int i = 0; i < NPROBE; i++) cids.push_back(cid_of(q, i));
      ref_cluster_scan(32'(q + 50), cids, MAX_REC, K, ref_l[q]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int q = 0; q < NQ; q++) begin
      for (int i = 0; i < NPROBE; i++) begin
        ld_valid = 1; ld_qid = 8'(q + 50); ld_cid = cid_of(q, i);
        ld_last = (i == NPROBE - 1); ld_close = (q == NQ - 1);
        for (int j = 0; j < DIM; j++) ld_vec[j] = query_byte(32'(q + 50), j);
        while (!ld_ready) @(negedge clk);
        @(negedge clk);
        ld_valid = 0;
        repeat ($urandom % 200) @(negedge clk);
      end
    end
    while (n_done < NQ) @(negedge clk);
    check(n_batch == 2, $sformatf("%0d batches run", n_batch));
    check(n_overlap > 0, "queries loaded while a batch was searched");
    check(n_stall > 0, "a job waited for a busy channel");
    $display("batches=%0d overlap=%0d stalls=%0d", n_batch, n_overlap, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
