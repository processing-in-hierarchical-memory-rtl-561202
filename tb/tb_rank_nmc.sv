// Testbench of a rank-level NMC module.
//
// Sends node indices, with repeats, to one rank NMC (rank 2 of 4) backed by a
// behavioural DRAM, and checks that each index yields exactly one distance
// record (query ID, index, distance equal to the reference), that repeated
// indices are filtered by the visited list, that the record order follows the
// input order, and that a flush makes old indices count as new again. Also
// checks the latency of an isolated miss: lookup, DRAM latency plus two bursts,
// and the two-cycle distance pipeline.
module tb_rank_nmc;
  import pyr_pkg::*;
  import tb_ann_pkg::*;

  localparam int N_NMC = 4, RANK = 2, LAT = 8;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic flush, nid_valid, nid_ready, dram_req_valid, dram_req_ready, dram_rsp_valid;
  logic out_valid, out_ready, idle, filtered, cam_overflow;
  logic [QID_W-1:0] qid;
  logic [DIM-1:0][7:0] q_vec;
  logic [ID_W-1:0] nid, nlocal;
  logic [31:0] dram_req_addr;
  logic [64*8-1:0] dram_rsp_data;
  dist_rec_t out_rec;

  rank_nmc #(.CAM_DEPTH(64)) dut (.*);
  feat_dram_model #(.RANK(RANK), .N_NMC(N_NMC), .LAT(LAT)) u_mem (
    .clk, .rst_n, .req_valid(dram_req_valid), .req_ready(dram_req_ready), .req_addr(dram_req_addr),
    .rsp_valid(dram_rsp_valid), .rsp_data(dram_rsp_data));

  int unsigned exp_q[$];
  int unsigned qseed;
  int n_filtered = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (filtered) n_filtered++;
    if (out_valid && out_ready) begin
      int unsigned e;
      checks++;
      e = (exp_q.size() > 0) ? exp_q.pop_front() : 32'hFFFF_FFFF;
      if (out_rec.nid != e || out_rec.d2 != ref_dist(qseed, e) || out_rec.qid != qid) begin
        failures++;
        $display("FAIL: record nid %0d d %0d, expected nid %0d d %0d", out_rec.nid, out_rec.d2,
                 e, ref_dist(qseed, e));
      end
    end
    out_ready <= ($urandom % 3 != 0);
  end

  task automatic send(int unsigned n);
    nid_valid = 1; nid = n; nlocal = n / N_NMC;
    while (!nid_ready) @(negedge clk);
    @(negedge clk);
    nid_valid = 0;
  endtask

  task automatic load_query(int unsigned s);
    qseed = s; qid = 8'(s);
    for (int j = 0; j < DIM; j++) q_vec[j] = query_byte(s, j);
    flush = 1; @(negedge clk); flush = 0;
  endtask

  initial begin
    bit seen [int unsigned];
    flush = 0; nid_valid = 0; nid = 0; nlocal = 0; out_ready = 1; q_vec = '0; qid = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    load_query(11);
    // isolated miss: latency
    begin
      longint t0;
      t0 = cyc;
      exp_q.push_back(RANK);
      send(RANK);
      while (!out_valid) @(negedge clk);
      checks++;
      // accept edge, DRAM latency LAT (+ ready stalls), two bursts, two-cycle pipeline
      if (cyc - t0 < LAT + 4 || cyc - t0 > LAT + 12) begin
        failures++; $display("FAIL: miss latency %0d", cyc - t0);
      end
      while (exp_q.size() > 0) @(negedge clk);
    end
    seen[RANK] = 1;
    for (int i = 0; i < 60; i++) begin
      int unsigned n;
      n = ($urandom % 20) * N_NMC + RANK;
      if (!seen.exists(n)) begin exp_q.push_back(n); seen[n] = 1; end
      send(n);
    end
    while (exp_q.size() > 0 || !idle) @(negedge clk);
    checks++;
    if (n_filtered != 61 - seen.num()) begin
      failures++; $display("FAIL: %0d filtered, expected %0d", n_filtered, 61 - seen.num());
    end
    // new query: the same nodes are new again
    load_query(12);
    for (int i = 0; i < 5; i++) begin exp_q.push_back(i * N_NMC + RANK); send(i * N_NMC + RANK); end
    while (exp_q.size() > 0 || !idle) @(negedge clk);
    checks++;
    if (cam_overflow) begin failures++; $display("FAIL: unexpected overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
