// Full-size end-to-end testbench: the accelerator with all its default sizes
// (Top-100 queues, 128 search steps, 60 clusters per query, 24 rank NMCs,
// 32 flash channels, 16 KB pages, batches of up to 100).
//
// One billion-scale query, which closes its batch at once, runs through both
// levels, then one million-scale query through the main-memory level. The
// centre graph has 3000 nodes; clusters hold up to 124 members. Answers are
// compared with the same behavioural models as the reduced end-to-end test.
module tb_pyramid_top_full;
  import pyr_pkg::*;
  import tb_ann_pkg::*;

  // the design's defaults, repeated here for the models and the reference
  localparam int K = 100, STEPS = 128, NPROBE = 60, R = 40, N_DIMM = 3, NPD = 8;
  localparam int NCH = 32, K_S = 100, PAGE = 16384, MAX_REC = 124;
  localparam int N_NMC = N_DIMM * NPD;
  localparam int unsigned N_NODES = 3000;
  localparam int NQ = 2;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic hq_valid, hq_ready, hq_billion, hq_close, res_valid, res_ready, res_last;
  logic [QID_W-1:0] hq_qid, res_qid;
  logic [DIM-1:0][7:0] hq_vec;
  logic [ID_W-1:0] hq_entry, res_id;
  logic [DIST_W-1:0] res_dist;
  logic nd_req_valid, nd_req_ready, nd_rsp_valid;
  logic [39:0] nd_req_addr;
  logic [63:0] nd_rsp_data;
  logic [N_NMC-1:0] fd_req_valid, fd_req_ready, fd_rsp_valid, ev_filtered;
  logic [N_NMC-1:0][31:0] fd_req_addr;
  logic [N_NMC-1:0][64*8-1:0] fd_rsp_data;
  logic [NCH-1:0] fl_req_valid, fl_req_ready, fl_valid, fl_ready, fl_last;
  logic [NCH-1:0][31:0] fl_req_lba;
  logic [NCH-1:0][7:0] fl_data;
  logic ev_step, ev_stall, ev_cam_overflow, ev_batch, ev_overlap, ev_job_stall;

  pyramid_top dut (.*);

  nbr_dram_model #(.R(R), .N_NODES(N_NODES)) u_nmem (
    .clk, .rst_n, .req_valid(nd_req_valid), .req_ready(nd_req_ready), .req_addr(nd_req_addr),
    .rsp_valid(nd_rsp_valid), .rsp_data(nd_rsp_data));
  for (genvar r = 0; r < N_NMC; r++) begin : g_mem
    feat_dram_model #(.RANK(r), .N_NMC(N_NMC)) u_mem (
      .clk, .rst_n, .req_valid(fd_req_valid[r]), .req_ready(fd_req_ready[r]), .req_addr(fd_req_addr[r]),
      .rsp_valid(fd_rsp_valid[r]), .rsp_data(fd_rsp_data[r]));
  end
  for (genvar c = 0; c < NCH; c++) begin : g_fl
    flash_model #(.PAGE_BYTES(PAGE), .MAX_REC(MAX_REC)) u_fl (
      .clk, .rst_n, .req_valid(fl_req_valid[c]), .req_ready(fl_req_ready[c]), .req_lba(fl_req_lba[c]),
      .valid(fl_valid[c]), .ready(fl_ready[c]), .data(fl_data[c]), .last(fl_last[c]));
  end

  cand_t ref_l [NQ][$];
  int got [NQ];
  bit answered [NQ];
  int n_step = 0, n_stall = 0, n_filt = 0, n_batch = 0, n_overlap = 0, n_jstall = 0, n_done = 0;

  initial begin
    repeat (2000000) @(posedge clk);
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
    n_step    += int'(ev_step);
    n_stall   += int'(ev_stall);
    n_filt    += $countones(ev_filtered);
    n_batch   += int'(ev_batch);
    n_overlap += int'(ev_overlap);
    n_jstall  += int'(ev_job_stall);
    if (res_valid && res_ready) begin
      int q, e;
      bit id_ok;
      q = int'(res_qid) - 10;
      e = got[q];
      check(q >= 0 && q < NQ && !answered[q] && e < ref_l[q].size() && res_dist == ref_l[q][e].d &&
            res_last == (e == ref_l[q].size() - 1),
            $sformatf("query %0d entry %0d: dist %0d", q, e, res_dist));
      id_ok = 0;
      foreach (ref_l[q][j]) if (ref_l[q][j].d == res_dist && ref_l[q][j].id == res_id) id_ok = 1;
      check(id_ok, $sformatf("query %0d entry %0d: id %0d", q, e, res_id));
      got[q]++;
      if (res_last) begin answered[q] = 1; n_done++; end
    end
    res_ready <= ($urandom % 4 != 0);
  end

  initial begin
    hq_valid = 0; hq_qid = 0; hq_vec = '0; hq_entry = 0; hq_billion = 0; hq_close = 0;
    res_ready = 1;
    for (int q = 0; q < NQ; q++) begin
      cand_t centres[$];
      int unsigned cids[$];
      bit billion;
      void'(ref_graph_search(32'(q + 10), 32'(q * 37), N_NODES, R, K, STEPS, centres));
      billion = (q == 0);
      got[q] = 0; answered[q] = 0;
      if (billion) begin
        cids.delete();
        for (int i = 0; i < NPROBE && i < centres.size(); i++) cids.push_back(centres[i].id);
        ref_cluster_scan(32'(q + 10), cids, MAX_REC, K_S, ref_l[q]);
      end else ref_l[q] = centres;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int q = 0; q < NQ; q++) begin
      hq_valid = 1; hq_qid = 8'(q + 10); hq_entry = 32'(q * 37);
      hq_billion = (q == 0); hq_close = (q == 0);
      for (int j = 0; j < DIM; j++) hq_vec[j] = query_byte(32'(q + 10), j);
      while (!hq_ready) @(negedge clk);
      @(negedge clk);
      hq_valid = 0;
    end
    while (n_done < NQ) @(negedge clk);
    check(n_step > 0, "search steps");
    check(n_stall > 0, "neighbour stream stalled on a busy rank NMC");
    check(n_filt > 0, "visited nodes filtered");
    check(n_batch == 1, $sformatf("%0d storage batches", n_batch));
    check(!ev_cam_overflow, "no CAM overflow");
    $display("steps=%0d stalls=%0d filtered=%0d batches=%0d overlap=%0d job_stalls=%0d",
             n_step, n_stall, n_filt, n_batch, n_overlap, n_jstall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
