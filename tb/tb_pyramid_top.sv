// End-to-end testbench of the whole accelerator at reduced size.
//
// Behavioural DRAMs hold a random cluster-centre graph with its features, and
// behavioural flash channels hold the clusters. Four billion-scale queries run
// through both levels (a batch of three, then a batch of one closed early),
// followed by one million-scale query answered by the main-memory level alone.
// Each answer is compared with a behavioural model: best-first search of the
// graph, then, for billion-scale queries, a scan of the NPROBE nearest centres'
// clusters (distances in order; ids as sets among equal distances).
// Mechanisms counted, each of which must occur: search steps, neighbour-stream
// stalls on a busy rank NMC, CAM filtering of visited nodes, storage batches,
// queries loaded while a batch is searched, jobs waiting for a busy channel,
// and both modes.
module tb_pyramid_top;
  import pyr_pkg::*;
  import tb_ann_pkg::*;

  localparam int K = 16, STEPS = 10, NPROBE = 4, R = 40, N_DIMM = 2, NPD = 2;
  localparam int NCH = 4, BATCH = 3, K_S = 8, PAGE = 1024, MAX_REC = 7;
  localparam int N_NMC = N_DIMM * NPD;
  localparam int unsigned N_NODES = 300;
  localparam int NQ = 5;
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

  pyramid_top #(.K(K), .STEPS(STEPS), .NPROBE(NPROBE), .R_SLOTS(R), .N_DIMM(N_DIMM),
                .NMC_PER_DIMM(NPD), .CAM_DEPTH(128), .N_CH(NCH), .BATCH(BATCH),
                .K_S(K_S)) dut (.*);

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
    repeat (500000) @(posedge clk);
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
      billion = (q < 4);
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
      hq_billion = (q < 4); hq_close = (q == 3);
      for (int j = 0; j < DIM; j++) hq_vec[j] = query_byte(32'(q + 10), j);
      while (!hq_ready) @(negedge clk);
      @(negedge clk);
      hq_valid = 0;
    end
    while (n_done < NQ) @(negedge clk);
    check(n_step > 0, "search steps");
    check(n_stall > 0, "neighbour stream stalled on a busy rank NMC");
    check(n_filt > 0, "visited nodes filtered");
    check(n_batch == 2, $sformatf("%0d storage batches", n_batch));
    check(n_overlap > 0, "queries loaded while a batch was searched");
    check(n_jstall > 0, "jobs waited for a busy channel");
    check(!ev_cam_overflow, "no CAM overflow");
    $display("steps=%0d stalls=%0d filtered=%0d batches=%0d overlap=%0d job_stalls=%0d",
             n_step, n_stall, n_filt, n_batch, n_overlap, n_jstall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
