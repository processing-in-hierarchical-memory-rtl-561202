// Testbench of the main-memory level (memory controller hub, neighbor DIMM and
// feature DIMMs together), at reduced size.
//
// Behavioural DRAMs hold a random graph and random features. Several queries
// are searched one after another; every answer list is compared with a
// behavioural best-first search with the same queue size and step count
// (distances in order; ids as sets among equal distances), and the number of
// search steps taken is compared as well. One query runs in billion-scale mode
// and must return only the NPROBE nearest entries, flagged for the storage
// level. Counts how often the neighbour stream stalled on a busy rank NMC and
// how many visited nodes the CAMs filtered; both must happen.
module tb_pyramid_m;
  import pyr_pkg::*;
  import tb_ann_pkg::*;

  localparam int K = 16, STEPS = 12, NPROBE = 5, R = 40, N_DIMM = 2, NPD = 2;
  localparam int N_NMC = N_DIMM * NPD;
  localparam int unsigned N_NODES = 400;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic hq_valid, hq_ready, hq_billion, nd_req_valid, nd_req_ready, nd_rsp_valid;
  logic [QID_W-1:0] hq_qid, res_qid;
  logic [DIM-1:0][7:0] hq_vec, res_vec;
  logic [ID_W-1:0] hq_entry, res_id;
  logic [39:0] nd_req_addr;
  logic [63:0] nd_rsp_data;
  logic [N_NMC-1:0] fd_req_valid, fd_req_ready, fd_rsp_valid, ev_filtered;
  logic [N_NMC-1:0][31:0] fd_req_addr;
  logic [N_NMC-1:0][64*8-1:0] fd_rsp_data;
  logic res_valid, res_ready, res_last, res_to_ssd, ev_step, ev_stall, ev_done, cam_overflow;
  logic [DIST_W-1:0] res_dist;

  pyramid_m #(.K(K), .STEPS(STEPS), .NPROBE(NPROBE), .R_SLOTS(R), .N_DIMM(N_DIMM),
              .NMC_PER_DIMM(NPD), .CAM_DEPTH(128)) dut (.*);

  nbr_dram_model #(.R(R), .N_NODES(N_NODES)) u_nmem (
    .clk, .rst_n, .req_valid(nd_req_valid), .req_ready(nd_req_ready), .req_addr(nd_req_addr),
    .rsp_valid(nd_rsp_valid), .rsp_data(nd_rsp_data));
  for (genvar r = 0; r < N_NMC; r++) begin : g_mem
    feat_dram_model #(.RANK(r), .N_NMC(N_NMC)) u_mem (
      .clk, .rst_n, .req_valid(fd_req_valid[r]), .req_ready(fd_req_ready[r]), .req_addr(fd_req_addr[r]),
      .rsp_valid(fd_rsp_valid[r]), .rsp_data(fd_rsp_data[r]));
  end

  int n_steps = 0, n_stall = 0, n_filt = 0;
  always @(posedge clk) if (rst_n) begin
    n_steps += int'(ev_step);
    n_stall += int'(ev_stall);
    n_filt  += $countones(ev_filtered);
    res_ready <= ($urandom % 3 != 0);
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run_query(int unsigned qseed, int unsigned entry, bit billion);
    cand_t ref_list[$];
    int ref_steps, n_exp, got;
    int steps0;
    ref_steps = ref_graph_search(qseed, entry, N_NODES, R, K, STEPS, ref_list);
    n_exp = billion ? ((ref_list.size() < NPROBE) ? ref_list.size() : NPROBE) : ref_list.size();
    steps0 = n_steps;
    hq_valid = 1; hq_qid = 8'(qseed); hq_entry = entry; hq_billion = billion;
    for (int j = 0; j < DIM; j++) hq_vec[j] = query_byte(qseed, j);
    while (!hq_ready) @(negedge clk);
    @(negedge clk) hq_valid = 0;
    got = 0;
    forever begin
      @(posedge clk);
      if (res_valid && res_ready) begin
        bit id_ok;
        id_ok = 0;
        check(got < n_exp && res_dist == ref_list[got].d && res_qid == 8'(qseed) &&
              res_to_ssd == billion && res_last == (got == n_exp - 1),
              $sformatf("q%0d entry %0d: dist %0d expected %0d last=%0d", qseed, got, res_dist,
                        (got < n_exp) ? ref_list[got].d : 0, res_last));
        foreach (ref_list[j]) if (ref_list[j].d == res_dist && ref_list[j].id == res_id) id_ok = 1;
        check(id_ok, $sformatf("q%0d entry %0d: id %0d not expected", qseed, got, res_id));
        if (billion) check(res_vec[0] == query_byte(qseed, 0), "query vector passed on");
        got++;
        if (res_last) break;
      end
    end
    @(negedge clk);
    check(got == n_exp, $sformatf("q%0d: %0d entries, expected %0d", qseed, got, n_exp));
    check(n_steps - steps0 == ref_steps, $sformatf("q%0d: %0d steps, expected %0d", qseed,
          n_steps - steps0, ref_steps));
  endtask

  initial begin
    hq_valid = 0; hq_qid = 0; hq_vec = '0; hq_entry = 0; hq_billion = 0; res_ready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_query(1, 0, 0);
    run_query(2, 17, 0);
    run_query(3, 123, 1);
    run_query(4, 399, 0);
    check(n_stall > 0, "neighbour stream stalled on a busy rank NMC");
    check(n_filt > 0, "visited nodes filtered by the CAMs");
    check(!cam_overflow, "no CAM overflow");
    $display("steps=%0d stalls=%0d filtered=%0d", n_steps, n_stall, n_filt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
