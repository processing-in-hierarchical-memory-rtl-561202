// Testbench of a feature DIMM (4 rank NMCs, small distance FIFO).
//
// Drives random node indices to their rank NMCs (node n to NMC n mod 4) while
// the consumer of the distance FIFO pauses at random, and checks that every
// new index comes out of the FIFO exactly once with the right query ID and
// reference distance, that repeats are filtered, that the FIFO fills up (the
// multiplexer then holds the rank NMCs) and that `quiet` returns at the end.
module tb_feature_dimm;
  import pyr_pkg::*;
  import tb_ann_pkg::*;

  localparam int N = 4;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic q_load, dist_valid, dist_ready, quiet, cam_overflow;
  logic [QID_W-1:0] q_id_in;
  logic [DIM-1:0][7:0] q_vec_in;
  logic [N-1:0] nid_valid, nid_ready, dram_req_valid, dram_req_ready, dram_rsp_valid, filtered;
  logic [ID_W-1:0] nid, nlocal;
  logic [N-1:0][31:0] dram_req_addr;
  logic [N-1:0][64*8-1:0] dram_rsp_data;
  dist_rec_t dist_rec;

  feature_dimm #(.N_NMC(N), .FIFO_DEPTH(4), .CAM_DEPTH(64)) dut (.*);
  for (genvar r = 0; r < N; r++) begin : g_mem
    feat_dram_model #(.RANK(r), .N_NMC(N)) u_mem (
      .clk, .rst_n, .req_valid(dram_req_valid[r]), .req_ready(dram_req_ready[r]),
      .req_addr(dram_req_addr[r]), .rsp_valid(dram_rsp_valid[r]), .rsp_data(dram_rsp_data[r]));
  end

  int unsigned pending [int unsigned];
  int n_filtered = 0, fifo_full_seen = 0;
  localparam int unsigned QSEED = 77;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    n_filtered += $countones(filtered);
    if (dut.u_fifo.count == 4) fifo_full_seen++;
    if (dist_valid && dist_ready) begin
      checks++;
      if (!pending.exists(dist_rec.nid) || dist_rec.qid != 8'd5 ||
          dist_rec.d2 != ref_dist(QSEED, dist_rec.nid)) begin
        failures++;
        $display("FAIL: record nid %0d d %0d", dist_rec.nid, dist_rec.d2);
      end else pending.delete(dist_rec.nid);
    end
    dist_ready <= ($urandom % 24 == 0);
  end

  initial begin
    bit seen [int unsigned];
    int sent = 0;
    q_load = 0; q_id_in = 5; nid_valid = '0; nid = 0; nlocal = 0; dist_ready = 0;
    for (int j = 0; j < DIM; j++) q_vec_in[j] = query_byte(QSEED, j);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) q_load = 1;
    @(negedge clk) q_load = 0;
    for (int i = 0; i < 120; i++) begin
      int unsigned n;
      n = $urandom % 80;
      if (!seen.exists(n)) begin seen[n] = 1; pending[n] = 1; end
      nid = n; nlocal = n / N;
      nid_valid = '0; nid_valid[n % N] = 1'b1;
      while (!nid_ready[n % N]) @(negedge clk);
      @(negedge clk);
      nid_valid = '0;
      sent++;
    end
    repeat (3) @(negedge clk);
    while (!quiet) @(negedge clk);
    checks++;
    if (pending.num() != 0) begin failures++; $display("FAIL: %0d records missing", pending.num()); end
    checks++;
    if (n_filtered != sent - seen.num()) begin
      failures++; $display("FAIL: filtered %0d expected %0d", n_filtered, sent - seen.num());
    end
    checks++;
    if (fifo_full_seen == 0) begin failures++; $display("FAIL: FIFO never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
