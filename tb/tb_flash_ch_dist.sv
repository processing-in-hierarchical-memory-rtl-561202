// Testbench of the channel-level distance unit.
//
// A behavioural flash channel streams cluster pages (record count, then node
// index and feature per record, padding to the page end) with random pauses,
// while the record consumer also pauses. For several jobs the testbench checks
// that every member of the cluster comes out once, in page order, with the
// job's query slot and the reference distance, and that the unit reads each
// page to its end and returns to idle.
module tb_flash_ch_dist;
  import pyr_pkg::*;
  import tb_ann_pkg::*;

  localparam int PAGE = 2048, MAX_REC = 15;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic job_valid, job_ready, fl_req_valid, fl_req_ready, fl_valid, fl_ready, fl_last;
  logic out_valid, out_ready, idle;
  logic [6:0] job_slot;
  logic [31:0] job_lba, fl_req_lba;
  logic [DIM-1:0][7:0] job_vec;
  logic [7:0] fl_data;
  dist_rec_t out_rec;

  flash_ch_dist dut (.*);
  flash_model #(.PAGE_BYTES(PAGE), .MAX_REC(MAX_REC)) u_fl (
    .clk, .rst_n, .req_valid(fl_req_valid), .req_ready(fl_req_ready), .req_lba(fl_req_lba),
    .valid(fl_valid), .ready(fl_ready), .data(fl_data), .last(fl_last));

  int unsigned cur_c, cur_seed;
  int          cur_slot, rec;
  int          beats;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (fl_valid && fl_ready) beats++;
    if (out_valid && out_ready) begin
      checks++;
      if (out_rec.nid != member_id(cur_c, rec) || out_rec.qid != 8'(cur_slot) ||
          out_rec.d2 != ref_dist(cur_seed, member_id(cur_c, rec))) begin
        failures++;
        $display("FAIL: cluster %0d record %0d: nid %0d d %0d", cur_c, rec, out_rec.nid, out_rec.d2);
      end
      rec++;
    end
    out_ready <= ($urandom % 3 != 0);
  end

  initial begin
    job_valid = 0; job_slot = 0; job_lba = 0; job_vec = '0; out_ready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      cur_c = 3 + 11 * t; cur_seed = 100 + t; cur_slot = t * 9; rec = 0; beats = 0;
      job_valid = 1; job_slot = 7'(cur_slot); job_lba = cur_c;
      for (int j = 0; j < DIM; j++) job_vec[j] = query_byte(cur_seed, j);
      while (!job_ready) @(negedge clk);
      @(negedge clk) job_valid = 0;
      @(negedge clk);
      while (!idle) @(negedge clk);
      checks++;
      if (rec != cluster_size(cur_c, MAX_REC) || beats != PAGE) begin
        failures++;
        $display("FAIL: cluster %0d: %0d records (expected %0d), %0d beats", cur_c, rec,
                 cluster_size(cur_c, MAX_REC), beats);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
