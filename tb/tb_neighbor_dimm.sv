// Testbench of the neighbor DIMM.
//
// Requests the neighbour lists of random nodes from a behavioural DRAM whose
// ready line drops at random, with the consumer also pausing at random, and
// compares every index, the `nid_last` position and the DRAM addresses
// (head address Vid*R*4 plus 8 per word) with the reference graph.
module tb_neighbor_dimm;
  import pyr_pkg::*;
  import tb_ann_pkg::*;

  localparam int R = 40, N_NODES = 5000;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic vid_valid, vid_ready, dram_req_valid, dram_req_ready, dram_rsp_valid;
  logic nid_valid, nid_ready, nid_last;
  logic [ID_W-1:0] vid, nid;
  logic [39:0] dram_req_addr;
  logic [63:0] dram_rsp_data;

  neighbor_dimm #(.R_SLOTS(R)) dut (.*);
  nbr_dram_model #(.R(R), .N_NODES(N_NODES)) u_mem (
    .clk, .rst_n, .req_valid(dram_req_valid), .req_ready(dram_req_ready), .req_addr(dram_req_addr),
    .rsp_valid(dram_rsp_valid), .rsp_data(dram_rsp_data));

  int unsigned cur_v;
  int          slot, words;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (dram_req_valid && dram_req_ready) begin
      checks++;
      if (dram_req_addr != 40'(cur_v) * (R * 4) + 40'(words * 8)) begin
        failures++; $display("FAIL: address %h", dram_req_addr);
      end
      words++;
    end
    if (nid_valid && nid_ready) begin
      checks++;
      if (nid != nbr_of(cur_v, slot, N_NODES, R) || nid_last != (slot == R - 1)) begin
        failures++;
        $display("FAIL: node %0d slot %0d: %h last=%0d, expected %h", cur_v, slot, nid, nid_last,
                 nbr_of(cur_v, slot, N_NODES, R));
      end
      slot++;
    end
    nid_ready <= ($urandom % 4 != 0);
  end

  initial begin
    vid_valid = 0; vid = 0; nid_ready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      while (!vid_ready) @(negedge clk);
      cur_v = (t == 0) ? 0 : $urandom % N_NODES;
      slot = 0; words = 0;
      vid_valid = 1; vid = cur_v;
      @(negedge clk) vid_valid = 0;
      while (slot < R) @(negedge clk);
      checks++;
      if (words != R / 2) begin failures++; $display("FAIL: %0d words read", words); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
