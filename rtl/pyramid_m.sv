// Pyramid-M: the main-memory level of the accelerator.
//
// It joins the memory controller hub search engine (with the central Top-K
// priority queue), one neighbor DIMM holding the graph, and N_DIMM feature
// DIMMs with NMC_PER_DIMM rank NMCs each, holding the features split over the
// ranks (node n lives in rank NMC n mod N_NMC). The DRAM devices themselves are
// outside: every rank NMC and the neighbor DIMM bring out a burst read port.
//
// Defaults: 3 feature DIMMs plus 1 neighbor DIMM of 4 ranks each make the 16
// ranks of two channels with 8 ranks each; two NMC modules per rank give 24
// rank NMCs. The split into one neighbor and three feature DIMMs is this
// design's choice. Results leave in ascending distance (see mch).
module pyramid_m
  import pyr_pkg::*;
#(
  parameter int DIM          = 128,
  parameter int SUB_BYTES    = 64,
  parameter int K            = 100,
  parameter int STEPS        = 128,
  parameter int NPROBE       = 60,
  parameter int R_SLOTS      = 40,
  parameter int N_DIMM       = 3,
  parameter int NMC_PER_DIMM = 8,
  parameter int CAM_DEPTH    = 256,
  parameter int FIFO_DEPTH   = 16,
  parameter int N_NMC        = N_DIMM * NMC_PER_DIMM
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   hq_valid,
  output logic                                   hq_ready,
  input  logic [QID_W-1:0]                       hq_qid,
  input  logic [DIM-1:0][ELEM_W-1:0]             hq_vec,
  input  logic [ID_W-1:0]                        hq_entry,
  input  logic                                   hq_billion,
  // neighbor DIMM DRAM
  output logic                                   nd_req_valid,
  input  logic                                   nd_req_ready,
  output logic [39:0]                            nd_req_addr,
  input  logic                                   nd_rsp_valid,
  input  logic [63:0]                            nd_rsp_data,
  // feature DIMM DRAM, one port per rank NMC
  output logic [N_NMC-1:0]                       fd_req_valid,
  input  logic [N_NMC-1:0]                       fd_req_ready,
  output logic [N_NMC-1:0][31:0]                 fd_req_addr,
  input  logic [N_NMC-1:0]                       fd_rsp_valid,
  input  logic [N_NMC-1:0][SUB_BYTES*ELEM_W-1:0] fd_rsp_data,
  // results
  output logic                                   res_valid,
  input  logic                                   res_ready,
  output logic [QID_W-1:0]                       res_qid,
  output logic [ID_W-1:0]                        res_id,
  output logic [DIST_W-1:0]                      res_dist,
  output logic                                   res_last,
  output logic                                   res_to_ssd,
  output logic [DIM-1:0][ELEM_W-1:0]             res_vec,
  // events
  output logic                                   ev_step,
  output logic                                   ev_stall,
  output logic                                   ev_done,
  output logic [N_NMC-1:0]                       ev_filtered,
  output logic                                   cam_overflow
);
  logic                       vid_valid, vid_ready, nbr_valid, nbr_ready, nbr_last;
  logic [ID_W-1:0]            vid, nbr_nid, nmc_nid, nmc_local;
  logic                       q_load;
  logic [QID_W-1:0]           q_id;
  logic [DIM-1:0][ELEM_W-1:0] q_vec;
  logic [N_NMC-1:0]           nmc_valid, nmc_ready;
  logic [N_DIMM-1:0]          dist_valid, dist_ready, quiet, ovf;
  dist_rec_t                  dist_rec [N_DIMM];

  assign res_vec      = q_vec;
  assign cam_overflow = |ovf;

  mch #(.DIM(DIM), .K(K), .STEPS(STEPS), .NPROBE(NPROBE), .N_DIMM(N_DIMM), .N_NMC(N_NMC)) u_mch (
    .clk, .rst_n,
    .hq_valid, .hq_ready, .hq_qid, .hq_vec, .hq_entry, .hq_billion,
    .vid_valid, .vid_ready, .vid,
    .nbr_valid, .nbr_ready, .nbr_nid, .nbr_last,
    .q_load, .q_id, .q_vec,
    .nmc_valid, .nmc_ready, .nmc_nid, .nmc_local,
    .dist_valid, .dist_ready, .dist_rec, .dimm_quiet(quiet),
    .res_valid, .res_ready, .res_qid, .res_id, .res_dist, .res_last, .res_to_ssd,
    .ev_step, .ev_stall, .ev_done
  );

  neighbor_dimm #(.R_SLOTS(R_SLOTS), .ADDR_W(40)) u_nbr (
    .clk, .rst_n,
    .vid_valid, .vid_ready, .vid,
    .dram_req_valid(nd_req_valid), .dram_req_ready(nd_req_ready), .dram_req_addr(nd_req_addr),
    .dram_rsp_valid(nd_rsp_valid), .dram_rsp_data(nd_rsp_data),
    .nid_valid(nbr_valid), .nid_ready(nbr_ready), .nid(nbr_nid), .nid_last(nbr_last)
  );

  for (genvar d = 0; d < N_DIMM; d++) begin : g_fdimm
    localparam int LO = d * NMC_PER_DIMM;
    feature_dimm #(.DIM(DIM), .SUB_BYTES(SUB_BYTES), .CAM_DEPTH(CAM_DEPTH),
                   .N_NMC(NMC_PER_DIMM), .FIFO_DEPTH(FIFO_DEPTH), .ADDR_W(32)) u_fd (
      .clk, .rst_n,
      .q_load, .q_id_in(q_id), .q_vec_in(q_vec),
      .nid_valid     (nmc_valid[LO +: NMC_PER_DIMM]),
      .nid_ready     (nmc_ready[LO +: NMC_PER_DIMM]),
      .nid           (nmc_nid),
      .nlocal        (nmc_local),
      .dram_req_valid(fd_req_valid[LO +: NMC_PER_DIMM]),
      .dram_req_ready(fd_req_ready[LO +: NMC_PER_DIMM]),
      .dram_req_addr (fd_req_addr[LO +: NMC_PER_DIMM]),
      .dram_rsp_valid(fd_rsp_valid[LO +: NMC_PER_DIMM]),
      .dram_rsp_data (fd_rsp_data[LO +: NMC_PER_DIMM]),
      .dist_valid    (dist_valid[d]),
      .dist_ready    (dist_ready[d]),
      .dist_rec      (dist_rec[d]),
      .quiet         (quiet[d]),
      .filtered      (ev_filtered[LO +: NMC_PER_DIMM]),
      .cam_overflow  (ovf[d])
    );
  end
endmodule
