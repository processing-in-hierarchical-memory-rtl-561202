// Pyramid: processing-in-hierarchical-memory accelerator for graph-based
// approximate nearest-neighbour search.
//
// The main-memory level (pyramid_m) searches a graph held in DIMMs, with
// distance units beside every DRAM rank and one central Top-K queue in the
// memory controller hub. In million-scale mode the graph covers the whole
// dataset and its Top-K list is the answer. In billion-scale mode the graph
// covers only cluster centres: the NPROBE nearest centres of each query, with
// the query vector, are passed to the storage level (pyramid_s), which reads
// those clusters page by page from flash, calculates every member's distance
// beside the flash channels and sorts per query. The main-memory level works
// on one query at a time while the storage level searches whole batches, so
// both run at once.
//
// Host side: a query (ID, vector, entry node, mode bit, batch-close bit) is
// taken with hq_valid/hq_ready; answers leave on res_* in ascending distance,
// one list per query, closed by res_last. Memory side: the DRAM devices and the
// flash controllers with their dies are outside and are reached through the
// burst read ports brought out here.
//
// The output arbitration (a list, once started, is finished before the other
// level's list) and the per-query batch-close bit are this design's choices.
module pyramid_top
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
  parameter int N_CH         = 32,
  parameter int BATCH        = 100,
  parameter int K_S          = 100,
  parameter int PPC          = 1,
  parameter int N_NMC        = N_DIMM * NMC_PER_DIMM
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // host queries
  input  logic                                   hq_valid,
  output logic                                   hq_ready,
  input  logic [QID_W-1:0]                       hq_qid,
  input  logic [DIM-1:0][ELEM_W-1:0]             hq_vec,
  input  logic [ID_W-1:0]                        hq_entry,
  input  logic                                   hq_billion,
  input  logic                                   hq_close,
  // answers
  output logic                                   res_valid,
  input  logic                                   res_ready,
  output logic [QID_W-1:0]                       res_qid,
  output logic [ID_W-1:0]                        res_id,
  output logic [DIST_W-1:0]                      res_dist,
  output logic                                   res_last,
  // neighbor DIMM DRAM
  output logic                                   nd_req_valid,
  input  logic                                   nd_req_ready,
  output logic [39:0]                            nd_req_addr,
  input  logic                                   nd_rsp_valid,
  input  logic [63:0]                            nd_rsp_data,
  // feature DIMM DRAM
  output logic [N_NMC-1:0]                       fd_req_valid,
  input  logic [N_NMC-1:0]                       fd_req_ready,
  output logic [N_NMC-1:0][31:0]                 fd_req_addr,
  input  logic [N_NMC-1:0]                       fd_rsp_valid,
  input  logic [N_NMC-1:0][SUB_BYTES*ELEM_W-1:0] fd_rsp_data,
  // flash controllers
  output logic [N_CH-1:0]                        fl_req_valid,
  input  logic [N_CH-1:0]                        fl_req_ready,
  output logic [N_CH-1:0][31:0]                  fl_req_lba,
  input  logic [N_CH-1:0]                        fl_valid,
  output logic [N_CH-1:0]                        fl_ready,
  input  logic [N_CH-1:0][7:0]                   fl_data,
  input  logic [N_CH-1:0]                        fl_last,
  // events
  output logic                                   ev_step,
  output logic                                   ev_stall,
  output logic [N_NMC-1:0]                       ev_filtered,
  output logic                                   ev_cam_overflow,
  output logic                                   ev_batch,
  output logic                                   ev_overlap,
  output logic                                   ev_job_stall
);
  // main-memory level
  logic                       m_valid, m_ready, m_last, m_to_ssd, m_done;
  logic [QID_W-1:0]           m_qid;
  logic [ID_W-1:0]            m_id;
  logic [DIST_W-1:0]          m_dist;
  logic [DIM-1:0][ELEM_W-1:0] m_vec;
  logic                       cur_close;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     cur_close <= 1'b0;
    else if (hq_valid && hq_ready)  cur_close <= hq_close;
  end

  pyramid_m #(.DIM(DIM), .SUB_BYTES(SUB_BYTES), .K(K), .STEPS(STEPS), .NPROBE(NPROBE),
              .R_SLOTS(R_SLOTS), .N_DIMM(N_DIMM), .NMC_PER_DIMM(NMC_PER_DIMM),
              .CAM_DEPTH(CAM_DEPTH)) u_m (
    .clk, .rst_n,
    .hq_valid, .hq_ready, .hq_qid, .hq_vec, .hq_entry, .hq_billion,
    .nd_req_valid, .nd_req_ready, .nd_req_addr, .nd_rsp_valid, .nd_rsp_data,
    .fd_req_valid, .fd_req_ready, .fd_req_addr, .fd_rsp_valid, .fd_rsp_data,
    .res_valid(m_valid), .res_ready(m_ready), .res_qid(m_qid), .res_id(m_id),
    .res_dist(m_dist), .res_last(m_last), .res_to_ssd(m_to_ssd), .res_vec(m_vec),
    .ev_step, .ev_stall, .ev_done(m_done), .ev_filtered,
    .cam_overflow(ev_cam_overflow)
  );

  // storage level
  logic              s_ld_ready, s_valid, s_ready, s_last;
  logic [QID_W-1:0]  s_qid;
  logic [ID_W-1:0]   s_id;
  logic [DIST_W-1:0] s_dist;

  pyramid_s #(.DIM(DIM), .N_CH(N_CH), .BATCH(BATCH), .NPROBE(NPROBE), .K(K_S), .PPC(PPC)) u_s (
    .clk, .rst_n,
    .ld_valid(m_valid && m_to_ssd), .ld_ready(s_ld_ready), .ld_qid(m_qid), .ld_vec(m_vec),
    .ld_cid(m_id), .ld_last(m_last), .ld_close(cur_close),
    .fl_req_valid, .fl_req_ready, .fl_req_lba, .fl_valid, .fl_ready, .fl_data, .fl_last,
    .res_valid(s_valid), .res_ready(s_ready), .res_qid(s_qid), .res_id(s_id),
    .res_dist(s_dist), .res_last(s_last),
    .ev_batch, .ev_overlap, .ev_job_stall
  );

  // answer arbitration: a started list is finished first
  typedef enum logic [1:0] {O_NONE, O_M, O_S} owner_t;
  owner_t owner, pick;

  always_comb begin
    if (owner != O_NONE)                 pick = owner;
    else if (s_valid)                    pick = O_S;
    else if (m_valid && !m_to_ssd)       pick = O_M;
    else                                 pick = O_NONE;
  end

  assign res_valid = (pick == O_S) ? s_valid : (pick == O_M) ? (m_valid && !m_to_ssd) : 1'b0;
  assign res_qid   = (pick == O_S) ? s_qid  : m_qid;
  assign res_id    = (pick == O_S) ? s_id   : m_id;
  assign res_dist  = (pick == O_S) ? s_dist : m_dist;
  assign res_last  = (pick == O_S) ? s_last : m_last;
  assign s_ready   = (pick == O_S) && res_ready;
  assign m_ready   = m_to_ssd ? s_ld_ready : ((pick == O_M) && res_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) owner <= O_NONE;
    else if (res_valid && res_ready) owner <= res_last ? O_NONE : pick;
  end
endmodule
