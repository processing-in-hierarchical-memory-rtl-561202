// Feature DIMM with near-memory distance calculation.
//
// N_NMC rank-level NMC modules work independently, each on the part of the
// dataset stored in its rank; each receives its own neighbour-index stream and
// owns a DRAM burst read port. A DIMM-level query feature register holds the
// current query vector and query ID for all of them (loaded with `q_load`). A
// round-robin multiplexer moves at most one finished record per cycle from the
// rank NMCs into the DIMM-level distance FIFO, whose entries hold query ID,
// neighbour index and distance, and which the memory controller hub drains.
//
// `quiet` is high when every rank NMC is idle and the FIFO is empty, i.e. no
// distance of this DIMM is still on its way. The round-robin order and the FIFO
// depth are this design's choices.
module feature_dimm
  import pyr_pkg::*;
#(
  parameter int DIM        = 128,
  parameter int SUB_BYTES  = 64,
  parameter int CAM_DEPTH  = 256,
  parameter int N_NMC      = 8,
  parameter int FIFO_DEPTH = 16,
  parameter int ADDR_W     = 32
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // query feature register load (also flushes the visited lists)
  input  logic                                   q_load,
  input  logic [QID_W-1:0]                       q_id_in,
  input  logic [DIM-1:0][ELEM_W-1:0]             q_vec_in,
  // neighbour indices, one port per rank NMC
  input  logic [N_NMC-1:0]                       nid_valid,
  output logic [N_NMC-1:0]                       nid_ready,
  input  logic [ID_W-1:0]                        nid,
  input  logic [ID_W-1:0]                        nlocal,
  // DRAM ports, one per rank NMC
  output logic [N_NMC-1:0]                       dram_req_valid,
  input  logic [N_NMC-1:0]                       dram_req_ready,
  output logic [N_NMC-1:0][ADDR_W-1:0]           dram_req_addr,
  input  logic [N_NMC-1:0]                       dram_rsp_valid,
  input  logic [N_NMC-1:0][SUB_BYTES*ELEM_W-1:0] dram_rsp_data,
  // distance FIFO output
  output logic                                   dist_valid,
  input  logic                                   dist_ready,
  output dist_rec_t                              dist_rec,
  output logic                                   quiet,
  output logic [N_NMC-1:0]                       filtered,
  output logic                                   cam_overflow
);
  localparam int IW = (N_NMC > 1) ? $clog2(N_NMC) : 1;

  logic [DIM-1:0][ELEM_W-1:0] q_vec;
  logic [QID_W-1:0]           q_id;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_vec <= '0;
      q_id  <= '0;
    end else if (q_load) begin
      q_vec <= q_vec_in;
      q_id  <= q_id_in;
    end
  end

  logic [N_NMC-1:0] r_valid, r_ready, r_idle, r_ovf;
  dist_rec_t        r_rec [N_NMC];

  for (genvar n = 0; n < N_NMC; n++) begin : g_rank
    rank_nmc #(.DIM(DIM), .SUB_BYTES(SUB_BYTES), .CAM_DEPTH(CAM_DEPTH), .ADDR_W(ADDR_W)) u_nmc (
      .clk, .rst_n,
      .flush         (q_load),
      .qid           (q_id),
      .q_vec         (q_vec),
      .nid_valid     (nid_valid[n]),
      .nid_ready     (nid_ready[n]),
      .nid           (nid),
      .nlocal        (nlocal),
      .dram_req_valid(dram_req_valid[n]),
      .dram_req_ready(dram_req_ready[n]),
      .dram_req_addr (dram_req_addr[n]),
      .dram_rsp_valid(dram_rsp_valid[n]),
      .dram_rsp_data (dram_rsp_data[n]),
      .out_valid     (r_valid[n]),
      .out_ready     (r_ready[n]),
      .out_rec       (r_rec[n]),
      .idle          (r_idle[n]),
      .filtered      (filtered[n]),
      .cam_overflow  (r_ovf[n])
    );
  end

  assign cam_overflow = |r_ovf;

  // round-robin multiplexer into the distance FIFO
  logic [IW-1:0] rr_ptr, sel;
  logic          sel_valid;
  logic          f_ready;
  logic [$clog2(FIFO_DEPTH+1)-1:0] f_count;

  always_comb begin
    sel_valid = 1'b0;
    sel       = '0;
    for (int k = N_NMC - 1; k >= 0; k--) begin
      int idx;
      idx = (int'(rr_ptr) + k) % N_NMC;
      if (r_valid[idx]) begin
        sel_valid = 1'b1;
        sel       = IW'(idx);
      end
    end
  end

  always_comb begin
    r_ready = '0;
    if (sel_valid && f_ready) r_ready[sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      rr_ptr <= '0;
    else if (sel_valid && f_ready)   rr_ptr <= (sel == IW'(N_NMC-1)) ? '0 : sel + 1'b1;
  end

  sync_fifo #(.W($bits(dist_rec_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .clr      (q_load),
    .in_valid (sel_valid),
    .in_ready (f_ready),
    .in_data  (r_rec[sel]),
    .out_valid(dist_valid),
    .out_ready(dist_ready),
    .out_data (dist_rec),
    .count    (f_count)
  );

  assign quiet = (&r_idle) && (f_count == '0) && !q_load;
endmodule
