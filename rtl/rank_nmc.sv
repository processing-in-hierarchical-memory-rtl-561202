// Rank-level near-memory-computing module of a feature DIMM.
//
// It receives neighbour indices (Nid) meant for its rank. Each index is first
// looked up in the rank's CAM-based visited list: on a hit the distance is
// already known and the index is dropped; on a miss the index is written into
// the CAM, the node's feature is read from the rank's DRAM as DIM/SUB_BYTES
// consecutive bursts of SUB_BYTES bytes, and each burst is fed as one
// sub-feature to the distance unit together with the matching slice of the
// query. The finished (query ID, Nid, distance) record waits in an output
// register until the DIMM-level multiplexer takes it.
//
// Interface: `nid`/`nlocal` with valid/ready (nlocal is the node's position in
// this rank's share of the dataset); a DRAM read port that issues burst
// addresses (valid/ready) and takes burst data back in order, one burst per
// `dram_rsp_valid`; a record output with valid/ready. The DRAM address is
// nlocal*(DIM/SUB_BYTES) + sub-feature number, in burst units.
//
// Timing: a missed index costs one cycle of lookup, the DRAM latency plus
// DIM/SUB_BYTES cycles of bursts, and two cycles of distance pipeline; one
// feature is in flight at a time. A hit costs one cycle. The one-at-a-time
// processing and the address layout are this design's choices.
module rank_nmc
  import pyr_pkg::*;
#(
  parameter int DIM       = 128,
  parameter int SUB_BYTES = 64,
  parameter int CAM_DEPTH = 256,
  parameter int ADDR_W    = 32
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            flush,
  input  logic [QID_W-1:0]                qid,
  input  logic [DIM-1:0][ELEM_W-1:0]      q_vec,
  // neighbour index input
  input  logic                            nid_valid,
  output logic                            nid_ready,
  input  logic [ID_W-1:0]                 nid,
  input  logic [ID_W-1:0]                 nlocal,
  // DRAM burst read port of this rank
  output logic                            dram_req_valid,
  input  logic                            dram_req_ready,
  output logic [ADDR_W-1:0]               dram_req_addr,
  input  logic                            dram_rsp_valid,
  input  logic [SUB_BYTES-1:0][ELEM_W-1:0] dram_rsp_data,
  // distance record output
  output logic                            out_valid,
  input  logic                            out_ready,
  output dist_rec_t                       out_rec,
  // status
  output logic                            idle,
  output logic                            filtered,   // pulse: a visited Nid was dropped
  output logic                            cam_overflow
);
  localparam int NSUB = DIM / SUB_BYTES;
  localparam int SW   = (NSUB > 1) ? $clog2(NSUB) : 1;

  typedef enum logic [1:0] {S_IDLE, S_READ, S_CALC, S_OUT} state_t;
  state_t state;

  logic [ID_W-1:0]   cur_nid, cur_local;
  logic [SW:0]       req_cnt, rsp_cnt;
  logic              cam_hit, cam_full;
  logic              dc_valid;
  logic [DIST_W-1:0] dc_dist;
  logic [ID_W-1:0]   dc_tag;

  assign nid_ready = (state == S_IDLE);
  wire   accept    = nid_valid && nid_ready;

  visited_cam #(.DEPTH(CAM_DEPTH)) u_cam (
    .clk, .rst_n, .flush,
    .lookup(accept), .insert(1'b1), .key(nid),
    .hit(cam_hit), .full(cam_full), .overflow(cam_overflow)
  );

  assign filtered       = accept && cam_hit;
  assign dram_req_valid = (state == S_READ) && (req_cnt < (SW+1)'(NSUB));
  assign dram_req_addr  = ADDR_W'(cur_local * NSUB) + ADDR_W'(req_cnt);

  // sub-feature s of the query
  logic [SUB_BYTES-1:0][ELEM_W-1:0] q_sub;
  always_comb begin
    q_sub = '0;
    for (int s = 0; s < NSUB; s++)
      if (rsp_cnt == (SW+1)'(s)) q_sub = q_vec[s*SUB_BYTES +: SUB_BYTES];
  end

  dist_calc #(.LANES(SUB_BYTES), .TAG_W(ID_W)) u_dist (
    .clk, .rst_n,
    .in_valid (dram_rsp_valid && state == S_READ),
    .in_last  (rsp_cnt == (SW+1)'(NSUB-1)),
    .in_tag   (cur_nid),
    .q_sub    (q_sub),
    .f_sub    (dram_rsp_data),
    .out_valid(dc_valid),
    .out_tag  (dc_tag),
    .out_dist (dc_dist)
  );

  assign out_valid = (state == S_OUT);
  assign idle      = (state == S_IDLE) && !flush;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cur_nid   <= '0;
      cur_local <= '0;
      req_cnt   <= '0;
      rsp_cnt   <= '0;
      out_rec   <= '0;
    end else if (flush) begin
      state   <= S_IDLE;
      req_cnt <= '0;
      rsp_cnt <= '0;
    end else begin
      case (state)
        S_IDLE: if (accept && !cam_hit) begin
          cur_nid   <= nid;
          cur_local <= nlocal;
          req_cnt   <= '0;
          rsp_cnt   <= '0;
          state     <= S_READ;
        end
        S_READ: begin
          if (dram_req_valid && dram_req_ready) req_cnt <= req_cnt + 1'b1;
          if (dram_rsp_valid) begin
            rsp_cnt <= rsp_cnt + 1'b1;
            if (rsp_cnt == (SW+1)'(NSUB-1)) state <= S_CALC;
          end
        end
        S_CALC: if (dc_valid) begin
          out_rec.qid  <= qid;
          out_rec.nid  <= dc_tag;
          out_rec.d2 <= dc_dist;
          state        <= S_OUT;
        end
        S_OUT: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    dram_rsp_valid |-> state == S_READ)
    else $error("rank_nmc: DRAM data with no read outstanding");
endmodule
