// Memory controller hub (MCH) search engine of the main-memory level.
//
// It runs a best-first graph search for one query at a time, with the sorting
// kept central and the distance calculation spread over the feature DIMMs:
//   1. A query (vector, query ID, entry node) arrives from the host. The MCH
//      flushes the Top-K priority queue, loads the query into the query feature
//      registers of all feature DIMMs (which also clears their visited lists),
//      and sends the entry node to its rank NMC so that its distance is queued.
//   2. Each search step reads the queue head, the nearest node not yet
//      expanded, marks it, and sends its index Vid to the neighbor DIMM.
//   3. The returned neighbour indices are routed to rank NMC (Nid mod N_NMC)
//      at local position (Nid div N_NMC); the rank NMC filters visited ones and
//      calculates the rest. If the target rank NMC is busy the neighbour stream
//      stalls.
//   4. Every cycle one record from the distance FIFOs of the feature DIMMs
//      (round robin) is inserted into the priority queue.
//   5. A step ends when all lists are done, the DIMMs are quiet and the queue
//      has settled. After STEPS steps, or when nothing is left to expand, the
//      queue is read out in ascending distance: all K entries as the final
//      answer (million-scale mode), or the nearest NPROBE as cluster-centre
//      indices for the storage level (billion-scale mode), flagged `res_to_ssd`.
//
// The node-to-rank mapping, the "nearest unexpanded" reading of the queue head,
// the step count and the handshakes are this design's choices.
module mch
  import pyr_pkg::*;
#(
  parameter int DIM    = 128,
  parameter int K      = 100,
  parameter int STEPS  = 128,
  parameter int NPROBE = 60,
  parameter int N_DIMM = 3,
  parameter int N_NMC  = 24
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // host query
  input  logic                        hq_valid,
  output logic                        hq_ready,
  input  logic [QID_W-1:0]            hq_qid,
  input  logic [DIM-1:0][ELEM_W-1:0]  hq_vec,
  input  logic [ID_W-1:0]             hq_entry,
  input  logic                        hq_billion,
  // neighbor DIMM
  output logic                        vid_valid,
  input  logic                        vid_ready,
  output logic [ID_W-1:0]             vid,
  input  logic                        nbr_valid,
  output logic                        nbr_ready,
  input  logic [ID_W-1:0]             nbr_nid,
  input  logic                        nbr_last,
  // feature DIMMs: query load and neighbour dispatch
  output logic                        q_load,
  output logic [QID_W-1:0]            q_id,
  output logic [DIM-1:0][ELEM_W-1:0]  q_vec,
  output logic [N_NMC-1:0]            nmc_valid,
  input  logic [N_NMC-1:0]            nmc_ready,
  output logic [ID_W-1:0]             nmc_nid,
  output logic [ID_W-1:0]             nmc_local,
  // feature DIMMs: distance FIFOs
  input  logic [N_DIMM-1:0]           dist_valid,
  output logic [N_DIMM-1:0]           dist_ready,
  input  dist_rec_t                   dist_rec [N_DIMM],
  input  logic [N_DIMM-1:0]           dimm_quiet,
  // results, ascending distance
  output logic                        res_valid,
  input  logic                        res_ready,
  output logic [QID_W-1:0]            res_qid,
  output logic [ID_W-1:0]             res_id,
  output logic [DIST_W-1:0]           res_dist,
  output logic                        res_last,
  output logic                        res_to_ssd,
  // events
  output logic                        ev_step,      // a search step starts
  output logic                        ev_stall,     // neighbour stream waits for a rank NMC
  output logic                        ev_done       // a query's search ends
);
  localparam int KW = $clog2(K);
  localparam int DW = (N_DIMM > 1) ? $clog2(N_DIMM) : 1;
  localparam int NW = (N_NMC > 1) ? $clog2(N_NMC) : 1;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_SEED, S_PICK, S_NBR, S_WAIT, S_OUT} state_t;
  state_t state;

  logic [ID_W-1:0]   entry;
  logic              billion;
  logic [$clog2(STEPS+1)-1:0] step;
  logic [KW:0]       out_idx, out_n;

  // priority queue
  logic              pq_flush, pq_in_valid, pq_mark, pq_head_valid, pq_busy;
  logic [ID_W-1:0]   pq_in_id;
  logic [DIST_W-1:0] pq_in_dist;
  logic [KW-1:0]     pq_head_idx, pq_rd_idx;
  pq_entry_t         pq_rd;
  logic [$clog2(K+1)-1:0] pq_count;

  topk_pq #(.K(K)) u_pq (
    .clk, .rst_n,
    .flush     (pq_flush),
    .in_valid  (pq_in_valid),
    .in_id     (pq_in_id),
    .in_dist   (pq_in_dist),
    .mark_valid(pq_mark),
    .mark_idx  (pq_head_idx),
    .rd_idx    (pq_rd_idx),
    .rd_entry  (pq_rd),
    .head_valid(pq_head_valid),
    .head_idx  (pq_head_idx),
    .busy      (pq_busy),
    .count     (pq_count)
  );

  // ---- round-robin drain of the distance FIFOs into the queue ----
  logic [DW-1:0] rr, dsel;
  logic          dsel_valid;
  always_comb begin
    dsel_valid = 1'b0;
    dsel       = '0;
    for (int k = N_DIMM - 1; k >= 0; k--) begin
      int idx;
      idx = (int'(rr) + k) % N_DIMM;
      if (dist_valid[idx]) begin
        dsel_valid = 1'b1;
        dsel       = DW'(idx);
      end
    end
    dist_ready = '0;
    if (dsel_valid) dist_ready[dsel] = 1'b1;
  end
  assign pq_in_valid = dsel_valid;
  assign pq_in_id    = dist_rec[dsel].nid;
  assign pq_in_dist  = dist_rec[dsel].d2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          rr <= '0;
    else if (dsel_valid) rr <= (dsel == DW'(N_DIMM-1)) ? '0 : dsel + 1'b1;
  end

  // ---- neighbour routing: rank NMC = Nid mod N_NMC ----
  logic [ID_W-1:0] route_nid;
  logic [NW-1:0]   route;
  assign route_nid = (state == S_SEED) ? entry : nbr_nid;
  assign route     = NW'(route_nid % ID_W'(N_NMC));
  assign nmc_nid   = route_nid;
  assign nmc_local = route_nid / ID_W'(N_NMC);

  wire nbr_skip = (nbr_nid == NID_NONE);

  always_comb begin
    nmc_valid = '0;
    nbr_ready = 1'b0;
    if (state == S_SEED) nmc_valid[route] = 1'b1;
    if (state == S_NBR && nbr_valid) begin
      if (nbr_skip) nbr_ready = 1'b1;
      else begin
        nmc_valid[route] = 1'b1;
        nbr_ready        = nmc_ready[route];
      end
    end
  end

  assign ev_stall = (state == S_NBR) && nbr_valid && !nbr_skip && !nmc_ready[route];

  // ---- control ----
  wire all_quiet = (&dimm_quiet) && !pq_busy && !dsel_valid;

  assign hq_ready  = (state == S_IDLE);
  assign q_load    = (state == S_LOAD);
  assign pq_flush  = (state == S_LOAD);
  assign vid_valid = (state == S_PICK) && pq_head_valid && (step < ($clog2(STEPS+1))'(STEPS));
  assign vid       = pq_rd.id;
  assign pq_mark   = vid_valid && vid_ready;
  assign ev_step   = pq_mark;
  assign pq_rd_idx = (state == S_OUT) ? out_idx[KW-1:0] : pq_head_idx;

  assign res_valid  = (state == S_OUT);
  assign res_qid    = q_id;
  assign res_id     = pq_rd.id;
  assign res_dist   = pq_rd.d2;
  assign res_last   = (out_idx == out_n - 1'b1);
  assign res_to_ssd = billion;
  assign ev_done    = res_valid && res_ready && res_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      entry   <= '0;
      billion <= 1'b0;
      q_id    <= '0;
      q_vec   <= '0;
      step    <= '0;
      out_idx <= '0;
      out_n   <= '0;
    end else begin
      case (state)
        S_IDLE: if (hq_valid) begin
          q_id    <= hq_qid;
          q_vec   <= hq_vec;
          entry   <= hq_entry;
          billion <= hq_billion;
          state   <= S_LOAD;
        end
        S_LOAD: begin
          step  <= '0;
          state <= S_SEED;
        end
        S_SEED: if (nmc_ready[route]) state <= S_WAIT;
        S_PICK: begin
          if (!pq_head_valid || step == ($clog2(STEPS+1))'(STEPS)) begin
            out_idx <= '0;
            if (billion && pq_count > ($clog2(K+1))'(NPROBE)) out_n <= (KW+1)'(NPROBE);
            else                                            out_n <= (KW+1)'(pq_count);
            state   <= S_OUT;
          end else if (vid_ready) begin
            step  <= step + 1'b1;
            state <= S_NBR;
          end
        end
        S_NBR: if (nbr_valid && nbr_ready && nbr_last) state <= S_WAIT;
        S_WAIT: if (all_quiet) state <= S_PICK;
        S_OUT: if (res_ready) begin
          out_idx <= out_idx + 1'b1;
          if (res_last) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
