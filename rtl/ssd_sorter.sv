// SSD-level sorting: one Top-K priority queue per query of a batch.
//
// Distance records from all channel-level distance units compete for a single
// insertion port; a round-robin arbiter takes one record per cycle into a
// register, and the next cycle it is inserted into the queue of its query slot
// (the record's qid field). The number of queues, N_Q, is the largest batch the
// storage level can run. `flush` empties all queues at the start of a batch;
// `busy` stays high until the last record has settled. A read port returns
// entry `rd_idx` of queue `rd_q` and that queue's fill count.
//
// The shared arbiter and its register stage are this design's choices.
module ssd_sorter
  import pyr_pkg::*;
#(
  parameter int N_Q  = 100,
  parameter int K    = 100,
  parameter int N_IN = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,
  input  logic [N_IN-1:0]            in_valid,
  output logic [N_IN-1:0]            in_ready,
  input  dist_rec_t                  in_rec [N_IN],
  input  logic [$clog2(N_Q)-1:0]     rd_q,
  input  logic [$clog2(K)-1:0]       rd_idx,
  output pq_entry_t                  rd_entry,
  output logic [$clog2(K+1)-1:0]     rd_count,
  output logic                       busy
);
  localparam int IW = (N_IN > 1) ? $clog2(N_IN) : 1;

  logic [IW-1:0] rr, sel;
  logic          sel_valid;
  logic          st_valid;
  dist_rec_t     st_rec;

  always_comb begin
    sel_valid = 1'b0;
    sel       = '0;
    for (int k = N_IN - 1; k >= 0; k--) begin
      int idx;
      idx = (int'(rr) + k) % N_IN;
      if (in_valid[idx]) begin
        sel_valid = 1'b1;
        sel       = IW'(idx);
      end
    end
    in_ready = '0;
    if (sel_valid && !flush) in_ready[sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr       <= '0;
      st_valid <= 1'b0;
      st_rec   <= '0;
    end else if (flush) begin
      st_valid <= 1'b0;
    end else begin
      st_valid <= sel_valid;
      if (sel_valid) begin
        st_rec <= in_rec[sel];
        rr     <= (sel == IW'(N_IN-1)) ? '0 : sel + 1'b1;
      end
    end
  end

  pq_entry_t              q_entry [N_Q];
  logic [N_Q-1:0]         q_busy;
  logic [$clog2(K+1)-1:0] q_count [N_Q];

  for (genvar q = 0; q < N_Q; q++) begin : g_q
    logic              hv;
    logic [$clog2(K)-1:0] hi;
    topk_pq #(.K(K)) u_pq (
      .clk, .rst_n, .flush,
      .in_valid  (st_valid && st_rec.qid == QID_W'(q)),
      .in_id     (st_rec.nid),
      .in_dist   (st_rec.d2),
      .mark_valid(1'b0),
      .mark_idx  ('0),
      .rd_idx    (rd_idx),
      .rd_entry  (q_entry[q]),
      .head_valid(hv),
      .head_idx  (hi),
      .busy      (q_busy[q]),
      .count     (q_count[q])
    );
  end

  assign rd_entry = q_entry[rd_q];
  assign rd_count = q_count[rd_q];
  assign busy     = st_valid || (|q_busy);

  a_slot: assert property (@(posedge clk) disable iff (!rst_n) st_valid |-> st_rec.qid < QID_W'(N_Q))
    else $error("ssd_sorter: record for a query slot beyond the batch");
endmodule
