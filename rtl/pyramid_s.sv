// Pyramid-S: in-storage nearest-neighbour search over feature clusters.
//
// The storage level receives, for each query, the query vector and the
// indices Cid of the nearest cluster centres found by the main-memory level,
// and returns the nearest nodes among all members of those clusters. It has
// three parts:
//   * host-interface translation: cluster Cid occupies PPC consecutive flash
//     pages starting at logical page CID_BASE + Cid*PPC;
//   * one distance unit per flash channel (flash_ch_dist); page p goes to
//     channel p mod N_CH, so all channels stream clusters at the same time;
//   * SSD-level sorting: one Top-K queue per query of the batch (ssd_sorter).
//
// Batching and pipelining: queries are loaded into one of two batch banks
// while the other bank is being searched. A bank is closed when it holds BATCH
// queries or when a query arrives with `ld_close`. The search of a closed bank
// flushes the queues, issues one job per (query, cluster, page) to the channel
// job queues, waits until every channel and queue is idle, then returns each
// query's list in ascending distance (`res_last` on a query's final entry)
// with the host's query ID. Loading stops only if both banks are full.
//
// The bank scheme, the page-to-channel striping, the job queue depth and all
// handshakes are this design's choices.
module pyramid_s
  import pyr_pkg::*;
#(
  parameter int DIM      = 128,
  parameter int N_CH     = 32,
  parameter int BATCH    = 100,
  parameter int NPROBE   = 60,
  parameter int K        = 100,
  parameter int PPC      = 1,
  parameter int LBA_W    = 32,
  parameter logic [LBA_W-1:0] CID_BASE = '0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // cluster lists from the main-memory level
  input  logic                          ld_valid,
  output logic                          ld_ready,
  input  logic [QID_W-1:0]              ld_qid,
  input  logic [DIM-1:0][ELEM_W-1:0]    ld_vec,
  input  logic [ID_W-1:0]               ld_cid,
  input  logic                          ld_last,   // last Cid of this query
  input  logic                          ld_close,  // close the batch after this query
  // flash controllers
  output logic [N_CH-1:0]               fl_req_valid,
  input  logic [N_CH-1:0]               fl_req_ready,
  output logic [N_CH-1:0][LBA_W-1:0]    fl_req_lba,
  input  logic [N_CH-1:0]               fl_valid,
  output logic [N_CH-1:0]               fl_ready,
  input  logic [N_CH-1:0][7:0]          fl_data,
  input  logic [N_CH-1:0]               fl_last,
  // nearest-node lists
  output logic                          res_valid,
  input  logic                          res_ready,
  output logic [QID_W-1:0]              res_qid,
  output logic [ID_W-1:0]               res_id,
  output logic [DIST_W-1:0]             res_dist,
  output logic                          res_last,
  // events
  output logic                          ev_batch,     // a batch search starts
  output logic                          ev_overlap,   // a query loaded while a batch runs
  output logic                          ev_job_stall  // a job waits for a full channel queue
);
  localparam int SW  = $clog2(BATCH);
  localparam int CW  = $clog2(NPROBE + 1);
  localparam int PW  = (PPC > 1) ? $clog2(PPC) : 1;
  localparam int CHW = (N_CH > 1) ? $clog2(N_CH) : 1;
  localparam int KW  = $clog2(K);
  localparam int VW  = DIM * ELEM_W;
  localparam int JW  = SW + LBA_W + VW;

  // ---------------- batch banks ----------------
  logic [VW-1:0]    qmem [2*BATCH];
  logic [QID_W-1:0] hmem [2*BATCH];
  logic [CW-1:0]    nmem [2*BATCH];
  logic [ID_W-1:0]  cmem [2*BATCH*NPROBE];
  logic [1:0]       full;
  logic [SW:0]      nq [2];

  logic             lb;          // bank being loaded
  logic [SW:0]      l_slot;
  logic [CW-1:0]    l_cidx;

  assign ld_ready = !full[lb];
  wire ld_fire = ld_valid && ld_ready;
  wire [SW+1:0] l_base = {1'b0, lb ? (SW+1)'(BATCH) : (SW+1)'(0)} + (SW+2)'(l_slot);

  always_ff @(posedge clk) begin
    if (ld_fire) begin
      if (l_cidx == '0) begin
        qmem[l_base] <= ld_vec;
        hmem[l_base] <= ld_qid;
      end
      if (l_cidx < CW'(NPROBE)) cmem[l_base * NPROBE + l_cidx] <= ld_cid;
      if (ld_last) nmem[l_base] <= (l_cidx < CW'(NPROBE)) ? l_cidx + 1'b1 : CW'(NPROBE);
    end
  end

  // ---------------- run engine ----------------
  typedef enum logic [2:0] {R_IDLE, R_FLUSH, R_ISSUE, R_WAIT, R_OUT} rstate_t;
  rstate_t rstate;
  logic          rb;             // bank being searched
  logic [SW:0]   r_q;
  logic [CW-1:0] r_c;
  logic [PW-1:0] r_p;
  logic [KW:0]   r_i;
  logic          bank_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lb     <= 1'b0;
      l_slot <= '0;
      l_cidx <= '0;
      full   <= '0;
      nq[0]  <= '0;
      nq[1]  <= '0;
    end else begin
      if (ld_fire) begin
        l_cidx <= l_cidx + ((l_cidx < CW'(NPROBE)) ? 1'b1 : 1'b0);
        if (ld_last) begin
          l_cidx <= '0;
          if (l_slot == (SW+1)'(BATCH - 1) || ld_close) begin
            full[lb] <= 1'b1;
            nq[lb]   <= l_slot + 1'b1;
            l_slot   <= '0;
            lb       <= !lb;
          end else begin
            l_slot <= l_slot + 1'b1;
          end
        end
      end
      if (bank_done) full[rb] <= 1'b0;
    end
  end

  // host-interface translation: cluster index to logical page address
  wire [SW+1:0]    r_base = {1'b0, rb ? (SW+1)'(BATCH) : (SW+1)'(0)} + (SW+2)'(r_q);
  wire [ID_W-1:0]  r_cid  = cmem[r_base * NPROBE + r_c];
  wire [LBA_W-1:0] r_lba  = CID_BASE + LBA_W'(r_cid) * LBA_W'(PPC) + LBA_W'(r_p);
  wire [CHW-1:0]   r_ch   = CHW'(r_lba % LBA_W'(N_CH));
  wire [CW-1:0]    r_ncid = nmem[r_base];

  // channel job queues
  logic [N_CH-1:0] j_in_valid, j_in_ready, j_valid, j_ready, ch_idle, o_valid, o_ready;
  logic [JW-1:0]   j_data [N_CH];
  dist_rec_t       o_rec [N_CH];
  logic [JW-1:0]   job;
  assign job = {SW'(r_q), r_lba, qmem[r_base]};

  always_comb begin
    j_in_valid = '0;
    if (rstate == R_ISSUE) j_in_valid[r_ch] = 1'b1;
  end
  wire issue_fire = (rstate == R_ISSUE) && j_in_ready[r_ch];
  assign ev_job_stall = (rstate == R_ISSUE) && !j_in_ready[r_ch];

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    logic [1:0] jc;
    sync_fifo #(.W(JW), .DEPTH(2)) u_jobq (
      .clk, .rst_n, .clr(1'b0),
      .in_valid(j_in_valid[c]), .in_ready(j_in_ready[c]), .in_data(job),
      .out_valid(j_valid[c]), .out_ready(j_ready[c]), .out_data(j_data[c]), .count(jc)
    );
    logic ch_i;
    flash_ch_dist #(.DIM(DIM), .LBA_W(LBA_W), .SLOT_W(SW)) u_ch (
      .clk, .rst_n,
      .job_valid   (j_valid[c]),
      .job_ready   (j_ready[c]),
      .job_slot    (j_data[c][JW-1 -: SW]),
      .job_lba     (j_data[c][VW +: LBA_W]),
      .job_vec     (j_data[c][VW-1:0]),
      .fl_req_valid(fl_req_valid[c]),
      .fl_req_ready(fl_req_ready[c]),
      .fl_req_lba  (fl_req_lba[c]),
      .fl_valid    (fl_valid[c]),
      .fl_ready    (fl_ready[c]),
      .fl_data     (fl_data[c]),
      .fl_last     (fl_last[c]),
      .out_valid   (o_valid[c]),
      .out_ready   (o_ready[c]),
      .out_rec     (o_rec[c]),
      .idle        (ch_i)
    );
    assign ch_idle[c] = ch_i && !j_valid[c];
  end

  // SSD-level sorting
  pq_entry_t              s_entry;
  logic [$clog2(K+1)-1:0] s_count;
  logic                   s_busy;

  ssd_sorter #(.N_Q(BATCH), .K(K), .N_IN(N_CH)) u_sort (
    .clk, .rst_n,
    .flush   (rstate == R_FLUSH),
    .in_valid(o_valid),
    .in_ready(o_ready),
    .in_rec  (o_rec),
    .rd_q    (SW'(r_q)),
    .rd_idx  (r_i[KW-1:0]),
    .rd_entry(s_entry),
    .rd_count(s_count),
    .busy    (s_busy)
  );

  assign ev_batch   = (rstate == R_IDLE) && full[rb];
  assign ev_overlap = ld_fire && (rstate != R_IDLE);

  assign res_valid = (rstate == R_OUT) && (s_count != '0);
  assign res_qid   = hmem[r_base];
  assign res_id    = s_entry.id;
  assign res_dist  = s_entry.d2;
  assign res_last  = ((KW+1)'(r_i) == (KW+1)'(s_count) - 1'b1);
  assign bank_done = (rstate == R_OUT) && (r_q == nq[rb] - 1'b1) &&
                     ((s_count == '0) || (res_ready && res_last));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate <= R_IDLE;
      rb     <= 1'b0;
      r_q    <= '0;
      r_c    <= '0;
      r_p    <= '0;
      r_i    <= '0;
    end else begin
      case (rstate)
        R_IDLE: if (full[rb]) begin
          r_q    <= '0;
          r_c    <= '0;
          r_p    <= '0;
          rstate <= R_FLUSH;
        end
        R_FLUSH: rstate <= R_ISSUE;
        R_ISSUE: if (issue_fire || r_ncid == '0) begin
          // next page, cluster, query
          if (r_ncid != '0 && r_p != PW'(PPC - 1)) r_p <= r_p + 1'b1;
          else begin
            r_p <= '0;
            if (r_ncid != '0 && r_c != r_ncid - 1'b1) r_c <= r_c + 1'b1;
            else begin
              r_c <= '0;
              if (r_q == nq[rb] - 1'b1) begin
                r_q    <= '0;
                rstate <= R_WAIT;
              end else r_q <= r_q + 1'b1;
            end
          end
        end
        R_WAIT: if ((&ch_idle) && !s_busy && (o_valid == '0)) begin
          r_q    <= '0;
          r_i    <= '0;
          rstate <= R_OUT;
        end
        R_OUT: begin
          if (s_count == '0 || (res_ready && res_last)) begin
            r_i <= '0;
            if (bank_done) begin
              rstate <= R_IDLE;
              rb     <= !rb;
            end else r_q <= r_q + 1'b1;
          end else if (res_ready) r_i <= r_i + 1'b1;
        end
        default: rstate <= R_IDLE;
      endcase
    end
  end
endmodule
