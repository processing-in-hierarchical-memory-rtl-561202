// Channel-level distance calculation module of the in-storage engine.
//
// One of these sits beside each flash controller. It takes a job (query slot,
// logical page address, query vector), asks its flash controller for the page,
// and parses the page as it streams by, one byte per beat: a 4-byte record
// count, then that many records of a 4-byte node index Vid followed by the
// node's DIM feature bytes. Every feature byte goes straight into a one-lane
// distance unit, so the records of a cluster are processed sequentially at the
// channel's data rate, and each finished (slot, Vid, distance) record is queued
// for the SSD-level sorting. The rest of the page after the last record is
// skipped; the page ends with `fl_last`.
//
// Timing: one byte per cycle when the flash controller delivers one; the
// distance of a record leaves two cycles after its last feature byte. The data
// stream is held (fl_ready low) while the output queue has fewer than two free
// places. The page layout, the byte-wide stream and little-endian words are
// this design's choices.
module flash_ch_dist
  import pyr_pkg::*;
#(
  parameter int DIM     = 128,
  parameter int LBA_W   = 32,
  parameter int SLOT_W  = 7
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // job
  input  logic                       job_valid,
  output logic                       job_ready,
  input  logic [SLOT_W-1:0]          job_slot,
  input  logic [LBA_W-1:0]           job_lba,
  input  logic [DIM-1:0][ELEM_W-1:0] job_vec,
  // flash controller
  output logic                       fl_req_valid,
  input  logic                       fl_req_ready,
  output logic [LBA_W-1:0]           fl_req_lba,
  input  logic                       fl_valid,
  output logic                       fl_ready,
  input  logic [7:0]                 fl_data,
  input  logic                       fl_last,
  // distance records (qid field = query slot)
  output logic                       out_valid,
  input  logic                       out_ready,
  output dist_rec_t                  out_rec,
  output logic                       idle
);
  localparam int BW = $clog2(DIM + 1);

  typedef enum logic [2:0] {S_IDLE, S_REQ, S_HDR, S_VID, S_FEAT, S_SKIP} state_t;
  state_t state;

  logic [SLOT_W-1:0]          slot;
  logic [LBA_W-1:0]           lba;
  logic [DIM-1:0][ELEM_W-1:0] qv;
  logic [31:0]                shreg;     // little-endian word assembly
  logic [1:0]                 bcnt;
  logic [31:0]                rec_left;
  logic [ID_W-1:0]            cur_vid;
  logic [BW-1:0]              fidx;

  logic                       dc_valid;
  logic [QID_W+ID_W-1:0]      dc_tag;
  logic [DIST_W-1:0]          dc_dist;
  logic [2:0]                 o_count;
  logic                       o_in_ready;

  assign job_ready    = (state == S_IDLE);
  assign fl_req_valid = (state == S_REQ);
  assign fl_req_lba   = lba;
  assign fl_ready     = (state inside {S_HDR, S_VID, S_FEAT, S_SKIP}) && (o_count < 3'd3);
  wire   beat         = fl_valid && fl_ready;
  wire [31:0] word    = {fl_data, shreg[31:8]};

  dist_calc #(.LANES(1), .TAG_W(QID_W + ID_W)) u_dist (
    .clk, .rst_n,
    .in_valid (beat && state == S_FEAT),
    .in_last  (fidx == BW'(DIM - 1)),
    .in_tag   ({QID_W'(slot), cur_vid}),
    .q_sub    (qv[fidx[$clog2(DIM)-1:0]]),
    .f_sub    (fl_data),
    .out_valid(dc_valid),
    .out_tag  (dc_tag),
    .out_dist (dc_dist)
  );

  dist_rec_t dc_rec;
  assign dc_rec = '{qid: dc_tag[QID_W+ID_W-1:ID_W], nid: dc_tag[ID_W-1:0], d2: dc_dist};

  sync_fifo #(.W($bits(dist_rec_t)), .DEPTH(4)) u_out (
    .clk, .rst_n, .clr(1'b0),
    .in_valid(dc_valid), .in_ready(o_in_ready), .in_data(dc_rec),
    .out_valid, .out_ready, .out_data(out_rec), .count(o_count)
  );

  // distances still in the two-stage pipeline
  logic [1:0] infl;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) infl <= '0;
    else infl <= {infl[0], beat && state == S_FEAT && fidx == BW'(DIM - 1)};
  end
  assign idle = (state == S_IDLE) && (infl == '0) && (o_count == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      slot     <= '0;
      lba      <= '0;
      qv       <= '0;
      shreg    <= '0;
      bcnt     <= '0;
      rec_left <= '0;
      cur_vid  <= '0;
      fidx     <= '0;
    end else begin
      case (state)
        S_IDLE: if (job_valid) begin
          slot  <= job_slot;
          lba   <= job_lba;
          qv    <= job_vec;
          state <= S_REQ;
        end
        S_REQ: if (fl_req_ready) begin
          bcnt  <= '0;
          state <= S_HDR;
        end
        default: if (beat) begin
          shreg <= word;
          bcnt  <= bcnt + 1'b1;
          if (fl_last) state <= S_IDLE;
          else begin
            case (state)
              S_HDR: if (bcnt == 2'd3) begin
                rec_left <= word;
                state    <= (word == '0) ? S_SKIP : S_VID;
              end
              S_VID: if (bcnt == 2'd3) begin
                cur_vid  <= word;
                fidx     <= '0;
                rec_left <= rec_left - 1'b1;
                state    <= S_FEAT;
              end
              S_FEAT: begin
                fidx <= fidx + 1'b1;
                bcnt <= '0;
                if (fidx == BW'(DIM - 1)) state <= (rec_left == '0) ? S_SKIP : S_VID;
              end
              default: ;
            endcase
          end
        end
      endcase
    end
  end

  a_no_drop: assert property (@(posedge clk) disable iff (!rst_n) dc_valid |-> o_in_ready)
    else $error("flash_ch_dist: output queue overrun");
endmodule
