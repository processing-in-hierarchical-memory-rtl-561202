// Top-K priority queue: a systolic insertion sorter that accepts one
// (id, distance) pair per cycle and keeps the K smallest distances.
//
// It holds K queue registers (QRegs), kept in ascending order with the minimum
// at QReg[0], and K temporary registers (TRegs) that carry new values down the
// chain. A new pair is written into TReg[0]. Every cycle, stage i compares
// TReg[i] with QReg[i]: if the TReg distance is larger, the pair moves on to
// TReg[i+1]; otherwise it takes QReg[i]'s place and the displaced QReg pair
// moves on to TReg[i+1]. The pair that leaves the last stage is the maximum and
// is dropped. A pair therefore settles within K cycles; `busy` is high while any
// TReg holds a pair, and the contents are only read once it is low.
//
// Added to the sorter (this design's choices): a `flush` that empties both
// register chains at the start of a query, an index read port, an `expd` flag
// per entry that the graph search sets on a node whose neighbours it has
// fetched, and a `head` output that points at the nearest entry not yet
// expanded. An empty QReg counts as an infinite distance; on equal distances
// the newer pair is placed first.
module topk_pq
  import pyr_pkg::*;
#(
  parameter int K = 100
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 flush,
  // insertion, one per cycle, always accepted
  input  logic                 in_valid,
  input  logic [ID_W-1:0]      in_id,
  input  logic [DIST_W-1:0]    in_dist,
  // mark an entry as expanded (only while !busy)
  input  logic                 mark_valid,
  input  logic [$clog2(K)-1:0] mark_idx,
  // read port
  input  logic [$clog2(K)-1:0] rd_idx,
  output pq_entry_t            rd_entry,
  // nearest valid entry that is not yet expanded
  output logic                 head_valid,
  output logic [$clog2(K)-1:0] head_idx,
  output logic                 busy,
  output logic [$clog2(K+1)-1:0] count
);
  pq_entry_t qreg [K];
  pq_entry_t treg [K];

  assign rd_entry = qreg[rd_idx];

  always_comb begin
    busy = 1'b0;
    for (int i = 0; i < K; i++) busy |= treg[i].vld;
  end

  always_comb begin
    head_valid = 1'b0;
    head_idx   = '0;
    count      = '0;
    for (int i = K - 1; i >= 0; i--) begin
      if (qreg[i].vld && !qreg[i].expd) begin
        head_valid = 1'b1;
        head_idx   = ($clog2(K))'(i);
      end
    end
    for (int i = 0; i < K; i++) count += ($clog2(K+1))'(qreg[i].vld);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) begin
        qreg[i] <= '0;
        treg[i] <= '0;
      end
    end else if (flush) begin
      for (int i = 0; i < K; i++) begin
        qreg[i] <= '0;
        treg[i] <= '0;
      end
    end else begin
      // entry stage
      treg[0].vld  <= in_valid;
      treg[0].expd <= 1'b0;
      treg[0].id   <= in_id;
      treg[0].d2 <= in_dist;
      for (int i = 0; i < K; i++) begin
        if (treg[i].vld && (!qreg[i].vld || treg[i].d2 <= qreg[i].d2)) begin
          // the travelling pair takes this place, the old one moves on
          qreg[i] <= treg[i];
          if (i < K - 1) treg[i+1] <= qreg[i];
        end else begin
          // pass the pair (or the bubble) on
          if (i < K - 1) treg[i+1] <= treg[i];
        end
      end
      if (mark_valid) qreg[mark_idx].expd <= 1'b1;
    end
  end

  a_mark_idle: assert property (@(posedge clk) disable iff (!rst_n) mark_valid |-> !busy)
    else $error("topk_pq: entry marked while the queue is still sorting");
endmodule
