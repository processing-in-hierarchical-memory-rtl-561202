// CAM-based visited list of one rank: remembers which node indices have
// already had their distance to the current query calculated.
//
// Each CAM row holds one node index. A lookup compares the key with every
// valid row in parallel and answers `hit` in the same cycle. When the lookup
// misses and `insert` is set, the key is written into the next free row at the
// clock edge. `flush` clears all rows for a new query.
//
// The row count is this design's choice. When every row is taken a missed key
// is not recorded and `overflow` is raised until the next flush; that node is
// then treated as unvisited, so it may be calculated again later, which costs
// time but not correctness of the distances.
module visited_cam
  import pyr_pkg::*;
#(
  parameter int DEPTH = 256
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            flush,
  input  logic            lookup,
  input  logic            insert,     // write the key on a miss
  input  logic [ID_W-1:0] key,
  output logic            hit,
  output logic            full,
  output logic            overflow
);
  logic [ID_W-1:0]              row   [DEPTH];
  logic [DEPTH-1:0]             row_v;
  logic [$clog2(DEPTH+1)-1:0]   used;

  always_comb begin
    hit = 1'b0;
    for (int r = 0; r < DEPTH; r++) hit |= row_v[r] && (row[r] == key);
    hit  = hit && lookup;
  end

  assign full = (used == ($clog2(DEPTH+1))'(DEPTH));

  always_ff @(posedge clk) begin
    if (lookup && insert && !hit && !full) row[used[$clog2(DEPTH)-1:0]] <= key;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_v    <= '0;
      used     <= '0;
      overflow <= 1'b0;
    end else if (flush) begin
      row_v    <= '0;
      used     <= '0;
      overflow <= 1'b0;
    end else if (lookup && insert && !hit) begin
      if (!full) begin
        row_v[used[$clog2(DEPTH)-1:0]] <= 1'b1;
        used <= used + 1'b1;
      end else begin
        overflow <= 1'b1;
      end
    end
  end
endmodule
