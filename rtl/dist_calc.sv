// Distance calculation unit: squared Euclidean distance between a query and a
// feature, computed one sub-feature of LANES elements per cycle.
//
// Each lane subtracts a feature element from the query element and squares the
// difference (SUB, MUL); an adder tree sums the lanes (ADD) into a partial sum
// that is registered, and an accumulator adds the partial sums of successive
// sub-features. With `in_last` on the final sub-feature, the distance appears
// on `out_dist` with `out_valid` two cycles later, together with the tag given
// alongside `in_last`. One sub-feature is accepted every cycle, so a feature of
// DIM/LANES sub-features streams through with no gaps.
//
// The sub-feature width follows the document's rule that the rank's 8-byte,
// double-data-rate DRAM stream must be matched by the unit; 64 lanes take one
// 64-byte DRAM burst per cycle. Unsigned elements, the two-stage timing and the
// 32-bit truncation of the sum are this design's choices.
module dist_calc
  import pyr_pkg::*;
#(
  parameter int LANES = 64,
  parameter int TAG_W = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic                          in_last,
  input  logic [TAG_W-1:0]              in_tag,
  input  logic [LANES-1:0][ELEM_W-1:0]  q_sub,
  input  logic [LANES-1:0][ELEM_W-1:0]  f_sub,
  output logic                          out_valid,
  output logic [TAG_W-1:0]              out_tag,
  output logic [DIST_W-1:0]             out_dist
);
  logic [DIST_W-1:0] psum, psum_r, acc;
  logic              p_valid, p_last;
  logic [TAG_W-1:0]  p_tag;

  // SUB, MUL and the lane adder tree
  always_comb begin
    psum = '0;
    for (int l = 0; l < LANES; l++) begin
      logic signed [ELEM_W:0]     d;
      logic        [2*ELEM_W-1:0] sq;
      d    = $signed({1'b0, q_sub[l]}) - $signed({1'b0, f_sub[l]});
      sq   = (2*ELEM_W)'(d * d);
      psum = psum + DIST_W'(sq);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid   <= 1'b0;
      p_last    <= 1'b0;
      p_tag     <= '0;
      psum_r    <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_tag   <= '0;
      out_dist  <= '0;
    end else begin
      p_valid   <= in_valid;
      p_last    <= in_valid && in_last;
      if (in_valid) begin
        psum_r <= psum;
        p_tag  <= in_tag;
      end
      out_valid <= 1'b0;
      if (p_valid) begin
        if (p_last) begin
          out_valid <= 1'b1;
          out_dist  <= acc + psum_r;
          out_tag   <= p_tag;
          acc       <= '0;
        end else begin
          acc <= acc + psum_r;
        end
      end
    end
  end
endmodule
