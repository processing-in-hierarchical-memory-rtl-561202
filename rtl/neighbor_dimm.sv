// Neighbor DIMM: looks up the neighbour list of a graph node.
//
// The graph is stored as fixed-size neighbour lists of R_SLOTS 4-byte indices,
// one list after another from byte address NBR_BASE; a node with fewer
// neighbours pads its list with NID_NONE. The address generation module turns
// the node index Vid into the head address of its list,
// NBR_BASE + Vid * R_SLOTS * 4, and reads the list as R_SLOTS/2 consecutive
// 8-byte DRAM words (the width a rank delivers per transfer). The words land in
// a data buffer, from which the indices leave one per cycle, low half of each
// word first, with `nid_last` on the final slot. Padding slots are passed on;
// the consumer skips them.
//
// Interface: `vid` with valid/ready (taken only when the previous list has
// left); a DRAM read port with byte addresses and 64-bit in-order data; the
// index stream with valid/ready. Timing: the first index appears the DRAM
// latency plus two cycles after the Vid is taken; reads are never issued
// beyond the free space of the buffer. The fixed list size, the padding code
// and the single DRAM port for the whole DIMM are this design's choices.
module neighbor_dimm
  import pyr_pkg::*;
#(
  parameter int R_SLOTS   = 40,
  parameter int BUF_DEPTH = 32,
  parameter int ADDR_W    = 40,
  parameter logic [ADDR_W-1:0] NBR_BASE = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              vid_valid,
  output logic              vid_ready,
  input  logic [ID_W-1:0]   vid,
  // DRAM read port, 8-byte words
  output logic              dram_req_valid,
  input  logic              dram_req_ready,
  output logic [ADDR_W-1:0] dram_req_addr,
  input  logic              dram_rsp_valid,
  input  logic [63:0]       dram_rsp_data,
  // neighbour index stream
  output logic              nid_valid,
  input  logic              nid_ready,
  output logic [ID_W-1:0]   nid,
  output logic              nid_last
);
  localparam int NBEAT = R_SLOTS / 2;
  localparam int BW    = $clog2(NBEAT + 1);
  localparam int CW    = $clog2(BUF_DEPTH + 1);

  logic              active;
  logic [ADDR_W-1:0] head;
  logic [BW-1:0]     issued, popped;
  logic              half;        // which index of the current word is next
  logic              b_valid;
  logic [63:0]       b_data;
  logic [CW-1:0]     b_count;
  logic              b_in_ready;

  assign vid_ready = !active;

  // reads in flight plus words buffered must fit the buffer
  wire [BW-1:0] pending  = issued - popped;
  assign dram_req_valid  = active && (issued < BW'(NBEAT)) && (CW'(pending) < CW'(BUF_DEPTH));
  assign dram_req_addr   = head + ADDR_W'({issued, 3'b000});

  sync_fifo #(.W(64), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n,
    .clr      (1'b0),
    .in_valid (dram_rsp_valid),
    .in_ready (b_in_ready),
    .in_data  (dram_rsp_data),
    .out_valid(b_valid),
    .out_ready(nid_ready && half),
    .out_data (b_data),
    .count    (b_count)
  );

  assign nid_valid = active && b_valid;
  assign nid       = half ? b_data[63:32] : b_data[31:0];
  assign nid_last  = half && (popped == BW'(NBEAT - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      head   <= '0;
      issued <= '0;
      popped <= '0;
      half   <= 1'b0;
    end else begin
      if (vid_valid && vid_ready) begin
        // address generation: head address of the neighbour list
        active <= 1'b1;
        head   <= NBR_BASE + ADDR_W'(vid) * ADDR_W'(R_SLOTS * 4);
        issued <= '0;
        popped <= '0;
        half   <= 1'b0;
      end else if (active) begin
        if (dram_req_valid && dram_req_ready) issued <= issued + 1'b1;
        if (nid_valid && nid_ready) begin
          half <= !half;
          if (half) begin
            popped <= popped + 1'b1;
            if (nid_last) active <= 1'b0;
          end
        end
      end
    end
  end

  a_buf_room: assert property (@(posedge clk) disable iff (!rst_n) dram_rsp_valid |-> b_in_ready)
    else $error("neighbor_dimm: data buffer overrun");
endmodule
