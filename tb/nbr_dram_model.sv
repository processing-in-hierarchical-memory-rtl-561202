// Behavioural model of the DRAM of the neighbor DIMM (testbench only).
//
// Reads are 8-byte words answered in order after LAT cycles. The word at byte
// address a holds slots 2w and 2w+1 (low half first) of the neighbour list of
// node a / (R*4), with w the word's position in that list; the lists come from
// tb_ann_pkg::nbr_of.
module nbr_dram_model #(
  parameter int R       = 40,
  parameter int N_NODES = 1000,
  parameter int LAT     = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic [39:0] req_addr,
  output logic        rsp_valid,
  output logic [63:0] rsp_data
);
  import tb_ann_pkg::*;
  typedef struct { longint unsigned addr; longint due; } req_t;
  req_t   q[$];
  longint cyc = 0;

  initial begin
    rsp_valid = 1'b0;
    rsp_data  = '0;
    req_ready = 1'b1;
  end

  always @(posedge clk) begin
    req_t r;
    cyc++;
    if (rst_n && req_valid && req_ready) begin
      r.addr = req_addr;
      r.due  = cyc + LAT;
      q.push_back(r);
    end
    rsp_valid <= 1'b0;
    if (q.size() > 0 && q[0].due <= cyc) begin
      int unsigned v;
      int w;
      r = q.pop_front();
      v = int'(r.addr / (R * 4));
      w = int'((r.addr % (R * 4)) / 8);
      rsp_data  <= {nbr_of(v, 2*w+1, N_NODES, R), nbr_of(v, 2*w, N_NODES, R)};
      rsp_valid <= 1'b1;
    end
    req_ready <= (($urandom % 5) != 0);
  end
endmodule
