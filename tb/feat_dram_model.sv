// Behavioural model of one DRAM rank holding features (testbench only).
//
// Answers burst reads in order after LAT cycles, one SUB_BYTES burst per
// cycle. Burst a of rank NMC RANK belongs to node (a / NSUB) * N_NMC + RANK,
// sub-feature a % NSUB; the bytes come from tb_ann_pkg::feat_byte. The ready
// line drops now and then to exercise back-pressure.
module feat_dram_model #(
  parameter int RANK      = 0,
  parameter int N_NMC     = 1,
  parameter int SUB_BYTES = 64,
  parameter int NSUB      = 2,
  parameter int LAT       = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       req_valid,
  output logic                       req_ready,
  input  logic [31:0]                req_addr,
  output logic                       rsp_valid,
  output logic [SUB_BYTES*8-1:0]     rsp_data
);
  import tb_ann_pkg::*;
  typedef struct { int unsigned addr; longint due; } req_t;
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
      int unsigned node;
      int sub;
      r    = q.pop_front();
      node = (r.addr / NSUB) * N_NMC + RANK;
      sub  = int'(r.addr % NSUB);
      for (int b = 0; b < SUB_BYTES; b++) rsp_data[8*b +: 8] <= feat_byte(node, sub * SUB_BYTES + b);
      rsp_valid <= 1'b1;
    end
    req_ready <= (($urandom % 8) != 0);
  end
endmodule
