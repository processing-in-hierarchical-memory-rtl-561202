// Behavioural model of one flash channel with its controller (testbench only).
//
// A page request is taken, and after LAT cycles the page streams out one byte
// per beat, PAGE_BYTES beats with `last` on the final one, pausing now and
// then. Logical page c holds cluster c in the layout of tb_ann_pkg::page_byte.
module flash_model #(
  parameter int PAGE_BYTES = 16384,
  parameter int MAX_REC    = 124,
  parameter int LAT        = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic [31:0] req_lba,
  output logic        valid,
  input  logic        ready,
  output logic [7:0]  data,
  output logic        last
);
  import tb_ann_pkg::*;
  int unsigned lba;
  int          off;
  int          wait_c;
  bit          busy;

  initial begin
    req_ready = 1'b1;
    valid     = 1'b0;
    data      = '0;
    last      = 1'b0;
    busy      = 0;
  end

  always @(posedge clk) begin
    if (!busy) begin
      if (rst_n && req_valid && req_ready) begin
        busy      = 1;
        lba       = req_lba;
        off       = 0;
        wait_c    = LAT;
        req_ready <= 1'b0;
      end
    end else begin
      if (valid && ready) begin
        off++;
        if (off == PAGE_BYTES) begin
          busy      = 0;
          req_ready <= 1'b1;
        end
      end
      if (wait_c > 0) wait_c--;
    end
    if (busy && wait_c == 0 && (($urandom % 16) != 0)) begin
      valid <= 1'b1;
      data  <= page_byte(lba, off, MAX_REC);
      last  <= (off == PAGE_BYTES - 1);
    end else begin
      valid <= 1'b0;
      last  <= 1'b0;
    end
  end
endmodule
