// Testbench of the distance calculation unit.
//
// Feeds random 128-element query/feature pairs as two 64-lane sub-features
// (back to back, so one feature per two cycles) and compares every distance
// and tag with a behavioural sum of squared differences. Checks that a
// distance leaves exactly two cycles after its last sub-feature, and covers
// the extreme elements 0 and 255.
module tb_dist_calc;
  import pyr_pkg::*;

  localparam int LANES = 64, NSUB = 2, NFEAT = 40;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_last, out_valid;
  logic [7:0] in_tag, out_tag;
  logic [LANES-1:0][7:0] q_sub, f_sub;
  logic [DIST_W-1:0] out_dist;

  dist_calc #(.LANES(LANES), .TAG_W(8)) dut (.*);

  byte unsigned q [NFEAT][LANES*NSUB];
  byte unsigned f [NFEAT][LANES*NSUB];
  int unsigned  expd [NFEAT];
  longint       last_cyc [NFEAT];
  longint       cyc = 0;
  int           got = 0;

  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (out_dist != expd[out_tag] || cyc - last_cyc[out_tag] != 2) begin
      failures++;
      $display("FAIL feature %0d: dist %0d expected %0d, latency %0d", out_tag, out_dist,
               expd[out_tag], cyc - last_cyc[out_tag]);
    end
    got++;
  end

  initial begin
    in_valid = 0; in_last = 0; in_tag = 0; q_sub = '0; f_sub = '0;
    for (int n = 0; n < NFEAT; n++) begin
      expd[n] = 0;
      for (int j = 0; j < LANES*NSUB; j++) begin
        q[n][j] = (n == 0) ? 8'd255 : (n == 1) ? 8'd0 : 8'($urandom);
        f[n][j] = (n == 0) ? 8'd0 : (n == 1) ? 8'd255 : 8'($urandom);
        expd[n] += 32'((int'(q[n][j]) - int'(f[n][j])) ** 2);
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NFEAT; n++) begin
      for (int s = 0; s < NSUB; s++) begin
        @(negedge clk);
        in_valid = 1; in_last = (s == NSUB - 1); in_tag = 8'(n);
        for (int l = 0; l < LANES; l++) begin
          q_sub[l] = q[n][s*LANES + l];
          f_sub[l] = f[n][s*LANES + l];
        end
        if (s == NSUB - 1) last_cyc[n] = cyc + 1;
      end
      if (n % 7 == 3) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk) in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (got != NFEAT) begin failures++; $display("FAIL: %0d distances out of %0d", got, NFEAT); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
