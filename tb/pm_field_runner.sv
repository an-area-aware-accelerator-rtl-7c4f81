// pm_field_runner: drives one ecc_pm_top instance of field size M through
// NRUNS random point multiplications and scores them.
//
// Each run draws a random point and a matching curve constant b, a random
// scalar with its top bit set, and compares (xq, yq) with the affine
// double-and-add reference of gf_ref_pkg and the start-to-done cycle count
// with ecc_pkg::pm_latency(M). finished rises when all runs are over;
// checks and failures hold the score.
module pm_field_runner
  import ecc_pkg::*;
  import gf_ref_pkg::*;
#(
  parameter int unsigned M     = 163,
  parameter int unsigned NRUNS = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   cycles      // latency measured in the last run
);
  logic         start = 1'b0;
  logic [M-1:0] k = '0, xp = '0, yp = '0, b = '0;
  logic         busy, done;
  logic [M-1:0] xq, yq;

  ecc_pm_top #(.M(M)) dut (
    .clk, .rst_n, .start, .k, .xp, .yp, .b, .busy, .done, .xq, .yq
  );

  initial begin
    pt_t p, q;
    fe_t x, y, kk;
    finished = 1'b0; checks = 0; failures = 0; cycles = 0;
    @(posedge rst_n);
    for (int r = 0; r < NRUNS; r++) begin
      x = rand_fe(M); y = rand_fe(M);
      if (x == '0) x = fe_t'(3);
      kk = rand_fe(M); kk[M-1] = 1'b1;
      p.x = x; p.y = y; p.inf = 0;
      q = pt_mul(kk, p, M);
      @(negedge clk);
      k = M'(kk); xp = M'(x); yp = M'(y); b = M'(curve_b(x, y, M));
      start = 1'b1;
      @(negedge clk) start = 1'b0;
      cycles = 1;
      while (!done) begin
        @(negedge clk);
        cycles++;
      end
      checks++;
      if (q.inf || xq != M'(q.x) || yq != M'(q.y)) begin
        failures++;
        $display("m=%0d run %0d: wrong result", M, r);
      end
      checks++;
      if (cycles != int'(pm_latency(M))) begin
        failures++;
        $display("m=%0d latency %0d expected %0d", M, cycles, pm_latency(M));
      end
    end
    finished = 1'b1;
  end
endmodule
