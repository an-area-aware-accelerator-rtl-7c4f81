// tb_ecc_pm_top: end-to-end test of the point-multiplication accelerator at
// m = 163 (the smallest NIST field, to keep the run short).
//
// For each run a random point (xp, yp) is drawn and the curve constant b is
// chosen so that the point lies on y^2 + xy = x^3 + x^2 + b; the result of
// the accelerator is compared with an affine double-and-add reference
// (gf_ref_pkg), and the cycles from start to done with
// ecc_pkg::pm_latency(m). Scalars include all-ones and 1000..0 patterns so
// that both ladder branches (key bit 1 and key bit 0) run many times. The
// testbench also counts pipeline bubbles, inversions (recognised by their
// longest run of squarings) and read-after-write violations between the two
// pipeline stages, and fails if any mechanism never occurred.
module tb_ecc_pm_top;
  import ecc_pkg::*;
  import gf_ref_pkg::*;

  localparam int unsigned M     = 163;
  localparam int unsigned NRUNS = 5;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         start;
  logic [M-1:0] k, xp, yp, b;
  logic         busy, done;
  logic [M-1:0] xq, yq;

  int checks = 0, failures = 0;
  int n_bit1 = 0, n_bit0 = 0, n_bubble = 0, n_raw = 0, n_sqrun = 0;
  int sq_streak = 0;

  ecc_pm_top #(.M(M)) dut (
    .clk, .rst_n, .start, .k, .xp, .yp, .b, .busy, .done, .xq, .yq
  );

  always #5 clk = ~clk;

  // mechanism counters, from the instruction stream
  uop_t      uop_q;
  logic      uop_q_v = 1'b0;
  always @(posedge clk) begin
    if (busy) begin
      // inst1 of the ladder: Z1 = X2*Z1 (bit 1) or Z2 = X1*Z2 (bit 0)
      if (dut.uop.op == OP_MUL && dut.uop.asel == A_RF) begin
        if (dut.uop.ra == R_X2 && dut.uop.rb == R_Z1 && dut.uop.rd == R_Z1) n_bit1++;
        if (dut.uop.ra == R_X1 && dut.uop.rb == R_Z2 && dut.uop.rd == R_Z2) n_bit0++;
      end
      if (dut.uop.op == OP_NOP) n_bubble++;
      // a squaring chained on its own result two cycles later = inversion
      if (dut.uop.op == OP_MUL && dut.uop.asel == A_RF && dut.uop.ra == dut.uop.rb) begin
        sq_streak++;
        if (sq_streak == int'(M / 3)) n_sqrun++;
      end else if (dut.uop.op != OP_NOP) begin
        sq_streak = 0;
      end
      // independent read-after-write check
      if (uop_q_v && uop_q.op != OP_NOP && dut.uop.op != OP_NOP &&
          (dut.uop.rb == uop_q.rd || (dut.uop.asel == A_RF && dut.uop.ra == uop_q.rd)))
        n_raw++;
    end
    uop_q   <= dut.uop;
    uop_q_v <= busy;
  end

  task automatic run_one(input fe_t kk);
    pt_t p, q;
    int  cyc;
    fe_t x = rand_fe(M), y = rand_fe(M);
    if (x == '0) x = fe_t'(3);
    p.x = x; p.y = y; p.inf = 0;
    b  = M'(curve_b(x, y, M));
    k  = M'(kk);
    xp = M'(x);
    yp = M'(y);
    q  = pt_mul(kk, p, M);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (!on_curve(q, fe_t'(b), M) || q.inf) begin
      failures++;
      $display("reference result not on curve");
    end
    checks++;
    if (xq != M'(q.x) || yq != M'(q.y)) begin
      failures++;
      $display("MISMATCH k=%h\n  xq=%h exp %h\n  yq=%h exp %h", k, xq, M'(q.x), yq, M'(q.y));
    end
    checks++;
    if (cyc != int'(pm_latency(M))) begin
      failures++;
      $display("latency %0d, expected %0d", cyc, pm_latency(M));
    end
    @(negedge clk);
  endtask

  initial begin
    fe_t kk;
    rst_n = 1'b0; start = 1'b0; k = '0; xp = '0; yp = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // all ones: every ladder step takes the key-bit-1 branch
    kk = '0; for (int i = 0; i < M; i++) kk[i] = 1'b1;
    run_one(kk);
    // 100..0: every step takes the key-bit-0 branch
    kk = '0; kk[M-1] = 1'b1;
    run_one(kk);
    for (int r = 2; r < NRUNS; r++) begin
      kk = rand_fe(M); kk[M-1] = 1'b1;
      run_one(kk);
    end
    checks++;
    if (n_bit1 == 0 || n_bit0 == 0) begin failures++; $display("a ladder branch never ran"); end
    checks++;
    if (n_bubble == 0) begin failures++; $display("no pipeline bubble"); end
    checks++;
    if (n_sqrun != 2*NRUNS) begin failures++; $display("inversions seen %0d", n_sqrun); end
    checks++;
    if (n_raw != 0) begin failures++; $display("%0d RAW violations", n_raw); end
    $display("ladder bit1=%0d bit0=%0d bubbles=%0d inversions=%0d raw=%0d latency=%0d",
             n_bit1, n_bit0, n_bubble, n_sqrun, n_raw, pm_latency(M));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRUNS * pm_latency(M) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
