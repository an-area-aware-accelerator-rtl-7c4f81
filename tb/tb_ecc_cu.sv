// tb_ecc_cu: checks the instruction stream of the control unit (m = 163).
//
// The testbench holds its own copy of the 2-stage issue order of the
// rescheduled point addition / doubling (inst1, 2, 11, 3, 4, 5, 8, 6, 9, 7,
// 10, 12, 13, bubble, 14) and checks, for every key bit, the 15 issue slots
// that follow the cycle the bit is inspected in, with X1/Z1 and X2/Z2
// exchanged when the bit is 0. It also checks that ladder steps start every
// 17 cycles, that no instruction reads the register written by the
// instruction issued just before it, the numbers of additions and
// multiplications in a whole operation (m-1 squarings plus
// floor(log2(m-1)) + HW(m-1) - 1 multiplications per inversion) and the
// start-to-done latency.
module tb_ecc_cu;
  import ecc_pkg::*;
  import gf_ref_pkg::*;
  localparam int M = 163;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic [M-1:0] k;
  uop_t uop;

  ecc_cu #(.M(M)) dut (.clk, .rst_n, .start, .k, .uop, .busy, .done);

  always #5 clk = ~clk;

  // Table order for key bit 1: {op, asel, ra, rb, rd}
  uop_t lad [15];
  initial begin
    lad[0]  = '{OP_MUL, A_RF, R_X2, R_Z1, R_Z1};
    lad[1]  = '{OP_MUL, A_RF, R_X1, R_Z2, R_X1};
    lad[2]  = '{OP_MUL, A_RF, R_X2, R_X2, R_X2};
    lad[3]  = '{OP_ADD, A_RF, R_X1, R_Z1, R_T1};
    lad[4]  = '{OP_MUL, A_RF, R_X1, R_Z1, R_X1};
    lad[5]  = '{OP_MUL, A_RF, R_T1, R_T1, R_Z1};
    lad[6]  = '{OP_MUL, A_RF, R_Z2, R_Z2, R_Z2};
    lad[7]  = '{OP_MUL, A_XP, R_X1, R_Z1, R_T1};
    lad[8]  = '{OP_MUL, A_RF, R_Z2, R_Z2, R_T2};
    lad[9]  = '{OP_ADD, A_RF, R_X1, R_T1, R_X1};
    lad[10] = '{OP_MUL, A_B,  R_X1, R_T2, R_T2};
    lad[11] = '{OP_MUL, A_RF, R_X2, R_Z2, R_Z2};
    lad[12] = '{OP_MUL, A_RF, R_X2, R_X2, R_X2};
    lad[13] = '{OP_NOP, A_RF, R_X1, R_X1, R_X1};
    lad[14] = '{OP_ADD, A_RF, R_X2, R_T2, R_X2};
  end

  function automatic reg_addr_e sw(reg_addr_e r, bit s);
    if (!s) return r;
    case (r)
      R_X1: return R_X2;
      R_X2: return R_X1;
      R_Z1: return R_Z2;
      R_Z2: return R_Z1;
      default: return r;
    endcase
  endfunction

  function automatic bit same(uop_t a, uop_t e, bit s);
    if (a.op != e.op) return 0;
    if (e.op == OP_NOP) return 1;
    if (a.asel != e.asel || a.rb != sw(e.rb, s) || a.rd != sw(e.rd, s)) return 0;
    if (e.asel == A_RF && a.ra != sw(e.ra, s)) return 0;
    return 1;
  endfunction

  initial begin
    uop_t prev;
    int cyc, n_add, n_mul, last_inst1, n_steps, inv_ops, n;
    bit s;
    k = M'(rand_fe(M));
    k[M-1] = 1'b1;
    n = M - 1;
    inv_ops = n - 1;                                // m-1 squarings, HW - 1
    while (n > 1) begin inv_ops++; n = n / 2; end   // floor(log2(m-1))
    n = M - 1;
    while (n > 0) begin inv_ops += n % 2; n = n / 2; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1; n_add = 0; n_mul = 0; last_inst1 = -1; n_steps = 0;
    prev = UOP_NOP;
    while (!done && cyc < 10000) begin
      if (uop.op == OP_ADD) n_add++;
      if (uop.op == OP_MUL) n_mul++;
      // read-after-write spacing
      if (uop.op != OP_NOP && prev.op != OP_NOP) begin
        checks++;
        if (uop.rb == prev.rd || (uop.asel == A_RF && uop.ra == prev.rd)) begin
          failures++;
          $display("RAW hazard at cycle %0d", cyc);
        end
      end
      // a ladder step begins after the key bit was inspected
      if (n_steps < M - 1 && cyc == 12 + 17 * n_steps) begin
        s = !k[M - 2 - n_steps];
        for (int j = 0; j < 15; j++) begin
          checks++;
          if (!same(uop, lad[j], s)) begin
            failures++;
            $display("step %0d slot %0d: got %p", n_steps, j, uop);
          end
          if (j == 0) begin
            checks++;
            if (last_inst1 >= 0 && cyc - last_inst1 != 17) begin
              failures++;
              $display("ladder step spacing %0d", cyc - last_inst1);
            end
            last_inst1 = cyc;
          end
          if (j > 0 && uop.op == OP_ADD) n_add++;  // slot 0 counted above
          if (j > 0 && uop.op == OP_MUL) n_mul++;
          prev = uop;
          @(negedge clk);
          cyc++;
          if (j < 14) begin
            if (uop.op != OP_NOP && prev.op != OP_NOP) begin
              checks++;
              if (uop.rb == prev.rd || (uop.asel == A_RF && uop.ra == prev.rd)) begin
                failures++;
                $display("RAW hazard at cycle %0d", cyc);
              end
            end
          end
        end
        n_steps++;
        continue;
      end
      prev = uop;
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (n_steps != M - 1) begin failures++; $display("steps %0d", n_steps); end
    checks++;
    if (cyc != int'(pm_latency(M))) begin
      failures++; $display("latency %0d expected %0d", cyc, pm_latency(M));
    end
    checks++;
    if (n_add != 3 + 3*(M-1) + 4 + 2) begin failures++; $display("adds %0d", n_add); end
    checks++;
    if (n_mul != 3 + 11*(M-1) + 7 + 1 + 2 + 2*inv_ops) begin
      failures++; $display("muls %0d expected %0d", n_mul, 3 + 11*(M-1) + 7 + 1 + 2 + 2*inv_ops);
    end
    @(negedge clk);
    checks++;
    if (busy || done) begin failures++; $display("not idle after done"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
