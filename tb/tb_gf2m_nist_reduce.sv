// tb_gf2m_nist_reduce: checks NIST reduction for all five field sizes
// against polynomial long division by the field polynomial. Inputs are
// random 2m-1 bit polynomials, all ones (the case that needs the second
// fold most) and single high bits.
module tb_gf2m_nist_reduce;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [2*MAXM-2:0] c;
  logic [162:0] r163;
  logic [232:0] r233;
  logic [282:0] r283;
  logic [408:0] r409;
  logic [570:0] r571;

  gf2m_nist_reduce #(.M(163)) u163 (.c(c[324:0]),  .r(r163));
  gf2m_nist_reduce #(.M(233)) u233 (.c(c[464:0]),  .r(r233));
  gf2m_nist_reduce #(.M(283)) u283 (.c(c[564:0]),  .r(r283));
  gf2m_nist_reduce #(.M(409)) u409 (.c(c[816:0]),  .r(r409));
  gf2m_nist_reduce #(.M(571)) u571 (.c(c[1140:0]), .r(r571));

  function automatic fe_t got(int m);
    case (m)
      163: return fe_t'(r163);
      233: return fe_t'(r233);
      283: return fe_t'(r283);
      409: return fe_t'(r409);
      default: return fe_t'(r571);
    endcase
  endfunction

  task automatic check(int m, logic [2*MAXM-2:0] v);
    logic [2*MAXM-2:0] masked = '0;
    fe_t exp;
    for (int i = 0; i <= 2*m - 2; i++) masked[i] = v[i];
    c = masked;
    #1;
    exp = poly_mod(masked, m);
    checks++;
    if (got(m) !== exp) begin
      failures++;
      $display("m=%0d c=%h got %h exp %h", m, masked, got(m), exp);
    end
  endtask

  initial begin
    int ms[5] = '{163, 233, 283, 409, 571};
    logic [2*MAXM-2:0] v;
    foreach (ms[i]) begin
      check(ms[i], '1);
      v = '0; v[2*ms[i]-2] = 1'b1; check(ms[i], v);
      v = '0; v[ms[i]] = 1'b1;     check(ms[i], v);
      for (int n = 0; n < 50; n++) begin
        for (int j = 0; j < 2*MAXM-1; j += 32) v[j +: 32] = $urandom;
        check(ms[i], v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
