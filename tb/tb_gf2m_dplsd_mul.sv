// tb_gf2m_dplsd_mul: checks the digit-parallel LSD multiplier at m = 571,
// d = 41 (13 full digits and a 38-bit last digit) and at m = 163 (four
// digits, the last one 1 bit wide) against a bit-serial carry-less product.
// Operands include single bits at every digit boundary, all ones and random
// values.
module tb_gf2m_dplsd_mul;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [570:0]  a5, b5;
  logic [1140:0] p5;
  logic [162:0]  a1, b1;
  logic [324:0]  p1;

  gf2m_dplsd_mul #(.M(571), .D(41)) dut571 (.a(a5), .b(b5), .prod(p5));
  gf2m_dplsd_mul #(.M(163), .D(41)) dut163 (.a(a1), .b(b1), .prod(p1));

  task automatic check(fe_t x, fe_t y);
    logic [2*MAXM-2:0] e5, e1;
    a5 = x[570:0]; b5 = y[570:0];
    a1 = x[162:0]; b1 = y[162:0];
    #1;
    e5 = clmul(fe_t'(a5), fe_t'(b5), 571);
    e1 = clmul(fe_t'(a1), fe_t'(b1), 163);
    checks++;
    if (p5 !== e5[1140:0]) begin
      failures++;
      $display("m=571 a=%h b=%h", a5, b5);
    end
    checks++;
    if (p1 !== e1[324:0]) begin
      failures++;
      $display("m=163 a=%h b=%h", a1, b1);
    end
  endtask

  initial begin
    fe_t one = fe_t'(1);
    check('1, '1);
    for (int i = 0; i < 571; i += 41) begin
      check(rand_fe(571), one << i);
      if (i > 0) check(rand_fe(571), one << (i - 1));
    end
    check(rand_fe(571), one << 570);
    check(rand_fe(571), one << 162);
    for (int i = 0; i < 100; i++) check(rand_fe(571), rand_fe(571));
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
