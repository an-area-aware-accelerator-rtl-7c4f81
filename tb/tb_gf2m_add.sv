// tb_gf2m_add: checks the GF(2^m) adder (m = 571) against XOR on random
// operands and on the identities a + a = 0 and a + 0 = a.
module tb_gf2m_add;
  import gf_ref_pkg::*;
  localparam int M = 571;
  int checks = 0, failures = 0;
  logic [M-1:0] a, b, s;

  gf2m_add #(.M(M)) dut (.a(a), .b(b), .a_out(s));

  task automatic check(logic [M-1:0] exp);
    #1;
    checks++;
    if (s !== exp) begin
      failures++;
      $display("a=%h b=%h got %h exp %h", a, b, s, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 200; i++) begin
      fe_t x = rand_fe(M), y = rand_fe(M);
      a = M'(x); b = M'(y);
      // reference built bit by bit
      begin
        logic [M-1:0] e;
        for (int j = 0; j < M; j++) e[j] = (x[j] != y[j]);
        check(e);
      end
      b = a;  check('0);
      b = '0; check(a);
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
