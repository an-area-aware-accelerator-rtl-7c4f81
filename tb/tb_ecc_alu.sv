// tb_ecc_alu: checks the arithmetic unit at every NIST field size.
//
// Random operands, plus the worst case of all-ones operands, are applied to
// one ALU instance per field size; additions are compared with XOR and
// multiplications and squarings with the bit-serial reference multiplier of
// gf_ref_pkg. The write enable must follow the operation.
module tb_ecc_alu;
  import ecc_pkg::*;
  import gf_ref_pkg::*;

  localparam int NVEC = 40;

  int checks = 0, failures = 0;

  fe_t     a, bb;
  alu_op_e op;

  logic [162:0] o163; logic w163;
  logic [232:0] o233; logic w233;
  logic [282:0] o283; logic w283;
  logic [408:0] o409; logic w409;
  logic [570:0] o571; logic w571;

  ecc_alu #(.M(163)) u163 (.op_1(a[162:0]), .op_2(bb[162:0]), .op(op), .mplex_out(o163), .we(w163));
  ecc_alu #(.M(233)) u233 (.op_1(a[232:0]), .op_2(bb[232:0]), .op(op), .mplex_out(o233), .we(w233));
  ecc_alu #(.M(283)) u283 (.op_1(a[282:0]), .op_2(bb[282:0]), .op(op), .mplex_out(o283), .we(w283));
  ecc_alu #(.M(409)) u409 (.op_1(a[408:0]), .op_2(bb[408:0]), .op(op), .mplex_out(o409), .we(w409));
  ecc_alu #(.M(571)) u571 (.op_1(a[570:0]), .op_2(bb[570:0]), .op(op), .mplex_out(o571), .we(w571));

  function automatic fe_t got(int m);
    case (m)
      163: return fe_t'(o163);
      233: return fe_t'(o233);
      283: return fe_t'(o283);
      409: return fe_t'(o409);
      default: return fe_t'(o571);
    endcase
  endfunction

  function automatic logic got_we(int m);
    case (m)
      163: return w163;
      233: return w233;
      283: return w283;
      409: return w409;
      default: return w571;
    endcase
  endfunction

  task automatic check(int m, alu_op_e o, fe_t x, fe_t y);
    fe_t mask = '0, exp;
    for (int i = 0; i < m; i++) mask[i] = 1'b1;
    a = x & mask; bb = y & mask; op = o;
    #1;
    exp = (o == OP_MUL) ? gf_mul(a, bb, m) : (a ^ bb);
    checks++;
    if (o != OP_NOP && got(m) != exp) begin
      failures++;
      $display("m=%0d op=%s a=%h b=%h got %h exp %h", m, o.name(), a, bb, got(m), exp);
    end
    checks++;
    if (got_we(m) != (o != OP_NOP)) begin
      failures++;
      $display("m=%0d op=%s we wrong", m, o.name());
    end
  endtask

  initial begin
    int ms[5] = '{163, 233, 283, 409, 571};
    fe_t x;
    foreach (ms[i]) begin
      check(ms[i], OP_MUL, '1, '1);
      check(ms[i], OP_NOP, '1, '1);
      for (int v = 0; v < NVEC; v++) begin
        check(ms[i], OP_MUL, rand_fe(ms[i]), rand_fe(ms[i]));
        check(ms[i], OP_ADD, rand_fe(ms[i]), rand_fe(ms[i]));
        x = rand_fe(ms[i]);
        check(ms[i], OP_MUL, x, x);
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
