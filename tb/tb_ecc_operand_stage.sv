// tb_ecc_operand_stage: checks M3 and the pipeline registers (m = 571).
//
// Each cycle random values are put on the M1 and M2 outputs, xp, yp and b,
// with a random M3 select, operation and destination. One clock later OP_1
// must hold the selected A operand, OP_2 the M2 value, and the operation and
// destination must have moved along; during reset the operation must be a
// no-op.
module tb_ecc_operand_stage;
  import ecc_pkg::*;
  import gf_ref_pkg::*;
  localparam int M = 571;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  alu_op_e   op_in = OP_MUL, op_ex;
  asel_e     asel = A_RF;
  reg_addr_e rd_in = R_T4, rd_ex;
  logic [M-1:0] m1 = '0, m2 = '0, xp = '0, yp = '0, b = '0, op_1, op_2;

  ecc_operand_stage #(.M(M)) dut (
    .clk, .rst_n, .op_in, .asel, .rd_in, .m1_out(m1), .m2_out(m2),
    .xp, .yp, .b, .op_1, .op_2, .op_ex, .rd_ex
  );

  always #5 clk = ~clk;

  initial begin
    logic [M-1:0] exp_a, exp_b;
    alu_op_e   exp_op;
    reg_addr_e exp_rd;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (op_ex != OP_NOP) begin failures++; $display("op not cleared by reset"); end
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      m1 = M'(rand_fe(M)); m2 = M'(rand_fe(M));
      xp = M'(rand_fe(M)); yp = M'(rand_fe(M)); b = M'(rand_fe(M));
      asel  = asel_e'($urandom % 4);
      op_in = alu_op_e'($urandom % 3);
      rd_in = reg_addr_e'($urandom % 8);
      case (asel)
        A_RF: exp_a = m1;
        A_XP: exp_a = xp;
        A_YP: exp_a = yp;
        default: exp_a = b;
      endcase
      exp_b = m2; exp_op = op_in; exp_rd = rd_in;
      @(posedge clk);
      #1;
      checks++;
      if (op_1 !== exp_a || op_2 !== exp_b || op_ex != exp_op || rd_ex != exp_rd) begin
        failures++;
        $display("mismatch asel=%0d", asel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
