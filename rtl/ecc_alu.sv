// ecc_alu: arithmetic unit of the accelerator (execute / write-back stage).
//
// It holds one finite-field adder (bitwise XOR) and one finite-field
// multiplier, the digit-parallel LSD multiplier followed by NIST reduction.
// Both work on the operands A(x) and B(x) held in the pipeline registers and
// are combinational, so every operation finishes in the cycle after it was
// read. Squaring is a multiplication with A(x) = B(x). The 2:1 multiplexer M4
// chooses A_out (addition) or M_out (multiplication) as the write-back value
// Mplex_out; the write enable is high for every operation other than a no-op.
module ecc_alu
  import ecc_pkg::*;
#(
  parameter int unsigned M = 571,  // field size m
  parameter int unsigned D = 41    // multiplier digit size
) (
  input  logic [M-1:0] op_1,       // A(x)
  input  logic [M-1:0] op_2,       // B(x)
  input  alu_op_e      op,         // operation in the execute stage
  output logic [M-1:0] mplex_out,  // M4 output
  output logic         we          // write-back enable
);
  logic [M-1:0]   a_out;  // adder output, A_out
  logic [M-1:0]   m_out;  // multiplier output after reduction, M_out
  logic [2*M-2:0] prod;

  gf2m_add #(.M(M)) u_add (
    .a     (op_1),
    .b     (op_2),
    .a_out (a_out)
  );

  gf2m_dplsd_mul #(.M(M), .D(D)) u_mul (
    .a    (op_1),
    .b    (op_2),
    .prod (prod)
  );

  gf2m_nist_reduce #(.M(M)) u_red (
    .c (prod),
    .r (m_out)
  );

  // M4
  always_comb begin
    mplex_out = (op == OP_MUL) ? m_out : a_out;
    we        = (op != OP_NOP);
  end
endmodule
