// gf2m_add: finite-field adder of the ALU.
//
// Addition in GF(2^m) with a polynomial basis has no carries: each
// coefficient of the sum is the exclusive-OR of the two input coefficients,
// so the unit is m two-input XOR gates and is purely combinational (result
// in the same cycle as the operands). Operands A(x) and B(x) come from the
// pipeline registers; the sum A_out(x) goes to the output multiplexer M4.
module gf2m_add #(
  parameter int unsigned M = 571  // field size m
) (
  input  logic [M-1:0] a,      // A(x)
  input  logic [M-1:0] b,      // B(x)
  output logic [M-1:0] a_out   // A(x) + B(x)
);
  always_comb a_out = a ^ b;
endmodule
