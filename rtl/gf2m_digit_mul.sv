// gf2m_digit_mul: carry-less product of one D-bit digit of B(x) with the
// whole m-bit polynomial A(x).
//
// It is one of the digit lanes of the digit-parallel LSD multiplier: the
// result has D+m-1 coefficients and is not reduced. It is built as D shifted
// copies of A(x), each gated by one bit of the digit and folded together with
// XOR. Purely combinational.
module gf2m_digit_mul #(
  parameter int unsigned M = 571,  // width of A(x)
  parameter int unsigned D = 41    // digit size
) (
  input  logic [M-1:0]     a,      // A(x)
  input  logic [D-1:0]     digit,  // one digit of B(x)
  output logic [M+D-2:0]   pp      // partial product, D+m-1 bits
);
  always_comb begin
    pp = '0;
    for (int unsigned j = 0; j < D; j++) begin
      pp = pp ^ ({(M+D-1){digit[j]}} & ((M+D-1)'(a) << j));
    end
  end
endmodule
