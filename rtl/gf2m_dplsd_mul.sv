// gf2m_dplsd_mul: digit-parallel least-significant-digit (DP-LSD) polynomial
// multiplier over GF(2)[x].
//
// B(x) is cut into ND = ceil(m/D) digits B1..BND of D bits, least significant
// first; for m = 571 and D = 41 that is 13 digits of 41 bits and a last one of
// 38 bits. Every digit is multiplied with the whole of A(x) at the same time in
// its own lane (gf2m_digit_mul), giving D+m-1 bit partial products, which are
// shifted by the digit position and XOR-ed into the 2m-1 bit product. The
// product is not reduced: gf2m_nist_reduce follows. The multiplier is purely
// combinational, so one field multiplication (or squaring, with both inputs
// equal) takes one clock cycle in the accelerator. The digit size and the
// digit-parallel structure follow the design description; the bit-level
// construction of a lane is this implementation's own.
module gf2m_dplsd_mul #(
  parameter int unsigned M = 571,  // field size m
  parameter int unsigned D = 41    // digit size d
) (
  input  logic [M-1:0]   a,     // A(x)
  input  logic [M-1:0]   b,     // B(x), split into digits
  output logic [2*M-2:0] prod   // A(x) * B(x), degree <= 2m-2
);
  localparam int unsigned ND = (M + D - 1) / D;  // number of digits
  localparam int unsigned PW = M + D - 1;         // partial product width

  logic [ND*D-1:0] b_ext;
  logic [PW-1:0]   pp [ND];

  always_comb b_ext = (ND*D)'(b);

  for (genvar i = 0; i < ND; i++) begin : g_lane
    gf2m_digit_mul #(.M(M), .D(D)) u_lane (
      .a     (a),
      .digit (b_ext[i*D +: D]),
      .pp    (pp[i])
    );
  end

  // Accumulate the shifted lane results. The accumulator is wide enough for
  // the padded last digit; its bits above 2m-2 are always zero.
  localparam int unsigned AW = ND*D + M - 1;
  logic [AW-1:0] acc;

  always_comb begin
    acc = '0;
    for (int unsigned i = 0; i < ND; i++) begin
      acc = acc ^ (AW'(pp[i]) << (i*D));
    end
    prod = acc[2*M-2:0];
  end
endmodule
