// ecc_pkg: types and constants shared by the GF(2^m) point-multiplication
// accelerator.
//
// The field size m selects one of the five NIST binary fields (163, 233, 283,
// 409, 571). nist_term() returns the exponents of the middle and constant
// terms of the NIST reduction polynomial f(x) = x^m + r(x); these polynomials
// are the standard NIST ones. The register-file addresses follow the order
// of the eight registers (X1 X2 Z1 Z2 T1 T2 T3 T4). The micro-operation
// struct is what the control unit issues to the read stage each cycle: an
// operation (nop, add or multiply), the source of the A operand (the register
// file through M1, or one of the constants xp, yp, b) and three register
// addresses for M1, M2 and the write-back demultiplexer.
package ecc_pkg;

  // Number of registers in the register file (8 x m array).
  localparam int unsigned NREGS = 8;
  localparam int unsigned RA_W  = 3;

  // Register addresses, in the order the register file lists them.
  typedef enum logic [RA_W-1:0] {
    R_X1 = 3'd0,
    R_X2 = 3'd1,
    R_Z1 = 3'd2,
    R_Z2 = 3'd3,
    R_T1 = 3'd4,
    R_T2 = 3'd5,
    R_T3 = 3'd6,
    R_T4 = 3'd7
  } reg_addr_e;

  // ALU operation carried by an instruction.
  typedef enum logic [1:0] {
    OP_NOP = 2'd0,
    OP_ADD = 2'd1,
    OP_MUL = 2'd2
  } alu_op_e;

  // Select of the routing multiplexer M3 (A operand of the ALU).
  typedef enum logic [1:0] {
    A_RF = 2'd0,  // register file through M1
    A_XP = 2'd1,  // base point x coordinate
    A_YP = 2'd2,  // base point y coordinate
    A_B  = 2'd3   // curve constant b
  } asel_e;

  // One instruction as issued to the read stage.
  typedef struct packed {
    alu_op_e   op;
    asel_e     asel;
    reg_addr_e ra;   // M1 address (A operand when asel == A_RF)
    reg_addr_e rb;   // M2 address (B operand)
    reg_addr_e rd;   // Dmux address (destination)
  } uop_t;

  localparam uop_t UOP_NOP = '{op: OP_NOP, asel: A_RF, ra: R_X1, rb: R_X1, rd: R_X1};

  // Exponent of term idx (0..3) of r(x), where f(x) = x^m + r(x) is the NIST
  // reduction polynomial; -1 where the polynomial has fewer terms.
  function automatic int nist_term(int m, logic [1:0] idx);
    int t[4];
    case (m)
      163:     t = '{7, 6, 3, 0};
      233:     t = '{74, 0, -1, -1};
      283:     t = '{12, 7, 5, 0};
      409:     t = '{87, 0, -1, -1};
      571:     t = '{10, 5, 2, 0};
      default: t = '{-1, -1, -1, -1};
    endcase
    return t[idx];
  endfunction

  // Cycles of one Itoh-Tsujii inversion in the control unit: m-1 squarings
  // and floor(log2(m-1)) + HW(m-1) - 1 multiplications, two cycles each.
  function automatic int unsigned inv_ops(int unsigned m);
    int unsigned n = m - 1;
    return n + ($clog2(n + 1) - 1) + $countones(n) - 1;
  endfunction

  // Cycles from the cycle in which start is high to the cycle in which done
  // is high: 10 (conversion) + 17 per key bit + 12 + 1 + 8 (reconversion
  // outside the inversions) + 1 + two inversions.
  function automatic int unsigned pm_latency(int unsigned m);
    return 1 + 10 + 17*(m - 1) + 12 + 1 + 8 + 4*inv_ops(m);
  endfunction

  // True when m is one of the supported NIST field sizes.
  function automatic bit nist_m_ok(int m);
    return (m == 163) || (m == 233) || (m == 283) || (m == 409) || (m == 571);
  endfunction

  // Swap of the ladder register pairs (X1,Z1) <-> (X2,Z2): used when the
  // inspected key bit is 0. T1..T4 are left alone.
  function automatic reg_addr_e ladder_swap(reg_addr_e r, bit swap);
    if (swap && (r[2] == 1'b0)) return reg_addr_e'({r[2:1], ~r[0]});
    return r;
  endfunction

endpackage
