// ecc_pm_top: area-aware 2-stage pipelined accelerator for elliptic-curve
// point multiplication Q = k.P over GF(2^m) (NIST binary fields,
// polynomial basis, Lopez-Dahab projective coordinates, Montgomery ladder).
//
// Datapath: the register file (8 x m, read multiplexers M1 and M2, write
// demultiplexer Dmux) feeds the routing multiplexer M3 (register, xp, yp or
// b) and the two pipeline registers OP_1 / OP_2; the ALU (XOR adder, 41-bit
// digit-parallel LSD multiplier with NIST reduction, output multiplexer M4)
// writes its result back into the register file in the next cycle. The
// control unit issues one instruction a cycle into this two-stage pipeline.
//
// Interface: pulse start for one cycle while idle, with k (k[m-1] = 1), the
// affine base point (xp, yp) and the curve constant b on the inputs; hold them
// until done. done pulses for one cycle ecc_pkg::pm_latency(m) cycles after start
// (12053 for m = 571); xq and yq then hold the affine result until the next
// start. The curve coefficient a does not enter the computation. Results are
// meaningless if xp = 0 or if k.P or (k+1).P is the point at infinity.
module ecc_pm_top
  import ecc_pkg::*;
#(
  parameter int unsigned M = 571,  // field size m
  parameter int unsigned D = 41    // multiplier digit size
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] k,      // scalar multiplier
  input  logic [M-1:0] xp,     // BASEPOINT_xp
  input  logic [M-1:0] yp,     // BASEPOINT_yp
  input  logic [M-1:0] b,      // CONSTANT_b
  output logic         busy,
  output logic         done,
  output logic [M-1:0] xq,     // result x, valid from done
  output logic [M-1:0] yq      // result y, valid from done
);
  uop_t         uop;
  logic [M-1:0] m1_out, m2_out, op_1, op_2, mplex_out;
  alu_op_e      op_ex;
  reg_addr_e    rd_ex;
  logic         we;

  ecc_cu #(.M(M)) u_cu (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start),
    .k     (k),
    .uop   (uop),
    .busy  (busy),
    .done  (done)
  );

  ecc_regfile #(.M(M)) u_rf (
    .clk       (clk),
    .rst_n     (rst_n),
    .m1_addr   (uop.ra),
    .m2_addr   (uop.rb),
    .m1_out    (m1_out),
    .m2_out    (m2_out),
    .we        (we),
    .wr_addr   (rd_ex),
    .mplex_out (mplex_out),
    .x1_q      (xq),
    .z1_q      (yq)
  );

  ecc_operand_stage #(.M(M)) u_ops (
    .clk    (clk),
    .rst_n  (rst_n),
    .op_in  (uop.op),
    .asel   (uop.asel),
    .rd_in  (uop.rd),
    .m1_out (m1_out),
    .m2_out (m2_out),
    .xp     (xp),
    .yp     (yp),
    .b      (b),
    .op_1   (op_1),
    .op_2   (op_2),
    .op_ex  (op_ex),
    .rd_ex  (rd_ex)
  );

  ecc_alu #(.M(M), .D(D)) u_alu (
    .op_1      (op_1),
    .op_2      (op_2),
    .op        (op_ex),
    .mplex_out (mplex_out),
    .we        (we)
  );

  // Read-after-write rule of the pipeline: an instruction in the read stage
  // must not read the register that the instruction in the execute stage is
  // about to write (there is no bypass).
  always_ff @(posedge clk) begin
    // (op_ex is a no-op while reset is applied)
    if (uop.op != OP_NOP && op_ex != OP_NOP) begin
      a_no_raw_hazard: assert (uop.rb != rd_ex && (uop.asel != A_RF || uop.ra != rd_ex))
        else $error("ecc_pm_top: read-after-write hazard on register %0d", rd_ex);
    end
  end
endmodule
