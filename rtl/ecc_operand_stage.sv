// ecc_operand_stage: routing multiplexer M3 and the pipeline registers in
// front of the ALU (first stage of the 2-stage pipeline).
//
// M3 (4:1) picks the A operand from the register file (M1 output), the base
// point coordinates xp or yp, or the curve constant b. The B operand is the
// register-file output of M2. In the read stage both operands, together with
// the operation and destination address of the instruction, are captured in
// the pipeline registers OP_1 / OP_2 at the rising clock edge; the ALU uses
// them in the next cycle (execute / write-back stage). Placing the pipeline
// registers at the ALU inputs follows the design description; carrying the
// operation and destination along with the operands, and clearing the
// operation to a no-op on reset, is this implementation's choice.
module ecc_operand_stage
  import ecc_pkg::*;
#(
  parameter int unsigned M = 571  // field size m
) (
  input  logic         clk,
  input  logic         rst_n,
  // read-stage instruction fields
  input  alu_op_e      op_in,
  input  asel_e        asel,       // M3 select
  input  reg_addr_e    rd_in,
  // operand sources
  input  logic [M-1:0] m1_out,
  input  logic [M-1:0] m2_out,
  input  logic [M-1:0] xp,
  input  logic [M-1:0] yp,
  input  logic [M-1:0] b,
  // to the execute / write-back stage
  output logic [M-1:0] op_1,       // A(x) pipeline register
  output logic [M-1:0] op_2,       // B(x) pipeline register
  output alu_op_e      op_ex,
  output reg_addr_e    rd_ex
);
  logic [M-1:0] a_mux;

  // M3
  always_comb begin
    unique case (asel)
      A_RF: a_mux = m1_out;
      A_XP: a_mux = xp;
      A_YP: a_mux = yp;
      A_B:  a_mux = b;
    endcase
  end

  // The operand registers need no reset: they are only used together with a
  // valid operation, which is reset.
  always_ff @(posedge clk) begin
    op_1 <= a_mux;
    op_2 <= m2_out;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_ex <= OP_NOP;
      rd_ex <= R_X1;
    end else begin
      op_ex <= op_in;
      rd_ex <= rd_in;
    end
  end
endmodule
