// ecc_regfile: the 8 x m register file of the accelerator.
//
// Eight m-bit registers X1, X2, Z1, Z2, T1, T2, T3 and T4 (addresses 0..7 in
// that order) hold the projective coordinates and temporaries of the
// Montgomery ladder. Two 8:1 read multiplexers, M1 and M2, drive the A and B
// operand paths combinationally; one 1:8 write demultiplexer (Dmux) stores the
// write-back value Mplex_out into the addressed register at the rising clock
// edge when we is high. There is no write-to-read bypass: a value written at
// the end of cycle t can be read in cycle t+1. All registers clear on the
// asynchronous active-low reset (this implementation's choice). The contents
// of X1 and Z1, where the control unit leaves the affine result, are also
// brought out, so that the result can be read without extra cycles (also this
// implementation's choice).
module ecc_regfile
  import ecc_pkg::*;
#(
  parameter int unsigned M = 571  // field size m
) (
  input  logic         clk,
  input  logic         rst_n,
  input  reg_addr_e    m1_addr,    // M1 select
  input  reg_addr_e    m2_addr,    // M2 select
  output logic [M-1:0] m1_out,     // M1 output (to M3)
  output logic [M-1:0] m2_out,     // M2 output, B(x)
  input  logic         we,         // write enable of the Dmux
  input  reg_addr_e    wr_addr,    // Dmux select
  input  logic [M-1:0] mplex_out,  // write-back data from M4
  output logic [M-1:0] x1_q,       // contents of X1
  output logic [M-1:0] z1_q        // contents of Z1
);
  logic [M-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wr_addr] <= mplex_out;
    end
  end

  always_comb begin
    m1_out = regs[m1_addr];
    m2_out = regs[m2_addr];
    x1_q   = regs[R_X1];
    z1_q   = regs[R_Z1];
  end
endmodule
