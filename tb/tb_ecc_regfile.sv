// tb_ecc_regfile: checks the 8 x m register file (m = 571).
//
// After reset every register must read zero. Random writes through the Dmux
// are mirrored in a scoreboard array; each cycle both read multiplexers M1
// and M2 are given random addresses and compared with the scoreboard, as are
// the X1 and Z1 outputs. Cycles with the write enable low must leave the
// contents unchanged.
module tb_ecc_regfile;
  import ecc_pkg::*;
  import gf_ref_pkg::*;
  localparam int M = 571;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  reg_addr_e a1 = R_X1, a2 = R_X1, wa = R_X1;
  logic [M-1:0] d1, d2, wd = '0, x1, z1;
  logic [M-1:0] model [8];

  ecc_regfile #(.M(M)) dut (
    .clk, .rst_n, .m1_addr(a1), .m2_addr(a2), .m1_out(d1), .m2_out(d2),
    .we, .wr_addr(wa), .mplex_out(wd), .x1_q(x1), .z1_q(z1)
  );

  always #5 clk = ~clk;

  task automatic compare();
    checks++;
    if (d1 !== model[a1] || d2 !== model[a2] || x1 !== model[R_X1] || z1 !== model[R_Z1]) begin
      failures++;
      $display("read mismatch a1=%0d a2=%0d", a1, a2);
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 8; i++) begin
      a1 = reg_addr_e'(i); a2 = reg_addr_e'(7 - i);
      #1 compare();
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we = ($urandom % 4) != 0;
      wa = reg_addr_e'($urandom % 8);
      wd = M'(rand_fe(M));
      @(posedge clk);
      if (we) model[wa] = wd;
      #1;
      a1 = reg_addr_e'($urandom % 8);
      a2 = reg_addr_e'($urandom % 8);
      #1 compare();
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
