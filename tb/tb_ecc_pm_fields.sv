// tb_ecc_pm_fields: point multiplication on all five NIST binary field sizes
// the accelerator supports (m = 163, 233, 283, 409, 571), two random runs
// each, every size in its own ecc_pm_top instance running in parallel. It
// prints the cycle count of each size next to the count the original
// design reports for it (3798, 5402, 6568, 9454, 12329).
module tb_ecc_pm_fields;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic fin [5];
  int   c [5], f [5], cyc [5];
  int   checks = 0, failures = 0;
  localparam int MS  [5] = '{163, 233, 283, 409, 571};
  localparam int REF [5] = '{3798, 5402, 6568, 9454, 12329};

  pm_field_runner #(.M(163)) r163 (.clk, .rst_n, .finished(fin[0]), .checks(c[0]), .failures(f[0]), .cycles(cyc[0]));
  pm_field_runner #(.M(233)) r233 (.clk, .rst_n, .finished(fin[1]), .checks(c[1]), .failures(f[1]), .cycles(cyc[1]));
  pm_field_runner #(.M(283)) r283 (.clk, .rst_n, .finished(fin[2]), .checks(c[2]), .failures(f[2]), .cycles(cyc[2]));
  pm_field_runner #(.M(409)) r409 (.clk, .rst_n, .finished(fin[3]), .checks(c[3]), .failures(f[3]), .cycles(cyc[3]));
  pm_field_runner #(.M(571)) r571 (.clk, .rst_n, .finished(fin[4]), .checks(c[4]), .failures(f[4]), .cycles(cyc[4]));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4]);
    for (int i = 0; i < 5; i++) begin
      checks += c[i];
      failures += f[i];
      $display("m=%0d: %0d cycles (original design: %0d)", MS[i], cyc[i], REF[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * 12100 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
