// tb_ecc_workloads: the field sizes of the throughput table other than the
// default (n = 8, 16 and 192; n = 72 is covered by tb_ecc_fpga_top), each a
// complete point multiplication on a design built for that size.  Field
// polynomials: x^8 + x^4 + x^3 + x + 1, x^16 + x^6 + x^2 + x + 1,
// x^192 + x^7 + x^2 + x + 1 (all irreducible).  Prints the hardware cycles
// of each point multiplication next to 12 n^2.
module tb_ecc_workloads;
  import ecc_ref_pkg::*;
  logic f8, f16, f192;
  int c8, c16, c192, e8, e16, e192;
  int checks, failures;

  ecc_pm_runner #(.N(8),   .FP(fe_t'(8'h1b)))  r8   (.finished(f8),   .checks(c8),   .failures(e8));
  ecc_pm_runner #(.N(16),  .FP(fe_t'(16'h47))) r16  (.finished(f16),  .checks(c16),  .failures(e16));
  ecc_pm_runner #(.N(192), .FP(fe_t'(8'h87)))  r192 (.finished(f192), .checks(c192), .failures(e192));

  initial begin
    #50ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c16 + c192, e8 + e16 + e192 + 1);
    $finish;
  end

  initial begin
    wait (f8 && f16 && f192);
    checks = c8 + c16 + c192;
    failures = e8 + e16 + e192;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
