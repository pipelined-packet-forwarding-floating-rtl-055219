// tb_pf_rounder_sizes: runs the rounder at the two other IEEE binary
// precisions the format is meant to serve: double (P = 53, 11-bit exponent,
// 107-digit input) and single (P = 24, 8-bit exponent, 49-digit input). Each
// size is checked by a pf_rounder_harness against exact rounding, with the
// same latency and coverage checks as the double extended testbench.
`timescale 1ns/1ps
module tb_pf_rounder_sizes;

  bit done_d, done_s;
  int checks_d, checks_s, fail_d, fail_s;

  pf_rounder_harness #(.P(53), .EW(11), .NV(20000)) u_double (
    .done(done_d), .checks(checks_d), .failures(fail_d));
  pf_rounder_harness #(.P(24), .EW(8), .NV(20000)) u_single (
    .done(done_s), .checks(checks_s), .failures(fail_s));

  initial begin : watchdog
    #2000000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks_d + checks_s, fail_d + fail_s + 1);
    $finish;
  end

  initial begin
    wait (done_d && done_s);
    $display("TB_RESULT checks=%0d failures=%0d", checks_d + checks_s, fail_d + fail_s);
    $finish;
  end

endmodule
