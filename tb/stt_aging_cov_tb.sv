// Workload testbench: the word widths and LUT coverages of the original
// overhead evaluation, each on a 32K-bit array. 16-bit words with 10% and
// 20% coverage need 205 and 410 LUT rows, 32-bit words with 10% need 103,
// 64-bit words with 10% and 20% need 52 and 103. (32-bit words with 20%
// are run by stt_aging_top_tb.) Each configuration is exercised by cov_run.
module stt_aging_cov_tb;
  logic clk = 0;
  always #5 clk = ~clk;

  logic d0, d1, d2, d3, d4;
  int   c0, c1, c2, c3, c4, f0, f1, f2, f3, f4;

  cov_run #(.WORD_W(16), .COV_PCT(10), .EXP_ROWS(205)) r0 (.clk, .done(d0), .checks(c0), .failures(f0));
  cov_run #(.WORD_W(16), .COV_PCT(20), .EXP_ROWS(410)) r1 (.clk, .done(d1), .checks(c1), .failures(f1));
  cov_run #(.WORD_W(32), .COV_PCT(10), .EXP_ROWS(103)) r2 (.clk, .done(d2), .checks(c2), .failures(f2));
  cov_run #(.WORD_W(64), .COV_PCT(10), .EXP_ROWS(52))  r3 (.clk, .done(d3), .checks(c3), .failures(f3));
  cov_run #(.WORD_W(64), .COV_PCT(20), .EXP_ROWS(103)) r4 (.clk, .done(d4), .checks(c4), .failures(f4));

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3 + c4, f0 + f1 + f2 + f3 + f4 + 1);
    $finish;
  end

  initial begin
    wait (d0 && d1 && d2 && d3 && d4);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3 + c4, f0 + f1 + f2 + f3 + f4);
    $finish;
  end
endmodule
