// tb_sm_array: self-checking test of the systolic array.
//
// Runs sm_array_checker at N = 4, the 4 x 4 array with rows of 8, 7, 6 and
// 4 processors (25 in all, last product bit after 11 evaluation cycles),
// and at N = 8, the default width (99 processors). Each checker streams
// every operand pair through its array at one pair per cycle and checks
// every product bit in the exact cycle the schedule predicts.
module tb_sm_array;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NCYC = (1 << 16) + 40;

  int   checks4, failures4, checks8, failures8;
  logic done4, done8;
  int   checks = 0, failures = 0;

  sm_array_checker #(.N(4)) u_n4 (.clk(clk), .checks(checks4), .failures(failures4), .done(done4));
  sm_array_checker #(.N(8)) u_n8 (.clk(clk), .checks(checks8), .failures(failures8), .done(done8));

  initial begin : watchdog
    repeat (NCYC + 100) @(posedge clk);
    failures = failures4 + failures8 + 1;
    checks = checks4 + checks8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done4 && done8);
    checks = checks4 + checks8;
    failures = failures4 + failures8;
    $display("N=4: %0d checks, %0d failures; N=8: %0d checks, %0d failures",
             checks4, failures4, checks8, failures8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
