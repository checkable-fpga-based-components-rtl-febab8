// Workload testbench: the 4-bit and 6-bit multipliers of the evaluation, each
// built at its own size, run with the original version and eight random
// versions over every factor pair, with the threshold sweeps S = 2 .. 9
// (n = 4, step 1) and S = 2 .. 30 (n = 6, step 4).  The 8-bit size is the
// design default and is run by tb_checkable_multiplier.
module tb_workloads;
  logic clk = 1'b0;
  logic start;
  logic done4, done6;
  int   checks4, failures4, checks6, failures6;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  workload_runner #(.N(4), .S0(2), .DELTA(1)) u_n4 (
    .clk(clk), .start(start), .done(done4), .checks(checks4), .failures(failures4)
  );
  workload_runner #(.N(6), .S0(2), .DELTA(4)) u_n6 (
    .clk(clk), .start(start), .done(done6), .checks(checks6), .failures(failures6)
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + checks4 + checks6,
             failures + failures4 + failures6);
    $finish;
  end

  initial begin
    start = 1'b0;
    repeat (2) @(negedge clk);
    start = 1'b1;
    wait (done4 && done6);
    checks = checks4 + checks6;
    failures = failures4 + failures6;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
