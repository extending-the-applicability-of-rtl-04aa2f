// tb_ps_scan_workloads: the scan structure at benchmark sizes.
//
// The evaluated circuits are scanned with S internal chains; a circuit with
// F flip-flops then needs chains of L = ceil(F / S) cells. Two such
// configurations run here, each through ps_scan_workload_unit:
//   s13207 (669 flip-flops) with S = 16: N = 16, L = 42
//   s38417 (1636 flip-flops) with S = 30: N = 30, L = 55
// The flip-flop counts are the published sizes of these benchmark circuits.
// Test vectors are random (the benchmark test sets are not available), so
// the clock counts printed are examples, not the published reductions.
module tb_ps_scan_workloads;

  logic clk = 1'b0;
  logic start = 1'b0;
  int   checks_a, failures_a, checks_b, failures_b;
  logic done_a, done_b;
  int   checks, failures;

  always #5 clk = ~clk;

  ps_scan_workload_unit #(.N(16), .L(42), .NAME("s13207 S=16")) u_a (
    .clk, .start, .checks(checks_a), .failures(failures_a), .done(done_a)
  );
  ps_scan_workload_unit #(.N(30), .L(55), .NAME("s38417 S=30")) u_b (
    .clk, .start, .checks(checks_b), .failures(failures_b), .done(done_b)
  );

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b,
             failures_a + failures_b + 1);
    $finish;
  end

  initial begin
    @(negedge clk);
    start = 1'b1;
    wait (done_a && done_b);
    checks   = checks_a + checks_b;
    failures = failures_a + failures_b;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
