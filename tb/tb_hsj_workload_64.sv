// Workload: 64 join cores, 512 tuples per input stream, match rates 10% to
// 100%, once with the matching tuples at random places and once as one
// consecutive burst (the configuration of the input-throughput evaluation).
// Two sweep benches run side by side. See hsj_sweep_bench.
module tb_hsj_workload_64;
  int checks_r, failures_r, checks_b, failures_b;
  bit done_r, done_b;

  hsj_sweep_bench #(.NC(64), .NT(512), .BURST(1'b0)) u_random (
    .checks(checks_r), .failures(failures_r), .done(done_r));
  hsj_sweep_bench #(.NC(64), .NT(512), .BURST(1'b1)) u_burst (
    .checks(checks_b), .failures(failures_b), .done(done_b));

  initial begin
    repeat (4_000_000) @(posedge u_random.clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks_r + checks_b, failures_r + failures_b + 1);
    $finish;
  end

  initial begin
    wait (done_r && done_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks_r + checks_b, failures_r + failures_b);
    $finish;
  end
endmodule
