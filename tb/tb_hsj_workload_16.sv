// Workload: 16 join cores, 128 tuples per input stream, match rates 10% to
// 100%, random placement of the matching tuples (the configuration of the
// cycle-count and result-count evaluation). See hsj_sweep_bench.
module tb_hsj_workload_16;
  int checks, failures;
  bit done;

  hsj_sweep_bench #(.NC(16), .NT(128), .BURST(1'b0)) u_bench (.checks, .failures, .done);

  initial begin
    repeat (2_000_000) @(posedge u_bench.clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
