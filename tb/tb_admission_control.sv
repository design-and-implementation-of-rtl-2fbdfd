// Test of the admission control flip-flop: suspend must follow "any full
// flag set" one cycle later, be clear after reset, and be set for one cycle
// by any single flag.
module tb_admission_control;

  localparam int N = 16;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] flags = '0;
  logic         suspend;

  always #5 clk = ~clk;

  admission_control #(.N_FLAGS(N)) dut (.clk, .rst_n, .full_flags(flags), .suspend_o(suspend));

  int checks = 0, failures = 0;
  bit expect_s = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flags = '1;
    repeat (3) @(negedge clk);
    check(!suspend, "clear during reset");
    rst_n = 1'b1;
    flags = '0;
    @(negedge clk);
    // each single flag
    for (int i = 0; i < N; i++) begin
      flags = N'(1) << i;
      @(negedge clk);
      check(suspend, $sformatf("flag %0d suspends", i));
      flags = '0;
      @(negedge clk);
      check(!suspend, $sformatf("released after flag %0d", i));
    end
    // random patterns, mostly clear
    for (int n = 0; n < 2000; n++) begin
      flags = (($urandom % 4) == 0) ? N'($urandom) : '0;
      expect_s = |flags;
      @(negedge clk);
      check(suspend == expect_s, "suspend follows the flags one cycle later");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
