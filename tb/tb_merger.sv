// Test of the bufferless two-in one-out merger.
//
// Two sources send numbered tuples under random valid patterns and the sink
// takes them under a random ready pattern. Checked: every tuple leaves
// exactly once and each port's tuples keep their order; the output holds
// still while stalled; one busy input alone passes one tuple per cycle; with
// both inputs busy the merger alternates between them.
module tb_merger;
  import hsj_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0;
  logic    in1_valid = 1'b0, in2_valid = 1'b0, out_ready = 1'b0;
  result_t in1_data = '0, in2_data = '0;
  logic    in1_ready, in2_ready, out_valid;
  result_t out_data;

  always #5 clk = ~clk;

  merger dut (.clk, .rst_n, .in1_valid, .in1_data, .in1_ready, .in2_valid, .in2_data,
              .in2_ready, .out_valid, .out_data, .out_ready);

  int checks = 0, failures = 0;
  int unsigned next1 = 0, next2 = 0;   // next number each port sends
  int unsigned exp1 = 0, exp2 = 0;     // next number expected at the output
  int p1_pct = 50, p2_pct = 50, rdy_pct = 50;
  int last_port = 0, n_alt = 0, n_same = 0, n_out = 0;
  bit track_alt = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic result_t mk(int port, int unsigned n);
    return '{key: 32'(port), r_payload: 32'(n), s_payload: ~32'(n)};
  endfunction

  result_t held;
  bit      was_stalled = 0;

  // New stimulus right after each falling edge; once the combinational
  // ready signals have settled, the transfers of the coming rising edge are
  // recorded.
  always @(negedge clk) if (rst_n) begin
    in1_valid = ($urandom % 100) < p1_pct;
    in2_valid = ($urandom % 100) < p2_pct;
    in1_data  = mk(1, next1);
    in2_data  = mk(2, next2);
    out_ready = ($urandom % 100) < rdy_pct;
    #1;
    if (was_stalled) check(out_valid && out_data == held, "output held while stalled");
    was_stalled = out_valid && !out_ready;
    held = out_data;
    if (out_valid && out_ready) begin
      n_out++;
      if (out_data.key == 1) begin
        check(out_data == mk(1, exp1), $sformatf("port 1 tuple %0d out of order", exp1));
        exp1++;
      end else begin
        check(out_data == mk(2, exp2), $sformatf("port 2 tuple %0d out of order", exp2));
        exp2++;
      end
      if (track_alt) begin
        if (int'(out_data.key) != last_port) n_alt++;
        else n_same++;
      end
      last_port = out_data.key;
    end
    if (in1_valid && in1_ready) next1++;
    if (in2_valid && in2_ready) next2++;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3000) @(negedge clk);
    // one input alone, sink always ready: one tuple per cycle
    p2_pct = 0;
    p1_pct = 100;
    rdy_pct = 100;
    repeat (20) @(negedge clk);
    n0 = n_out;
    repeat (100) @(negedge clk);
    check(n_out - n0 == 100, $sformatf("single stream passed %0d tuples in 100 cycles", n_out - n0));
    // both inputs busy: alternate
    p2_pct = 100;
    repeat (10) @(negedge clk);
    track_alt = 1;
    n0 = n_out;
    repeat (100) @(negedge clk);
    track_alt = 0;
    check(n_out - n0 == 100, "two busy streams: one tuple per cycle");
    check(n_same == 0 && n_alt > 90, $sformatf("alternation %0d/%0d", n_alt, n_same));
    // drain
    p1_pct = 0;
    p2_pct = 0;
    repeat (10) @(negedge clk);
    check(exp1 == next1 && exp2 == next2, "every tuple came out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
