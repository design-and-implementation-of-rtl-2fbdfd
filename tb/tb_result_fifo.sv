// Test of the result FIFO (DEPTH = 8, FULL_MARGIN = 3).
//
// Random writes (never into a full buffer, as the ring node guarantees) and
// random reads against a queue model. Checked every cycle: head data and
// valid, occupancy count, empty flag, and the full flag, which must be set
// exactly when no more than FULL_MARGIN entries are free. Also checks that a
// tuple can be written and read in the same cycle and that the buffer can be
// filled completely.
module tb_result_fifo;
  import hsj_pkg::*;

  localparam int DEPTH = 8, MARGIN = 3;

  logic    clk = 1'b0, rst_n = 1'b0;
  logic    wr_valid = 1'b0, rd_ready = 1'b0;
  result_t wr_data = '0, rd_data;
  logic    rd_valid, empty, full;
  logic [3:0] count;

  always #5 clk = ~clk;

  result_fifo #(.DEPTH(DEPTH), .FULL_MARGIN(MARGIN)) dut (
    .clk, .rst_n, .wr_valid, .wr_data, .rd_valid, .rd_data, .rd_ready,
    .count_o(count), .empty_o(empty), .full_o(full)
  );

  int checks = 0, failures = 0;
  result_t q [$];
  int n_full_seen = 0, n_max = 0, n_both = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      int bias;
      bias = ((n / 500) % 2) ? 80 : 30;   // phases that fill and drain
      @(negedge clk);
      // compare outputs with the model
      check(count == 4'(q.size()), $sformatf("count %0d, model %0d", count, q.size()));
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() >= DEPTH - MARGIN), "full flag");
      check(rd_valid == (q.size() > 0), "read valid");
      if (q.size() > 0) check(rd_data == q[0], "head data");
      if (full) n_full_seen++;
      if (q.size() == DEPTH) n_max++;
      // next cycle's stimulus
      wr_valid = (q.size() < DEPTH) && (($urandom % 100) < bias);
      wr_data  = {$urandom, $urandom, $urandom};
      rd_ready = ($urandom % 100) < (bias > 50 ? 25 : 60);
      if (wr_valid && rd_ready && q.size() > 0) n_both++;
      // model update for the coming edge
      if (rd_ready && q.size() > 0) void'(q.pop_front());
      if (wr_valid) q.push_back(wr_data);
    end
    check(n_full_seen > 0, "full flag raised");
    check(n_max > 0, "buffer filled completely");
    check(n_both > 0, "simultaneous read and write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
