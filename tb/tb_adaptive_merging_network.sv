// Test of the adaptive merging network with four cores (N = 4, as in the
// document's figure), 8-tuple buffers.
//
// The bench plays the four join cores: each injects numbered results at a
// chosen rate, and stops while its suspend flip-flop (the OR of the full
// flags, registered, as the admission control does) is set. The output is
// taken under a random ready pattern. Checked: every injected result leaves
// the root exactly once, nothing is dropped in the ring, a burst from a
// single core with a stalled output spreads over several buffers (the
// adaptive part: more than the one path a plain tree would give), tuples
// take the ring links including the wrap-around link, and the full flags
// stop the cores.
module tb_adaptive_merging_network;
  import hsj_pkg::*;

  localparam int N = 4, DEPTH = 8;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]  res_valid = '0;
  result_t       res [N];
  logic          out_valid, out_ready = 1'b0;
  result_t       out_data;
  logic [N-1:0]  full_flags, drops;
  logic          suspend_q = 1'b0;

  always #5 clk = ~clk;

  adaptive_merging_network #(.N(N), .DEPTH(DEPTH), .FULL_MARGIN(3)) dut (
    .clk, .rst_n, .res_valid, .res, .out_valid, .out_data, .out_ready,
    .full_flags, .drops
  );

  always_ff @(posedge clk) suspend_q <= |full_flags;

  int checks = 0, failures = 0;
  int     pending [bit [95:0]];
  longint n_in = 0, n_out = 0, n_dropped = 0, n_wrap = 0, n_defl = 0, n_susp = 0;
  int     inj_pct [N];
  int     rdy_pct = 100;
  int unsigned seq = 0;
  int     peak [N];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial for (int k = 0; k < N; k++) begin
    res[k] = '0;
    inj_pct[k] = 0;
    peak[k] = 0;
  end

  always @(negedge clk) if (rst_n) begin
    // state after the edge just passed
    if (|drops) n_dropped++;
    if (suspend_q) n_susp++;
    if (dut.e_v[N-1] || dut.w_v[0]) n_wrap++;
    for (int k = 0; k < N; k++) begin
      if (dut.e_v[k] || dut.w_v[k]) n_defl++;
      if (int'(dut.cnt[k]) > peak[k]) peak[k] = dut.cnt[k];
    end
    // stimulus for the coming edge
    out_ready = ($urandom % 100) < rdy_pct;
    for (int k = 0; k < N; k++) begin
      res_valid[k] = !suspend_q && (($urandom % 100) < inj_pct[k]);
      res[k] = '{key: 32'(k), r_payload: 32'(seq), s_payload: $urandom};
      seq++;
      if (res_valid[k]) begin
        pending[res[k]] = 1;
        n_in++;
      end
    end
    #1;
    // transfer at the coming edge
    if (out_valid && out_ready) begin
      bit [95:0] key;
      key = out_data;
      n_out++;
      checks++;
      if (pending.exists(key)) pending.delete(key);
      else begin
        failures++;
        $display("FAIL: unknown or repeated result %h", out_data);
      end
    end
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drain();
    for (int k = 0; k < N; k++) inj_pct[k] = 0;
    rdy_pct = 100;
    repeat (200) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // burst from core 1 only, output stalled
    inj_pct[1] = 100;
    rdy_pct = 0;
    repeat (40) @(negedge clk);
    begin
      int used = 0;
      for (int k = 0; k < N; k++) if (peak[k] > 0) used++;
      check(used >= 3, $sformatf("burst from one core spread over %0d buffers", used));
    end
    check(n_susp > 0, "full flags stopped the core");
    drain();
    check(pending.size() == 0, "burst drained");
    // random load, slow output
    for (int ph = 0; ph < 6; ph++) begin
      for (int k = 0; k < N; k++) inj_pct[k] = $urandom % 80;
      rdy_pct = 20 + $urandom % 80;
      repeat (2000) @(negedge clk);
    end
    drain();
    check(pending.size() == 0, $sformatf("%0d results never delivered", pending.size()));
    check(n_in == n_out, $sformatf("in %0d out %0d", n_in, n_out));
    check(n_dropped == 0, "nothing dropped in the ring");
    check(n_wrap > 0, "wrap-around link used");
    check(n_defl > 0, "ring links used");
    $display("in=%0d wrap=%0d deflect=%0d suspend=%0d", n_in, n_wrap, n_defl, n_susp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
