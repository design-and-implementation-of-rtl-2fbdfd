// End-to-end test of the handshake join operator at its default size
// (16 cores x 8-tuple segments = 128-tuple windows per stream, 8-tuple
// buffers).
//
// A source feeds R and S tuples with unique payloads; a reference model
// keeps the two windows as plain arrays, shifts them per accepted tuple
// (R before S when both arrive together) and, for every tuple entering a
// core's segment, lists the pairs it must form with the other stream's
// tuples in that segment. Every result leaving the operator must be one of
// those pairs, and at the end every listed pair must have come out exactly
// once. The key is the join attribute: a "matching" tuple gets key 0, the
// others a unique key, which sets the match rate.
//
// Phases:
//  1. 128 R + 128 S tuples, 100% match, output always ready: the
//     document's 16-core run with 128-tuple inputs; then 128 + 128
//     non-matching tuples move the first ones through the whole window, so
//     every one of the 128 x 128 pairs meets: 16384 results.
//  2. 10% match, output always ready, both streams every round: checks the
//     round length of 5+2*WIN cycles; then one stream at a time: 5+WIN.
//  3. 100% match with a slow output channel (ready 1 cycle in 4): the
//     admission control must suspend the cores without losing a result.
// Counted mechanisms, each of which must occur: input refusal, suspension,
// full flags, ring deflection (E/W outputs), wrap-around link use, merger
// contention and window expiry.
module tb_hsj_top;
  import hsj_pkg::*;

  localparam int N   = 16;
  localparam int WIN = 8;
  localparam int L   = N * WIN;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    r_valid, s_valid, r_ready, s_ready;
  tuple_t  r_tuple, s_tuple;
  logic    out_valid, out_ready;
  result_t out_result;
  logic    suspended, lost_result;

  always #5 clk = ~clk;

  hsj_top dut (
    .clk, .rst_n,
    .r_valid, .r_tuple, .r_ready,
    .s_valid, .s_tuple, .s_ready,
    .out_valid, .out_result, .out_ready,
    .suspended, .lost_result
  );

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- reference model ----------------
  slot_t   m_r [L];     // index 0 = entry at core 0
  slot_t   m_s [L];     // index L-1 = entry at core N-1
  int      expected [bit [95:0]];
  longint  n_expected = 0, n_received = 0;

  function automatic void model_r(tuple_t t);
    for (int x = L - 1; x > 0; x--) m_r[x] = m_r[x-1];
    m_r[0] = '{valid: 1'b1, t: t};
    for (int c = 0; c < N; c++) begin
      slot_t e, o;
      e = m_r[c*WIN];
      if (!e.valid) continue;
      for (int j = 0; j < WIN; j++) begin
        o = m_s[c*WIN + j];
        if (o.valid && o.t.key == e.t.key) begin
          expected[{e.t.key, e.t.payload, o.t.payload}]++;
          n_expected++;
        end
      end
    end
  endfunction

  function automatic void model_s(tuple_t t);
    for (int x = 0; x < L - 1; x++) m_s[x] = m_s[x+1];
    m_s[L-1] = '{valid: 1'b1, t: t};
    for (int c = 0; c < N; c++) begin
      slot_t e, o;
      e = m_s[c*WIN + WIN - 1];
      if (!e.valid) continue;
      for (int j = 0; j < WIN; j++) begin
        o = m_r[c*WIN + j];
        if (o.valid && o.t.key == e.t.key) begin
          expected[{e.t.key, o.t.payload, e.t.payload}]++;
          n_expected++;
        end
      end
    end
  endfunction

  // ---------------- source ----------------
  tuple_t  r_q[$], s_q[$];
  int unsigned r_seq = 0, s_seq = 0, ukey = 1000;
  bit      gate_r = 1, gate_s = 1;
  int      out_ready_period = 1;   // ready every n-th cycle

  function automatic tuple_t mk(int unsigned match_pct, int unsigned seq, bit is_r);
    tuple_t t;
    if (($urandom % 100) < match_pct) t.key = 32'd0;
    else begin
      ukey++;
      t.key = ukey;
    end
    t.payload = {is_r ? 4'hA : 4'h5, 28'(seq)};
    return t;
  endfunction

  initial begin
    r_valid = 1'b0;
    s_valid = 1'b0;
    r_tuple = '0;
    s_tuple = '0;
  end
  assign out_ready = (cycle % out_ready_period) == 0;

  // ---------------- mechanism counters ----------------
  longint n_refused = 0, n_suspend = 0, n_full = 0, n_defl = 0, n_wrap = 0,
          n_contend = 0, n_expire = 0, n_lost = 0;
  logic [N-1:0] defl;
  logic [N-2:0] contend;
  for (genvar k = 0; k < N; k++) begin : g_mon
    assign defl[k] = dut.u_net.g_ring[k].u_node.e_out_valid
                   | dut.u_net.g_ring[k].u_node.w_out_valid;
  end
  for (genvar m = 1; m < N; m++) begin : g_mmon
    assign contend[m-1] = dut.u_net.g_tree[m].u_merger.b1_v
                        & dut.u_net.g_tree[m].u_merger.b2_v;
  end

  longint last_accept = -1, gap = 0;
  bit     acc_now;

  // Transfers are observed at the falling edge, where every handshake
  // signal is stable; a tuple accepted at a rising edge leaves the source
  // queue at the falling edge after it.
  bit pend_r = 0, pend_s = 0;
  always @(negedge clk) if (rst_n) begin
    if (pend_r) void'(r_q.pop_front());
    if (pend_s) void'(s_q.pop_front());
    pend_r = 0;
    pend_s = 0;
    acc_now = 0;
    r_valid = gate_r && r_q.size() > 0;
    s_valid = gate_s && s_q.size() > 0;
    r_tuple = r_valid ? r_q[0] : '0;
    s_tuple = s_valid ? s_q[0] : '0;
    if ((r_valid && !r_ready) || (s_valid && !s_ready)) n_refused++;
    if (suspended) n_suspend++;
    if (|dut.full_flags) n_full++;
    if (|defl) n_defl++;
    if (dut.u_net.g_ring[N-1].u_node.e_out_valid || dut.u_net.g_ring[0].u_node.w_out_valid) n_wrap++;
    if (|contend) n_contend++;
    if (lost_result) n_lost++;
    if (r_valid && r_ready) begin
      if (dut.r_old[N-1].valid) n_expire++;
      model_r(r_q[0]);
      pend_r = 1;
      acc_now = 1;
    end
    if (s_valid && s_ready) begin
      model_s(s_q[0]);
      pend_s = 1;
      acc_now = 1;
    end
    if (acc_now) begin
      if (last_accept >= 0) gap = cycle - last_accept;
      last_accept = cycle;
    end
    if (out_valid && out_ready) begin
      bit [95:0] k;
      k = out_result;
      n_received++;
      checks++;
      if (expected.exists(k) && expected[k] > 0) begin
        expected[k]--;
        if (expected[k] == 0) expected.delete(k);
      end else begin
        failures++;
        if (failures < 10) $display("FAIL: unexpected result key=%0d r=%h s=%h",
                                    out_result.key, out_result.r_payload, out_result.s_payload);
      end
    end
  end

  // stimulus changes happen just after a falling edge, away from both the
  // DUT's sampling edge and the monitor above
  task automatic step();
    @(negedge clk);
    #1;
  endtask

  task automatic wait_drain();
    int quiet = 0;
    while (quiet < 200) begin
      step();
      if (r_q.size() == 0 && s_q.size() == 0 && !r_valid && !s_valid && !out_valid && n_received == n_expected) quiet++;
      else quiet = 0;
    end
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired (%0d of %0d results, %0d pairs missing)",
             n_received, n_expected, expected.size());
    foreach (expected[k]) if (expected[k] > 0 && failures < 400) begin
      failures++;
      $display("  missing r=%h s=%h", k[63:32], k[31:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint t0, t1, n_before;
  initial begin
    for (int x = 0; x < L; x++) begin
      m_r[x] = '0;
      m_s[x] = '0;
    end
    repeat (4) step();
    rst_n = 1'b1;

    // phase 1: 128 + 128 tuples, 100% match, fast output
    t0 = cycle;
    for (int i = 0; i < 128; i++) begin
      r_q.push_back(mk(100, r_seq++, 1));
      s_q.push_back(mk(100, s_seq++, 0));
    end
    // tuples that never match push the first ones through the whole window
    for (int i = 0; i < 128; i++) begin
      r_q.push_back(mk(0, r_seq++, 1));
      s_q.push_back(mk(0, s_seq++, 0));
    end
    wait_drain();
    t1 = cycle;
    $display("phase 1: %0d results in %0d cycles", n_received, t1 - t0);
    check(n_received == 128 * 128 && n_expected == n_received,
          $sformatf("phase 1 result count %0d (expected %0d)", n_received, 128*128));

    // phase 2: 10% match, round length with both streams, then one stream
    for (int i = 0; i < 64; i++) begin
      r_q.push_back(mk(10, r_seq++, 1));
      s_q.push_back(mk(10, s_seq++, 0));
    end
    repeat (100) step();
    check(gap == 5 + 2 * WIN, $sformatf("round with R and S took %0d cycles", gap));
    wait_drain();
    gate_s = 0;
    for (int i = 0; i < 40; i++) r_q.push_back(mk(10, r_seq++, 1));
    repeat (100) step();
    check(gap == 5 + WIN, $sformatf("round with R only took %0d cycles", gap));
    wait_drain();
    gate_s = 1;
    gate_r = 0;
    for (int i = 0; i < 40; i++) s_q.push_back(mk(10, s_seq++, 0));
    repeat (100) step();
    check(gap == 5 + WIN, $sformatf("round with S only took %0d cycles", gap));
    wait_drain();
    gate_r = 1;

    // phase 3: full match with a slow output channel
    out_ready_period = 4;
    n_before = n_received;
    for (int i = 0; i < 96; i++) begin
      r_q.push_back(mk(100, r_seq++, 1));
      if (i % 3 != 0) s_q.push_back(mk(100, s_seq++, 0));
    end
    wait_drain();
    $display("phase 3: %0d results", n_received - n_before);

    check(n_received == n_expected, $sformatf("received %0d of %0d results", n_received, n_expected));
    check(expected.size() == 0, "every expected result delivered once");
    check(n_lost == 0, "no result lost in the ring");
    $display("mechanisms: refused=%0d suspend=%0d full=%0d deflect=%0d wrap=%0d contend=%0d expire=%0d",
             n_refused, n_suspend, n_full, n_defl, n_wrap, n_contend, n_expire);
    check(n_refused > 0, "input refusal happened");
    check(n_suspend > 0, "admission control suspended the cores");
    check(n_full > 0, "a full flag was raised");
    check(n_defl > 0, "ring deflection happened");
    check(n_wrap > 0, "wrap-around link was used");
    check(n_contend > 0, "merger contention happened");
    check(n_expire > 0, "window expiry happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
