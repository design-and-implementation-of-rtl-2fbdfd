// Match-rate sweep of the handshake join operator, used by the workload
// testbenches.
//
// For each match rate from 10% to 100% the operator is reset, NT R tuples
// and NT S tuples are offered as fast as it takes them (both streams every
// round), followed by NT + NT tuples that never match, which carry the
// first ones through the whole window so that every pair meets. A
// "matching" tuple has key 0, the others a unique key. With BURST = 0 the
// matching tuples are spread at random; with BURST = 1 they form one
// consecutive run at a random place in each stream.
//
// A reference model of the two windows (shift per accepted tuple, R before S,
// compare each entering tuple with the other segment of its core) lists the
// expected pairs; every result must be one of them and all must come out.
// Reported per rate: results, total cycles until the last result, and the
// input rate (tuples of both streams accepted per cycle while the NT + NT
// measured tuples were offered). The output channel is always ready.
module hsj_sweep_bench #(
  parameter int NC    = 16,
  parameter int NT    = 128,
  parameter bit BURST = 1'b0
) (
  output int  checks,
  output int  failures,
  output bit  done
);
  import hsj_pkg::*;

  localparam int WIN = 8;
  localparam int L   = NC * WIN;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    r_valid = 1'b0, s_valid = 1'b0, r_ready, s_ready;
  tuple_t  r_tuple = '0, s_tuple = '0;
  logic    out_valid;
  result_t out_result;
  logic    suspended, lost_result;

  always #5 clk = ~clk;

  hsj_top #(.NUM_CORES(NC)) dut (
    .clk, .rst_n,
    .r_valid, .r_tuple, .r_ready,
    .s_valid, .s_tuple, .s_ready,
    .out_valid, .out_result, .out_ready(1'b1),
    .suspended, .lost_result
  );

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  slot_t   m_r [L];
  slot_t   m_s [L];
  int      expected [bit [95:0]];
  longint  n_expected, n_received, n_acc_measured, t_first, t_last_measured;
  tuple_t  r_q[$], s_q[$];
  int      n_measured_left;
  int unsigned ukey = 1000;

  initial begin
    checks = 0;
    failures = 0;
    done = 0;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic void model_r(tuple_t t);
    slot_t e, o;
    for (int x = L - 1; x > 0; x--) m_r[x] = m_r[x-1];
    m_r[0] = '{valid: 1'b1, t: t};
    for (int c = 0; c < NC; c++) begin
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
    slot_t e, o;
    for (int x = 0; x < L - 1; x++) m_s[x] = m_s[x+1];
    m_s[L-1] = '{valid: 1'b1, t: t};
    for (int c = 0; c < NC; c++) begin
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

  // keys of one stream for a given match rate
  task automatic gen(int pct, bit is_r, ref tuple_t q[$]);
    int n_match, start;
    tuple_t t;
    n_match = (NT * pct) / 100;
    start = $urandom % (NT - n_match + 1);
    for (int i = 0; i < NT; i++) begin
      bit m;
      m = BURST ? (i >= start && i < start + n_match) : (($urandom % 100) < pct);
      if (m) t.key = 32'd0;
      else begin
        ukey++;
        t.key = ukey;
      end
      t.payload = {is_r ? 4'hA : 4'h5, 28'(i)};
      q.push_back(t);
    end
    for (int i = 0; i < NT; i++) begin
      ukey++;
      t.key = ukey;
      t.payload = {is_r ? 4'hA : 4'h5, 28'(NT + i)};
      q.push_back(t);
    end
  endtask

  bit pend_r = 0, pend_s = 0, running = 0;
  always @(negedge clk) if (rst_n && running) begin
    if (pend_r) void'(r_q.pop_front());
    if (pend_s) void'(s_q.pop_front());
    pend_r = 0;
    pend_s = 0;
    r_valid = r_q.size() > 0;
    s_valid = s_q.size() > 0;
    r_tuple = r_valid ? r_q[0] : '0;
    s_tuple = s_valid ? s_q[0] : '0;
    if (r_valid && r_ready) begin
      model_r(r_q[0]);
      pend_r = 1;
      if (t_first < 0) t_first = cycle;
      if (n_measured_left > 0) begin
        n_measured_left--;
        n_acc_measured++;
        t_last_measured = cycle;
      end
    end
    if (s_valid && s_ready) begin
      model_s(s_q[0]);
      pend_s = 1;
      if (n_measured_left > 0) begin
        n_measured_left--;
        n_acc_measured++;
        t_last_measured = cycle;
      end
    end
    if (out_valid) begin
      bit [95:0] k;
      k = out_result;
      n_received++;
      checks++;
      if (expected.exists(k) && expected[k] > 0) begin
        expected[k]--;
        if (expected[k] == 0) expected.delete(k);
      end else begin
        failures++;
        if (failures < 10) $display("FAIL: unexpected result r=%h s=%h",
                                    out_result.r_payload, out_result.s_payload);
      end
    end
  end

  real rate [11];
  initial begin
    for (int pct = 10; pct <= 100; pct += 10) begin
      int quiet;
      longint t_end;
      running = 0;
      rst_n = 1'b0;
      r_valid = 1'b0;
      s_valid = 1'b0;
      for (int x = 0; x < L; x++) begin
        m_r[x] = '0;
        m_s[x] = '0;
      end
      expected.delete();
      r_q.delete();
      s_q.delete();
      n_expected = 0;
      n_received = 0;
      n_acc_measured = 0;
      t_first = -1;
      t_last_measured = 0;
      n_measured_left = 2 * NT;
      gen(pct, 1, r_q);
      gen(pct, 0, s_q);
      repeat (3) @(negedge clk);
      #1 rst_n = 1'b1;
      running = 1;
      quiet = 0;
      while (quiet < 100) begin
        @(negedge clk);
        #1;
        if (r_q.size() == 0 && s_q.size() == 0 && n_received == n_expected && !out_valid) quiet++;
        else quiet = 0;
      end
      t_end = cycle - 100;
      rate[pct/10] = real'(n_acc_measured) / real'(t_last_measured - t_first + 1);
      $display("cores=%0d tuples=%0d+%0d burst=%0d match=%0d%%: results=%0d cycles=%0d input rate=%.4f tuple/cycle",
               NC, NT, NT, BURST, pct, n_received, t_end - t_first, rate[pct/10]);
      check(n_received == n_expected && expected.size() == 0,
            $sformatf("match %0d%%: %0d of %0d results", pct, n_received, n_expected));
      check(lost_result == 1'b0, "no result lost");
    end
    check(rate[1] > rate[10], "input rate falls with the match rate");
    done = 1;
  end

endmodule
