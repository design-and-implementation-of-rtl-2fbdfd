// Test of one join core on its own (WIN = 8).
//
// The bench plays both neighbours: it announces arrivals with r_new_i /
// s_new_i while the core is idle and offers random slots (small key range,
// so matches are frequent; sometimes an invalid slot, as an empty neighbour
// would send). A reference model of the two segments predicts, in order,
// every result of the R scan and then the S scan. Checked: each result and
// its order, the oldest slots handed to the neighbours, the round length
// (5+2*WIN cycles with both streams, 5+WIN with one) and that a suspend
// freezes the core: the round grows by exactly the suspended cycles and no
// result appears meanwhile.
module tb_join_core;
  import hsj_pkg::*;

  localparam int WIN = 8;

  logic    clk = 1'b0, rst_n = 1'b0;
  logic    suspend = 1'b0, r_new = 1'b0, s_new = 1'b0;
  slot_t   r_i = '0, s_i = '0;
  slot_t   r_oldest, s_oldest;
  logic    idle, res_valid;
  result_t res;

  always #5 clk = ~clk;

  join_core #(.WIN(WIN)) dut (
    .clk, .rst_n, .suspend_i(suspend), .r_new_i(r_new), .s_new_i(s_new),
    .r_i, .s_i, .r_oldest_o(r_oldest), .s_oldest_o(s_oldest), .idle_o(idle),
    .res_valid_o(res_valid), .res_o(res)
  );

  int checks = 0, failures = 0;
  slot_t   m_r [WIN], m_s [WIN];
  result_t exp_q [$];
  int      n_results = 0, n_susp_results = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(negedge clk) if (rst_n && res_valid) begin
    n_results++;
    if (exp_q.size() == 0) check(0, "result with none expected");
    else begin
      result_t e;
      e = exp_q.pop_front();
      check(res == e, $sformatf("result %h, expected %h", res, e));
    end
  end
  always @(negedge clk) if (rst_n && suspend && res_valid) n_susp_results++;

  function automatic slot_t rnd_slot(int unsigned seq, bit is_r);
    slot_t x;
    x.valid     = ($urandom % 8) != 0;
    x.t.key     = 32'($urandom % 4);
    x.t.payload = {is_r ? 4'hA : 4'h5, 28'(seq)};
    return x;
  endfunction

  // one round; returns its length in cycles, from the arrival to idle again
  task automatic round(bit do_r, bit do_s, int susp_at, int susp_len, output int len);
    slot_t nr, ns;
    int t;
    nr = rnd_slot($urandom % 1000, 1);
    ns = rnd_slot($urandom % 1000, 0);
    // model: R first, then S
    if (do_r) begin
      check(r_oldest == m_r[WIN-1], "R oldest slot before the shift");
      for (int i = WIN - 1; i > 0; i--) m_r[i] = m_r[i-1];
      m_r[0] = nr;
      for (int j = 0; j < WIN; j++)
        if (nr.valid && m_s[j].valid && m_s[j].t.key == nr.t.key)
          exp_q.push_back('{key: nr.t.key, r_payload: nr.t.payload, s_payload: m_s[j].t.payload});
    end
    if (do_s) begin
      check(s_oldest == m_s[WIN-1], "S oldest slot before the shift");
      for (int i = WIN - 1; i > 0; i--) m_s[i] = m_s[i-1];
      m_s[0] = ns;
      for (int j = 0; j < WIN; j++)
        if (ns.valid && m_r[j].valid && m_r[j].t.key == ns.t.key)
          exp_q.push_back('{key: ns.t.key, r_payload: m_r[j].t.payload, s_payload: ns.t.payload});
    end
    r_i   = nr;
    s_i   = ns;
    r_new = do_r;
    s_new = do_s;
    @(negedge clk); #1;
    r_new = 1'b0;
    s_new = 1'b0;
    t = 1;
    while (!idle) begin
      if (t == susp_at) suspend = 1'b1;
      if (t == susp_at + susp_len) suspend = 1'b0;
      @(negedge clk); #1;
      t++;
    end
    len = t;
  endtask

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len;
    for (int i = 0; i < WIN; i++) begin
      m_r[i] = '0;
      m_s[i] = '0;
    end
    repeat (3) @(negedge clk);
    #1 rst_n = 1'b1;
    while (!idle) begin
      @(negedge clk); #1;
    end
    for (int n = 0; n < 300; n++) begin
      int kind;
      bit dr, ds;
      kind = $urandom % 3;
      dr = (kind != 2);
      ds = (kind != 1);
      round(dr, ds, 0, 0, len);
      check(len == (dr && ds ? 5 + 2 * WIN : 5 + WIN),
            $sformatf("round length %0d (R=%0d S=%0d)", len, dr, ds));
    end
    // suspension in the middle of the scans
    for (int n = 0; n < 20; n++) begin
      int at, dur;
      at  = 2 + $urandom % 15;
      dur = 1 + $urandom % 6;
      round(1, 1, at, dur, len);
      check(len == 5 + 2 * WIN + dur, $sformatf("suspended round length %0d (+%0d)", len, dur));
    end
    repeat (3) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("%0d results never produced", exp_q.size()));
    check(n_results > 100, "enough matches seen");
    check(n_susp_results == 0, "no result while suspended");
    $display("results=%0d", n_results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
