// Test of the bufferless ring node (DEPTH = 8).
//
// Directed cases from the routing rules: a lone tuple goes to the port of
// the emptiest buffer (e.g. E_out when counter k+1 < counter k-1 <
// counter k); with three tuples the oldest (highest hop count) gets the best
// port; a full own buffer is never written. Then random inputs and counters
// against a reference that sorts tuples by hop count and ports by counter
// and hands ports out in that order. Also checked every cycle: no tuple is
// lost or duplicated (conservation), E/W outputs carry the hop count plus
// one, N_out carries the bare result.
module tb_ring_node;
  import hsj_pkg::*;

  localparam int DEPTH = 8;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          s_v = 1'b0, e_v = 1'b0, w_v = 1'b0;
  result_t       s_d = '0;
  flit_t         e_d = '0, w_d = '0;
  logic [3:0]    c_self = '0, c_east = '0, c_west = '0;
  logic          n_ov, e_ov, w_ov, drop;
  result_t       n_o;
  flit_t         e_o, w_o;

  always #5 clk = ~clk;

  ring_node #(.DEPTH(DEPTH)) dut (
    .clk, .rst_n,
    .s_in_valid(s_v), .s_in(s_d), .e_in_valid(e_v), .e_in(e_d), .w_in_valid(w_v), .w_in(w_d),
    .cnt_self(c_self), .cnt_east(c_east), .cnt_west(c_west),
    .n_out_valid(n_ov), .n_out(n_o), .e_out_valid(e_ov), .e_out(e_o),
    .w_out_valid(w_ov), .w_out(w_o), .drop_o(drop)
  );

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // expected outputs for the coming edge
  bit    x_v [3];   // 0 = N, 1 = E, 2 = W
  flit_t x_f [3];

  // reference: port for each tuple
  task automatic predict();
    flit_t f [3];
    bit    v [3];
    int    cnt [3];
    bit    used [3];
    bit    done [3];
    bit    n_ok;
    f[0] = e_d;  v[0] = e_v;
    f[1] = w_d;  v[1] = w_v;
    f[2] = '{hops: '0, res: s_d};  v[2] = s_v;
    cnt[0] = c_self;  cnt[1] = c_east;  cnt[2] = c_west;
    n_ok = (int'(c_self) + int'(n_ov)) < DEPTH;
    for (int o = 0; o < 3; o++) begin
      x_v[o] = 0;
      x_f[o] = '0;
      used[o] = 0;
      done[o] = 0;
    end
    for (int step = 0; step < 3; step++) begin
      // pick the remaining tuple with the most hops (ties: E_in, W_in, S_in)
      int best = -1;
      for (int i = 0; i < 3; i++)
        if (v[i] && !done[i] && (best < 0 || f[i].hops > f[best].hops)) best = i;
      if (best < 0) break;
      done[best] = 1;
      begin
        // pick the free port with the smallest counter (ties: N, E, W)
        int bp = -1;
        for (int o = 0; o < 3; o++)
          if (!used[o] && (o != 0 || n_ok) && (bp < 0 || cnt[o] < cnt[bp])) bp = o;
        if (bp >= 0) begin
          used[bp] = 1;
          x_v[bp] = 1;
          x_f[bp] = f[best];
        end
      end
    end
  endtask

  function automatic flit_t inc(flit_t f);
    flit_t g;
    g = f;
    if (f.hops != '1) g.hops = f.hops + 1'b1;
    return g;
  endfunction

  task automatic apply_and_check(string what);
    int n_in, n_outs;
    #1;
    predict();
    n_in = int'(s_v) + int'(e_v) + int'(w_v);
    @(negedge clk);
    n_outs = int'(n_ov) + int'(e_ov) + int'(w_ov);
    check(n_outs == n_in, $sformatf("%s: %0d tuples in, %0d out", what, n_in, n_outs));
    check(n_ov == x_v[0] && (!n_ov || n_o == x_f[0].res), $sformatf("%s: N_out", what));
    check(e_ov == x_v[1] && (!e_ov || e_o == inc(x_f[1])), $sformatf("%s: E_out", what));
    check(w_ov == x_v[2] && (!w_ov || w_o == inc(x_f[2])), $sformatf("%s: W_out", what));
  endtask

  function automatic flit_t rf(int hops);
    flit_t f;
    f.hops = HOP_W'(hops);
    f.res  = {$urandom, $urandom, $urandom};
    return f;
  endfunction

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // lone tuple from the core; counter k+1 < counter k-1 < counter k
    s_v = 1; s_d = rf(0).res; e_v = 0; w_v = 0;
    c_east = 1; c_west = 2; c_self = 3;
    apply_and_check("example E,W,N");
    check(e_ov && !n_ov && !w_ov, "lone tuple goes east");
    // all counters equal: straight up
    s_v = 1; s_d = rf(0).res; c_east = 2; c_west = 2; c_self = 2;
    apply_and_check("equal counters");
    check(n_ov && !e_ov && !w_ov, "equal counters: tuple goes north");
    // three tuples, oldest from W_in gets the best port (N)
    s_v = 1; s_d = rf(0).res; e_v = 1; e_d = rf(2); w_v = 1; w_d = rf(7);
    c_self = 0; c_east = 4; c_west = 5;
    apply_and_check("oldest first");
    check(n_ov && n_o == w_d.res, "oldest tuple delivered to its buffer");
    // own buffer full: never written, ring tuples deflected
    s_v = 0; e_v = 1; e_d = rf(1); w_v = 1; w_d = rf(1);
    c_self = 4'(DEPTH); c_east = 5; c_west = 5;
    apply_and_check("full own buffer");
    check(!n_ov && e_ov && w_ov, "full buffer avoided");
    s_v = 0; e_v = 0; w_v = 0;
    apply_and_check("idle");

    // random
    for (int n = 0; n < 20000; n++) begin
      s_v = $urandom % 2;
      e_v = $urandom % 2;
      w_v = $urandom % 2;
      s_d = rf(0).res;
      e_d = rf($urandom % 6);
      w_d = rf($urandom % 6);
      if (n % 1000 == 999) e_d.hops = '1;   // saturation
      c_self = 4'($urandom % (DEPTH + 1));
      c_east = 4'($urandom % (DEPTH + 1));
      c_west = 4'($urandom % (DEPTH + 1));
      // the admission control keeps a core tuple away from a full buffer
      if (s_v && e_v && w_v && int'(c_self) >= DEPTH - 1) c_self = 4'(DEPTH - 2);
      apply_and_check("random");
    end
    check(!drop, "no drop reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
