// Ring node: bufferless (BLESS-style) router between a join core, its FIFO
// buffer and the two neighbouring nodes of the ring.
//
// Inputs: S_in from join core k, E_in from node k+1, W_in from node k-1.
// Outputs: N_out to FIFO buffer k, E_out to node k+1, W_out to node k-1. Each
// output has a one-tuple register; the node holds no other storage and must
// place every incoming tuple on some output in the cycle it arrives.
//
// Every cycle the node (1) ranks the incoming tuples oldest first by their hop
// count and (2) orders its output ports by the occupancy counters of buffer k
// (N_out), buffer k+1 (E_out) and buffer k-1 (W_out), emptiest buffer first.
// Tuples are then taken highest rank first, each getting the best-ordered
// output not yet taken. A tuple leaving on E_out or W_out has its hop count
// incremented (saturating); N_out delivers the bare result tuple.
//
// The ranking, the port ordering and the one-cycle operation follow the
// document. Tie rules are this design's: equal hop counts rank ring tuples
// (E_in, then W_in) ahead of the core's tuple; equal counters order N_out,
// then E_out, then W_out. N_out is also skipped when buffer k has no free
// entry (counter plus the tuple already in the N_out register reaches
// DEPTH). With the admission control stopping the cores in time this never
// leaves a tuple without an output; if it did, drop_o pulses and an
// assertion fires.
module ring_node
  import hsj_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned CW    = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          s_in_valid,
  input  result_t       s_in,
  input  logic          e_in_valid,
  input  flit_t         e_in,
  input  logic          w_in_valid,
  input  flit_t         w_in,
  input  logic [CW-1:0] cnt_self,   // buffer k
  input  logic [CW-1:0] cnt_east,   // buffer k+1
  input  logic [CW-1:0] cnt_west,   // buffer k-1
  output logic          n_out_valid,
  output result_t       n_out,
  output logic          e_out_valid,
  output flit_t         e_out,
  output logic          w_out_valid,
  output flit_t         w_out,
  output logic          drop_o
);

  // input index: 0 = E_in, 1 = W_in, 2 = S_in (also the tie order)
  // port index:  0 = N_out, 1 = E_out, 2 = W_out (also the tie order)
  flit_t         in_f   [3];
  logic          in_v   [3];
  logic [CW-1:0] p_cnt  [3];
  logic [1:0]    in_rank [3];
  logic [1:0]    p_rank  [3];
  logic          p_ok   [3];
  logic          p_take [3];
  flit_t         p_f    [3];
  logic          drop;
  logic          placed;

  always_comb begin
    in_f[0] = e_in;
    in_v[0] = e_in_valid;
    in_f[1] = w_in;
    in_v[1] = w_in_valid;
    in_f[2] = '{hops: '0, res: s_in};
    in_v[2] = s_in_valid;
    p_cnt[0] = cnt_self;
    p_cnt[1] = cnt_east;
    p_cnt[2] = cnt_west;
    p_ok[0]  = ({1'b0, cnt_self} + (CW+1)'(n_out_valid)) < (CW+1)'(DEPTH);
    p_ok[1]  = 1'b1;
    p_ok[2]  = 1'b1;

    // ranking component: position of each tuple, 0 = served first
    for (int i = 0; i < 3; i++) begin
      in_rank[i] = '0;
      for (int j = 0; j < 3; j++)
        if (j != i && in_v[j] &&
            (in_f[j].hops > in_f[i].hops || (in_f[j].hops == in_f[i].hops && j < i)))
          in_rank[i] = in_rank[i] + 2'd1;
    end
    // port-selection component: position of each port, 0 = preferred
    for (int o = 0; o < 3; o++) begin
      p_rank[o] = '0;
      for (int q = 0; q < 3; q++)
        if (q != o && (p_cnt[q] < p_cnt[o] || (p_cnt[q] == p_cnt[o] && q < o)))
          p_rank[o] = p_rank[o] + 2'd1;
    end

    // assignment: tuples in rank order, each to its best free port
    for (int o = 0; o < 3; o++) begin
      p_take[o] = 1'b0;
      p_f[o]    = '0;
    end
    drop   = 1'b0;
    placed = 1'b0;
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 3; i++) begin
        if (in_v[i] && in_rank[i] == 2'(r)) begin
          placed = 1'b0;
          for (int pr = 0; pr < 3; pr++) begin
            for (int o = 0; o < 3; o++) begin
              if (!placed && p_rank[o] == 2'(pr) && p_ok[o] && !p_take[o]) begin
                p_take[o] = 1'b1;
                p_f[o]    = in_f[i];
                placed    = 1'b1;
              end
            end
          end
          if (!placed) drop = 1'b1;
        end
      end
    end
  end

  function automatic flit_t hop_inc(flit_t f);
    flit_t g;
    g = f;
    if (f.hops != '1) g.hops = f.hops + 1'b1;
    return g;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_out_valid <= 1'b0;
      e_out_valid <= 1'b0;
      w_out_valid <= 1'b0;
      n_out       <= '0;
      e_out       <= '0;
      w_out       <= '0;
      drop_o      <= 1'b0;
    end else begin
      n_out_valid <= p_take[0];
      e_out_valid <= p_take[1];
      w_out_valid <= p_take[2];
      n_out       <= p_f[0].res;
      e_out       <= hop_inc(p_f[1]);
      w_out       <= hop_inc(p_f[2]);
      drop_o      <= drop;
    end
  end

  // The admission control must keep every incoming tuple placeable.
  a_no_drop: assert property (@(posedge clk) disable iff (!rst_n) !drop)
    else $error("ring_node: tuple could not be placed on any output");

endmodule
