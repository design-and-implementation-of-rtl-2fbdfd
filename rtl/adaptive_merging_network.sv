// Adaptive merging network: collects the results of N join cores into one
// output stream.
//
// Three layers, bottom to top:
//  * a ring of N bufferless ring_node routers, node k fed by join core k and
//    linked both ways to nodes k-1 and k+1 (node N-1 wraps to node 0);
//  * N result_fifo buffers, buffer k written by node k's N_out;
//  * a binary tree of N-1 bufferless mergers, numbered as a heap: merger 1
//    is the root, merger m takes mergers 2m and 2m+1, and the leaf mergers
//    N/2 .. N-1 take buffers 2(m-N/2) and 2(m-N/2)+1.
// A result can thus reach the output through any buffer: nodes send tuples
// towards the least-occupied nearby buffer, so bursts from one core spread
// over the whole buffer layer instead of one path of the tree.
// Each buffer's occupancy counter feeds nodes k-1, k and k+1; its full flag
// goes out on full_flags for the admission control. The root merger's output
// is out_*, a valid/ready port (ready low models a slow output channel).
// Structure and connections follow the document's figure of the network for
// four cores; N must be a power of two of at least 2 (this design's limit).
module adaptive_merging_network
  import hsj_pkg::*;
#(
  parameter int unsigned N           = 16,
  parameter int unsigned DEPTH       = 8,
  parameter int unsigned FULL_MARGIN = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   res_valid,
  input  result_t        res [N],
  output logic           out_valid,
  output result_t        out_data,
  input  logic           out_ready,
  output logic [N-1:0]   full_flags,
  output logic [N-1:0]   drops
);

  localparam int unsigned CW = $clog2(DEPTH + 1);

  if (N < 2 || (N & (N - 1)) != 0) begin : g_bad_n
    $error("adaptive_merging_network: N must be a power of two >= 2");
  end

  logic [CW-1:0] cnt     [N];
  logic          e_v     [N];
  flit_t         e_f     [N];
  logic          w_v     [N];
  flit_t         w_f     [N];
  logic          n_v     [N];
  result_t       n_f     [N];

  // tree channels, heap indexed: 1..N-1 merger outputs, N..2N-1 buffers
  logic          ch_v   [2*N];
  result_t       ch_d   [2*N];
  logic          ch_rdy [2*N];

  for (genvar k = 0; k < N; k++) begin : g_ring
    localparam int unsigned KE = (k + 1) % N;
    localparam int unsigned KW = (k + N - 1) % N;

    ring_node #(.DEPTH(DEPTH)) u_node (
      .clk, .rst_n,
      .s_in_valid (res_valid[k]),
      .s_in       (res[k]),
      .e_in_valid (w_v[KE]),
      .e_in       (w_f[KE]),
      .w_in_valid (e_v[KW]),
      .w_in       (e_f[KW]),
      .cnt_self   (cnt[k]),
      .cnt_east   (cnt[KE]),
      .cnt_west   (cnt[KW]),
      .n_out_valid(n_v[k]),
      .n_out      (n_f[k]),
      .e_out_valid(e_v[k]),
      .e_out      (e_f[k]),
      .w_out_valid(w_v[k]),
      .w_out      (w_f[k]),
      .drop_o     (drops[k])
    );

    result_fifo #(.DEPTH(DEPTH), .FULL_MARGIN(FULL_MARGIN)) u_buf (
      .clk, .rst_n,
      .wr_valid (n_v[k]),
      .wr_data  (n_f[k]),
      .rd_valid (ch_v[N+k]),
      .rd_data  (ch_d[N+k]),
      .rd_ready (ch_rdy[N+k]),
      .count_o  (cnt[k]),
      .empty_o  (),
      .full_o   (full_flags[k])
    );
  end

  for (genvar m = 1; m < N; m++) begin : g_tree
    merger u_merger (
      .clk, .rst_n,
      .in1_valid(ch_v[2*m]),
      .in1_data (ch_d[2*m]),
      .in1_ready(ch_rdy[2*m]),
      .in2_valid(ch_v[2*m+1]),
      .in2_data (ch_d[2*m+1]),
      .in2_ready(ch_rdy[2*m+1]),
      .out_valid(ch_v[m]),
      .out_data (ch_d[m]),
      .out_ready(ch_rdy[m])
    );
  end

  // index 0 of the channel arrays is unused
  assign ch_v[0]   = 1'b0;
  assign ch_d[0]   = '0;
  assign ch_rdy[0] = 1'b0;

  assign out_valid = ch_v[1];
  assign out_data  = ch_d[1];
  assign ch_rdy[1] = out_ready;

endmodule
