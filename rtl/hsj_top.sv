// Handshake join operator with an adaptive merging network.
//
// Computes the sliding-window equi-join of two tuple streams R and S: every
// R tuple is joined with the S tuples in the S window and vice versa, where
// each window holds the last NUM_CORES*WIN tuples of its stream. The windows
// are spread over a chain of NUM_CORES join cores; R tuples flow from core 0
// towards core NUM_CORES-1 and S tuples the other way, so every pair of tuples
// meets in exactly one core, which compares them. The cores' results are
// collected by the adaptive merging network into one output stream.
//
// Interface: r_valid/r_ready/r_tuple and s_valid/s_ready/s_tuple accept input
// tuples; both may be taken in the same cycle. ready is high only while the
// cores wait for the next tuple and the admission control does not suspend
// them, so a refused tuple stays with the source. Accepted tuples are
// registered here (the input ports the first and the last core read).
// out_valid/out_ready/out_result deliver 96-bit result tuples; holding
// out_ready low models an output channel slower than the join. suspended is
// the admission control's state; lost_result would pulse if a result ever
// found no output in the ring (a diagnostic, not expected to fire). Timing: a tuple is taken every 5+2*WIN
// cycles at best when both streams have one, 5+WIN when only one does.
//
// Chain of cores, network, admission control and the default sizes (16
// cores, 8-tuple windows per core, 8-tuple buffers, 32-bit key and payload)
// follow the document; the input handshake is this design's.
module hsj_top
  import hsj_pkg::*;
#(
  parameter int unsigned NUM_CORES   = 16,
  parameter int unsigned WIN         = 8,
  parameter int unsigned FIFO_DEPTH  = 8,
  parameter int unsigned FULL_MARGIN = 3
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    r_valid,
  input  tuple_t  r_tuple,
  output logic    r_ready,
  input  logic    s_valid,
  input  tuple_t  s_tuple,
  output logic    s_ready,
  output logic    out_valid,
  output result_t out_result,
  input  logic    out_ready,
  output logic    suspended,
  output logic    lost_result
);

  localparam int unsigned N = NUM_CORES;

  logic                 suspend;
  logic [N-1:0]         idle;
  logic [N-1:0]         res_valid;
  result_t              res [N];
  slot_t                r_old [N];
  slot_t                s_old [N];
  slot_t                r_port, s_port;
  logic                 r_new, s_new;
  logic [N-1:0]         full_flags;
  logic [N-1:0]         drops;

  // all cores run in lockstep, so core 0 speaks for all of them
  assign r_ready   = idle[0] && !suspend;
  assign s_ready   = idle[0] && !suspend;
  assign r_new     = r_valid && r_ready;
  assign s_new     = s_valid && s_ready;
  assign suspended = suspend;
  assign lost_result = |drops;   // never 1 when the admission control works

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_port <= '0;
      s_port <= '0;
    end else begin
      if (r_new) r_port <= '{valid: 1'b1, t: r_tuple};
      if (s_new) s_port <= '{valid: 1'b1, t: s_tuple};
    end
  end

  for (genvar k = 0; k < N; k++) begin : g_core
    join_core #(.WIN(WIN)) u_core (
      .clk, .rst_n,
      .suspend_i  (suspend),
      .r_new_i    (r_new),
      .s_new_i    (s_new),
      .r_i        ((k == 0)     ? r_port : r_old[(k + N - 1) % N]),
      .s_i        ((k == N - 1) ? s_port : s_old[(k + 1) % N]),
      .r_oldest_o (r_old[k]),
      .s_oldest_o (s_old[k]),
      .idle_o     (idle[k]),
      .res_valid_o(res_valid[k]),
      .res_o      (res[k])
    );
  end

  adaptive_merging_network #(
    .N(N), .DEPTH(FIFO_DEPTH), .FULL_MARGIN(FULL_MARGIN)
  ) u_net (
    .clk, .rst_n,
    .res_valid,
    .res,
    .out_valid,
    .out_data  (out_result),
    .out_ready,
    .full_flags,
    .drops
  );

  admission_control #(.N_FLAGS(N)) u_adm (
    .clk, .rst_n,
    .full_flags,
    .suspend_o(suspend)
  );

  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) idle == '0 || idle == '1)
    else $error("hsj_top: join cores out of step");

endmodule
