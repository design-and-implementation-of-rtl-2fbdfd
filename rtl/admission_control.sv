// Admission control: one flip-flop that suspends the whole join operator.
//
// The full flags of all FIFO buffers of the merging network are combined
// (an AND of their inverses: "are all flags de-asserted?") and the result is
// registered. suspend_o is the inverse of that flip-flop: while it is 1 the
// join cores hold their state and newly arriving tuples are refused, until
// every full flag has been de-asserted again. It thus costs one cycle of
// latency between a flag and the cores. This follows the document; only the
// polarity of the output is this design's choice.
module admission_control #(
  parameter int unsigned N_FLAGS = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_FLAGS-1:0] full_flags,
  output logic               suspend_o
);

  logic all_clear_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) all_clear_q <= 1'b1;
    else        all_clear_q <= &(~full_flags);
  end

  assign suspend_o = !all_clear_q;

endmodule
