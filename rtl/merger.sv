// Merger: two-in one-out node of the bufferless binary tree.
//
// Two input buffer registers and one output buffer register, each with a
// valid flag; no FIFO. Every cycle in which the output register is free (or
// is being taken by the parent), one held input moves into it. When both
// inputs hold a tuple they are served alternately, port 1 then port 2, as the
// document's merger visits its two inputs in turn. An input register accepts
// a new tuple when it is empty or is being moved out in the same cycle, so a
// stream that has the merger to itself passes at one tuple per cycle.
//
// Registers and valid flags follow the document; the valid/ready handshake
// between tree levels (in_ready depends combinationally on out_ready) is this
// design's choice, since a merger without buffers must be able to hold off
// its children.
module merger
  import hsj_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in1_valid,
  input  result_t in1_data,
  output logic    in1_ready,
  input  logic    in2_valid,
  input  result_t in2_data,
  output logic    in2_ready,
  output logic    out_valid,
  output result_t out_data,
  input  logic    out_ready
);

  logic    b1_v, b2_v;
  result_t b1, b2;
  logic    turn2;        // port 2 goes first on the next tie
  logic    out_free, mv1, mv2;

  assign out_free  = !out_valid || out_ready;
  assign mv1       = out_free && b1_v && (!b2_v || !turn2);
  assign mv2       = out_free && b2_v && !mv1;
  assign in1_ready = !b1_v || mv1;
  assign in2_ready = !b2_v || mv2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b1_v      <= 1'b0;
      b2_v      <= 1'b0;
      b1        <= '0;
      b2        <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      turn2     <= 1'b0;
    end else begin
      if (mv1) begin
        out_data <= b1;
        turn2    <= 1'b1;
      end else if (mv2) begin
        out_data <= b2;
        turn2    <= 1'b0;
      end
      if (mv1 || mv2)     out_valid <= 1'b1;
      else if (out_ready) out_valid <= 1'b0;
      if (in1_valid && in1_ready) begin
        b1   <= in1_data;
        b1_v <= 1'b1;
      end else if (mv1) begin
        b1_v <= 1'b0;
      end
      if (in2_valid && in2_ready) begin
        b2   <= in2_data;
        b2_v <= 1'b1;
      end else if (mv2) begin
        b2_v <= 1'b0;
      end
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 out_valid && !out_ready |=> out_valid && $stable(out_data))
    else $error("merger: output changed while stalled");

endmodule
