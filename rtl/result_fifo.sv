// Result FIFO buffer of the adaptive merging network (buffer k).
//
// A circular queue of DEPTH result tuples with a read and a write address
// register, an occupancy counter and the empty and full flags. The writer
// (ring node k's N_out register) has no back-pressure: the node only writes
// when count plus its pending tuple is below DEPTH. The reader is the leaf
// merger, with a valid/ready handshake; the head entry is shown
// combinationally (first-word fall-through), so one tuple can leave per
// cycle. count_o goes to ring nodes k-1, k and k+1 for port selection.
// full_o is the admission-control flag: it is set when the buffer is full or
// almost full, i.e. when no more than FULL_MARGIN entries are free.
//
// The counter, the two flags, the "almost full" meaning of the full flag and
// the DEPTH of 8 come from the document; FULL_MARGIN = 3 is this design's
// choice: it covers the tuples still on their way to the buffer during the
// two cycles the suspend signal needs to stop the join cores. A write into a
// completely full buffer would be lost; an assertion flags it.
module result_fifo
  import hsj_pkg::*;
#(
  parameter int unsigned DEPTH       = 8,
  parameter int unsigned FULL_MARGIN = 3,
  parameter int unsigned CW          = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_valid,
  input  result_t       wr_data,
  output logic          rd_valid,
  output result_t       rd_data,
  input  logic          rd_ready,
  output logic [CW-1:0] count_o,
  output logic          empty_o,
  output logic          full_o
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  result_t       mem [DEPTH];
  logic [AW-1:0] wr_addr, rd_addr;
  logic [CW-1:0] count;
  logic          do_wr, do_rd;

  assign empty_o  = (count == '0);
  assign full_o   = (count >= CW'(DEPTH - FULL_MARGIN));
  assign count_o  = count;
  assign rd_valid = !empty_o;
  assign rd_data  = mem[rd_addr];
  assign do_rd    = rd_valid && rd_ready;
  assign do_wr    = wr_valid && (count != CW'(DEPTH));

  function automatic logic [AW-1:0] next_addr(logic [AW-1:0] a);
    return (a == AW'(DEPTH - 1)) ? '0 : a + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_addr <= '0;
      rd_addr <= '0;
      count   <= '0;
    end else begin
      if (do_wr) wr_addr <= next_addr(wr_addr);
      if (do_rd) rd_addr <= next_addr(rd_addr);
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  wr_valid |-> count != CW'(DEPTH))
    else $error("result_fifo: write into a full buffer");

endmodule
