// Join core: one segment of the two sliding windows of a handshake join.
//
// The core holds WIN tuples of stream R and WIN tuples of stream S, each as a
// shift register of slots with a one-bit valid flag. R tuples enter from the
// left neighbour (or the R input) and leave to the right; S tuples enter from
// the right neighbour (or the S input) and leave to the left. When a tuple
// enters the segment it is compared, one slot per cycle (a nested-loop scan),
// with every tuple of the other stream's segment ("immediate scan"); an equal
// key produces a 96-bit result tuple on res_o in the next cycle. The core has
// no result buffer: results go straight to the merging network.
//
// Sequence (the document's state numbering): STATE0 clears the windows after
// reset. STATE1 waits for an arrival; r_new_i / s_new_i, broadcast to every
// core, announce that a tuple of R and/or S was accepted this cycle. STATE2
// reads the input ports, STATE3 writes them into the input buffer registers
// with their valid flags. STATE4 goes to STATE5 if an R tuple arrived, else to
// STATE6. STATE5 shifts the R segment in its first cycle and scans the S
// segment for WIN cycles (complete_R on the last). STATE6/STATE7 do the same
// for S against the R segment, then back to STATE1. A round therefore takes
// 5+2*WIN cycles with both streams, 5+WIN with one.
//
// Because every core runs the same fixed-length sequence from the same
// broadcast arrival, all cores stay in lockstep and the segments together
// form one long shift register per stream, as the document describes. The
// broadcast arrival, the fixed scan length (invalid slots are skipped by the
// valid flags rather than by a shorter loop) and the freeze on suspend_i (the
// admission control's suspend: every register holds and no result is
// produced) are this design's choices where the document is not explicit.
module join_core
  import hsj_pkg::*;
#(
  parameter int unsigned WIN = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    suspend_i,   // admission control: hold everything
  input  logic    r_new_i,     // an R tuple arrives this cycle (broadcast)
  input  logic    s_new_i,     // an S tuple arrives this cycle (broadcast)
  input  slot_t   r_i,         // from left neighbour's oldest R slot / R input
  input  slot_t   s_i,         // from right neighbour's oldest S slot / S input
  output slot_t   r_oldest_o,  // to right neighbour
  output slot_t   s_oldest_o,  // to left neighbour
  output logic    idle_o,      // in STATE1, ready for the next arrival
  output logic    res_valid_o,
  output result_t res_o
);

  typedef enum logic [2:0] {
    STATE0, STATE1, STATE2, STATE3, STATE4, STATE5, STATE6, STATE7
  } state_e;

  localparam int unsigned IW = (WIN > 1) ? $clog2(WIN) : 1;

  state_e        state;
  slot_t         r_win [WIN];   // index 0 newest, WIN-1 oldest
  slot_t         s_win [WIN];
  slot_t         r_port, s_port; // values read from the ports in STATE2
  slot_t         r_buf, s_buf;   // input buffer registers
  logic          new_r, new_s;   // arrival flags latched in STATE1
  logic          valid_r, valid_s;
  logic [IW-1:0] idx;
  logic          last;

  assign last       = (idx == IW'(WIN - 1));
  assign r_oldest_o = r_win[WIN-1];
  assign s_oldest_o = s_win[WIN-1];
  assign idle_o     = (state == STATE1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= STATE0;
      idx         <= '0;
      new_r       <= 1'b0;
      new_s       <= 1'b0;
      valid_r     <= 1'b0;
      valid_s     <= 1'b0;
      r_port      <= '0;
      s_port      <= '0;
      r_buf       <= '0;
      s_buf       <= '0;
      res_valid_o <= 1'b0;
      res_o       <= '0;
      for (int i = 0; i < WIN; i++) begin
        r_win[i] <= '0;
        s_win[i] <= '0;
      end
    end else if (suspend_i) begin
      res_valid_o <= 1'b0;
    end else begin
      res_valid_o <= 1'b0;
      unique case (state)
        STATE0: begin
          for (int i = 0; i < WIN; i++) begin
            r_win[i].valid <= 1'b0;
            s_win[i].valid <= 1'b0;
          end
          state <= STATE1;
        end
        STATE1: begin
          if (r_new_i || s_new_i) begin
            new_r <= r_new_i;
            new_s <= s_new_i;
            state <= STATE2;
          end
        end
        STATE2: begin
          r_port <= r_i;
          s_port <= s_i;
          state  <= STATE3;
        end
        STATE3: begin
          r_buf   <= r_port;
          s_buf   <= s_port;
          valid_r <= new_r;
          valid_s <= new_s;
          state   <= STATE4;
        end
        STATE4: begin
          idx   <= '0;
          state <= valid_r ? STATE5 : STATE6;
        end
        STATE5: begin
          if (idx == '0) begin
            r_win[0] <= r_buf;
            for (int i = 1; i < WIN; i++) r_win[i] <= r_win[i-1];
          end
          if (r_buf.valid && s_win[idx].valid && r_buf.t.key == s_win[idx].t.key) begin
            res_valid_o <= 1'b1;
            res_o       <= '{key: r_buf.t.key, r_payload: r_buf.t.payload,
                             s_payload: s_win[idx].t.payload};
          end
          idx <= last ? '0 : idx + 1'b1;
          if (last) state <= STATE6;   // complete_R
        end
        STATE6: begin
          idx   <= '0;
          state <= valid_s ? STATE7 : STATE1;
        end
        STATE7: begin
          if (idx == '0) begin
            s_win[0] <= s_buf;
            for (int i = 1; i < WIN; i++) s_win[i] <= s_win[i-1];
          end
          if (s_buf.valid && r_win[idx].valid && s_buf.t.key == r_win[idx].t.key) begin
            res_valid_o <= 1'b1;
            res_o       <= '{key: s_buf.t.key, r_payload: r_win[idx].t.payload,
                             s_payload: s_buf.t.payload};
          end
          idx <= last ? '0 : idx + 1'b1;
          if (last) state <= STATE1;   // complete_S
        end
        default: state <= STATE0;
      endcase
    end
  end

endmodule
