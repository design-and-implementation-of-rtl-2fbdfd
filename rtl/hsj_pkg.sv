// Shared types and constants of the handshake join operator.
//
// An input tuple is a 32-bit join key plus a 32-bit payload (64 bits in all),
// and a result tuple is the key plus the payloads of the R and the S tuple
// that matched (96 bits). These widths follow the document. Inside the ring
// of the adaptive merging network a result travels as a "flit": the result
// plus a saturating hop counter used for oldest-first ranking; the 8-bit
// width of that counter is this design's own choice.
package hsj_pkg;

  localparam int unsigned KEY_W = 32;
  localparam int unsigned PAY_W = 32;
  localparam int unsigned HOP_W = 8;

  typedef struct packed {
    logic [KEY_W-1:0] key;
    logic [PAY_W-1:0] payload;
  } tuple_t;

  typedef struct packed {
    logic [KEY_W-1:0] key;
    logic [PAY_W-1:0] r_payload;
    logic [PAY_W-1:0] s_payload;
  } result_t;

  typedef struct packed {
    logic [HOP_W-1:0] hops;
    result_t          res;
  } flit_t;

  // Window slot: a tuple and its one-bit valid flag.
  typedef struct packed {
    logic   valid;
    tuple_t t;
  } slot_t;

endpackage
