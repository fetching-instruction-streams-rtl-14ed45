// fetch_pkg: types and constants shared by the stream fetch engine.
//
// A stream is a run of sequential instructions from the target of a taken
// branch to the next taken branch. It is named by its start address and its
// length in instructions. The next stream predictor turns one stream into a
// fetch request, the fetch target queue holds the requests, and the
// instruction cache reads them out one wide line at a time.
//
// Addresses are byte addresses of a fixed 4-byte instruction set, as in the
// 128-byte, 32-instruction lines the design uses. The address width, the
// stream length width and the branch type encoding are this design's own
// choices.
package fetch_pkg;

  parameter int unsigned ADDR_W     = 64;  // virtual address bits
  parameter int unsigned INST_W     = 32;  // instruction word bits
  parameter int unsigned INST_BYTES = 4;   // bytes per instruction
  parameter int unsigned LEN_W      = 8;   // stream length field, instructions
  parameter int unsigned RAS_DEPTH  = 8;   // return address stack entries
  parameter int unsigned RAS_IDX_W  = $clog2(RAS_DEPTH);

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [LEN_W-1:0]  len_t;

  // Kind of the branch that ends a stream; it tells the return address
  // stack what to do.
  typedef enum logic [1:0] {
    BR_JUMP   = 2'd0,   // conditional or unconditional taken branch
    BR_CALL   = 2'd1,   // subroutine call: push the return address
    BR_RETURN = 2'd2,   // return: the next stream starts at the top of stack
    BR_NONE   = 2'd3    // no branch: sequential fetch after a predictor miss
  } br_type_e;

  // Return address stack state saved with every prediction, so that a
  // misprediction can put back the stack index and the top entry.
  typedef struct packed {
    logic [RAS_IDX_W-1:0] tos;
    addr_t                top;
  } ras_ckpt_t;

  // One fetch request: a whole stream (or the rest of one).
  typedef struct packed {
    addr_t     start;
    len_t      len;
    ras_ckpt_t ckpt;
  } fetch_req_t;

  // A stream as the back end reports it when it has been committed.
  // in_path is set for the streams fetch actually followed. After a
  // misprediction in the middle of a stream, fetch restarts at the redirect
  // target, so the back end reports the whole stream with in_path clear
  // (it trains the tables only) and then the partial stream, from the
  // redirect target to the taken branch, with in_path set. Both path
  // histories then hold the same streams.
  typedef struct packed {
    addr_t    start;
    len_t     len;
    br_type_e btype;
    addr_t    next;
    logic     mispred;   // some branch in this stream was mispredicted
    logic     in_path;   // shift into the update path history (see above)
  } stream_upd_t;

  // Misprediction recovery: the correct fetch address, plus what the return
  // address stack needs to be put back.
  typedef struct packed {
    addr_t     target;       // correct next fetch address
    ras_ckpt_t ckpt;         // checkpoint carried by the mispredicted stream
    br_type_e  btype;        // actual type of the mispredicted branch
    addr_t     ret_addr;     // return address to push if it was a call
  } redirect_t;

endpackage
