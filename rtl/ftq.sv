// ftq: fetch target queue of stream fetch requests.
//
// A circular queue of DEPTH requests (4 by default) between the next stream
// predictor and the instruction cache, so that the predictor can run ahead
// and stall only when the queue is full. The head request is the one being
// fetched. A stream usually takes several cycles to fetch, so the head is not
// split into smaller requests: each cycle the fetch stage reports how many
// instructions it obtained (adv_n) and the head is updated in place, its
// start address advanced by that many instructions and its length reduced
// by as many. When the length reaches zero the head is retired and the next
// request moves up. flush empties the queue on a misprediction.
// Push uses valid/ready; ready is high when an entry is free. A request
// pushed into an empty queue is visible at the head one cycle later.
// The in-place update follows the document; the handshake and the flush
// are this design's choices.
module ftq
  import fetch_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       flush,
  // from the predictor
  input  logic       push_valid,
  output logic       push_ready,
  input  fetch_req_t push_req,
  // head, to the instruction cache
  output logic       head_valid,
  output fetch_req_t head_req,
  input  logic       adv_valid,
  input  len_t       adv_n,       // instructions fetched from the head
  output logic       full,
  output logic       head_done    // the head request retires this cycle
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  fetch_req_t           q [DEPTH];
  logic [PTR_W-1:0]     rd, wr;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);
  logic [CNT_W-1:0]     count;
  logic                 push, pop;

  assign full       = (count == CNT_W'(DEPTH));
  assign push_ready = !full;
  assign head_valid = (count != '0);
  assign head_req   = q[rd];
  assign push       = push_valid && push_ready && !flush;
  assign head_done  = head_valid && adv_valid && (adv_n >= q[rd].len);
  assign pop        = head_done && !flush;

  function automatic logic [PTR_W-1:0] inc(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd    <= '0;
      wr    <= '0;
      count <= '0;
    end else if (flush) begin
      rd    <= '0;
      wr    <= '0;
      count <= '0;
    end else begin
      if (push) wr <= inc(wr);
      if (pop)  rd <= inc(rd);
      count <= count + CNT_W'(push) - CNT_W'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (!flush && head_valid && adv_valid && !head_done) begin
      q[rd].start <= q[rd].start + (addr_t'(adv_n) << 2);
      q[rd].len   <= q[rd].len - adv_n;
    end
    if (push) q[wr] <= push_req;
  end

  // The fetch stage never takes more than the head holds.
  a_adv_le_len: assert property (@(posedge clk) disable iff (!rst_n)
    adv_valid |-> head_valid && adv_n <= q[rd].len);

endmodule
