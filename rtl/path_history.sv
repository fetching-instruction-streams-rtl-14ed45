// path_history: the two path history registers of the next stream predictor.
//
// Each register is a shift register of the last DEPTH stream start
// addresses, keeping HB low bits of each instruction address (enough for the
// hash). The lookup register is shifted as soon as a prediction is made
// (spec_push), so it follows the speculative path. The update register is
// shifted when the back end commits a stream (commit_push), so it holds
// correct-path history only. On a misprediction (restore) the update
// register, including a commit in the same cycle, is copied into the lookup
// register. This is as the document describes; the bit selection and the
// priority of restore over a speculative push are this design's choices.
// Both registers reset to zero.
module path_history
  import fetch_pkg::*;
#(
  parameter int unsigned DEPTH = 12,
  parameter int unsigned HB    = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          spec_push,
  input  addr_t         spec_addr,
  input  logic          commit_push,
  input  addr_t         commit_addr,
  input  logic          restore,
  output logic [HB-1:0] lk_hist [DEPTH],
  output logic [HB-1:0] up_hist [DEPTH]
);

  logic [HB-1:0] lk_q [DEPTH];
  logic [HB-1:0] up_q [DEPTH];
  logic [HB-1:0] up_d [DEPTH];

  always_comb begin
    up_d = up_q;
    if (commit_push) begin
      for (int d = DEPTH - 1; d > 0; d--) up_d[d] = up_q[d-1];
      up_d[0] = commit_addr[2 +: HB];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < DEPTH; d++) begin
        lk_q[d] <= '0;
        up_q[d] <= '0;
      end
    end else begin
      up_q <= up_d;
      if (restore) begin
        lk_q <= up_d;
      end else if (spec_push) begin
        for (int d = DEPTH - 1; d > 0; d--) lk_q[d] <= lk_q[d-1];
        lk_q[0] <= spec_addr[2 +: HB];
      end
    end
  end

  assign lk_hist = lk_q;
  assign up_hist = up_q;

endmodule
