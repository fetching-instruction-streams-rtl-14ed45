// next_stream_predictor: cascaded next stream predictor with return address
// stack and path history.
//
// It holds the current fetch address, the start of the stream to predict.
// Each cycle both tables are read: the first indexed by the address alone,
// the second by a DOLC hash of the address and the lookup path history.
// If both hit the path-indexed table wins, if one hits it is used, and the
// result is a fetch request {start, length} plus the start of the next
// stream, which becomes the fetch address of the next cycle. A stream ending
// in a return takes its next address from the return address stack; one
// ending in a call pushes the address after the stream. If both tables miss
// the predictor falls back to sequential fetching: it requests the rest of
// the current cache line and moves on to the next line.
//
// The request is offered with req_valid and taken when req_ready (FTQ not
// full); otherwise the predictor stalls on the same address.
// Committed streams (upd_valid) update the tables, and also the update
// history when upd.in_path is set: the first table always, the second table
// if the first did not hold the stream yet or the stream was mispredicted.
// A redirect loads the correct fetch address, copies the update history
// into the lookup history and repairs the stack; no request is made in that
// cycle.
// Table organisation, history and update rules follow the document; the
// line-sized sequential request, the tags and the one-cycle timing are this
// design's choices.
module next_stream_predictor
  import fetch_pkg::*;
#(
  parameter int unsigned T1_ENTRIES = 1024,
  parameter int unsigned T1_WAYS    = 4,
  parameter int unsigned T2_ENTRIES = 6144,
  parameter int unsigned T2_WAYS    = 3,
  parameter int unsigned DOLC_D     = 12,
  parameter int unsigned DOLC_O     = 2,
  parameter int unsigned DOLC_L     = 4,
  parameter int unsigned DOLC_C     = 10,
  parameter int unsigned LINE_INSTR = 32,
  parameter addr_t       RESET_PC   = '0
) (
  input  logic        clk,
  input  logic        rst_n,
  // fetch request to the FTQ
  output logic        req_valid,
  input  logic        req_ready,
  output fetch_req_t  req,
  // committed streams
  input  logic        upd_valid,
  input  stream_upd_t upd,
  // misprediction recovery
  input  logic        redirect_valid,
  input  redirect_t   redirect,
  // event reporting
  output logic        hit_t1,      // request came from the address table
  output logic        hit_t2,      // request came from the path table
  output logic        seq_fetch    // both missed, sequential request
);

  localparam int unsigned T1_IDX_W = $clog2(T1_ENTRIES / T1_WAYS);
  localparam int unsigned T2_IDX_W = $clog2(T2_ENTRIES / T2_WAYS);
  localparam int unsigned T1_TAG_W = ADDR_W - 2 - T1_IDX_W;
  localparam int unsigned T2_TAG_W = ADDR_W - 2;
  localparam int unsigned HB       = (DOLC_L > DOLC_O) ? DOLC_L : DOLC_O;
  localparam int unsigned LOFF_W   = $clog2(LINE_INSTR);

  addr_t pc;

  // ---------------- history and hashes ----------------
  logic [HB-1:0]       lk_hist [DOLC_D];
  logic [HB-1:0]       up_hist [DOLC_D];
  logic [T2_IDX_W-1:0] lk_idx2, up_idx2;
  logic                pred_fire;
  logic                pred_hit;

  path_history #(.DEPTH(DOLC_D), .HB(HB)) u_hist (
    .clk, .rst_n,
    .spec_push   (pred_fire && pred_hit),
    .spec_addr   (pc),
    .commit_push (upd_valid && upd.in_path),
    .commit_addr (upd.start),
    .restore     (redirect_valid),
    .lk_hist, .up_hist
  );

  dolc_hash #(.DEPTH(DOLC_D), .OLDER(DOLC_O), .LAST(DOLC_L), .CURRENT(DOLC_C),
              .IDX_W(T2_IDX_W)) u_hash_lk (.cur(pc), .hist(lk_hist), .idx(lk_idx2));
  dolc_hash #(.DEPTH(DOLC_D), .OLDER(DOLC_O), .LAST(DOLC_L), .CURRENT(DOLC_C),
              .IDX_W(T2_IDX_W)) u_hash_up (.cur(upd.start), .hist(up_hist), .idx(up_idx2));

  // ---------------- tables ----------------
  logic     t1_hit, t2_hit, t1_up_hit, t2_up_hit;
  len_t     t1_len, t2_len;
  br_type_e t1_bt, t2_bt;
  addr_t    t1_next, t2_next;

  stream_table #(.ENTRIES(T1_ENTRIES), .WAYS(T1_WAYS), .TAG_W(T1_TAG_W)) u_t1 (
    .clk, .rst_n,
    .lk_idx (pc[2 +: T1_IDX_W]), .lk_tag (pc[ADDR_W-1 : 2+T1_IDX_W]),
    .lk_hit (t1_hit), .lk_len (t1_len), .lk_btype (t1_bt), .lk_next (t1_next),
    .up_valid (upd_valid),
    .up_idx (upd.start[2 +: T1_IDX_W]), .up_tag (upd.start[ADDR_W-1 : 2+T1_IDX_W]),
    .up_len (upd.len), .up_btype (upd.btype), .up_next (upd.next),
    .up_alloc (1'b1), .up_hit (t1_up_hit)
  );

  stream_table #(.ENTRIES(T2_ENTRIES), .WAYS(T2_WAYS), .TAG_W(T2_TAG_W)) u_t2 (
    .clk, .rst_n,
    .lk_idx (lk_idx2), .lk_tag (pc[ADDR_W-1:2]),
    .lk_hit (t2_hit), .lk_len (t2_len), .lk_btype (t2_bt), .lk_next (t2_next),
    .up_valid (upd_valid),
    .up_idx (up_idx2), .up_tag (upd.start[ADDR_W-1:2]),
    .up_len (upd.len), .up_btype (upd.btype), .up_next (upd.next),
    .up_alloc (!t1_up_hit || upd.mispred), .up_hit (t2_up_hit)
  );

  // ---------------- return address stack ----------------
  addr_t     ras_top;
  ras_ckpt_t ras_ckpt;
  br_type_e  p_bt;
  len_t      p_len;
  addr_t     p_next, p_end;

  ras u_ras (
    .clk, .rst_n,
    .pred_valid (pred_fire), .pred_btype (p_bt), .pred_ret (p_end),
    .top (ras_top), .ckpt (ras_ckpt),
    .restore (redirect_valid), .restore_ckpt (redirect.ckpt),
    .restore_btype (redirect.btype), .restore_ret (redirect.ret_addr)
  );

  // ---------------- selection ----------------
  logic [LOFF_W:0] to_line_end;

  always_comb begin
    to_line_end = (LOFF_W+1)'(LINE_INSTR) - {1'b0, pc[2 +: LOFF_W]};
    pred_hit    = t1_hit || t2_hit;
    if (t2_hit) begin
      p_len = t2_len; p_bt = t2_bt; p_next = t2_next;
    end else if (t1_hit) begin
      p_len = t1_len; p_bt = t1_bt; p_next = t1_next;
    end else begin
      p_len = len_t'(to_line_end); p_bt = BR_NONE; p_next = '0;
    end
    p_end = pc + (addr_t'(p_len) << 2);
    if (p_bt == BR_RETURN) p_next = ras_top;
    if (!pred_hit)         p_next = p_end;
  end

  assign req_valid = !redirect_valid;
  assign req       = '{start: pc, len: p_len, ckpt: ras_ckpt};
  assign pred_fire = req_valid && req_ready;
  assign hit_t2    = pred_fire && t2_hit;
  assign hit_t1    = pred_fire && t1_hit && !t2_hit;
  assign seq_fetch = pred_fire && !pred_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              pc <= RESET_PC;
    else if (redirect_valid) pc <= redirect.target;
    else if (pred_fire)      pc <= p_next;
  end

endmodule
