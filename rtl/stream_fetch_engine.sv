// stream_fetch_engine: a fetch engine that fetches whole instruction streams.
//
// An instruction stream is the run of sequential instructions from the
// target of one taken branch to the next taken branch; it may hold many
// basic blocks joined by not-taken branches. The engine has three stages:
//   1. fetch request generation: the next stream predictor turns the current
//      fetch address into a request {start, length} and the start of the next
//      stream, which is the fetch address of the next cycle; the request goes
//      into the fetch target queue (FTQ);
//   2. instruction cache access: the FTQ head start address reads one long
//      line from the instruction cache;
//   3. instruction fetch: rotate & select aligns the line to the start and
//      keeps up to FETCH_W instructions of the stream; they go to the output
//      register, and the FTQ head is advanced by the number taken.
// With LINE_BUF = 0 stages 2 and 3 share one cycle. With LINE_BUF = 1 a
// cache line buffer between them holds the line read and the part of the
// request it serves, so the cache access and rotate & select get a cycle
// each (one more cycle from FTQ to output, same bundles).
// Outputs: out_valid/out_ready hand FETCH_W slots to the back end, with the
// address of slot 0 and the return stack checkpoint of their stream. The back
// end reports committed streams (upd_*) and mispredictions (redirect_*); a
// redirect empties the FTQ and the output register in the same cycle and the
// predictor restarts at the correct address on the next.
// mem_* refill the instruction cache from the next level. ev_* pulse once per
// event for performance counting.
// The structure and the sizes are the document's (8-wide, 4-entry FTQ,
// 64KB 2-way cache with 128-byte lines, 1K/4-way and 6K/3-way tables, DOLC
// 12-2-4-10, 8-entry return stack); the handshakes are this design's.
module stream_fetch_engine
  import fetch_pkg::*;
#(
  parameter int unsigned FETCH_W     = 8,
  parameter int unsigned LINE_INSTR  = 4 * FETCH_W,
  parameter int unsigned IC_BYTES    = 65536,
  parameter int unsigned IC_WAYS     = 2,
  parameter int unsigned FTQ_DEPTH   = 4,
  parameter int unsigned T1_ENTRIES  = 1024,
  parameter int unsigned T1_WAYS     = 4,
  parameter int unsigned T2_ENTRIES  = 6144,
  parameter int unsigned T2_WAYS     = 3,
  parameter addr_t       RESET_PC    = '0,
  parameter bit          LINE_BUF    = 1'b0,
  localparam int unsigned LINE_W     = LINE_INSTR * INST_W
) (
  input  logic               clk,
  input  logic               rst_n,
  // fetched instructions to the back end
  output logic               out_valid,
  input  logic               out_ready,
  output addr_t              out_pc,
  output logic [INST_W-1:0]  out_inst [FETCH_W],
  output logic [FETCH_W-1:0] out_slot_valid,
  output ras_ckpt_t          out_ckpt,
  // from the back end
  input  logic               upd_valid,
  input  stream_upd_t        upd,
  input  logic               redirect_valid,
  input  redirect_t          redirect,
  // instruction cache refill
  output logic               mem_req,
  output addr_t              mem_req_addr,
  input  logic               mem_resp_valid,
  input  logic [LINE_W-1:0]  mem_resp_line,
  // events
  output logic               ev_hit_t1,
  output logic               ev_hit_t2,
  output logic               ev_seq_fetch,
  output logic               ev_ftq_full,
  output logic               ev_icache_miss,
  output logic               ev_head_update,   // head fetched only in part
  output logic               ev_redirect
);

  // ---------------- stage 1: next stream predictor ----------------
  logic       p_valid, p_ready;
  fetch_req_t p_req;

  next_stream_predictor #(
    .T1_ENTRIES(T1_ENTRIES), .T1_WAYS(T1_WAYS),
    .T2_ENTRIES(T2_ENTRIES), .T2_WAYS(T2_WAYS),
    .LINE_INSTR(LINE_INSTR), .RESET_PC(RESET_PC)
  ) u_nsp (
    .clk, .rst_n,
    .req_valid (p_valid), .req_ready (p_ready), .req (p_req),
    .upd_valid, .upd,
    .redirect_valid, .redirect,
    .hit_t1 (ev_hit_t1), .hit_t2 (ev_hit_t2), .seq_fetch (ev_seq_fetch)
  );

  // ---------------- FTQ ----------------
  logic       h_valid, adv, h_done, q_full;
  fetch_req_t h_req;
  len_t       n;

  ftq #(.DEPTH(FTQ_DEPTH)) u_ftq (
    .clk, .rst_n,
    .flush (redirect_valid),
    .push_valid (p_valid), .push_ready (p_ready), .push_req (p_req),
    .head_valid (h_valid), .head_req (h_req),
    .adv_valid (adv), .adv_n (n),
    .full (q_full), .head_done (h_done)
  );

  // ---------------- stage 2: instruction cache ----------------
  logic              ic_hit, ic_pending;
  logic [LINE_W-1:0] ic_line;
  logic              out_free;

  icache #(.SIZE_BYTES(IC_BYTES), .WAYS(IC_WAYS), .LINE_INSTR(LINE_INSTR)) u_ic (
    .clk, .rst_n,
    .rd_valid (h_valid && !redirect_valid), .rd_addr (h_req.start),
    .rd_hit (ic_hit), .rd_line (ic_line),
    .mem_req, .mem_req_addr, .mem_resp_valid, .mem_resp_line,
    .miss_pending (ic_pending)
  );

  // ---------------- stage 3: rotate & select ----------------
  logic [INST_W-1:0]  rs_inst [FETCH_W];
  logic [FETCH_W-1:0] rs_valid;

  rotate_select #(.FETCH_W(FETCH_W), .LINE_INSTR(LINE_INSTR)) u_rs (
    .line (ic_line), .start (h_req.start), .len (h_req.len),
    .inst (rs_inst), .slot_valid (rs_valid), .n
  );

  // bundle source for the output register, and whether it can take a line
  logic               s_valid, s_free;
  addr_t              s_pc;
  logic [INST_W-1:0]  s_inst [FETCH_W];
  logic [FETCH_W-1:0] s_slot_valid;
  ras_ckpt_t          s_ckpt;

  assign out_free = !out_valid || out_ready;
  assign adv      = h_valid && ic_hit && s_free && !redirect_valid;

  if (LINE_BUF) begin : g_line_buf
    // cache line buffer: the line and the served part of the head request
    logic              lb_valid;
    logic [LINE_W-1:0] lb_line;
    fetch_req_t        lb_req;
    len_t              lb_n;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        lb_valid <= 1'b0;
        lb_line  <= '0;
        lb_req   <= '0;
      end else if (redirect_valid) begin
        lb_valid <= 1'b0;
      end else if (s_free) begin
        lb_valid <= adv;
        if (adv) begin
          lb_line <= ic_line;
          lb_req  <= '{start: h_req.start, len: n, ckpt: h_req.ckpt};
        end
      end
    end

    rotate_select #(.FETCH_W(FETCH_W), .LINE_INSTR(LINE_INSTR)) u_rs_lb (
      .line (lb_line), .start (lb_req.start), .len (lb_req.len),
      .inst (s_inst), .slot_valid (s_slot_valid), .n (lb_n)
    );

    assign s_free  = !lb_valid || out_free;
    assign s_valid = lb_valid;
    assign s_pc    = lb_req.start;
    assign s_ckpt  = lb_req.ckpt;

    logic unused_lb;
    assign unused_lb = ^lb_n;   // equals n, already applied to the FTQ
  end else begin : g_no_line_buf
    assign s_free       = out_free;
    assign s_valid      = adv;
    assign s_pc         = h_req.start;
    assign s_inst       = rs_inst;
    assign s_slot_valid = rs_valid;
    assign s_ckpt       = h_req.ckpt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid      <= 1'b0;
      out_pc         <= '0;
      out_slot_valid <= '0;
      out_ckpt       <= '0;
      for (int i = 0; i < FETCH_W; i++) out_inst[i] <= '0;
    end else if (redirect_valid) begin
      out_valid <= 1'b0;
    end else if (out_free) begin
      out_valid <= s_valid;
      if (s_valid) begin
        out_pc         <= s_pc;
        out_inst       <= s_inst;
        out_slot_valid <= s_slot_valid;
        out_ckpt       <= s_ckpt;
      end
    end
  end

  assign ev_ftq_full    = q_full;
  assign ev_icache_miss = mem_req;
  assign ev_head_update = adv && !h_done;
  assign ev_redirect    = redirect_valid;

  // unused by the output path: whether a refill is under way
  logic unused_ok;
  assign unused_ok = ic_pending;

endmodule
