// tb_stream_fetch_engine: end-to-end run of the stream fetch engine with
// every parameter at its default (8-wide, 4-entry FTQ, 64KB 2-way cache with
// 128-byte lines, 1K- and 6K-entry stream tables, DOLC 12-2-4-10, 8-entry
// return stack).
//
// fetch_backend_model supplies the program (the if-then-else loop with a
// subroutine called from two sites), a checking back end and the memory.
// This bench runs 6000 cycles and counts every mechanism of the engine:
// sequential fetch after a predictor miss, hits in each table, a full FTQ,
// cache misses, partial FTQ head updates, redirects, returns predicted from
// the stack, back-end stalls and full 8-wide bundles. A mechanism that never
// happens is a failure. It also requires that, once trained (second half of
// the run), the path table predicts the every-4th-pass branch (at most 2
// redirects) and that over 3 instructions per cycle reach the back end.
//
// A second engine runs the same program with the irregular branch inside
// stream B switched on. It checks the correct path and that partial
// streams (from a redirect target inside a stream) are committed and later
// predicted when fetch is redirected to the same place.
module tb_stream_fetch_engine;
  import fetch_pkg::*;

  localparam int FW = 8, LI = 32, LW = LI * INST_W, RUN = 6000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               out_valid, out_ready, upd_valid, redirect_valid, redirect_partial;
  addr_t              out_pc, mem_req_addr;
  logic [INST_W-1:0]  out_inst [FW];
  logic [FW-1:0]      out_slot_valid;
  ras_ckpt_t          out_ckpt;
  stream_upd_t        upd;
  redirect_t          redirect;
  logic               mem_req, mem_resp_valid;
  logic [LW-1:0]      mem_resp_line;
  logic               ev_hit_t1, ev_hit_t2, ev_seq_fetch, ev_ftq_full, ev_icache_miss,
                      ev_head_update, ev_redirect;

  stream_fetch_engine dut (.*);

  int m_checks, m_failures, cyc, retired, retired_warm, redirects, redirects_warm,
      ret_ok, stalls, full_bundles, partials;

  fetch_backend_model #(.FW(FW), .LI(LI), .WARM_AT(RUN / 2)) be (
    .clk, .rst_n, .out_valid, .out_ready, .out_pc, .out_inst, .out_slot_valid, .out_ckpt,
    .upd_valid, .upd, .redirect_valid, .redirect, .redirect_partial, .mem_req, .mem_req_addr,
    .mem_resp_valid, .mem_resp_line,
    .checks (m_checks), .failures (m_failures), .cyc, .retired, .retired_warm,
    .redirects, .redirects_warm, .ret_ok, .stalls, .full_bundles, .partials
  );

  // second engine: program with the unpredictable branch
  logic               nout_valid, nout_ready, nupd_valid, nredirect_valid, nredirect_partial;
  addr_t              nout_pc, nmem_req_addr;
  logic [INST_W-1:0]  nout_inst [FW];
  logic [FW-1:0]      nout_slot_valid;
  ras_ckpt_t          nout_ckpt;
  stream_upd_t        nupd;
  redirect_t          nredirect;
  logic               nmem_req, nmem_resp_valid;
  logic [LW-1:0]      nmem_resp_line;
  logic               nev_hit_t1, nev_hit_t2, nev_unused [5];
  int n_checks, n_failures, n_cyc, n_retired, n_retired_warm, n_redirects, n_redirects_warm,
      n_ret_ok, n_stalls, n_full_bundles, n_partials;

  stream_fetch_engine dut_n (
    .clk, .rst_n, .out_valid (nout_valid), .out_ready (nout_ready), .out_pc (nout_pc),
    .out_inst (nout_inst), .out_slot_valid (nout_slot_valid), .out_ckpt (nout_ckpt),
    .upd_valid (nupd_valid), .upd (nupd), .redirect_valid (nredirect_valid),
    .redirect (nredirect), .mem_req (nmem_req), .mem_req_addr (nmem_req_addr),
    .mem_resp_valid (nmem_resp_valid), .mem_resp_line (nmem_resp_line),
    .ev_hit_t1 (nev_hit_t1), .ev_hit_t2 (nev_hit_t2), .ev_seq_fetch (nev_unused[0]),
    .ev_ftq_full (nev_unused[1]), .ev_icache_miss (nev_unused[2]),
    .ev_head_update (nev_unused[3]), .ev_redirect (nev_unused[4])
  );

  fetch_backend_model #(.FW(FW), .LI(LI), .WARM_AT(RUN / 2), .NOISY(1'b1)) be_n (
    .clk, .rst_n, .out_valid (nout_valid), .out_ready (nout_ready), .out_pc (nout_pc),
    .out_inst (nout_inst), .out_slot_valid (nout_slot_valid), .out_ckpt (nout_ckpt),
    .upd_valid (nupd_valid), .upd (nupd), .redirect_valid (nredirect_valid),
    .redirect (nredirect), .redirect_partial (nredirect_partial),
    .mem_req (nmem_req), .mem_req_addr (nmem_req_addr),
    .mem_resp_valid (nmem_resp_valid), .mem_resp_line (nmem_resp_line),
    .checks (n_checks), .failures (n_failures), .cyc (n_cyc), .retired (n_retired),
    .retired_warm (n_retired_warm), .redirects (n_redirects),
    .redirects_warm (n_redirects_warm), .ret_ok (n_ret_ok), .stalls (n_stalls),
    .full_bundles (n_full_bundles), .partials (n_partials)
  );

  int checks = 0, failures = 0;
  int n_seq = 0, n_t1 = 0, n_t2 = 0, n_full = 0, n_miss = 0, n_head = 0, n_redir = 0;
  int n_part_redir = 0, n_part_hit = 0;
  logic part_redir_d = 0;

  always @(posedge clk) if (rst_n) begin
    n_seq   += int'(ev_seq_fetch);
    n_t1    += int'(ev_hit_t1);
    n_t2    += int'(ev_hit_t2);
    n_full  += int'(ev_ftq_full);
    n_miss  += int'(ev_icache_miss);
    n_head  += int'(ev_head_update);
    n_redir += int'(ev_redirect);
    // the cycle after a redirect to a partial-stream start, the predictor
    // looks up that start
    part_redir_d <= nredirect_valid && nredirect_partial;
    n_part_redir += int'(nredirect_valid && nredirect_partial);
    if (part_redir_d && (nev_hit_t1 || nev_hit_t2)) n_part_hit++;
  end

  initial begin
    repeat (RUN + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (RUN) @(posedge clk);
    checks   = m_checks;
    failures = m_failures;
    $display("cycles=%0d retired=%0d (second half %0d) passes=%0d", cyc, retired, retired_warm, be.iter);
    $display("seq=%0d t1=%0d t2=%0d ftq_full=%0d icache_miss=%0d head_update=%0d redirect=%0d (warm %0d) ret_ok=%0d stall=%0d full_bundles=%0d",
             n_seq, n_t1, n_t2, n_full, n_miss, n_head, n_redir, redirects_warm, ret_ok, stalls, full_bundles);
    $display("irregular branch: retired=%0d redirects=%0d partial streams committed=%0d, redirects into a stream=%0d, predicted there=%0d",
             n_retired, n_redirects, n_partials, n_part_redir, n_part_hit);
    checks   += n_checks + 14;
    failures += n_failures;
    if (partials != 0) begin failures++; $display("FAIL partial stream without a mid-stream redirect"); end
    if (n_partials == 0 || n_part_hit == 0) begin
      failures++; $display("FAIL partial streams not committed or never predicted");
    end
    if (n_seq == 0)   begin failures++; $display("FAIL no sequential fetch"); end
    if (n_t1 == 0)    begin failures++; $display("FAIL no address-table prediction"); end
    if (n_t2 == 0)    begin failures++; $display("FAIL no path-table prediction"); end
    if (n_full == 0)  begin failures++; $display("FAIL FTQ never full"); end
    if (n_miss == 0)  begin failures++; $display("FAIL no cache miss"); end
    if (n_head == 0)  begin failures++; $display("FAIL no partial head update"); end
    if (n_redir < 2)  begin failures++; $display("FAIL no misprediction redirect"); end
    if (ret_ok == 0)  begin failures++; $display("FAIL no return predicted"); end
    if (stalls == 0)  begin failures++; $display("FAIL back end never stalled"); end
    if (full_bundles == 0) begin failures++; $display("FAIL never a full 8-wide bundle"); end
    if (redirects_warm > 2) begin failures++; $display("FAIL %0d redirects once warm", redirects_warm); end
    if (retired_warm < 3 * (RUN / 2)) begin
      failures++; $display("FAIL warm fetch rate %0d in %0d cycles", retired_warm, RUN / 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
