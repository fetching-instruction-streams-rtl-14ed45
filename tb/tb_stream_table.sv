// tb_stream_table: directed test of one next stream predictor table.
// A small table (8 entries, 2 ways, 4 sets) is taken through allocation,
// confidence build-up, hysteresis (a confident stream survives two
// different updates and is replaced on the third), an update that may not
// allocate, and victim choice by lowest counter. Expected results are worked
// out by hand from the replacement rules.
module tb_stream_table;
  import fetch_pkg::*;

  localparam int unsigned TAG_W = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0]       lk_idx, up_idx;
  logic [TAG_W-1:0] lk_tag, up_tag;
  logic             lk_hit, up_valid, up_alloc, up_hit;
  len_t             lk_len, up_len;
  br_type_e         lk_btype, up_btype;
  addr_t            lk_next, up_next;

  stream_table #(.ENTRIES(8), .WAYS(2), .TAG_W(TAG_W)) dut (.*);

  int checks = 0, failures = 0;

  task automatic upd(input int idx, input int tag, input int len, input int nxt,
                     input bit alloc, input br_type_e bt = BR_JUMP);
    @(negedge clk);
    up_valid = 1; up_idx = 2'(idx); up_tag = TAG_W'(tag); up_len = len_t'(len);
    up_next = addr_t'(nxt); up_alloc = alloc; up_btype = bt;
    @(negedge clk);
    up_valid = 0;
  endtask

  task automatic chk(input int idx, input int tag, input bit hit, input int len = 0,
                     input int nxt = 0, input string what = "");
    lk_idx = 2'(idx); lk_tag = TAG_W'(tag);
    #1;
    checks++;
    if (lk_hit !== hit || (hit && (lk_len !== len_t'(len) || lk_next !== addr_t'(nxt)))) begin
      failures++;
      $display("FAIL %s: hit=%0d len=%0d next=%0h, expected hit=%0d len=%0d next=%0h",
               what, lk_hit, lk_len, lk_next, hit, len, nxt);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    up_valid = 0; up_alloc = 0; up_idx = 0; up_tag = 0; up_len = 0; up_next = 0;
    up_btype = BR_JUMP; lk_idx = 0; lk_tag = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(1, 5, 0, 0, 0, "empty after reset");
    // first appearance: allocated with counter 1
    upd(1, 5, 20, 'h400, 1);
    chk(1, 5, 1, 20, 'h400, "allocated");
    chk(1, 6, 0, 0, 0, "other tag misses");
    chk(2, 5, 0, 0, 0, "other set misses");
    // not allowed to allocate: no entry
    upd(3, 9, 7, 'h80, 0);
    chk(3, 9, 0, 0, 0, "no allocation when not allowed");
    // one different update while counter = 1: replaced at once
    upd(1, 5, 12, 'h200, 1);
    chk(1, 5, 1, 12, 'h200, "replaced at counter 1");
    // two confirmations: counter 3
    upd(1, 5, 12, 'h200, 1);
    upd(1, 5, 12, 'h200, 1);
    upd(1, 5, 12, 'h200, 1);   // saturates at 3
    // different data: 3 -> 2, 2 -> 1, data kept; then replaced
    upd(1, 5, 30, 'h900, 1);
    chk(1, 5, 1, 12, 'h200, "hysteresis 1");
    upd(1, 5, 30, 'h900, 1);
    chk(1, 5, 1, 12, 'h200, "hysteresis 2");
    upd(1, 5, 30, 'h900, 1);
    chk(1, 5, 1, 30, 'h900, "replaced when counter reaches zero");
    // second way of set 1 gets tag 7 (invalid way first)
    upd(1, 7, 3, 'h44, 1);
    chk(1, 7, 1, 3, 'h44, "second way");
    chk(1, 5, 1, 30, 'h900, "first way kept");
    // raise tag 7 to counter 2; tag 5 stays at 1
    upd(1, 7, 3, 'h44, 1);
    // a third tag: victim is the lowest counter (tag 5, counter 1) -> replaced
    upd(1, 8, 9, 'h60, 1);
    chk(1, 8, 1, 9, 'h60, "new tag took lowest-counter way");
    chk(1, 5, 0, 0, 0, "lowest-counter stream evicted");
    chk(1, 7, 1, 3, 'h44, "confident stream kept");
    // another new tag: victim tag 8 (counter 1) again
    upd(1, 9, 4, 'h70, 1);
    chk(1, 9, 1, 4, 'h70, "new tag again");
    chk(1, 7, 1, 3, 'h44, "confident stream still kept");
    // up_hit reports presence
    @(negedge clk);
    up_idx = 1; up_tag = 7; #1; checks++;
    if (!up_hit) begin failures++; $display("FAIL up_hit"); end
    up_tag = 5; #1; checks++;
    if (up_hit) begin failures++; $display("FAIL up_hit on absent tag"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
