// tb_ras: checks the return address stack: calls push, returns pop, the
// checkpoint shows the state before each update, and a restore puts back
// the index and top entry and then applies the real branch's own push or
// pop. A reference stack with the same depth runs beside the block.
module tb_ras;
  import fetch_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      pred_valid, restore;
  br_type_e  pred_btype, restore_btype;
  addr_t     pred_ret, top, restore_ret;
  ras_ckpt_t ckpt, restore_ckpt;

  ras dut (.*);

  int checks = 0, failures = 0;
  addr_t ref_stk [RAS_DEPTH];
  int    ref_tos;

  task automatic check(input string what);
    checks++;
    if (top !== ref_stk[ref_tos] || ckpt.tos !== RAS_IDX_W'(ref_tos)) begin
      failures++;
      $display("FAIL %s: top=%h tos=%0d, expected %h %0d", what, top, ckpt.tos,
               ref_stk[ref_tos], ref_tos);
    end
  endtask

  task automatic pred(input br_type_e bt, input addr_t ret);
    @(negedge clk);
    pred_valid = 1; pred_btype = bt; pred_ret = ret;
    @(negedge clk);
    pred_valid = 0;
    if (bt == BR_CALL) begin ref_tos = (ref_tos + 1) % RAS_DEPTH; ref_stk[ref_tos] = ret; end
    if (bt == BR_RETURN) ref_tos = (ref_tos + RAS_DEPTH - 1) % RAS_DEPTH;
    check("after prediction");
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ras_ckpt_t saved;
  initial begin
    pred_valid = 0; restore = 0; pred_btype = BR_JUMP; pred_ret = 0;
    restore_btype = BR_JUMP; restore_ret = 0; restore_ckpt = '0;
    foreach (ref_stk[i]) ref_stk[i] = '0;
    ref_tos = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset");
    pred(BR_CALL, 'h100);
    pred(BR_CALL, 'h200);
    pred(BR_JUMP, 'h999);
    checks++;
    if (top !== 'h200) begin failures++; $display("FAIL top after two calls"); end
    // checkpoint before a wrong-path return and call
    saved = ckpt;
    pred(BR_RETURN, 0);
    pred(BR_CALL, 'h300);   // overwrites the slot that held 'h200
    // misprediction at the stream whose checkpoint was saved: its branch was
    // really a plain jump -> stack back to tos=2 with top 'h200
    @(negedge clk);
    restore = 1; restore_ckpt = saved; restore_btype = BR_JUMP;
    @(negedge clk);
    restore = 0;
    ref_tos = 2; ref_stk[2] = 'h200;
    check("restore, jump");
    checks++;
    if (top !== 'h200) begin failures++; $display("FAIL restored top %h", top); end
    // restore with a real call: push after restoring
    saved = ckpt;
    pred(BR_RETURN, 0);
    @(negedge clk);
    restore = 1; restore_ckpt = saved; restore_btype = BR_CALL; restore_ret = 'h440;
    @(negedge clk);
    restore = 0;
    ref_tos = 3; ref_stk[3] = 'h440;
    check("restore, call");
    // restore with a real return: pop after restoring
    saved = ckpt;
    pred(BR_CALL, 'h550);
    @(negedge clk);
    restore = 1; restore_ckpt = saved; restore_btype = BR_RETURN;
    @(negedge clk);
    restore = 0;
    ref_tos = 2;
    check("restore, return");
    checks++;
    if (top !== 'h200) begin failures++; $display("FAIL top after restore+return %h", top); end
    // random calls and returns, including wrap-around past the depth
    for (int t = 0; t < 200; t++) begin
      int r = $urandom % 3;
      pred(r == 0 ? BR_CALL : (r == 1 ? BR_RETURN : BR_JUMP), {$urandom, $urandom});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
