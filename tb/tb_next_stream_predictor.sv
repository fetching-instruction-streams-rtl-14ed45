// tb_next_stream_predictor: checks the cascaded next stream predictor at its
// default sizes.
//  1. After reset both tables miss: the predictor asks for the rest of the
//     cache line (32 instructions) and moves on line by line.
//  2. Path correlation: stream X (at 'h40C) is 5 instructions long with
//     next 'h814 when reached from P1 ('h104), and 9 long with next 'hC1C
//     when reached from P2 ('h208). The loop P1 X Y1 P2 X Y2 is committed
//     several times with X flagged as mispredicted, which upgrades it to the
//     path-indexed table. After a redirect to P1 the predicted sequence must
//     follow the loop, X each time with the right length, from the path
//     table.
//  3. Call and return: a call stream pushes the address after it and the
//     return stream takes its next address from the stack.
//  4. With req_ready low the predictor holds its request.
//  5. A stream committed with in_path clear leaves the update history as it
//     was; the partial stream committed after it enters the history and is
//     predicted when fetch is redirected to its start.
module tb_next_stream_predictor;
  import fetch_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        req_valid, req_ready, upd_valid, redirect_valid, hit_t1, hit_t2, seq_fetch;
  fetch_req_t  req;
  stream_upd_t upd;
  redirect_t   redirect;

  next_stream_predictor dut (.*);

  int checks = 0, failures = 0, t2_hits = 0;
  always @(posedge clk) if (hit_t2) t2_hits++;

  task automatic commit(input int s, input int l, input br_type_e bt, input int nx, input bit mp,
                        input bit ip = 1'b1);
    @(negedge clk);
    upd_valid = 1;
    upd = '{start: addr_t'(s), len: len_t'(l), btype: bt, next: addr_t'(nx), mispred: mp,
           in_path: ip};
    @(negedge clk);
    upd_valid = 0;
  endtask

  task automatic redir(input int t);
    @(negedge clk);
    redirect_valid = 1;
    redirect = '0;
    redirect.target = addr_t'(t);
    redirect.btype = BR_JUMP;
    redirect.ckpt = req.ckpt;
    @(negedge clk);
    redirect_valid = 0;
  endtask

  // expect the request of this cycle, then let it go
  task automatic expect_req(input int s, input int l, input string what);
    #1;
    checks++;
    if (!req_valid || req.start !== addr_t'(s) || req.len !== len_t'(l)) begin
      failures++;
      $display("FAIL %s: req %0d %h/%0d, expected %h/%0d", what, req_valid, req.start, req.len, s, l);
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_ready = 0; upd_valid = 0; redirect_valid = 0; upd = '0; redirect = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // 4. stall: nothing moves while req_ready is low
    repeat (3) @(negedge clk);
    expect_req('h0, 32, "stalled request");
    // 1. sequential fetch after reset
    req_ready = 1;
    expect_req('h0, 32, "sequential 1");
    checks++; if (!seq_fetch) begin failures++; $display("FAIL seq flag"); end
    expect_req('h80, 32, "sequential 2");
    req_ready = 0;
    // 2. path correlation training
    for (int k = 0; k < 6; k++) begin
      commit('h104, 4, BR_JUMP, 'h40C, 0);
      commit('h40C, 5, BR_JUMP, 'h814, 1);
      commit('h814, 3, BR_JUMP, 'h208, 0);
      commit('h208, 4, BR_JUMP, 'h40C, 0);
      commit('h40C, 9, BR_JUMP, 'hC1C, 1);
      commit('hC1C, 2, BR_JUMP, 'h104, 0);
    end
    redir('h104);
    req_ready = 1;
    t2_hits = 0;
    for (int k = 0; k < 2; k++) begin
      expect_req('h104, 4, "P1");
      expect_req('h40C, 5, "X after P1");
      expect_req('h814, 3, "Y1");
      expect_req('h208, 4, "P2");
      expect_req('h40C, 9, "X after P2");
      expect_req('hC1C, 2, "Y2");
    end
    checks++;
    if (t2_hits < 4) begin failures++; $display("FAIL path table hits %0d", t2_hits); end
    req_ready = 0;
    // 3. call and return
    commit('h3020, 6, BR_CALL, 'h5040, 0);     // call at 'h3034, returns to 'h3038
    commit('h5040, 10, BR_RETURN, 'h3038, 0);
    commit('h3038, 4, BR_JUMP, 'h104, 0);
    redir('h3020);
    req_ready = 1;
    expect_req('h3020, 6, "call stream");
    expect_req('h5040, 10, "callee ending in return");
    expect_req('h3038, 4, "after return");
    req_ready = 0;
    // the return target comes from the stack, not the table: a call from a
    // second site returns there
    commit('h6060, 2, BR_CALL, 'h5040, 0);
    redir('h6060);
    req_ready = 1;
    expect_req('h6060, 2, "second call site");
    expect_req('h5040, 10, "callee again");
    checks++;
    #1;
    if (req.start !== addr_t'('h6068)) begin
      failures++; $display("FAIL return to second call site: %h", req.start);
    end
    req_ready = 0;
    // 5. a stream committed off the fetch path (in_path clear) trains the
    // tables but leaves the update history alone; the partial stream after
    // it is shifted in
    begin
      logic [$bits(dut.up_hist)-1:0] h0, h1;
      h0 = {>>{dut.up_hist}};
      commit('h104, 40, BR_JUMP, 'h40C, 1, 1'b0);
      h1 = {>>{dut.up_hist}};
      checks++;
      if (h1 !== h0) begin failures++; $display("FAIL off-path stream shifted the history"); end
      commit('h124, 32, BR_JUMP, 'h40C, 0, 1'b1);
      h1 = {>>{dut.up_hist}};
      checks++;
      if (h1 === h0) begin failures++; $display("FAIL partial stream not in the history"); end
      redir('h124);
      req_ready = 1;
      expect_req('h124, 32, "partial stream predicted at the redirect target");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
