// tb_ftq: checks the fetch target queue. Requests are pushed in random
// order of valid and stall; the head is consumed a random number of
// instructions at a time, and the tb checks that the head start advances by
// the instructions taken, the length shrinks by as many, requests retire
// when their length reaches zero, order is kept, ready drops at DEPTH
// entries, and flush empties the queue. A tb-side queue is the reference.
module tb_ftq;
  import fetch_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       flush, push_valid, push_ready, head_valid, adv_valid, full, head_done;
  fetch_req_t push_req, head_req;
  len_t       adv_n;

  ftq #(.DEPTH(4)) dut (.*);

  int checks = 0, failures = 0;
  fetch_req_t ref_q [$];
  int full_seen = 0, partial_seen = 0, retired = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int next_id = 1;
  initial begin
    flush = 0; push_valid = 0; adv_valid = 0; adv_n = 0; push_req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // compare the head and the flags with the reference
      checks++;
      if (head_valid !== (ref_q.size() > 0) || full !== (ref_q.size() == 4) ||
          push_ready !== (ref_q.size() < 4)) begin
        failures++; $display("FAIL flags at %0d: size %0d", cyc, ref_q.size());
      end
      if (ref_q.size() > 0) begin
        checks++;
        if (head_req.start !== ref_q[0].start || head_req.len !== ref_q[0].len) begin
          failures++;
          $display("FAIL head at %0d: %h/%0d exp %h/%0d", cyc, head_req.start,
                   head_req.len, ref_q[0].start, ref_q[0].len);
        end
      end
      if (full) full_seen++;
      // drive this cycle
      push_valid = ($urandom % 3) != 0;
      push_req = '0;
      push_req.start = addr_t'(next_id) << 12;
      push_req.len   = len_t'(1 + $urandom % 40);
      flush = (cyc % 500) == 499;
      adv_valid = (ref_q.size() > 0) && ($urandom % 4 != 0);
      adv_n = (ref_q.size() > 0) ? len_t'(1 + $urandom % ref_q[0].len) : '0;
      @(posedge clk);
      // reference update
      if (flush) ref_q.delete();
      else begin
        if (adv_valid) begin
          if (adv_n == ref_q[0].len) begin void'(ref_q.pop_front()); retired++; end
          else begin
            ref_q[0].start += addr_t'(adv_n) << 2;
            ref_q[0].len -= adv_n;
            partial_seen++;
          end
        end
        if (push_valid && push_ready) begin
          ref_q.push_back(push_req);
          next_id++;
        end
      end
    end
    checks++;
    if (full_seen == 0 || partial_seen == 0 || retired == 0) begin
      failures++; $display("FAIL coverage full=%0d partial=%0d retired=%0d", full_seen, partial_seen, retired);
    end
    $display("full=%0d partial=%0d retired=%0d", full_seen, partial_seen, retired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
