// tb_icache: checks the default 64KB 2-way instruction cache with 128-byte
// lines. A next-level memory model answers each refill request after 15
// cycles with a line whose words are derived from their addresses
// (word = address XOR 32'h5A5A0000). Three lines that share a set test
// miss, refill, hit data, and least-recently-used replacement; one line in
// another set checks the set index. The refill latency is checked as well.
module tb_icache;
  import fetch_pkg::*;

  localparam int LI = 32, LW = LI * INST_W, LAT = 15;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          rd_valid, rd_hit, mem_req, mem_resp_valid, miss_pending;
  addr_t         rd_addr, mem_req_addr;
  logic [LW-1:0] rd_line, mem_resp_line;

  icache dut (.*);

  int checks = 0, failures = 0;

  function automatic logic [LW-1:0] line_of(input addr_t a);
    logic [LW-1:0] l;
    for (int i = 0; i < LI; i++) l[i*INST_W +: INST_W] = INST_W'(a + addr_t'(4 * i)) ^ 32'h5A5A0000;
    return l;
  endfunction

  // next-level memory model: fixed latency
  addr_t pend_addr;
  int    pend_cnt = -1;
  always @(posedge clk) begin
    mem_resp_valid <= 1'b0;
    if (mem_req) begin pend_addr <= mem_req_addr; pend_cnt <= LAT; end
    else if (pend_cnt > 1) pend_cnt <= pend_cnt - 1;
    else if (pend_cnt == 1) begin
      mem_resp_valid <= 1'b1; mem_resp_line <= line_of(pend_addr); pend_cnt <= -1;
    end
  end

  // read one address until it hits; return the cycles spent waiting
  task automatic fetch(input addr_t a, input bit exp_miss, input string what);
    int waited = 0;
    @(negedge clk);
    rd_valid = 1; rd_addr = a;
    #1;
    checks++;
    if (rd_hit === exp_miss) begin failures++; $display("FAIL %s: hit=%0d", what, rd_hit); end
    while (!rd_hit && waited < 100) begin @(negedge clk); #1; waited++; end
    checks++;
    if (rd_line !== line_of({a[ADDR_W-1:7], 7'b0})) begin failures++; $display("FAIL %s: data", what); end
    if (exp_miss) begin
      checks++;
      if (waited != LAT + 2) begin failures++; $display("FAIL %s: refill took %0d cycles", what, waited); end
    end
    @(negedge clk);   // the hit is used at one clock edge
    rd_valid = 0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  addr_t A, B, C, D;
  initial begin
    rd_valid = 0; rd_addr = 0; mem_resp_valid = 0; mem_resp_line = '0;
    A = 64'h0000_1040; B = A + 64'h8000; C = A + 64'h10000; D = 64'h0000_1100;
    repeat (2) @(posedge clk);
    rst_n = 1;
    fetch(A, 1, "A first");
    fetch(A + 8, 0, "A again");
    fetch(B, 1, "B first");
    fetch(A, 0, "A after B");        // A becomes most recent
    fetch(C, 1, "C evicts B");
    fetch(A, 0, "A kept");
    fetch(D, 1, "D other set");
    fetch(B, 1, "B was evicted");
    fetch(A, 0, "A kept (used after C)");
    fetch(C, 1, "C was least recent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
