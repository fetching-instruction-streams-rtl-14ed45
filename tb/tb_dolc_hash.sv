// tb_dolc_hash: checks the DOLC path hash with the default 12-2-4-10 numbers
// and an 11-bit index. The expected index is built bit by bit: bit k of the
// 36-bit path word comes from the current address (k < 10), the last stream
// (10..13) or older stream j (2 bits each), and index bit b is the XOR of
// every path bit k with k mod 11 == b. One hand-worked vector, then random.
module tb_dolc_hash;
  import fetch_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  addr_t       cur;
  logic [3:0]  hist [12];
  logic [10:0] idx;

  dolc_hash #(.DEPTH(12), .OLDER(2), .LAST(4), .CURRENT(10), .IDX_W(11)) dut (.*);

  int checks = 0, failures = 0;

  function automatic logic [10:0] ref_idx(input addr_t c, input logic [3:0] h [12]);
    logic [10:0] r = '0;
    logic        b;
    for (int k = 0; k < 36; k++) begin
      if (k < 10)      b = c[2 + k];
      else if (k < 14) b = h[0][k - 10];
      else             b = h[1 + (k - 14) / 2][(k - 14) % 2];
      r[k % 11] ^= b;
    end
    return r;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // hand-worked: only current word address bit 0 and last-stream bit 1 set
    cur = 64'h4;                 // word address 1 -> path bit 0
    foreach (hist[d]) hist[d] = '0;
    hist[0] = 4'b0010;           // path bit 11 -> index bit 0
    #1; checks++;
    if (idx !== 11'h000) begin failures++; $display("FAIL hand vector 1: %h", idx); end
    hist[0] = 4'b0100;           // path bit 12 -> index bit 1
    #1; checks++;
    if (idx !== 11'h003) begin failures++; $display("FAIL hand vector 2: %h", idx); end
    hist[0] = 4'b0000; hist[11] = 4'b0011;   // path bits 34,35 -> index 1,2
    #1; checks++;
    if (idx !== 11'h007) begin failures++; $display("FAIL hand vector 3: %h", idx); end
    for (int t = 0; t < 500; t++) begin
      cur = {$urandom, $urandom};
      foreach (hist[d]) hist[d] = 4'($urandom);
      #1; checks++;
      if (idx !== ref_idx(cur, hist)) begin
        failures++;
        $display("FAIL random %0d: %h vs %h", t, idx, ref_idx(cur, hist));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
