// tb_path_history: checks the lookup and update path history registers.
// Speculative pushes move only the lookup register; commits move only the
// update register; a restore copies the update register (with a commit of
// the same cycle) into the lookup register, and wins over a push. The tb
// keeps its own queues of pushed addresses as the reference.
module tb_path_history;
  import fetch_pkg::*;

  localparam int D = 4, HB = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          spec_push, commit_push, restore;
  addr_t         spec_addr, commit_addr;
  logic [HB-1:0] lk_hist [D];
  logic [HB-1:0] up_hist [D];

  path_history #(.DEPTH(D), .HB(HB)) dut (.*);

  int checks = 0, failures = 0;
  logic [HB-1:0] ref_lk [D];
  logic [HB-1:0] ref_up [D];

  task automatic step(input bit sp, input int sa, input bit cp, input int ca, input bit rs);
    @(negedge clk);
    spec_push = sp; spec_addr = addr_t'(sa); commit_push = cp; commit_addr = addr_t'(ca);
    restore = rs;
    @(posedge clk);
    if (cp) begin
      for (int d = D - 1; d > 0; d--) ref_up[d] = ref_up[d-1];
      ref_up[0] = HB'(ca >> 2);
    end
    if (rs) ref_lk = ref_up;
    else if (sp) begin
      for (int d = D - 1; d > 0; d--) ref_lk[d] = ref_lk[d-1];
      ref_lk[0] = HB'(sa >> 2);
    end
    @(negedge clk);
    spec_push = 0; commit_push = 0; restore = 0;
    for (int d = 0; d < D; d++) begin
      checks += 2;
      if (lk_hist[d] !== ref_lk[d]) begin failures++; $display("FAIL lk[%0d]=%h exp %h", d, lk_hist[d], ref_lk[d]); end
      if (up_hist[d] !== ref_up[d]) begin failures++; $display("FAIL up[%0d]=%h exp %h", d, up_hist[d], ref_up[d]); end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    spec_push = 0; commit_push = 0; restore = 0; spec_addr = 0; commit_addr = 0;
    foreach (ref_lk[d]) begin ref_lk[d] = '0; ref_up[d] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: word address 1,2,3 pushed speculatively -> lk = 3,2,1,0
    step(1, 'h04, 0, 0, 0);
    step(1, 'h08, 0, 0, 0);
    step(1, 'h0c, 0, 0, 0);
    checks++;
    if (lk_hist[0] !== 4'h3 || lk_hist[2] !== 4'h1 || up_hist[0] !== 4'h0) begin
      failures++; $display("FAIL directed speculative push");
    end
    // commit of word 5 together with restore: lk becomes 5,0,0,0
    step(0, 0, 1, 'h14, 1);
    checks++;
    if (lk_hist[0] !== 4'h5 || lk_hist[1] !== 4'h0) begin
      failures++; $display("FAIL directed restore");
    end
    // random mix
    for (int t = 0; t < 300; t++)
      step($urandom % 2, $urandom, $urandom % 2, $urandom, ($urandom % 8) == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
