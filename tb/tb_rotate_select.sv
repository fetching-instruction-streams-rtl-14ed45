// tb_rotate_select: checks alignment and selection at the default 8-wide
// fetch and 32-instruction lines. Each line word holds its own index, so the
// expected slot i is simply offset+i; the expected count is the minimum of
// the fetch width, the instructions to the line end and the stream length.
// Includes the case of a 3-instruction stream split across a line end.
module tb_rotate_select;
  import fetch_pkg::*;

  localparam int FW = 8, LI = 32;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [LI*INST_W-1:0] line;
  addr_t                start;
  len_t                 len, n;
  logic [INST_W-1:0]    inst [FW];
  logic [FW-1:0]        slot_valid;

  rotate_select #(.FETCH_W(FW), .LINE_INSTR(LI)) dut (.*);

  int checks = 0, failures = 0;

  task automatic try(input int off, input int l);
    int exp_n;
    start = addr_t'('h1000 + off * 4);
    len   = len_t'(l);
    #1;
    exp_n = FW;
    if (LI - off < exp_n) exp_n = LI - off;
    if (l < exp_n) exp_n = l;
    checks++;
    if (n !== len_t'(exp_n)) begin
      failures++; $display("FAIL n off=%0d len=%0d: %0d exp %0d", off, l, n, exp_n);
    end
    for (int i = 0; i < FW; i++) begin
      checks++;
      if (slot_valid[i] !== (i < exp_n) || (i < exp_n && inst[i] !== INST_W'(32'hA000 + off + i))) begin
        failures++; $display("FAIL slot %0d off=%0d len=%0d: %h", i, off, l, inst[i]);
      end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < LI; i++) line[i*INST_W +: INST_W] = INST_W'(32'hA000 + i);
    try(0, 100);    // full width from the line start
    try(30, 3);     // 3-instruction stream crossing the line end: 2 now
    try(5, 3);      // short stream inside the line
    try(27, 20);    // line end limits
    for (int t = 0; t < 400; t++) try($urandom % LI, 1 + $urandom % 60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
