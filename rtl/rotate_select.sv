// rotate_select: aligns a fetched cache line to the fetch request.
//
// The head request of the FTQ may start anywhere in a line. This block
// rotates the line so that the instruction at the request start becomes
// slot 0, and keeps as many slots as the fetch can deliver this cycle:
//   n = min(FETCH_W, instructions left in the line, instructions left in the
//       stream).
// Slots below n are marked valid; n is also the effective fetch width that
// updates the head of the FTQ. A stream that crosses a line boundary is
// therefore fetched in two or more cycles, one line per cycle.
// The function is the document's; the barrel shifter is the simplest way
// to do it. Purely combinational.
module rotate_select
  import fetch_pkg::*;
#(
  parameter int unsigned FETCH_W    = 8,
  parameter int unsigned LINE_INSTR = 32,
  localparam int unsigned LINE_W    = LINE_INSTR * INST_W,
  localparam int unsigned LOFF_W    = $clog2(LINE_INSTR)
) (
  input  logic [LINE_W-1:0]  line,
  input  addr_t              start,     // address of the first instruction
  input  len_t               len,       // instructions left in the stream
  output logic [INST_W-1:0]  inst  [FETCH_W],
  output logic [FETCH_W-1:0] slot_valid,
  output len_t               n          // effective fetch width
);

  logic [LOFF_W-1:0] off;
  logic [LOFF_W:0]   to_end;

  assign off    = start[2 +: LOFF_W];
  assign to_end = (LOFF_W+1)'(LINE_INSTR) - {1'b0, off};

  always_comb begin
    n = len_t'(FETCH_W);
    if (len_t'(to_end) < n) n = len_t'(to_end);
    if (len < n)            n = len;
    for (int i = 0; i < FETCH_W; i++) begin
      slot_valid[i] = (len_t'(i) < n);
      if ((LOFF_W+1)'(i) < to_end)
        inst[i] = line[(int'(off) + i) * INST_W +: INST_W];
      else
        inst[i] = '0;
    end
  end

endmodule
