// icache: the instruction cache, the only source of instructions.
//
// A set-associative cache (64KB, 2 ways by default) with very long lines:
// a line holds four times the fetch width, 32 instructions or 128 bytes for
// an 8-wide machine, and one whole line is read per cycle through a single
// read port. Long lines make it rare for a short stream to straddle two
// lines, and a single line read avoids the interchange network that a
// multi-banked two-line cache would need.
// Read: rd_addr is looked up combinationally and, on a hit, rd_line holds
// the line in the same cycle (a one-cycle access inside the fetch stage).
// Instruction i of the line is rd_line[i*INST_W +: INST_W].
// Miss: when rd_valid misses and no refill is pending, the cache issues a
// one-cycle mem_req with the line address and waits; the line arrives with
// mem_resp_valid and is written into the least recently used way of its set.
// Lookups go on during a refill. Sizes follow the document; the LRU policy
// and the refill handshake are this design's choices. Valid bits reset.
module icache
  import fetch_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 65536,
  parameter int unsigned WAYS       = 2,
  parameter int unsigned LINE_INSTR = 32,
  localparam int unsigned LINE_W    = LINE_INSTR * INST_W,
  localparam int unsigned OFF_W     = $clog2(LINE_INSTR * INST_BYTES),
  localparam int unsigned SETS      = SIZE_BYTES / (LINE_INSTR * INST_BYTES * WAYS),
  localparam int unsigned SET_W     = $clog2(SETS),
  localparam int unsigned TAG_W     = ADDR_W - OFF_W - SET_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // read port
  input  logic              rd_valid,
  input  addr_t             rd_addr,
  output logic              rd_hit,
  output logic [LINE_W-1:0] rd_line,
  // refill from the next memory level
  output logic              mem_req,
  output addr_t             mem_req_addr,
  input  logic              mem_resp_valid,
  input  logic [LINE_W-1:0] mem_resp_line,
  output logic              miss_pending
);

  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  logic [LINE_W-1:0] data  [SETS][WAYS];
  logic [TAG_W-1:0]  tags  [SETS][WAYS];
  logic [SETS-1:0][WAYS-1:0]  valid;
  logic [SETS-1:0][WAY_W-1:0] lru;    // way to replace next, per set

  logic [SET_W-1:0]  rd_set;
  logic [TAG_W-1:0]  rd_tag;
  logic [WAY_W-1:0]  hit_way;
  addr_t             fill_addr;
  logic [SET_W-1:0]  fill_set;

  assign rd_set = rd_addr[OFF_W +: SET_W];
  assign rd_tag = rd_addr[ADDR_W-1 -: TAG_W];

  always_comb begin
    rd_hit  = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (!rd_hit && valid[rd_set][w] && tags[rd_set][w] == rd_tag) begin
        rd_hit  = 1'b1;
        hit_way = WAY_W'(w);
      end
    rd_line = data[rd_set][hit_way];
  end

  assign mem_req      = rd_valid && !rd_hit && !miss_pending;
  assign mem_req_addr = {rd_addr[ADDR_W-1:OFF_W], OFF_W'(0)};
  assign fill_set     = fill_addr[OFF_W +: SET_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      miss_pending <= 1'b0;
      fill_addr    <= '0;
      lru          <= '0;
      valid        <= '0;
    end else begin
      if (mem_req) begin
        miss_pending <= 1'b1;
        fill_addr    <= mem_req_addr;
      end
      if (miss_pending && mem_resp_valid) begin
        miss_pending                <= 1'b0;
        valid[fill_set][lru[fill_set]] <= 1'b1;
        lru[fill_set]               <= (lru[fill_set] == WAY_W'(WAYS - 1)) ? '0 : lru[fill_set] + 1'b1;
      end else if (rd_valid && rd_hit && WAYS > 1) begin
        // the way just used becomes the most recently used
        lru[rd_set] <= (hit_way == WAY_W'(WAYS - 1)) ? '0 : hit_way + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (miss_pending && mem_resp_valid) begin
      data[fill_set][lru[fill_set]] <= mem_resp_line;
      tags[fill_set][lru[fill_set]] <= fill_addr[ADDR_W-1 -: TAG_W];
    end
  end

endmodule
