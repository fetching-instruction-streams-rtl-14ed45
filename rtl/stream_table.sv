// stream_table: one set-associative table of the next stream predictor.
//
// Each entry describes one stream: a tag taken from its start address, the
// stream length, the type of its terminating branch, the start address of the
// next stream and a 2-bit saturating confidence counter. The same module is
// used for the address-indexed first table (1K entries, 4 ways) and the
// path-indexed second table (6K entries, 3 ways); the caller supplies index
// and tag.
//
// Lookup is combinational from lk_idx/lk_tag, so the table sits inside the
// one-cycle prediction loop. Update is a read-modify-write in one cycle on a
// second read port, written at the clock edge:
//   * tag hit, same length and next address: counter up (saturating at 3);
//   * tag hit, different data: counter down; when it would reach zero the
//     entry takes the new stream and the counter restarts at one;
//   * tag miss with up_alloc set: the victim way (an invalid way, else the
//     lowest counter, lowest way on a tie) is treated the same way as a
//     mismatching hit, so a confident stream survives one stranger.
// The counter rules follow the document; the victim choice on a tag miss,
// the async read and the second port are this design's own choices.
// Only the valid bits are reset.
module stream_table
  import fetch_pkg::*;
#(
  parameter int unsigned ENTRIES = 1024,
  parameter int unsigned WAYS    = 4,
  parameter int unsigned TAG_W   = ADDR_W - 2 - $clog2(ENTRIES / WAYS),
  localparam int unsigned SETS   = ENTRIES / WAYS,
  localparam int unsigned IDX_W  = $clog2(SETS),
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup port
  input  logic [IDX_W-1:0] lk_idx,
  input  logic [TAG_W-1:0] lk_tag,
  output logic             lk_hit,
  output len_t             lk_len,
  output br_type_e         lk_btype,
  output addr_t            lk_next,
  // update port
  input  logic             up_valid,
  input  logic [IDX_W-1:0] up_idx,
  input  logic [TAG_W-1:0] up_tag,
  input  len_t             up_len,
  input  br_type_e         up_btype,
  input  addr_t            up_next,
  input  logic             up_alloc,   // may take a new entry on a tag miss
  output logic             up_hit      // the stream's tag is present
);

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    len_t             len;
    br_type_e         btype;
    addr_t            next;
    logic [1:0]       cnt;
  } entry_t;

  entry_t mem   [SETS][WAYS];
  logic [SETS-1:0][WAYS-1:0] valid;

  // ---------------- lookup ----------------
  always_comb begin
    lk_hit   = 1'b0;
    lk_len   = '0;
    lk_btype = BR_JUMP;
    lk_next  = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!lk_hit && valid[lk_idx][w] && mem[lk_idx][w].tag == lk_tag) begin
        lk_hit   = 1'b1;
        lk_len   = mem[lk_idx][w].len;
        lk_btype = mem[lk_idx][w].btype;
        lk_next  = mem[lk_idx][w].next;
      end
    end
  end

  // ---------------- update ----------------
  logic [WAY_W-1:0] hit_way, vic_way, sel_way;
  logic                      vic_invalid;
  entry_t                    old_e, new_e;
  logic                      do_write;

  always_comb begin
    up_hit      = 1'b0;
    hit_way     = '0;
    vic_invalid = 1'b0;
    vic_way     = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!up_hit && valid[up_idx][w] && mem[up_idx][w].tag == up_tag) begin
        up_hit  = 1'b1;
        hit_way = w[WAY_W-1:0];
      end
    end
    // victim: first invalid way, else smallest counter
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!valid[up_idx][w]) begin
        vic_invalid = 1'b1;
        vic_way     = w[WAY_W-1:0];
      end
    end
    if (!vic_invalid) begin
      for (int w = WAYS - 1; w >= 0; w--) begin
        if (mem[up_idx][w].cnt <= mem[up_idx][vic_way].cnt)
          vic_way = w[WAY_W-1:0];
      end
    end

    sel_way  = up_hit ? hit_way : vic_way;
    old_e    = mem[up_idx][sel_way];
    new_e    = old_e;
    do_write = up_valid && (up_hit || up_alloc);
    if (up_hit && old_e.len == up_len && old_e.next == up_next) begin
      // same stream again: more confidence
      if (old_e.cnt != 2'd3) new_e.cnt = old_e.cnt + 2'd1;
      new_e.btype = up_btype;
    end else if (!up_hit && vic_invalid) begin
      new_e = '{tag: up_tag, len: up_len, btype: up_btype, next: up_next, cnt: 2'd1};
    end else if (old_e.cnt <= 2'd1) begin
      // counter reaches zero: replace, restart at one
      new_e = '{tag: up_tag, len: up_len, btype: up_btype, next: up_next, cnt: 2'd1};
    end else begin
      new_e.cnt = old_e.cnt - 2'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_write) mem[up_idx][sel_way] <= new_e;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else if (do_write) begin
      valid[up_idx][sel_way] <= 1'b1;
    end
  end

endmodule
