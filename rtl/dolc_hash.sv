// dolc_hash: path-correlated index for the second table of the next stream
// predictor.
//
// DOLC names the four numbers of the hash: Depth of the path history, bits
// taken from each Older stream address, bits from the Last stream address
// and bits from the Current fetch address. With the default 12-2-4-10 the
// hash gathers 10 bits of the current address, 4 bits of the last stream
// start and 2 bits of each of the 11 older stream starts, 36 bits in all,
// and folds them into IDX_W bits by XOR of IDX_W-bit slices.
// The address bits used are the low bits of the instruction (word) address.
// The numbers are the document's; which bits are taken and the XOR folding
// are this design's reading of the scheme. Purely combinational.
module dolc_hash
  import fetch_pkg::*;
#(
  parameter int unsigned DEPTH   = 12,  // stream addresses in the history
  parameter int unsigned OLDER   = 2,   // bits from each older address
  parameter int unsigned LAST    = 4,   // bits from the last address
  parameter int unsigned CURRENT = 10,  // bits from the current address
  parameter int unsigned IDX_W   = 11,  // index width produced
  localparam int unsigned HB     = (LAST > OLDER) ? LAST : OLDER,
  localparam int unsigned TOTAL  = CURRENT + LAST + (DEPTH - 1) * OLDER
) (
  input  addr_t             cur,                // current fetch address
  input  logic [HB-1:0]     hist [DEPTH],       // [0] = last stream start
  output logic [IDX_W-1:0]  idx
);

  localparam int unsigned NSLICE = (TOTAL + IDX_W - 1) / IDX_W;

  logic [NSLICE*IDX_W-1:0] bits;

  always_comb begin
    bits = '0;
    bits[CURRENT-1:0] = cur[2 +: CURRENT];
    bits[CURRENT +: LAST] = hist[0][LAST-1:0];
    for (int d = 1; d < DEPTH; d++)
      bits[CURRENT + LAST + (d - 1) * OLDER +: OLDER] = hist[d][OLDER-1:0];
    idx = '0;
    for (int s = 0; s < NSLICE; s++)
      idx ^= bits[s*IDX_W +: IDX_W];
  end

endmodule
