// MB-to-DRAM address mapping of a two-bank frame storage.
//
// A frame of FW x FH macroblocks is stored MB by MB: each bank address holds
// one N-pixel row of one MB, and the N rows of an MB occupy N consecutive
// column addresses of one word-line.  Horizontally adjacent MBs alternate
// between the two banks (bank = x % 2), so any row of a candidate MB, which
// spans at most two neighbouring MBs, is found in two different banks.  With
// s MBs per word-line and bank and the raster index i = y*FW + x:
//     bank = x % 2,   row = floor(i / (2s)),   col = ((i / 2) % s) * N.
// The column formula packs the s same-bank MBs of a word-line at distinct
// column ranges (the plain (i % s)*N form would let two MBs of one bank and
// word-line collide when s is even); this needs FW even, which is checked.
// Purely combinational.  x and y beyond the frame produce addresses that must
// not be used; the caller keeps requests inside the frame.
module mb_addr_gen #(
  parameter int unsigned N  = me3d_pkg::N_DEF,
  parameter int unsigned FW = me3d_pkg::FW_DEF,
  parameter int unsigned FH = me3d_pkg::FH_DEF,
  parameter int unsigned S  = me3d_pkg::S_DEF,
  parameter int unsigned XW = $clog2(FW),
  parameter int unsigned YW = $clog2(FH),
  parameter int unsigned ROWS = (FW * FH + 2 * S - 1) / (2 * S),
  parameter int unsigned RAW = (ROWS > 1) ? $clog2(ROWS) : 1,
  parameter int unsigned CAW = $clog2(S * N)
) (
  input  logic [XW-1:0]  x,
  input  logic [YW-1:0]  y,
  output logic           bank,
  output logic [RAW-1:0] row,
  output logic [CAW-1:0] col
);

  localparam int unsigned IW = $clog2(FW * FH) + 1;

  logic [IW-1:0] idx;

  always_comb begin
    idx  = IW'(y) * IW'(FW) + IW'(x);
    bank = x[0];
    row  = RAW'(idx / IW'(2 * S));
    col  = CAW'(((idx >> 1) % IW'(S)) * IW'(N));
  end

  initial begin
    if (FW % 2 != 0) $error("mb_addr_gen: FW must be even");
  end

endmodule
