// One bit-plane sub-array of a 3D-stacked DRAM sub-bank.
//
// Bit-plane mapping: sub-array A_i of a sub-bank stores bit i of every pixel,
// so each access moves N bits (bit i of the N pixels of one MB row) and all
// sub-arrays of a sub-bank share the same row/column address.  A sub-array
// whose bit plane is not used (dynamic pixel truncation) is held idle by
// en = 0: it performs no read and its output reads as zero.
// The cell array is modelled as a WORDS x N memory addressed by
// row*COLS + col; word-line activation timing is modelled by dram_bank.
// Read data appears one cycle after rd.  A write stores wdata at addr.
module dram_subarray #(
  parameter int unsigned N     = me3d_pkg::N_DEF,
  parameter int unsigned WORDS = 65280,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          rd,
  input  logic          wr,
  input  logic [AW-1:0] addr,
  input  logic [N-1:0]  wdata,
  output logic [N-1:0]  rdata
);

  logic [N-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr) mem[addr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rd) rdata <= en ? mem[addr] : '0;
  end

endmodule
