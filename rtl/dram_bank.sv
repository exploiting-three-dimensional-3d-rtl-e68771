// One bank of the 3D-stacked frame DRAM (one sub-bank per bank).
//
// The bank word is one MB row of N pixels x D bits, split bit-plane-wise over
// D dram_subarray instances that share the row and column address.  Pixel p
// occupies bits [p*D +: D] of rd_data/wr_data; bit b of pixel p lives in
// sub-array b.  prec (1..D) is the number of most significant bit planes in
// use: the D - prec low sub-arrays are idle and return zeros.
//
// Word-line model: the bank keeps one word-line open (its data latched in the
// sense amplifiers).  rd_req presents a row/column address; rd_hit is high
// while that word-line is open and no write is under way.  A read is done by
// raising rd_en together with rd_hit; the data appear on rd_data one cycle
// later with rd_valid (burst access along the open word-line, one word per
// cycle).  A request to another word-line activates it, which takes T_ACT
// cycles with rd_hit low; act pulses once per activation.  rd_en is separate
// from rd_req so that a user of two banks can read both in the same cycle.
// A write (always accepted, priority over reads) closes the open word-line,
// so the next read activates again.
module dram_bank #(
  parameter int unsigned N     = me3d_pkg::N_DEF,
  parameter int unsigned D     = me3d_pkg::D_DEF,
  parameter int unsigned ROWS  = 2040,
  parameter int unsigned COLS  = me3d_pkg::S_DEF * me3d_pkg::N_DEF,
  parameter int unsigned T_ACT = me3d_pkg::TACT_DEF,
  parameter int unsigned RAW   = (ROWS > 1) ? $clog2(ROWS) : 1,
  parameter int unsigned CAW   = $clog2(COLS),
  parameter int unsigned PW    = $clog2(D + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PW-1:0]    prec,
  input  logic             rd_req,
  input  logic [RAW-1:0]   rd_row,
  input  logic [CAW-1:0]   rd_col,
  output logic             rd_hit,
  input  logic             rd_en,
  output logic             rd_valid,
  output logic [N*D-1:0]   rd_data,
  input  logic             wr_en,
  input  logic [RAW-1:0]   wr_row,
  input  logic [CAW-1:0]   wr_col,
  input  logic [N*D-1:0]   wr_data,
  output logic             act
);

  localparam int unsigned WORDS = ROWS * COLS;
  localparam int unsigned AW    = $clog2(WORDS);
  localparam int unsigned TW    = $clog2(T_ACT + 1);

  logic           open_vld;
  logic [RAW-1:0] open_row;
  logic [TW-1:0]  act_cnt;
  logic           hit;
  logic [AW-1:0]  addr;
  logic [N-1:0]   plane_wr [D];
  logic [N-1:0]   plane_rd [D];

  always_comb begin
    hit      = open_vld && (open_row == rd_row) && (act_cnt == '0);
    rd_hit   = rd_req && hit && !wr_en;
    act      = rd_req && !hit && (act_cnt == '0) && !wr_en;
    addr     = wr_en ? AW'(AW'(wr_row) * AW'(COLS) + AW'(wr_col))
                     : AW'(AW'(rd_row) * AW'(COLS) + AW'(rd_col));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open_vld <= 1'b0;
      open_row <= '0;
      act_cnt  <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= rd_en && rd_hit;
      if (wr_en) begin
        open_vld <= 1'b0;
      end else if (act) begin
        open_vld <= 1'b1;
        open_row <= rd_row;
        act_cnt  <= TW'(T_ACT);
      end else if (act_cnt != '0) begin
        act_cnt <= act_cnt - 1'b1;
      end
    end
  end

  for (genvar b = 0; b < D; b++) begin : g_plane
    for (genvar p = 0; p < N; p++) begin : g_pix
      assign plane_wr[b][p]   = wr_data[p*D + b];
      assign rd_data[p*D + b] = plane_rd[b][p];
    end
    dram_subarray #(.N(N), .WORDS(WORDS), .AW(AW)) u_sub (
      .clk   (clk),
      .en    (PW'(b) >= PW'(D) - prec),
      .rd    (rd_en && rd_hit),
      .wr    (wr_en),
      .addr  (addr),
      .wdata (plane_wr[b]),
      .rdata (plane_rd[b])
    );
  end

  // A read may only be issued on the open word-line.
  a_rd_on_hit: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> rd_hit)
    else $error("dram_bank: read issued without an open word-line");

endmodule
