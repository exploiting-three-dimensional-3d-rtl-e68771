// Two-bank frame storage with per-row DRAM-to-logic delivery.
//
// One frame of FW x FH MBs lives in two dram_bank instances, horizontally
// adjacent MBs in alternate banks (mapping of mb_addr_gen).  An ME unit asks
// for a candidate MB by giving only the current MB index and the motion
// vector; the storage itself works out the up-to-four reference MBs and the
// offsets (cand_addr_calc), walks the N candidate rows, and for each row reads
// the needed N-pixel row of the left and/or right MB from the two banks in
// the same cycle.  Candidate row r comes from the top MBs, MB row y_off + r,
// while r < N - y_off, and from the bottom MBs, MB row r - (N - y_off), after
// that.  The two bank words are merged by row_combiner (barrel shifters).
// Only the banks whose MB contributes are read.
//
// Interface and timing: a request (req_valid/req_ready) carries x_mb, y_mb,
// mv_x, mv_y and the pixel precision req_prec (bit planes in use, 1..D).
// Rows come out on out_row with out_valid, out_idx (0..N-1) and out_last, one
// row per cycle while the needed word-lines are open; a word-line change
// stalls the row walk for the bank's activation time.  The output cannot be
// stalled: the consumer takes each row in the cycle it is valid.  A new
// request is accepted in the cycle the last row of the previous one is
// issued, so candidates stream back to back.  First row appears two cycles
// after acceptance when its word-lines are open.  The candidate must lie
// inside the frame (checked by an assertion).
// The write port stores one MB row (wr_x, wr_y, wr_r) of N pixels; writes
// take priority over reads.
module frame_storage #(
  parameter int unsigned N     = me3d_pkg::N_DEF,
  parameter int unsigned D     = me3d_pkg::D_DEF,
  parameter int unsigned FW    = me3d_pkg::FW_DEF,
  parameter int unsigned FH    = me3d_pkg::FH_DEF,
  parameter int unsigned S     = me3d_pkg::S_DEF,
  parameter int unsigned MVW   = me3d_pkg::MVW_DEF,
  parameter int unsigned T_ACT = me3d_pkg::TACT_DEF,
  parameter int unsigned XW    = $clog2(FW),
  parameter int unsigned YW    = $clog2(FH),
  parameter int unsigned LN    = $clog2(N),
  parameter int unsigned PW    = $clog2(D + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // candidate request
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic [XW-1:0]         req_x,
  input  logic [YW-1:0]         req_y,
  input  logic signed [MVW-1:0] req_mvx,
  input  logic signed [MVW-1:0] req_mvy,
  input  logic [PW-1:0]         req_prec,
  // candidate rows
  output logic                  out_valid,
  output logic [N*D-1:0]        out_row,
  output logic [LN-1:0]         out_idx,
  output logic                  out_last,
  // frame load
  input  logic                  wr_en,
  input  logic [XW-1:0]         wr_x,
  input  logic [YW-1:0]         wr_y,
  input  logic [LN-1:0]         wr_r,
  input  logic [N*D-1:0]        wr_data,
  // status
  output logic [1:0]            act,
  output logic                  busy
);

  localparam int unsigned ROWS = (FW * FH + 2 * S - 1) / (2 * S);
  localparam int unsigned RAW  = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned CAW  = $clog2(S * N);
  localparam int unsigned OW   = $clog2(N + 1);

  // ---- request decode -------------------------------------------------
  logic signed [XW:0] c_left, c_right;
  logic signed [YW:0] c_top, c_bot;
  logic [OW-1:0]      c_xoff, c_yoff;
  logic               c_nl, c_nr, c_nt, c_nb;

  cand_addr_calc #(.N(N), .MVW(MVW), .XW(XW), .YW(YW), .OW(OW)) u_calc (
    .x_mb(req_x), .y_mb(req_y), .mv_x(req_mvx), .mv_y(req_mvy),
    .left_x(c_left), .right_x(c_right), .top_y(c_top), .bot_y(c_bot),
    .x_off(c_xoff), .y_off(c_yoff),
    .need_left(c_nl), .need_right(c_nr), .need_top(c_nt), .need_bot(c_nb)
  );

  // ---- row walk state -------------------------------------------------
  logic          active;
  logic [LN-1:0] r;
  logic [XW-1:0] s_left, s_right;
  logic [YW-1:0] s_top, s_bot;
  logic [OW-1:0] s_xoff, s_yoff;
  logic          s_nl, s_nr;
  logic [PW-1:0] s_prec;

  logic          in_top;
  logic [YW-1:0] mb_y;
  logic [LN-1:0] mrow;
  logic          bl, br;
  logic [RAW-1:0] rowl, rowr;
  logic [CAW-1:0] coll, colr;
  logic [1:0]     b_req, b_hit, b_en, b_valid;
  logic [RAW-1:0] b_row [2];
  logic [CAW-1:0] b_col [2];
  logic [N*D-1:0] b_data [2];
  logic           advance, last, accept;

  mb_addr_gen #(.N(N), .FW(FW), .FH(FH), .S(S), .XW(XW), .YW(YW),
                .ROWS(ROWS), .RAW(RAW), .CAW(CAW)) u_addr_l (
    .x(s_left), .y(mb_y), .bank(bl), .row(rowl), .col(coll));

  mb_addr_gen #(.N(N), .FW(FW), .FH(FH), .S(S), .XW(XW), .YW(YW),
                .ROWS(ROWS), .RAW(RAW), .CAW(CAW)) u_addr_r (
    .x(s_right), .y(mb_y), .bank(br), .row(rowr), .col(colr));

  always_comb begin
    in_top = ({1'b0, r} < (OW'(N) - s_yoff));
    mb_y   = in_top ? s_top : s_bot;
    mrow   = in_top ? LN'(s_yoff + OW'(r)) : LN'(OW'(r) - (OW'(N) - s_yoff));
  end

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      b_req[b] = 1'b0;
      b_row[b] = rowl;
      b_col[b] = coll + CAW'(mrow);
      if (active && s_nl && (bl == b[0])) begin
        b_req[b] = 1'b1;
      end
      if (active && s_nr && (br == b[0])) begin
        b_req[b] = 1'b1;
        b_row[b] = rowr;
        b_col[b] = colr + CAW'(mrow);
      end
    end

    advance   = active && ((b_req & ~b_hit) == 2'b00);
    b_en      = advance ? b_req : 2'b00;
    last      = (r == LN'(N - 1));
    req_ready = !active || (advance && last);
    accept    = req_valid && req_ready;
    busy      = active;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      r       <= '0;
      s_left  <= '0;
      s_right <= '0;
      s_top   <= '0;
      s_bot   <= '0;
      s_xoff  <= '0;
      s_yoff  <= '0;
      s_nl    <= 1'b0;
      s_nr    <= 1'b0;
      s_prec  <= PW'(D);
    end else begin
      if (accept) begin
        active  <= 1'b1;
        r       <= '0;
        s_left  <= XW'(c_left);
        s_right <= XW'(c_right);
        s_top   <= YW'(c_top);
        s_bot   <= YW'(c_bot);
        s_xoff  <= c_xoff;
        s_yoff  <= c_yoff;
        s_nl    <= c_nl;
        s_nr    <= c_nr;
        s_prec  <= req_prec;
      end else if (advance) begin
        r <= r + 1'b1;
        if (last) active <= 1'b0;
      end
    end
  end

  // ---- banks ------------------------------------------------------------
  logic           wbank;
  logic [RAW-1:0] wrow;
  logic [CAW-1:0] wcol;

  mb_addr_gen #(.N(N), .FW(FW), .FH(FH), .S(S), .XW(XW), .YW(YW),
                .ROWS(ROWS), .RAW(RAW), .CAW(CAW)) u_addr_w (
    .x(wr_x), .y(wr_y), .bank(wbank), .row(wrow), .col(wcol));

  for (genvar b = 0; b < 2; b++) begin : g_bank
    dram_bank #(.N(N), .D(D), .ROWS(ROWS), .COLS(S * N), .T_ACT(T_ACT),
                .RAW(RAW), .CAW(CAW), .PW(PW)) u_bank (
      .clk(clk), .rst_n(rst_n), .prec(s_prec),
      .rd_req(b_req[b]), .rd_row(b_row[b]), .rd_col(b_col[b]),
      .rd_hit(b_hit[b]), .rd_en(b_en[b]),
      .rd_valid(b_valid[b]), .rd_data(b_data[b]),
      .wr_en(wr_en && (wbank == b[0])), .wr_row(wrow),
      .wr_col(wcol + CAW'(wr_r)), .wr_data(wr_data),
      .act(act[b]));
  end

  // ---- output stage: one cycle behind the bank read ------------------------
  logic          p_valid, p_last;
  logic [LN-1:0] p_idx;
  logic          p_bl, p_br;
  logic [OW-1:0] p_xoff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid <= 1'b0;
      p_last  <= 1'b0;
      p_idx   <= '0;
      p_bl    <= 1'b0;
      p_br    <= 1'b0;
      p_xoff  <= '0;
    end else begin
      p_valid <= advance;
      p_last  <= advance && last;
      p_idx   <= r;
      p_bl    <= bl;
      p_br    <= br;
      p_xoff  <= s_xoff;
    end
  end

  row_combiner #(.N(N), .D(D), .OW(OW)) u_comb (
    .left_row (b_data[p_bl]),
    .right_row(b_data[p_br]),
    .x_off    (p_xoff),
    .cand_row (out_row)
  );

  assign out_valid = p_valid;
  assign out_idx   = p_idx;
  assign out_last  = p_last;

  // Every bank that was read delivers its word in the output cycle.
  logic [1:0] p_read;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p_read <= '0;
    else        p_read <= b_en;
  end
  a_bank_data: assert property (@(posedge clk) disable iff (!rst_n)
      (b_valid == p_read))
    else $error("frame_storage: bank data missing");

  // A candidate covers at least one MB row band and one MB column band.
  a_need: assert property (@(posedge clk) disable iff (!rst_n)
      accept |-> (c_nt || c_nb) && (c_nl || c_nr))
    else $error("frame_storage: empty candidate");

  // The candidate MB must lie inside the stored frame.
  a_in_frame: assert property (@(posedge clk) disable iff (!rst_n)
      accept |-> (c_left >= 0) && (c_top >= 0) &&
                 (int'(c_right) < int'(FW)) && (int'(c_bot) < int'(FH)))
    else $error("frame_storage: candidate outside the frame (%0d,%0d)-(%0d,%0d)", c_left, c_top, c_right, c_bot);

endmodule
