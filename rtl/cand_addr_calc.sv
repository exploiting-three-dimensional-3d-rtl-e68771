// Candidate-MB locator (reference MB indices and offsets).
//
// A candidate MB displaced by motion vector (mv_x, mv_y) from the current MB
// (x_mb, y_mb) overlaps at most 2x2 MBs of the reference frame.  With
// s = sign(mv) the reference MB columns are x_mb + s*floor(|mv_x|/N) and
// x_mb + s*ceil(|mv_x|/N); the smaller one is the left MB and the larger the
// right MB (likewise top and bottom for y).  The offsets are
//     off = |mv| % N        for mv >= 0
//     off = N - |mv| % N    for mv <  0
// so off ranges over 0..N.  The candidate takes the last N - y_off rows of
// the top MBs and the first y_off rows of the bottom MBs; each row takes
// pixels x_off..N-1 of the left MB followed by pixels 0..x_off-1 of the
// right MB.  need_left / need_right / need_top / need_bot flag which of the
// MBs contribute at all (1, 2 or 4 distinct MBs).  Indices are signed and
// may fall outside the frame; the caller checks that.  Combinational.
module cand_addr_calc #(
  parameter int unsigned N   = me3d_pkg::N_DEF,
  parameter int unsigned MVW = me3d_pkg::MVW_DEF,
  parameter int unsigned XW  = 7,
  parameter int unsigned YW  = 7,
  parameter int unsigned OW  = $clog2(N + 1)
) (
  input  logic [XW-1:0]         x_mb,
  input  logic [YW-1:0]         y_mb,
  input  logic signed [MVW-1:0] mv_x,
  input  logic signed [MVW-1:0] mv_y,
  output logic signed [XW:0]    left_x,
  output logic signed [XW:0]    right_x,
  output logic signed [YW:0]    top_y,
  output logic signed [YW:0]    bot_y,
  output logic [OW-1:0]         x_off,
  output logic [OW-1:0]         y_off,
  output logic                  need_left,
  output logic                  need_right,
  output logic                  need_top,
  output logic                  need_bot
);

  localparam int unsigned LN = $clog2(N);

  logic [MVW-1:0] ax, ay;          // |mv|
  logic [MVW-1:0] fx, fy, cx, cy;  // floor / ceil of |mv| / N
  logic [LN-1:0]  rx, ry;          // |mv| % N

  always_comb begin
    ax = mv_x[MVW-1] ? MVW'(-mv_x) : MVW'(mv_x);
    ay = mv_y[MVW-1] ? MVW'(-mv_y) : MVW'(mv_y);
    rx = ax[LN-1:0];
    ry = ay[LN-1:0];
    fx = ax >> LN;
    fy = ay >> LN;
    cx = fx + MVW'(rx != '0);
    cy = fy + MVW'(ry != '0);

    if (!mv_x[MVW-1]) begin
      left_x  = $signed({1'b0, x_mb}) + (XW+1)'(fx);
      right_x = $signed({1'b0, x_mb}) + (XW+1)'(cx);
      x_off   = OW'(rx);
    end else begin
      left_x  = $signed({1'b0, x_mb}) - (XW+1)'(cx);
      right_x = $signed({1'b0, x_mb}) - (XW+1)'(fx);
      x_off   = OW'(N) - OW'(rx);
    end

    if (!mv_y[MVW-1]) begin
      top_y = $signed({1'b0, y_mb}) + (YW+1)'(fy);
      bot_y = $signed({1'b0, y_mb}) + (YW+1)'(cy);
      y_off = OW'(ry);
    end else begin
      top_y = $signed({1'b0, y_mb}) - (YW+1)'(cy);
      bot_y = $signed({1'b0, y_mb}) - (YW+1)'(fy);
      y_off = OW'(N) - OW'(ry);
    end

    need_left  = (x_off != OW'(N));
    need_right = (x_off != '0);
    need_top   = (y_off != OW'(N));
    need_bot   = (y_off != '0);
  end

endmodule
