// Reference models shared by the testbenches: synthetic frames, SAD, and
// software versions of full search, three step search and coarse-to-fine
// search.
//
// Frame 0 is the current frame, a pseudo-random texture base_pix(X, Y).
// Reference frame k (1..5) is the texture displaced so that the current MB
// matches it at motion vector (MVX[k], MVY[k]); references other than
// EXACT_REF also carry a small pixel noise, so that EXACT_REF holds the only
// exact match.
package me_tb_pkg;

  localparam int N = 16;
  localparam int D = 8;
  localparam int MVX [6] = '{0,  3, -6, 7, -1,  5};
  localparam int MVY [6] = '{0, -5,  2, 7, -7, -3};
  localparam int EXACT_REF = 2;

  function automatic logic [7:0] base_pix(int x, int y);
    int unsigned h;
    h = (x * 32'd1103515245) ^ (y * 32'd2654435761) ^ 32'h9e37;
    h = h ^ (h >> 13);
    h = h * 32'd2246822519;
    h = h ^ (h >> 16);
    return h[7:0];
  endfunction

  // pixel (x, y) of frame f (0 = current, k = reference k)
  function automatic logic [7:0] frame_pix(int f, int x, int y);
    logic [7:0] v;
    if (f == 0) return base_pix(x, y);
    v = base_pix(x - MVX[f], y - MVY[f]);
    if (f != EXACT_REF) v = v ^ {5'd0, base_pix(y, x)[2:0]};
    return v;
  endfunction

  // one MB row as stored in the DRAM: N pixels, pixel 0 in the low bits
  function automatic logic [N*D-1:0] mb_row(int f, int xmb, int ymb, int r);
    logic [N*D-1:0] w;
    for (int p = 0; p < N; p++) w[p*D +: D] = frame_pix(f, xmb * N + p, ymb * N + r);
    return w;
  endfunction

  function automatic logic [7:0] trunc(logic [7:0] v, int prec);
    logic [7:0] m;
    m = 8'hff << (D - prec);
    return v & m;
  endfunction

  function automatic int sad(int f, int xmb, int ymb, int mvx, int mvy, int prec);
    int s, a, b;
    s = 0;
    for (int r = 0; r < N; r++)
      for (int p = 0; p < N; p++) begin
        a = int'(trunc(frame_pix(0, xmb * N + p, ymb * N + r), prec));
        b = int'(trunc(frame_pix(f, xmb * N + mvx + p, ymb * N + mvy + r), prec));
        s += (a > b) ? a - b : b - a;
      end
    return s;
  endfunction

  function automatic bit in_frame(int xmb, int ymb, int mvx, int mvy, int fw, int fh, int rr);
    int px, py;
    px = xmb * N + mvx;
    py = ymb * N + mvy;
    return px >= 0 && py >= 0 && px <= (fw - 1) * N && py <= (fh - 1) * N &&
           mvx >= -rr && mvx <= rr && mvy >= -rr && mvy <= rr;
  endfunction

  typedef struct { int mvx; int mvy; int sad; int ncand; } me_res_t;

  function automatic me_res_t full_search(int f, int xmb, int ymb, int fw, int fh, int rr,
                                          int prec);
    me_res_t res;
    int s;
    res = '{0, 0, 32'h7fffffff, 0};
    for (int gy = -rr; gy <= rr; gy++)
      for (int gx = -rr; gx <= rr; gx++)
        if (in_frame(xmb, ymb, gx, gy, fw, fh, rr)) begin
          s = sad(f, xmb, ymb, gx, gy, prec);
          res.ncand++;
          if (s < res.sad) begin
            res.sad = s; res.mvx = gx; res.mvy = gy;
          end
        end
    return res;
  endfunction

  // coarse-to-fine: full search at precision prec, then a full-precision
  // full search of +-w around the coarse best
  function automatic me_res_t coarse_fine(int f, int xmb, int ymb, int fw, int fh, int rr,
                                          int prec, int w);
    me_res_t c, res;
    int s;
    c = full_search(f, xmb, ymb, fw, fh, rr, prec);
    res = '{0, 0, 32'h7fffffff, c.ncand};
    for (int gy = c.mvy - w; gy <= c.mvy + w; gy++)
      for (int gx = c.mvx - w; gx <= c.mvx + w; gx++)
        if (in_frame(xmb, ymb, gx, gy, fw, fh, rr)) begin
          s = sad(f, xmb, ymb, gx, gy, D);
          res.ncand++;
          if (s < res.sad) begin
            res.sad = s; res.mvx = gx; res.mvy = gy;
          end
        end
    return res;
  endfunction

  // three step search: steps of rr/2, rr/4, ..., 1; 3x3 pattern, centre first
  function automatic me_res_t three_step(int f, int xmb, int ymb, int fw, int fh, int rr,
                                         int prec [8]);
    me_res_t res;
    int cx, cy, st, k, s, bx, by, bs, x, y;
    int dxs [9] = '{0, -1, 0, 1, -1, 1, -1, 0, 1};
    int dys [9] = '{0, -1, -1, -1, 0, 0, 1, 1, 1};
    cx = 0; cy = 0; k = 0; res.ncand = 0;
    for (st = rr / 2; st >= 1; st = st / 2) begin
      bs = 32'h7fffffff; bx = cx; by = cy;
      for (int i = 0; i < 9; i++) begin
        x = cx + dxs[i] * st;
        y = cy + dys[i] * st;
        if (in_frame(xmb, ymb, x, y, fw, fh, rr)) begin
          s = sad(f, xmb, ymb, x, y, prec[k]);
          res.ncand++;
          if (s < bs) begin bs = s; bx = x; by = y; end
        end
      end
      cx = bx; cy = by; k++;
      res.sad = bs;
    end
    res.mvx = cx; res.mvy = cy;
    return res;
  endfunction

endpackage
