// Checks the candidate-MB locator by its meaning: for every pixel of the
// candidate row/column, the MB it is taken from (left/right, top/bottom) and
// the offset inside that MB must land on the displaced pixel position.
// Random and corner-case motion vectors in [-32, 32].
module tb_cand_addr_calc;
  localparam int N = 16, MVW = 8, XW = 7, YW = 7, OW = 5;

  logic [XW-1:0] x_mb;
  logic [YW-1:0] y_mb;
  logic signed [MVW-1:0] mv_x, mv_y;
  logic signed [XW:0] left_x, right_x;
  logic signed [YW:0] top_y, bot_y;
  logic [OW-1:0] x_off, y_off;
  logic nl, nr, nt, nb;
  int checks = 0, failures = 0;

  cand_addr_calc #(.N(N), .MVW(MVW), .XW(XW), .YW(YW), .OW(OW)) dut (
    .x_mb, .y_mb, .mv_x, .mv_y, .left_x, .right_x, .top_y, .bot_y,
    .x_off, .y_off, .need_left(nl), .need_right(nr), .need_top(nt), .need_bot(nb));

  task automatic check_axis(string ax, int mb, int mv, int lo, int hi, int off, bit nlo, bit nhi);
    int src_mb, src_pix, bad;
    bit use_lo, use_hi;
    bad = 0; use_lo = 0; use_hi = 0;
    if (off < 0 || off > N || hi - lo < 0 || hi - lo > 1) bad = 1;
    for (int p = 0; p < N; p++) begin
      if (p < N - off) begin src_mb = lo; src_pix = p + off; use_lo = 1; end
      else begin src_mb = hi; src_pix = p + off - N; use_hi = 1; end
      if (src_mb * N + src_pix != mb * N + mv + p) bad = 1;
    end
    if (use_lo != nlo || use_hi != nhi) bad = 1;
    checks++;
    if (bad) begin
      failures++;
      if (failures < 10) $display("%s mb=%0d mv=%0d -> lo=%0d hi=%0d off=%0d", ax, mb, mv, lo, hi, off);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mx, my;
    for (int t = 0; t < 3000; t++) begin
      x_mb = 7'(2 + $urandom_range(0, 100));
      y_mb = 7'(2 + $urandom_range(0, 60));
      if (t < 65 * 65) begin
        mx = (t % 65) - 32;
        my = ((t * 7) % 65) - 32;
      end
      mv_x = MVW'(mx);
      mv_y = MVW'(my);
      #1;
      check_axis("x", int'(x_mb), mx, int'(left_x), int'(right_x), int'(x_off), nl, nr);
      check_axis("y", int'(y_mb), my, int'(top_y), int'(bot_y), int'(y_off), nt, nb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
