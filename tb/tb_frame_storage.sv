// Frame storage on a 6x4-MB frame: loads a synthetic frame through the write
// port, then requests candidates (random vectors, vectors that are multiples
// of N, and the zero vector) and checks every delivered row against the
// frame model.  Timing checks: the first row comes two cycles after the
// request is accepted when the word-lines are open, a candidate already open
// streams N rows in N consecutive cycles, back-to-back candidates leave no
// gap, and reduced precision zeroes the low bit planes.
module tb_frame_storage;
  import me_tb_pkg::*;
  localparam int FW = 6, FH = 4, S = 2, MVW = 8, T_ACT = 2;
  localparam int XW = 3, YW = 2, LN = 4, PW = 4;

  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready;
  logic [XW-1:0] req_x, wr_x;
  logic [YW-1:0] req_y, wr_y;
  logic signed [MVW-1:0] req_mvx, req_mvy;
  logic [PW-1:0] req_prec;
  logic out_valid, out_last, wr_en, busy;
  logic [N*D-1:0] out_row, wr_data;
  logic [LN-1:0] out_idx, wr_r;
  logic [1:0] act;
  int checks = 0, failures = 0, cyc = 0, acts = 0;

  frame_storage #(.N(N), .D(D), .FW(FW), .FH(FH), .S(S), .MVW(MVW), .T_ACT(T_ACT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    acts += int'(act[0]) + int'(act[1]);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected candidate queue
  typedef struct { int x; int y; int mvx; int mvy; int prec; } cand_t;
  cand_t q [$];
  int row_n = 0, last_row_cyc = -1, rows_seen = 0, gaps = 0;

  // checker
  always @(posedge clk) if (rst_n && out_valid) begin
    cand_t c;
    logic [N*D-1:0] e;
    c = q[0];
    for (int p = 0; p < N; p++)
      e[p*D +: D] = trunc(frame_pix(1, c.x * N + c.mvx + p, c.y * N + c.mvy + row_n), c.prec);
    checks++;
    if (out_row !== e || int'(out_idx) != row_n || out_last != (row_n == N - 1)) begin
      failures++;
      if (failures < 10) $display("cand (%0d,%0d) mv (%0d,%0d) row %0d: got %h exp %h", c.x, c.y, c.mvx, c.mvy, row_n, out_row, e);
    end
    if (last_row_cyc >= 0 && cyc != last_row_cyc + 1) gaps++;
    last_row_cyc = cyc;
    rows_seen++;
    if (row_n == N - 1) begin
      row_n = 0;
      void'(q.pop_front());
    end else row_n++;
  end

  task automatic request(int x, int y, int mvx, int mvy, int prec);
    req_valid = 1; req_x = XW'(x); req_y = YW'(y);
    req_mvx = MVW'(mvx); req_mvy = MVW'(mvy); req_prec = PW'(prec);
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    q.push_back('{x, y, mvx, mvy, prec});
    #1 req_valid = 0;
  endtask

  function automatic bit ok(int x, int y, int mvx, int mvy);
    return x * N + mvx >= 0 && y * N + mvy >= 0 &&
           x * N + mvx <= (FW - 1) * N && y * N + mvy <= (FH - 1) * N;
  endfunction

  initial begin
    int t0, a0;
    req_valid = 0; req_x = '0; req_y = '0; req_mvx = '0; req_mvy = '0; req_prec = PW'(D);
    wr_en = 0; wr_x = '0; wr_y = '0; wr_r = '0; wr_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++)
        for (int r = 0; r < N; r++) begin
          @(negedge clk);
          wr_en = 1; wr_x = XW'(x); wr_y = YW'(y); wr_r = LN'(r); wr_data = mb_row(1, x, y, r);
        end
    @(negedge clk); wr_en = 0;

    // zero vector twice: second time its word-line is open
    request(2, 1, 0, 0, D);
    wait (q.size() == 0);
    @(negedge clk);
    a0 = acts;
    t0 = cyc;
    last_row_cyc = -1; gaps = 0;
    request(2, 1, 0, 0, D);
    wait (out_valid);
    checks++;
    if (cyc - t0 != 2) begin failures++; $display("first-row latency %0d", cyc - t0); end
    wait (q.size() == 0);
    checks++;
    if (gaps != 0 || acts != a0) begin failures++; $display("open word-line candidate: gaps %0d acts %0d", gaps, acts - a0); end

    // back-to-back candidates inside one MB pair: no gap between candidates
    @(negedge clk);
    last_row_cyc = -1; gaps = 0;
    fork
      begin
        request(2, 1, 0, 0, D);
        request(2, 1, 0, 0, D);
        request(2, 1, 0, 0, D);
      end
    join
    wait (q.size() == 0);
    checks++;
    if (gaps != 0) begin failures++; $display("gaps between back-to-back candidates: %0d", gaps); end

    // random candidates, random precision, plus multiples of N
    for (int t = 0; t < 400; t++) begin
      int x, y, mx, my, p;
      do begin
        x = $urandom_range(0, FW - 1);
        y = $urandom_range(0, FH - 1);
        if (t % 5 == 0) begin
          mx = 16 * ($urandom_range(0, 4) - 2);
          my = 16 * ($urandom_range(0, 4) - 2);
        end else begin
          mx = $urandom_range(0, 64) - 32;
          my = $urandom_range(0, 64) - 32;
        end
      end while (!ok(x, y, mx, my));
      p = (t % 3 == 0) ? $urandom_range(1, D) : D;
      request(x, y, mx, my, p);
    end
    wait (q.size() == 0);
    repeat (3) @(negedge clk);
    checks++;
    if (rows_seen != N * 405) begin failures++; $display("rows seen %0d", rows_seen); end
    $display("frame_storage: %0d rows, %0d activations, %0d cycles", rows_seen, acts, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
