// ME engine against a real frame storage on a 6x5-MB frame with a +-8 search
// range (three TSS steps).  Full search and three step search runs, at full
// and reduced precision and at frame corners (where candidates are skipped),
// and coarse-to-fine runs (coarse pass at 3 and 4 bits) are compared with
// the software searches of me_tb_pkg: best vector, best
// SAD and number of candidates.  The run time must stay within one row per
// cycle plus the word-line activation stalls.
module tb_me_unit;
  import me_tb_pkg::*;
  import me3d_pkg::*;
  localparam int FW = 6, FH = 5, S = 2, MVW = 8, R = 8, T_ACT = 2, STEPS = 3;
  localparam int XW = 3, YW = 3, LN = 4, PW = 4, SADW = 16, CW = 10;

  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [XW-1:0] x_mb, req_x, wr_x;
  logic [YW-1:0] y_mb, req_y, wr_y;
  me_alg_e alg;
  logic [PW-1:0] prec_fs, req_prec;
  logic [STEPS*PW-1:0] prec_tss;
  logic signed [MVW-1:0] best_mvx, best_mvy, req_mvx, req_mvy;
  logic [SADW-1:0] best_sad;
  logic [CW-1:0] ncand;
  logic cur_wr, req_valid, req_ready, row_valid, row_last, wr_en, fs_busy;
  logic [LN-1:0] cur_idx, row_idx, wr_r;
  logic [N*D-1:0] cur_data, row_data, wr_data;
  logic [1:0] act;
  int checks = 0, failures = 0, cyc = 0, acts = 0;
  int frame_sel;

  me_unit #(.N(N), .D(D), .FW(FW), .FH(FH), .MVW(MVW), .R(R)) dut (.*);

  frame_storage #(.N(N), .D(D), .FW(FW), .FH(FH), .S(S), .MVW(MVW), .T_ACT(T_ACT)) u_fs (
    .clk, .rst_n, .req_valid, .req_ready, .req_x, .req_y, .req_mvx, .req_mvy, .req_prec,
    .out_valid(row_valid), .out_row(row_data), .out_idx(row_idx), .out_last(row_last),
    .wr_en, .wr_x, .wr_y, .wr_r, .wr_data, .act, .busy(fs_busy));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    acts += int'(act[0]) + int'(act[1]);
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_frame(int f);
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++)
        for (int r = 0; r < N; r++) begin
          @(negedge clk);
          wr_en = 1; wr_x = XW'(x); wr_y = YW'(y); wr_r = LN'(r); wr_data = mb_row(f, x, y, r);
        end
    @(negedge clk); wr_en = 0;
    frame_sel = f;
  endtask

  task automatic run(int xm, int ym, me_alg_e a, int pfs, int pt [8]);
    me_res_t e;
    int t0, a0, cyc_used;
    for (int r = 0; r < N; r++) begin
      @(negedge clk);
      cur_wr = 1; cur_idx = LN'(r); cur_data = mb_row(0, xm, ym, r);
    end
    @(negedge clk);
    cur_wr = 0;
    x_mb = XW'(xm); y_mb = YW'(ym); alg = a; prec_fs = PW'(pfs);
    for (int k = 0; k < STEPS; k++) prec_tss[k*PW +: PW] = PW'(pt[k]);
    start = 1;
    t0 = cyc; a0 = acts;
    @(negedge clk);
    start = 0;
    wait (done);
    cyc_used = cyc - t0;
    if (a == ALG_FS) e = full_search(frame_sel, xm, ym, FW, FH, R, pfs);
    else if (a == ALG_C2F) e = coarse_fine(frame_sel, xm, ym, FW, FH, R, pfs, W_DEF);
    else e = three_step(frame_sel, xm, ym, FW, FH, R, pt);
    checks++;
    if (int'(best_mvx) != e.mvx || int'(best_mvy) != e.mvy || int'(best_sad) != e.sad ||
        int'(ncand) != e.ncand) begin
      failures++;
      $display("%s MB(%0d,%0d): got mv (%0d,%0d) sad %0d n %0d, expected (%0d,%0d) sad %0d n %0d",
               a.name(), xm, ym, best_mvx, best_mvy, best_sad, ncand, e.mvx, e.mvy, e.sad, e.ncand);
    end
    checks++;
    if (cyc_used < e.ncand * N || cyc_used > e.ncand * N + (acts - a0) * (T_ACT + 1) + 8 * STEPS + 8) begin
      failures++;
      $display("cycle count %0d for %0d candidates, %0d activations", cyc_used, e.ncand, acts - a0);
    end
    $display("%s MB(%0d,%0d): mv (%0d,%0d) sad %0d, %0d candidates, %0d cycles", a.name(), xm, ym,
             best_mvx, best_mvy, best_sad, ncand, cyc_used);
    @(negedge clk);
  endtask

  initial begin
    automatic int full [8] = '{8, 8, 8, 8, 8, 8, 8, 8};
    automatic int mixed [8] = '{4, 6, 8, 8, 8, 8, 8, 8};
    start = 0; x_mb = '0; y_mb = '0; alg = ALG_FS; prec_fs = PW'(D); prec_tss = '0;
    cur_wr = 0; cur_idx = '0; cur_data = '0;
    wr_en = 0; wr_x = '0; wr_y = '0; wr_r = '0; wr_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    load_frame(EXACT_REF);
    run(2, 2, ALG_FS, 8, full);
    checks++;
    if (best_sad != 0 || int'(best_mvx) != MVX[EXACT_REF] || int'(best_mvy) != MVY[EXACT_REF]) begin
      failures++; $display("exact match not found");
    end
    run(2, 2, ALG_TSS, 8, full);
    run(3, 1, ALG_TSS, 8, mixed);
    run(0, 0, ALG_FS, 8, full);
    run(5, 4, ALG_TSS, 8, full);
    load_frame(1);
    run(2, 2, ALG_FS, 5, full);
    run(3, 2, ALG_TSS, 8, mixed);
    run(1, 3, ALG_FS, 8, full);
    run(1, 3, ALG_C2F, 4, full);
    run(4, 0, ALG_C2F, 3, full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
