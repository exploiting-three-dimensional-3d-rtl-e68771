// End-to-end test of the accelerator on a 6x5-MB frame, five reference
// frames and a +-8 search range.  All six frames are loaded through the
// write port; ME runs with full search, three step search, the hybrid and coarse-to-fine, with 1 to 5
// references, at full and truncated precision and at a frame corner are
// checked against the software searches of me_tb_pkg for every reference
// and for the final choice.  The test counts how often each mechanism of
// the design happened and fails if one never did: word-line activation
// stalls, two-bank (shifted) row reads, one-bank (aligned) row reads,
// split top/bottom candidates, truncated-precision reads, skipped
// out-of-frame candidates, back-to-back candidate requests, both search
// schemes, the hybrid TSS-then-FS mode, coarse-to-fine search and a win by a reference other
// than the first.
module tb_me3d_top;
  import me_tb_pkg::*;
  import me3d_pkg::*;
  localparam int FW = 6, FH = 5, M = 5, MVW = 8, R = 8, T_ACT = 2, STEPS = 3;
  localparam int XW = 3, YW = 3, LN = 4, PW = 4, FSW = 3, SADW = 16, CW = 10;

  logic clk = 0, rst_n = 0;
  logic wr_en, start, busy, done;
  logic [FSW-1:0] wr_frame, nref, best_ref;
  logic [XW-1:0] wr_x, x_mb;
  logic [YW-1:0] wr_y, y_mb;
  logic [LN-1:0] wr_r;
  logic [N*D-1:0] wr_data;
  me_alg_e alg;
  logic [PW-1:0] prec_fs;
  logic [STEPS*PW-1:0] prec_tss;
  logic signed [MVW-1:0] ref_mvx [M], ref_mvy [M], best_mvx, best_mvy;
  logic [SADW-1:0] ref_sad [M], best_sad;
  logic [CW-1:0] ref_ncand [M];
  logic [2*(M+1)-1:0] act;
  int checks = 0, failures = 0, cyc = 0;

  me3d_top #(.FW(FW), .FH(FH), .M(M), .R(R), .T_ACT(T_ACT)) dut (.*);

  always #5 clk = ~clk;

  // mechanism counters
  int n_act = 0, n_two_bank = 0, n_one_bank = 0, n_split = 0, n_trunc = 0;
  int n_skip = 0, n_b2b = 0, n_fs = 0, n_tss = 0, n_hyb = 0, n_c2f = 0, n_other_ref = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    n_act += $countones(act);
    if (dut.g_fs[1].u_fs.b_en == 2'b11) n_two_bank++;
    if (dut.g_fs[1].u_fs.b_en == 2'b01 || dut.g_fs[1].u_fs.b_en == 2'b10) n_one_bank++;
    if (dut.g_fs[1].u_fs.accept && dut.g_fs[1].u_fs.c_nt && dut.g_fs[1].u_fs.c_nb) n_split++;
    if (dut.g_fs[1].u_fs.accept && dut.fs_req_prec[1] < PW'(D)) n_trunc++;
    if (dut.g_fs[1].u_fs.accept && dut.g_fs[1].u_fs.active) n_b2b++;
    if (dut.g_me[0].u_me.state == 2'd1 && !dut.g_me[0].u_me.cand_ok) n_skip++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int xm, int ym, me_alg_e a, int nr, int pfs, int pt [8]);
    me_res_t e;
    me_res_t exp_r [M];
    int t0, bref, bsad, max_c;
    x_mb = XW'(xm); y_mb = YW'(ym); alg = a; nref = FSW'(nr); prec_fs = PW'(pfs);
    for (int k = 0; k < STEPS; k++) prec_tss[k*PW +: PW] = PW'(pt[k]);
    @(negedge clk);
    start = 1; t0 = cyc;
    @(negedge clk);
    start = 0;
    wait (done);
    bref = 0; bsad = 32'h7fffffff; max_c = 0;
    for (int k = 0; k < nr; k++) begin
      if (a == ALG_FS) exp_r[k] = full_search(k + 1, xm, ym, FW, FH, R, pfs);
      else if (a == ALG_C2F) exp_r[k] = coarse_fine(k + 1, xm, ym, FW, FH, R, pfs, W_DEF);
      else exp_r[k] = three_step(k + 1, xm, ym, FW, FH, R, pt);
      if (exp_r[k].sad < bsad) begin bsad = exp_r[k].sad; bref = k + 1; end
      if (exp_r[k].ncand > max_c) max_c = exp_r[k].ncand;
    end
    if (a == ALG_FSTSS) begin
      // hybrid: full search on the reference that won the three step round
      exp_r[bref - 1] = full_search(bref, xm, ym, FW, FH, R, pfs);
      bsad = exp_r[bref - 1].sad;
      max_c += exp_r[bref - 1].ncand;
    end
    for (int k = 0; k < nr; k++) begin
      e = exp_r[k];
      checks++;
      if (int'(ref_mvx[k]) != e.mvx || int'(ref_mvy[k]) != e.mvy || int'(ref_sad[k]) != e.sad ||
          int'(ref_ncand[k]) != e.ncand) begin
        failures++;
        $display("ref %0d: got (%0d,%0d) sad %0d n %0d, expected (%0d,%0d) sad %0d n %0d", k + 1,
                 ref_mvx[k], ref_mvy[k], ref_sad[k], ref_ncand[k], e.mvx, e.mvy, e.sad, e.ncand);
      end
    end
    checks++;
    if (int'(best_ref) != bref || int'(best_sad) != bsad ||
        best_mvx != ref_mvx[bref - 1] || best_mvy != ref_mvy[bref - 1]) begin
      failures++;
      $display("best: ref %0d sad %0d, expected ref %0d sad %0d", best_ref, best_sad, bref, bsad);
    end
    // rate: one candidate row per cycle at best, current MB first
    checks++;
    if (cyc - t0 < (max_c + 1) * N) begin
      failures++; $display("too fast: %0d cycles", cyc - t0);
    end
    if (a == ALG_FS) n_fs++; else if (a == ALG_TSS) n_tss++; else if (a == ALG_C2F) n_c2f++; else n_hyb++;
    if (bref != 1) n_other_ref++;
    $display("%s MB(%0d,%0d) %0d refs: best ref %0d mv (%0d,%0d) sad %0d, %0d cycles",
             a.name(), xm, ym, nr, best_ref, best_mvx, best_mvy, best_sad, cyc - t0);
    @(negedge clk);
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    automatic int full [8] = '{8, 8, 8, 8, 8, 8, 8, 8};
    automatic int mixed [8] = '{4, 6, 8, 8, 8, 8, 8, 8};
    wr_en = 0; wr_frame = '0; wr_x = '0; wr_y = '0; wr_r = '0; wr_data = '0;
    start = 0; x_mb = '0; y_mb = '0; alg = ALG_FS; nref = FSW'(M); prec_fs = PW'(D); prec_tss = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f <= M; f++)
      for (int y = 0; y < FH; y++)
        for (int x = 0; x < FW; x++)
          for (int r = 0; r < N; r++) begin
            @(negedge clk);
            wr_en = 1; wr_frame = FSW'(f); wr_x = XW'(x); wr_y = YW'(y); wr_r = LN'(r);
            wr_data = mb_row(f, x, y, r);
          end
    @(negedge clk); wr_en = 0;

    run(2, 2, ALG_FS, 5, 8, full);
    checks++;
    if (int'(best_ref) != EXACT_REF || best_sad != 0) begin failures++; $display("exact reference missed"); end
    run(3, 1, ALG_TSS, 5, 8, mixed);
    run(0, 0, ALG_FS, 1, 8, full);
    run(2, 3, ALG_FS, 3, 5, full);
    run(5, 4, ALG_TSS, 2, 8, full);
    run(3, 2, ALG_FSTSS, 5, 8, mixed);
    run(1, 1, ALG_FSTSS, 4, 6, full);
    run(4, 3, ALG_C2F, 5, 4, full);

    $display("mechanisms:");
    need("word-line activations", n_act);
    need("two-bank row reads", n_two_bank);
    need("one-bank row reads", n_one_bank);
    need("top/bottom split candidates", n_split);
    need("truncated-precision reads", n_trunc);
    need("skipped candidates", n_skip);
    need("back-to-back requests", n_b2b);
    need("full search runs", n_fs);
    need("three step search runs", n_tss);
    need("hybrid TSS-then-FS runs", n_hyb);
    need("coarse-to-fine runs", n_c2f);
    need("wins by a later reference", n_other_ref);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
