// Full-size run of the accelerator with every parameter at its default:
// 1920x1088 frames (120x68 MBs of 16x16), 8-bit pixels, five reference
// frames in 12 DRAM banks, 80x80 search region (vectors -32..+32).
// All six frames (2 MB each) are written through the load port, then one
// MB is estimated with full search, with a five-step three step search
// whose first step uses 4-bit pixels, and with the hybrid (TSS on all five
// references, then full search on the best one) and with coarse-to-fine
// search (4-bit full search, then 8 bits around the coarse best).  Each
// engine's result and the final choice are compared with the software
// searches of me_tb_pkg, and the cycle count with the per-row delivery rate
// (at most one candidate row per cycle).
module tb_me3d_full;
  import me_tb_pkg::*;
  import me3d_pkg::*;
  localparam int FW = 120, FH = 68, M = 5, R = 32, STEPS = 5;
  localparam int XW = 7, YW = 7, LN = 4, PW = 4, FSW = 3, SADW = 16, CW = 14, MVW = 8;

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
  int checks = 0, failures = 0, cyc = 0, n_act = 0;

  me3d_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    n_act += $countones(act);
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int xm, int ym, me_alg_e a, int pfs, int pt [8]);
    me_res_t e;
    me_res_t exp_r [M];
    int t0, a0, bref, bsad, max_c;
    x_mb = XW'(xm); y_mb = YW'(ym); alg = a; nref = FSW'(M); prec_fs = PW'(pfs);
    for (int k = 0; k < STEPS; k++) prec_tss[k*PW +: PW] = PW'(pt[k]);
    @(negedge clk);
    start = 1; t0 = cyc; a0 = n_act;
    @(negedge clk);
    start = 0;
    wait (done);
    bref = 0; bsad = 32'h7fffffff; max_c = 0;
    for (int k = 0; k < M; k++) begin
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
    for (int k = 0; k < M; k++) begin
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
    if (int'(best_ref) != bref || int'(best_sad) != bsad) begin
      failures++;
      $display("best: ref %0d sad %0d, expected ref %0d sad %0d", best_ref, best_sad, bref, bsad);
    end
    checks++;
    if (cyc - t0 < (max_c + 1) * N) begin
      failures++; $display("faster than one row per cycle: %0d cycles", cyc - t0);
    end
    $display("%s MB(%0d,%0d): best ref %0d mv (%0d,%0d) sad %0d; %0d candidates per ref, %0d cycles, %0d activations",
             a.name(), xm, ym, best_ref, best_mvx, best_mvy, best_sad, max_c, cyc - t0, n_act - a0);
    @(negedge clk);
  endtask

  initial begin
    automatic int full [8] = '{8, 8, 8, 8, 8, 8, 8, 8};
    automatic int tss [8] = '{4, 6, 6, 8, 8, 8, 8, 8};
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
    $display("loaded %0d frames in %0d cycles", M + 1, cyc);

    run(60, 34, ALG_FS, 8, full);
    checks++;
    if (int'(best_ref) != EXACT_REF || best_sad != 0 ||
        int'(best_mvx) != MVX[EXACT_REF] || int'(best_mvy) != MVY[EXACT_REF]) begin
      failures++; $display("exact match missed");
    end
    run(119, 0, ALG_TSS, 8, tss);
    run(17, 40, ALG_TSS, 8, full);
    run(33, 12, ALG_FSTSS, 8, tss);
    run(90, 50, ALG_C2F, 4, full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
