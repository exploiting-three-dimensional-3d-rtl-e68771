// Multi-frame motion estimation accelerator on a 3D logic-DRAM stack.
//
// The stacked DRAM holds the current frame and up to M reference frames, each
// in its own two-bank frame_storage (2 x (M+1) banks, 12 for M = 5), each
// delivering one N-pixel candidate row per cycle over its own N*D-bit path
// (768 bits for the defaults).  M me_unit engines run in parallel, one per
// reference frame, each talking only to its own reference storage with
// (MB index, motion vector) requests.
//
// Operation: frames are loaded one MB row at a time through the wr_* port
// (wr_frame 0 = current frame, 1..M = reference frames).  A pulse on start
// with (x_mb, y_mb) makes the controller read the current MB from storage 0
// (full precision, zero motion vector) and copy its rows into every engine,
// then start engines 0..nref-1 with the selected search (alg) and precision
// settings.  With alg = ALG_FSTSS the engines first run three step search;
// the controller then picks the reference with the least SAD and runs full
// search (at prec_fs) on that reference alone, whose result is final.
// ALG_C2F (coarse full search at prec_fs, then a full-precision search of
// +-W around the coarse best) runs inside each engine.  When all started engines are done, the per-reference results
// are on ref_mvx/ref_mvy/ref_sad/ref_ncand (engine k serves reference frame
// k+1) and the reference with the smallest SAD (lowest number on a tie) on
// best_ref (its frame number 1..M, as on wr_frame), best_mvx, best_mvy and
// best_sad, and done pulses.  The whole operation takes N + 4 cycles for the
// current MB plus the longest engine run.  The frame-role assignment, the current-MB broadcast and the
// final choice among references are this design's own choices.
module me3d_top #(
  parameter int unsigned N     = me3d_pkg::N_DEF,
  parameter int unsigned D     = me3d_pkg::D_DEF,
  parameter int unsigned FW    = me3d_pkg::FW_DEF,
  parameter int unsigned FH    = me3d_pkg::FH_DEF,
  parameter int unsigned S     = me3d_pkg::S_DEF,
  parameter int unsigned M     = me3d_pkg::M_DEF,
  parameter int unsigned MVW   = me3d_pkg::MVW_DEF,
  parameter int unsigned R     = me3d_pkg::R_DEF,
  parameter int unsigned T_ACT = me3d_pkg::TACT_DEF,
  parameter int unsigned W     = me3d_pkg::W_DEF,
  parameter int unsigned XW    = $clog2(FW),
  parameter int unsigned YW    = $clog2(FH),
  parameter int unsigned LN    = $clog2(N),
  parameter int unsigned PW    = $clog2(D + 1),
  parameter int unsigned FSW   = $clog2(M + 1),
  parameter int unsigned STEPS = $clog2(R),
  parameter int unsigned SADW  = D + 2 * $clog2(N),
  parameter int unsigned CW    = 2 * $clog2(2 * R + 2)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // frame load
  input  logic                  wr_en,
  input  logic [FSW-1:0]        wr_frame,
  input  logic [XW-1:0]         wr_x,
  input  logic [YW-1:0]         wr_y,
  input  logic [LN-1:0]         wr_r,
  input  logic [N*D-1:0]        wr_data,
  // motion estimation of one MB
  input  logic                  start,
  input  logic [XW-1:0]         x_mb,
  input  logic [YW-1:0]         y_mb,
  input  me3d_pkg::me_alg_e     alg,
  input  logic [FSW-1:0]        nref,
  input  logic [PW-1:0]         prec_fs,
  input  logic [STEPS*PW-1:0]   prec_tss,
  output logic                  busy,
  output logic                  done,
  output logic signed [MVW-1:0] ref_mvx [M],
  output logic signed [MVW-1:0] ref_mvy [M],
  output logic [SADW-1:0]       ref_sad [M],
  output logic [CW-1:0]         ref_ncand [M],
  output logic [FSW-1:0]        best_ref,
  output logic signed [MVW-1:0] best_mvx,
  output logic signed [MVW-1:0] best_mvy,
  output logic [SADW-1:0]       best_sad,
  // word-line activations of every bank in this cycle ([2k+b]: storage k, bank b)
  output logic [2*(M+1)-1:0]    act
);

  import me3d_pkg::*;

  typedef enum logic [2:0] {C_IDLE, C_REQ, C_LOAD, C_RUN, C_WAIT, C_SEL} ctl_e;

  ctl_e          cst;
  me_alg_e       s_alg, eng_alg;
  logic          phase2;
  logic [XW-1:0] s_x;
  logic [YW-1:0] s_y;
  logic [FSW-1:0] s_nref;
  logic [M-1:0]  run_mask, done_seen;

  // ---- storage-side signals ---------------------------------------------
  logic                  fs_req_valid [M+1];
  logic                  fs_req_ready [M+1];
  logic [XW-1:0]         fs_req_x     [M+1];
  logic [YW-1:0]         fs_req_y     [M+1];
  logic signed [MVW-1:0] fs_req_mvx   [M+1];
  logic signed [MVW-1:0] fs_req_mvy   [M+1];
  logic [PW-1:0]         fs_req_prec  [M+1];
  logic                  fs_out_valid [M+1];
  logic [N*D-1:0]        fs_out_row   [M+1];
  logic [LN-1:0]         fs_out_idx   [M+1];
  logic                  fs_out_last  [M+1];

  for (genvar k = 0; k <= M; k++) begin : g_fs
    logic unused_busy;
    frame_storage #(.N(N), .D(D), .FW(FW), .FH(FH), .S(S), .MVW(MVW),
                    .T_ACT(T_ACT), .XW(XW), .YW(YW), .LN(LN), .PW(PW)) u_fs (
      .clk(clk), .rst_n(rst_n),
      .req_valid(fs_req_valid[k]), .req_ready(fs_req_ready[k]),
      .req_x(fs_req_x[k]), .req_y(fs_req_y[k]),
      .req_mvx(fs_req_mvx[k]), .req_mvy(fs_req_mvy[k]), .req_prec(fs_req_prec[k]),
      .out_valid(fs_out_valid[k]), .out_row(fs_out_row[k]),
      .out_idx(fs_out_idx[k]), .out_last(fs_out_last[k]),
      .wr_en(wr_en && (wr_frame == FSW'(k))), .wr_x(wr_x), .wr_y(wr_y),
      .wr_r(wr_r), .wr_data(wr_data),
      .act(act[2*k +: 2]), .busy(unused_busy));
  end

  // current-MB read from storage 0
  assign fs_req_valid[0] = (cst == C_REQ);
  assign fs_req_x[0]     = s_x;
  assign fs_req_y[0]     = s_y;
  assign fs_req_mvx[0]   = '0;
  assign fs_req_mvy[0]   = '0;
  assign fs_req_prec[0]  = PW'(D);

  // ---- engines ------------------------------------------------------------
  logic [M-1:0] me_done, me_busy;

  for (genvar k = 0; k < M; k++) begin : g_me
    me_unit #(.N(N), .D(D), .FW(FW), .FH(FH), .MVW(MVW), .R(R), .W(W), .XW(XW),
              .YW(YW), .LN(LN), .PW(PW), .STEPS(STEPS), .SADW(SADW), .CW(CW)) u_me (
      .clk(clk), .rst_n(rst_n),
      .start((cst == C_RUN) && run_mask[k]),
      .x_mb(s_x), .y_mb(s_y), .alg(eng_alg), .prec_fs(prec_fs), .prec_tss(prec_tss),
      .busy(me_busy[k]), .done(me_done[k]),
      .best_mvx(ref_mvx[k]), .best_mvy(ref_mvy[k]), .best_sad(ref_sad[k]),
      .ncand(ref_ncand[k]),
      .cur_wr(fs_out_valid[0]), .cur_idx(fs_out_idx[0]), .cur_data(fs_out_row[0]),
      .req_valid(fs_req_valid[k+1]), .req_ready(fs_req_ready[k+1]),
      .req_x(fs_req_x[k+1]), .req_y(fs_req_y[k+1]),
      .req_mvx(fs_req_mvx[k+1]), .req_mvy(fs_req_mvy[k+1]),
      .req_prec(fs_req_prec[k+1]),
      .row_valid(fs_out_valid[k+1]), .row_data(fs_out_row[k+1]),
      .row_idx(fs_out_idx[k+1]), .row_last(fs_out_last[k+1]));
  end

  // ---- choice among references ------------------------------------------------
  logic [FSW-1:0]  sel_ref;
  logic [SADW-1:0] sel_sad;
  logic            sel_any;

  always_comb begin
    sel_ref = '0;
    sel_sad = '1;
    sel_any = 1'b0;
    for (int k = 0; k < M; k++) begin
      if (run_mask[k] && (!sel_any || (ref_sad[k] < sel_sad))) begin
        sel_ref = FSW'(k);
        sel_sad = ref_sad[k];
        sel_any = 1'b1;
      end
    end
  end

  // engines run full search alone or in the second hybrid phase
  assign eng_alg = phase2 ? ALG_FS : ((s_alg == ALG_FSTSS) ? ALG_TSS : s_alg);

  // ---- controller -------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst       <= C_IDLE;
      s_alg     <= ALG_FS;
      phase2    <= 1'b0;
      s_x       <= '0;
      s_y       <= '0;
      s_nref    <= FSW'(1);
      run_mask  <= '0;
      done_seen <= '0;
      done      <= 1'b0;
      best_ref  <= '0;
      best_mvx  <= '0;
      best_mvy  <= '0;
      best_sad  <= '0;
    end else begin
      done <= 1'b0;
      unique case (cst)
        C_IDLE: if (start) begin
          s_x    <= x_mb;
          s_alg  <= alg;
          phase2 <= 1'b0;
          s_y    <= y_mb;
          s_nref <= (nref == '0) ? FSW'(1) : ((nref > FSW'(M)) ? FSW'(M) : nref);
          cst    <= C_REQ;
        end
        C_REQ: if (fs_req_ready[0]) cst <= C_LOAD;
        C_LOAD: if (fs_out_valid[0] && fs_out_last[0]) begin
          for (int k = 0; k < M; k++) run_mask[k] <= (k < int'(s_nref));
          cst <= C_RUN;
        end
        C_RUN: begin
          done_seen <= '0;
          cst       <= C_WAIT;
        end
        C_WAIT: begin
          done_seen <= done_seen | me_done;
          if (((done_seen | me_done) & run_mask) == run_mask) cst <= C_SEL;
        end
        C_SEL: begin
          if (s_alg == ALG_FSTSS && !phase2) begin
            // hybrid: full search on the reference that won the TSS round
            phase2   <= 1'b1;
            run_mask <= M'(1) << sel_ref;
            cst      <= C_RUN;
          end else begin
            best_ref <= sel_ref + 1'b1;
            best_mvx <= ref_mvx[sel_ref];
            best_mvy <= ref_mvy[sel_ref];
            best_sad <= sel_sad;
            done     <= 1'b1;
            cst      <= C_IDLE;
          end
        end
        default: cst <= C_IDLE;
      endcase
    end
  end

  assign busy = (cst != C_IDLE);

  // An engine only finishes after it has been started.
  a_done_started: assert property (@(posedge clk) disable iff (!rst_n)
      (me_done & ~run_mask) == '0)
    else $error("me3d_top: unexpected engine completion");

  // While the controller waits, every engine still running is busy.
  a_wait_busy: assert property (@(posedge clk) disable iff (!rst_n)
      (cst == C_WAIT) |-> (((me_busy | done_seen | me_done) & run_mask) == run_mask))
    else $error("me3d_top: engine stopped without finishing");

endmodule
