// Motion estimation engine for one reference frame.
//
// The unit holds the current MB (loaded row by row on cur_wr before start),
// generates candidate motion vectors, asks the frame storage of its
// reference frame for each candidate by MB index and motion vector only, and
// accumulates the SAD of the returned rows in a sad_unit.  The smallest SAD
// wins; on a tie the earlier candidate is kept.
//
// Search schemes (alg):
//  * ALG_FS: full search of every vector in [-R, R] x [-R, R], raster order,
//    at precision prec_fs.
//  * ALG_TSS: three step search with STEPS = log2(R) steps of size R/2, R/4,
//    ..., 1 (five steps for the 80x80 region).  Every step evaluates the 3x3
//    pattern around the current centre, centre first, at that step's own
//    precision prec_tss[k*PW +: PW], and moves the centre to the best one.
//    The centre is evaluated again in every step because the precision may
//    differ from step to step.
//  * ALG_C2F: coarse-to-fine; a full search at precision prec_fs, then a
//    full-precision full search of the (2W+1)^2 vectors around the coarse
//    best.  The result is that of the fine search; ncand counts both.
//  ALG_FSTSS is not run by the engine itself (the top sequences it from
//  ALG_TSS and ALG_FS runs); an engine given it runs three step search.
// Candidates whose block would leave the frame are skipped.  Requests are
// issued back to back; at most FIFO_D candidates are outstanding.  A step
// ends when all of its candidates have returned.  done pulses with best_mvx,
// best_mvy, best_sad (at the last step's precision) and ncand, the number of
// candidates evaluated.
module me_unit #(
  parameter int unsigned N     = me3d_pkg::N_DEF,
  parameter int unsigned D     = me3d_pkg::D_DEF,
  parameter int unsigned FW    = me3d_pkg::FW_DEF,
  parameter int unsigned FH    = me3d_pkg::FH_DEF,
  parameter int unsigned MVW   = me3d_pkg::MVW_DEF,
  parameter int unsigned R     = me3d_pkg::R_DEF,
  parameter int unsigned W     = me3d_pkg::W_DEF,
  parameter int unsigned XW    = $clog2(FW),
  parameter int unsigned YW    = $clog2(FH),
  parameter int unsigned LN    = $clog2(N),
  parameter int unsigned PW    = $clog2(D + 1),
  parameter int unsigned STEPS = $clog2(R),
  parameter int unsigned SADW  = D + 2 * $clog2(N),
  parameter int unsigned CW    = 2 * $clog2(2 * R + 2)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // control
  input  logic                  start,
  input  logic [XW-1:0]         x_mb,
  input  logic [YW-1:0]         y_mb,
  input  me3d_pkg::me_alg_e     alg,
  input  logic [PW-1:0]         prec_fs,
  input  logic [STEPS*PW-1:0]   prec_tss,
  output logic                  busy,
  output logic                  done,
  output logic signed [MVW-1:0] best_mvx,
  output logic signed [MVW-1:0] best_mvy,
  output logic [SADW-1:0]       best_sad,
  output logic [CW-1:0]         ncand,
  // current MB load
  input  logic                  cur_wr,
  input  logic [LN-1:0]         cur_idx,
  input  logic [N*D-1:0]        cur_data,
  // candidate request to the frame storage
  output logic                  req_valid,
  input  logic                  req_ready,
  output logic [XW-1:0]         req_x,
  output logic [YW-1:0]         req_y,
  output logic signed [MVW-1:0] req_mvx,
  output logic signed [MVW-1:0] req_mvy,
  output logic [PW-1:0]         req_prec,
  // candidate rows from the frame storage
  input  logic                  row_valid,
  input  logic [N*D-1:0]        row_data,
  input  logic [LN-1:0]         row_idx,
  input  logic                  row_last
);

  import me3d_pkg::*;

  localparam int unsigned FIFO_D = 4;
  localparam int unsigned PXW    = XW + LN + 3;   // signed pixel coordinate
  localparam int unsigned SW     = $clog2(STEPS + 1);

  typedef enum logic [1:0] {S_IDLE, S_GEN, S_DRAIN} state_e;

  state_e                state;
  me_alg_e               s_alg;
  logic [XW-1:0]         s_x;
  logic [YW-1:0]         s_y;
  logic [SW-1:0]         step;
  logic [3:0]            pt;             // TSS pattern point 0..8
  logic signed [MVW-1:0] gx, gy;         // FS scan position
  logic signed [MVW-1:0] cx, cy;         // TSS / full search centre
  logic [MVW-1:0]        rad;            // full search radius
  logic                  refine;         // fine phase of ALG_C2F
  logic                  is_fs;
  logic [PW-1:0]         cur_prec;
  logic [N*D-1:0]        cur_mb [N];
  logic [2:0]            outst;

  // ---- candidate generation ---------------------------------------------
  logic signed [MVW-1:0] cand_x, cand_y, ssz;
  logic signed [1:0]     dx, dy;
  logic                  cand_ok, gen_last, gen_adv, accept;
  logic signed [PXW-1:0] px, py;

  always_comb begin
    ssz = MVW'(R >> (step + 1));
    // pattern: 0 = centre, then the 8 neighbours row by row
    unique case (pt)
      4'd1:    begin dx = -2'sd1; dy = -2'sd1; end
      4'd2:    begin dx =  2'sd0; dy = -2'sd1; end
      4'd3:    begin dx =  2'sd1; dy = -2'sd1; end
      4'd4:    begin dx = -2'sd1; dy =  2'sd0; end
      4'd5:    begin dx =  2'sd1; dy =  2'sd0; end
      4'd6:    begin dx = -2'sd1; dy =  2'sd1; end
      4'd7:    begin dx =  2'sd0; dy =  2'sd1; end
      4'd8:    begin dx =  2'sd1; dy =  2'sd1; end
      default: begin dx =  2'sd0; dy =  2'sd0; end
    endcase
    is_fs = (s_alg == ALG_FS) || (s_alg == ALG_C2F);
    if (is_fs) begin
      cand_x   = gx;
      cand_y   = gy;
      gen_last = (gx == cx + $signed(rad)) && (gy == cy + $signed(rad));
    end else begin
      cand_x   = cx + MVW'(dx) * ssz;
      cand_y   = cy + MVW'(dy) * ssz;
      gen_last = (pt == 4'd8);
    end
    px = $signed(PXW'(s_x) * PXW'(N)) + PXW'(cand_x);
    py = $signed(PXW'(s_y) * PXW'(N)) + PXW'(cand_y);
    cand_ok = (px >= 0) && (py >= 0) &&
              (px <= $signed(PXW'((FW - 1) * N))) &&
              (py <= $signed(PXW'((FH - 1) * N))) &&
              (cand_x >= -$signed(MVW'(R))) && (cand_x <= $signed(MVW'(R))) &&
              (cand_y >= -$signed(MVW'(R))) && (cand_y <= $signed(MVW'(R)));

    req_valid = (state == S_GEN) && cand_ok && (outst < 3'(FIFO_D));
    req_x     = s_x;
    req_y     = s_y;
    req_mvx   = cand_x;
    req_mvy   = cand_y;
    req_prec  = cur_prec;
    accept    = req_valid && req_ready;
    gen_adv   = (state == S_GEN) && (accept || !cand_ok);
  end

  // ---- outstanding-candidate FIFO -------------------------------------------
  logic signed [MVW-1:0] fifo_x [FIFO_D];
  logic signed [MVW-1:0] fifo_y [FIFO_D];
  logic [1:0]            wp, rp;

  // ---- SAD ------------------------------------------------------------------
  logic            sad_valid;
  logic [SADW-1:0] sad;

  sad_unit #(.N(N), .D(D), .PW(PW), .SADW(SADW)) u_sad (
    .clk(clk), .rst_n(rst_n), .prec(cur_prec),
    .in_valid(row_valid), .in_first(row_idx == '0), .in_last(row_last),
    .cur_row(cur_mb[row_idx]), .cand_row(row_data),
    .sad_valid(sad_valid), .sad(sad));

  logic better;
  assign better = sad_valid && (sad < best_sad);

  always_ff @(posedge clk) begin
    if (cur_wr) cur_mb[cur_idx] <= cur_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      s_alg    <= ALG_FS;
      s_x      <= '0;
      s_y      <= '0;
      step     <= '0;
      pt       <= '0;
      gx       <= '0;
      gy       <= '0;
      cx       <= '0;
      cy       <= '0;
      rad      <= MVW'(R);
      refine   <= 1'b0;
      cur_prec <= PW'(D);
      outst    <= '0;
      wp       <= '0;
      rp       <= '0;
      done     <= 1'b0;
      best_mvx <= '0;
      best_mvy <= '0;
      best_sad <= '1;
      ncand    <= '0;
      for (int i = 0; i < FIFO_D; i++) begin
        fifo_x[i] <= '0;
        fifo_y[i] <= '0;
      end
    end else begin
      done  <= 1'b0;
      outst <= outst + 3'(accept) - 3'(sad_valid);
      if (accept) begin
        fifo_x[wp] <= cand_x;
        fifo_y[wp] <= cand_y;
        wp         <= wp + 1'b1;
      end
      if (sad_valid) begin
        rp    <= rp + 1'b1;
        ncand <= ncand + 1'b1;
      end
      if (better) begin
        best_sad <= sad;
        best_mvx <= fifo_x[rp];
        best_mvy <= fifo_y[rp];
      end

      unique case (state)
        S_IDLE: begin
          if (start) begin
            state    <= S_GEN;
            s_alg    <= alg;
            s_x      <= x_mb;
            s_y      <= y_mb;
            step     <= '0;
            pt       <= '0;
            gx       <= -$signed(MVW'(R));
            gy       <= -$signed(MVW'(R));
            cx       <= '0;
            cy       <= '0;
            rad      <= MVW'(R);
            refine   <= 1'b0;
            cur_prec <= (alg == ALG_FS || alg == ALG_C2F) ? prec_fs : prec_tss[0 +: PW];
            best_sad <= '1;
            best_mvx <= '0;
            best_mvy <= '0;
            ncand    <= '0;
          end
        end
        S_GEN: begin
          if (gen_adv) begin
            if (gen_last) begin
              state <= S_DRAIN;
            end else if (is_fs) begin
              if (gx == cx + $signed(rad)) begin
                gx <= cx - $signed(rad);
                gy <= gy + 1'b1;
              end else begin
                gx <= gx + 1'b1;
              end
            end else begin
              pt <= pt + 1'b1;
            end
          end
        end
        S_DRAIN: begin
          if (outst == '0 && !sad_valid) begin
            if (s_alg == ALG_C2F && !refine) begin
              // fine phase around the coarse best, at full precision
              refine   <= 1'b1;
              cx       <= best_mvx;
              cy       <= best_mvy;
              gx       <= best_mvx - $signed(MVW'(W));
              gy       <= best_mvy - $signed(MVW'(W));
              rad      <= MVW'(W);
              cur_prec <= PW'(D);
              best_sad <= '1;
              state    <= S_GEN;
            end else if (!is_fs && step != SW'(STEPS - 1)) begin
              step     <= step + 1'b1;
              pt       <= '0;
              cx       <= best_mvx;
              cy       <= best_mvy;
              cur_prec <= prec_tss[(32'(step) + 1) * PW +: PW];
              best_sad <= '1;
              state    <= S_GEN;
            end else begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  a_fifo_room: assert property (@(posedge clk) disable iff (!rst_n)
      accept |-> (outst < 3'(FIFO_D)))
    else $error("me_unit: candidate FIFO overflow");

endmodule
