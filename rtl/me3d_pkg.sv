// Shared constants and types of the 3D-stacked motion estimation accelerator.
//
// The defaults describe the HDTV 1080p case: 16x16 macroblocks (MB) of 8-bit
// luminance, an 80x80 search region (motion vectors -32..+32), a frame of
// 120x68 MBs (1920x1088 pixels, 1080 lines padded to whole MBs), up to five
// reference frames and two MBs per DRAM word-line and bank.  The search-region
// span in MBs, S_BW = 2*ceil((S_W-N)/(2N))+1, is provided as a function.
package me3d_pkg;

  localparam int unsigned N_DEF   = 16;   // MB width/height in pixels
  localparam int unsigned D_DEF   = 8;    // bits per luminance sample
  localparam int unsigned FW_DEF  = 120;  // frame width in MBs
  localparam int unsigned FH_DEF  = 68;   // frame height in MBs
  localparam int unsigned S_DEF   = 2;    // MBs per word-line in one bank
  localparam int unsigned M_DEF   = 5;    // reference frames
  localparam int unsigned SR_DEF  = 80;   // search region width/height in pixels
  localparam int unsigned R_DEF   = (SR_DEF - N_DEF) / 2;  // MV range +-R
  localparam int unsigned MVW_DEF = 8;    // signed motion vector component width
  localparam int unsigned TACT_DEF = 2;   // word-line activation cycles
  localparam int unsigned W_DEF   = 2;    // refinement window +-W of ALG_C2F

  // Block matching schemes run by an ME unit.
  // An ME engine runs ALG_FS, ALG_TSS or ALG_C2F; ALG_FSTSS is sequenced by the top controller:
  // three step search on every reference, then full search on the
  // reference whose search gave the least SAD.
  typedef enum logic [1:0] {
    ALG_FS    = 2'd0,   // exhaustive full search
    ALG_TSS   = 2'd1,   // three step search (log2(R) steps)
    ALG_FSTSS = 2'd2,   // hybrid: TSS on all references, then FS on the best
    ALG_C2F   = 2'd3    // coarse full search at reduced precision, then a
                        // full-precision full search around the coarse best
  } me_alg_e;

  // Number of MBs a search region spans along one axis.
  function automatic int unsigned search_span_mbs(int unsigned sw, int unsigned n);
    return 2 * ((sw - n + 2 * n - 1) / (2 * n)) + 1;
  endfunction

endpackage
