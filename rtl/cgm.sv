// cgm: context index generation module.
//
// Computes, for the bin the residual parser is about to decode, the address
// of its context in the context storage: the element's base address (see
// the layout in cabac_pkg) plus the HEVC context increment.
//   last_sig_coeff_{x,y}_prefix: offset and shift from block size and
//     colour component, increment = offset + (bin_idx >> shift);
//   coded_sub_block_flag: right/below sub-block flags, +2 for chroma;
//   sig_coeff_flag: 4x4 position map for 4x4 blocks, otherwise a pattern
//     chosen by the right/below coded-sub-block flags, plus offsets for the
//     first sub-block, block size, scan (8x8 luma) and chroma;
//   coeff_abs_level_greater1_flag: 4*ctxSet + greater1Ctx, +16 chroma;
//   coeff_abs_level_greater2_flag: ctxSet, +4 chroma;
//   transform_skip_flag: one context for luma, one for chroma;
//   sao_merge_left/up_flag share one context, sao_type_idx has one for
//   its first bin;
//   abs_mvd_greater0_flag and abs_mvd_greater1_flag have one each, and so
//   do prev_intra_luma_pred_flag and the first bin of
//   intra_chroma_pred_mode;
//   merge_flag, the first bin of merge_idx and mvp_lX_flag have one each;
//   inter_pred_idc uses CtDepth for its first bin and a fifth context for
//   its last; ref_idx_lX has one context for each of its first two bins.
// ctxSet and greater1Ctx are tracked by the parser.  Bypass elements get
// address 0 (unused).  Combinational.
module cgm
  import cabac_pkg::*;
(
  input  se_e        se,
  input  logic [4:0] bin_idx,
  input  logic [1:0] c_idx,
  input  logic [2:0] log2_size,
  input  scan_e      scan,
  input  logic [4:0] x_c,
  input  logic [4:0] y_c,
  input  logic [1:0] prev_csbf,   // bit0: right sub-block coded, bit1: below
  input  logic [1:0] ctx_set,
  input  logic [1:0] g1ctx,
  input  logic [1:0] ct_depth,    // coding tree depth of the current CU
  output logic [CTX_AW-1:0] ctx_idx
);
  logic       chroma;
  int         off, sh, sig, inc;
  logic [1:0] xp, yp;
  logic [3:0] map4 [16];

  assign map4 = '{4'd0, 4'd1, 4'd4, 4'd5, 4'd2, 4'd3, 4'd4, 4'd5,
                  4'd6, 4'd6, 4'd8, 4'd8, 4'd7, 4'd7, 4'd8, 4'd8};

  always_comb begin
    chroma = (c_idx != 2'd0);
    xp     = x_c[1:0];
    yp     = y_c[1:0];
    if (chroma) begin
      off = 15;
      sh  = int'(log2_size) - 2;
    end else begin
      off = 3 * (int'(log2_size) - 2) + ((int'(log2_size) - 1) >> 2);
      sh  = (int'(log2_size) + 1) >> 2;
    end
    // sig_coeff_flag
    if (log2_size == 3'd2) begin
      sig = int'(map4[{y_c[1:0], x_c[1:0]}]);
    end else if (x_c == 5'd0 && y_c == 5'd0) begin
      sig = 0;
    end else begin
      unique case (prev_csbf)
        2'd0: sig = (int'(xp) + int'(yp) == 0) ? 2 : ((int'(xp) + int'(yp) < 3) ? 1 : 0);
        2'd1: sig = (yp == 2'd0) ? 2 : ((yp == 2'd1) ? 1 : 0);
        2'd2: sig = (xp == 2'd0) ? 2 : ((xp == 2'd1) ? 1 : 0);
        default: sig = 2;
      endcase
      if (!chroma) begin
        if (x_c[4:2] != 3'd0 || y_c[4:2] != 3'd0) sig = sig + 3;
        sig = sig + ((log2_size == 3'd3) ? ((scan == SCAN_DIAG) ? 9 : 15) : 21);
      end else begin
        sig = sig + ((log2_size == 3'd3) ? 9 : 12);
      end
    end
    if (chroma) sig = sig + 27;
    unique case (se)
      SE_LAST_X_PREFIX: inc = int'(CTX_LAST_X) + off + (int'(bin_idx) >> sh);
      SE_LAST_Y_PREFIX: inc = int'(CTX_LAST_Y) + off + (int'(bin_idx) >> sh);
      SE_CSBF:          inc = int'(CTX_CSBF) + ((prev_csbf != 2'd0) ? 1 : 0) + (chroma ? 2 : 0);
      SE_SIG:           inc = int'(CTX_SIG) + sig;
      SE_GT1:           inc = int'(CTX_GT1) + 4 * int'(ctx_set) + int'(g1ctx) + (chroma ? 16 : 0);
      SE_GT2:           inc = int'(CTX_GT2) + int'(ctx_set) + (chroma ? 4 : 0);
      SE_TS:            inc = int'(CTX_TS) + (chroma ? 1 : 0);
      SE_SAO_MERGE_LEFT,
      SE_SAO_MERGE_UP:  inc = int'(CTX_SAO_MERGE);
      SE_SAO_TYPE:      inc = int'(CTX_SAO_TYPE);
      SE_MVD_GT0:       inc = int'(CTX_MVD_GT0);
      SE_MVD_GT1:       inc = int'(CTX_MVD_GT1);
      SE_PREV_INTRA:    inc = int'(CTX_PREV_INTRA);
      SE_CHROMA_FLAG:   inc = int'(CTX_CHROMA_PRED);
      SE_MERGE_FLAG:    inc = int'(CTX_MERGE_FLAG);
      SE_MERGE_IDX:     inc = int'(CTX_MERGE_IDX);
      SE_INTER_BI:      inc = int'(CTX_INTER_PRED) + int'(ct_depth);
      SE_INTER_L1:      inc = int'(CTX_INTER_PRED) + 4;
      SE_REF_IDX:       inc = int'(CTX_REF_IDX) + ((bin_idx == 5'd0) ? 0 : 1);
      SE_MVP_FLAG:      inc = int'(CTX_MVP_FLAG);
      default:          inc = 0;
    endcase
    ctx_idx = CTX_AW'(inc);
  end
endmodule
