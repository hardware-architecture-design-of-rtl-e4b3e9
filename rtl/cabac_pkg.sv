// cabac_pkg: types, constants and table functions shared by the CABAC
// entropy decoder.
//
// Holds the context variable type (6-bit LPS probability state plus the
// most probable symbol), the bin decoding modes, the syntax element and
// binarization codes used between the parser, the context index generator
// and the de-binarizer, the context memory layout, and the fixed tables of
// the HEVC arithmetic decoding engine: the 64x4 LPS range table, the LPS
// state transition, the context initialization formula and the three
// coefficient scans (up-right diagonal, horizontal, vertical).  The tables are those of the HEVC standard; the context
// memory layout (which syntax element occupies which addresses) is this
// design's own choice.
package cabac_pkg;

  // One context variable: probability state index and MPS value.
  typedef struct packed {
    logic [5:0] state;
    logic       mps;
  } ctx_t;

  typedef enum logic [1:0] {
    BIN_REGULAR = 2'd0,
    BIN_BYPASS  = 2'd1,
    BIN_TERM    = 2'd2
  } bin_mode_e;

  // Syntax elements handled by the parser.
  typedef enum logic [5:0] {
    SE_LAST_X_PREFIX = 6'd0,
    SE_LAST_Y_PREFIX = 6'd1,
    SE_LAST_X_SUFFIX = 6'd2,
    SE_LAST_Y_SUFFIX = 6'd3,
    SE_CSBF          = 6'd4,
    SE_SIG           = 6'd5,
    SE_GT1           = 6'd6,
    SE_GT2           = 6'd7,
    SE_SIGN          = 6'd8,
    SE_REM           = 6'd9,
    SE_END_OF_SLICE  = 6'd10,
    SE_TS            = 6'd11,  // transform_skip_flag
    // sample adaptive offset parameters of one CTB
    SE_SAO_MERGE_LEFT  = 6'd12,
    SE_SAO_MERGE_UP    = 6'd13,
    SE_SAO_TYPE        = 6'd14,  // sao_type_idx_luma / _chroma
    SE_SAO_OFFSET_ABS  = 6'd15,
    SE_SAO_OFFSET_SIGN = 6'd16,
    SE_SAO_BAND_POS    = 6'd17,
    SE_SAO_EO_CLASS    = 6'd18,  // sao_eo_class_luma / _chroma
    // motion vector difference (mvd_coding)
    SE_MVD_GT0         = 6'd19,  // abs_mvd_greater0_flag
    SE_MVD_GT1         = 6'd20,  // abs_mvd_greater1_flag
    SE_MVD_MINUS2      = 6'd21,  // abs_mvd_minus2
    SE_MVD_SIGN        = 6'd22,  // mvd_sign_flag
    // intra prediction modes of a coding unit
    SE_PREV_INTRA      = 6'd23,  // prev_intra_luma_pred_flag
    SE_MPM_IDX         = 6'd24,  // mpm_idx
    SE_REM_INTRA       = 6'd25,  // rem_intra_luma_pred_mode
    SE_CHROMA_FLAG     = 6'd26,  // intra_chroma_pred_mode, first bin (0: mode 4)
    SE_CHROMA_IDX      = 6'd27,  // intra_chroma_pred_mode, last two bins (mode 0..3)
    // inter prediction unit
    SE_MERGE_FLAG      = 6'd28,  // merge_flag
    SE_MERGE_IDX       = 6'd29,  // merge_idx
    SE_INTER_BI        = 6'd30,  // inter_pred_idc, first bin (1: PRED_BI)
    SE_INTER_L1        = 6'd31,  // inter_pred_idc, last bin (0: PRED_L0, 1: PRED_L1)
    SE_REF_IDX         = 6'd32,  // ref_idx_l0 / ref_idx_l1
    SE_MVP_FLAG        = 6'd33   // mvp_l0_flag / mvp_l1_flag
  } se_e;

  // Coefficient scan orders (scanIdx of HEVC).
  typedef enum logic [1:0] {
    SCAN_DIAG = 2'd0,
    SCAN_HOR  = 2'd1,
    SCAN_VER  = 2'd2
  } scan_e;

  // Commands accepted by the bitstream resolution FSM.
  typedef enum logic [2:0] {
    CMD_SLICE = 3'd0,   // slice start: context init + decoder init
    CMD_TU    = 3'd1,   // parse one residual_coding block
    CMD_END   = 3'd2,   // decode end_of_slice_segment_flag
    CMD_SAO   = 3'd3,   // parse the SAO parameters of one CTB
    CMD_MVD   = 3'd4,   // parse one mvd_coding
    CMD_INTRA = 3'd5,   // parse the intra prediction modes of one CU
    CMD_PU    = 3'd6    // parse one inter prediction_unit
  } cmd_e;

  // Binarizations undone by the de-binarizer.
  typedef enum logic [1:0] {
    BT_FL  = 2'd0,   // fixed length, param = number of bits (1..15)
    BT_TR  = 2'd1,   // truncated unary, param = cMax
    BT_REM = 2'd2,   // coeff_abs_level_remaining, param = Rice parameter
    BT_EGK = 2'd3    // k-th order Exp-Golomb, param = k
  } bin_type_e;

  // Context memory layout (addresses of the first context of each element).
  localparam int unsigned CTX_LAST_X = 0;    // 18 contexts
  localparam int unsigned CTX_LAST_Y = 18;   // 18 contexts
  localparam int unsigned CTX_CSBF   = 36;   // 4 contexts
  localparam int unsigned CTX_SIG    = 40;   // 42 contexts (27 luma, 15 chroma)
  localparam int unsigned CTX_GT1    = 82;   // 24 contexts (16 luma, 8 chroma)
  localparam int unsigned CTX_GT2    = 106;  // 6 contexts (4 luma, 2 chroma)
  localparam int unsigned CTX_TS     = 112;  // 2 contexts (luma, chroma)
  localparam int unsigned CTX_SAO_MERGE = 114;  // 1 context (left and up)
  localparam int unsigned CTX_SAO_TYPE  = 115;  // 1 context (first bin)
  localparam int unsigned CTX_MVD_GT0   = 116;  // 1 context
  localparam int unsigned CTX_MVD_GT1   = 117;  // 1 context
  localparam int unsigned CTX_PREV_INTRA = 118; // 1 context
  localparam int unsigned CTX_CHROMA_PRED = 119; // 1 context
  localparam int unsigned CTX_MERGE_FLAG = 120; // 1 context
  localparam int unsigned CTX_MERGE_IDX  = 121; // 1 context (first bin)
  localparam int unsigned CTX_INTER_PRED = 122; // 5 contexts (CtDepth 0..3, last bin)
  localparam int unsigned CTX_REF_IDX    = 127; // 2 contexts (first two bins)
  localparam int unsigned CTX_MVP_FLAG   = 129; // 1 context
  localparam int unsigned NUM_CTX    = 130;
  localparam int unsigned CTX_AW     = 8;

  // LPS sub-range, indexed by probability state and range quarter.
  function automatic logic [7:0] range_tab_lps(input logic [5:0] s, input logic [1:0] q);
    logic [31:0] row;
    case (s)
      6'd0 : row = {8'd128, 8'd176, 8'd208, 8'd240};
      6'd1 : row = {8'd128, 8'd167, 8'd197, 8'd227};
      6'd2 : row = {8'd128, 8'd158, 8'd187, 8'd216};
      6'd3 : row = {8'd123, 8'd150, 8'd178, 8'd205};
      6'd4 : row = {8'd116, 8'd142, 8'd169, 8'd195};
      6'd5 : row = {8'd111, 8'd135, 8'd160, 8'd185};
      6'd6 : row = {8'd105, 8'd128, 8'd152, 8'd175};
      6'd7 : row = {8'd100, 8'd122, 8'd144, 8'd166};
      6'd8 : row = {8'd95,  8'd116, 8'd137, 8'd158};
      6'd9 : row = {8'd90,  8'd110, 8'd130, 8'd150};
      6'd10: row = {8'd85,  8'd104, 8'd123, 8'd142};
      6'd11: row = {8'd81,  8'd99,  8'd117, 8'd135};
      6'd12: row = {8'd77,  8'd94,  8'd111, 8'd128};
      6'd13: row = {8'd73,  8'd89,  8'd105, 8'd122};
      6'd14: row = {8'd69,  8'd85,  8'd100, 8'd116};
      6'd15: row = {8'd66,  8'd80,  8'd95,  8'd110};
      6'd16: row = {8'd62,  8'd76,  8'd90,  8'd104};
      6'd17: row = {8'd59,  8'd72,  8'd86,  8'd99};
      6'd18: row = {8'd56,  8'd69,  8'd81,  8'd94};
      6'd19: row = {8'd53,  8'd65,  8'd77,  8'd89};
      6'd20: row = {8'd51,  8'd62,  8'd73,  8'd85};
      6'd21: row = {8'd48,  8'd59,  8'd69,  8'd80};
      6'd22: row = {8'd46,  8'd56,  8'd66,  8'd76};
      6'd23: row = {8'd43,  8'd53,  8'd63,  8'd72};
      6'd24: row = {8'd41,  8'd50,  8'd59,  8'd69};
      6'd25: row = {8'd39,  8'd48,  8'd56,  8'd65};
      6'd26: row = {8'd37,  8'd45,  8'd54,  8'd62};
      6'd27: row = {8'd35,  8'd43,  8'd51,  8'd59};
      6'd28: row = {8'd33,  8'd41,  8'd48,  8'd56};
      6'd29: row = {8'd32,  8'd39,  8'd46,  8'd53};
      6'd30: row = {8'd30,  8'd37,  8'd43,  8'd50};
      6'd31: row = {8'd29,  8'd35,  8'd41,  8'd48};
      6'd32: row = {8'd27,  8'd33,  8'd39,  8'd45};
      6'd33: row = {8'd26,  8'd31,  8'd37,  8'd43};
      6'd34: row = {8'd24,  8'd30,  8'd35,  8'd41};
      6'd35: row = {8'd23,  8'd28,  8'd33,  8'd39};
      6'd36: row = {8'd22,  8'd27,  8'd32,  8'd37};
      6'd37: row = {8'd21,  8'd26,  8'd30,  8'd35};
      6'd38: row = {8'd20,  8'd24,  8'd29,  8'd33};
      6'd39: row = {8'd19,  8'd23,  8'd27,  8'd31};
      6'd40: row = {8'd18,  8'd22,  8'd26,  8'd30};
      6'd41: row = {8'd17,  8'd21,  8'd25,  8'd28};
      6'd42: row = {8'd16,  8'd20,  8'd23,  8'd27};
      6'd43: row = {8'd15,  8'd19,  8'd22,  8'd25};
      6'd44: row = {8'd14,  8'd18,  8'd21,  8'd24};
      6'd45: row = {8'd14,  8'd17,  8'd20,  8'd23};
      6'd46: row = {8'd13,  8'd16,  8'd19,  8'd22};
      6'd47: row = {8'd12,  8'd15,  8'd18,  8'd21};
      6'd48: row = {8'd12,  8'd14,  8'd17,  8'd20};
      6'd49: row = {8'd11,  8'd14,  8'd16,  8'd19};
      6'd50: row = {8'd11,  8'd13,  8'd15,  8'd18};
      6'd51: row = {8'd10,  8'd12,  8'd15,  8'd17};
      6'd52: row = {8'd10,  8'd12,  8'd14,  8'd16};
      6'd53: row = {8'd9,   8'd11,  8'd13,  8'd15};
      6'd54: row = {8'd9,   8'd11,  8'd12,  8'd14};
      6'd55: row = {8'd8,   8'd10,  8'd12,  8'd14};
      6'd56: row = {8'd8,   8'd9,   8'd11,  8'd13};
      6'd57: row = {8'd7,   8'd9,   8'd11,  8'd12};
      6'd58: row = {8'd7,   8'd9,   8'd10,  8'd12};
      6'd59: row = {8'd7,   8'd8,   8'd10,  8'd11};
      6'd60: row = {8'd6,   8'd8,   8'd9,   8'd11};
      6'd61: row = {8'd6,   8'd7,   8'd9,   8'd10};
      6'd62: row = {8'd6,   8'd7,   8'd8,   8'd9};
      default: row = {8'd2, 8'd2,   8'd2,   8'd2};
    endcase
    return row[8 * (3 - int'(q)) +: 8];
  endfunction

  // Next probability state after an LPS.
  function automatic logic [5:0] trans_idx_lps(input logic [5:0] s);
    logic [5:0] t;
    case (s)
      6'd0,  6'd1:                 t = 6'd0;
      6'd2:                        t = 6'd1;
      6'd3,  6'd4:                 t = 6'd2;
      6'd5,  6'd6:                 t = 6'd4;
      6'd7:                        t = 6'd5;
      6'd8:                        t = 6'd6;
      6'd9:                        t = 6'd7;
      6'd10:                       t = 6'd8;
      6'd11, 6'd12:                t = 6'd9;
      6'd13, 6'd14:                t = 6'd11;
      6'd15:                       t = 6'd12;
      6'd16, 6'd17:                t = 6'd13;
      6'd18, 6'd19:                t = 6'd15;
      6'd20, 6'd21:                t = 6'd16;
      6'd22, 6'd23:                t = 6'd18;
      6'd24, 6'd25:                t = 6'd19;
      6'd26, 6'd27:                t = 6'd21;
      6'd28, 6'd29:                t = 6'd22;
      6'd30:                       t = 6'd23;
      6'd31, 6'd32:                t = 6'd24;
      6'd33:                       t = 6'd25;
      6'd34, 6'd35:                t = 6'd26;
      6'd36, 6'd37:                t = 6'd27;
      6'd38:                       t = 6'd28;
      6'd39, 6'd40:                t = 6'd29;
      6'd41, 6'd42, 6'd43:         t = 6'd30;
      6'd44:                       t = 6'd31;
      6'd45, 6'd46:                t = 6'd32;
      6'd47, 6'd48, 6'd49:         t = 6'd33;
      6'd50, 6'd51:                t = 6'd34;
      6'd52, 6'd53, 6'd54:         t = 6'd35;
      6'd55, 6'd56, 6'd57:         t = 6'd36;
      6'd58, 6'd59, 6'd60:         t = 6'd37;
      6'd61, 6'd62:                t = 6'd38;
      default:                     t = 6'd63;
    endcase
    return t;
  endfunction

  // Context initialization: 8-bit init value and slice QP to context state.
  function automatic ctx_t init_ctx(input logic [7:0] init_value, input logic [5:0] qp);
    int m, n, q, pre;
    ctx_t c;
    m   = int'(init_value[7:4]) * 5 - 45;
    n   = (int'(init_value[3:0]) << 3) - 16;
    q   = (qp > 6'd51) ? 51 : int'(qp);
    pre = ((m * q) >>> 4) + n;
    if (pre < 1)   pre = 1;
    if (pre > 126) pre = 126;
    if (pre <= 63) begin
      c.mps   = 1'b0;
      c.state = 6'(63 - pre);
    end else begin
      c.mps   = 1'b1;
      c.state = 6'(pre - 64);
    end
    return c;
  endfunction

  // Up-right diagonal scan: scan index of position (x, y) in a square block
  // of side 2^log2s (log2s = 0..3).
  function automatic logic [5:0] diag_index(input logic [2:0] x, input logic [2:0] y,
                                            input logic [1:0] log2s);
    int s, d, nprev, xmin;
    s = 1 << log2s;
    d = int'(x) + int'(y);
    if (d < s) begin
      nprev = d * (d + 1) / 2;
      xmin   = 0;
    end else begin
      nprev = s * s - (2 * s - d) * (2 * s - 1 - d) / 2;
      xmin   = d - s + 1;
    end
    return 6'(nprev + int'(x) - xmin);
  endfunction

  // Inverse of diag_index: position of scan index idx.
  function automatic logic [5:0] diag_pos(input logic [5:0] idx, input logic [1:0] log2s);
    logic [5:0] xy;
    xy = '0;
    for (int yy = 0; yy < 8; yy++)
      for (int xx = 0; xx < 8; xx++)
        if (xx < (1 << log2s) && yy < (1 << log2s) &&
            diag_index(3'(xx), 3'(yy), log2s) == idx)
          xy = {3'(yy), 3'(xx)};
    return xy;  // {y, x}
  endfunction

  // Scan index of (x, y) in a 2^log2s square for any of the three scans.
  function automatic logic [5:0] scan_index(input logic [2:0] x, input logic [2:0] y,
                                            input logic [1:0] log2s, input scan_e scan);
    case (scan)
      SCAN_HOR: return 6'((int'(y) << log2s) + int'(x));
      SCAN_VER: return 6'((int'(x) << log2s) + int'(y));
      default:  return diag_index(x, y, log2s);
    endcase
  endfunction

  // Position {y, x} of scan index idx for any of the three scans.
  function automatic logic [5:0] scan_pos(input logic [5:0] idx, input logic [1:0] log2s,
                                          input scan_e scan);
    logic [2:0] lo, hi;
    lo = 3'(idx & 6'((1 << log2s) - 1));
    hi = 3'(idx >> log2s);
    case (scan)
      SCAN_HOR: return {hi, lo};
      SCAN_VER: return {lo, hi};
      default:  return diag_pos(idx, log2s);
    endcase
  endfunction

endpackage
