// bsru: bitstream resolution unit for residual data.
//
// Walks the residual_coding syntax of one transform block and decides, bin
// by bin, which syntax element is decoded next, in which mode, with which
// binarization, and with which context-selection inputs for the context
// index generator (cgm).  Order per block: transform_skip_flag (regular,
// 4x4 blocks only, when the host enables it), last_sig_coeff_x/y_prefix
// (truncated unary, regular), their suffixes when the prefix exceeds 3
// (fixed length, bypass); then for each 4x4 sub-block from the one holding
// the last coefficient down to sub-block 0: coded_sub_block_flag (inferred
// 1 for the first and last sub-block), sig_coeff_flag for each scan
// position below the last one (the DC flag is inferred when the sub-block
// was signalled coded and no other flag was set), up to eight
// coeff_abs_level_greater1_flag, one coeff_abs_level_greater2_flag, the
// sign bits (bypass) and coeff_abs_level_remaining (Golomb-Rice, bypass)
// with the Rice parameter raised after each level above 3*2^k (limit 4).
// With sign data hiding enabled, a sub-block whose first and last
// significant scan positions are more than 3 apart carries no sign bit for
// its lowest-scan-position coefficient; that sign is the parity of the
// sub-block's sum of absolute levels.  For the vertical scan the decoded
// last-position coordinates are swapped before use.
//
// The embedded rcm converts the last position to scan indices, so parsing
// jumps straight to it, and enumerates the significant positions, so the
// level phase visits only significant coefficients.
//
// Interface: start (with log2_size 2..5, c_idx, scan (diagonal, horizontal
// or vertical), sdh_en (sign data hiding) and ts_en (transform_skip_flag
// present)) begins a block; each
// cycle with req_valid asks the arithmetic decoding unit for one bin of
// mode req_mode; the answer comes back on bin_valid/bin and is also fed to
// the de-binarizer, whose done/value end the element.  Each final
// coefficient is output once on coef_valid with its (x, y) position and
// signed value, in reverse scan order; done pulses after the last one.
// The host decides scan, sdh_en and ts_en from the prediction mode, the
// picture parameters and cu_transquant_bypass_flag; the range-extension
// tools are not handled (this design's simplification).
module bsru
  import cabac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [2:0]  log2_size,
  input  logic [1:0]  c_idx,
  input  scan_e       scan,
  input  logic        sdh_en,
  input  logic        ts_en,
  output logic        busy,
  output logic        done,
  // bin request to the arithmetic decoding unit
  output logic        req_valid,
  output bin_mode_e   req_mode,
  input  logic        bin_valid,
  // context index generator inputs
  output se_e         se,
  output logic [1:0]  cg_c_idx,
  output logic [2:0]  cg_log2_size,
  output scan_e       cg_scan,
  output logic [4:0]  x_c,
  output logic [4:0]  y_c,
  output logic [1:0]  prev_csbf,
  output logic [1:0]  ctx_set,
  output logic [1:0]  g1ctx,
  // de-binarizer
  output bin_type_e   btype,
  output logic [3:0]  bparam,
  input  logic        se_done,
  input  logic [15:0] se_value,
  // decoded coefficients
  output logic        coef_valid,
  output logic [4:0]  coef_x,
  output logic [4:0]  coef_y,
  output logic signed [15:0] coef_value
);
  typedef enum logic [3:0] {
    S_IDLE, S_TS, S_LX, S_LY, S_LXS, S_LYS, S_SETLAST, S_SB, S_CSBF, S_SIG,
    S_LVL, S_GT1, S_GT2, S_SIGN, S_REM, S_NEXT
  } state_e;

  state_e      st_q;
  logic [2:0]  log2_q;
  logic [1:0]  cidx_q;
  scan_e       scan_q;
  logic        sdh_q, hidden_q, par_q;
  logic [3:0]  lx_pre_q, ly_pre_q;
  logic [4:0]  last_x_q, last_y_q;
  logic [5:0]  last_sb_q, sb_q;
  logic [3:0]  last_pos_q, n_q;
  logic [63:0] csbf_q;
  logic [15:0] sig_q;
  logic        infer_dc_q;
  logic [3:0]  k_q;
  logic [4:0]  num_q;
  logic [7:0]  gt1_q;
  logic        gt2_q;
  logic [3:0]  g2idx_q;
  logic        g2v_q;
  logic [15:0] sign_q;
  logic [1:0]  c1_q, set_q;
  logic [2:0]  rice_q;
  logic [1:0]  pcsbf_q;

  // rcm connections
  logic [5:0]  r_last_sb;
  logic [3:0]  r_last_pos, r_pos, r_kth, r_hi, r_lo;
  logic [4:0]  r_lx, r_ly;
  logic [2:0]  r_sbx, r_sby;
  logic [1:0]  r_px, r_py;
  logic [4:0]  r_num;

  // vertical scan: the coded coordinates are swapped
  assign r_lx = (scan_q == SCAN_VER) ? last_y_q : last_x_q;
  assign r_ly = (scan_q == SCAN_VER) ? last_x_q : last_y_q;

  rcm u_rcm (
    .log2_size(log2_q), .scan(scan_q), .last_x(r_lx), .last_y(r_ly),
    .last_sb(r_last_sb), .last_pos(r_last_pos),
    .sb_idx(sb_q), .sb_x(r_sbx), .sb_y(r_sby),
    .pos(r_pos), .pos_x(r_px), .pos_y(r_py),
    .sig_map(sig_q), .k(k_q), .num_sig(r_num), .kth_pos(r_kth),
    .hi_pos(r_hi), .lo_pos(r_lo)
  );

  assign r_pos = (st_q == S_SIG) ? n_q : r_kth;

  // helpers
  logic [3:0]  n_gt1;          // number of greater1 flags in this sub-block
  logic [2:0]  nsb;            // sub-blocks per row minus one
  logic [2:0]  base_lvl, abs_sofar;
  logic        need_rem;
  logic [15:0] abs_full;
  logic [4:0]  lx_full, ly_full;
  logic [4:0]  n_sign;         // number of coded sign bits
  logic        last_k;         // level phase at the last listed coefficient

  always_comb begin
    n_gt1     = (num_q > 5'd8) ? 4'd8 : num_q[3:0];
    nsb       = 3'((1 << (log2_q - 3'd2)) - 1);
    base_lvl  = (k_q < 4'd8) ? (3'd2 + 3'(g2v_q && k_q == g2idx_q)) : 3'd1;
    abs_sofar = (k_q < 4'd8) ? (3'd1 + 3'(gt1_q[k_q[2:0]]) + 3'(g2v_q && k_q == g2idx_q && gt2_q))
                             : 3'd1;
    need_rem  = (abs_sofar == base_lvl);
    n_sign    = num_q - 5'(hidden_q);
    last_k    = (5'(k_q) + 5'd1 == num_q);
    abs_full  = need_rem ? (16'(base_lvl) + se_value) : 16'(abs_sofar);
    // last position from prefix and suffix
    lx_full   = (lx_pre_q > 4'd3)
              ? 5'(((5'd1 << ((lx_pre_q >> 1) - 4'd1)) * (5'd2 + 5'(lx_pre_q[0]))) + 5'(se_value))
              : 5'(lx_pre_q);
    ly_full   = (ly_pre_q > 4'd3)
              ? 5'(((5'd1 << ((ly_pre_q >> 1) - 4'd1)) * (5'd2 + 5'(ly_pre_q[0]))) + 5'(se_value))
              : 5'(ly_pre_q);
  end

  // request and context-selection outputs
  always_comb begin
    req_valid    = 1'b0;
    req_mode     = BIN_REGULAR;
    se           = SE_SIG;
    btype        = BT_FL;
    bparam       = 4'd1;
    cg_c_idx     = cidx_q;
    cg_log2_size = log2_q;
    cg_scan      = scan_q;
    x_c          = {r_sbx, 2'b00} + 5'(r_px);
    y_c          = {r_sby, 2'b00} + 5'(r_py);
    prev_csbf    = pcsbf_q;
    ctx_set      = set_q;
    g1ctx        = c1_q;
    unique case (st_q)
      S_TS:  begin req_valid = 1'b1; se = SE_TS; end
      S_LX:  begin req_valid = 1'b1; se = SE_LAST_X_PREFIX; btype = BT_TR;
                   bparam = 4'({log2_q, 1'b0} - 4'd1); end
      S_LY:  begin req_valid = 1'b1; se = SE_LAST_Y_PREFIX; btype = BT_TR;
                   bparam = 4'({log2_q, 1'b0} - 4'd1); end
      S_LXS: begin req_valid = 1'b1; se = SE_LAST_X_SUFFIX; req_mode = BIN_BYPASS;
                   bparam = (lx_pre_q >> 1) - 4'd1; end
      S_LYS: begin req_valid = 1'b1; se = SE_LAST_Y_SUFFIX; req_mode = BIN_BYPASS;
                   bparam = (ly_pre_q >> 1) - 4'd1; end
      S_CSBF: begin req_valid = 1'b1; se = SE_CSBF; end
      S_SIG: begin req_valid = !(n_q == 4'd0 && infer_dc_q); se = SE_SIG; end
      S_GT1: begin req_valid = 1'b1; se = SE_GT1; end
      S_GT2: begin req_valid = 1'b1; se = SE_GT2; end
      S_SIGN: begin req_valid = 1'b1; se = SE_SIGN; req_mode = BIN_BYPASS; end
      S_REM: begin req_valid = need_rem; se = SE_REM; req_mode = BIN_BYPASS;
                   btype = BT_REM; bparam = 4'(rice_q); end
      default: ;
    endcase
  end

  assign busy = (st_q != S_IDLE);

  // coefficient output
  always_comb begin
    coef_valid = (st_q == S_REM) && (!need_rem || (bin_valid && se_done));
    coef_x     = x_c;
    coef_y     = y_c;
    if (hidden_q && last_k)
      coef_value = (par_q ^ abs_full[0]) ? -$signed(abs_full) : $signed(abs_full);
    else
      coef_value = sign_q[k_q] ? -$signed(abs_full) : $signed(abs_full);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE;
      log2_q <= 3'd2; cidx_q <= '0;
      scan_q <= SCAN_DIAG; sdh_q <= 1'b0; hidden_q <= 1'b0; par_q <= 1'b0;
      lx_pre_q <= '0; ly_pre_q <= '0; last_x_q <= '0; last_y_q <= '0;
      last_sb_q <= '0; sb_q <= '0; last_pos_q <= '0; n_q <= '0;
      csbf_q <= '0; sig_q <= '0; infer_dc_q <= 1'b0; k_q <= '0; num_q <= '0;
      gt1_q <= '0; gt2_q <= 1'b0; g2idx_q <= '0; g2v_q <= 1'b0; sign_q <= '0;
      c1_q <= 2'd1; set_q <= '0; rice_q <= '0; pcsbf_q <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        S_IDLE: if (start) begin
          log2_q <= log2_size;
          cidx_q <= c_idx;
          scan_q <= scan;
          sdh_q  <= sdh_en;
          csbf_q <= '0;
          c1_q   <= 2'd1;
          st_q   <= (ts_en && log2_size == 3'd2) ? S_TS : S_LX;
        end
        S_TS: if (bin_valid && se_done) st_q <= S_LX;
        S_LX: if (bin_valid && se_done) begin
          lx_pre_q <= se_value[3:0];
          st_q     <= S_LY;
        end
        S_LY: if (bin_valid && se_done) begin
          ly_pre_q <= se_value[3:0];
          last_x_q <= 5'(lx_pre_q);
          last_y_q <= 5'(se_value[3:0]);
          if (lx_pre_q > 4'd3)             st_q <= S_LXS;
          else if (se_value[3:0] > 4'd3)   st_q <= S_LYS;
          else                             st_q <= S_SETLAST;
        end
        S_LXS: if (bin_valid && se_done) begin
          last_x_q <= lx_full;
          st_q     <= (ly_pre_q > 4'd3) ? S_LYS : S_SETLAST;
        end
        S_LYS: if (bin_valid && se_done) begin
          last_y_q <= ly_full;
          st_q     <= S_SETLAST;
        end
        S_SETLAST: begin
          last_sb_q  <= r_last_sb;
          last_pos_q <= r_last_pos;
          sb_q       <= r_last_sb;
          st_q       <= S_SB;
        end
        S_SB: begin
          pcsbf_q[0] <= (r_sbx < nsb) && csbf_q[{r_sby, r_sbx + 3'd1}];
          pcsbf_q[1] <= (r_sby < nsb) && csbf_q[{r_sby + 3'd1, r_sbx}];
          infer_dc_q <= 1'b0;
          if (sb_q == last_sb_q) begin
            csbf_q[{r_sby, r_sbx}] <= 1'b1;
            sig_q <= 16'd1 << last_pos_q;
            n_q   <= last_pos_q - 4'd1;
            st_q  <= (last_pos_q == 4'd0) ? S_LVL : S_SIG;
          end else if (sb_q == 6'd0) begin
            csbf_q[{r_sby, r_sbx}] <= 1'b1;
            sig_q <= '0;
            n_q   <= 4'd15;
            st_q  <= S_SIG;
          end else begin
            sig_q <= '0;
            n_q   <= 4'd15;
            st_q  <= S_CSBF;
          end
        end
        S_CSBF: if (bin_valid && se_done) begin
          csbf_q[{r_sby, r_sbx}] <= se_value[0];
          infer_dc_q <= se_value[0];
          st_q <= se_value[0] ? S_SIG : S_NEXT;
        end
        S_SIG: begin
          if (n_q == 4'd0 && infer_dc_q) begin
            sig_q[0] <= 1'b1;
            st_q     <= S_LVL;
          end else if (bin_valid && se_done) begin
            sig_q[n_q] <= se_value[0];
            if (se_value[0]) infer_dc_q <= 1'b0;
            if (n_q == 4'd0) st_q <= S_LVL;
            n_q <= n_q - 4'd1;
          end
        end
        S_LVL: begin
          num_q  <= r_num;
          k_q    <= '0;
          gt1_q  <= '0;
          gt2_q  <= 1'b0;
          g2v_q  <= 1'b0;
          g2idx_q <= '0;
          sign_q <= '0;
          rice_q <= '0;
          par_q  <= 1'b0;
          hidden_q <= sdh_q && (r_hi - r_lo > 4'd3);
          if (r_num == 5'd0) begin
            st_q <= S_NEXT;
          end else begin
            set_q <= ((sb_q == 6'd0 || cidx_q != 2'd0) ? 2'd0 : 2'd2) + 2'(c1_q == 2'd0);
            c1_q  <= 2'd1;
            st_q  <= S_GT1;
          end
        end
        S_GT1: if (bin_valid && se_done) begin
          gt1_q[k_q[2:0]] <= se_value[0];
          if (se_value[0]) begin
            c1_q <= 2'd0;
            if (!g2v_q) begin
              g2v_q   <= 1'b1;
              g2idx_q <= k_q;
            end
          end else if (c1_q != 2'd0 && c1_q != 2'd3) begin
            c1_q <= c1_q + 2'd1;
          end
          if (k_q + 4'd1 == n_gt1) begin
            k_q  <= '0;
            st_q <= (se_value[0] || g2v_q) ? S_GT2 : S_SIGN;
          end else begin
            k_q <= k_q + 4'd1;
          end
        end
        S_GT2: if (bin_valid && se_done) begin
          gt2_q <= se_value[0];
          k_q   <= '0;
          st_q  <= S_SIGN;
        end
        S_SIGN: if (bin_valid && se_done) begin
          sign_q[k_q] <= se_value[0];
          if (5'(k_q) + 5'd1 == n_sign) begin
            k_q  <= '0;
            st_q <= S_REM;
          end else begin
            k_q <= k_q + 4'd1;
          end
        end
        S_REM: if (coef_valid) begin
          if (need_rem && abs_full > (16'd3 << rice_q) && rice_q < 3'd4)
            rice_q <= rice_q + 3'd1;
          par_q <= par_q ^ abs_full[0];
          if (last_k) st_q <= S_NEXT;
          else                         k_q <= k_q + 4'd1;
        end
        S_NEXT: begin
          if (sb_q == 6'd0) begin
            st_q <= S_IDLE;
            done <= 1'b1;
          end else begin
            sb_q <= sb_q - 6'd1;
            st_q <= S_SB;
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  // A request is only raised in a state that expects a bin.
  req_only_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid |-> busy);
endmodule
