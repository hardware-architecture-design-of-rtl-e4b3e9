// tb_cgm: context addresses for random syntax elements and inputs against
// a reference written from the HEVC context-increment rules (last
// position prefix, coded_sub_block_flag, sig_coeff_flag, greater1,
// greater2, transform_skip_flag), with every block size, scan and colour
// component.
module tb_cgm;
  import cabac_pkg::*;
  se_e se;
  scan_e scan;
  logic [4:0] bin_idx, x_c, y_c;
  logic [1:0] c_idx, prev_csbf, ctx_set, g1ctx, ct_depth;
  logic [2:0] log2_size;
  logic [CTX_AW-1:0] ctx_idx;
  int checks = 0, failures = 0;
  int map4[16] = '{0,1,4,5,2,3,4,5,6,6,8,8,7,7,8,8};

  cgm dut (.*);

  function automatic int ref_sig(int x, int y, int l2, bit ch, int pc, int sc);
    int r, xp, yp;
    if (l2 == 2) r = map4[4 * y + x];
    else if (x == 0 && y == 0) r = 0;
    else begin
      xp = x % 4; yp = y % 4;
      if (pc == 0) r = (xp + yp == 0) ? 2 : (xp + yp <= 2) ? 1 : 0;
      else if (pc == 1) r = 2 - ((yp > 2) ? 2 : yp);
      else if (pc == 2) r = 2 - ((xp > 2) ? 2 : xp);
      else r = 2;
      if (ch) r += (l2 == 3) ? 9 : 12;
      else r += ((x >= 4 || y >= 4) ? 3 : 0) + ((l2 == 3) ? ((sc == 0) ? 9 : 15) : 21);
    end
    return ch ? 27 + r : r;
  endfunction

  initial begin
    for (int it = 0; it < 30000; it++) begin
      int l2, e, s, exp_ctx;
      bit ch;
      l2 = $urandom_range(2, 5);
      s  = $urandom_range(0, 9);
      scan = scan_e'($urandom_range(0, 2));
      ch = $urandom_range(0, 2) == 0;
      log2_size = 3'(l2);
      c_idx = ch ? 2'($urandom_range(1, 2)) : 2'd0;
      x_c = 5'($urandom_range(0, (1 << l2) - 1));
      y_c = 5'($urandom_range(0, (1 << l2) - 1));
      bin_idx = 5'($urandom_range(0, 2 * l2 - 2));
      prev_csbf = 2'($urandom);
      ctx_set = ch ? 2'($urandom_range(0, 1)) : 2'($urandom);
      g1ctx = 2'($urandom);
      ct_depth = 2'($urandom);
      case (s)
        0, 1: begin
          int off, sh;
          se = (s == 0) ? SE_LAST_X_PREFIX : SE_LAST_Y_PREFIX;
          if (ch) begin off = 15; sh = l2 - 2; end
          else begin off = (l2 == 2) ? 0 : (l2 == 3) ? 3 : (l2 == 4) ? 6 : 10; sh = (l2 == 2) ? 0 : 1; end
          exp_ctx = ((s == 0) ? 0 : 18) + off + (int'(bin_idx) >> sh);
        end
        2: begin se = SE_CSBF; exp_ctx = 36 + (prev_csbf != 0) + (ch ? 2 : 0); end
        3: begin se = SE_SIG; exp_ctx = 40 + ref_sig(x_c, y_c, l2, ch, prev_csbf, int'(scan)); end
        6: begin se = SE_TS; exp_ctx = 112 + (ch ? 1 : 0); end
        7: begin
          se = $urandom_range(0, 1) ? SE_MVD_GT1 : SE_MVD_GT0;
          exp_ctx = (se == SE_MVD_GT1) ? 117 : 116;
        end
        8: begin
          se = $urandom_range(0, 1) ? SE_CHROMA_FLAG : SE_PREV_INTRA;
          exp_ctx = (se == SE_CHROMA_FLAG) ? 119 : 118;
        end
        9: begin
          case ($urandom_range(0, 5))
            0: begin se = SE_MERGE_FLAG; exp_ctx = 120; end
            1: begin se = SE_MERGE_IDX;  exp_ctx = 121; end
            2: begin se = SE_INTER_BI;   exp_ctx = 122 + ct_depth; end
            3: begin se = SE_INTER_L1;   exp_ctx = 126; end
            4: begin se = SE_REF_IDX; bin_idx = 5'($urandom_range(0, 1)); exp_ctx = 127 + bin_idx; end
            default: begin se = SE_MVP_FLAG; exp_ctx = 129; end
          endcase
        end
        4: begin se = SE_GT1; exp_ctx = 82 + (ch ? 16 : 0) + 4 * ctx_set + g1ctx; end
        default: begin se = SE_GT2; exp_ctx = 106 + (ch ? 4 : 0) + ctx_set; end
      endcase
      #1;
      checks++;
      if (int'(ctx_idx) != exp_ctx) begin
        failures++;
        if (failures < 10) $display("FAIL se %0d l2 %0d ch %0d (%0d,%0d) pc %0d bin %0d: %0d expected %0d",
                                    s, l2, ch, x_c, y_c, prev_csbf, bin_idx, ctx_idx, exp_ctx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
