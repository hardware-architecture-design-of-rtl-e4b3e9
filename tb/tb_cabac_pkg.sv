// tb_cabac_pkg: reference models used by the testbenches.
//
//  * cabac_enc   - a CABAC arithmetic encoder (interval low/range with
//                  outstanding-bit handling, bypass, terminate and flush),
//                  producing the bitstream the decoder must undo.
//  * resid_gen   - a residual_coding syntax generator: from a block of
//                  coefficients it produces the list of bins (syntax
//                  element, mode, context address, value) in bitstream
//                  order.  Context selection is written here independently
//                  of the RTL, following the HEVC rules, including the
//                  horizontal/vertical scans, transform_skip_flag and sign
//                  data hiding (where it rewrites the hidden sign in the
//                  coefficient block so that the parity rule holds).
//                  It also produces random SAO parameters of one CTB as
//                  bins plus the list of expected (element, value) pairs.
//  * ref_init    - the context initialization formula.
package tb_cabac_pkg;
  import cabac_pkg::*;

  typedef struct {
    int se;
    int mode;   // 0 regular, 1 bypass, 2 terminate
    int ctx;
    bit b;
  } bin_rec_t;

  function automatic ctx_t ref_init(int v, int qp);
    int slope, offs, pre;
    ctx_t c;
    slope = (v / 16) * 5 - 45;
    offs  = (v % 16) * 8 - 16;
    if (qp > 51) qp = 51;
    pre = ((slope * qp) >>> 4) + offs;
    pre = (pre < 1) ? 1 : (pre > 126 ? 126 : pre);
    c.mps   = (pre > 63);
    c.state = 6'(c.mps ? pre - 64 : 63 - pre);
    return c;
  endfunction

  class cabac_enc;
    int low, range, outstanding;
    bit first;
    bit bits[$];

    function new();
      low = 0; range = 510; outstanding = 0; first = 1;
    endfunction

    function void put_bit(bit b);
      if (first) first = 0;
      else bits.push_back(b);
      while (outstanding > 0) begin
        bits.push_back(!b);
        outstanding--;
      end
    endfunction

    function void renorm();
      while (range < 256) begin
        if (low < 256) put_bit(0);
        else if (low >= 512) begin low -= 512; put_bit(1); end
        else begin low -= 256; outstanding++; end
        range = range << 1;
        low   = low << 1;
      end
    endfunction

    function void decision(ref ctx_t c, input bit b);
      int rlps;
      rlps = int'(range_tab_lps(c.state, 2'((range >> 6) & 3)));
      range -= rlps;
      if (b != c.mps) begin
        low += range;
        range = rlps;
        if (c.state == 0) c.mps = !c.mps;
        c.state = trans_idx_lps(c.state);
      end else if (c.state < 62) begin
        c.state = c.state + 1;
      end
      renorm();
    endfunction

    function void bypass(bit b);
      low = low << 1;
      if (b) low += range;
      if (low >= 1024) begin put_bit(1); low -= 1024; end
      else if (low < 512) put_bit(0);
      else begin low -= 512; outstanding++; end
    endfunction

    function void terminate(bit b);
      range -= 2;
      if (b) begin
        low += range;
        range = 2;
        renorm();
        put_bit((low >> 9) & 1);
        bits.push_back((low >> 8) & 1);
        bits.push_back(1);
      end else begin
        renorm();
      end
    endfunction
  endclass

  typedef struct {
    int se;
    int val;
  } se_rec_t;

  class resid_gen;
    int group_idx[32] = '{0,1,2,3,4,4,5,5,6,6,6,6,7,7,7,7,
                          8,8,8,8,8,8,8,8,9,9,9,9,9,9,9,9};
    int min_in_group[10] = '{0,1,2,3,4,6,8,12,16,24};
    int map4[16] = '{0,1,4,5,2,3,4,5,6,6,8,8,7,7,8,8};
    int c1;               // greater1 context carried across sub-blocks
    int n_hidden;         // sub-blocks with a hidden sign (running count)
    bin_rec_t q[$];
    se_rec_t  sev[$];     // expected SAO elements with their values

    // up-right diagonal order of an s x s grid: returns x and y lists
    function void diag(int s, ref int xs[$], ref int ys[$]);
      xs.delete(); ys.delete();
      for (int d = 0; d <= 2 * s - 2; d++)
        for (int x = 0; x < s; x++)
          if (d - x >= 0 && d - x < s) begin
            xs.push_back(x); ys.push_back(d - x);
          end
    endfunction

    // scan order of an s x s grid (0 diagonal, 1 horizontal, 2 vertical)
    function void order(int s, int scan, ref int xs[$], ref int ys[$]);
      if (scan == 0) begin
        diag(s, xs, ys);
        return;
      end
      xs.delete(); ys.delete();
      for (int i = 0; i < s * s; i++) begin
        if (scan == 1) begin xs.push_back(i % s); ys.push_back(i / s); end
        else           begin xs.push_back(i / s); ys.push_back(i % s); end
      end
    endfunction

    function void put(int se, int mode, int ctx, bit b);
      bin_rec_t r;
      r.se = se; r.mode = mode; r.ctx = ctx; r.b = b;
      q.push_back(r);
    endfunction

    function void put_rem(int sym, int k);
      if (sym < (3 << k)) begin
        int len = sym >> k;
        for (int i = 0; i < len; i++) put(SE_REM, 1, 0, 1);
        put(SE_REM, 1, 0, 0);
        for (int i = k - 1; i >= 0; i--) put(SE_REM, 1, 0, (sym >> i) & 1);
      end else begin
        int len = k;
        sym -= (3 << k);
        while (sym >= (1 << len)) begin sym -= (1 << len); len++; end
        for (int i = 0; i < 3 + len - k; i++) put(SE_REM, 1, 0, 1);
        put(SE_REM, 1, 0, 0);
        for (int i = len - 1; i >= 0; i--) put(SE_REM, 1, 0, (sym >> i) & 1);
      end
    endfunction

    function void put_se(int se, int val);
      se_rec_t r;
      r.se = se; r.val = val;
      sev.push_back(r);
    endfunction

    // truncated unary value v with cMax; bin 0 regular (ctx) or all bypass
    function void put_tr(int se, int v, int cmax, int ctx, bit first_reg);
      for (int i = 0; i < cmax && i <= v; i++)
        put(se, (first_reg && i == 0) ? 0 : 1, ctx, i < v);
      put_se(se, v);
    endfunction

    function void put_fl(int se, int v, int len);
      for (int i = len - 1; i >= 0; i--) put(se, 1, 0, (v >> i) & 1);
      put_se(se, v);
    endfunction

    // k-th order Exp-Golomb bins of v (bypass)
    function void put_egk(int se, int v, int k);
      int w = v;
      while (w >= (1 << k)) begin put(se, 1, 0, 1); w -= (1 << k); k++; end
      put(se, 1, 0, 0);
      for (int i = k - 1; i >= 0; i--) put(se, 1, 0, (w >> i) & 1);
      put_se(se, v);
    endfunction

    // random mvd_coding: bins and elements for the difference (mx, my)
    function void gen_mvd(int mx, int my);
      int a[2];
      a[0] = (mx < 0) ? -mx : mx;
      a[1] = (my < 0) ? -my : my;
      for (int c = 0; c < 2; c++) begin
        put(SE_MVD_GT0, 0, CTX_MVD_GT0, a[c] > 0); put_se(SE_MVD_GT0, a[c] > 0);
      end
      for (int c = 0; c < 2; c++)
        if (a[c] > 0) begin
          put(SE_MVD_GT1, 0, CTX_MVD_GT1, a[c] > 1); put_se(SE_MVD_GT1, a[c] > 1);
        end
      for (int c = 0; c < 2; c++)
        if (a[c] > 0) begin
          if (a[c] > 1) put_egk(SE_MVD_MINUS2, a[c] - 2, 1);
          put_fl(SE_MVD_SIGN, ((c == 0) ? mx : my) < 0, 1);
        end
    endfunction

    // random motion vector difference component
    function int rand_mv();
      case ($urandom_range(0, 3))
        0: return 0;
        1: return $urandom_range(0, 1) ? 1 : -1;
        2: return $urandom_range(0, 40) - 20;
        default: return $urandom_range(0, 65536) - 32768;
      endcase
    endfunction

    // ref_idx_lX, truncated unary with cMax; bins 0 and 1 context-coded
    function void put_ref(int cmax);
      int v = $urandom_range(0, cmax);
      for (int i = 0; i < cmax && i <= v; i++)
        put(SE_REF_IDX, (i < 2) ? 0 : 1, (i < 2) ? CTX_REF_IDX + i : 0, i < v);
      put_se(SE_REF_IDX, v);
    endfunction

    // random inter prediction unit with the given CU and slice facts
    function void gen_pu(bit skip, bit slice_b, int mm1, int nr0, int nr1, bit l1zero,
                         int depth, bit pb12);
      bit merge;
      int pred;
      merge = skip || ($urandom_range(0, 2) == 0);
      if (!skip) begin
        put(SE_MERGE_FLAG, 0, CTX_MERGE_FLAG, merge); put_se(SE_MERGE_FLAG, merge);
      end
      if (merge) begin
        if (mm1 > 0) put_tr(SE_MERGE_IDX, $urandom_range(0, mm1), mm1, CTX_MERGE_IDX, 1);
        return;
      end
      pred = slice_b ? $urandom_range(0, pb12 ? 1 : 2) : 0;
      if (slice_b) begin
        if (!pb12) begin
          put(SE_INTER_BI, 0, CTX_INTER_PRED + depth, pred == 2); put_se(SE_INTER_BI, pred == 2);
        end
        if (pred != 2) begin
          put(SE_INTER_L1, 0, CTX_INTER_PRED + 4, pred == 1); put_se(SE_INTER_L1, pred == 1);
        end
      end
      if (pred != 1) begin
        bit f = $urandom_range(0, 1);
        if (nr0 > 0) put_ref(nr0);
        gen_mvd(rand_mv(), rand_mv());
        put(SE_MVP_FLAG, 0, CTX_MVP_FLAG, f); put_se(SE_MVP_FLAG, f);
      end
      if (pred != 0) begin
        bit f = $urandom_range(0, 1);
        if (nr1 > 0) put_ref(nr1);
        if (!(l1zero && pred == 2)) gen_mvd(rand_mv(), rand_mv());
        put(SE_MVP_FLAG, 0, CTX_MVP_FLAG, f); put_se(SE_MVP_FLAG, f);
      end
    endfunction

    // random intra prediction modes of one CU (four blocks when nxn)
    function void gen_intra(bit nxn);
      bit prev[4];
      int cm;
      for (int j = 0; j < (nxn ? 4 : 1); j++) begin
        prev[j] = $urandom_range(0, 1);
        put(SE_PREV_INTRA, 0, CTX_PREV_INTRA, prev[j]); put_se(SE_PREV_INTRA, prev[j]);
      end
      for (int j = 0; j < (nxn ? 4 : 1); j++)
        if (prev[j]) put_tr(SE_MPM_IDX, $urandom_range(0, 2), 2, 0, 0);
        else         put_fl(SE_REM_INTRA, $urandom_range(0, 31), 5);
      cm = $urandom_range(0, 4);
      put(SE_CHROMA_FLAG, 0, CTX_CHROMA_PRED, cm != 4); put_se(SE_CHROMA_FLAG, cm != 4);
      if (cm != 4) put_fl(SE_CHROMA_IDX, cm, 2);
    endfunction

    // random SAO parameters of one CTB
    function void gen_sao(bit luma_en, bit chroma_en, bit left, bit up);
      int tc = 0;
      if (left) begin
        bit m = ($urandom_range(0, 3) == 0);
        put(SE_SAO_MERGE_LEFT, 0, CTX_SAO_MERGE, m); put_se(SE_SAO_MERGE_LEFT, m);
        if (m) return;
      end
      if (up) begin
        bit m = ($urandom_range(0, 3) == 0);
        put(SE_SAO_MERGE_UP, 0, CTX_SAO_MERGE, m); put_se(SE_SAO_MERGE_UP, m);
        if (m) return;
      end
      for (int c = 0; c < 3; c++) begin
        int t;
        int off[4];
        if (!((c == 0) ? luma_en : chroma_en)) continue;
        if (c < 2) begin
          t = $urandom_range(0, 2);
          put_tr(SE_SAO_TYPE, t, 2, CTX_SAO_TYPE, 1);
          if (c == 1) tc = t;
        end else t = tc;
        if (t == 0) continue;
        for (int i = 0; i < 4; i++) begin
          off[i] = ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(0, 7);
          put_tr(SE_SAO_OFFSET_ABS, off[i], 7, 0, 0);
        end
        if (t == 1) begin
          for (int i = 0; i < 4; i++)
            if (off[i] != 0) put_fl(SE_SAO_OFFSET_SIGN, $urandom_range(0, 1), 1);
          put_fl(SE_SAO_BAND_POS, $urandom_range(0, 31), 5);
        end else if (c < 2) begin
          put_fl(SE_SAO_EO_CLASS, $urandom_range(0, 3), 2);
        end
      end
    endfunction

    // coef[x + 32*y]; at least one coefficient must be non-zero.  With
    // sdh set, hidden signs are forced in coef to match the parity rule.
    function void gen(ref int coef[1024], input int log2, input int cidx,
                      input int scan = 0, input bit sdh = 0,
                      input bit ts_en = 0, input bit ts_flag = 0);
      int sbx[$], sby[$], px[$], py[$];
      int s = 1 << log2, nsb = s / 4;
      int last_i, last_n, lx, ly, cmax, pre, off, sh;
      bit sbflag[8][8];
      bit chroma = (cidx != 0);
      order(nsb, scan, sbx, sby);
      order(4, scan, px, py);
      c1 = 1;
      if (ts_en && log2 == 2) put(SE_TS, 0, CTX_TS + (chroma ? 1 : 0), ts_flag);
      last_i = -1; last_n = -1;
      for (int i = 0; i < nsb * nsb; i++)
        for (int n = 0; n < 16; n++)
          if (coef[(sbx[i]*4 + px[n]) + 32 * (sby[i]*4 + py[n])] != 0) begin
            last_i = i; last_n = n;
          end
      lx = sbx[last_i] * 4 + px[last_n];
      ly = sby[last_i] * 4 + py[last_n];
      cmax = 2 * log2 - 1;
      if (chroma) begin off = 15; sh = log2 - 2; end
      else begin off = 3 * (log2 - 2) + ((log2 - 1) >> 2); sh = (log2 + 1) >> 2; end
      if (scan == 2) begin   // vertical scan codes the coordinates swapped
        int tmp = lx;
        lx = ly; ly = tmp;
      end
      for (int c = 0; c < 2; c++) begin
        pre = group_idx[c == 0 ? lx : ly];
        for (int i = 0; i < pre; i++)
          put(c == 0 ? SE_LAST_X_PREFIX : SE_LAST_Y_PREFIX, 0,
              (c == 0 ? CTX_LAST_X : CTX_LAST_Y) + off + (i >> sh), 1);
        if (pre < cmax)
          put(c == 0 ? SE_LAST_X_PREFIX : SE_LAST_Y_PREFIX, 0,
              (c == 0 ? CTX_LAST_X : CTX_LAST_Y) + off + (pre >> sh), 0);
      end
      for (int c = 0; c < 2; c++) begin
        int v = (c == 0) ? lx : ly;
        pre = group_idx[v];
        if (pre > 3) begin
          int len = (pre >> 1) - 1;
          int suf = v - min_in_group[pre];
          for (int i = len - 1; i >= 0; i--)
            put(c == 0 ? SE_LAST_X_SUFFIX : SE_LAST_Y_SUFFIX, 1, 0, (suf >> i) & 1);
        end
      end
      foreach (sbflag[a, b]) sbflag[a][b] = 0;
      for (int i = last_i; i >= 0; i--) begin
        int xs = sbx[i], ys = sby[i];
        int right = (xs + 1 < nsb) ? sbflag[xs + 1][ys] : 0;
        int below = (ys + 1 < nsb) ? sbflag[xs][ys + 1] : 0;
        int pat = right + 2 * below;
        bit any = 0, infer = 0;
        int sig_n[$];
        for (int n = 0; n < 16; n++)
          if (coef[(xs*4 + px[n]) + 32 * (ys*4 + py[n])] != 0) any = 1;
        if (i < last_i && i > 0) begin
          put(SE_CSBF, 0, CTX_CSBF + ((right + below) > 0 ? 1 : 0) + (chroma ? 2 : 0), any);
          sbflag[xs][ys] = any;
          infer = any;
        end else begin
          sbflag[xs][ys] = 1;
        end
        if (!sbflag[xs][ys]) continue;
        if (i == last_i) sig_n.push_back(last_n);
        for (int n = (i == last_i ? last_n - 1 : 15); n >= 0; n--) begin
          int x = xs * 4 + px[n], y = ys * 4 + py[n];
          bit sg = (coef[x + 32 * y] != 0);
          int ctx;
          if (n == 0 && infer) begin
            sig_n.push_back(0);
            continue;
          end
          if (log2 == 2) ctx = map4[4 * (y % 4) + (x % 4)];
          else if (x + y == 0) ctx = 0;
          else begin
            int xp = x % 4, yp = y % 4;
            case (pat)
              0: ctx = (xp + yp == 0) ? 2 : (xp + yp < 3 ? 1 : 0);
              1: ctx = (yp == 0) ? 2 : (yp == 1 ? 1 : 0);
              2: ctx = (xp == 0) ? 2 : (xp == 1 ? 1 : 0);
              default: ctx = 2;
            endcase
            if (!chroma) begin
              if (xs + ys > 0) ctx += 3;
              ctx += (log2 == 3) ? (scan == 0 ? 9 : 15) : 21;
            end else begin
              ctx += (log2 == 3) ? 9 : 12;
            end
          end
          if (chroma) ctx += 27;
          put(SE_SIG, 0, CTX_SIG + ctx, sg);
          if (sg) begin
            infer = 0;
            sig_n.push_back(n);
          end
        end
        if (sig_n.size() > 0) begin
          int ctxset = (i > 0 && !chroma) ? 2 : 0;
          int first2 = -1, rice = 0;
          int absv[$];
          bit hidden;
          int sum = 0;
          hidden = sdh && (sig_n[0] - sig_n[sig_n.size() - 1] > 3);
          if (hidden) begin
            int fi = (xs*4 + px[sig_n[sig_n.size() - 1]]) + 32 * (ys*4 + py[sig_n[sig_n.size() - 1]]);
            foreach (sig_n[j]) begin
              int v = coef[(xs*4 + px[sig_n[j]]) + 32 * (ys*4 + py[sig_n[j]])];
              sum += (v < 0) ? -v : v;
            end
            if ((sum % 2 == 1) != (coef[fi] < 0)) coef[fi] = -coef[fi];
            n_hidden++;
          end
          if (c1 == 0) ctxset++;
          c1 = 1;
          foreach (sig_n[j]) begin
            int v = coef[(xs*4 + px[sig_n[j]]) + 32 * (ys*4 + py[sig_n[j]])];
            absv.push_back(v < 0 ? -v : v);
          end
          for (int j = 0; j < sig_n.size() && j < 8; j++) begin
            bit g = absv[j] > 1;
            put(SE_GT1, 0, CTX_GT1 + 4 * ctxset + c1 + (chroma ? 16 : 0), g);
            if (g) begin
              c1 = 0;
              if (first2 < 0) first2 = j;
            end else if (c1 > 0 && c1 < 3) c1++;
          end
          if (first2 >= 0)
            put(SE_GT2, 0, CTX_GT2 + ctxset + (chroma ? 4 : 0), absv[first2] > 2);
          foreach (sig_n[j]) begin
            int v = coef[(xs*4 + px[sig_n[j]]) + 32 * (ys*4 + py[sig_n[j]])];
            if (!(hidden && j == sig_n.size() - 1)) put(SE_SIGN, 1, 0, v < 0);
          end
          foreach (sig_n[j]) begin
            int base = (j < 8) ? (2 + (j == first2 ? 1 : 0)) : 1;
            if (absv[j] >= base) begin
              put_rem(absv[j] - base, rice);
              if (absv[j] > (3 << rice)) rice = (rice + 1 > 4) ? 4 : rice + 1;
            end
          end
        end
      end
    endfunction
  endclass
endpackage
