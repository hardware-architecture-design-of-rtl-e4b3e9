// tb_hevc_entropy_decoder: end-to-end test of the entropy decoder.
//
// Builds random slices of residual blocks (all sizes 4x4..32x32, luma and
// chroma, sparse and dense, small and large levels, all three scans for
// 4x4 and 8x8, sign data hiding on or off, transform_skip_flag present or
// not), with the SAO parameters of a CTB (random slice enables and merge
// candidates) before some of the blocks and a motion vector difference
// (mvd_coding, zero to large components) or the intra prediction modes of a
// CU (2Nx2N or NxN) or an inter prediction unit (merge or not, P or B, with
// its motion vector differences) before others, turns them into bins
// with the reference syntax generator, encodes the bins with the reference
// CABAC encoder using contexts initialised from a random init-value table
// and slice QP, and feeds the bitstream (with random gaps) and the
// command sequence to the decoder.  Every decoded block is compared with
// the original coefficients, every SAO, MVD, intra-mode and PU element and its
// value with the
// generated ones, each transform_skip_flag with the encoded
// one, and every end_of_slice_segment_flag (0
// between blocks, 1 at the slice end) with the encoded one.  Counts how
// often each mechanism of the design occurred and fails if one never did.
// Runs with the design's default parameters.
module tb_hevc_entropy_decoder;
  import cabac_pkg::*;
  import tb_cabac_pkg::*;

  localparam int NSLICE = 3;
  localparam int NTU    = 24;    // blocks per slice

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cmd_valid, cmd_ready;
  cmd_e        cmd;
  logic [5:0]  slice_qp;
  logic [1:0]  init_type;
  logic [2:0]  log2_size;
  logic [1:0]  c_idx;
  scan_e       scan;
  logic        sdh_en, ts_en;
  logic        sao_luma, sao_chroma, sao_left, sao_up, intra_nxn;
  logic        pu_skip, pu_slice_b, pu_mvd_l1_zero, pu_pb12;
  logic [2:0]  pu_max_merge_m1;
  logic [3:0]  pu_nref0_m1, pu_nref1_m1;
  logic [1:0]  pu_ct_depth;
  logic [8:0]  init_mem_addr;
  logic        init_mem_re;
  logic [7:0]  init_mem_rdata;
  logic [31:0] bs_word;
  logic        bs_valid, bs_ready;
  logic        coef_valid, tu_done, se_valid, eos_valid, eos_flag;
  logic [4:0]  coef_x, coef_y;
  logic signed [15:0] coef_value;
  se_e         se_id;
  logic [15:0] se_value;

  hevc_entropy_decoder dut (.*);

  int checks = 0, failures = 0;
  int cycles = 0;

  // off-chip init-value memory model (3 tables of NUM_CTX bytes)
  logic [7:0] init_mem [3 * NUM_CTX];
  always_ff @(posedge clk) if (init_mem_re) init_mem_rdata <= init_mem[init_mem_addr];

  // stimulus storage
  int          tu_log2 [NSLICE][NTU];
  int          tu_cidx [NSLICE][NTU];
  bit          tu_eos0 [NSLICE][NTU];
  int          tu_scan [NSLICE][NTU];
  bit          tu_sdh  [NSLICE][NTU];
  bit          tu_tse  [NSLICE][NTU];
  bit          tu_tsf  [NSLICE][NTU];
  bit          tu_sao  [NSLICE][NTU];   // SAO parameters precede the block
  bit          sao_p   [NSLICE][NTU][4];
  se_rec_t     sao_exp [NSLICE][NTU][$];   // a terminate bin 0 follows the block
  bit          tu_mvd  [NSLICE][NTU];   // an mvd_coding precedes the block
  se_rec_t     mvd_exp [NSLICE][NTU][$];
  bit          tu_intra [NSLICE][NTU];  // intra modes of a CU precede the block
  bit          intra_n4 [NSLICE][NTU];
  se_rec_t     intra_exp [NSLICE][NTU][$];
  bit          tu_pu [NSLICE][NTU];     // an inter prediction unit precedes the block
  int          pu_p [NSLICE][NTU][8];   // skip, B, merge-1, nref0-1, nref1-1, l1zero, depth, pb12
  se_rec_t     pu_exp [NSLICE][NTU][$];
  int          sl_qp   [NSLICE];
  int          sl_type [NSLICE];
  logic [31:0] words   [NSLICE][$];
  int          coefs   [NSLICE][NTU][1024];

  // mechanism counters
  int n_reg = 0, n_byp = 0, n_term0 = 0, n_term1 = 0, n_stall = 0, n_lps_renorm = 0;
  int n_csbf0 = 0, n_suffix = 0, n_gt2 = 0, n_rice4 = 0, n_ctxset_odd = 0;
  int n_escape = 0, n_infer_dc = 0, n_size[6], n_chroma = 0, n_bs_gap = 0;
  int n_hidden = 0, n_hor = 0, n_ver = 0, n_ts = 0, n_sao = 0, n_sao_merge = 0;
  int n_mvd = 0, n_mvd_egk = 0, n_intra = 0, n_intra_nxn = 0;
  int n_pu = 0, n_pu_b = 0, n_pu_merge = 0;

  // bitstream feeder
  int  feed_slice = -1;
  int  feed_pos;
  bit  gap;
  always_ff @(posedge clk) begin
    // slice 1 is fed slower than the decoder consumes, to starve it
    gap <= (feed_slice == 1) ? ($urandom_range(0, 99) < 97) : ($urandom_range(0, 9) == 0);
    if (bs_valid && bs_ready) feed_pos <= feed_pos + 1;
  end
  always_comb begin
    bs_valid = 1'b0;
    bs_word  = '0;
    if (feed_slice >= 0 && feed_pos < words[feed_slice].size() && !gap) begin
      bs_valid = 1'b1;
      bs_word  = words[feed_slice][feed_pos];
    end
  end

  // received coefficients
  int recv [1024];
  int nrecv;
  int got_ts;     // decoded transform_skip_flag, -1 when none
  always @(posedge clk) if (rst_n && se_valid && se_id == SE_TS) got_ts = int'(se_value);
  se_rec_t got_sao[$];
  se_rec_t got_mvd[$];
  se_rec_t got_intra[$];
  always @(posedge clk) if (rst_n && se_valid && se_id >= SE_SAO_MERGE_LEFT) begin
    se_rec_t r;
    r.se = int'(se_id); r.val = int'(se_value);
    if (se_id >= SE_PREV_INTRA && se_id <= SE_CHROMA_IDX) got_intra.push_back(r);
    else if (se_id >= SE_MVD_GT0) got_mvd.push_back(r);
    else                     got_sao.push_back(r);
  end
  always @(posedge clk) if (rst_n && coef_valid) begin
    recv[int'(coef_x) + 32 * int'(coef_y)] = int'(coef_value);
    nrecv++;
  end

  // mechanism monitors
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (gap) n_bs_gap++;
    if (dut.adu_bin_valid) begin
      case (dut.adu_req_mode)
        BIN_REGULAR: begin
          n_reg++;
          if (dut.consume_n > 4'd1) n_lps_renorm++;
        end
        BIN_BYPASS: n_byp++;
        default: if (dut.adu_bin) n_term1++; else n_term0++;
      endcase
    end
    if (dut.adu_req_valid && dut.avail < 8'd9) n_stall++;
    if (se_valid && se_id == SE_CSBF && se_value == 16'd0) n_csbf0++;
    if (se_valid && (se_id == SE_LAST_X_SUFFIX || se_id == SE_LAST_Y_SUFFIX)) n_suffix++;
    if (se_valid && se_id == SE_GT2) n_gt2++;
    if (se_valid && se_id == SE_REM && dut.u_bsru.rice_q == 3'd4) n_rice4++;
    if (se_valid && se_id == SE_REM && se_value > (16'd3 << dut.u_bsru.rice_q)) n_escape++;
    if (dut.adu_bin_valid && dut.se == SE_GT1 && dut.ctx_set[0]) n_ctxset_odd++;
  end

  // random coefficient block
  function automatic void make_block(int log2, ref int c[1024]);
    int s = 1 << log2;
    int dens = $urandom_range(1, 100);
    int any = 0;
    int dc_only = ($urandom_range(0, 5) == 0);  // only sub-block DC positions
    for (int i = 0; i < 1024; i++) c[i] = 0;
    if ($urandom_range(0, 4) == 0) dens = 3;  // very sparse
    if (dc_only) dens = 50;
    for (int y = 0; y < s; y++)
      for (int x = 0; x < s; x++)
        if ((!dc_only || (x % 4 == 0 && y % 4 == 0)) && $urandom_range(1, 100) <= dens) begin
          int r = $urandom_range(0, 99);
          int mag = (r < 55) ? 1 : (r < 75) ? 2 : (r < 85) ? $urandom_range(3, 6)
                  : (r < 97) ? $urandom_range(7, 60) : $urandom_range(61, 3000);
          c[x + 32 * y] = $urandom_range(0, 1) ? -mag : mag;
          any = 1;
        end
    if (!any) c[$urandom_range(0, s - 1) + 32 * $urandom_range(0, s - 1)] = 1;
  endfunction

  task automatic build();
    for (int i = 0; i < 3 * NUM_CTX; i++) init_mem[i] = 8'($urandom_range(0, 255));
    for (int s = 0; s < NSLICE; s++) begin
      cabac_enc enc = new();
      resid_gen g = new();
      ctx_t ctxs[NUM_CTX];
      bit   bits[$];
      sl_qp[s]   = $urandom_range(0, 51);
      sl_type[s] = $urandom_range(0, 2);
      for (int i = 0; i < NUM_CTX; i++)
        ctxs[i] = ref_init(int'(init_mem[sl_type[s] * NUM_CTX + i]), sl_qp[s]);
      for (int t = 0; t < NTU; t++) begin
        tu_log2[s][t] = (t < 4) ? 2 + t : $urandom_range(2, 5);
        tu_cidx[s][t] = (t % 3 == 2) ? $urandom_range(1, 2) : 0;
        tu_eos0[s][t] = (t != NTU - 1) && ($urandom_range(0, 2) == 0);
        tu_scan[s][t] = (tu_log2[s][t] <= 3) ? $urandom_range(0, 2) : 0;
        tu_sdh[s][t]  = $urandom_range(0, 1);
        tu_tse[s][t]  = $urandom_range(0, 1);
        tu_tsf[s][t]  = $urandom_range(0, 1);
        tu_sao[s][t]  = ($urandom_range(0, 2) == 0);
        tu_mvd[s][t]  = ($urandom_range(0, 2) == 0);
        tu_intra[s][t] = ($urandom_range(0, 2) == 0);
        intra_n4[s][t] = $urandom_range(0, 1);
        tu_pu[s][t] = ($urandom_range(0, 2) == 0);
        pu_p[s][t] = '{$urandom_range(0, 4) == 0, $urandom_range(0, 1), $urandom_range(0, 4),
                       $urandom_range(0, 15), $urandom_range(0, 15), $urandom_range(0, 1),
                       $urandom_range(0, 3), $urandom_range(0, 3) == 0};
        foreach (sao_p[s][t][i]) sao_p[s][t][i] = $urandom_range(0, 1);
        make_block(tu_log2[s][t], coefs[s][t]);
        g.q.delete();
        g.sev.delete();
        if (tu_sao[s][t]) begin
          g.gen_sao(sao_p[s][t][0], sao_p[s][t][1], sao_p[s][t][2], sao_p[s][t][3]);
          sao_exp[s][t] = g.sev;
          g.sev.delete();
        end
        if (tu_mvd[s][t]) begin
          int mv[2];
          foreach (mv[i])
            case ($urandom_range(0, 3))
              0: mv[i] = 0;
              1: mv[i] = $urandom_range(0, 1) ? 1 : -1;
              2: mv[i] = $urandom_range(0, 40) - 20;
              default: mv[i] = $urandom_range(0, 65536) - 32768;
            endcase
          g.gen_mvd(mv[0], mv[1]);
          mvd_exp[s][t] = g.sev;
          g.sev.delete();
        end
        if (tu_intra[s][t]) begin
          g.gen_intra(intra_n4[s][t]);
          intra_exp[s][t] = g.sev;
          g.sev.delete();
        end
        if (tu_pu[s][t]) begin
          g.gen_pu(pu_p[s][t][0], pu_p[s][t][1], pu_p[s][t][2], pu_p[s][t][3],
                   pu_p[s][t][1] ? pu_p[s][t][4] : 0, pu_p[s][t][5], pu_p[s][t][6], pu_p[s][t][7]);
          pu_exp[s][t] = g.sev;
          g.sev.delete();
        end
        g.gen(coefs[s][t], tu_log2[s][t], tu_cidx[s][t], tu_scan[s][t], tu_sdh[s][t],
              tu_tse[s][t], tu_tsf[s][t]);
        foreach (g.q[k]) begin
          if (g.q[k].mode == 0) enc.decision(ctxs[g.q[k].ctx], g.q[k].b);
          else enc.bypass(g.q[k].b);
        end
        if (tu_eos0[s][t]) enc.terminate(0);
      end
      enc.terminate(1);
      n_hidden += g.n_hidden;
      bits = enc.bits;
      while (bits.size() % 32 != 0) bits.push_back(0);
      for (int i = 0; i < 96; i++) bits.push_back(0);
      for (int w = 0; w < bits.size() / 32; w++) begin
        logic [31:0] wd;
        for (int b = 0; b < 32; b++) wd[31 - b] = bits[32 * w + b];
        words[s].push_back(wd);
      end
    end
  endtask

  task automatic issue(cmd_e c);
    cmd       <= c;
    cmd_valid <= 1'b1;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    cmd_valid <= 1'b0;
  endtask

  task automatic wait_eos(bit expect_flag);
    while (!eos_valid) @(posedge clk);
    checks++;
    if (eos_flag !== expect_flag) begin
      failures++;
      $display("FAIL eos flag %0d expected %0d", eos_flag, expect_flag);
    end
    @(posedge clk);
  endtask

  initial begin : main
    cmd_valid = 0; cmd = CMD_SLICE; slice_qp = 0; init_type = 0; log2_size = 2; c_idx = 0;
    scan = SCAN_DIAG; sdh_en = 0; ts_en = 0;
    sao_luma = 0; sao_chroma = 0; sao_left = 0; sao_up = 0; intra_nxn = 0;
    pu_skip = 0; pu_slice_b = 0; pu_mvd_l1_zero = 0; pu_pb12 = 0; pu_max_merge_m1 = 0;
    pu_nref0_m1 = 0; pu_nref1_m1 = 0; pu_ct_depth = 0;
    feed_pos = 0;
    build();
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int s = 0; s < NSLICE; s++) begin
      slice_qp  <= 6'(sl_qp[s]);
      init_type <= 2'(sl_type[s]);
      issue(CMD_SLICE);
      feed_slice = s;
      feed_pos   = 0;
      while (!cmd_ready) @(posedge clk);
      for (int t = 0; t < NTU; t++) begin
        int nz;
        nz = 0;
        for (int i = 0; i < 1024; i++) recv[i] = 0;
        nrecv = 0;
        got_ts = -1;
        if (tu_sao[s][t]) begin
          got_sao.delete();
          sao_luma   <= sao_p[s][t][0];
          sao_chroma <= sao_p[s][t][1];
          sao_left   <= sao_p[s][t][2];
          sao_up     <= sao_p[s][t][3];
          issue(CMD_SAO);
          @(posedge clk);
          while (!cmd_ready) @(posedge clk);
          n_sao++;
          checks++;
          if (got_sao.size() != sao_exp[s][t].size()) begin
            failures++;
            $display("FAIL slice %0d tu %0d: %0d SAO elements, %0d expected", s, t,
                     got_sao.size(), sao_exp[s][t].size());
          end else begin
            foreach (got_sao[j]) begin
              checks++;
              if (got_sao[j].se != sao_exp[s][t][j].se || got_sao[j].val != sao_exp[s][t][j].val) begin
                failures++;
                $display("FAIL slice %0d tu %0d SAO element %0d", s, t, j);
              end
              if ((got_sao[j].se == SE_SAO_MERGE_LEFT || got_sao[j].se == SE_SAO_MERGE_UP) &&
                  got_sao[j].val == 1) n_sao_merge++;
            end
          end
        end
        if (tu_mvd[s][t]) begin
          got_mvd.delete();
          issue(CMD_MVD);
          @(posedge clk);
          while (!cmd_ready) @(posedge clk);
          n_mvd++;
          checks++;
          if (got_mvd.size() != mvd_exp[s][t].size()) begin
            failures++;
            $display("FAIL slice %0d tu %0d: %0d MVD elements, %0d expected", s, t,
                     got_mvd.size(), mvd_exp[s][t].size());
          end else begin
            foreach (got_mvd[j]) begin
              checks++;
              if (got_mvd[j].se != mvd_exp[s][t][j].se || got_mvd[j].val != mvd_exp[s][t][j].val) begin
                failures++;
                $display("FAIL slice %0d tu %0d MVD element %0d", s, t, j);
              end
              if (got_mvd[j].se == SE_MVD_MINUS2 && got_mvd[j].val >= 2) n_mvd_egk++;
            end
          end
        end
        if (tu_intra[s][t]) begin
          got_intra.delete();
          intra_nxn <= intra_n4[s][t];
          issue(CMD_INTRA);
          @(posedge clk);
          while (!cmd_ready) @(posedge clk);
          n_intra++;
          if (intra_n4[s][t]) n_intra_nxn++;
          checks++;
          if (got_intra.size() != intra_exp[s][t].size()) begin
            failures++;
            $display("FAIL slice %0d tu %0d: %0d intra elements, %0d expected", s, t,
                     got_intra.size(), intra_exp[s][t].size());
          end else begin
            foreach (got_intra[j]) begin
              checks++;
              if (got_intra[j].se != intra_exp[s][t][j].se || got_intra[j].val != intra_exp[s][t][j].val) begin
                failures++;
                $display("FAIL slice %0d tu %0d intra element %0d", s, t, j);
              end
            end
          end
        end
        if (tu_pu[s][t]) begin
          got_mvd.delete();
          pu_skip         <= pu_p[s][t][0];
          pu_slice_b      <= pu_p[s][t][1];
          pu_max_merge_m1 <= 3'(pu_p[s][t][2]);
          pu_nref0_m1     <= 4'(pu_p[s][t][3]);
          pu_nref1_m1     <= pu_p[s][t][1] ? 4'(pu_p[s][t][4]) : 4'd0;
          pu_mvd_l1_zero  <= pu_p[s][t][5];
          pu_ct_depth     <= 2'(pu_p[s][t][6]);
          pu_pb12         <= pu_p[s][t][7];
          issue(CMD_PU);
          @(posedge clk);
          while (!cmd_ready) @(posedge clk);
          n_pu++;
          if (pu_p[s][t][1]) n_pu_b++;
          checks++;
          if (got_mvd.size() != pu_exp[s][t].size()) begin
            failures++;
            $display("FAIL slice %0d tu %0d: %0d PU elements, %0d expected", s, t,
                     got_mvd.size(), pu_exp[s][t].size());
          end else begin
            foreach (got_mvd[j]) begin
              checks++;
              if (got_mvd[j].se != pu_exp[s][t][j].se || got_mvd[j].val != pu_exp[s][t][j].val) begin
                failures++;
                $display("FAIL slice %0d tu %0d PU element %0d", s, t, j);
              end
              if (got_mvd[j].se == SE_MERGE_FLAG && got_mvd[j].val == 1) n_pu_merge++;
            end
          end
        end
        log2_size <= 3'(tu_log2[s][t]);
        c_idx     <= 2'(tu_cidx[s][t]);
        scan      <= scan_e'(tu_scan[s][t]);
        sdh_en    <= tu_sdh[s][t];
        ts_en     <= tu_tse[s][t];
        issue(CMD_TU);
        while (!tu_done) @(posedge clk);
        @(posedge clk);
        checks++;
        if (got_ts != ((tu_tse[s][t] && tu_log2[s][t] == 2) ? int'(tu_tsf[s][t]) : -1)) begin
          failures++;
          $display("FAIL slice %0d tu %0d: transform_skip_flag %0d", s, t, got_ts);
        end
        if (got_ts >= 0) n_ts++;
        if (tu_scan[s][t] == 1) n_hor++;
        if (tu_scan[s][t] == 2) n_ver++;
        n_size[tu_log2[s][t]]++;
        if (tu_cidx[s][t] != 0) n_chroma++;
        for (int i = 0; i < 1024; i++) begin
          if (coefs[s][t][i] != 0) nz++;
          checks++;
          if (recv[i] != coefs[s][t][i]) begin
            failures++;
            if (failures < 10)
              $display("FAIL slice %0d tu %0d pos (%0d,%0d): got %0d expected %0d",
                       s, t, i % 32, i / 32, recv[i], coefs[s][t][i]);
          end
        end
        checks++;
        if (nrecv != nz) begin
          failures++;
          $display("FAIL slice %0d tu %0d: %0d coefficients output, %0d expected", s, t, nrecv, nz);
        end
        if (tu_eos0[s][t]) begin
          issue(CMD_END);
          wait_eos(1'b0);
        end
      end
      issue(CMD_END);
      wait_eos(1'b1);
    end
    // DC positions inferred by the decoder: counted from the reference syntax
    // (a coded sub-block whose only significant coefficient is its DC).
    n_infer_dc = 0;
    for (int s = 0; s < NSLICE; s++)
      for (int t = 0; t < NTU; t++) begin
        int sbn;
        sbn = 1 << (tu_log2[s][t] - 2);
        for (int ys = 0; ys < sbn; ys++)
          for (int xs = 0; xs < sbn; xs++) begin
            int cnt;
            cnt = 0;
            for (int y = 0; y < 4; y++)
              for (int x = 0; x < 4; x++)
                if (coefs[s][t][(xs*4+x) + 32*(ys*4+y)] != 0) cnt++;
            if (cnt == 1 && coefs[s][t][xs*4 + 32*ys*4] != 0 && (xs + ys) > 0) n_infer_dc++;
          end
      end
    $display("mechanisms: regular=%0d bypass=%0d term0=%0d term1=%0d bit-stall=%0d lps-renorm=%0d",
             n_reg, n_byp, n_term0, n_term1, n_stall, n_lps_renorm);
    $display("  csbf0=%0d last-suffix=%0d gt2=%0d rice4=%0d rem-escape=%0d ctxset-carry=%0d dc-infer-candidates=%0d",
             n_csbf0, n_suffix, n_gt2, n_rice4, n_escape, n_ctxset_odd, n_infer_dc);
    $display("  sizes 4/8/16/32=%0d/%0d/%0d/%0d chroma=%0d; %0d bins in %0d cycles",
             n_size[2], n_size[3], n_size[4], n_size[5], n_chroma, n_reg + n_byp + n_term0 + n_term1, cycles);
    $display("  horizontal=%0d vertical=%0d hidden-sign=%0d transform-skip-flag=%0d sao-ctb=%0d sao-merge=%0d",
             n_hor, n_ver, n_hidden, n_ts, n_sao, n_sao_merge);
    $display("  mvd=%0d mvd-exp-golomb-prefix=%0d intra-cu=%0d intra-nxn=%0d", n_mvd, n_mvd_egk,
             n_intra, n_intra_nxn);
    $display("  pu=%0d pu-b=%0d pu-merge=%0d", n_pu, n_pu_b, n_pu_merge);
    begin
      int m[$];
      m = '{n_reg, n_byp, n_term0, n_term1, n_stall, n_lps_renorm, n_csbf0, n_suffix,
                   n_gt2, n_rice4, n_escape, n_ctxset_odd, n_infer_dc,
                   n_size[2], n_size[3], n_size[4], n_size[5], n_chroma,
                   n_hor, n_ver, n_hidden, n_ts, n_sao, n_sao_merge, n_mvd, n_mvd_egk,
                   n_intra, n_intra_nxn, n_pu, n_pu_b, n_pu_merge};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never occurred", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
